`timescale 1ps/1ps
// tb_apuf_switch: exhaustive check of one switch stage. With c = 0 both
// inputs pass straight, with c = 1 they are crossed.
module tb_apuf_switch;
  logic a_i, b_i, c_i, a_o, b_o;
  int checks = 0, failures = 0;

  apuf_switch dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {c_i, b_i, a_i} = 3'(v);
      #10;
      checks += 2;
      if (a_o != (c_i ? b_i : a_i)) begin failures++; $display("FAIL: a_o for %b", 3'(v)); end
      if (b_o != (c_i ? a_i : b_i)) begin failures++; $display("FAIL: b_o for %b", 3'(v)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
