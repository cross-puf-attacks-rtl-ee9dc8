`timescale 1ps/1ps
// tb_resp_reg: random capture enables and data on a 2-lane response
// register, compared with a reference register kept by the testbench;
// also checks the asynchronous reset.
module tb_resp_reg;
  localparam int W = 2;
  logic clk = 0, rst_n, cap_en;
  logic [W-1:0] q, resp, model;
  int checks = 0, failures = 0, caps = 0;

  resp_reg #(.W(W)) dut (.*);

  always #5000 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; cap_en = 0; q = '1; model = '0;
    #12_000;
    checks++; if (resp != '0) begin failures++; $display("FAIL: reset"); end
    rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      cap_en = $urandom_range(0, 1);
      q = W'($urandom);
      @(posedge clk);
      if (cap_en) begin model = q; caps++; end
      #1;
      checks++;
      if (resp != model) begin failures++; $display("FAIL: cycle %0d resp=%b exp=%b", k, resp, model); end
    end
    #1200; rst_n = 0; #100;
    checks++; if (resp != '0) begin failures++; $display("FAIL: async reset"); end
    checks++; if (caps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
