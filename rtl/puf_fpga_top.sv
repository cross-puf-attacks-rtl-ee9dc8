`timescale 1ps/1ps
// puf_fpga_top: arbiter-PUF test system with the DRILL countermeasure.
//
// The host PC talks to the FPGA over a UART. For each query it sends a
// challenge; the PUF control state machine applies it to NUM_PUF arbiter-PUF
// instances (1 = single-bit PUF, 2 = 2-bit parallel PUF, all lanes share the
// challenge), fires them with one rising edge, registers the response one
// system-clock cycle later and returns it as one byte.
//
// With DRILL = 1 (default) each lane's response sits in a drill_reg: a
// response flip-flop for q, a decoy flip-flop for q_n, and both preset to a
// bit from lfsr_prng just before the capture. With DRILL = 0 a plain
// resp_reg stores q, the unprotected baseline the countermeasure is measured
// against. The system clock (3.1875 MHz) comes from clock_pll fed by the
// 48 MHz board clock. noise_gen, on the 48 MHz clock, toggles 18 pins
// pseudo-randomly while noise_en is high (the noisy-environment experiment).
//
// The arbiter-PUF and the PLL are behavioural models with delays; the rest is
// synthesizable. PLACEMENT selects the set of per-path delays (PUF-0 ..
// PUF-4 stand for five placements of the same hard macro); lane k of
// placement p uses apuf_pkg::lane_seed(p, k).
//
// Ports: clk48 board clock; rst_n asynchronous active-low reset; uart_rxd /
// uart_txd serial line (8N1, CLKS_PER_BIT system clocks per bit);
// noise_en / noise_pins noise generator; pll_locked PLL status; puf_busy
// high while a query is being processed; decoy the
// decoy flip-flops (0 when DRILL = 0), brought out so their load is real.
// The system logic is held in reset until the PLL has locked.
module puf_fpga_top #(
  parameter int unsigned N_STAGES     = apuf_pkg::N_STAGES_DEF,
  parameter int unsigned NUM_PUF      = 1,
  parameter bit          DRILL        = 1'b1,
  parameter int unsigned PLACEMENT    = 0,
  parameter int unsigned CLKS_PER_BIT = 332,
  parameter int unsigned NOISE_PINS   = 18
) (
  input  logic                  clk48,
  input  logic                  rst_n,
  input  logic                  uart_rxd,
  output logic                  uart_txd,
  input  logic                  noise_en,
  output logic [NOISE_PINS-1:0] noise_pins,
  output logic                  pll_locked,
  output logic                  puf_busy,
  output logic [NUM_PUF-1:0]    decoy
);
  // ---------------------------------------------------------------- clocks
  logic clk_sys;

  clock_pll u_pll (
    .clk_in(clk48), .rst(!rst_n), .clk_out(clk_sys), .locked(pll_locked)
  );

  // Reset synchronisers: asynchronous assertion, synchronous release. The
  // system clock only runs once the PLL has locked, so an asynchronous
  // reset alone could be over before the first edge; the power-on value 00
  // (the FPGA configuration value) makes the released reset reach the
  // system domain only after two of its clock edges.
  logic [1:0] sys_rst_sync = 2'b00;
  logic [1:0] n48_rst_sync = 2'b00;
  logic       sys_rst_n, n48_rst_n, sys_rst_src_n;

  assign sys_rst_src_n = rst_n && pll_locked;

  always_ff @(posedge clk_sys or negedge sys_rst_src_n) begin
    if (!sys_rst_src_n) sys_rst_sync <= 2'b00;
    else                sys_rst_sync <= {sys_rst_sync[0], 1'b1};
  end
  assign sys_rst_n = sys_rst_sync[1];

  always_ff @(posedge clk48 or negedge rst_n) begin
    if (!rst_n) n48_rst_sync <= 2'b00;
    else        n48_rst_sync <= {n48_rst_sync[0], 1'b1};
  end
  assign n48_rst_n = n48_rst_sync[1];

  // ------------------------------------------------------------------ UART
  logic       rx_valid, tx_valid, tx_ready;
  logic [7:0] rx_data, tx_data;

  uart #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk(clk_sys), .rst_n(sys_rst_n), .rxd(uart_rxd), .txd(uart_txd),
    .rx_valid, .rx_data, .tx_valid, .tx_data, .tx_ready
  );

  // ------------------------------------------------------------ controller
  logic [N_STAGES-1:0] challenge;
  logic                trigger, reg_init, cap_en, prng_step;
  logic [NUM_PUF-1:0]  resp;

  puf_ctrl #(.N_STAGES(N_STAGES), .NUM_PUF(NUM_PUF), .DRILL(DRILL)) u_ctrl (
    .clk(clk_sys), .rst_n(sys_rst_n),
    .rx_valid, .rx_data, .tx_valid, .tx_data, .tx_ready,
    .challenge, .trigger, .reg_init, .cap_en, .prng_step, .resp, .busy(puf_busy)
  );

  // ------------------------------------------------------------ PUF lanes
  logic [NUM_PUF-1:0] q, q_n;

  for (genvar k = 0; k < NUM_PUF; k++) begin : g_puf
    arbiter_puf #(
      .N_STAGES(N_STAGES),
      .SEED(apuf_pkg::lane_seed(PLACEMENT, k))
    ) u_apuf (
      .challenge, .trigger, .q(q[k]), .q_n(q_n[k])
    );
  end

  // ------------------------------------------------------ response storage
  if (DRILL) begin : g_drill
    logic [NUM_PUF-1:0] rnd;

    lfsr_prng #(.OUT_W(NUM_PUF)) u_prng (
      .clk(clk_sys), .rst_n(sys_rst_n), .step(prng_step), .rnd
    );

    drill_reg #(.W(NUM_PUF)) u_reg (
      .clk(clk_sys), .rst_n(sys_rst_n), .init(reg_init), .rnd,
      .cap_en, .q, .q_n, .resp, .decoy
    );
  end else begin : g_plain
    resp_reg #(.W(NUM_PUF)) u_reg (
      .clk(clk_sys), .rst_n(sys_rst_n), .cap_en, .q, .resp
    );
    assign decoy = '0;
  end

  // ----------------------------------------------------------------- noise
  noise_gen #(.N_PINS(NOISE_PINS)) u_noise (
    .clk(clk48), .rst_n(n48_rst_n), .en(noise_en), .pins(noise_pins)
  );
endmodule
