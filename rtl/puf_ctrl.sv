`timescale 1ps/1ps
// puf_ctrl: PUF control state machine between the UART and the PUF.
//
// It collects a challenge from the host, applies it to the PUF, fires the
// PUF with a rising edge, captures the response one clock cycle later and
// returns it to the host. One query:
//   CH_RX   receive ceil(N_STAGES/8) bytes, least significant byte first,
//           into the challenge register (the challenge stays applied until
//           the next query's bytes arrive).
//   INIT    one cycle: 'reg_init' makes the DRILL flip-flops load the
//           current random bits, and 'prng_step' advances the generator
//           (reg_init stays low when DRILL = 0).
//   FIRE    'trigger' is high from the edge that enters FIRE; 'cap_en' is
//           high during FIRE, so the response register captures at the next
//           edge: the response is registered one clock after the trigger.
//   RELEASE 'trigger' returns low; the chain has a full cycle to clear.
//   SEND    one byte {zeros, resp} goes to the UART transmitter.
// The sequence, the byte protocol and the single-cycle INIT are this design's
// choices; the document gives the blocks (challenge, trigger, response,
// UART signals) and the single-cycle response.
//
// Interface: rx_valid/rx_data from the UART receiver, tx_valid/tx_data/
// tx_ready to the transmitter; challenge/trigger to the PUF; reg_init,
// cap_en, prng_step to the response storage and generator; resp from the
// response register. 'busy' is high from INIT to the end of SEND.
module puf_ctrl #(
  parameter int unsigned N_STAGES = apuf_pkg::N_STAGES_DEF,
  parameter int unsigned NUM_PUF  = 1,
  parameter bit          DRILL    = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  // UART side
  input  logic                rx_valid,
  input  logic [7:0]          rx_data,
  output logic                tx_valid,
  output logic [7:0]          tx_data,
  input  logic                tx_ready,
  // PUF side
  output logic [N_STAGES-1:0] challenge,
  output logic                trigger,
  output logic                reg_init,
  output logic                cap_en,
  output logic                prng_step,
  input  logic [NUM_PUF-1:0]  resp,
  output logic                busy
);
  localparam int unsigned NBYTES = apuf_pkg::challenge_bytes(N_STAGES);
  localparam int unsigned BCW    = $clog2(NBYTES + 1);

  typedef enum logic [2:0] {CH_RX, INIT, FIRE, RELEASE, SEND} ctrl_state_e;

  ctrl_state_e          state;
  logic [BCW-1:0]       byte_cnt;
  logic [NBYTES*8-1:0]  ch_buf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= CH_RX;
      byte_cnt <= '0;
      ch_buf   <= '0;
      trigger  <= 1'b0;
    end else begin
      unique case (state)
        CH_RX: if (rx_valid) begin
          // Bytes arrive least significant first: shift in from the top.
          ch_buf <= {rx_data, ch_buf[NBYTES*8-1:8]};
          if (byte_cnt == BCW'(NBYTES - 1)) begin
            byte_cnt <= '0;
            state    <= INIT;
          end else begin
            byte_cnt <= byte_cnt + 1'b1;
          end
        end
        INIT: begin
          trigger <= 1'b1;
          state   <= FIRE;
        end
        FIRE: begin
          trigger <= 1'b0;
          state   <= RELEASE;
        end
        RELEASE: state <= SEND;
        SEND: if (tx_ready) state <= CH_RX;
        default: state <= CH_RX;
      endcase
    end
  end

  assign challenge = ch_buf[N_STAGES-1:0];
  assign reg_init  = DRILL && (state == INIT);
  assign prng_step = (state == INIT);
  assign cap_en    = (state == FIRE);
  assign tx_valid  = (state == SEND);
  assign tx_data   = 8'(resp);
  assign busy      = (state != CH_RX);

  // The trigger is only ever high while the response is being captured.
  a_trigger_only_in_fire: assert property (@(posedge clk) disable iff (!rst_n)
                                          trigger |-> state == FIRE);
  initial assert (NUM_PUF <= 8) else $error("puf_ctrl: response must fit one byte");
endmodule
