// ibus_fo_action: sends one 16-bit word to the fiber transmitter as two
// characters, low byte first.
//
// How it works: the transmitter takes a character on each rising edge of its
// byte clock fiber_clk (fo_CKW, which toggles every clk cycle, so one
// character every two clk cycles) while its enable fo_ENA_l is low. The
// sequencer therefore changes fo_d and fo_ENA_l only on the clk edges where
// fiber_clk falls, giving the transmitter half a byte period of set-up time.
//   FO_IDLE   wait for fo_req (and this chip not addressed from the fiber);
//             load the low byte. If fiber_clk is high (it falls on this
//             edge) enable at once and go to FO_WAIT1, else go to FO_BYTE1.
//   FO_BYTE1  wait for fiber_clk high, then pull fo_ENA_l low, raise fo_ack.
//   FO_WAIT1  fiber_clk rises: the low byte is taken.
//   FO_BYTE2  fiber_clk falls: load the high byte, enable stays low.
//   FO_WAIT2  fiber_clk rises: the high byte is taken; release the enable.
// fo_ack rises together with the first enable and stays high until the
// sequencer is back in FO_IDLE, so the requester sees a four-phase handshake.
// fo_d[8] (command flag) and fo_d[9] (violation) are always 0: only data
// characters are sent.
//
// Timing: from fo_req to the first character taken is 2 or 3 clk cycles,
// the whole word takes 5 or 6 clk cycles including the return to FO_IDLE.
//
// The state sequence, the byte order, the fiber_clk alignment and the gating
// by il_i_am_addressed follow the original design. Where fo_ENA_l returns
// high (FO_IDLE and FO_WAIT2) and the reset values are this design's choice.
module ibus_fo_action (
  input  logic        clk,
  input  logic        reset,
  input  logic        il_i_am_addressed,
  input  logic        fo_req,
  output logic        fo_ack,
  input  logic [15:0] data,
  input  logic        fiber_clk,
  output logic [9:0]  fo_d,
  output logic        fo_ENA_l
);

  import tout_pkg::*;

  typedef enum logic [2:0] {FO_IDLE, FO_BYTE1, FO_WAIT1, FO_BYTE2, FO_WAIT2} fo_state_t;

  fo_state_t state;
  fo_char_t  chr;

  assign fo_d = chr;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state    <= FO_IDLE;
      chr      <= '0;
      fo_ack   <= 1'b0;
      fo_ENA_l <= 1'b1;
    end else begin
      unique case (state)
        FO_IDLE: begin
          chr.command <= 1'b0;
          chr.svb     <= 1'b0;
          fo_ack      <= 1'b0;
          fo_ENA_l    <= 1'b1;
          if (fo_req && !il_i_am_addressed) begin
            chr.data <= data[7:0];
            if (fiber_clk) begin
              fo_ENA_l <= 1'b0;
              fo_ack   <= 1'b1;
              state    <= FO_WAIT1;
            end else begin
              state    <= FO_BYTE1;
            end
          end
        end
        FO_BYTE1: begin
          if (fiber_clk) begin
            fo_ENA_l <= 1'b0;
            fo_ack   <= 1'b1;
            state    <= FO_WAIT1;
          end
        end
        FO_WAIT1: begin
          fo_ENA_l <= 1'b0;
          state    <= FO_BYTE2;
        end
        FO_BYTE2: begin
          fo_ENA_l <= 1'b0;
          chr.data <= data[15:8];
          state    <= FO_WAIT2;
        end
        FO_WAIT2: begin
          fo_ENA_l <= 1'b1;
          state    <= FO_IDLE;
        end
        default: state <= FO_IDLE;
      endcase
    end
  end

  // The enable is low for exactly three clk cycles per word, which covers
  // two rising edges of the byte clock.
  a_enable_two_chars: assert property (@(posedge clk) disable iff (reset)
    $fell(fo_ENA_l) |-> !fo_ENA_l ##1 !fo_ENA_l ##1 !fo_ENA_l ##1 fo_ENA_l);

endmodule
