// fiber_rec: receive side of the fiber link, in front of the external FIFO.
//
// How it works: the received character (fr_d[8:0], bit 8 = command flag) is
// wired straight to the FIFO data inputs and the receiver's ready strobe
// fr_RDY_l straight to the FIFO write strobe. Going through a clocked stage
// would shorten the write strobe below the FIFO's minimum width, because the
// receiver's ready output has an uneven duty cycle. The clocked part only
// watches the link:
//   - fifo_reset_l is pulled low at once (asynchronously) by the chip reset
//     or by reset_fifo_request, and released on the first clk edge after
//     both have gone;
//   - each character received while the link reports a valid signal
//     (fr_status) and reception is enabled gives a one-cycle
//     increment_fifo_count pulse (IDLE -> FIFO_LATCH, back to IDLE once
//     fr_RDY_l is high again, so a long strobe counts once);
//   - violation_count counts such characters that carry the receiver's
//     code-violation flag fr_d[9]; it saturates at its maximum and is cleared
//     by reset and by reset_fifo_request.
//
// The pass-through wiring, the FIFO reset control and the two-state watcher
// follow the original design. Counting code violations (the original
// declares the flag and the counter but never increments it), releasing the
// FIFO reset right after the request ends, and leaving FIFO_LATCH only when
// the strobe is high again are this design's choices. fr_d[11:10] are not
// used.
module fiber_rec (
  input  logic        clk,
  input  logic        reset,
  input  logic [11:0] fr_d,
  input  logic        fr_RDY_l,
  input  logic        fr_status,
  input  logic        receive_enabled,
  output logic        increment_fifo_count,
  output logic [7:0]  violation_count,
  output logic        fifo_reset_l,
  output logic [8:0]  fifo_D,
  output logic        fifo_WRITE_l,
  input  logic        reset_fifo_request
);

  import tout_pkg::*;

  typedef enum logic {IDLE, FIFO_LATCH} fr_state_t;

  fr_state_t state;
  fr_char_t  chr;
  logic      fifo_clear;

  assign chr          = fr_d;
  assign fifo_D       = fr_d[8:0];
  assign fifo_WRITE_l = fr_RDY_l;
  assign fifo_clear   = reset | reset_fifo_request;

  always_ff @(posedge clk or posedge fifo_clear) begin
    if (fifo_clear) fifo_reset_l <= 1'b0;
    else            fifo_reset_l <= 1'b1;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state                <= IDLE;
      increment_fifo_count <= 1'b0;
      violation_count      <= '0;
    end else begin
      increment_fifo_count <= 1'b0;
      unique case (state)
        IDLE: begin
          if (reset_fifo_request) begin
            violation_count <= '0;
          end else if (fr_status && receive_enabled && !fr_RDY_l) begin
            increment_fifo_count <= 1'b1;
            state                <= FIFO_LATCH;
            if (chr.code_violation && violation_count != '1)
              violation_count <= violation_count + 1'b1;
          end
        end
        FIFO_LATCH: begin
          if (reset_fifo_request) violation_count <= '0;
          if (fr_RDY_l) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
