// ibus_fi_port: output buffer between the FIFO data pump and read_from_fi.
//
// How it works: when the pump reports a complete word
// (data_pump_word_ready) and the receiving side is not still acknowledging
// (ack low), the word in fiber_to_ibus_buf is copied into `data`, req is
// raised and refill_ibus_output_buf drops, which tells the pump that the
// word has been taken. READ_REQ holds req until ack rises; END_CYCLE waits
// for ack to fall again, then raises refill_ibus_output_buf so the pump may
// fetch the next word. Both waits share one TIMEOUT_W-bit counter: after
// 2**TIMEOUT_W cycles in total the port gives up, releases req and the
// buffer, and returns to IDLE.
//
// Interface: data/req/ack is a four-phase handshake to read_from_fi;
// fiber_to_ibus_buf, data_pump_word_ready and refill_ibus_output_buf pair
// with fifo_data_pump. Outputs are registered; reset is asynchronous and
// active high, and leaves refill_ibus_output_buf high (buffer free).
//
// The three states, the capture condition and the shared timeout follow the
// original design. Holding req until ack (rather than a one-cycle pulse) and
// using refill_ibus_output_buf as a "buffer free" flag that is low from the
// capture to the end of the handshake are this design's choices, made so
// that the pump cannot overwrite or lose a word.
module ibus_fi_port #(
  parameter int unsigned TIMEOUT_W = tout_pkg::TIMEOUT_W
) (
  input  logic        clk,
  input  logic        reset,
  output logic [15:0] data,
  output logic        req,
  input  logic        ack,
  input  logic [15:0] fiber_to_ibus_buf,
  input  logic        data_pump_word_ready,
  output logic        refill_ibus_output_buf
);

  typedef enum logic [1:0] {IDLE, READ_REQ, END_CYCLE} read_state_t;

  localparam logic [TIMEOUT_W-1:0] TIMEOUT_MAX = '1;

  read_state_t          state;
  logic [TIMEOUT_W-1:0] timeout;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state                  <= IDLE;
      timeout                <= '0;
      data                   <= '0;
      req                    <= 1'b0;
      refill_ibus_output_buf <= 1'b1;
    end else begin
      unique case (state)
        IDLE: begin
          req     <= 1'b0;
          timeout <= '0;
          if (data_pump_word_ready && !ack) begin
            data                   <= fiber_to_ibus_buf;
            req                    <= 1'b1;
            refill_ibus_output_buf <= 1'b0;
            state                  <= READ_REQ;
          end
        end
        READ_REQ: begin
          if (ack) begin
            req   <= 1'b0;
            state <= END_CYCLE;
          end else if (timeout == TIMEOUT_MAX) begin
            req                    <= 1'b0;
            refill_ibus_output_buf <= 1'b1;
            state                  <= IDLE;
          end else begin
            timeout <= timeout + 1'b1;
          end
        end
        END_CYCLE: begin
          if (!ack || timeout == TIMEOUT_MAX) begin
            refill_ibus_output_buf <= 1'b1;
            state                  <= IDLE;
          end else begin
            timeout <= timeout + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // req only falls once ack has been seen or the wait has timed out.
  a_req_held: assert property (@(posedge clk) disable iff (reset)
    $fell(req) |-> $past(ack) || $past(timeout) == TIMEOUT_MAX);

endmodule
