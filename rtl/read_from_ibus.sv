// read_from_ibus: takes a word from the upper half of the on-board bus and
// hands it to the fiber-output sequencer (ibus_fo_action).
//
// How it works: a four-state machine. In IDLE a high iu_req latches iu_io
// into `data` and raises iu_ack. In HS the block keeps iu_ack high and
// already raises req towards the fiber side; it waits for the bus master to
// drop iu_req. In IU_HS1 it holds req until ack arrives, then drops req; in
// IU_HS2 it waits for ack to fall, which shows the word has been sent. The
// waits in HS and IU_HS1 are bounded by a TIMEOUT_W-bit counter
// (2**TIMEOUT_W cycles): a bus master that never releases iu_req is let go,
// and a word the fiber side never accepts is dropped. IU_HS2 has no timeout,
// because once ack has been seen the other side is known to be there.
//
// Interface: iu_req/iu_ack/iu_io is the on-board bus handshake, req/ack/data
// the four-phase handshake towards ibus_fo_action. `data` stays stable from
// the capture until the next capture. All outputs are registered; reset is
// asynchronous and active high.
//
// The states, handshakes and timeouts follow the original design. The reset
// values (idle state, outputs low, data cleared) and dropping req in the
// cycle the IU_HS1 timeout fires are this design's choices.
module read_from_ibus #(
  parameter int unsigned TIMEOUT_W = tout_pkg::TIMEOUT_W
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        iu_req,
  output logic        iu_ack,
  input  logic [15:0] iu_io,
  output logic [15:0] data,
  output logic        req,
  input  logic        ack
);

  typedef enum logic [1:0] {IDLE, HS, IU_HS1, IU_HS2} iu_read_state_t;

  localparam logic [TIMEOUT_W-1:0] TIMEOUT_MAX = '1;

  iu_read_state_t       state;
  logic [TIMEOUT_W-1:0] timeout;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state   <= IDLE;
      timeout <= '0;
      data    <= '0;
      req     <= 1'b0;
      iu_ack  <= 1'b0;
    end else begin
      req    <= 1'b0;
      iu_ack <= 1'b0;
      unique case (state)
        IDLE: begin
          if (iu_req) begin
            data    <= iu_io;
            iu_ack  <= 1'b1;
            state   <= HS;
            timeout <= '0;
          end
        end
        HS: begin
          iu_ack <= 1'b1;
          req    <= 1'b1;
          if (!iu_req || timeout == TIMEOUT_MAX) begin
            state   <= IU_HS1;
            timeout <= '0;
          end else begin
            timeout <= timeout + 1'b1;
          end
        end
        IU_HS1: begin
          req <= 1'b1;
          if (ack) begin
            req   <= 1'b0;
            state <= IU_HS2;
          end else if (timeout == TIMEOUT_MAX) begin
            req   <= 1'b0;
            state <= IDLE;
          end else begin
            timeout <= timeout + 1'b1;
          end
        end
        IU_HS2: begin
          if (!ack) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
