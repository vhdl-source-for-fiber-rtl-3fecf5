// fifo_data_pump: reads received characters out of the external 9-bit FIFO
// and assembles pairs of data bytes into 16-bit words.
//
// How it works: the FIFO is read with an active-low strobe fifo_READ_l held
// low for one clk cycle (FIFO_STROBE -> FIFO_READ_DATA); the character on
// fifo_OUT is sampled at the end of that cycle, when the strobe rises and
// the FIFO advances. A character with bit 8 set is a command character: it
// is discarded and the byte count restarts, so a command character realigns
// the byte pairing. A data byte is shifted into fiber_to_ibus_buf from the
// top, so after two bytes the first one received sits in bits 7:0 and the
// second in bits 15:8 (low byte first, matching ibus_fo_action). After the
// second byte data_pump_word_ready is raised and held until
// ibus_fi_port takes the word (refill_ibus_output_buf low); the next word
// is fetched only when the port is free again (refill_ibus_output_buf high)
// and the FIFO is out of reset. Whenever fifo_EMPTY_l is low the pump waits
// in FIFO_WAIT_ON_EMPTY.
//
// Timing: with data waiting, a word takes 5 clk cycles from leaving IDLE
// (STROBE, READ_DATA, STROBE, READ_DATA, then IDLE with the word ready).
//
// The states, the strobe timing, the command-character skip and the byte
// order follow the original design. Holding data_pump_word_ready until the
// word is taken, and starting a fetch only when the port is free and the
// FIFO is out of reset (the original tested "FIFO out of reset OR port
// free", which lets the pump run ahead and lose words), are this design's
// choices.
module fifo_data_pump (
  input  logic        clk,
  input  logic        reset,
  output logic [15:0] fiber_to_ibus_buf,
  input  logic [8:0]  fifo_OUT,
  output logic        fifo_READ_l,
  output logic        data_pump_word_ready,
  input  logic        refill_ibus_output_buf,
  input  logic        fifo_reset_l,
  input  logic        fifo_EMPTY_l
);

  typedef enum logic [1:0] {IDLE, FIFO_STROBE, FIFO_READ_DATA, FIFO_WAIT_ON_EMPTY} pump_state_t;

  pump_state_t state;
  logic        count;  // bytes of the current word already received

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state                <= IDLE;
      count                <= 1'b0;
      fifo_READ_l          <= 1'b1;
      data_pump_word_ready <= 1'b0;
      fiber_to_ibus_buf    <= '0;
    end else begin
      fifo_READ_l <= 1'b1;
      unique case (state)
        IDLE: begin
          count <= 1'b0;
          if (data_pump_word_ready) begin
            if (!refill_ibus_output_buf) data_pump_word_ready <= 1'b0;
          end else if (fifo_reset_l && refill_ibus_output_buf) begin
            state <= fifo_EMPTY_l ? FIFO_STROBE : FIFO_WAIT_ON_EMPTY;
          end
        end
        FIFO_WAIT_ON_EMPTY: begin
          if (fifo_EMPTY_l) state <= FIFO_STROBE;
        end
        FIFO_STROBE: begin
          if (!fifo_EMPTY_l) begin
            state <= FIFO_WAIT_ON_EMPTY;
          end else begin
            fifo_READ_l <= 1'b0;
            state       <= FIFO_READ_DATA;
          end
        end
        FIFO_READ_DATA: begin
          if (fifo_OUT[8]) begin
            count <= 1'b0;
            state <= FIFO_STROBE;
          end else begin
            fiber_to_ibus_buf <= {fifo_OUT[7:0], fiber_to_ibus_buf[15:8]};
            if (count) begin
              data_pump_word_ready <= 1'b1;
              state                <= IDLE;
            end else begin
              count <= 1'b1;
              state <= fifo_EMPTY_l ? FIFO_STROBE : FIFO_WAIT_ON_EMPTY;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // The read strobe is never low for two cycles in a row.
  a_single_strobe: assert property (@(posedge clk) disable iff (reset)
    !fifo_READ_l |=> fifo_READ_l);

endmodule
