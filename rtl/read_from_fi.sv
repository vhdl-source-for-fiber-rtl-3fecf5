// read_from_fi: decodes words received over the fiber and writes data words
// onto the lower half of the on-board bus.
//
// How it works: a transaction is normally two words, an address word
// (bit 15 set, fields in tout_pkg::fi_addr_word_t) followed by a data word.
// In IDLE a word offered on req/data is latched into il_io (which drives the
// lower bus). AM_I_ADDRESSED decodes it:
//   - an address word clears the selection and the control flag. If its
//     remote bit matches i_am_remote and its chip field equals
//     my_ctrl_address, this is a control transaction: the control flag is
//     set, the sub-address is kept in `address`, and bit 5 of the word gives
//     a one-cycle request_reset pulse (a soft FIFO reset that needs no data
//     word). If the chip field equals my_data_address the sub-address is
//     kept as well. Every address word is then acknowledged (HS_FOR_ADDRESS).
//   - a data word is acknowledged in HS_FOR_DATA. After a control address it
//     goes to USE_CTRL_DATA, where no further action is defined. Otherwise
//     il_req is raised already in HS_FOR_DATA (to get a head start) and held
//     in INTERNAL_ACK1 until the board answers il_ack; INTERNAL_ACK2 waits
//     for il_ack to fall.
// Every wait is bounded by a TIMEOUT_W-bit counter (2**TIMEOUT_W cycles),
// after which the block returns to IDLE.
//
// Selection latch: with LATCH_SELECT = 0 (the default, as in the original
// design) FI_i_am_addressed is only ever cleared, and every data word is
// passed to the board. With LATCH_SELECT = 1 a data-address match sets
// FI_i_am_addressed until the next address word, and data words arriving
// while it is clear are acknowledged and dropped, as the original
// description of the chip intends. FI_i_am_addressed also holds back the
// fiber transmitter (ibus_fo_action) while set.
//
// Interface: req/ack/data is the four-phase handshake from ibus_fi_port;
// il_req/il_ack/il_io the lower-bus write. Outputs are registered; reset is
// asynchronous and active high. receive_enabled is high from the first clock
// after reset ("this side is always enabled"); loopback_state is always low.
//
// Acknowledging address words for other chips (instead of letting the
// sender time out) and the reset values are this design's choices.
module read_from_fi #(
  parameter int unsigned TIMEOUT_W    = tout_pkg::TIMEOUT_W,
  parameter bit          LATCH_SELECT = 1'b0
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        req,
  output logic        ack,
  input  logic [15:0] data,
  output logic [15:0] il_io,
  output logic [7:0]  address,
  output logic        il_req,
  input  logic        il_ack,
  input  logic        i_am_remote,
  input  logic [3:0]  my_data_address,
  input  logic [3:0]  my_ctrl_address,
  output logic        loopback_state,
  output logic        request_reset,
  output logic        FI_i_am_addressed,
  output logic        receive_enabled
);

  import tout_pkg::*;

  typedef enum logic [2:0] {
    IDLE, AM_I_ADDRESSED, FI_HS_FOR_ADDRESS, FI_HS_FOR_DATA,
    FI_USE_CTRL_DATA, INTERNAL_ACK1, INTERNAL_ACK2
  } fi_read_state_t;

  localparam logic [TIMEOUT_W-1:0] TIMEOUT_MAX = '1;

  fi_read_state_t       state;
  logic [TIMEOUT_W-1:0] timeout;
  logic                 ctrl_transaction;
  fi_addr_word_t        word;

  assign word           = il_io;
  assign loopback_state = 1'b0;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state             <= IDLE;
      timeout           <= '0;
      ctrl_transaction  <= 1'b0;
      il_io             <= '0;
      address           <= '0;
      ack               <= 1'b0;
      il_req            <= 1'b0;
      request_reset     <= 1'b0;
      FI_i_am_addressed <= 1'b0;
      receive_enabled   <= 1'b0;
    end else begin
      ack             <= 1'b0;
      il_req          <= 1'b0;
      request_reset   <= 1'b0;
      receive_enabled <= 1'b1;
      unique case (state)
        IDLE: begin
          if (req) begin
            il_io   <= data;
            timeout <= '0;
            state   <= AM_I_ADDRESSED;
          end
        end
        AM_I_ADDRESSED: begin
          if (word.is_address) begin
            FI_i_am_addressed <= 1'b0;
            ctrl_transaction  <= 1'b0;
            state             <= FI_HS_FOR_ADDRESS;
            if (word.remote == i_am_remote) begin
              if (word.chip == my_ctrl_address) begin
                ctrl_transaction <= 1'b1;
                request_reset    <= word.reg_addr[CTRL_RESET_BIT];
                address          <= word.reg_addr;
              end else if (word.chip == my_data_address) begin
                address <= word.reg_addr;
                if (LATCH_SELECT) FI_i_am_addressed <= 1'b1;
              end
            end
          end else if (!LATCH_SELECT || FI_i_am_addressed || ctrl_transaction) begin
            state <= FI_HS_FOR_DATA;
          end else begin
            state <= FI_HS_FOR_ADDRESS;  // not for this chip: acknowledge only
          end
        end
        FI_HS_FOR_ADDRESS: begin
          ack <= 1'b1;
          if (!req || timeout == TIMEOUT_MAX) begin
            state <= IDLE;
          end else begin
            timeout <= timeout + 1'b1;
          end
        end
        FI_HS_FOR_DATA: begin
          ack <= 1'b1;
          if (!ctrl_transaction) il_req <= 1'b1;
          if (!req) begin
            if (ctrl_transaction) begin
              state <= FI_USE_CTRL_DATA;
            end else begin
              timeout <= '0;
              state   <= INTERNAL_ACK1;
            end
          end else if (timeout == TIMEOUT_MAX) begin
            il_req <= 1'b0;
            state  <= IDLE;
          end else begin
            timeout <= timeout + 1'b1;
          end
        end
        FI_USE_CTRL_DATA: begin
          state <= IDLE;
        end
        INTERNAL_ACK1: begin
          il_req <= 1'b1;
          if (il_ack) begin
            il_req  <= 1'b0;
            timeout <= '0;
            state   <= INTERNAL_ACK2;
          end else if (timeout == TIMEOUT_MAX) begin
            il_req <= 1'b0;
            state  <= IDLE;
          end else begin
            timeout <= timeout + 1'b1;
          end
        end
        INTERNAL_ACK2: begin
          if (!il_ack || timeout == TIMEOUT_MAX) begin
            state <= IDLE;
          end else begin
            timeout <= timeout + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // A soft reset request is only raised by a control-address word.
  a_reset_from_ctrl: assert property (@(posedge clk) disable iff (reset)
    request_reset |-> ctrl_transaction);

endmodule
