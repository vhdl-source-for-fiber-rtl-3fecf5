// tout: fiber-optic link interface between an on-board bus and a serial
// fiber transmitter/receiver pair, with an external 9-bit FIFO on the
// receive side.
//
// Two independent paths share one clock:
//   bus -> fiber   read_from_ibus takes a 16-bit word from the upper half of
//                  the on-board bus (id_hi, strobe AO_TO_PC_STROBE / ack
//                  AO_TO_PC_ACK) and ibus_fo_action sends it to the
//                  transmitter as two data characters, low byte first.
//   fiber -> bus   fiber_rec writes each received character into the
//                  external FIFO, fifo_data_pump reads the FIFO and pairs
//                  data bytes into words (command characters are skipped and
//                  realign the pairing), ibus_fi_port buffers a word and
//                  offers it to read_from_fi, which decodes address words
//                  and writes data words onto the lower half of the bus
//                  (id_lo, strobe AO_FROM_PC_STROBE / ack AO_FROM_PC_ACK).
//                  A control-address word with bit 5 set resets the FIFO.
// The transmitter byte clock fo_CKW is clk divided by two and also serves as
// the receiver reference clock fr_ref_clk. The transceiver mode pins are
// tied: fo_mode = 0, fo_foto = 0, fo_ENN_l = 1, fr_mode = 0, fr_rf = 1.
// DEBUG mirrors AO_FROM_PC_STROBE.
//
// Straps: the chip answers as the remote end (I_AM_REMOTE = 1) to data
// address 4'hF and control address 4'h2, the values of the original
// design; they are parameters here. LATCH_SELECT is passed to read_from_fi.
//
// Ports: the original 32-bit bidirectional bus id is split into id_hi
// (input, bits 31:16, read by the bus -> fiber path) and id_lo (output,
// bits 15:0, always driven by the fiber -> bus path), which is how the
// original uses its two halves. pc_address (the last decoded sub-address),
// violation_count and rx_char_strobe are brought out so the receive
// state can be observed; in the original they stay internal. The inputs
// fast, slow, in_strobe, fr_ckr, fo_RP_l, fifo_FULL_l, fifo_HALF_l and
// fr_d[11:10] are pins of the original that no logic uses.
// Reset is asynchronous and active high.
module tout #(
  parameter bit         I_AM_REMOTE     = 1'b1,
  parameter logic [3:0] MY_DATA_ADDRESS = 4'b1111,
  parameter logic [3:0] MY_CTRL_ADDRESS = 4'b0010,
  parameter bit         LATCH_SELECT    = 1'b0
) (
  input  logic        clk,
  input  logic        fast,
  input  logic        slow,
  output logic        DEBUG,
  // on-board bus
  input  logic [15:0] id_hi,
  output logic [15:0] id_lo,
  input  logic        reset,
  output logic        AO_FROM_PC_STROBE,
  input  logic        AO_FROM_PC_ACK,
  input  logic        AO_TO_PC_STROBE,
  output logic        AO_TO_PC_ACK,
  input  logic        in_strobe,
  // fiber receiver
  input  logic [11:0] fr_d,
  output logic        fr_ref_clk,
  output logic        fr_rf,
  output logic        fr_mode,
  input  logic        fr_status,
  input  logic        fr_RDY_l,
  input  logic        fr_ckr,
  // fiber transmitter
  output logic [9:0]  fo_d,
  output logic        fo_ENN_l,
  output logic        fo_ENA_l,
  output logic        fo_CKW,
  output logic        fo_mode,
  output logic        fo_foto,
  input  logic        fo_RP_l,
  // external FIFO
  output logic        fifo_reset_l,
  output logic        fifo_WRITE_l,
  output logic [8:0]  fifo_D,
  output logic        fifo_READ_l,
  input  logic        fifo_FULL_l,
  input  logic        fifo_HALF_l,
  input  logic        fifo_EMPTY_l,
  input  logic [8:0]  fifo_OUT,
  // observation
  output logic [7:0]  pc_address,
  output logic [7:0]  violation_count,
  output logic        rx_char_strobe
);

  logic        fo_data_strobe;
  logic        data_pump_word_ready;
  logic        refill_ibus_output_buf;
  logic [15:0] fiber_to_ibus_buf;
  logic        reset_fifo;
  logic        rec_enabled;
  logic        loopback_state;
  logic        this_chip_selected;
  logic        FI_to_ibus_req;
  logic        FI_to_ibus_ack;
  logic [15:0] FI_data;
  logic [15:0] data_to_FO;
  logic        write_to_FO_req;
  logic        write_to_FO_ack;

  assign DEBUG = AO_FROM_PC_STROBE;

  // Byte clock for the transmitter and reference clock for the receiver.
  always_ff @(posedge clk or posedge reset) begin
    if (reset) fo_data_strobe <= 1'b0;
    else       fo_data_strobe <= !fo_data_strobe;
  end

  assign fo_CKW     = fo_data_strobe;
  assign fo_mode    = 1'b0;
  assign fo_foto    = 1'b0;
  assign fo_ENN_l   = 1'b1;
  assign fr_ref_clk = fo_data_strobe;
  assign fr_mode    = 1'b0;
  assign fr_rf      = 1'b1;

  read_from_ibus u_ibus_reader (
    .clk    (clk),
    .reset  (reset),
    .iu_req (AO_TO_PC_STROBE),
    .iu_ack (AO_TO_PC_ACK),
    .iu_io  (id_hi),
    .data   (data_to_FO),
    .req    (write_to_FO_req),
    .ack    (write_to_FO_ack)
  );

  read_from_fi #(.LATCH_SELECT(LATCH_SELECT)) u_fi_reader (
    .clk               (clk),
    .reset             (reset),
    .req               (FI_to_ibus_req),
    .ack               (FI_to_ibus_ack),
    .data              (FI_data),
    .il_io             (id_lo),
    .address           (pc_address),
    .il_req            (AO_FROM_PC_STROBE),
    .il_ack            (AO_FROM_PC_ACK),
    .i_am_remote       (I_AM_REMOTE),
    .my_data_address   (MY_DATA_ADDRESS),
    .my_ctrl_address   (MY_CTRL_ADDRESS),
    .loopback_state    (loopback_state),
    .request_reset     (reset_fifo),
    .FI_i_am_addressed (this_chip_selected),
    .receive_enabled   (rec_enabled)
  );

  ibus_fo_action u_ibus_fo (
    .clk               (clk),
    .reset             (reset),
    .il_i_am_addressed (this_chip_selected),
    .fo_req            (write_to_FO_req),
    .fo_ack            (write_to_FO_ack),
    .data              (data_to_FO),
    .fiber_clk         (fo_CKW),
    .fo_d              (fo_d),
    .fo_ENA_l          (fo_ENA_l)
  );

  ibus_fi_port u_ibus_fi (
    .clk                    (clk),
    .reset                  (reset),
    .data                   (FI_data),
    .req                    (FI_to_ibus_req),
    .ack                    (FI_to_ibus_ack),
    .fiber_to_ibus_buf      (fiber_to_ibus_buf),
    .data_pump_word_ready   (data_pump_word_ready),
    .refill_ibus_output_buf (refill_ibus_output_buf)
  );

  fiber_rec u_fr (
    .clk                  (clk),
    .reset                (reset),
    .fr_d                 (fr_d),
    .fr_RDY_l             (fr_RDY_l),
    .fr_status            (fr_status),
    .receive_enabled      (rec_enabled),
    .increment_fifo_count (rx_char_strobe),
    .violation_count      (violation_count),
    .fifo_reset_l         (fifo_reset_l),
    .fifo_D               (fifo_D),
    .fifo_WRITE_l         (fifo_WRITE_l),
    .reset_fifo_request   (reset_fifo)
  );

  fifo_data_pump u_pump (
    .clk                    (clk),
    .reset                  (reset),
    .fiber_to_ibus_buf      (fiber_to_ibus_buf),
    .fifo_OUT               (fifo_OUT),
    .fifo_READ_l            (fifo_READ_l),
    .data_pump_word_ready   (data_pump_word_ready),
    .refill_ibus_output_buf (refill_ibus_output_buf),
    .fifo_reset_l           (fifo_reset_l),
    .fifo_EMPTY_l           (fifo_EMPTY_l)
  );

endmodule
