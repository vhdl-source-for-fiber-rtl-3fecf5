// tout_pkg: types and constants shared by the fiber / on-board bus interface.
//
// The fiber link carries 16-bit words as two 8-bit characters. A received
// word whose bit 15 is set is an address word; its fields are described by
// fi_addr_word_t. A chip answers to two 4-bit chip addresses: a control
// address (control transactions such as the soft FIFO reset) and a data
// address (words forwarded to the board). Bit 12 selects the remote or the
// local end of the link. The field layout follows the original decode; the
// names of the fields are this design's own.
package tout_pkg;

  // Width of the handshake timeout counters: every wait gives up after
  // 2**TIMEOUT_W clock cycles.
  localparam int unsigned TIMEOUT_W = 4;

  // Address word received over the fiber (bit 15 .. bit 0).
  typedef struct packed {
    logic       is_address;  // 15: 1 = address word, 0 = data word
    logic [1:0] spare;       // 14:13: not decoded
    logic       remote;      // 12: must equal the chip's i_am_remote strap
    logic [3:0] chip;        // 11:8: chip control or data address
    logic [7:0] reg_addr;    // 7:0: register address / command bits
  } fi_addr_word_t;

  // Command bits inside reg_addr of a control-address word.
  localparam int unsigned CTRL_RESET_BIT    = 5;  // request a FIFO reset

  // 10-bit character presented to the fiber transmitter (fo_d).
  typedef struct packed {
    logic       svb;      // 9: send a violation symbol
    logic       command;  // 8: command-channel character (1) or data (0)
    logic [7:0] data;     // 7:0: the byte
  } fo_char_t;

  // 12-bit character delivered by the fiber receiver (fr_d).
  typedef struct packed {
    logic [1:0] unused;          // 11:10: not used
    logic       code_violation;  // 9: received character was not a valid code
    logic       command;         // 8: command-channel character
    logic [7:0] data;            // 7:0: the byte
  } fr_char_t;

endpackage
