# tout: an on-board bus to fiber-optic link interface

`tout` connects a board's parallel bus to a serial fiber-optic link. A
16-bit word written to the chip on the upper half of the on-board bus goes
out on the fiber as two 8-bit characters. Characters arriving from the fiber
are buffered in an external FIFO chip, paired back into 16-bit words, decoded
and written onto the lower half of the bus. A word from the fiber is either
an *address word*, which says whether the chip is meant, or a *data word*,
which follows an address word. A short control transaction lets the far end
reset the receive FIFO.

The chip is a glue device for bought-in parts: a serialising fiber
transmitter, a deserialising fiber receiver (both with 8-bit data, a
command/data flag and a byte clock) and a 9-bit asynchronous FIFO. The RTL
here is the clocked logic between those parts and the bus. It is written
from an existing VHDL design. The places where it departs from that design
are listed below.

## Data flow

```
 upper bus id[31:16]                                   fiber transmitter
 AO_TO_PC_STROBE/ACK --> read_from_ibus --req/ack--> ibus_fo_action --> fo_d, fo_ENA_l
                                                       ^  fo_CKW = clk/2
                                                       |  (held back while selected,
                                                       |   see LATCH_SELECT)
 lower bus id[15:0]                                    |
 AO_FROM_PC_STROBE/ACK <-- read_from_fi <--req/ack-- ibus_fi_port <-- fifo_data_pump
                            |  request_reset                 refill /     ^  fifo_READ_l,
                            v                                word_ready   |  fifo_OUT, fifo_EMPTY_l
                          fiber_rec --fifo_D, fifo_WRITE_l, fifo_reset_l--> external FIFO
                            ^
                     fiber receiver: fr_d, fr_RDY_l, fr_status
```

The two directions are independent. They share only the clock, the reset
and the selection flag (`FI_i_am_addressed`), which can hold the
transmitter back.

## Words on the link

Each 16-bit word goes out as two data characters, low byte first. The
characters have bit 8 clear. Characters with bit 8 set are *command
characters*. The receive side never turns them into data. It drops them and
starts the pairing of bytes afresh. A command character between words
therefore has no effect. A command character between the two bytes of a
word loses that word's first byte.

A received word with bit 15 set is an address word:

| bits  | field       | meaning                                                      |
|-------|-------------|--------------------------------------------------------------|
| 15    | is_address  | 1 = address word                                             |
| 14:13 | spare       | not decoded                                                  |
| 12    | remote      | must equal the chip's `I_AM_REMOTE` strap                    |
| 11:8  | chip        | compared with `MY_CTRL_ADDRESS` (4'h2) and `MY_DATA_ADDRESS` (4'hF) |
| 7:0   | reg_addr    | sub-address, shown on `pc_address`; bit 5 = FIFO reset in a control word |

(`tout_pkg::fi_addr_word_t`.) Every address word first clears the
selection flag and the control flag. Then:

* **Control address** (remote bit and chip field match `MY_CTRL_ADDRESS`).
  The control flag is set and the sub-address is kept. If bit 5 is set,
  `read_from_fi` gives a one-cycle `request_reset`. This pulls
  `fifo_reset_l` low at once and clears the violation counter, so a FIFO
  reset needs only the address word. A data word that follows a control
  address is acknowledged and then dropped. Nothing further is defined for
  control data.
* **Data address** (match with `MY_DATA_ADDRESS`). The sub-address is kept.
  With `LATCH_SELECT = 1`, the chip is also selected.
* **Any other address**. The word is acknowledged and otherwise ignored.

A data word (bit 15 clear) is written to the lower bus. `id_lo` carries the
word and `AO_FROM_PC_STROBE` is raised until the board answers with
`AO_FROM_PC_ACK`. A data word is not written if it follows a control
address. With `LATCH_SELECT = 1`, it is also not written while the chip is
unselected.

Data words have bit 15 clear, so only 15 bits of data reach the board per
word.

## Selection latch (`LATCH_SELECT`)

There are two readings of the selection logic, and the top and
`read_from_fi` have a parameter for each:

* `LATCH_SELECT = 0` (default). The selection flag is only ever cleared.
  Every data word is written to the board unless it follows a control
  address. The transmitter is never held back. This is what the original
  code does.
* `LATCH_SELECT = 1`. A data-address match selects the chip until the next
  address word. Data words that arrive while the chip is unselected are
  acknowledged and dropped. While the chip is selected, `ibus_fo_action`
  refuses to send. Upper-bus words written in that time time out in
  `read_from_ibus` and are lost. This is the behaviour that the original
  design's description states.

## Transmit timing

The transmitter takes one character on each rising edge of its byte clock
`fo_CKW` while `fo_ENA_l` is low. `fo_CKW` is `clk` divided by two, made by
a toggle flip-flop in the top. The same signal drives the receiver's
reference clock `fr_ref_clk`. `ibus_fo_action` changes `fo_d` and
`fo_ENA_l` only on clock edges where `fo_CKW` falls. The transmitter thus
always gets one `clk` period of set-up time:

```
clk edge     A        B        C        D        E
fo_CKW    1 \_0___/1 \_0___/1
state     BYTE1    WAIT1    BYTE2    WAIT2    IDLE
fo_d      lo byte ........  hi byte ........
fo_ENA_l  \____________________________/          (low after A, B, C)
taken             ^lo               ^hi           (rising fo_CKW at B and D)
```

If `fo_CKW` is already high when the request arrives, the idle state acts
as edge A directly. `fo_ack` rises with the enable and falls when the
sequencer is back in `FO_IDLE`. A word therefore leaves 2 or 3 cycles after
the request and takes 5 to 6 cycles in all. An assertion in
`ibus_fo_action` checks that the enable is low for exactly three cycles.

## Receive path: FIFO, pump and output buffer

* `fiber_rec` wires the receiver straight to the FIFO. `fr_d[8:0]` drives
  the FIFO data and `fr_RDY_l` drives the FIFO write strobe. This keeps the
  strobe as wide as the receiver makes it. Going through a flip-flop could
  make it shorter than the FIFO's minimum. The clocked part of `fiber_rec`
  only watches the link: it gives one `increment_fifo_count` pulse per
  character (brought out as `rx_char_strobe`) and counts characters with
  the receiver's code-violation flag `fr_d[9]`. That count is 8 bits and
  stops at 255. The clocked part also controls the FIFO reset.
  Characters are counted only while `fr_status` and `receive_enabled` are
  high. The FIFO write itself does not depend on them.
* `fifo_data_pump` reads the FIFO with a one-cycle low `fifo_READ_l`. It
  samples `fifo_OUT` as the strobe rises. It skips command characters and
  shifts data bytes into `fiber_to_ibus_buf` from the top, so the first
  byte ends in bits 7:0. When the FIFO is empty (`fifo_EMPTY_l` low), it
  waits. With data waiting, a word is ready 5 cycles after the output
  buffer becomes free.
* `ibus_fi_port` copies the word and offers it to `read_from_fi`. The pump
  and the port use two flags. `data_pump_word_ready` stays high until the
  port has taken the word. `refill_ibus_output_buf` is low from the moment
  the port takes the word until its handshake with `read_from_fi` ends.
  The pump starts the next word only when the port is free and the FIFO is
  out of reset. No word can be overwritten or lost between the two.

Each stage pulls from the one before it. If the board is slow, words wait in
the external FIFO. Its depth is the only buffering, and the chip does not
use the FIFO's full or half-full flags.

## Handshakes and timeouts

Every internal and bus handshake is four-phase: request, then acknowledge,
then the request falls, then the acknowledge falls. Each wait is bounded by
a 4-bit counter (`TIMEOUT_W`). After 16 cycles the block gives up and
returns to idle:

| block            | wait                                   | on timeout                                    |
|------------------|----------------------------------------|-----------------------------------------------|
| `read_from_ibus` | bus master releasing `AO_TO_PC_STROBE` | goes on and offers the word anyway            |
| `read_from_ibus` | `ibus_fo_action` acknowledging         | drops the word                                |
| `ibus_fi_port`   | `read_from_fi` acknowledging and releasing (one shared budget) | frees the buffer; the word is lost |
| `read_from_fi`   | port releasing req                     | returns to idle; the same word may be decoded again |
| `read_from_fi`   | board acknowledging / releasing `AO_FROM_PC_ACK` | drops the word                      |

`read_from_ibus` does not time out while it waits for the acknowledge to
fall. By then the other side is known to be present. The latency from the
port's request to `read_from_fi`'s acknowledge is 3 cycles.

## Pins

The top follows the original pin list. The 32-bit bidirectional `id` bus is
split into its two halves as the design uses them: `id_hi` is the input
`id[31:16]` and `id_lo` is the always-driven output `id[15:0]`. A board with
a true shared bus needs its own tristate buffers. Some outputs are fixed:

* `fo_mode = 0`, `fo_foto = 0` and `fo_ENN_l = 1` on the transmitter.
* `fr_mode = 0` and `fr_rf = 1` on the receiver.
* `DEBUG` copies `AO_FROM_PC_STROBE`.

These pins are present but unused: `fast`, `slow`, `in_strobe`, `fr_ckr`,
`fo_RP_l`, `fifo_FULL_l`, `fifo_HALF_l` and `fr_d[11:10]`. `pc_address`,
`violation_count` and `rx_char_strobe` are extra outputs that make the
receive side observable. The straps `I_AM_REMOTE`, `MY_DATA_ADDRESS` and
`MY_CTRL_ADDRESS` are parameters with the original values (remote, 4'hF,
4'h2). Reset is asynchronous and active high. All outputs are registered,
except the FIFO write path, the tied pins and `DEBUG`.

## Where this RTL departs from the original design

* **Flow control between pump and port.** In the original,
  `data_pump_word_ready` is a one-cycle pulse. `refill_ibus_output_buf` is
  high all the time, and the pump starts on "FIFO out of reset *or* buffer
  free". As a result the pump could run ahead of the port and lose words.
  Here the ready flag is held and the buffer-free flag is real, as
  described above.
* **Port request.** `ibus_fi_port` holds req until it sees the acknowledge.
  The original drives req for only one cycle.
* **Address words for other chips** are acknowledged. In the original they
  were left unanswered until the port timed out.
* **Code violations are counted.** The original declares the flag and the
  counter but never counts.
* **FIFO reset release.** `fifo_reset_l` is released on the first clock
  after reset, or after a soft reset request. The original released it only
  when a character arrived.
* **Character counting.** `fiber_rec` counts a character once even if the
  ready strobe is longer than one clock.
* **Reset values.** Every register has an asynchronous reset, including the
  byte-clock divider. After a timeout, req and il_req are dropped one cycle
  earlier than in the original.
* **Not built.** The control data word does nothing, as in the original.
  The loopback and receive-enable bits of a control word are not acted on:
  `loopback_state` is 0, and `receive_enabled` is 1 from the first clock
  after reset. There is no FIFO fill counter, because the original has only
  the increment pulse.

## How far it can be trusted

Each block has a self-checking testbench. The testbenches compare against
reference models written separately from the RTL, and they check cycle
counts where the design fixes them. Two end-to-end tests go further.
`tb_tout` uses the default straps. It loops the transmitter back into the
receiver through a link model that can insert command characters and code
violations, uses a FIFO model, and checks every board write. `tb_tout_latch`
uses `LATCH_SELECT = 1`. Between them, every mechanism above happens at
least once: command-character skip, empty-FIFO wait, soft FIFO reset,
violation count, board timeout, foreign address, and the transmitter held
back while selected.

The external parts are behavioural models written from how such parts
usually behave (`tb/fifo_model.sv` and the link model inside `tb_tout`), not
from data sheets. The transmitter is assumed to take data on the rising
edge of `fo_CKW`. The FIFO is assumed to present data while the read strobe
is low and to advance on its rising edge. Check these against the real
parts and their timing, especially the 20 ns class strobes at the FIFO,
before building hardware.

## Simulating

Every module has a testbench in `tb/` named `tb_<module>`. For example, with
Verilator 5:

```
verilator --binary --timing --assert --top-module tb_tout \
    -y rtl -y tb +libext+.sv rtl/tout_pkg.sv tb/tb_tout.sv
./obj_dir/Vtb_tout
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. The
end-to-end testbenches also print how often each mechanism occurred. All of
them finish in well under a second.

## Files

* `rtl/tout_pkg.sv`: shared types (address-word and character layouts) and constants
* `rtl/read_from_ibus.sv`, `rtl/ibus_fo_action.sv`: bus to fiber
* `rtl/fiber_rec.sv`, `rtl/fifo_data_pump.sv`, `rtl/ibus_fi_port.sv`, `rtl/read_from_fi.sv`: fiber to bus
* `rtl/tout.sv`: top level
* `tb/fifo_model.sv`: behavioural model of the external FIFO
* `tb/tb_*.sv`: testbenches
