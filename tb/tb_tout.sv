// tb_tout: end-to-end test of the whole interface, at the default straps
// (remote end, data address 4'hF, control address 4'h2).
//
// Around the chip: a bus master writes words on the upper bus; a link model
// takes every character the transmitter sends and delivers it back to the
// receiver a few cycles later (a fiber loopback), and can insert command
// characters and characters with the code-violation flag; the FIFO model
// stands for the external FIFO; a board model answers writes on the lower
// bus. Words written on the upper bus thus travel through every block and
// come back as writes on the lower bus: an address word selects the chip,
// data words follow.
//
// Checked: the board receives exactly the data words, in order, with the
// right sub-address; control-address words reset the FIFO; command
// characters are skipped; code violations are counted and cleared by the
// soft reset; a board that does not answer costs only that word; the fixed
// transceiver pins. Each mechanism is counted and must happen at least once.
module tb_tout;
  logic clk = 1'b0, reset = 1'b1;
  logic DEBUG;
  logic [15:0] id_hi = '0, id_lo;
  logic AO_FROM_PC_STROBE, AO_FROM_PC_ACK, AO_TO_PC_STROBE = 1'b0, AO_TO_PC_ACK;
  logic [11:0] fr_d;
  logic fr_ref_clk, fr_rf, fr_mode, fr_RDY_l;
  logic [9:0] fo_d;
  logic fo_ENN_l, fo_ENA_l, fo_CKW, fo_mode, fo_foto;
  logic fifo_reset_l, fifo_WRITE_l, fifo_READ_l, fifo_FULL_l, fifo_HALF_l, fifo_EMPTY_l;
  logic [8:0] fifo_D, fifo_OUT;
  logic [7:0] pc_address, violation_count;
  logic rx_char_strobe;
  int checks = 0, failures = 0;

  tout dut (
    .clk(clk), .fast(1'b0), .slow(1'b0), .DEBUG(DEBUG), .id_hi(id_hi), .id_lo(id_lo),
    .reset(reset), .AO_FROM_PC_STROBE(AO_FROM_PC_STROBE), .AO_FROM_PC_ACK(AO_FROM_PC_ACK),
    .AO_TO_PC_STROBE(AO_TO_PC_STROBE), .AO_TO_PC_ACK(AO_TO_PC_ACK), .in_strobe(1'b0),
    .fr_d(fr_d), .fr_ref_clk(fr_ref_clk), .fr_rf(fr_rf), .fr_mode(fr_mode),
    .fr_status(1'b1), .fr_RDY_l(fr_RDY_l), .fr_ckr(1'b0),
    .fo_d(fo_d), .fo_ENN_l(fo_ENN_l), .fo_ENA_l(fo_ENA_l), .fo_CKW(fo_CKW),
    .fo_mode(fo_mode), .fo_foto(fo_foto), .fo_RP_l(1'b1),
    .fifo_reset_l(fifo_reset_l), .fifo_WRITE_l(fifo_WRITE_l), .fifo_D(fifo_D),
    .fifo_READ_l(fifo_READ_l), .fifo_FULL_l(fifo_FULL_l), .fifo_HALF_l(fifo_HALF_l),
    .fifo_EMPTY_l(fifo_EMPTY_l), .fifo_OUT(fifo_OUT),
    .pc_address(pc_address), .violation_count(violation_count), .rx_char_strobe(rx_char_strobe));

  fifo_model #(.DEPTH(512)) u_fifo (.reset_l(fifo_reset_l), .write_l(fifo_WRITE_l),
    .read_l(fifo_READ_l), .d(fifo_D), .q(fifo_OUT), .empty_l(fifo_EMPTY_l),
    .half_l(fifo_HALF_l), .full_l(fifo_FULL_l));

  always #5 clk = !clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // ---------------- mechanism counters
  int n_words_sent = 0, n_chars_tx = 0, n_board_writes = 0, n_cmd_chars = 0;
  int n_violations = 0, n_fifo_resets = 0, n_empty_waits = 0, n_board_timeouts = 0;
  int n_foreign_addr = 0;

  // ---------------- fiber link model (loopback with insertions)
  logic [9:0] link_q[$];
  int link_busy = 0;
  always @(posedge clk) begin
    if (reset) begin
      fr_RDY_l <= 1'b1;
      fr_d     <= '0;
      link_busy = 0;
    end else begin
      // transmitter: takes fo_d on the rising byte-clock edge
      if (!fo_CKW && !fo_ENA_l) begin
        link_q.push_back(fo_d);
        n_chars_tx++;
      end
      // receiver: one character per two clk cycles, strobe low one cycle
      if (link_busy > 0) begin
        link_busy--;
        fr_RDY_l <= 1'b1;
      end else if (link_q.size() > 0) begin
        logic [9:0] c;
        c = link_q.pop_front();
        fr_d     <= {2'b00, c};
        fr_RDY_l <= 1'b0;
        link_busy = 1 + $urandom_range(0, 2);
        if (c[8]) n_cmd_chars++;
        if (c[9]) n_violations++;
      end
    end
  end

  // a new character arriving when the pump had found the FIFO empty
  logic empty_seen = 1'b0;
  always @(posedge clk) if (!reset && fifo_reset_l) begin
    if (!fifo_EMPTY_l) empty_seen <= 1'b1;
    else if (empty_seen) begin empty_seen <= 1'b0; n_empty_waits++; end
  end

  always @(negedge fifo_reset_l) if (!reset) n_fifo_resets++;

  // ---------------- board on the lower bus
  logic [15:0] board_log[$];
  logic [7:0]  board_addr[$];
  bit drop_next = 0, dropping = 0;
  int board_wait = 0;
  always @(posedge clk) begin
    if (reset) begin
      AO_FROM_PC_ACK <= 1'b0;
    end else if (AO_FROM_PC_STROBE && !AO_FROM_PC_ACK) begin
      if (drop_next && !dropping) begin dropping = 1; drop_next = 0; end
      if (!dropping) begin
        if (board_wait == 0) board_wait = $urandom_range(1, 3);
        else if (--board_wait == 0) begin
          AO_FROM_PC_ACK <= 1'b1;
          board_log.push_back(id_lo);
          board_addr.push_back(pc_address);
          n_board_writes++;
        end
      end
    end else begin
      if (AO_FROM_PC_ACK && !AO_FROM_PC_STROBE) AO_FROM_PC_ACK <= 1'b0;
      if (dropping && !AO_FROM_PC_STROBE) begin dropping = 0; n_board_timeouts++; end
    end
  end

  // ---------------- bus master on the upper bus
  task automatic bus_write(input logic [15:0] w);
    int n, c0;
    c0 = n_chars_tx;
    id_hi = w; AO_TO_PC_STROBE = 1'b1;
    n = 0;
    do begin tick(); n++; end while (!AO_TO_PC_ACK && n < 50);
    check(AO_TO_PC_ACK, "upper bus write acknowledged");
    AO_TO_PC_STROBE = 1'b0;
    while (AO_TO_PC_ACK) tick();
    // wait until the word has left the chip
    n = 0;
    while (n_chars_tx < c0 + 2 && n < 100) begin tick(); n++; end
    check(n_chars_tx == c0 + 2, "word sent as two characters");
    tick(2);
    n_words_sent++;
  endtask

  task automatic settle();
    tick(120);
  endtask

  // insert characters into the link, between words
  task automatic inject(input bit viol, input bit cmd, input logic [7:0] b);
    link_q.push_back({viol, cmd, b});
  endtask

  function automatic logic [15:0] addr_word(bit remote, logic [3:0] chip, logic [7:0] sub);
    return {1'b1, 2'b00, remote, chip, sub};
  endfunction

  initial begin
    logic [15:0] exp_log[$];
    logic [7:0]  exp_addr[$];
    tick(3); reset = 1'b0; tick(4);
    check(fr_rf && !fr_mode && !fo_mode && !fo_foto && fo_ENN_l, "fixed transceiver pins");
    check(fr_ref_clk == fo_CKW, "receiver reference clock is the byte clock");
    check(fifo_reset_l, "FIFO out of reset");

    // select the data address, then data words
    bus_write(addr_word(1, 4'hF, 8'h42));
    for (int k = 0; k < 6; k++) begin
      logic [15:0] w = 16'($urandom) & 16'h7fff;
      if (k == 3) begin inject(0, 1, 8'hbc); inject(0, 1, 8'hbc); end
      bus_write(w); exp_log.push_back(w); exp_addr.push_back(8'h42);
    end
    settle();

    // a character with a code violation (sent as a command character)
    inject(1, 1, 8'hfe);
    settle();
    check(violation_count == 8'd1, $sformatf("violation counted: %0d", violation_count));
    check(board_log.size() == exp_log.size(), "command characters produce no writes");

    // soft FIFO reset through the control address
    bus_write(addr_word(1, 4'h2, 8'h20));
    settle();
    check(n_fifo_resets == 1, $sformatf("%0d soft FIFO resets", n_fifo_resets));
    check(violation_count == 8'd0, "violation count cleared by soft reset");
    bus_write(16'h0123);             // control data: no board write
    settle();

    // an address for another chip: with the default straps data still flows
    bus_write(addr_word(1, 4'h3, 8'h99)); n_foreign_addr++;
    bus_write(16'h2468); exp_log.push_back(16'h2468); exp_addr.push_back(8'h20);
    settle();

    // the board misses one write
    bus_write(addr_word(1, 4'hF, 8'h07));
    drop_next = 1;
    bus_write(16'h1357);
    settle();
    bus_write(16'h0ace); exp_log.push_back(16'h0ace); exp_addr.push_back(8'h07);
    settle();

    // a burst of words
    for (int k = 0; k < 20; k++) begin
      logic [15:0] w = 16'($urandom) & 16'h7fff;
      bus_write(w); exp_log.push_back(w); exp_addr.push_back(8'h07);
    end
    settle();

    check(board_log.size() == exp_log.size(),
          $sformatf("%0d board writes, expected %0d", board_log.size(), exp_log.size()));
    for (int k = 0; k < exp_log.size() && k < board_log.size(); k++) begin
      check(board_log[k] == exp_log[k], $sformatf("write %0d: %h expected %h", k, board_log[k], exp_log[k]));
      check(board_addr[k] == exp_addr[k], $sformatf("write %0d address %h expected %h", k, board_addr[k], exp_addr[k]));
    end
    check(n_chars_tx == 2 * n_words_sent, $sformatf("%0d characters for %0d words", n_chars_tx, n_words_sent));
    check(DEBUG == AO_FROM_PC_STROBE, "DEBUG mirrors the lower-bus strobe");

    $display("mechanisms: words=%0d chars=%0d board_writes=%0d cmd_chars=%0d violations=%0d fifo_resets=%0d empty_waits=%0d board_timeouts=%0d foreign_addr=%0d",
             n_words_sent, n_chars_tx, n_board_writes, n_cmd_chars, n_violations, n_fifo_resets,
             n_empty_waits, n_board_timeouts, n_foreign_addr);
    check(n_words_sent > 0, "bus to fiber transfer happened");
    check(n_board_writes > 0, "fiber to bus write happened");
    check(n_cmd_chars > 0, "command character skip happened");
    check(n_violations > 0, "code violation happened");
    check(n_fifo_resets > 0, "soft FIFO reset happened");
    check(n_empty_waits > 0, "wait on empty FIFO happened");
    check(n_board_timeouts > 0, "lower-bus timeout happened");
    check(n_foreign_addr > 0, "foreign address happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
