// tb_fifo_data_pump: self-checking test of fifo_data_pump with a model of
// the external FIFO. The test bench writes a character stream into the
// FIFO (data bytes with command characters mixed in) and plays the output
// port: it takes each word when data_pump_word_ready is high, drops
// refill_ibus_output_buf, and raises it again after a random delay.
// Expected words come from a reference pairing of the stream: data bytes
// pair low byte first, a command character discards a half-received word.
// Also checked: the 5-cycle word fetch, waiting on an empty FIFO, no
// fetch while the FIFO is held in reset, and no fetch while the port is busy.
module tb_fifo_data_pump;
  logic clk = 1'b0, reset = 1'b1;
  logic [15:0] fiber_to_ibus_buf;
  logic [8:0] fifo_OUT, wd = '0;
  logic fifo_READ_l, data_pump_word_ready;
  logic refill_ibus_output_buf = 1'b1, fifo_reset_l = 1'b0, fifo_EMPTY_l;
  logic fifo_HALF_l, fifo_FULL_l, write_l = 1'b1;
  int checks = 0, failures = 0;
  logic [15:0] expected[$];
  logic [7:0] pending;
  bit has_pending = 0;
  int words = 0, cmd_chars = 0, empty_waits = 0;
  int hold = 0;
  bit measure = 0;
  int measured = 0, cyc = 0, t_free = 0;
  logic refill_prev = 1'b1, ready_prev = 1'b0;

  // fetch-time monitor (used with data already waiting in the FIFO)
  always @(posedge clk) begin
    cyc++;
    if (refill_ibus_output_buf && !refill_prev) t_free = cyc;
    if (measure && data_pump_word_ready && !ready_prev && t_free != 0) begin
      measured++;
      check(cyc - t_free == 5, $sformatf("fetch took %0d cycles", cyc - t_free));
    end
    refill_prev = refill_ibus_output_buf;
    ready_prev  = data_pump_word_ready;
  end

  fifo_data_pump dut (.*);
  fifo_model #(.DEPTH(64)) u_fifo (.reset_l(fifo_reset_l), .write_l(write_l), .read_l(fifo_READ_l),
    .d(wd), .q(fifo_OUT), .empty_l(fifo_EMPTY_l), .half_l(fifo_HALF_l), .full_l(fifo_FULL_l));

  always #5 clk = !clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // write one character into the FIFO and into the reference model
  task automatic put(input bit cmd, input logic [7:0] b);
    wd = {cmd, b}; write_l = 1'b0; #2; write_l = 1'b1; #1;
    if (cmd) begin has_pending = 0; cmd_chars++; end
    else if (!has_pending) begin pending = b; has_pending = 1; end
    else begin expected.push_back({b, pending}); has_pending = 0; end
  endtask

  // output-port model
  always @(posedge clk) begin
    if (!reset) begin
      if (data_pump_word_ready && refill_ibus_output_buf) begin
        words++;
        check(expected.size() > 0, "word expected");
        if (expected.size() > 0) begin
          logic [15:0] e;
          e = expected.pop_front();
          check(fiber_to_ibus_buf == e,
                $sformatf("word %h, expected %h", fiber_to_ibus_buf, e));
        end
        refill_ibus_output_buf <= 1'b0;
        hold = $urandom_range(0, 6);
      end else if (!refill_ibus_output_buf) begin
        if (hold == 0) refill_ibus_output_buf <= 1'b1;
        else hold--;
      end
      if (dut.state == dut.FIFO_WAIT_ON_EMPTY) empty_waits++;
    end
  end

  initial begin
    int n;
    tick(2); reset = 1'b0; tick(2);
    // FIFO held in reset: the pump must not read
    check(fifo_READ_l && !data_pump_word_ready, "no read while FIFO in reset");
    fifo_reset_l = 1'b1; tick(3);
    check(dut.state == dut.FIFO_WAIT_ON_EMPTY, "waits on empty FIFO");

    // latency: one word written into an empty FIFO
    put(0, 8'h34); put(0, 8'h12);
    n = 0;
    while (!data_pump_word_ready && n < 20) begin tick(); n++; end
    check(data_pump_word_ready && fiber_to_ibus_buf == 16'h1234, "first word assembled");
    tick(10);

    // stream with command characters
    for (int i = 0; i < 200; i++) begin
      if ($urandom_range(0, 7) == 0) put(1, 8'hbc);
      else put(0, 8'($urandom));
      if ($urandom_range(0, 3) == 0) tick($urandom_range(1, 8));
      while (!fifo_FULL_l || u_fifo.cnt > 50) tick();
    end
    n = 0;
    while ((expected.size() > 0 || !refill_ibus_output_buf) && n < 5000) begin tick(); n++; end
    check(expected.size() == 0, "all words delivered");

    // fetch time with data waiting and an idle port: 5 cycles from the port
    // becoming free to the word being ready
    for (int i = 0; i < 8; i++) put(0, 8'(i));
    @(negedge clk);
    t_free = 0;
    measure = 1;
    n = 0;
    while (expected.size() > 0 && n < 500) begin tick(); n++; end
    measure = 0;
    check(measured >= 2, $sformatf("%0d fetch times measured", measured));
    tick(20);
    check(cmd_chars > 0 && empty_waits > 0, "command characters and empty waits exercised");
    check(words > 50, $sformatf("%0d words delivered", words));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
