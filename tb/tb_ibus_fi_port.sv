// tb_ibus_fi_port: self-checking test of ibus_fi_port.
// The test bench plays the data pump (a word held with
// data_pump_word_ready until refill_ibus_output_buf drops) and the
// receiving decoder (ack). Checks: the word is copied and offered with req,
// req is held until ack, refill_ibus_output_buf is low from the capture
// until ack falls again, no capture happens while ack is still high, and
// both timeouts (ack never rises: req high 16 cycles; ack never falls:
// buffer busy 17 cycles).
module tb_ibus_fi_port;
  logic clk = 1'b0, reset = 1'b1;
  logic [15:0] data, fiber_to_ibus_buf = '0;
  logic req, ack = 1'b0, data_pump_word_ready = 1'b0, refill_ibus_output_buf;
  int checks = 0, failures = 0;

  ibus_fi_port dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic offer(input logic [15:0] w);
    fiber_to_ibus_buf = w; data_pump_word_ready = 1'b1;
    tick();
    check(req && !refill_ibus_output_buf, "word taken at once");
    check(data == w, "word copied");
    data_pump_word_ready = 1'b0; fiber_to_ibus_buf = ~w;
  endtask

  initial begin
    int n;
    tick(2); reset = 1'b0; tick();
    check(!req && refill_ibus_output_buf, "idle and free after reset");

    for (int k = 0; k < 6; k++) begin
      logic [15:0] w;
      int d;
      w = 16'($urandom);
      d = $urandom_range(0, 5);
      offer(w);
      tick(d);
      check(req && !refill_ibus_output_buf && data == w, "req held, buffer busy");
      ack = 1'b1; tick();
      check(!req, "req drops after ack");
      tick(2);
      check(!refill_ibus_output_buf, "buffer busy while ack high");
      ack = 1'b0; tick();
      check(refill_ibus_output_buf && !req, "buffer free after ack falls");
    end

    // no capture while ack is still high
    ack = 1'b1; fiber_to_ibus_buf = 16'h7777; data_pump_word_ready = 1'b1;
    tick(3);
    check(!req && refill_ibus_output_buf, "no capture while ack high");
    ack = 1'b0; tick();
    check(req && data == 16'h7777, "captured once ack low");
    data_pump_word_ready = 1'b0;

    // ack never comes: req high for 16 cycles in all
    n = 1;
    for (int c = 0; c < 40; c++) begin tick(); if (req) n++; end
    check(n == 16, $sformatf("req high %0d cycles on timeout, expected 16", n));
    check(refill_ibus_output_buf, "buffer freed after timeout");

    // ack never falls: buffer busy 17 cycles in all
    offer(16'h4321);
    n = 1;
    ack = 1'b1;
    for (int c = 0; c < 40; c++) begin tick(); if (!refill_ibus_output_buf) n++; end
    check(n == 17, $sformatf("buffer busy %0d cycles with ack stuck, expected 17", n));
    ack = 1'b0; tick(2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
