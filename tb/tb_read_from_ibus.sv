// tb_read_from_ibus: self-checking test of read_from_ibus.
// Plays the on-board bus master (iu_req/iu_io) and the fiber-output side
// (ack). Checks: the captured word, the four-phase handshake on both sides,
// that a word is passed on only once, the 2**TIMEOUT_W-cycle timeout when
// the fiber side never answers, and the timeout when the bus master never
// releases iu_req.
module tb_read_from_ibus;
  logic clk = 1'b0, reset = 1'b1;
  logic iu_req = 1'b0, ack = 1'b0;
  logic iu_ack, req;
  logic [15:0] iu_io = '0, data;
  int checks = 0, failures = 0;

  read_from_ibus dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // Bus master writes a word and releases iu_req once acknowledged.
  task automatic bus_write(input logic [15:0] w);
    iu_io = w; iu_req = 1'b1;
    tick();
    check(iu_ack, "iu_ack one cycle after iu_req");
    iu_req = 1'b0; iu_io = ~w;
  endtask

  initial begin
    int n;
    tick(2); reset = 1'b0; tick();
    check(!req && !iu_ack, "idle after reset");

    // 1: normal transfer, fiber side answers after 3 cycles
    for (int k = 0; k < 4; k++) begin
      logic [15:0] w;
      w = 16'(($urandom & 16'hffff));
      bus_write(w);
      tick();
      check(req, "req raised after capture");
      check(data == w, "captured word on data");
      tick(3);
      check(req, "req held until ack");
      ack = 1'b1; tick(2);
      check(!req, "req dropped after ack");
      tick(2);
      check(!req && data == w, "no new request while ack high");
      ack = 1'b0; tick(2);
      check(!req && !iu_ack, "back to idle");
    end

    // 2: fiber side never answers: req is high for exactly 16 cycles
    bus_write(16'hbeef);
    n = 0;
    for (int c = 0; c < 40; c++) begin tick(); if (req) n++; end
    check(n == 16, $sformatf("req high %0d cycles on timeout, expected 16", n));
    check(data == 16'hbeef, "word kept after timeout");

    // 3: bus master holds iu_req: iu_ack stays high 17 cycles, then the word
    //    is offered anyway
    iu_io = 16'h1234; iu_req = 1'b1;
    n = 0;
    for (int c = 0; c < 30; c++) begin
      tick(); if (iu_ack) n++;
      if (c == 20) iu_req = 1'b0;
      if (req) ack = 1'b1;
    end
    check(n == 17, $sformatf("iu_ack high %0d cycles with iu_req stuck, expected 17", n));
    check(data == 16'h1234, "word captured with iu_req stuck");
    ack = 1'b0; tick(5);

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
