// tb_fiber_rec: self-checking test of fiber_rec.
// The test bench plays the fiber receiver: it presents a character on fr_d
// and pulls fr_RDY_l low for one or two clk cycles. Checks: the FIFO data
// and write strobe follow the receiver combinationally; one
// increment_fifo_count pulse per character, only while fr_status and
// receive_enabled are high; violation_count counts characters with the
// code-violation flag, saturates at 255 and is cleared by
// reset_fifo_request; fifo_reset_l drops at once on reset_fifo_request and
// is released on the next clock edge after it.
module tb_fiber_rec;
  logic clk = 1'b0, reset = 1'b1;
  logic [11:0] fr_d = '0;
  logic fr_RDY_l = 1'b1, fr_status = 1'b1, receive_enabled = 1'b1, reset_fifo_request = 1'b0;
  logic increment_fifo_count, fifo_reset_l, fifo_WRITE_l;
  logic [7:0] violation_count;
  logic [8:0] fifo_D;
  int checks = 0, failures = 0;
  int incs = 0;

  fiber_rec dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) if (!reset && increment_fifo_count) incs++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // one received character: strobe low for `len` cycles, then high for one
  task automatic rx(input bit viol, input bit cmd, input logic [7:0] b, input int len = 1);
    fr_d = {2'b00, viol, cmd, b};
    #1;
    check(fifo_D == {cmd, b}, "FIFO data follows receiver");
    fr_RDY_l = 1'b0; #1;
    check(!fifo_WRITE_l, "write strobe follows ready");
    tick(len);
    fr_RDY_l = 1'b1; #1;
    check(fifo_WRITE_l, "write strobe released");
    tick();
  endtask

  initial begin
    int exp_v, n_before;
    tick();
    check(!fifo_reset_l, "FIFO held in reset during reset");
    tick(); reset = 1'b0;
    #1 check(!fifo_reset_l, "FIFO still in reset until a clock edge");
    tick();
    check(fifo_reset_l, "FIFO released on the first edge");
    check(violation_count == 0, "count cleared by reset");

    // characters, some with violations, some long strobes
    exp_v = 0;
    for (int i = 0; i < 40; i++) begin
      bit v;
      v = ($urandom_range(0, 3) == 0);
      exp_v += v;
      rx(v, $urandom_range(0, 1), 8'($urandom), $urandom_range(1, 2));
    end
    tick(2);
    check(incs == 40, $sformatf("%0d increments for 40 characters", incs));
    check(violation_count == 8'(exp_v), $sformatf("violations %0d expected %0d", violation_count, exp_v));

    // no counting without signal or with reception disabled
    n_before = incs;
    fr_status = 1'b0; rx(1, 0, 8'h11); fr_status = 1'b1;
    receive_enabled = 1'b0; rx(1, 0, 8'h22); receive_enabled = 1'b1;
    tick(2);
    check(incs == n_before && violation_count == 8'(exp_v), "not counted without status/enable");

    // soft FIFO reset
    @(negedge clk); reset_fifo_request = 1'b1; #1;
    check(!fifo_reset_l, "FIFO reset asserted at once");
    tick();
    reset_fifo_request = 1'b0;
    #1 check(!fifo_reset_l, "FIFO reset held until next edge");
    check(violation_count == 0, "violation count cleared by soft reset");
    tick();
    check(fifo_reset_l, "FIFO reset released");

    // saturation
    for (int i = 0; i < 260; i++) rx(1, 0, 8'(i));
    check(violation_count == 8'd255, $sformatf("saturated count %0d", violation_count));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
