// tb_ibus_fo_action: self-checking test of ibus_fo_action.
// A transmitter model takes fo_d on every rising edge of the byte clock
// (toggling every clk cycle) while fo_ENA_l is low. Checks: each word goes
// out as exactly two data characters, low byte first, with the command and
// violation flags clear; fo_ack answers within 2 clk cycles of fo_req for
// both byte-clock phases and returns low; nothing is sent while
// il_i_am_addressed is high.
module tb_ibus_fo_action;
  logic clk = 1'b0, reset = 1'b1;
  logic il_i_am_addressed = 1'b0, fo_req = 1'b0;
  logic fo_ack, fo_ENA_l;
  logic [15:0] data = '0;
  logic fiber_clk;
  logic [9:0] fo_d;
  int checks = 0, failures = 0;
  logic [9:0] sent[$];

  ibus_fo_action dut (.*);

  always #5 clk = !clk;
  always_ff @(posedge clk or posedge reset)
    if (reset) fiber_clk <= 1'b0; else fiber_clk <= !fiber_clk;

  // transmitter model: the byte clock rises on the clk edges where it was
  // low, and the transmitter takes the values held just before that edge
  always @(posedge clk) if (!reset && !fiber_clk && !fo_ENA_l) sent.push_back(fo_d);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic send_word(input logic [15:0] w, input bit phase);
    int n;
    while (fiber_clk != phase) tick();
    data = w; fo_req = 1'b1;
    n = 0;
    do begin tick(); n++; end while (!fo_ack && n < 10);
    check(n == (phase ? 1 : 2), $sformatf("fo_ack after %0d cycles (phase %0d)", n, phase));
    fo_req = 1'b0;
    n = 0;
    do begin tick(); n++; end while (fo_ack && n < 10);
    check(n <= 4, "fo_ack returns low");
    tick(2);
    check(sent.size() == 2, $sformatf("%0d characters sent for one word", sent.size()));
    if (sent.size() == 2) begin
      check(sent[0] == {2'b00, w[7:0]}, "low byte first");
      check(sent[1] == {2'b00, w[15:8]}, "high byte second");
    end
    sent.delete();
  endtask

  initial begin
    tick(2); reset = 1'b0; tick();
    check(fo_ENA_l && !fo_ack, "idle after reset");
    for (int k = 0; k < 8; k++) send_word(16'($urandom), k[0]);

    // gated while this chip is addressed from the fiber
    il_i_am_addressed = 1'b1;
    data = 16'h5a5a; fo_req = 1'b1;
    tick(12);
    check(!fo_ack && sent.size() == 0, "nothing sent while addressed");
    fo_req = 1'b0; il_i_am_addressed = 1'b0; tick(2);
    send_word(16'hc3a5, 1'b0);

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
