// tb_read_from_fi: self-checking test of read_from_fi, run on two instances:
// LATCH_SELECT = 0 (default) and LATCH_SELECT = 1. The test bench plays the
// output port (four-phase req/ack with a 16-bit word) and the board on the
// lower bus (il_ack answering il_req after a random delay). A reference
// model decides for every word whether it must be written to the board;
// the board's log is compared with it. Also checked: the 3-cycle req-to-ack
// latency, the decoded sub-address, the one-cycle soft-reset request from a
// control-address word with bit 5 set, the selection flag, and recovery
// after the board never answers.
module tb_read_from_fi;
  logic clk = 1'b0, reset = 1'b1;
  logic        req[2], ack[2], il_req[2], il_ack[2];
  logic [15:0] data[2], il_io[2];
  logic [7:0]  address[2];
  logic        loopback_state[2], request_reset[2], sel[2], rx_en[2];
  bit          board_on = 1'b1;
  int          rr_pulses[2];
  logic [15:0] written0[$], written1[$];
  int          wait_n[2];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < 2; g++) begin : g_dut
    read_from_fi #(.LATCH_SELECT(g != 0)) dut (
      .clk(clk), .reset(reset), .req(req[g]), .ack(ack[g]), .data(data[g]),
      .il_io(il_io[g]), .address(address[g]), .il_req(il_req[g]), .il_ack(il_ack[g]),
      .i_am_remote(1'b1), .my_data_address(4'hF), .my_ctrl_address(4'h2),
      .loopback_state(loopback_state[g]), .request_reset(request_reset[g]),
      .FI_i_am_addressed(sel[g]), .receive_enabled(rx_en[g]));

    // board on the lower bus
    always @(posedge clk) begin
      if (reset) begin
        il_ack[g] <= 1'b0;
        wait_n[g] = 0;
      end else begin
        if (request_reset[g]) rr_pulses[g]++;
        if (il_req[g] && !il_ack[g] && board_on) begin
          if (wait_n[g] == 0) wait_n[g] = $urandom_range(1, 4);
          else begin
            wait_n[g]--;
            if (wait_n[g] == 0) begin
            il_ack[g] <= 1'b1;
            if (g == 0) written0.push_back(il_io[g]); else written1.push_back(il_io[g]);
            end
          end
        end else if (il_ack[g] && !il_req[g]) begin
          il_ack[g] <= 1'b0;
        end
      end
    end
  end

  always #5 clk = !clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick(int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // offer one word to instance i, as the output port does
  task automatic send(input int i, input logic [15:0] w);
    int n;
    data[i] = w; req[i] = 1'b1;
    n = 0;
    do begin tick(); n++; end while (!ack[i] && n < 20);
    check(n == 3, $sformatf("ack after %0d cycles, expected 3", n));
    req[i] = 1'b0;
    n = 0;
    while (ack[i] && n < 20) begin tick(); n++; end
    tick(12);
  endtask

  function automatic logic [15:0] addr_word(bit remote, logic [3:0] chip, logic [7:0] sub);
    return {1'b1, 2'b00, remote, chip, sub};
  endfunction

  initial begin
    for (int i = 0; i < 2; i++) begin req[i] = 1'b0; data[i] = '0; rr_pulses[i] = 0; end
    tick(2); reset = 1'b0; tick(2);
    for (int i = 0; i < 2; i++) begin
      bit latch;
      logic [15:0] exp_w[$];
      int rr0;
      latch = (i != 0);
      exp_w.delete();
      check(rx_en[i] && !loopback_state[i], "receive enabled, no loopback");

      // data address, then data words
      send(i, addr_word(1, 4'hF, 8'h5A));
      check(address[i] == 8'h5A, "sub-address kept");
      check(sel[i] == latch, "selection flag after data address");
      for (int k = 0; k < 3; k++) begin
        logic [15:0] w = 16'($urandom) & 16'h7fff;
        send(i, w); exp_w.push_back(w);
      end

      // control address with the reset bit, then a control data word
      rr0 = rr_pulses[i];
      send(i, addr_word(1, 4'h2, 8'h21));
      check(rr_pulses[i] == rr0 + 1, "one soft-reset pulse");
      check(address[i] == 8'h21 && !sel[i], "control sub-address, selection cleared");
      send(i, 16'h0abc);                      // consumed as control data
      send(i, addr_word(1, 4'h2, 8'h01));     // control address without reset bit
      check(rr_pulses[i] == rr0 + 1, "no reset pulse without bit 5");

      // address of another chip, and a matching chip on the wrong end
      send(i, addr_word(1, 4'h3, 8'h77));
      check(address[i] == 8'h01 && !sel[i], "other chip ignored");
      send(i, 16'h1111); if (!latch) exp_w.push_back(16'h1111);
      send(i, addr_word(0, 4'hF, 8'h66));
      check(address[i] == 8'h01, "wrong end ignored");
      send(i, 16'h2222); if (!latch) exp_w.push_back(16'h2222);

      // selected again
      send(i, addr_word(1, 4'hF, 8'h10));
      send(i, 16'h3333); exp_w.push_back(16'h3333);

      // board never answers: the write is abandoned, the next one works
      board_on = 1'b0;
      send(i, 16'h4444);
      tick(30);
      check(!il_req[i], "il_req released after timeout");
      board_on = 1'b1;
      send(i, 16'h5555); exp_w.push_back(16'h5555);
      tick(10);

      begin
        logic [15:0] got[$];
        got = (i == 0) ? written0 : written1;
        check(got.size() == exp_w.size(),
              $sformatf("%0d board writes, expected %0d", got.size(), exp_w.size()));
        for (int k = 0; k < exp_w.size() && k < got.size(); k++)
          check(got[k] == exp_w[k], $sformatf("write %0d: %h expected %h", k, got[k], exp_w[k]));
      end
    end

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
