// fifo_model: behavioural model (not synthesizable) of the external
// asynchronous 9-bit FIFO chip that sits between fiber_rec and
// fifo_data_pump. A character on d is stored on the rising edge of write_l;
// the oldest character appears on q on the falling edge of read_l and is
// removed on its rising edge. empty_l, half_l and full_l are active low.
// reset_l low empties the FIFO. Writes to a full FIFO and reads from an
// empty one are ignored.
module fifo_model #(
  parameter int DEPTH = 512
) (
  input  logic       reset_l,
  input  logic       write_l,
  input  logic       read_l,
  input  logic [8:0] d,
  output logic [8:0] q,
  output logic       empty_l,
  output logic       half_l,
  output logic       full_l
);
  logic [8:0] mem[DEPTH];
  int wr = 0, rd = 0, cnt = 0;
  logic write_prev = 1'b1, read_prev = 1'b1;

  initial q = '0;

  always @(write_l or read_l or reset_l) begin
    if (!reset_l) begin
      wr = 0; rd = 0; cnt = 0;
    end else begin
      if (write_l && !write_prev && cnt < DEPTH) begin
        mem[wr] = d; wr = (wr + 1) % DEPTH; cnt++;
      end
      if (!read_l && read_prev && cnt > 0) q = mem[rd];
      if (read_l && !read_prev && cnt > 0) begin
        rd = (rd + 1) % DEPTH; cnt--;
      end
    end
    write_prev = write_l;
    read_prev  = read_l;
  end

  assign empty_l = (cnt != 0);
  assign half_l  = (cnt <= DEPTH / 2);
  assign full_l  = (cnt != DEPTH);
endmodule
