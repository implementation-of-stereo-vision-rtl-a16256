// stream_fifo: first-in first-out buffer for a valid/ready stream.
//
// DEPTH entries of W bits in a circular array with read and write pointers
// and an occupancy counter. in_ready is high while not full, out_valid while
// not empty; data is presented from the array (first-word fall-through) and
// a write and a read may happen in the same cycle. Used to decouple the
// streams whose pipelines have different latencies.
module stream_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_data,
  input  logic         in_valid,
  output logic         in_ready,
  output logic [W-1:0] out_data,
  output logic         out_valid,
  input  logic         out_ready
);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;
  logic          wr, rd;

  assign in_ready  = (cnt != (AW+1)'(DEPTH));
  assign out_valid = (cnt != '0);
  assign out_data  = mem[rp];
  assign wr = in_valid && in_ready;
  assign rd = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (wr) mem[wp] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0;
    end else begin
      if (wr) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (rd) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(wr) - (AW+1)'(rd);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) cnt <= (AW+1)'(DEPTH));
endmodule
