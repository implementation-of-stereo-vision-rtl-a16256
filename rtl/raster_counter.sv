// raster_counter: column/row coordinate counter for a raster-scanned frame.
//
// Counts x from 0 to W-1 and then advances y, wrapping to (0, 0) after the
// last pixel of an H-row frame. `last` is high while the counter stands on
// the final pixel of the frame. clear returns to (0, 0) and wins over inc.
// Used as the input and output coordinate counters of the spatial
// transformation.
module raster_counter #(
  parameter int W = 1280,
  parameter int H = 960
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 inc,
  output logic [$clog2(W)-1:0] x,
  output logic [$clog2(H)-1:0] y,
  output logic                 last
);
  localparam int XW = $clog2(W);
  localparam int YW = $clog2(H);
  assign last = (x == XW'(W-1)) && (y == YW'(H-1));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0;
      y <= '0;
    end else if (clear) begin
      x <= '0;
      y <= '0;
    end else if (inc) begin
      if (x == XW'(W-1)) begin
        x <= '0;
        y <= (y == YW'(H-1)) ? '0 : y + 1'b1;
      end else begin
        x <= x + 1'b1;
      end
    end
  end
endmodule
