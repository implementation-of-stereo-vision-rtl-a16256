// memory_matrix: NY x NX simple dual-port memories forming one image ring
// buffer with parallel access to an NY x NX neighbourhood.
//
// Pixel (x, y) belongs to memory (y mod NY, x mod NX). All memories share the
// write address and write data; the low row and column bits of the pixel
// position drive a demultiplexer that raises the write enable of exactly one
// memory. Each memory has its own read address so that any NY x NX window can
// be read in one cycle. Each memory holds DEPTH words, i.e. the matrix holds
// NX*NY*DEPTH pixels (1/(NX*NY) of the buffer per memory instead of a full
// copy per read port).
// Timing: write on the clock edge when wr_en; synchronous read, data valid
// the cycle after rd_en.
module memory_matrix #(
  parameter int NX    = 4,
  parameter int NY    = 4,
  parameter int DEPTH = 8192,
  parameter int PIX_W = 8
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(NX)-1:0]    wr_col,    // x mod NX
  input  logic [$clog2(NY)-1:0]    wr_row,    // y mod NY
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [PIX_W-1:0]         wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr [NY][NX],
  output logic [PIX_W-1:0]         rd_data [NY][NX]
);
  logic [NY-1:0][NX-1:0] we;

  // write request demultiplexer
  always_comb begin
    we = '0;
    we[wr_row][wr_col] = wr_en;
  end

  for (genvar r = 0; r < NY; r++) begin : g_row
    for (genvar c = 0; c < NX; c++) begin : g_col
      logic [PIX_W-1:0] mem [DEPTH];
      always_ff @(posedge clk) begin
        if (we[r][c]) mem[wr_addr] <= wr_data;
        if (rd_en)    rd_data[r][c] <= mem[rd_addr[r][c]];
      end
    end
  end
endmodule
