// lr_check: left-right consistency check of two disparity streams.
//
// A left disparity dL at column x is kept when the right image's disparity at
// column x - dL agrees within THRESH; otherwise (or when x - dL falls outside
// the row, or the right value is not available) it is marked invalid.
// The input carries, per accepted cycle, the left result for column x and the
// right result for column x - D + 1 (as produced by correspondence). Left
// results are delayed D-1 pixels so that, when checked, the right results
// for columns x .. x-D+1 are all present in a D-entry shift register.
//
// Interface: valid/ready in and out, one checked disparity per input. The
// output belongs to the left pixel D-1 inputs back; out_ok is low for
// rejected disparities and while the delay line is still filling.
// Latency: D-1 inputs plus one register. The check itself is the original
// design's; THRESH and the delay-line alignment are this design's choices.
module lr_check #(
  parameter int D      = 128,
  parameter int IMG_W  = 1280,
  parameter int THRESH = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [$clog2(D)-1:0]     disp_l,
  input  logic [$clog2(IMG_W)-1:0] x_l,
  input  logic [$clog2(D)-1:0]     disp_r,
  input  logic [$clog2(IMG_W)-1:0] x_r,
  input  logic        r_ok,
  input  logic        in_valid,
  output logic        in_ready,
  output logic [$clog2(D)-1:0]     out_disp,
  output logic [$clog2(IMG_W)-1:0] out_x,
  output logic        out_ok,
  output logic        out_valid,
  input  logic        out_ready
);
  localparam int DW = $clog2(D);
  localparam int XW = $clog2(IMG_W);

  logic ce, fire;
  assign ce       = !out_valid || out_ready;
  assign in_ready = ce;
  assign fire     = in_valid && ce;

  // left delay line (D-1 entries) and right shift register (D entries)
  logic [DW-1:0] ldl_d [D-1];
  logic [XW-1:0] ldl_x [D-1];
  logic [DW-1:0] rsr_d [D];
  logic [XW-1:0] rsr_x [D];
  logic          rsr_ok [D];
  logic [DW:0]   fill;

  // the check uses the state after this input is shifted in
  logic [DW-1:0] dl;
  logic [XW-1:0] xl;
  logic [DW-1:0] dr_n [D];
  logic [XW-1:0] xr_n [D];
  logic          ok_n [D];
  logic          consistent;
  always_comb begin
    dl = ldl_d[D-2];
    xl = ldl_x[D-2];
    dr_n[0] = disp_r; xr_n[0] = x_r; ok_n[0] = r_ok;
    for (int k = 1; k < D; k++) begin
      dr_n[k] = rsr_d[k-1]; xr_n[k] = rsr_x[k-1]; ok_n[k] = rsr_ok[k-1];
    end
    consistent = ok_n[dl]
              && (int'(xr_n[dl]) == int'(xl) - int'(dl))
              && ((int'(dr_n[dl]) - int'(dl) <= THRESH) &&
                  (int'(dl) - int'(dr_n[dl]) <= THRESH));
  end

  always_ff @(posedge clk) begin
    if (fire) begin
      ldl_d[0] <= disp_l; ldl_x[0] <= x_l;
      for (int k = 1; k < D-1; k++) begin
        ldl_d[k] <= ldl_d[k-1]; ldl_x[k] <= ldl_x[k-1];
      end
      rsr_d <= dr_n; rsr_x <= xr_n; rsr_ok <= ok_n;
      out_disp <= dl;
      out_x    <= xl;
      out_ok   <= consistent && (fill == (DW+1)'(D-1));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      fill      <= '0;
    end else begin
      if (ce) out_valid <= in_valid;
      if (fire && fill != (DW+1)'(D-1)) fill <= fill + 1'b1;
    end
  end
endmodule
