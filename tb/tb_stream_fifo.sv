// tb_stream_fifo: random pushes and pops against a queue model; checks data
// order, that the FIFO fills to exactly DEPTH entries (in_ready low only when
// full) and that out_valid follows the occupancy.
module tb_stream_fifo;
  localparam int W = 8, DEPTH = 5;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] in_data, out_data;
  logic in_valid, in_ready, out_valid, out_ready;
  int checks = 0, failures = 0, n = 0, n_full = 0;
  logic [W-1:0] model [$];
  bit fill_phase = 1;

  stream_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      checks += 2;
      if (in_ready != (model.size() < DEPTH)) failures++;
      if (out_valid != (model.size() > 0)) failures++;
      if (!in_ready) n_full++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != model.pop_front()) failures++;
        n++;
      end
      if (in_valid && in_ready) model.push_back(in_data);
      in_valid  <= $urandom_range(0, 2) != 0;
      in_data   <= W'($urandom);
      out_ready <= fill_phase ? 1'b0 : ($urandom_range(0, 2) != 0);
    end
  end

  initial begin
    in_valid = 0; out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (30) @(posedge clk);
    fill_phase = 0;
    wait (n >= 2000);
    checks++;
    if (n_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
