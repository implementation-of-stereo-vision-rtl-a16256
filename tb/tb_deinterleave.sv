// tb_deinterleave: random beats and random sink readiness; checks the byte
// lane of every output, the ANDed ready and that valid is only presented when
// the whole beat can move.
module tb_deinterleave;
  localparam int PIX_W = 8, N = 3;
  logic [N*PIX_W-1:0] in_data;
  logic in_valid, in_ready;
  logic [PIX_W-1:0] out_data [N];
  logic [N-1:0] out_valid, out_ready;
  int checks = 0, failures = 0;

  deinterleave #(.PIX_W(PIX_W), .N_STREAMS(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      in_data   = $urandom;
      in_valid  = $urandom_range(0, 1);
      out_ready = N'($urandom);
      #1;
      checks++;
      if (in_ready !== (out_ready == '1)) failures++;
      for (int s = 0; s < N; s++) begin
        logic [PIX_W-1:0] exp_d;
        exp_d = in_data[(N-1-s)*PIX_W +: PIX_W];   // stream 0 = data[23:16]
        checks += 2;
        if (out_data[s] !== exp_d) failures++;
        if (out_valid[s] !== (in_valid && out_ready == '1)) failures++;
      end
      #1;
    end
    // figure example: 0xAABBCC -> streams AA, BB, CC
    in_data = 24'hAABBCC; in_valid = 1; out_ready = '1; #1;
    checks++;
    if (out_data[0] != 8'hAA || out_data[1] != 8'hBB || out_data[2] != 8'hCC) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
