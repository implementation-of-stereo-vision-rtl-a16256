// deinterleave: splits the interleaved multi-camera stream into one stream
// per camera.
//
// The camera interleaves its sensors byte by byte; after a width adapter the
// stream carries N_STREAMS pixels per beat, one from each sensor. Each output
// stream takes its byte lane: stream 0 the most significant byte
// (data[23:16] for three streams), the last stream the least significant one.
// The input valid is broadcast to every output and the input ready is the AND
// of all output readies, so a beat moves only when every sink can take it.
// This is purely combinational (zero latency), as in the original structure;
// sinks with different latencies need their own FIFOs downstream.
module deinterleave #(
  parameter int PIX_W     = 8,
  parameter int N_STREAMS = 3
) (
  input  logic [N_STREAMS*PIX_W-1:0] in_data,
  input  logic                       in_valid,
  output logic                       in_ready,
  output logic [PIX_W-1:0]           out_data  [N_STREAMS],
  output logic [N_STREAMS-1:0]       out_valid,
  input  logic [N_STREAMS-1:0]       out_ready
);
  always_comb begin
    in_ready = &out_ready;
    for (int s = 0; s < N_STREAMS; s++) begin
      out_data[s]  = in_data[(N_STREAMS-1-s)*PIX_W +: PIX_W];
      // Valid is shared; a beat only counts as transferred when all sinks
      // are ready, so each output reports valid only then.
      out_valid[s] = in_valid && in_ready;
    end
  end
endmodule
