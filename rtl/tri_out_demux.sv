// Output demultiplexer of the Triangle MIN.
//
// One sits behind each of the eight stage-4 outputs of a group (N = 16 in the
// network). The last routing step is done here: bit D0 of the routing tag
// selects which of the demux's two memory modules receives the request. The
// request is passed unchanged (a demux is not counted as a hop). A demux
// marked faulty delivers nothing; stage 1 and stage 3 see its fault mark and
// steer requests to the second demux that serves the same memory modules.
//
// Purely combinational; the fault input is this design's choice.
module tri_out_demux
  import tri_pkg::*;
(
  input  req_t in,
  input  logic fault,
  output req_t out0,
  output req_t out1
);

  always_comb begin
    out0 = '0;
    out1 = '0;
    if (!fault && in.valid) begin
      if (in.dst[0]) out1 = in;
      else           out0 = in;
    end
  end

endmodule
