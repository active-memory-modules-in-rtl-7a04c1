// Stage-4 switching element (2x2) of the Triangle MIN.
//
// The last stage is built of 2x2 SEs. Input in_d is the direct link from the
// stage-1 SE of the same index, input in_c comes from a stage-3 SE. A request
// leaves on output D1 (out0 for D1 = 0, out1 for D1 = 1); each output feeds a
// demux that completes the route on D0.
//
// The direct input has priority. busy tells the stage-3 SE, in the same
// cycle, which outputs the direct input has taken, so stage 3 detours over its
// auxiliary link instead of colliding here. A request on in_c that still meets
// a taken output is dropped. A faulty SE passes nothing (stage 1 and 3 get its
// fault mark separately).
//
// Combinational. Priority and the busy look-ahead are this design's choices.
module tri_se_2x2
  import tri_pkg::*;
(
  input  req_t       in_d,
  input  req_t       in_c,
  input  logic       fault,
  output req_t       out0,
  output req_t       out1,
  output logic [1:0] busy
);

  always_comb begin
    busy = 2'b00;
    if (!fault && in_d.valid) busy[in_d.dst[1]] = 1'b1;
  end

  always_comb begin
    out0 = '0;
    out1 = '0;
    if (!fault) begin
      if (in_d.valid) begin
        if (in_d.dst[1]) out1 = fwd(in_d, 1'b0);
        else             out0 = fwd(in_d, 1'b0);
      end
      if (in_c.valid && !busy[in_c.dst[1]]) begin
        if (in_c.dst[1]) out1 = fwd(in_c, 1'b0);
        else             out0 = fwd(in_c, 1'b0);
      end
    end
  end

endmodule
