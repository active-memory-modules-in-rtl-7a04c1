// Stage-2 switching element (3x3) of the Triangle MIN.
//
// The single stage-2 SE of a group lies on the secondary path. Its three
// inputs come from the secondary links of stage-1 SEs A0, A1 and A2; its
// outputs go to stage-3 SE C0 (out_c0), to C1 (out_c1) and, as its auxiliary
// route, to a second input of C1 (out_x).
//
// Both stage-3 SEs reach every destination of the group, so the choice only
// spreads the load: a request prefers C0 when D0 = 0 and C1 when D0 = 1, takes
// the other stage-3 SE when the preferred link is taken or that SE is faulty,
// and the auxiliary link when both are unavailable. Otherwise it is dropped.
// Inputs are served in index order (in0 first).
//
// Combinational. The D0-based preference and the order of the fall-backs are
// this design's choices.
module tri_se_s2
  import tri_pkg::*;
(
  input  req_t in0,
  input  req_t in1,
  input  req_t in2,
  input  logic fault,
  input  logic c0_block,   // stage-3 SE C0 is faulty
  input  logic c1_block,   // stage-3 SE C1 is faulty
  output req_t out_c0,
  output req_t out_c1,
  output req_t out_x
);

  req_t in_arr [3];

  assign in_arr[0] = in0;
  assign in_arr[1] = in1;
  assign in_arr[2] = in2;

  always_comb begin
    logic c0_ok, c1_ok;
    c0_ok  = 1'b0;
    c1_ok  = 1'b0;
    out_c0 = '0;
    out_c1 = '0;
    out_x  = '0;
    if (!fault) begin
      for (int i = 0; i < 3; i++) begin
        if (in_arr[i].valid) begin
          c0_ok = !out_c0.valid && !c0_block;
          c1_ok = !out_c1.valid && !c1_block;
          if (!in_arr[i].dst[0] && c0_ok)         out_c0 = fwd(in_arr[i], 1'b1);
          else if (in_arr[i].dst[0] && c1_ok)     out_c1 = fwd(in_arr[i], 1'b1);
          else if (c0_ok)                         out_c0 = fwd(in_arr[i], 1'b1);
          else if (c1_ok)                         out_c1 = fwd(in_arr[i], 1'b1);
          else if (!out_x.valid && !c1_block)     out_x  = fwd(in_arr[i], 1'b1);
        end
      end
    end
  end

endmodule
