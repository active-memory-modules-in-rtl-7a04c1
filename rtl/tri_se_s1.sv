// Stage-1 switching element (3x3) of the Triangle MIN.
//
// Inputs: two group input ports (in_a, in_b, from the input muxes) and the
// auxiliary link from the partner stage-1 SE (in_x). Outputs: the direct link
// to the stage-4 SE of the same index (out_d), the secondary link towards
// stage 2/3 (out_s) and the auxiliary link to the partner SE (out_x).
//
// Routing, following the network's routing algorithm:
//  * The direct (shortest) path is used when the destination lies behind this
//    SE's stage-4 SE, i.e. when D2 equals HALF.
//  * If the SE behind the wanted link is busy or faulty (d_block per D1,
//    s_block) or the link is already taken this cycle, the request goes over
//    the auxiliary link to the partner SE, which serves the same destinations.
//    If that is blocked too, the request is dropped.
//  * Any other destination takes the secondary path; the routing-tag MSB
//    (req_t.sec) is set.
// A request that arrived over the auxiliary link is never sent back over it:
// it takes its link here or is dropped. in_a has priority over in_b, and both
// over in_x. The auxiliary output depends only on in_a/in_b, so the two
// partner SEs form no combinational loop.
//
// Combinational. The choice of D2 as the "destination is this SE's" test, the
// priority order and drop-on-block are this design's reading of the algorithm.
module tri_se_s1
  import tri_pkg::*;
#(
  parameter bit HALF = 1'b0
) (
  input  req_t       in_a,
  input  req_t       in_b,
  input  req_t       in_x,
  input  logic       fault,
  input  logic [1:0] d_block,   // stage-4 SE or its demux for D1 = i is faulty
  input  logic       s_block,   // next SE on the secondary link is faulty
  input  logic       x_block,   // partner stage-1 SE is faulty
  output req_t       out_d,
  output req_t       out_s,
  output req_t       out_x
);

  req_t prim [2];
  req_t d_p, s_p;   // direct / secondary outputs after in_a and in_b

  assign prim[0] = in_a;
  assign prim[1] = in_b;

  // in_a, then in_b: they may use every output, the auxiliary one included
  always_comb begin
    d_p   = '0;
    s_p   = '0;
    out_x = '0;
    if (!fault) begin
      for (int i = 0; i < 2; i++) begin
        if (prim[i].valid) begin
          if (prim[i].dst[2] == HALF) begin
            if (!d_p.valid && !d_block[prim[i].dst[1]]) d_p   = fwd(prim[i], 1'b0);
            else if (!out_x.valid && !x_block)          out_x = fwd(prim[i], 1'b0);
          end else begin
            if (!s_p.valid && !s_block)                 s_p   = fwd(prim[i], 1'b1);
            else if (!out_x.valid && !x_block)          out_x = fwd(prim[i], 1'b1);
          end
        end
      end
    end
  end

  // in_x takes what is left of the direct and secondary links
  always_comb begin
    out_d = d_p;
    out_s = s_p;
    if (!fault && in_x.valid) begin
      if (in_x.dst[2] == HALF) begin
        if (!d_p.valid && !d_block[in_x.dst[1]]) out_d = fwd(in_x, 1'b0);
      end else begin
        if (!s_p.valid && !s_block)              out_s = fwd(in_x, 1'b1);
      end
    end
  end

endmodule
