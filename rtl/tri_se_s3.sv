// Stage-3 switching element (3x3) of the Triangle MIN.
//
// Inputs: two secondary-path links (in_a, in_b) and the auxiliary link from
// the partner stage-3 SE (in_x). Outputs: one link to each of two stage-4 SEs
// (out_e0 serves destinations with D2 = 0, out_e1 those with D2 = 1) and the
// auxiliary link to the partner (out_x). The partner is wired to the other
// two stage-4 SEs, which serve the same destinations through other demuxes.
//
// A request goes to the stage-4 SE selected by D2. That SE is busy for it when
// the link is already taken this cycle, when the stage-4 output it needs (by
// D1) is already used by a direct-path request, or when the SE or the demux
// behind that output is faulty (e0_busy/e1_busy, one bit per D1). It then goes
// over the auxiliary link, unless the partner is faulty, and is dropped
// otherwise. A request that arrived over the auxiliary link is not sent back.
// in_a has priority over in_b, and both over in_x; the auxiliary output
// depends only on in_a/in_b, so the two partners form no combinational loop.
//
// Combinational. The priority order and drop-on-block are this design's
// choices.
module tri_se_s3
  import tri_pkg::*;
(
  input  req_t       in_a,
  input  req_t       in_b,
  input  req_t       in_x,
  input  logic       fault,
  input  logic [1:0] e0_busy,
  input  logic [1:0] e1_busy,
  input  logic       x_block,
  output req_t       out_e0,
  output req_t       out_e1,
  output req_t       out_x
);

  req_t prim [2];
  req_t e_p [2];   // stage-4 links after in_a and in_b
  logic [1:0] busy [2];

  assign prim[0] = in_a;
  assign prim[1] = in_b;
  assign busy[0] = e0_busy;
  assign busy[1] = e1_busy;

  always_comb begin
    logic h;
    h      = 1'b0;
    e_p[0] = '0;
    e_p[1] = '0;
    out_x  = '0;
    if (!fault) begin
      for (int i = 0; i < 2; i++) begin
        if (prim[i].valid) begin
          h = prim[i].dst[2];
          if (!e_p[h].valid && !busy[h][prim[i].dst[1]]) e_p[h] = fwd(prim[i], 1'b0);
          else if (!out_x.valid && !x_block)             out_x  = fwd(prim[i], 1'b0);
        end
      end
    end
  end

  always_comb begin
    logic h;
    out_e0 = e_p[0];
    out_e1 = e_p[1];
    h      = in_x.dst[2];
    if (!fault && in_x.valid && !e_p[h].valid && !busy[h][in_x.dst[1]]) begin
      if (h) out_e1 = fwd(in_x, 1'b0);
      else   out_e0 = fwd(in_x, 1'b0);
    end
  end

endmodule
