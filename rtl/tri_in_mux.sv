// Input multiplexer of the Triangle MIN.
//
// Every group (G0, G1) has eight of these, one per group input port p; the
// network therefore has N = 16 of them. Mux p of group GROUP sees the requests
// of source p (req_lo) and source p+8 (req_hi), so every source reaches one
// stage-1 switching element in each group. Group selection is the first step
// of routing: only a request whose destination MSB (D3) equals GROUP is taken.
// When both sources want this group in the same cycle, source p wins and the
// request of source p+8 is not passed (it is dropped, as blocked requests are
// everywhere in this network). A mux marked faulty passes nothing.
//
// Purely combinational; the fixed priority and the fault input are this
// design's choices.
module tri_in_mux
  import tri_pkg::*;
#(
  parameter bit GROUP = 1'b0
) (
  input  req_t req_lo,
  input  req_t req_hi,
  input  logic fault,
  output req_t out
);

  logic lo_hit, hi_hit;

  assign lo_hit = req_lo.valid && (req_lo.dst[ADDR_W-1] == GROUP);
  assign hi_hit = req_hi.valid && (req_hi.dst[ADDR_W-1] == GROUP);

  always_comb begin
    out = '0;
    if (!fault) begin
      if (lo_hit)      out = req_lo;
      else if (hi_hit) out = req_hi;
    end
  end

endmodule
