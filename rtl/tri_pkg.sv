// Shared types and constants of the 16x16 Triangle multistage interconnection
// network (MIN).
//
// A request travels through the network as one packed struct, req_t. It
// carries the routing tag (the destination address D3..D0 and the "secondary
// path" bit, the tag MSB that stage 1 sets when it sends a request down the
// longer secondary path), the number of switching elements (SEs) it has passed
// so far, the source number and a payload word. Every SE that forwards a
// request increments the hop count, so a delivered request reports its own
// path length.
//
// The network size (16 sources, 16 memory modules, two groups of 8 ports) is
// the size the network is described at. The payload width is this design's
// own choice.
package tri_pkg;

  localparam int unsigned N           = 16;       // sources = memory modules
  localparam int unsigned ADDR_W      = 4;        // log2(N)
  localparam int unsigned GROUP_PORTS = N / 2;    // ports per group G0 / G1
  localparam int unsigned HOP_W       = 3;        // longest path is 6 SEs
  localparam int unsigned DATA_W      = 8;        // payload width

  typedef logic [ADDR_W-1:0] addr_t;

  typedef struct packed {
    logic              valid;  // a request is present on this link
    logic              sec;    // routing tag MSB: request is on the secondary path
    logic [HOP_W-1:0]  hops;   // SEs passed so far
    addr_t             src;    // issuing processor
    addr_t             dst;    // destination memory module D3..D0
    logic [DATA_W-1:0] data;   // payload
  } req_t;

  // Copy of a request as it leaves an SE: one more hop, optionally tagged as
  // travelling on the secondary path.
  function automatic req_t fwd(req_t r, logic set_sec);
    req_t o;
    o      = r;
    o.hops = r.hops + HOP_W'(1);
    o.sec  = r.sec | set_sec;
    return o;
  endfunction

endpackage
