// Triangle multistage interconnection network, 16 processors x 16 memory
// modules.
//
// A request of source s (src_valid/src_dst/src_data) passes, in one transfer
// cycle, through
//   * an input mux: group g's mux p (p = s mod 8) takes it when D3 = g,
//   * the switching elements of group g (see tri_group): the short direct
//     path stage 1 -> stage 4, or the secondary path stage 1 -> 2 -> 3 -> 4,
//     with auxiliary links in stages 1 and 3 around busy or faulty SEs,
//   * an output demux that picks one of two memory modules by D0.
// Memory module d (group d[3], local address L = d[2:0]) is fed by the demuxes
// behind output L[1] of stage-4 SEs E_{L[2]} and E_{L[2]+2}; should both
// deliver in one cycle, the one from the lower SE wins. A blocked request is
// dropped, never buffered.
//
// Timing: the network is combinational from the source ports to the output
// registers. A request presented in cycle t is visible on mem_* and src_ack
// after the clock edge that ends cycle t (one cycle latency, one transfer
// cycle per clock, a new set of requests every cycle). src_ack[s] says that
// source s's request matured; without it the source should retry.
// mem_hops gives the number of SEs the request passed, mem_sec the routing-tag
// bit of the secondary path.
//
// Fault inputs mark individual muxes, SEs and demuxes as faulty; a faulty part
// passes nothing and its neighbours route around it where a route exists.
//
// The group structure, SE counts and sizes, mux/demux counts and the routing
// steps follow the described network; the link pattern, priorities, fault
// presentation and register placement are this design's. Only N = 16 is built.
module tri_min_top
  import tri_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      src_valid,
  input  addr_t             src_dst     [N],
  input  logic [DATA_W-1:0] src_data    [N],
  input  logic [7:0]        fault_mux   [2],   // [group][port]
  input  logic [3:0]        fault_s1    [2],
  input  logic [1:0]        fault_s2,          // [group]
  input  logic [1:0]        fault_s3    [2],
  input  logic [3:0]        fault_s4    [2],
  input  logic [7:0]        fault_demux [2],   // [group][2k+j]
  output logic [N-1:0]      src_ack,
  output logic [N-1:0]      mem_valid,
  output addr_t             mem_src     [N],
  output logic [DATA_W-1:0] mem_data    [N],
  output logic [HOP_W-1:0]  mem_hops    [N],
  output logic [N-1:0]      mem_sec
);

  req_t src_req [N];
  req_t g_in    [2][GROUP_PORTS];
  req_t g_out   [2][GROUP_PORTS];
  req_t dm      [2][GROUP_PORTS][2];
  req_t mem_req [N];
  logic [N-1:0] ack_d;

  for (genvar s = 0; s < N; s++) begin : g_src
    always_comb begin
      src_req[s]       = '0;
      src_req[s].valid = src_valid[s];
      src_req[s].src   = addr_t'(s);
      src_req[s].dst   = src_dst[s];
      src_req[s].data  = src_data[s];
    end
  end

  for (genvar g = 0; g < 2; g++) begin : g_grp
    for (genvar p = 0; p < GROUP_PORTS; p++) begin : g_mux
      tri_in_mux #(.GROUP(1'(g))) u_mux (
        .req_lo (src_req[p]),
        .req_hi (src_req[p + GROUP_PORTS]),
        .fault  (fault_mux[g][p]),
        .out    (g_in[g][p])
      );
    end

    tri_group u_grp (
      .in_req      (g_in[g]),
      .fault_s1    (fault_s1[g]),
      .fault_s2    (fault_s2[g]),
      .fault_s3    (fault_s3[g]),
      .fault_s4    (fault_s4[g]),
      .demux_fault (fault_demux[g]),
      .out_req     (g_out[g])
    );

    for (genvar o = 0; o < GROUP_PORTS; o++) begin : g_dmx
      tri_out_demux u_dmx (
        .in    (g_out[g][o]),
        .fault (fault_demux[g][o]),
        .out0  (dm[g][o][0]),
        .out1  (dm[g][o][1])
      );
    end
  end

  // memory module d: demux behind E_{L2} output L1, else behind E_{L2+2}
  for (genvar d = 0; d < N; d++) begin : g_mem
    localparam int G  = d / GROUP_PORTS;
    localparam int L0 = d % 2;
    localparam int L1 = (d / 2) % 2;
    localparam int L2 = (d / 4) % 2;
    assign mem_req[d] = dm[G][2*L2 + L1][L0].valid ? dm[G][2*L2 + L1][L0]
                                                   : dm[G][2*(L2+2) + L1][L0];
  end

  always_comb begin
    ack_d = '0;
    for (int d = 0; d < N; d++)
      if (mem_req[d].valid) ack_d[mem_req[d].src] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      src_ack   <= '0;
      mem_valid <= '0;
      mem_sec   <= '0;
      for (int d = 0; d < N; d++) begin
        mem_src[d]  <= '0;
        mem_data[d] <= '0;
        mem_hops[d] <= '0;
      end
    end else begin
      src_ack <= ack_d;
      for (int d = 0; d < N; d++) begin
        mem_valid[d] <= mem_req[d].valid;
        mem_sec[d]   <= mem_req[d].sec;
        mem_src[d]   <= mem_req[d].src;
        mem_data[d]  <= mem_req[d].data;
        mem_hops[d]  <= mem_req[d].hops;
      end
    end
  end

  // every request is delivered to the memory module it addressed
  for (genvar d = 0; d < N; d++) begin : g_chk
    always_comb begin
      if (mem_req[d].valid)
        assert (mem_req[d].dst == addr_t'(d))
          else $error("request of source %0d delivered to module %0d, wanted %0d",
                      mem_req[d].src, d, mem_req[d].dst);
    end
  end

endmodule
