// One group (G0 or G1) of the Triangle MIN: 11 switching elements in four
// stages, with the links between them.
//
//   stage 1: A0..A3  3x3   A_k takes group inputs 2k and 2k+1
//   stage 2: B       3x3   secondary path
//   stage 3: C0, C1  3x3   secondary path
//   stage 4: E0..E3  2x2   E_k drives group outputs 2k (D1 = 0), 2k+1 (D1 = 1)
//
// Links:
//   direct (primary, shortest)  A_k -> E_k          E_k serves D2 = k mod 2
//   secondary                   A0, A1, A2 -> B;  A3 -> C0
//                               B -> C0, C1, and B's auxiliary route -> C1
//                               C0 -> E0 (D2 = 0), E1 (D2 = 1)
//                               C1 -> E2 (D2 = 0), E3 (D2 = 1)
//   auxiliary (both ways)       A0 <-> A2,  A1 <-> A3,  C0 <-> C1
//
// Each auxiliary pair is a loop of two SEs that reach the same destinations
// over different stage-4 SEs and demuxes, so any single SE of a loop may fail;
// a fault in both SEs of one loop disconnects some source-destination pairs.
// Every stage-4 output port of the group is reachable by two stage-4 SEs.
//
// Fault marks of the stage-4 SEs and of the demuxes behind them are routed to
// the SEs that feed them, so traffic is steered around them in the same cycle.
// Combinational; the group's own stage counts (4, 1, 2, 4) give the 7 3x3 and
// 4 2x2 SEs per group of the described network, and the link pattern above is
// this design's.
module tri_group
  import tri_pkg::*;
(
  input  req_t       in_req      [GROUP_PORTS],
  input  logic [3:0] fault_s1,
  input  logic       fault_s2,
  input  logic [1:0] fault_s3,
  input  logic [3:0] fault_s4,
  input  logic [7:0] demux_fault,   // index 2k+j: demux behind E_k output j
  output req_t       out_req     [GROUP_PORTS]
);

  req_t a_d [4], a_s [4], a_x [4];
  req_t b_c0, b_c1, b_x;
  req_t c_e [2][2];   // [C index][0: to D2=0 SE, 1: to D2=1 SE]
  req_t c_x [2];
  req_t e_in_c [4];
  logic [1:0] e_busy [4];
  logic [1:0] e_block [4];   // as stage 3 sees E_k: taken, SE or demux faulty

  // stage 1
  for (genvar k = 0; k < 4; k++) begin : g_s1
    logic [1:0] d_block;
    assign d_block = {2{fault_s4[k]}} | demux_fault[2*k +: 2];
    tri_se_s1 #(.HALF(1'(k % 2))) u_se (
      .in_a    (in_req[2*k]),
      .in_b    (in_req[2*k+1]),
      .in_x    (a_x[k ^ 2]),
      .fault   (fault_s1[k]),
      .d_block (d_block),
      .s_block ((k < 3) ? fault_s2 : fault_s3[0]),
      .x_block (fault_s1[k ^ 2]),
      .out_d   (a_d[k]),
      .out_s   (a_s[k]),
      .out_x   (a_x[k])
    );
  end

  // stage 2
  tri_se_s2 u_s2 (
    .in0      (a_s[0]),
    .in1      (a_s[1]),
    .in2      (a_s[2]),
    .fault    (fault_s2),
    .c0_block (fault_s3[0]),
    .c1_block (fault_s3[1]),
    .out_c0   (b_c0),
    .out_c1   (b_c1),
    .out_x    (b_x)
  );

  // stage 3
  for (genvar k = 0; k < 4; k++) begin : g_blk
    assign e_block[k] = e_busy[k] | {2{fault_s4[k]}} | demux_fault[2*k +: 2];
  end

  tri_se_s3 u_c0 (
    .in_a    (b_c0),
    .in_b    (a_s[3]),
    .in_x    (c_x[1]),
    .fault   (fault_s3[0]),
    .e0_busy (e_block[0]),
    .e1_busy (e_block[1]),
    .x_block (fault_s3[1]),
    .out_e0  (c_e[0][0]),
    .out_e1  (c_e[0][1]),
    .out_x   (c_x[0])
  );

  tri_se_s3 u_c1 (
    .in_a    (b_c1),
    .in_b    (b_x),
    .in_x    (c_x[0]),
    .fault   (fault_s3[1]),
    .e0_busy (e_block[2]),
    .e1_busy (e_block[3]),
    .x_block (fault_s3[0]),
    .out_e0  (c_e[1][0]),
    .out_e1  (c_e[1][1]),
    .out_x   (c_x[1])
  );

  // stage 4: E_k gets C(k/2)'s link for D2 = k mod 2
  for (genvar k = 0; k < 4; k++) begin : g_s4
    assign e_in_c[k] = c_e[k / 2][k % 2];
    tri_se_2x2 u_se (
      .in_d  (a_d[k]),
      .in_c  (e_in_c[k]),
      .fault (fault_s4[k]),
      .out0  (out_req[2*k]),
      .out1  (out_req[2*k+1]),
      .busy  (e_busy[k])
    );
  end

endmodule
