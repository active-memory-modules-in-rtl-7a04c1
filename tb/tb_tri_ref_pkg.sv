// Reference model used by the group and network testbenches: where a single,
// uncontended request ends up in one group of the Triangle MIN, given the
// group's fault marks. It walks the link table of the network hop by hop
// (stage 1 direct or secondary link, auxiliary detours in stages 1 and 3,
// stage 2 choice of stage-3 SE by D0) without reference to the RTL's code.
package tb_tri_ref_pkg;

  typedef struct {
    bit s1 [4];
    bit s2;
    bit s3 [2];
    bit s4 [4];
    bit dm [8];
  } grp_faults_t;

  function automatic grp_faults_t no_faults();
    grp_faults_t f;
    f.s1 = '{0, 0, 0, 0};
    f.s2 = 0;
    f.s3 = '{0, 0};
    f.s4 = '{0, 0, 0, 0};
    f.dm = '{0, 0, 0, 0, 0, 0, 0, 0};
    return f;
  endfunction

  // stage-4 SE e can deliver to its output l1
  function automatic bit e_ok(grp_faults_t f, int e, int l1);
    return !f.s4[e] && !f.dm[2*e + l1];
  endfunction

  // from stage-3 SE j (already counted in hops): group output or -1
  function automatic int from_c(grp_faults_t f, int j, int l2, int l1, inout int hops);
    int e;
    e = 2*j + l2;
    if (e_ok(f, e, l1)) begin hops++; return 2*e + l1; end
    if (f.s3[1-j]) return -1;
    hops++;                     // partner stage-3 SE
    e = 2*(1-j) + l2;
    if (e_ok(f, e, l1)) begin hops++; return 2*e + l1; end
    return -1;
  endfunction

  // secondary path from the SE behind stage-1 SE k's secondary link
  function automatic int from_sec(grp_faults_t f, int k, int l2, int l1, int l0, inout int hops);
    int j;
    if (k == 3) begin hops++; return from_c(f, 0, l2, l1, hops); end
    hops++;                     // stage-2 SE
    if (!f.s3[l0])        j = l0;
    else if (!f.s3[1-l0]) j = 1 - l0;
    else return -1;
    hops++;                     // stage-3 SE
    return from_c(f, j, l2, l1, hops);
  endfunction

  // group input port p, local destination l (D2..D0): output port or -1;
  // hops = SEs passed, sec = took the secondary path
  function automatic int route(grp_faults_t f, int p, int l, output int hops, output bit sec);
    int k, k2, l2, l1, l0;
    bit nxt_bad;
    k  = p / 2;
    k2 = k ^ 2;
    l2 = (l >> 2) & 1;
    l1 = (l >> 1) & 1;
    l0 = l & 1;
    hops = 0;
    sec  = 0;
    if (f.s1[k]) return -1;
    hops = 1;
    if (l2 == k % 2) begin
      if (e_ok(f, k, l1)) begin hops = 2; return 2*k + l1; end
      if (f.s1[k2]) return -1;
      if (e_ok(f, k2, l1)) begin hops = 3; return 2*k2 + l1; end
      return -1;
    end
    sec = 1;
    nxt_bad = (k < 3) ? f.s2 : f.s3[0];
    if (!nxt_bad) return from_sec(f, k, l2, l1, l0, hops);
    if (f.s1[k2]) return -1;
    hops = 2;
    nxt_bad = (k2 < 3) ? f.s2 : f.s3[0];
    if (nxt_bad) return -1;
    return from_sec(f, k2, l2, l1, l0, hops);
  endfunction

endpackage
