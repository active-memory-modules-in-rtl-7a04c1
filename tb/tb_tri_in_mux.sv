// Self-checking testbench of tri_in_mux: every combination of the two
// sources' valid bits, destination MSBs and the fault mark, for a group-0 and a
// group-1 mux, against the expected pick (source p first, only requests whose
// D3 names the mux's group, nothing when faulty).
module tb_tri_in_mux;
  import tri_pkg::*;

  req_t lo, hi, out0, out1;
  logic fault;
  int   checks = 0, failures = 0;

  tri_in_mux #(.GROUP(1'b0)) dut0 (.req_lo(lo), .req_hi(hi), .fault(fault), .out(out0));
  tri_in_mux #(.GROUP(1'b1)) dut1 (.req_lo(lo), .req_hi(hi), .fault(fault), .out(out1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic req_t expect_out(bit grp, req_t a, req_t b, logic f);
    if (f) return '0;
    if (a.valid && a.dst[3] == grp) return a;
    if (b.valid && b.dst[3] == grp) return b;
    return '0;
  endfunction

  initial begin
    for (int v = 0; v < 32; v++) begin
      for (int rep = 0; rep < 4; rep++) begin
        lo = '0; hi = '0;
        lo.valid = v[0]; lo.dst = {v[1], 3'($urandom)}; lo.src = 4'($urandom); lo.data = 8'($urandom);
        hi.valid = v[2]; hi.dst = {v[3], 3'($urandom)}; hi.src = 4'($urandom); hi.data = 8'($urandom);
        lo.hops = 3'($urandom); hi.hops = 3'($urandom);
        fault = v[4];
        #1;
        checks += 2;
        if (out0 !== expect_out(1'b0, lo, hi, fault)) begin
          failures++; $display("FAIL grp0 case %0d: got %h", v, out0);
        end
        if (out1 !== expect_out(1'b1, lo, hi, fault)) begin
          failures++; $display("FAIL grp1 case %0d: got %h", v, out1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
