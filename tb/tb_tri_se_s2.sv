// Self-checking testbench of tri_se_s2 (stage-2 SE). Random requests on the
// three inputs, random fault marks. Model: inputs in index order each take
// the first usable link from: the stage-3 SE named by D0, the other stage-3
// SE, the auxiliary link to C1; a link is usable when no earlier input took
// it and the stage-3 SE behind it is not faulty.
module tb_tri_se_s2;
  import tri_pkg::*;

  req_t in0, in1, in2, oc0, oc1, ox;
  logic fault, c0_block, c1_block;
  int   checks = 0, failures = 0;
  int   n_pref = 0, n_other = 0, n_aux = 0;

  tri_se_s2 dut (.in0, .in1, .in2, .fault, .c0_block, .c1_block,
                 .out_c0(oc0), .out_c1(oc1), .out_x(ox));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic req_t rnd_req();
    req_t r;
    r = req_t'({$urandom, $urandom});
    r.valid = ($urandom_range(3) != 0);
    r.hops  = 3'($urandom_range(0, 2));
    return r;
  endfunction

  initial begin
    req_t e [3];
    req_t ins [3];
    bit   taken [3];
    bit   blk [3];
    int   cand [3];
    for (int i = 0; i < 4000; i++) begin
      in0 = rnd_req(); in1 = rnd_req(); in2 = rnd_req();
      fault = ($urandom_range(9) == 0);
      c0_block = ($urandom_range(4) == 0);
      c1_block = ($urandom_range(4) == 0);
      #1;
      ins = '{in0, in1, in2};
      e = '{default: '0};
      taken = '{0, 0, 0};
      blk = '{c0_block, c1_block, c1_block};
      if (!fault) begin
        for (int k = 0; k < 3; k++) begin
          if (!ins[k].valid) continue;
          cand[0] = ins[k].dst % 2;
          cand[1] = 1 - cand[0];
          cand[2] = 2;
          for (int c = 0; c < 3; c++) begin
            if (!taken[cand[c]] && !blk[cand[c]]) begin
              taken[cand[c]] = 1;
              e[cand[c]] = ins[k];
              e[cand[c]].hops = ins[k].hops + 1;
              e[cand[c]].sec = 1'b1;
              if (c == 0) n_pref++; else if (c == 1) n_other++; else n_aux++;
              break;
            end
          end
        end
      end
      checks += 3;
      if (oc0 !== e[0]) begin failures++; $display("FAIL c0 %h exp %h", oc0, e[0]); end
      if (oc1 !== e[1]) begin failures++; $display("FAIL c1 %h exp %h", oc1, e[1]); end
      if (ox  !== e[2]) begin failures++; $display("FAIL x %h exp %h", ox, e[2]); end
    end
    $display("preferred=%0d other=%0d auxiliary=%0d", n_pref, n_other, n_aux);
    checks++;
    if (n_pref == 0 || n_other == 0 || n_aux == 0) begin
      failures++; $display("FAIL a routing case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
