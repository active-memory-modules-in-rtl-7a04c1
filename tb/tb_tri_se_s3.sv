// Self-checking testbench of tri_se_s3 (stage-3 SE). Random requests on the
// two secondary inputs and the auxiliary input, random busy/fault marks.
// Model: inputs in priority order try the stage-4 link named by D2 (usable
// when untaken and the stage-4 output named by D1 is not busy), then, except
// for the auxiliary input, the auxiliary link (usable when untaken and the
// partner is not faulty).
module tb_tri_se_s3;
  import tri_pkg::*;

  req_t in_a, in_b, in_x, oe0, oe1, ox;
  logic fault, x_block;
  logic [1:0] e0_busy, e1_busy;
  int   checks = 0, failures = 0;
  int   n_e = 0, n_aux = 0, n_drop = 0;

  tri_se_s3 dut (.in_a, .in_b, .in_x, .fault, .e0_busy, .e1_busy, .x_block,
                 .out_e0(oe0), .out_e1(oe1), .out_x(ox));

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
    r.hops  = 3'($urandom_range(0, 3));
    return r;
  endfunction

  initial begin
    req_t e [3];
    req_t ins [3];
    bit   taken [3];
    int   h, d1;
    bit   placed;
    for (int i = 0; i < 4000; i++) begin
      in_a = rnd_req(); in_b = rnd_req(); in_x = rnd_req();
      fault = ($urandom_range(9) == 0);
      x_block = ($urandom_range(3) == 0);
      e0_busy = 2'($urandom_range(3)) & {2{$urandom_range(1) == 0}};
      e1_busy = 2'($urandom_range(3)) & {2{$urandom_range(1) == 0}};
      #1;
      ins = '{in_a, in_b, in_x};
      e = '{default: '0};
      taken = '{0, 0, 0};
      if (!fault) begin
        for (int k = 0; k < 3; k++) begin
          if (!ins[k].valid) continue;
          h  = (ins[k].dst >> 2) & 1;
          d1 = (ins[k].dst >> 1) & 1;
          placed = 0;
          if (!taken[h] && !((h == 0) ? e0_busy[d1] : e1_busy[d1])) begin
            taken[h] = 1; e[h] = ins[k]; e[h].hops = ins[k].hops + 1; placed = 1; n_e++;
          end else if (k < 2 && !taken[2] && !x_block) begin
            taken[2] = 1; e[2] = ins[k]; e[2].hops = ins[k].hops + 1; placed = 1; n_aux++;
          end
          if (!placed) n_drop++;
        end
      end
      checks += 3;
      if (oe0 !== e[0]) begin failures++; $display("FAIL e0 %h exp %h", oe0, e[0]); end
      if (oe1 !== e[1]) begin failures++; $display("FAIL e1 %h exp %h", oe1, e[1]); end
      if (ox  !== e[2]) begin failures++; $display("FAIL x %h exp %h", ox, e[2]); end
    end
    $display("to_stage4=%0d auxiliary=%0d dropped=%0d", n_e, n_aux, n_drop);
    checks++;
    if (n_e == 0 || n_aux == 0 || n_drop == 0) begin
      failures++; $display("FAIL a routing case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
