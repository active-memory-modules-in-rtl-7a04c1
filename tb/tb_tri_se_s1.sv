// Self-checking testbench of tri_se_s1 (stage-1 SE), for both values of HALF.
// Random requests on the two group inputs and the auxiliary input, random
// block and fault marks. The expected outputs come from a port-by-port model:
// each input, in priority order, walks its list of candidate links (direct
// then auxiliary when D2 == HALF, secondary then auxiliary otherwise; only
// the first entry for the auxiliary input) and takes the first one that is
// free and not blocked. Secondary routing sets the tag MSB; every forward
// adds one hop.
module tb_tri_se_s1;
  import tri_pkg::*;

  localparam int PD = 0, PS = 1, PX = 2;

  req_t in_a, in_b, in_x;
  logic fault, s_block, x_block;
  logic [1:0] d_block;
  req_t od [2], os [2], ox [2];
  int   checks = 0, failures = 0;
  int   n_direct = 0, n_sec = 0, n_aux = 0, n_drop = 0;

  tri_se_s1 #(.HALF(1'b0)) dut0 (.in_a, .in_b, .in_x, .fault, .d_block, .s_block, .x_block,
                                 .out_d(od[0]), .out_s(os[0]), .out_x(ox[0]));
  tri_se_s1 #(.HALF(1'b1)) dut1 (.in_a, .in_b, .in_x, .fault, .d_block, .s_block, .x_block,
                                 .out_d(od[1]), .out_s(os[1]), .out_x(ox[1]));

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
    r.sec   = 1'b0;
    r.hops  = 3'($urandom_range(0, 2));
    return r;
  endfunction

  function automatic bit usable(int p, req_t r, bit taken [3]);
    if (taken[p]) return 0;
    case (p)
      PD:      return !d_block[(r.dst >> 1) & 1];
      PS:      return !s_block;
      default: return !x_block;
    endcase
  endfunction

  task automatic model(int half, output req_t e [3]);
    bit   taken [3];
    req_t ins [3];
    int   cand [2];
    int   nc;
    ins = '{in_a, in_b, in_x};
    taken = '{0, 0, 0};
    e = '{default: '0};
    if (fault) return;
    for (int i = 0; i < 3; i++) begin
      if (!ins[i].valid) continue;
      if (((ins[i].dst >> 2) & 1) == half) cand[0] = PD; else cand[0] = PS;
      cand[1] = PX;
      nc = (i == 2) ? 1 : 2;
      for (int c = 0; c < nc; c++) begin
        if (usable(cand[c], ins[i], taken)) begin
          taken[cand[c]] = 1;
          e[cand[c]] = ins[i];
          e[cand[c]].hops = ins[i].hops + 1;
          if (cand[0] == PS) e[cand[c]].sec = 1'b1;
          break;
        end
      end
    end
  endtask

  initial begin
    req_t e [3];
    for (int i = 0; i < 4000; i++) begin
      in_a = rnd_req(); in_b = rnd_req(); in_x = rnd_req();
      fault   = ($urandom_range(9) == 0);
      d_block = 2'($urandom_range(3)) & {2{$urandom_range(2) == 0}};
      s_block = ($urandom_range(3) == 0);
      x_block = ($urandom_range(3) == 0);
      #1;
      for (int h = 0; h < 2; h++) begin
        model(h, e);
        checks += 3;
        if (od[h] !== e[PD]) begin failures++; $display("FAIL H%0d out_d %h exp %h", h, od[h], e[PD]); end
        if (os[h] !== e[PS]) begin failures++; $display("FAIL H%0d out_s %h exp %h", h, os[h], e[PS]); end
        if (ox[h] !== e[PX]) begin failures++; $display("FAIL H%0d out_x %h exp %h", h, ox[h], e[PX]); end
        n_direct += int'(e[PD].valid); n_sec += int'(e[PS].valid); n_aux += int'(e[PX].valid);
        n_drop   += int'(in_a.valid) + int'(in_b.valid) + int'(in_x.valid)
                  - int'(e[PD].valid) - int'(e[PS].valid) - int'(e[PX].valid);
      end
    end
    $display("direct=%0d secondary=%0d auxiliary=%0d dropped=%0d", n_direct, n_sec, n_aux, n_drop);
    checks++;
    if (n_direct == 0 || n_sec == 0 || n_aux == 0 || n_drop == 0) begin
      failures++; $display("FAIL a routing case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
