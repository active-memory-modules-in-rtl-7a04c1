// Self-checking testbench of tri_group (one group of 11 SEs).
//
// Part 1: one request at a time, from every input port to every local
// destination, with no fault, with every single fault (each SE, each demux
// mark) and with both SEs of each auxiliary loop faulty. The output port,
// hop count and secondary-path bit are compared with the reference path model.
// Part 2: random loads of up to 8 simultaneous requests with random faults.
// Every request that comes out must sit on an output that serves its
// destination (output 2k+j serves D2 = k mod 2, D1 = j), appear once, carry
// its data unchanged, and no more come out than went in; a request alone in
// the group must behave as in part 1.
module tb_tri_group;
  import tri_pkg::*;
  import tb_tri_ref_pkg::*;

  req_t       in_req  [GROUP_PORTS];
  req_t       out_req [GROUP_PORTS];
  logic [3:0] fault_s1, fault_s4;
  logic       fault_s2;
  logic [1:0] fault_s3;
  logic [7:0] demux_fault;
  int         checks = 0, failures = 0;
  int         n_deliv = 0, n_drop = 0, n_sec = 0, n_aux_hops = 0;

  tri_group dut (.in_req, .fault_s1, .fault_s2, .fault_s3, .fault_s4, .demux_fault, .out_req);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(grp_faults_t f);
    for (int k = 0; k < 4; k++) begin
      fault_s1[k] = f.s1[k];
      fault_s4[k] = f.s4[k];
    end
    fault_s2 = f.s2;
    fault_s3 = {f.s3[1], f.s3[0]};
    for (int i = 0; i < 8; i++) demux_fault[i] = f.dm[i];
  endtask

  task automatic single_sweep(grp_faults_t f);
    int exp_o, hops, found;
    bit sec;
    apply(f);
    for (int p = 0; p < 8; p++) begin
      for (int l = 0; l < 8; l++) begin
        foreach (in_req[i]) in_req[i] = '0;
        in_req[p].valid = 1'b1;
        in_req[p].src   = 4'(p);
        in_req[p].dst   = 4'(l);
        in_req[p].data  = 8'($urandom);
        #1;
        exp_o = route(f, p, l, hops, sec);
        found = -1;
        foreach (out_req[o]) if (out_req[o].valid) found = o;
        checks++;
        if (found != exp_o) begin
          failures++;
          $display("FAIL port %0d dst %0d: out %0d expected %0d", p, l, found, exp_o);
        end else if (found >= 0) begin
          checks++;
          if (out_req[found].hops != 3'(hops) || out_req[found].sec != sec ||
              out_req[found].data != in_req[p].data || out_req[found].dst != 4'(l)) begin
            failures++;
            $display("FAIL port %0d dst %0d: hops %0d/%0d sec %0d/%0d", p, l,
                     out_req[found].hops, hops, out_req[found].sec, sec);
          end
          n_deliv++;
          if (sec) n_sec++;
          if (hops == 3 && !sec) n_aux_hops++;
        end else n_drop++;
      end
    end
  endtask

  initial begin
    grp_faults_t f;
    // part 1
    single_sweep(no_faults());
    for (int k = 0; k < 4; k++) begin f = no_faults(); f.s1[k] = 1; single_sweep(f); end
    f = no_faults(); f.s2 = 1; single_sweep(f);
    for (int k = 0; k < 2; k++) begin f = no_faults(); f.s3[k] = 1; single_sweep(f); end
    for (int k = 0; k < 4; k++) begin f = no_faults(); f.s4[k] = 1; single_sweep(f); end
    for (int k = 0; k < 8; k++) begin f = no_faults(); f.dm[k] = 1; single_sweep(f); end
    f = no_faults(); f.s1[0] = 1; f.s1[2] = 1; single_sweep(f);
    f = no_faults(); f.s1[1] = 1; f.s1[3] = 1; single_sweep(f);
    f = no_faults(); f.s3[0] = 1; f.s3[1] = 1; single_sweep(f);
    $display("single requests: delivered=%0d dropped=%0d secondary=%0d aux_detours=%0d",
             n_deliv, n_drop, n_sec, n_aux_hops);

    // part 2
    for (int it = 0; it < 3000; it++) begin
      int   nin, nout, seen_src [8];
      f = no_faults();
      if ($urandom_range(3) == 0) begin
        case ($urandom_range(4))
          0: f.s1[$urandom_range(3)] = 1;
          1: f.s2 = 1;
          2: f.s3[$urandom_range(1)] = 1;
          3: f.s4[$urandom_range(3)] = 1;
          default: f.dm[$urandom_range(7)] = 1;
        endcase
      end
      apply(f);
      nin = 0;
      foreach (in_req[i]) begin
        in_req[i] = '0;
        in_req[i].valid = ($urandom_range(99) < 20 + it % 80);
        in_req[i].src   = 4'(i);
        in_req[i].dst   = 4'($urandom_range(7));
        in_req[i].data  = 8'($urandom);
        nin += int'(in_req[i].valid);
      end
      #1;
      nout = 0;
      seen_src = '{default: 0};
      foreach (out_req[o]) begin
        if (out_req[o].valid) begin
          int s;
          nout++;
          s = out_req[o].src;
          checks++;
          if (out_req[o].dst[2] != 1'((o / 2) % 2) || out_req[o].dst[1] != 1'(o % 2) ||
              !in_req[s].valid || in_req[s].dst != out_req[o].dst ||
              in_req[s].data != out_req[o].data || seen_src[s] != 0) begin
            failures++;
            $display("FAIL random load: output %0d carries %h", o, out_req[o]);
          end
          seen_src[s]++;
        end
      end
      checks++;
      if (nout > nin) begin failures++; $display("FAIL more out than in"); end
      if (nin == 1) begin
        int hops, eo;
        bit sec;
        foreach (in_req[i]) if (in_req[i].valid) begin
          eo = route(f, i, int'(in_req[i].dst), hops, sec);
          checks++;
          if ((eo < 0) ? (nout != 0) : !out_req[eo].valid) begin
            failures++; $display("FAIL lone request at port %0d", i);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
