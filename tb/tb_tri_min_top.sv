// End-to-end testbench of the 16x16 Triangle MIN (tri_min_top), at its
// default size.
//
// Part 1, single requests: every source to every memory module, one request
// per transfer cycle, with no fault, with each of the 54 single faults (every
// mux, SE and demux of both groups) and with both SEs of each auxiliary loop
// faulty. The delivering module, payload, source, hop count, secondary-path
// bit and src_ack are compared with the reference path model, exactly one
// clock after the request was presented.
// Part 2, random traffic: every cycle each source requests with probability
// p (10 % .. 100 %) a random module, sometimes with a random single fault.
// Each delivery must match what its source sent the cycle before, and src_ack
// must name exactly the delivered sources.
// The routing mechanisms (direct path, secondary path, auxiliary links in
// stages 1, 2 and 3, stage-4 busy detour, drop, fault detour, both demux
// outputs, input mux conflict, memory-port conflict) are counted; one that
// never happened is a failure.
module tb_tri_min_top;
  import tri_pkg::*;
  import tb_tri_ref_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n;
  logic [N-1:0]      src_valid;
  addr_t             src_dst     [N];
  logic [DATA_W-1:0] src_data    [N];
  logic [7:0]        fault_mux   [2];
  logic [3:0]        fault_s1    [2];
  logic [1:0]        fault_s2;
  logic [1:0]        fault_s3    [2];
  logic [3:0]        fault_s4    [2];
  logic [7:0]        fault_demux [2];
  logic [N-1:0]      src_ack;
  logic [N-1:0]      mem_valid;
  addr_t             mem_src     [N];
  logic [DATA_W-1:0] mem_data    [N];
  logic [HOP_W-1:0]  mem_hops    [N];
  logic [N-1:0]      mem_sec;

  int checks = 0, failures = 0;
  longint cycles = 0;

  // mechanism counters
  int n_direct = 0, n_secondary = 0, n_aux1 = 0, n_aux2 = 0, n_aux3 = 0, n_busy4 = 0;
  int n_drop = 0, n_fault_detour = 0, n_d0 [2] = '{0, 0}, n_mux_conflict = 0, n_mem_conflict = 0;

  tri_min_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // internal events, sampled in the middle of each transfer cycle
  always @(negedge clk) begin
    if (rst_n) begin
      for (int s = 0; s < 8; s++)
        if (src_valid[s] && src_valid[s+8] && src_dst[s][3] == src_dst[s+8][3]) n_mux_conflict++;
      for (int k = 0; k < 4; k++) begin
        n_aux1 += int'(dut.g_grp[0].u_grp.a_x[k].valid) + int'(dut.g_grp[1].u_grp.a_x[k].valid);
      end
      n_aux2 += int'(dut.g_grp[0].u_grp.b_x.valid) + int'(dut.g_grp[1].u_grp.b_x.valid);
      for (int j = 0; j < 2; j++)
        n_aux3 += int'(dut.g_grp[0].u_grp.c_x[j].valid) + int'(dut.g_grp[1].u_grp.c_x[j].valid);
      // stage 3 detoured because a direct request held the stage-4 output
      for (int j = 0; j < 2; j++) begin
        req_t c;
        c = dut.g_grp[0].u_grp.c_x[j];
        if (c.valid && dut.g_grp[0].u_grp.e_busy[2*j + c.dst[2]][c.dst[1]]) n_busy4++;
        c = dut.g_grp[1].u_grp.c_x[j];
        if (c.valid && dut.g_grp[1].u_grp.e_busy[2*j + c.dst[2]][c.dst[1]]) n_busy4++;
      end
      for (int g = 0; g < 2; g++)
        for (int o = 0; o < 4; o++)
          for (int b = 0; b < 2; b++)
            if (dut.dm[g][o][b].valid && dut.dm[g][o+4][b].valid) n_mem_conflict++;
    end
  end

  task automatic clear_faults();
    for (int g = 0; g < 2; g++) begin
      fault_mux[g] = '0; fault_s1[g] = '0; fault_s3[g] = '0; fault_s4[g] = '0; fault_demux[g] = '0;
    end
    fault_s2 = '0;
  endtask

  // fault site 0..53 -> marks
  task automatic set_site(int site);
    int g, r;
    g = site / 27;
    r = site % 27;
    if (r < 8)       fault_mux[g][r] = 1'b1;
    else if (r < 12) fault_s1[g][r-8] = 1'b1;
    else if (r < 13) fault_s2[g] = 1'b1;
    else if (r < 15) fault_s3[g][r-13] = 1'b1;
    else if (r < 19) fault_s4[g][r-15] = 1'b1;
    else             fault_demux[g][r-19] = 1'b1;
  endtask

  function automatic grp_faults_t grp_f(int g);
    grp_faults_t f;
    for (int k = 0; k < 4; k++) begin f.s1[k] = fault_s1[g][k]; f.s4[k] = fault_s4[g][k]; end
    f.s2 = fault_s2[g];
    for (int k = 0; k < 2; k++) f.s3[k] = fault_s3[g][k];
    for (int k = 0; k < 8; k++) f.dm[k] = fault_demux[g][k];
    return f;
  endfunction

  task automatic idle_inputs();
    src_valid = '0;
    foreach (src_dst[i]) begin src_dst[i] = '0; src_data[i] = '0; end
  endtask

  // one request, checked one clock later
  task automatic single(int s, int d, bit faulty);
    int  o, hops, nvalid;
    bit  sec, exp_hit;
    grp_faults_t fclean;
    idle_inputs();
    src_valid[s] = 1'b1;
    src_dst[s]   = addr_t'(d);
    src_data[s]  = 8'($urandom);
    @(posedge clk);
    #1;
    if (fault_mux[d/8][s%8]) o = -1;
    else o = route(grp_f(d/8), s % 8, d % 8, hops, sec);
    exp_hit = (o >= 0);
    nvalid = $countones(mem_valid);
    checks++;
    if (nvalid != int'(exp_hit) || mem_valid[d] != exp_hit || src_ack[s] != exp_hit ||
        $countones(src_ack) != int'(exp_hit)) begin
      failures++;
      $display("FAIL s%0d->d%0d: delivered=%b ack=%b expected %0d", s, d, mem_valid[d], src_ack[s], exp_hit);
    end else if (exp_hit) begin
      checks++;
      if (mem_src[d] != addr_t'(s) || mem_data[d] != src_data[s] ||
          mem_hops[d] != 3'(hops) || mem_sec[d] != sec) begin
        failures++;
        $display("FAIL s%0d->d%0d: src %0d data %h hops %0d/%0d sec %0d/%0d", s, d,
                 mem_src[d], mem_data[d], mem_hops[d], hops, mem_sec[d], sec);
      end
      if (sec) n_secondary++; else if (hops == 2) n_direct++;
      n_d0[d % 2]++;
      if (faulty) begin
        fclean = no_faults();
        if (route(fclean, s % 8, d % 8, o, sec) >= 0 && o != hops) n_fault_detour++;
      end
    end else n_drop++;
  endtask

  initial begin
    addr_t             sent_dst  [N];
    logic [DATA_W-1:0] sent_data [N];
    logic [N-1:0]      sent_v;
    rst_n = 1'b0;
    idle_inputs();
    clear_faults();
    repeat (3) @(posedge clk);
    checks++;
    if (mem_valid != '0 || src_ack != '0) begin failures++; $display("FAIL reset"); end
    #1 rst_n = 1'b1;

    // part 1
    for (int cfg = -1; cfg < 54 + 6; cfg++) begin
      clear_faults();
      if (cfg >= 54) begin
        int g, l;
        g = (cfg - 54) / 3; l = (cfg - 54) % 3;
        if (l == 0) fault_s1[g] = 4'b0101;
        else if (l == 1) fault_s1[g] = 4'b1010;
        else fault_s3[g] = 2'b11;
      end else if (cfg >= 0) set_site(cfg);
      for (int s = 0; s < N; s++)
        for (int d = 0; d < N; d++)
          single(s, d, cfg >= 0);
    end
    clear_faults();
    $display("part 1 done at cycle %0d", cycles);

    // part 2
    sent_v = '0;
    for (int pc = 1; pc <= 10; pc++) begin
      int delivered, requested;
      delivered = 0;
      requested = 0;
      for (int t = 0; t < 400; t++) begin
        clear_faults();
        if (t % 4 == 3) set_site($urandom_range(53));
        for (int s = 0; s < N; s++) begin
          src_valid[s] = ($urandom_range(9) < pc);
          src_dst[s]   = addr_t'($urandom_range(N-1));
          src_data[s]  = 8'($urandom);
        end
        sent_v = src_valid; sent_dst = src_dst; sent_data = src_data;
        requested += $countones(sent_v);
        @(posedge clk);
        #1;
        for (int d = 0; d < N; d++) begin
          if (mem_valid[d]) begin
            int s;
            s = mem_src[d];
            delivered++;
            checks++;
            if (!sent_v[s] || sent_dst[s] != addr_t'(d) || sent_data[s] != mem_data[d] ||
                mem_hops[d] < 2 || mem_hops[d] > 6 || !src_ack[s]) begin
              failures++;
              $display("FAIL random: module %0d got src %0d data %h hops %0d", d, s, mem_data[d], mem_hops[d]);
            end
          end
        end
        checks++;
        if ($countones(src_ack) != $countones(mem_valid)) begin
          failures++; $display("FAIL random: %0d acks for %0d deliveries", $countones(src_ack), $countones(mem_valid));
        end
        n_drop += $countones(sent_v) - $countones(mem_valid);
      end
      $display("p=%0d%%: requested %0d delivered %0d per cycle %0.3f", pc * 10, requested,
               delivered, real'(delivered) / 400.0);
    end
    idle_inputs();
    @(posedge clk);

    $display("direct=%0d secondary=%0d aux_s1=%0d aux_s2=%0d aux_s3=%0d busy_s4=%0d drop=%0d",
             n_direct, n_secondary, n_aux1, n_aux2, n_aux3, n_busy4, n_drop);
    $display("fault_detour=%0d d0_0=%0d d0_1=%0d mux_conflict=%0d mem_conflict=%0d",
             n_fault_detour, n_d0[0], n_d0[1], n_mux_conflict, n_mem_conflict);
    checks++;
    if (n_direct == 0 || n_secondary == 0 || n_aux1 == 0 || n_aux2 == 0 || n_aux3 == 0 ||
        n_busy4 == 0 || n_drop == 0 || n_fault_detour == 0 || n_d0[0] == 0 || n_d0[1] == 0 ||
        n_mux_conflict == 0 || n_mem_conflict == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
