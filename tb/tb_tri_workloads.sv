// Workload testbench of the 16x16 Triangle MIN at its default size.
//
// 1. Uniform random traffic: in every transfer cycle each of the 16 sources
//    requests, with probability p = 0.1 .. 1.0, a uniformly random memory
//    module. Over 2000 cycles per p it measures the bandwidth (memory modules
//    active per transfer cycle) and the probability of acceptance (bandwidth
//    over requests issued per cycle), and from them processor utilisation
//    (acceptance times the mean memory access time, taken as 2/7 cycle),
//    processing power (16 x utilisation) and throughput (utilisation times
//    requests per cycle). Bandwidth must not exceed 16 and must grow with p;
//    acceptance must lie in (0, 1].
// 2. Incremental permutation: source i sends to module (i + 4) mod 16, all 16
//    at once, with no fault and with one fault case per network part (input
//    mux; single SE and a whole auxiliary loop in stages 1, 2, 3; stage-4 SE;
//    output demux). It reports the requests that matured and their mean path
//    length in SEs. The fault-free case must deliver at least one request;
//    with no fault, or a single fault in stage 3, stage 4 or a demux, every
//    request of the permutation sent on its own must mature.
// Every delivery is checked against what its source sent.
module tb_tri_workloads;
  import tri_pkg::*;

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

  // mean memory access time in transfer cycles, for processor utilisation
  localparam real T_MEM = 2.0 / 7.0;

  tri_min_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear_faults();
    for (int g = 0; g < 2; g++) begin
      fault_mux[g] = '0; fault_s1[g] = '0; fault_s3[g] = '0; fault_s4[g] = '0; fault_demux[g] = '0;
    end
    fault_s2 = '0;
  endtask

  // one transfer cycle; returns deliveries and the sum of their path lengths
  task automatic transfer(output int delivered, output int hop_sum);
    addr_t             sd [N];
    logic [DATA_W-1:0] sdat [N];
    logic [N-1:0]      sv;
    sv = src_valid; sd = src_dst; sdat = src_data;
    @(posedge clk);
    #1;
    delivered = 0;
    hop_sum   = 0;
    for (int d = 0; d < N; d++) begin
      if (mem_valid[d]) begin
        int s;
        s = mem_src[d];
        delivered++;
        hop_sum += mem_hops[d];
        checks++;
        if (!sv[s] || sd[s] != addr_t'(d) || sdat[s] != mem_data[d] || !src_ack[s]) begin
          failures++;
          $display("FAIL module %0d got src %0d data %h", d, s, mem_data[d]);
        end
      end
    end
  endtask

  initial begin
    real bw [11];
    int  matured [10];
    string names [10];
    rst_n = 1'b0;
    src_valid = '0;
    foreach (src_dst[i]) begin src_dst[i] = '0; src_data[i] = '0; end
    clear_faults();
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. uniform random traffic
    bw[0] = 0.0;
    $display("  p    bandwidth  acceptance  utilisation  power     throughput");
    for (int pc = 1; pc <= 10; pc++) begin
      int dl, hs, tot;
      real pa, pu;
      tot = 0;
      for (int t = 0; t < 2000; t++) begin
        for (int s = 0; s < N; s++) begin
          src_valid[s] = ($urandom_range(999) < pc * 100);
          src_dst[s]   = addr_t'($urandom_range(N-1));
          src_data[s]  = 8'($urandom);
        end
        transfer(dl, hs);
        tot += dl;
      end
      bw[pc] = real'(tot) / 2000.0;
      pa = bw[pc] / (16.0 * pc / 10.0);
      pu = pa * T_MEM;
      $display("  %0.1f  %8.3f   %8.3f    %8.3f   %8.3f  %8.3f", pc / 10.0, bw[pc], pa, pu,
               16.0 * pu, 16.0 * pu * pc / 10.0);
      checks++;
      if (bw[pc] > 16.0 || pa <= 0.0 || pa > 1.0 || bw[pc] + 0.2 < bw[pc-1]) begin
        failures++; $display("FAIL bandwidth at p=%0.1f", pc / 10.0);
      end
    end

    // 2. incremental permutation i -> i+4 under fault cases
    names = '{"no fault", "mux", "S1 n-cr", "S1 cr", "S2 n-cr", "S2 cr",
              "S3 n-cr", "S3 cr", "S4", "demux"};
    $display("  fault      matured  mean path length");
    for (int c = 0; c < 10; c++) begin
      int dl, hs;
      clear_faults();
      case (c)
        1: fault_mux[0][0]   = 1'b1;
        2: fault_s1[0]       = 4'b0001;
        3: fault_s1[0]       = 4'b0101;   // A0 and its auxiliary partner A2
        4: fault_s2          = 2'b01;
        5: fault_s2          = 2'b11;     // stage 2 of both groups
        6: fault_s3[0]       = 2'b01;
        7: fault_s3[0]       = 2'b11;     // C0 and its auxiliary partner C1
        8: fault_s4[0]       = 4'b0001;
        9: fault_demux[0]    = 8'b0000_0001;
        default: ;
      endcase
      for (int s = 0; s < N; s++) begin
        src_valid[s] = 1'b1;
        src_dst[s]   = addr_t'((s + 4) % N);
        src_data[s]  = 8'($urandom);
      end
      transfer(dl, hs);
      matured[c] = dl;
      $display("  %-9s  %4d     %0.2f", names[c], dl, (dl > 0) ? real'(hs) / dl : 0.0);
      // single-fault tolerance: with no fault or a lone fault in stage 3,
      // stage 4 or a demux, each request sent on its own still matures
      if (c == 0 || c == 6 || c == 8 || c == 9) begin
        for (int s = 0; s < N; s++) begin
          src_valid    = '0;
          src_valid[s] = 1'b1;
          transfer(dl, hs);
          checks++;
          if (dl != 1) begin
            failures++; $display("FAIL %s: lone request %0d -> %0d lost", names[c], s, (s + 4) % N);
          end
        end
      end
    end
    src_valid = '0;
    checks++;
    if (matured[0] == 0) begin failures++; $display("FAIL nothing matured"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
