// tb_wrr_workloads: the scheduler under the two evaluation workloads.
// Six service classes, weight 2^(i-1) for class i, every VC always has a
// cell to send, VCs of a class are served round-robin. Uniform workload:
// each class has 1..20 VCs (uniform random). Non-uniform workload: one VC
// per class except the lowest, which has 1..1000. For each policy the
// testbench measures, per class, DELAY: the mean of (s - avg)/avg over the
// services where it is non-negative, s being the cell times since the same
// VC was last served and avg = N/w_i its ideal period. The first two
// periods of each run are warm-up and not measured.
// DELAY is printed in two readings: averaged over the non-negative samples
// only, and averaged over all samples with early services counted as zero.
// Checks: under HPF the highest class is never served later than
// ceil(avg), so its only jitter is the rounding of avg to whole cell times;
// under RR the highest class is delayed more than under HPF; and every VC
// receives its share of the cell times within one cell per period.
// A third part schedules a 155 Mb/s link cut into 2400 channels of 64 kb/s
// with classes of 1, 4, 10, 30, 100 and 300 channels (the first three are
// the architecture's example, the rest this test's choice) and checks that
// each VC gets its channel count per 2400 cell times.
module tb_wrr_workloads;
  import muqpro_pkg::*;
  localparam int NC = 6;
  logic clk = 0, rst_n = 0, step = 0;
  sched_policy_e policy;
  logic [NC-1:0][11:0] weight;
  logic [NC-1:0][12:0] nready;
  logic sel_valid;
  logic [2:0] sel_class;
  logic signed [NC-1:0][31:0] counter;
  int checks = 0, failures = 0;

  wrr_class_sched dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("%s", msg); end
  endtask

  localparam int TRIALS = 4;
  real delay_sum [3][NC];   // sum of non-negative (s-avg)/avg
  int  delay_n   [3][NC];   // number of non-negative samples
  int  all_n     [3][NC];   // number of all samples
  int  over_ceil [3][NC];   // services later than ceil(avg)

  task automatic run_trial(input int nv [NC], input int pol);
    int last [NC][];
    int rr [NC];
    int served [NC][];
    int ntot, steps, warm;
    real avg;
    ntot = 0;
    for (int i = 0; i < NC; i++) ntot += (1 << i) * nv[i];
    steps = 12 * ntot; warm = 2 * ntot;
    for (int i = 0; i < NC; i++) begin
      nready[i] = 13'(nv[i]);
      last[i] = new[nv[i]]; served[i] = new[nv[i]];
      foreach (last[i][k]) begin last[i][k] = -1; served[i][k] = 0; end
      rr[i] = 0;
    end
    policy = sched_policy_e'(pol);
    rst_n = 0; @(posedge clk); @(negedge clk); rst_n = 1;
    for (int t = 0; t < steps; t++) begin
      step = 1; #1;
      chk(sel_valid, "no class selected with all VCs ready");
      if (sel_valid) begin
        int c, v;
        c = int'(sel_class); v = rr[c];
        rr[c] = (rr[c] + 1) % nv[c];
        if (last[c][v] >= 0 && t >= warm) begin
          real x;
          avg = real'(ntot) / real'(1 << c);
          x = (real'(t - last[c][v]) - avg) / avg;
          all_n[pol][c]++;
          if (x >= 0.0) begin delay_sum[pol][c] += x; delay_n[pol][c]++; end
          if ((t - last[c][v]) * (1 << c) >= ntot + (1 << c)) over_ceil[pol][c]++;
        end
        last[c][v] = t;
        served[c][v]++;
      end
      @(posedge clk); #1; step = 0;
      @(negedge clk);
    end
    // every VC got w_i cells per round of N cell times, within one cell per round
    for (int i = 0; i < NC; i++)
      foreach (served[i][k]) begin
        checks++;
        if (served[i][k] < 12 * (1 << i) - 12 || served[i][k] > 12 * (1 << i) + 12) begin
          failures++;
          $display("policy %0d class %0d VC %0d served %0d, expected %0d", pol, i, k, served[i][k], 12 * (1 << i));
        end
      end
  endtask

  // second reading: negative deviations count as zero delay
  function automatic real pct_all(int pol, int c);
    return all_n[pol][c] == 0 ? 0.0 : 100.0 * delay_sum[pol][c] / real'(all_n[pol][c]);
  endfunction

  function automatic real pct(int pol, int c);
    return delay_n[pol][c] == 0 ? 0.0 : 100.0 * delay_sum[pol][c] / real'(delay_n[pol][c]);
  endfunction

  task automatic report(string name);
    for (int pol = 0; pol < 3; pol++)
      $display("%s %-7s DELAY%% by class 1..6: %6.2f %6.2f %6.2f %6.2f %6.2f %6.2f", name,
               sched_policy_e'(pol) == POL_RR ? "RR" : sched_policy_e'(pol) == POL_HVF ? "HVF" : "HPF",
               pct(pol, 0), pct(pol, 1), pct(pol, 2), pct(pol, 3), pct(pol, 4), pct(pol, 5));
    for (int pol = 0; pol < 3; pol++)
      $display("%s %-7s mean positive delay%% over all services: %6.2f %6.2f %6.2f %6.2f %6.2f %6.2f", name,
               sched_policy_e'(pol) == POL_RR ? "RR" : sched_policy_e'(pol) == POL_HVF ? "HVF" : "HPF",
               pct_all(pol, 0), pct_all(pol, 1), pct_all(pol, 2), pct_all(pol, 3), pct_all(pol, 4), pct_all(pol, 5));
  endtask

  task automatic clear();
    for (int p = 0; p < 3; p++) for (int c = 0; c < NC; c++) begin
      delay_sum[p][c] = 0.0; delay_n[p][c] = 0; all_n[p][c] = 0; over_ceil[p][c] = 0;
    end
  endtask

  // 155 Mb/s link cut into 2400 base channels of 64 kb/s. Classes buy 1, 4
  // and 10 channels as in the architecture's example; 30, 100 and 300 extend
  // the menu. VC counts are chosen so that the channels sum to exactly 2400.
  localparam int LW [NC] = '{1, 4, 10, 30, 100, 300};
  localparam int LN [NC] = '{100, 100, 50, 20, 5, 1};
  task automatic run_link(input int pol);
    int served [NC][];
    int last [NC][];
    int maxgap [NC];
    int rr [NC];
    int ntot;
    ntot = 0;
    for (int i = 0; i < NC; i++) begin
      ntot += LW[i] * LN[i];
      weight[i] = 12'(LW[i]); nready[i] = 13'(LN[i]);
      served[i] = new[LN[i]]; last[i] = new[LN[i]];
      foreach (served[i][k]) begin served[i][k] = 0; last[i][k] = -1; end
      rr[i] = 0; maxgap[i] = 0;
    end
    chk(ntot == 2400, $sformatf("link: %0d channels, expected 2400", ntot));
    policy = sched_policy_e'(pol);
    rst_n = 0; @(posedge clk); @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2 * ntot; t++) begin
      step = 1; #1;
      chk(sel_valid, "link: no class selected with all VCs ready");
      if (sel_valid) begin
        int c, v;
        c = int'(sel_class); v = rr[c];
        rr[c] = (rr[c] + 1) % LN[c];
        if (last[c][v] >= 0 && t - last[c][v] > maxgap[c]) maxgap[c] = t - last[c][v];
        last[c][v] = t;
        served[c][v]++;
      end
      @(posedge clk); #1; step = 0;
      @(negedge clk);
    end
    // two rounds of 2400 cell times: each VC sends twice its channel count
    for (int i = 0; i < NC; i++)
      foreach (served[i][k])
        chk(served[i][k] >= 2 * LW[i] - 2 && served[i][k] <= 2 * LW[i] + 2,
            $sformatf("link policy %0d class %0d VC %0d served %0d, expected %0d", pol, i, k, served[i][k], 2 * LW[i]));
    if (pol == int'(POL_HPF))
      chk(maxgap[NC - 1] * LW[NC - 1] <= ntot + LW[NC - 1] - 1,
          $sformatf("link HPF: top-class gap %0d exceeds ceil(2400/%0d)", maxgap[NC - 1], LW[NC - 1]));
    $display("2400-channel link policy %0d: largest gap per class %0d %0d %0d %0d %0d %0d (ideal 2400 600 240 80 24 8)",
             pol, maxgap[0], maxgap[1], maxgap[2], maxgap[3], maxgap[4], maxgap[5]);
  endtask

  initial begin
    int nv [NC];
    for (int i = 0; i < NC; i++) weight[i] = 12'(1 << i);
    repeat (2) @(negedge clk);
    // ---- uniform workload
    clear();
    for (int tr = 0; tr < TRIALS; tr++) begin
      for (int i = 0; i < NC; i++) nv[i] = $urandom_range(1, 20);
      for (int pol = 0; pol < 3; pol++) run_trial(nv, pol);
    end
    report("uniform    ");
    chk(over_ceil[2][NC - 1] == 0, $sformatf("uniform: HPF served the top class %0d times later than ceil(avg)", over_ceil[2][NC - 1]));
    chk(all_n[2][NC - 1] > 0, "uniform: no top-class samples");
    chk(pct(0, NC - 1) > pct(2, NC - 1), "uniform: RR not worse than HPF for the top class");
    // ---- non-uniform workload
    clear();
    for (int tr = 0; tr < TRIALS; tr++) begin
      for (int i = 1; i < NC; i++) nv[i] = 1;
      nv[0] = $urandom_range(1, 1000);
      for (int pol = 0; pol < 3; pol++) run_trial(nv, pol);
    end
    report("non-uniform");
    chk(over_ceil[2][NC - 1] == 0, $sformatf("non-uniform: HPF served the top class %0d times later than ceil(avg)", over_ceil[2][NC - 1]));
    chk(all_n[2][NC - 1] > 0, "non-uniform: no top-class samples");
    chk(pct(0, NC - 1) > pct(2, NC - 1), "non-uniform: RR not worse than HPF for the top class");
    // ---- 2400-channel link
    for (int pol = 0; pol < 3; pol++) run_link(pol);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
