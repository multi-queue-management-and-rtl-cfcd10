// tb_wrr_class_sched: self-checking test of the weighted round-robin class
// scheduler. Six classes with weights 2^(i-1) and random ready-VC counts
// (1..20, some runs with idle classes) are stepped for many cell times under
// each policy. A behavioural reference model of the counter algorithm,
// written here with plain integers, predicts every selection and counter.
// The test also checks that over a whole number of rounds of N cell times
// every class gets its share w_i*N_i per round to within two cells, and that under HPF the
// highest class is served at perfectly even intervals.
module tb_wrr_class_sched;
  import muqpro_pkg::*;
  localparam int NC = 6, WB = 12, NB = 13, CB = 32;

  logic clk = 0, rst_n = 0, step = 0;
  sched_policy_e policy;
  logic [NC-1:0][WB-1:0] weight;
  logic [NC-1:0][NB-1:0] nready;
  logic sel_valid;
  logic [2:0] sel_class;
  logic signed [NC-1:0][CB-1:0] counter;

  int checks = 0, failures = 0;

  wrr_class_sched #(.NUM_CLASS(NC), .W_BITS(WB), .N_BITS(NB), .CNT_BITS(CB)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  longint rc [NC];
  int     rlast;

  task automatic ref_step(output bit v, output int s);
    longint cand [NC];
    longint tot;
    bit found;
    tot = 0;
    for (int i = 0; i < NC; i++) begin
      cand[i] = rc[i] + longint'(weight[i]) * longint'(nready[i]);
      tot += longint'(weight[i]) * longint'(nready[i]);
    end
    found = 0; s = 0;
    case (policy)
      POL_HVF: for (int i = 0; i < NC; i++)
                 if (nready[i] != 0 && cand[i] >= 0 && (!found || cand[i] >= cand[s])) begin s = i; found = 1; end
      POL_HPF: for (int i = 0; i < NC; i++)
                 if (nready[i] != 0 && cand[i] >= 0 && (!found || weight[i] >= weight[s])) begin s = i; found = 1; end
      default: for (int k = 1; k <= NC; k++) begin
                 int j; j = (rlast + k) % NC;
                 if (!found && nready[j] != 0 && cand[j] >= 0) begin s = j; found = 1; end
               end
    endcase
    v = found;
    for (int i = 0; i < NC; i++)
      rc[i] = (nready[i] == 0) ? 0 : (found && i == s) ? cand[i] - tot : cand[i];
    if (found) rlast = s;
  endtask

  task automatic do_reset();
    rst_n = 0; step = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NC; i++) rc[i] = 0;
    rlast = NC - 1;
  endtask

  // run `steps` cell times, compare with the model, count services
  task automatic run(input int steps, output int served [NC], output int hi_gap_min, output int hi_gap_max);
    bit v; int s; int last_hi;
    for (int i = 0; i < NC; i++) served[i] = 0;
    last_hi = -1; hi_gap_min = 1 << 30; hi_gap_max = 0;
    for (int t = 0; t < steps; t++) begin
      @(negedge clk);
      step = 1;
      #1;
      ref_step(v, s);
      checks++;
      if (sel_valid !== v || (v && int'(sel_class) != s)) begin
        failures++;
        if (failures < 10) $display("step %0d policy %s: dut %0b/%0d ref %0b/%0d", t, policy.name(), sel_valid, sel_class, v, s);
      end
      if (sel_valid) begin
        served[sel_class]++;
        if (sel_class == 3'(NC-1)) begin
          if (last_hi >= 0) begin
            if (t - last_hi < hi_gap_min) hi_gap_min = t - last_hi;
            if (t - last_hi > hi_gap_max) hi_gap_max = t - last_hi;
          end
          last_hi = t;
        end
      end
      @(posedge clk); #1;
      step = 0;
      for (int i = 0; i < NC; i++) begin
        checks++;
        if (longint'($signed(counter[i])) != rc[i]) begin
          failures++;
          if (failures < 10) $display("counter %0d: dut %0d ref %0d", i, $signed(counter[i]), rc[i]);
        end
      end
    end
  endtask

  int served [NC];
  int gmin, gmax, ntot, rounds;

  initial begin
    for (int i = 0; i < NC; i++) weight[i] = WB'(1 << i);
    for (int pol = 0; pol < 3; pol++) begin
      policy = sched_policy_e'(pol);
      for (int trial = 0; trial < 4; trial++) begin
        // uniform workload: 1..20 VCs per class
        for (int i = 0; i < NC; i++) nready[i] = NB'($urandom_range(1, 20));
        ntot = 0;
        for (int i = 0; i < NC; i++) ntot += int'(weight[i]) * int'(nready[i]);
        do_reset();
        rounds = 2;
        run(rounds * ntot, served, gmin, gmax);
        // each class receives exactly its share over whole rounds
        for (int i = 0; i < NC; i++) begin
          checks++;
          if (served[i] > rounds * int'(weight[i]) * int'(nready[i]) + 2 ||
              served[i] < rounds * int'(weight[i]) * int'(nready[i]) - 2) begin
            failures++;
            $display("policy %s class %0d served %0d expected %0d", policy.name(), i, served[i],
                     rounds * int'(weight[i]) * int'(nready[i]));
          end
        end
        // HPF: the top class is served exactly every N/(w*N_6) cell times when that divides
        if (policy == POL_HPF && ntot % (int'(weight[NC-1]) * int'(nready[NC-1])) == 0) begin
          checks++;
          if (gmin != gmax) begin
            failures++;
            $display("HPF top-class gaps %0d..%0d", gmin, gmax);
          end
        end
      end
      // idle classes and changing counts: model comparison only
      do_reset();
      for (int blk = 0; blk < 20; blk++) begin
        for (int i = 0; i < NC; i++) nready[i] = ($urandom_range(0, 3) == 0) ? '0 : NB'($urandom_range(1, 1000));
        run(50, served, gmin, gmax);
      end
      nready = '0;
      run(3, served, gmin, gmax);  // nothing ready: no selection
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
