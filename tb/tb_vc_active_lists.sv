// tb_vc_active_lists: self-checking test of the per-class ready-VC lists.
// Random pushes and pops, including a push and a pop on the same class in
// one cycle, are applied to a small instance; a reference model made of
// SystemVerilog queues predicts the head of every popped list (round-robin
// order) and every list length.
module tb_vc_active_lists;
  localparam int NC = 6, NV = 64, VB = 6, NB = 7;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [VB-1:0] push_vc;
  logic [2:0] push_class, pop_class;
  logic [VB-1:0] pop_vc;
  logic [NC-1:0][NB-1:0] count;
  int checks = 0, failures = 0;

  vc_active_lists #(.NUM_CLASS(NC), .NUM_VC(NV)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int q [NC][$];
  bit inlist [NV];
  int free_vcs [$];

  initial begin
    for (int v = 0; v < NV; v++) inlist[v] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      int pc, uc, v;
      bit dpush, dpop;
      @(negedge clk);
      dpop = 0; dpush = 0;
      pc = $urandom_range(0, NC - 1);
      if (q[pc].size() > 0 && $urandom_range(0, 1)) dpop = 1;
      // push a VC that is in no list (or the one being popped: round-robin requeue)
      free_vcs.delete();
      for (int k = 0; k < NV; k++) if (!inlist[k]) free_vcs.push_back(k);
      uc = $urandom_range(0, NC - 1);
      if (dpop && $urandom_range(0, 2) == 0) begin
        v = q[pc][0]; uc = pc; dpush = 1;           // requeue at tail of same class
      end else if (free_vcs.size() > 0 && $urandom_range(0, 1)) begin
        v = free_vcs[$urandom_range(0, free_vcs.size() - 1)]; dpush = 1;
      end
      pop = dpop; pop_class = 3'(pc);
      push = dpush; push_vc = VB'(v); push_class = 3'(uc);
      #1;
      if (dpop) begin
        int exp_v;
        exp_v = q[pc].pop_front();
        checks++;
        if (int'(pop_vc) != exp_v) begin
          failures++;
          if (failures < 10) $display("t=%0d pop class %0d: got %0d expected %0d", t, pc, pop_vc, exp_v);
        end
        inlist[exp_v] = 0;
      end
      if (dpush) begin
        q[uc].push_back(v);
        inlist[v] = 1;
      end
      @(posedge clk); #1;
      pop = 0; push = 0;
      for (int c = 0; c < NC; c++) begin
        checks++;
        if (int'(count[c]) != q[c].size()) begin
          failures++;
          if (failures < 10) $display("t=%0d count %0d: got %0d expected %0d", t, c, count[c], q[c].size());
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
