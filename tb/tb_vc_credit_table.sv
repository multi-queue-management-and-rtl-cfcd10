// tb_vc_credit_table: self-checking test of the per-VC class and L2 credit
// table. After the reset sweep (whose length is checked) every VC must read
// as class 0, rate-based, eligible. Random configuration writes, credit
// additions (with saturation) and credit uses, sometimes on the same VC in
// the same cycle, are checked against an integer model of every entry,
// including the eligibility rule: rate-based VCs always, credit-based VCs
// only while they hold a credit.
module tb_vc_credit_table;
  localparam int NV = 32, NC = 6, CB = 4, VB = 5;
  logic clk = 0, rst_n = 0, ready;
  logic cfg_en = 0, add_en = 0, use_en = 0;
  logic [VB-1:0] cfg_vc, add_vc, use_vc, rd_vc;
  logic [2:0] cfg_class, rd_class;
  logic cfg_credit_mode, rd_credit_mode, rd_elig;
  logic [CB-1:0] cfg_credits, add_amt, rd_credits;
  int checks = 0, failures = 0;

  vc_credit_table #(.NUM_VC(NV), .NUM_CLASS(NC), .CR_BITS(CB)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mcls [NV], mcr [NV];
  bit mcm [NV];

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("%s", msg); end
  endtask

  task automatic check_all();
    for (int v = 0; v < NV; v++) begin
      rd_vc = VB'(v);
      #1;
      chk(int'(rd_class) == mcls[v] && rd_credit_mode == mcm[v] && int'(rd_credits) == mcr[v] &&
          rd_elig == (!mcm[v] || mcr[v] != 0),
          $sformatf("vc %0d: cls %0d/%0d cm %0b/%0b cr %0d/%0d elig %0b", v, rd_class, mcls[v],
                    rd_credit_mode, mcm[v], rd_credits, mcr[v], rd_elig));
    end
  endtask

  initial begin
    int cyc;
    for (int v = 0; v < NV; v++) begin mcls[v] = 0; mcm[v] = 0; mcr[v] = 0; end
    rd_vc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    cyc = 0;
    @(posedge clk);
    while (!ready) begin @(posedge clk); cyc++; end
    chk(cyc == NV - 1, $sformatf("sweep took %0d", cyc + 1));
    @(negedge clk);
    check_all();
    for (int t = 0; t < 5000; t++) begin
      int cv, av, uv, amt;
      @(negedge clk);
      cv = $urandom_range(0, NV - 1); av = $urandom_range(0, NV - 1); uv = $urandom_range(0, NV - 1);
      if ($urandom_range(0, 2) == 0) uv = av;
      cfg_en = $urandom_range(0, 9) == 0; add_en = $urandom_range(0, 2) == 0; use_en = $urandom_range(0, 1);
      cfg_vc = VB'(cv); add_vc = VB'(av); use_vc = VB'(uv);
      cfg_class = 3'($urandom_range(0, NC - 1)); cfg_credit_mode = 1'($urandom); cfg_credits = CB'($urandom);
      amt = $urandom_range(0, 9); add_amt = CB'(amt);
      // model
      if (add_en && use_en && av == uv) begin
        if (mcm[av]) begin
          int s; s = mcr[av] + amt; if (s > 15) s = 15;
          if (s > 0) s--;
          mcr[av] = s;
        end
      end else begin
        if (add_en) begin mcr[av] += amt; if (mcr[av] > 15) mcr[av] = 15; end
        if (use_en && mcm[uv] && mcr[uv] > 0) mcr[uv]--;
      end
      if (cfg_en) begin mcls[cv] = int'(cfg_class); mcm[cv] = cfg_credit_mode; mcr[cv] = int'(cfg_credits); end
      @(posedge clk); #1;
      cfg_en = 0; add_en = 0; use_en = 0;
      if (t % 50 == 0) check_all();
      else begin
        rd_vc = VB'(uv); #1;
        chk(int'(rd_credits) == mcr[uv] && rd_elig == (!mcm[uv] || mcr[uv] != 0), $sformatf("t=%0d vc %0d cr %0d/%0d", t, uv, rd_credits, mcr[uv]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
