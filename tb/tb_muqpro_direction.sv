// tb_muqpro_direction: self-checking test of one direction of cell flow.
// Small instance: 16 VCs, 32 buffer slots, 8-clock cell time, 4 initial L1
// credits. Connection c (VPI c/4, VCI 0x100 + c%4) is translated to VPI
// 0x80+c, VCI 0x200+c and queued on VC c; VCs 0..11 are rate-based in class
// c%6 (weights 2^(i-1)), VC 12 is credit-based in class 5, VC 13 carries
// cells from the embedded processor, connection 14 ends in the processor and
// index 15 is unused. For each policy (RR, HVF, HPF) the test:
//  1. spends the 4 initial L1 credits, then preloads cells while the output
//     is stalled for lack of L1 credits (stalls are counted);
//  2. returns L1 credits and checks every departure against a reference
//     model of the class counters and per-class round-robin VC lists,
//     started from the counters the block reports; it checks that each VC's
//     cells leave in order with translated headers, and that departures are
//     exactly one cell time apart while selection succeeds;
//  3. checks L2 credit gating: a credit-based VC sends exactly as many cells
//     as it was given credits;
//  4. checks cells to and from the processor, management cells, a lookup
//     miss, buffer overflow with cell discard, bypass forwarding and the
//     total of returned credits.
module tb_muqpro_direction;
  import muqpro_pkg::*;
  localparam int NC = 6, NV = 16, NB = 32, CC = 8, L1I = 4, VB = 4;

  logic clk = 0, rst_n = 0, ready;
  logic bypass = 0, l1_en = 1;
  sched_policy_e policy = POL_HPF;
  logic [NC-1:0][11:0] weight;
  logic in_valid = 0, in_ready, l1_credit_in = 0, out_valid, out_ready = 1;
  cell_t in_cell, out_cell;
  logic [1:0] credit_ret;
  logic tw_en = 0, tw_valid, tw_to_ep;
  logic [VB-1:0] tw_idx, tw_vc;
  logic [VPI_BITS-1:0] tw_match_vpi, tw_new_vpi;
  logic [VCI_BITS-1:0] tw_match_vci, tw_new_vci;
  logic cfg_valid = 0, cfg_ready, cfg_credit_mode;
  logic [VB-1:0] cfg_vc;
  logic [2:0] cfg_class;
  logic [15:0] cfg_credits;
  logic l2_valid = 0, l2_ready;
  logic [VB-1:0] l2_vc;
  logic [15:0] l2_amt;
  logic ep_rx_valid, ep_rx_ready = 1;
  cell_t ep_rx_cell;
  logic [VB-1:0] ep_rx_vc;
  logic ep_tx_valid = 0, ep_tx_ready;
  cell_t ep_tx_cell;
  logic [VB-1:0] ep_tx_vc;
  logic ev_depart, ev_stall, ev_drop, ev_miss, ev_bypass;
  logic [2:0] ev_depart_class;
  logic [VB-1:0] ev_depart_vc;
  logic [5:0] buf_used;
  logic [2:0] ep_rx_level;
  logic signed [NC-1:0][31:0] sched_counter;

  int checks = 0, failures = 0;

  muqpro_direction #(.NUM_CLASS(NC), .NUM_VC(NV), .BUF_CELLS(NB), .CELL_CLKS(CC),
                     .L1_INIT(L1I), .EP_DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("[%0t] %s", $time, msg); end
  endtask

  // ---------------- expected contents ----------------
  logic [PAYLOAD_BITS-1:0] vq [NV][$];      // payloads per VC, in order
  cell_t epq [$];                            // cells expected at the processor
  cell_t byq [$];                            // cells expected through bypass
  int n_dep = 0, n_stall = 0, n_drop = 0, n_miss = 0, n_byp = 0, n_ret = 0;
  int n_dep_ep = 0, n_eprx = 0, dep_cnt [NV];
  longint last_dep = -1;
  longint cyc = 0;
  bit model_on = 0, gap_on = 0;
  int n_dep_model = 0;

  always @(posedge clk) cyc++;

  // reference model of scheduler state (used in phase 2)
  longint rc [NC];
  int rlast;
  int rl [NC][$];
  int rlen [NV];
  int nsel_fail = 0;

  function automatic int nready_of(int c);
    return rl[c].size();
  endfunction

  task automatic model_select(output int vc, output int steps);
    longint cand [NC]; longint tot; bit found; int s;
    steps = 0;
    do begin
      tot = 0; found = 0; s = 0;
      for (int i = 0; i < NC; i++) begin
        cand[i] = rc[i] + longint'(weight[i]) * nready_of(i);
        tot += longint'(weight[i]) * nready_of(i);
      end
      case (policy)
        POL_HVF: for (int i = 0; i < NC; i++)
                   if (nready_of(i) != 0 && cand[i] >= 0 && (!found || cand[i] >= cand[s])) begin s = i; found = 1; end
        POL_HPF: for (int i = 0; i < NC; i++)
                   if (nready_of(i) != 0 && cand[i] >= 0 && (!found || weight[i] >= weight[s])) begin s = i; found = 1; end
        default: for (int k = 1; k <= NC; k++) begin
                   int j; j = (rlast + k) % NC;
                   if (!found && nready_of(j) != 0 && cand[j] >= 0) begin s = j; found = 1; end
                 end
      endcase
      for (int i = 0; i < NC; i++)
        rc[i] = (nready_of(i) == 0) ? 0 : (found && i == s) ? cand[i] - tot : cand[i];
      if (found) rlast = s;
      steps++;
    end while (!found);
    vc = rl[s].pop_front();
    rlen[vc]--;
    if (rlen[vc] > 0) rl[s].push_back(vc);
  endtask

  // departures
  always @(posedge clk) if (rst_n) begin
    if (ev_depart) begin
      n_dep++;
      dep_cnt[ev_depart_vc]++;
      if (model_on) begin
        int mvc, st;
        model_select(mvc, st);
        chk(int'(ev_depart_vc) == mvc, $sformatf("%s: departure from VC %0d, model says VC %0d",
            policy.name(), ev_depart_vc, mvc));
        if (gap_on && last_dep >= 0)
          chk(cyc - last_dep == longint'(CC * st), $sformatf("departure gap %0d, expected %0d",
              cyc - last_dep, CC * st));
        gap_on = (n_dep_model++ >= 1);  // the first one used a tick left pending
      end
      last_dep = cyc;
    end
    if (ev_stall) n_stall++;
    if (ev_drop) n_drop++;
    if (ev_miss) n_miss++;
    if (ev_bypass) n_byp++;
    n_ret += int'(credit_ret);
  end

  // output cells
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (byq.size() > 0 && bypass) begin
      cell_t e;
      e = byq.pop_front();
      chk(out_cell == e, "bypass cell mismatch");
    end else begin
      int v;
      v = int'(out_cell.hdr.vpi) - 'h80;
      chk(v >= 0 && v < NV && out_cell.hdr.vci == 16'(32'h200 + v), $sformatf("bad out header %h", out_cell.hdr));
      if (v >= 0 && v < NV) begin
        chk(vq[v].size() > 0 && out_cell.payload == vq[v][0], $sformatf("VC %0d cell out of order", v));
        if (vq[v].size() > 0) void'(vq[v].pop_front());
        if (v == 13) n_dep_ep++;
      end
    end
  end

  // processor receive side
  always @(posedge clk) if (rst_n && ep_rx_valid && ep_rx_ready) begin
    cell_t e;
    n_eprx++;
    chk(epq.size() > 0, "unexpected cell to processor");
    if (epq.size() > 0) begin
      e = epq.pop_front();
      chk(ep_rx_cell == e, "processor cell mismatch");
    end
  end

  // ---------------- drivers ----------------
  function automatic logic [PAYLOAD_BITS-1:0] rnd_pl();
    logic [PAYLOAD_BITS-1:0] p;
    for (int i = 0; i < PAYLOAD_BITS / 32; i++) p[i*32 +: 32] = $urandom;
    return p;
  endfunction

  function automatic cell_t conn_cell(int c, logic [2:0] pt);
    cell_t x;
    x.hdr.vpi = 12'(c / 4); x.hdr.vci = 16'(32'h100 + c % 4);
    x.hdr.pt = pt; x.hdr.clp = 1'b0;
    x.payload = rnd_pl();
    return x;
  endfunction

  task automatic send(input cell_t x);
    @(negedge clk);
    in_valid = 1; in_cell = x;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 in_valid = 0;
  endtask

  // send a data cell on connection c and expect it on VC c
  task automatic send_data(int c, bit expect_kept = 1);
    cell_t x;
    x = conn_cell(c, 3'b000);
    if (expect_kept) begin
      vq[c].push_back(x.payload);
      rlen[c]++;
    end
    send(x);
  endtask

  task automatic cfg(int vc, int cls, bit cm, int cr);
    @(negedge clk);
    cfg_valid = 1; cfg_vc = VB'(vc); cfg_class = 3'(cls); cfg_credit_mode = cm; cfg_credits = 16'(cr);
    @(posedge clk);
    while (!cfg_ready) @(posedge clk);
    #1 cfg_valid = 0;
  endtask

  task automatic l2(int vc, int amt);
    @(negedge clk);
    l2_valid = 1; l2_vc = VB'(vc); l2_amt = 16'(amt);
    @(posedge clk);
    while (!l2_ready) @(posedge clk);
    #1 l2_valid = 0;
  endtask

  task automatic give_l1(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); l1_credit_in = 1;
      @(posedge clk); #1 l1_credit_in = 0;
    end
  endtask

  task automatic wait_cells(int ncells);
    repeat (ncells * CC * 8 + 40) @(posedge clk);
  endtask

  function automatic int queued();
    int s; s = 0;
    for (int v = 0; v < NV; v++) s += vq[v].size();
    return s;
  endfunction

  initial begin
    int exp_ret;
    for (int i = 0; i < NC; i++) weight[i] = 12'(1 << i);
    for (int v = 0; v < NV; v++) begin dep_cnt[v] = 0; rlen[v] = 0; end
    for (int pol = 0; pol < 3; pol++) begin
      policy = sched_policy_e'(pol);
      bypass = 0; l1_en = 1;
      rst_n = 0;
      repeat (3) @(posedge clk);
      rst_n = 1;
      wait (ready);
      // translation table
      for (int c = 0; c < NV; c++) begin
        @(negedge clk);
        tw_en = 1; tw_idx = VB'(c); tw_valid = (c != 15);
        tw_match_vpi = 12'(c / 4); tw_match_vci = 16'(32'h100 + c % 4);
        tw_new_vpi = 12'(32'h80 + c); tw_new_vci = 16'(32'h200 + c);
        tw_vc = VB'(c); tw_to_ep = (c == 14);
        @(posedge clk); #1 tw_en = 0;
      end
      for (int v = 0; v < 12; v++) cfg(v, v % 6, 0, 0);
      cfg(12, 5, 1, 0);
      cfg(13, 0, 0, 0);

      // ---- phase 1: use up the initial L1 credits, then preload while stalled
      for (int i = 0; i < L1I; i++) send_data(0);
      wait_cells(L1I + 1);
      chk(vq[0].size() == 0, "initial L1 credits did not let cells out");
      rlen[0] = 0;
      for (int r = 0; r < 2; r++)
        for (int v = 0; v < 12; v++) send_data(v);
      repeat (4 * CC) @(posedge clk);
      chk(n_stall > 0, "no stall while out of L1 credits");
      chk(queued() == 24, $sformatf("preload: %0d cells queued", queued()));

      // ---- phase 2: exact model of the scheduler from here on
      for (int i = 0; i < NC; i++) begin rc[i] = longint'($signed(sched_counter[i])); rl[i].delete(); end
      for (int v = 0; v < 12; v++) rl[v % 6].push_back(v);  // order of first arrival
      // last class served: the one VC 0 is in (only class served in phase 1)
      rlast = 0;
      model_on = 1; gap_on = 0; n_dep_model = 0;
      give_l1(24);                                            // one credit per queued cell
      wait_cells(26);
      model_on = 0;
      chk(queued() == 0, $sformatf("phase 2: %0d cells left", queued()));

      // ---- phase 3: L2 credits
      for (int i = 0; i < 3; i++) send_data(12, 1);
      give_l1(3);
      wait_cells(3);
      chk(vq[12].size() == 3, "credit-based VC sent without credits");
      l2(12, 2);
      wait_cells(3);
      chk(vq[12].size() == 1, $sformatf("after 2 credits %0d cells left (expected 1)", vq[12].size()));
      l2(12, 5);
      wait_cells(2);
      chk(vq[12].size() == 0, "credit-based VC did not finish");
      rlen[12] = 0;

      // ---- phase 4: processor paths, miss
      begin
        cell_t x;
        x = conn_cell(14, 3'b000); epq.push_back(x); send(x);   // terminated connection
        x = conn_cell(3, 3'b101);  epq.push_back(x); send(x);   // F5 OAM cell on a data VC
        x = conn_cell(5, 3'b110);  epq.push_back(x); send(x);   // RM cell
        x = conn_cell(15, 3'b000); send(x);                      // unknown connection
        x = conn_cell(7, 3'b000);
        x.hdr.vpi = 12'(32'h80 + 13); x.hdr.vci = 16'(32'h200 + 13);
        vq[13].push_back(x.payload);
        give_l1(1);
        @(negedge clk); ep_tx_valid = 1; ep_tx_cell = x; ep_tx_vc = 4'd13;
        @(posedge clk); while (!ep_tx_ready) @(posedge clk);
        #1 ep_tx_valid = 0;
        wait_cells(3);
        chk(epq.size() == 0, "cells for the processor missing");
        chk(n_miss == pol + 1, "lookup miss not reported");
        chk(vq[13].size() == 0, "processor cell not sent");
      end

      // ---- phase 5: overflow (L1 pool is empty: nothing leaves)
      begin
        int d0;
        d0 = n_drop;
        for (int i = 0; i < NB + 6; i++) send_data(2 + i % 2, i < NB);
        repeat (10) @(posedge clk);
        chk(n_drop - d0 == 6, $sformatf("overflow dropped %0d cells, expected 6", n_drop - d0));
        chk(int'(buf_used) == NB, "buffer not full");
      end
      give_l1(NB);
      wait_cells(NB);
      chk(queued() == 0, $sformatf("after overflow %0d cells left", queued()));
      rlen[2] = 0; rlen[3] = 0;

      // ---- phase 6: bypass
      @(negedge clk); bypass = 1; l1_en = 0;
      for (int i = 0; i < 10; i++) begin
        cell_t x;
        x = conn_cell($urandom_range(0, 15), 3'($urandom));
        byq.push_back(x);
        send(x);
      end
      repeat (20) @(posedge clk);
      chk(byq.size() == 0, "bypass cells missing");

      // ---- credit return: every cell from upstream that left the buffers
      exp_ret = (n_dep - n_dep_ep) + n_drop + n_eprx + n_byp;
      chk(n_ret == exp_ret, $sformatf("returned %0d credits, expected %0d", n_ret, exp_ret));
    end
    $display("departures %0d stalls %0d drops %0d misses %0d bypassed %0d", n_dep, n_stall, n_drop, n_miss, n_byp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
