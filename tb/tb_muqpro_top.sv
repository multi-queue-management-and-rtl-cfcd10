// tb_muqpro_top: end-to-end test of the two-port core at its default size
// (4096 VCs and 16384 buffer slots per direction, 35-clock cell time).
// A device model on each port sends cells, spends and receives level-1
// credits, and returns one credit for every cell it receives; it can hold
// its credits back to stall the core. The embedded processor is modelled by
// the testbench: it writes the tables, gives L2 credits, takes the cells
// meant for it and injects cells of its own.
// In each direction connections 0..11 are rate-based VCs in classes c%6
// with weights 2^(i-1), connection 12 is credit-based, 13 carries cells from
// the processor, 14 ends in the processor and 15 is unknown. Random traffic
// runs both ways; then direction 0 switches policy, is stalled for lack of
// L1 credits and overflows its buffer (the sender is given more credits
// than the buffer holds), and direction 1 switches to bypass forwarding.
// Every cell that leaves a port is checked against the expected contents,
// order and header of its VC; every cell sent is accounted for (delivered,
// discarded, or given to the processor); and each mechanism -- departure,
// L1 stall, L1 credit return, L2 credit gating, overflow discard, lookup
// miss, processor receive and send, policy switch, bypass -- must occur.
module tb_muqpro_top;
  import muqpro_pkg::*;
  localparam int NC = 6, NV = 4096, NB = 16384, CC = 35, L1I = 32, VB = 12;

  logic clk = 0, rst_n = 0;
  logic [1:0] ready, l1_en = 2'b11;
  logic [1:0] p_in_valid = 0, p_in_ready, p_in_is_credit = 0;
  cell_t [1:0] p_in_cell;
  logic [1:0] p_out_valid, p_out_ready = 2'b11, p_out_is_credit;
  cell_t [1:0] p_out_cell;
  logic [1:0] bypass = 0;
  sched_policy_e [1:0] policy;
  logic [1:0][NC-1:0][11:0] weight;
  logic [1:0] tw_en = 0, tw_valid, tw_to_ep;
  logic [1:0][VB-1:0] tw_idx, tw_vc;
  logic [1:0][VPI_BITS-1:0] tw_match_vpi, tw_new_vpi;
  logic [1:0][VCI_BITS-1:0] tw_match_vci, tw_new_vci;
  logic [1:0] cfg_valid = 0, cfg_ready, cfg_credit_mode;
  logic [1:0][VB-1:0] cfg_vc;
  logic [1:0][2:0] cfg_class;
  logic [1:0][15:0] cfg_credits;
  logic [1:0] l2_valid = 0, l2_ready;
  logic [1:0][VB-1:0] l2_vc;
  logic [1:0][15:0] l2_amt;
  logic [1:0] ep_rx_valid, ep_rx_ready = 2'b11;
  cell_t [1:0] ep_rx_cell;
  logic [1:0][VB-1:0] ep_rx_vc;
  logic [1:0] ep_tx_valid = 0, ep_tx_ready;
  cell_t [1:0] ep_tx_cell;
  logic [1:0][VB-1:0] ep_tx_vc;
  logic [1:0] ev_depart, ev_stall, ev_drop, ev_miss, ev_bypass;
  logic [1:0][2:0] ev_depart_class;
  logic [1:0][VB-1:0] ev_depart_vc;
  logic [1:0][14:0] buf_used;
  logic [1:0][4:0] ep_rx_level;
  logic signed [1:0][NC-1:0][31:0] sched_counter;
  logic [1:0][15:0] credits_pending;

  int checks = 0, failures = 0;

  muqpro_top dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("[%0t] %s", $time, msg); end
  endtask

  // ---------------- expected state ----------------
  logic [PAYLOAD_BITS-1:0] vq [2][16][$];   // per direction, per VC
  cell_t epq [2][$];
  cell_t byq [2][$];
  int n_sent [2], n_out [2], n_dep [2], n_stall [2], n_drop [2], n_miss [2];
  int n_byp [2], n_eprx [2], n_eptx [2], n_l1out [2], n_l2gate [2], n_switch = 0;
  bit track_drop [2];
  int drop_expect [2];

  // device model state, per port
  int  dev_pool [2];      // credits the device holds for sending into the core
  int  dev_owe [2];       // credits it owes the core for cells it received
  bit  dev_hold [2];      // withhold returned credits
  cell_t dev_txq [2][$];

  always @(posedge clk) if (rst_n)
    for (int d = 0; d < 2; d++) begin
      if (ev_depart[d]) n_dep[d]++;
      if (ev_stall[d])  n_stall[d]++;
      if (ev_drop[d])   n_drop[d]++;
      if (ev_miss[d])   n_miss[d]++;
      if (ev_bypass[d]) n_byp[d]++;
    end

  // device receive side: port p carries direction 1-p
  always @(posedge clk) if (rst_n)
    for (int p = 0; p < 2; p++)
      if (p_out_valid[p] && p_out_ready[p]) begin
        if (p_out_is_credit[p]) begin
          dev_pool[p]++;
          n_l1out[p]++;
        end else begin
          int d, v;
          d = 1 - p;
          n_out[d]++;
          dev_owe[p]++;
          if (bypass[d]) begin
            cell_t e;
            chk(byq[d].size() > 0, "unexpected bypass cell");
            if (byq[d].size() > 0) begin
              e = byq[d].pop_front();
              chk(p_out_cell[p] == e, "bypass cell mismatch");
            end
          end else begin
            v = int'(p_out_cell[p].hdr.vpi) - 'h80;
            chk(v >= 0 && v < 16 && p_out_cell[p].hdr.vci == 16'(32'h200 + 32'h1000 * d + v),
                $sformatf("dir %0d: bad header %h", d, p_out_cell[p].hdr));
            if (v >= 0 && v < 16) begin
              chk(vq[d][v].size() > 0 && p_out_cell[p].payload == vq[d][v][0],
                  $sformatf("dir %0d VC %0d: cell out of order", d, v));
              if (vq[d][v].size() > 0) void'(vq[d][v].pop_front());
            end
          end
        end
      end

  // device transmit side: owed credits first, then cells while it holds credits
  always @(posedge clk) if (rst_n)
    for (int p = 0; p < 2; p++) begin
      if (p_in_valid[p] && p_in_ready[p]) begin
        if (p_in_is_credit[p]) dev_owe[p]--;
        else begin
          void'(dev_txq[p].pop_front());
          dev_pool[p]--;
          n_sent[p]++;
        end
      end
    end

  always @(negedge clk)
    for (int p = 0; p < 2; p++) begin
      if (rst_n && !dev_hold[p] && dev_owe[p] > 0) begin
        p_in_valid[p] = 1; p_in_is_credit[p] = 1; p_in_cell[p] = '0;
      end else if (rst_n && dev_txq[p].size() > 0 && dev_pool[p] > 0) begin
        p_in_valid[p] = 1; p_in_is_credit[p] = 0; p_in_cell[p] = dev_txq[p][0];
      end else begin
        p_in_valid[p] = 0; p_in_is_credit[p] = 0;
      end
    end

  // processor receive side
  always @(posedge clk) if (rst_n)
    for (int d = 0; d < 2; d++)
      if (ep_rx_valid[d] && ep_rx_ready[d]) begin
        cell_t e;
        n_eprx[d]++;
        chk(epq[d].size() > 0, "unexpected cell to processor");
        if (epq[d].size() > 0) begin
          e = epq[d].pop_front();
          chk(ep_rx_cell[d] == e, "processor cell mismatch");
        end
      end

  // ---------------- stimulus helpers ----------------
  function automatic cell_t conn_cell(int c, logic [2:0] pt);
    cell_t x;
    x.hdr.vpi = '0; x.hdr.vci = 16'(32'h100 + c);
    x.hdr.pt = pt; x.hdr.clp = 1'b0;
    for (int i = 0; i < PAYLOAD_BITS / 32; i++) x.payload[i*32 +: 32] = $urandom;
    return x;
  endfunction

  // queue a cell for the device on port d (direction d); record what to expect
  task automatic dev_send(int d, int c, logic [2:0] pt = 3'b000, bit kept = 1);
    cell_t x;
    x = conn_cell(c, pt);
    if (bypass[d]) byq[d].push_back(x);
    else if (c == 14 || is_mgmt_pt(pt)) epq[d].push_back(x);
    else if (c < 13 && kept) vq[d][c].push_back(x.payload);
    dev_txq[d].push_back(x);
  endtask

  task automatic ep_send(int d);
    cell_t x;
    x = conn_cell(0, 3'b000);
    x.hdr.vpi = 12'(32'h80 + 13); x.hdr.vci = 16'(32'h200 + 32'h1000 * d + 13);
    vq[d][13].push_back(x.payload);
    @(negedge clk); ep_tx_valid[d] = 1; ep_tx_cell[d] = x; ep_tx_vc[d] = 12'd13;
    @(posedge clk); while (!ep_tx_ready[d]) @(posedge clk);
    #1 ep_tx_valid[d] = 0;
    n_eptx[d]++;
  endtask

  task automatic cfg(int d, int vc, int cls, bit cm);
    @(negedge clk);
    cfg_valid[d] = 1; cfg_vc[d] = VB'(vc); cfg_class[d] = 3'(cls);
    cfg_credit_mode[d] = cm; cfg_credits[d] = '0;
    @(posedge clk); while (!cfg_ready[d]) @(posedge clk);
    #1 cfg_valid[d] = 0;
  endtask

  task automatic l2(int d, int vc, int amt);
    @(negedge clk);
    l2_valid[d] = 1; l2_vc[d] = VB'(vc); l2_amt[d] = 16'(amt);
    @(posedge clk); while (!l2_ready[d]) @(posedge clk);
    #1 l2_valid[d] = 0;
  endtask

  function automatic int queued(int d);
    int s; s = 0;
    for (int v = 0; v < 16; v++) s += vq[d][v].size();
    return s;
  endfunction

  task automatic wait_idle(int maxcells);
    int t; t = 0;
    while ((queued(0) + queued(1) + dev_txq[0].size() + dev_txq[1].size() + byq[0].size() + byq[1].size()) != 0
           && t < maxcells * CC) begin
      @(posedge clk); t++;
    end
    repeat (4 * CC) @(posedge clk);
  endtask

  initial begin
    for (int d = 0; d < 2; d++) begin
      n_sent[d] = 0; n_out[d] = 0; n_dep[d] = 0; n_stall[d] = 0; n_drop[d] = 0; n_miss[d] = 0;
      n_byp[d] = 0; n_eprx[d] = 0; n_eptx[d] = 0; n_l1out[d] = 0; n_l2gate[d] = 0;
      dev_pool[d] = L1I; dev_owe[d] = 0; dev_hold[d] = 0;
      for (int i = 0; i < NC; i++) weight[d][i] = 12'(1 << i);
    end
    policy[0] = POL_HPF; policy[1] = POL_RR;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&ready);
    // tables
    for (int d = 0; d < 2; d++) begin
      for (int c = 0; c < 15; c++) begin
        @(negedge clk);
        tw_en[d] = 1; tw_idx[d] = VB'(32'h100 + c); tw_valid[d] = 1;
        tw_match_vpi[d] = '0; tw_match_vci[d] = 16'(32'h100 + c);
        tw_new_vpi[d] = 12'(32'h80 + c); tw_new_vci[d] = 16'(32'h200 + 32'h1000 * d + c);
        tw_vc[d] = VB'(c); tw_to_ep[d] = (c == 14);
        @(posedge clk); #1 tw_en[d] = 0;
      end
      for (int v = 0; v < 12; v++) cfg(d, v, v % 6, 0);
      cfg(d, 12, 5, 1);
      cfg(d, 13, 0, 0);
    end

    // ---- random two-way traffic, with a policy switch half way
    for (int n = 0; n < 600; n++) begin
      for (int d = 0; d < 2; d++) begin
        int c, r;
        r = $urandom_range(0, 99);
        c = (r < 3) ? 14 : (r < 5) ? 15 : (r < 12) ? 12 : $urandom_range(0, 11);
        dev_send(d, c, (r >= 95) ? 3'b100 : 3'b000);
      end
      if (n == 300) begin policy[0] = POL_HVF; policy[1] = POL_HPF; n_switch++; end
      if (n % 40 == 0) begin ep_send(0); ep_send(1); end
      if (n % 25 == 0) begin
        for (int d = 0; d < 2; d++)
          if (vq[d][12].size() > 0) begin n_l2gate[d]++; l2(d, 12, 2); end
      end
      p_out_ready = 2'($urandom_range(1, 3));
      repeat ($urandom_range(CC / 2, 2 * CC)) @(posedge clk);
    end
    p_out_ready = 2'b11;
    // release the credit-based VC completely
    for (int d = 0; d < 2; d++) l2(d, 12, vq[d][12].size() + 1);
    wait_idle(3000);
    for (int d = 0; d < 2; d++)
      chk(queued(d) == 0 && epq[d].size() == 0, $sformatf("dir %0d: %0d cells, %0d processor cells missing",
          d, queued(d), epq[d].size()));

    // ---- L1 stall and overflow in direction 0 (port 1 -> port 2)
    dev_hold[1] = 1;                        // port-2 device stops returning credits
    dev_pool[0] += NB + 100;                // port-1 device may send more than the buffer holds
    for (int i = 0; i < L1I + 4; i++) dev_send(0, 1);
    wait_idle(2 * L1I);
    chk(n_stall[0] > 0, "no L1 stall");
    begin
      int room;
      repeat (4 * CC) @(posedge clk);
      room = NB - int'(buf_used[0]);
      for (int i = 0; i < room + 20; i++) dev_send(0, 2 + i % 3, 3'b000, i < room);
      while (dev_txq[0].size() > 0) @(posedge clk);
      repeat (20) @(posedge clk);
      chk(n_drop[0] == 20, $sformatf("overflow: %0d cells dropped, expected 20", n_drop[0]));
      chk(int'(buf_used[0]) == NB, "buffer not full");
    end
    dev_hold[1] = 0;
    wait_idle(NB + 100);
    chk(queued(0) == 0, $sformatf("dir 0: %0d cells left after overflow", queued(0)));

    // ---- bypass in direction 1 (port 2 -> port 1)
    @(negedge clk); bypass[1] = 1;
    for (int i = 0; i < 50; i++) dev_send(1, $urandom_range(0, 15), 3'($urandom));
    wait_idle(200);
    chk(byq[1].size() == 0, "bypass cells missing");

    // ---- accounting and coverage
    for (int d = 0; d < 2; d++) begin
      chk(n_sent[d] == n_out[d] - n_eptx[d] + n_drop[d] + n_miss[d] + n_eprx[d],
          $sformatf("dir %0d: sent %0d, out %0d (of which %0d from processor), dropped %0d, missed %0d, to processor %0d",
                    d, n_sent[d], n_out[d], n_eptx[d], n_drop[d], n_miss[d], n_eprx[d]));
      chk(n_dep[d] > 0, "no departures");
      chk(n_miss[d] > 0, "no lookup miss");
      chk(n_eprx[d] > 0, "no cell to the processor");
      chk(n_eptx[d] > 0, "no cell from the processor");
      chk(n_l2gate[d] > 0, "no L2 credit gating");
      chk(n_l1out[d] > 0, "no L1 credit returned");
    end
    chk(n_stall[0] > 0, "no stall");
    chk(n_drop[0] > 0, "no overflow");
    chk(n_byp[1] > 0, "no bypass");
    chk(n_switch > 0, "no policy switch");
    $display("dir0: sent %0d out %0d departures %0d stalls %0d drops %0d misses %0d to-ep %0d from-ep %0d L2 grants %0d",
             n_sent[0], n_out[0], n_dep[0], n_stall[0], n_drop[0], n_miss[0], n_eprx[0], n_eptx[0], n_l2gate[0]);
    $display("dir1: sent %0d out %0d departures %0d stalls %0d drops %0d misses %0d to-ep %0d from-ep %0d L2 grants %0d bypassed %0d",
             n_sent[1], n_out[1], n_dep[1], n_stall[1], n_drop[1], n_miss[1], n_eprx[1], n_eptx[1], n_l2gate[1], n_byp[1]);
    $display("L1 credits sent on port 1: %0d, port 2: %0d; policy switches %0d", n_l1out[0], n_l1out[1], n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
