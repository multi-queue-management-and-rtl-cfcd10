// muqpro_direction: one direction of cell flow through the multi-queue
// processor (input port -> buffer -> output port).
//
// Incoming cells pass the VP/VC lookup (vc_translate). A cell for the
// embedded processor goes to a small FIFO (cell_fifo); any other cell joins
// the queue of its VC in the shared cell buffer (cell_queue_mgr). A VC that
// has cells and may send (vc_credit_table) is on the round-robin list of its
// service class (vc_active_lists). Once per cell time the class scheduler
// (wrr_class_sched) picks a class from the list lengths N_i and the class
// weights; the VC at the head of that list sends one cell and, if it can
// still send, rejoins the tail. A departure also needs the output register
// free and, when level-1 credits are in use on the output link, a credit
// in the L1 pool; otherwise the cell time is lost and counted as a stall.
// With `bypass` set, cells skip lookup and buffering and go straight from
// input to output. This structure follows the design's block diagram; the
// serialisation of all table updates in one FSM, one per clock, is this
// design's choice, as are the event priorities (departure, arrival, cell
// from the processor, credit from the processor, VC configuration).
// The invariant kept by the FSM: a VC is on its class list exactly when its
// queue is non-empty and it is eligible. A VC's class or flow-control mode
// must therefore be changed only while its queue is empty.
// The architecture also lists VP/VC flow groups among the scheduler's
// inputs without defining them; they are not modelled here.
// Timing: a departure takes two clocks (select+dequeue, then re-append), an
// arrival one. `credit_ret` counts the cells (0..2 per clock) that came from
// the upstream device and have left this direction's buffers, so that the
// port can return level-1 credits for them. Synchronous active-low reset;
// `ready` goes high when the table sweeps are done.
module muqpro_direction
  import muqpro_pkg::*;
#(
  parameter int NUM_CLASS = 6,
  parameter int NUM_VC    = 4096,
  parameter int BUF_CELLS = 16384,
  parameter int CELL_CLKS = 35,
  parameter int L1_INIT   = 32,
  parameter int EP_DEPTH  = 16,
  parameter int W_BITS    = 12,
  parameter int CR_BITS   = 16,
  parameter int VC_BITS   = $clog2(NUM_VC),
  parameter int CW        = $clog2(NUM_CLASS)
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic                ready,
  // configuration
  input  logic                bypass,
  input  logic                l1_en,
  input  sched_policy_e       policy,
  input  logic [NUM_CLASS-1:0][W_BITS-1:0] weight,
  // cells from the input port
  input  logic                in_valid,
  output logic                in_ready,
  input  cell_t               in_cell,
  // L1 credits received from the downstream device (one per pulse)
  input  logic                l1_credit_in,
  // cells to the output port
  output logic                out_valid,
  input  logic                out_ready,
  output cell_t               out_cell,
  // cells from upstream that have left the buffers
  output logic [1:0]          credit_ret,
  // embedded processor: translation table
  input  logic                tw_en,
  input  logic [VC_BITS-1:0]  tw_idx,
  input  logic                tw_valid,
  input  logic [VPI_BITS-1:0] tw_match_vpi,
  input  logic [VCI_BITS-1:0] tw_match_vci,
  input  logic [VPI_BITS-1:0] tw_new_vpi,
  input  logic [VCI_BITS-1:0] tw_new_vci,
  input  logic [VC_BITS-1:0]  tw_vc,
  input  logic                tw_to_ep,
  // embedded processor: VC configuration
  input  logic                cfg_valid,
  output logic                cfg_ready,
  input  logic [VC_BITS-1:0]  cfg_vc,
  input  logic [CW-1:0]       cfg_class,
  input  logic                cfg_credit_mode,
  input  logic [CR_BITS-1:0]  cfg_credits,
  // embedded processor: L2 credits
  input  logic                l2_valid,
  output logic                l2_ready,
  input  logic [VC_BITS-1:0]  l2_vc,
  input  logic [CR_BITS-1:0]  l2_amt,
  // embedded processor: received cells
  output logic                ep_rx_valid,
  input  logic                ep_rx_ready,
  output cell_t               ep_rx_cell,
  output logic [VC_BITS-1:0]  ep_rx_vc,
  // embedded processor: cells to send
  input  logic                ep_tx_valid,
  output logic                ep_tx_ready,
  input  cell_t               ep_tx_cell,
  input  logic [VC_BITS-1:0]  ep_tx_vc,
  // event strobes
  output logic                ev_depart,
  output logic [CW-1:0]       ev_depart_class,
  output logic [VC_BITS-1:0]  ev_depart_vc,
  output logic                ev_stall,
  output logic                ev_drop,
  output logic                ev_miss,
  output logic                ev_bypass,
  // status
  output logic [$clog2(BUF_CELLS+1)-1:0] buf_used,
  output logic [$clog2(EP_DEPTH):0]       ep_rx_level,
  output logic signed [NUM_CLASS-1:0][31:0] sched_counter
);
  localparam int N_BITS  = VC_BITS + 1;
  localparam int L_BITS  = $clog2(BUF_CELLS + 1);
  localparam int T_BITS  = $clog2(CELL_CLKS);
  localparam int P_BITS  = 16;

  typedef enum logic [0:0] {S_IDLE, S_REQUEUE} state_e;
  state_e state_q;

  // ---------------- sub-blocks ----------------
  logic               tr_ready, tr_in_ready, tr_out_valid, tr_out_ready, tr_to_ep;
  cell_t              tr_cell;
  logic [VC_BITS-1:0] tr_vc;

  logic               qm_ready, qm_enq, qm_deq, qm_full, qm_enq_tag, qm_deq_tag;
  logic [VC_BITS-1:0] qm_enq_q, qm_qry_q;
  cell_t              qm_enq_cell, qm_deq_cell;
  logic [L_BITS-1:0]  qm_qry_len;

  logic               ct_ready, ct_cfg, ct_add, ct_use, ct_elig, ct_cm;
  logic [VC_BITS-1:0] ct_rd_vc;
  logic [CW-1:0]      ct_class;
  logic [CR_BITS-1:0] ct_credits;

  logic               al_push, al_pop;
  logic [VC_BITS-1:0] al_push_vc, al_pop_vc;
  logic [CW-1:0]      al_push_class;
  logic [NUM_CLASS-1:0][N_BITS-1:0] al_count;

  logic               sc_step, sc_valid;
  logic [CW-1:0]      sc_class;

  logic               ef_in_valid, ef_in_ready;

  vc_translate #(.TBL_BITS(VC_BITS), .VC_BITS(VC_BITS)) u_translate (
    .clk, .rst_n, .ready(tr_ready),
    .tw_en, .tw_idx, .tw_valid, .tw_match_vpi, .tw_match_vci,
    .tw_new_vpi, .tw_new_vci, .tw_vc, .tw_to_ep,
    .in_valid(in_valid && !bypass), .in_ready(tr_in_ready), .in_cell,
    .out_valid(tr_out_valid), .out_ready(tr_out_ready), .out_cell(tr_cell),
    .out_vc(tr_vc), .out_to_ep(tr_to_ep), .miss(ev_miss));

  cell_queue_mgr #(.NUM_Q(NUM_VC), .BUF_CELLS(BUF_CELLS)) u_queues (
    .clk, .rst_n, .ready(qm_ready),
    .enq(qm_enq), .enq_q(qm_enq_q), .enq_cell(qm_enq_cell), .enq_tag(qm_enq_tag),
    .deq(qm_deq), .deq_q(al_pop_vc), .deq_cell(qm_deq_cell), .deq_tag(qm_deq_tag),
    .qry_q(qm_qry_q), .qry_len(qm_qry_len), .full(qm_full), .used(buf_used));

  vc_credit_table #(.NUM_VC(NUM_VC), .NUM_CLASS(NUM_CLASS), .CR_BITS(CR_BITS)) u_credits (
    .clk, .rst_n, .ready(ct_ready),
    .cfg_en(ct_cfg), .cfg_vc, .cfg_class, .cfg_credit_mode, .cfg_credits,
    .add_en(ct_add), .add_vc(l2_vc), .add_amt(l2_amt),
    .use_en(ct_use), .use_vc(al_pop_vc),
    .rd_vc(ct_rd_vc), .rd_class(ct_class), .rd_credit_mode(ct_cm),
    .rd_credits(ct_credits), .rd_elig(ct_elig));

  vc_active_lists #(.NUM_CLASS(NUM_CLASS), .NUM_VC(NUM_VC)) u_lists (
    .clk, .rst_n,
    .push(al_push), .push_vc(al_push_vc), .push_class(al_push_class),
    .pop(al_pop), .pop_class(sc_class), .pop_vc(al_pop_vc), .count(al_count));

  wrr_class_sched #(.NUM_CLASS(NUM_CLASS), .W_BITS(W_BITS), .N_BITS(N_BITS), .CNT_BITS(32)) u_sched (
    .clk, .rst_n, .step(sc_step), .policy, .weight, .nready(al_count),
    .sel_valid(sc_valid), .sel_class(sc_class), .counter(sched_counter));

  cell_fifo #(.DEPTH(EP_DEPTH), .VC_BITS(VC_BITS)) u_ep_fifo (
    .clk, .rst_n,
    .in_valid(ef_in_valid), .in_ready(ef_in_ready), .in_cell(tr_cell), .in_vc(tr_vc),
    .out_valid(ep_rx_valid), .out_ready(ep_rx_ready), .out_cell(ep_rx_cell),
    .out_vc(ep_rx_vc), .level(ep_rx_level));

  // ---------------- controller ----------------
  logic [T_BITS-1:0]  tcnt_q;
  logic               tick, tick_pend_q;
  logic [P_BITS-1:0]  l1_pool_q;
  logic               l1_ok, backlog, out_free;
  logic [VC_BITS-1:0] rq_vc_q;
  logic               do_dep, do_arr, do_eptx, do_l2, do_cfg, do_byp;

  assign ready    = tr_ready && qm_ready && ct_ready;
  assign tick     = (tcnt_q == T_BITS'(CELL_CLKS - 1));
  assign l1_ok    = !l1_en || l1_pool_q != '0;
  assign out_free = !out_valid || out_ready;
  assign backlog  = |al_count;

  // one operation per clock, by priority
  always_comb begin
    do_dep  = 1'b0; do_arr = 1'b0; do_eptx = 1'b0;
    do_l2   = 1'b0; do_cfg = 1'b0; do_byp  = 1'b0;
    if (ready && state_q == S_IDLE) begin
      if (bypass) begin
        do_byp = in_valid && out_free && l1_ok;
      end else if (tick_pend_q && backlog && out_free && l1_ok)
        do_dep = 1'b1;
      else if (tr_out_valid)
        do_arr = 1'b1;
      else if (ep_tx_valid)
        do_eptx = 1'b1;
      else if (l2_valid)
        do_l2 = 1'b1;
      else if (cfg_valid)
        do_cfg = 1'b1;
    end
  end

  // read-port steering
  always_comb begin
    if (state_q == S_REQUEUE) ct_rd_vc = rq_vc_q;
    else if (do_arr)          ct_rd_vc = tr_vc;
    else if (do_eptx)         ct_rd_vc = ep_tx_vc;
    else                      ct_rd_vc = l2_vc;
    qm_qry_q = ct_rd_vc;
  end

  logic arr_to_q;  // the arriving cell goes into a VC queue
  always_comb begin
    arr_to_q      = (do_arr && !tr_to_ep) || do_eptx;
    ef_in_valid   = do_arr && tr_to_ep;
    tr_out_ready  = do_arr;
    ep_tx_ready   = do_eptx && !qm_full;
    l2_ready      = do_l2;
    cfg_ready     = do_cfg;
    in_ready      = bypass ? do_byp : tr_in_ready;

    qm_enq        = arr_to_q && !qm_full;
    qm_enq_q      = do_arr ? tr_vc : ep_tx_vc;
    qm_enq_cell   = do_arr ? tr_cell : ep_tx_cell;
    qm_enq_tag    = do_eptx;

    sc_step       = do_dep;
    al_pop        = do_dep && sc_valid;
    qm_deq        = al_pop;
    ct_use        = al_pop;
    ct_add        = do_l2;
    ct_cfg        = do_cfg;

    al_push       = 1'b0;
    al_push_vc    = ct_rd_vc;
    al_push_class = ct_class;
    if (state_q == S_REQUEUE)
      al_push = qm_qry_len != '0 && ct_elig;
    else if (qm_enq)
      al_push = qm_qry_len == '0 && ct_elig;
    else if (do_l2)
      al_push = qm_qry_len != '0 && ct_cm && ct_credits == '0 && l2_amt != '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      tcnt_q      <= '0;
      tick_pend_q <= 1'b0;
      l1_pool_q   <= P_BITS'(L1_INIT);
      out_valid   <= 1'b0;
      rq_vc_q     <= '0;
    end else begin
      tcnt_q <= tick ? '0 : tcnt_q + 1'b1;
      if (do_dep)
        tick_pend_q <= 1'b0;
      else if (tick)
        tick_pend_q <= backlog && !bypass;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (al_pop) begin
        out_valid <= 1'b1;
        out_cell  <= qm_deq_cell;
        rq_vc_q   <= al_pop_vc;
        state_q   <= S_REQUEUE;
      end else if (do_byp) begin
        out_valid <= 1'b1;
        out_cell  <= in_cell;
      end else
        state_q <= S_IDLE;
      if (l1_en)
        l1_pool_q <= l1_pool_q + P_BITS'(l1_credit_in) - P_BITS'(al_pop || do_byp);
    end
  end

  // event strobes and credit return
  always_comb begin
    ev_depart       = al_pop;
    ev_depart_class = sc_class;
    ev_depart_vc    = al_pop_vc;
    ev_stall        = ready && tick && tick_pend_q && !do_dep;
    ev_drop         = (do_arr && tr_to_ep && !ef_in_ready) || (do_arr && !tr_to_ep && qm_full);
    ev_bypass       = do_byp;
    credit_ret      = 2'(ep_rx_valid && ep_rx_ready)
                    + 2'((al_pop && !qm_deq_tag) || ev_drop || do_byp);
  end

  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({do_dep, do_arr, do_eptx, do_l2, do_cfg, do_byp}));

endmodule
