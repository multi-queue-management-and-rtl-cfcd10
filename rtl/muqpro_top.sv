// muqpro_top: core of the two-port multi-queue processor.
//
// The chip sits between two ATM ports and carries traffic both ways. Each
// direction (index 0: port 1 -> port 2, index 1: port 2 -> port 1) is a
// muqpro_direction: lookup and translation, per-VC queues in a shared cell
// buffer, and a weighted round-robin scheduler that sends at most one cell
// per cell time, subject to level-1 and level-2 credits; or, in bypass,
// unbuffered forwarding. The two directions meet at the ports: what a port
// receives is split into cells (for the direction that starts there) and
// level-1 credits (for the direction that sends there), and what it sends is
// a port_out_mux merging that direction's cells with the credits returned
// for cells received on the same port. This two-direction structure and the
// credit paths follow the design's block diagram.
// Port links are plain cell streams: valid/ready, a credit flag and a cell.
// The physical interfaces (HIC/HS, UTOPIA-2, SONET/SDH, PCI), the embedded
// processor and the external memories are outside this core; the
// processor's interfaces are brought out per direction as arrays indexed by
// direction. Per-port `l1_en` says the device on that port uses level-1
// credits. Synchronous active-low reset; `ready` rises once all table
// sweeps are done (about NUM_VC cycles).
module muqpro_top
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
  output logic [1:0]          ready,
  // per-port configuration and links (index 0 = port 1, 1 = port 2)
  input  logic [1:0]          l1_en,
  input  logic [1:0]          p_in_valid,
  output logic [1:0]          p_in_ready,
  input  logic [1:0]          p_in_is_credit,
  input  cell_t [1:0]         p_in_cell,
  output logic [1:0]          p_out_valid,
  input  logic [1:0]          p_out_ready,
  output logic [1:0]          p_out_is_credit,
  output cell_t [1:0]         p_out_cell,
  // per-direction configuration (index 0 = port 1 -> port 2)
  input  logic [1:0]          bypass,
  input  sched_policy_e [1:0] policy,
  input  logic [1:0][NUM_CLASS-1:0][W_BITS-1:0] weight,
  // embedded processor, per direction
  input  logic [1:0]                tw_en,
  input  logic [1:0][VC_BITS-1:0]   tw_idx,
  input  logic [1:0]                tw_valid,
  input  logic [1:0][VPI_BITS-1:0]  tw_match_vpi,
  input  logic [1:0][VCI_BITS-1:0]  tw_match_vci,
  input  logic [1:0][VPI_BITS-1:0]  tw_new_vpi,
  input  logic [1:0][VCI_BITS-1:0]  tw_new_vci,
  input  logic [1:0][VC_BITS-1:0]   tw_vc,
  input  logic [1:0]                tw_to_ep,
  input  logic [1:0]                cfg_valid,
  output logic [1:0]                cfg_ready,
  input  logic [1:0][VC_BITS-1:0]   cfg_vc,
  input  logic [1:0][CW-1:0]        cfg_class,
  input  logic [1:0]                cfg_credit_mode,
  input  logic [1:0][CR_BITS-1:0]   cfg_credits,
  input  logic [1:0]                l2_valid,
  output logic [1:0]                l2_ready,
  input  logic [1:0][VC_BITS-1:0]   l2_vc,
  input  logic [1:0][CR_BITS-1:0]   l2_amt,
  output logic [1:0]                ep_rx_valid,
  input  logic [1:0]                ep_rx_ready,
  output cell_t [1:0]               ep_rx_cell,
  output logic [1:0][VC_BITS-1:0]   ep_rx_vc,
  input  logic [1:0]                ep_tx_valid,
  output logic [1:0]                ep_tx_ready,
  input  cell_t [1:0]               ep_tx_cell,
  input  logic [1:0][VC_BITS-1:0]   ep_tx_vc,
  // event strobes, per direction
  output logic [1:0]                ev_depart,
  output logic [1:0][CW-1:0]        ev_depart_class,
  output logic [1:0][VC_BITS-1:0]   ev_depart_vc,
  output logic [1:0]                ev_stall,
  output logic [1:0]                ev_drop,
  output logic [1:0]                ev_miss,
  output logic [1:0]                ev_bypass,
  // status: buffer occupancy, processor FIFO level, scheduler counters,
  // credits waiting to be returned on each port
  output logic [1:0][$clog2(BUF_CELLS+1)-1:0] buf_used,
  output logic [1:0][$clog2(EP_DEPTH):0]       ep_rx_level,
  output logic signed [1:0][NUM_CLASS-1:0][31:0] sched_counter,
  output logic [1:0][15:0]                     credits_pending
);
  logic  [1:0]       d_in_ready, d_out_valid, d_out_ready, d_l1_credit;
  cell_t [1:0]       d_out_cell;
  logic  [1:0][1:0]  d_credit_ret;

  for (genvar d = 0; d < 2; d++) begin : g_dir
    // direction d receives on port d and sends on port 1-d
    localparam int OP = 1 - d;

    assign d_l1_credit[d] = p_in_valid[OP] && p_in_is_credit[OP];
    assign p_in_ready[d]  = p_in_is_credit[d] ? 1'b1 : d_in_ready[d];

    muqpro_direction #(
      .NUM_CLASS(NUM_CLASS), .NUM_VC(NUM_VC), .BUF_CELLS(BUF_CELLS),
      .CELL_CLKS(CELL_CLKS), .L1_INIT(L1_INIT), .EP_DEPTH(EP_DEPTH),
      .W_BITS(W_BITS), .CR_BITS(CR_BITS)
    ) u_dir (
      .clk, .rst_n, .ready(ready[d]),
      .bypass(bypass[d]), .l1_en(l1_en[OP]), .policy(policy[d]), .weight(weight[d]),
      .in_valid(p_in_valid[d] && !p_in_is_credit[d]), .in_ready(d_in_ready[d]),
      .in_cell(p_in_cell[d]),
      .l1_credit_in(d_l1_credit[d]),
      .out_valid(d_out_valid[d]), .out_ready(d_out_ready[d]), .out_cell(d_out_cell[d]),
      .credit_ret(d_credit_ret[d]),
      .tw_en(tw_en[d]), .tw_idx(tw_idx[d]), .tw_valid(tw_valid[d]),
      .tw_match_vpi(tw_match_vpi[d]), .tw_match_vci(tw_match_vci[d]),
      .tw_new_vpi(tw_new_vpi[d]), .tw_new_vci(tw_new_vci[d]),
      .tw_vc(tw_vc[d]), .tw_to_ep(tw_to_ep[d]),
      .cfg_valid(cfg_valid[d]), .cfg_ready(cfg_ready[d]), .cfg_vc(cfg_vc[d]),
      .cfg_class(cfg_class[d]), .cfg_credit_mode(cfg_credit_mode[d]),
      .cfg_credits(cfg_credits[d]),
      .l2_valid(l2_valid[d]), .l2_ready(l2_ready[d]), .l2_vc(l2_vc[d]), .l2_amt(l2_amt[d]),
      .ep_rx_valid(ep_rx_valid[d]), .ep_rx_ready(ep_rx_ready[d]),
      .ep_rx_cell(ep_rx_cell[d]), .ep_rx_vc(ep_rx_vc[d]),
      .ep_tx_valid(ep_tx_valid[d]), .ep_tx_ready(ep_tx_ready[d]),
      .ep_tx_cell(ep_tx_cell[d]), .ep_tx_vc(ep_tx_vc[d]),
      .ev_depart(ev_depart[d]), .ev_depart_class(ev_depart_class[d]),
      .ev_depart_vc(ev_depart_vc[d]), .ev_stall(ev_stall[d]), .ev_drop(ev_drop[d]),
      .ev_miss(ev_miss[d]), .ev_bypass(ev_bypass[d]),
      .buf_used(buf_used[d]), .ep_rx_level(ep_rx_level[d]),
      .sched_counter(sched_counter[d]));
  end

  for (genvar p = 0; p < 2; p++) begin : g_port
    // port p sends the cells of direction 1-p and the credits for direction p
    port_out_mux u_mux (
      .clk, .rst_n, .l1_en(l1_en[p]),
      .cell_valid(d_out_valid[1-p]), .cell_ready(d_out_ready[1-p]), .cell_in(d_out_cell[1-p]),
      .ret(d_credit_ret[p]),
      .link_valid(p_out_valid[p]), .link_ready(p_out_ready[p]),
      .link_is_credit(p_out_is_credit[p]), .link_cell(p_out_cell[p]), .pending(credits_pending[p]));
  end

endmodule
