// wrr_class_sched: weighted round-robin selection among service classes.
//
// Each class i has a signed counter c_i, zero after reset, a weight w_i
// (base-bandwidth channels per VC) and N_i, the number of its VCs that are
// ready now. On every `step` (one cell time) all counters are incremented by
// w_i*N_i; then one class whose counter is non-negative is selected and its
// counter is decremented by N = sum_i w_i*N_i. This is the algorithm of the
// design. The selection rule is chosen by `policy`:
//   RR  - the next non-negative counter after the last selected class;
//   HVF - the counter with the highest value;
//   HPF - the class with the highest weight among non-negative counters.
// Choices of this design: only classes with N_i > 0 can be selected, a class
// with N_i = 0 has its counter cleared (it holds no tokens while idle), and
// ties go to the higher class index.
// Interface: `step` is a one-cycle strobe; `sel_valid`/`sel_class` are
// combinational in the cycle of `step` and the counters update at its end.
module wrr_class_sched
  import muqpro_pkg::*;
#(
  parameter int NUM_CLASS = 6,
  parameter int W_BITS    = 12,   // weight width
  parameter int N_BITS    = 13,   // ready-VC count width
  parameter int CNT_BITS  = 32    // counter width
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         step,
  input  sched_policy_e                policy,
  input  logic [NUM_CLASS-1:0][W_BITS-1:0] weight,
  input  logic [NUM_CLASS-1:0][N_BITS-1:0] nready,
  output logic                         sel_valid,
  output logic [$clog2(NUM_CLASS)-1:0] sel_class,
  output logic signed [NUM_CLASS-1:0][CNT_BITS-1:0] counter
);
  localparam int CW = $clog2(NUM_CLASS);

  logic signed [CNT_BITS-1:0] cnt_q [NUM_CLASS];
  logic signed [CNT_BITS-1:0] cand  [NUM_CLASS];
  logic [NUM_CLASS-1:0]       elig;
  logic signed [CNT_BITS-1:0] total;
  logic [CW-1:0]              last_q;

  always_comb begin
    total = '0;
    for (int i = 0; i < NUM_CLASS; i++) begin
      logic signed [CNT_BITS-1:0] inc;
      inc     = CNT_BITS'(weight[i]) * CNT_BITS'(nready[i]);
      cand[i] = cnt_q[i] + inc;
      total   = total + inc;
      elig[i] = (nready[i] != '0) && !cand[i][CNT_BITS-1];
    end
  end

  // Selection per policy.
  always_comb begin
    logic signed [CNT_BITS-1:0] best_v;
    logic [W_BITS-1:0]          best_w;
    logic [CW-1:0]              idx;
    logic                       found;
    found     = 1'b0;
    idx       = '0;
    sel_valid = |elig;
    sel_class = '0;
    best_v    = '0;
    best_w    = '0;
    unique case (policy)
      POL_HVF: begin
        for (int i = 0; i < NUM_CLASS; i++)
          if (elig[i] && (!found || cand[i] >= best_v)) begin
            sel_class = CW'(i);
            best_v    = cand[i];
            found     = 1'b1;
          end
      end
      POL_HPF: begin
        for (int i = 0; i < NUM_CLASS; i++)
          if (elig[i] && (!found || weight[i] >= best_w)) begin
            sel_class = CW'(i);
            best_w    = weight[i];
            found     = 1'b1;
          end
      end
      default: begin  // POL_RR: scan from last+1 circularly, first hit wins
        for (int k = 1; k <= NUM_CLASS; k++) begin
          idx = CW'((int'(last_q) + k) % NUM_CLASS);
          if (!found && elig[idx]) begin
            sel_class = idx;
            found     = 1'b1;
          end
        end
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_CLASS; i++) cnt_q[i] <= '0;
      last_q <= CW'(NUM_CLASS - 1);
    end else if (step) begin
      for (int i = 0; i < NUM_CLASS; i++) begin
        if (nready[i] == '0)
          cnt_q[i] <= '0;
        else if (sel_valid && sel_class == CW'(i))
          cnt_q[i] <= cand[i] - total;
        else
          cnt_q[i] <= cand[i];
      end
      if (sel_valid) last_q <= sel_class;
    end
  end

  always_comb
    for (int i = 0; i < NUM_CLASS; i++) counter[i] = cnt_q[i];

endmodule
