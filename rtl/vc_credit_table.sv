// vc_credit_table: per-VC service class and level-2 (end-to-end) credits.
//
// For every VC the table holds its service class, whether it is under
// credit-based flow control, and its count of level-2 credits. A VC under
// credit control may be scheduled only while it holds a credit; sending a
// cell spends one. A VC under rate-based control ignores credits and is
// scheduled on its class weight alone, which is how the design treats rate
// control: as credit control with credit availability ignored. Credits are
// added by the embedded processor, which receives the credit cells.
// The layout, the counter width and saturation at the maximum are this
// design's choices. After reset a sweep of NUM_VC cycles sets every VC to
// class 0, rate-based, no credits (`ready` low meanwhile).
// Interface: configuration write (`cfg_*`), credit addition (`add_*`) and
// credit use (`use_*`), each one cycle; a configuration write wins over the
// other two on the same VC. `rd_vc` is a combinational read port whose
// `rd_elig` tells whether the VC may send now.
module vc_credit_table #(
  parameter int NUM_VC    = 4096,
  parameter int NUM_CLASS = 6,
  parameter int CR_BITS   = 16,
  parameter int VC_BITS   = $clog2(NUM_VC),
  parameter int CW        = $clog2(NUM_CLASS)
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               ready,
  input  logic               cfg_en,
  input  logic [VC_BITS-1:0] cfg_vc,
  input  logic [CW-1:0]      cfg_class,
  input  logic               cfg_credit_mode,
  input  logic [CR_BITS-1:0] cfg_credits,
  input  logic               add_en,
  input  logic [VC_BITS-1:0] add_vc,
  input  logic [CR_BITS-1:0] add_amt,
  input  logic               use_en,
  input  logic [VC_BITS-1:0] use_vc,
  input  logic [VC_BITS-1:0] rd_vc,
  output logic [CW-1:0]      rd_class,
  output logic               rd_credit_mode,
  output logic [CR_BITS-1:0] rd_credits,
  output logic               rd_elig
);
  typedef struct packed {
    logic [CW-1:0]      cls;
    logic               cm;
    logic [CR_BITS-1:0] cr;
  } ent_t;

  ent_t             tbl [NUM_VC];
  logic [VC_BITS:0] init_q;

  assign ready          = init_q[VC_BITS];
  assign rd_class       = tbl[rd_vc].cls;
  assign rd_credit_mode = tbl[rd_vc].cm;
  assign rd_credits     = tbl[rd_vc].cr;
  assign rd_elig        = !tbl[rd_vc].cm || tbl[rd_vc].cr != '0;

  function automatic logic [CR_BITS-1:0] sat_add(input logic [CR_BITS-1:0] a,
                                                 input logic [CR_BITS-1:0] b);
    logic [CR_BITS:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[CR_BITS] ? '1 : s[CR_BITS-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      init_q <= '0;
    end else if (!ready) begin
      tbl[init_q[VC_BITS-1:0]] <= '{cls: '0, cm: 1'b0, cr: '0};
      init_q <= init_q + 1'b1;
    end else begin
      if (add_en && use_en && add_vc == use_vc) begin
        if (tbl[add_vc].cm)
          tbl[add_vc].cr <= sat_add(tbl[add_vc].cr, add_amt) - CR_BITS'(tbl[add_vc].cr != '0 || add_amt != '0);
      end else begin
        if (add_en)
          tbl[add_vc].cr <= sat_add(tbl[add_vc].cr, add_amt);
        if (use_en && tbl[use_vc].cm && tbl[use_vc].cr != '0)
          tbl[use_vc].cr <= tbl[use_vc].cr - 1'b1;
      end
      if (cfg_en)
        tbl[cfg_vc] <= '{cls: cfg_class, cm: cfg_credit_mode, cr: cfg_credits};
    end
  end

endmodule
