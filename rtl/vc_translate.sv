// vc_translate: header inspection and VP/VC translation of incoming cells.
//
// The header of each incoming cell is looked up in a connection table. A
// hit gives the outgoing VPI/VCI and the queue (VC number) the cell joins,
// or marks the connection as terminated in the embedded processor. Cells
// whose payload type marks them as management cells (F5 OAM, resource
// management) go to the embedded processor with their header unchanged.
// Cells of unknown connections are discarded and reported on `miss`.
// The table is direct-mapped: the index is the low VPI_IDX bits of the VPI
// above the low bits of the VCI, and each entry stores the full VPI/VCI as a
// tag. The table layout, the discard of unknown cells and the management
// cell rule are this design's choices; the design states only that the
// header is inspected to find the translation and the queue.
// Interface: valid/ready on both sides, one register stage (latency 1
// cycle, one cell per cycle). Table writes (`tw_*`) come from the embedded
// processor; valid bits are cleared by a sweep after reset (`ready` low).
module vc_translate
  import muqpro_pkg::*;
#(
  parameter int TBL_BITS = 12,
  parameter int VPI_IDX  = 2,
  parameter int VC_BITS  = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic                ready,
  // table write
  input  logic                tw_en,
  input  logic [TBL_BITS-1:0] tw_idx,
  input  logic                tw_valid,
  input  logic [VPI_BITS-1:0] tw_match_vpi,  // connection looked for
  input  logic [VCI_BITS-1:0] tw_match_vci,
  input  logic [VPI_BITS-1:0] tw_new_vpi,    // translated header fields
  input  logic [VCI_BITS-1:0] tw_new_vci,
  input  logic [VC_BITS-1:0]  tw_vc,
  input  logic                tw_to_ep,
  // cells in
  input  logic                in_valid,
  output logic                in_ready,
  input  cell_t               in_cell,
  // cells out
  output logic                out_valid,
  input  logic                out_ready,
  output cell_t               out_cell,
  output logic [VC_BITS-1:0]  out_vc,
  output logic                out_to_ep,
  output logic                miss
);
  localparam int ENTRIES = 1 << TBL_BITS;

  typedef struct packed {
    logic [VPI_BITS-1:0] tag_vpi;
    logic [VCI_BITS-1:0] tag_vci;
    logic [VPI_BITS-1:0] new_vpi;
    logic [VCI_BITS-1:0] new_vci;
    logic [VC_BITS-1:0]  vc;
    logic                to_ep;
  } entry_t;

  entry_t               tbl [ENTRIES];
  logic [ENTRIES-1:0]   vld;
  logic [TBL_BITS:0]    init_q;

  logic [TBL_BITS-1:0]  idx;
  entry_t               e;
  logic                 hit, mgmt, take;

  assign ready = init_q[TBL_BITS];
  assign idx   = {in_cell.hdr.vpi[VPI_IDX-1:0], in_cell.hdr.vci[TBL_BITS-VPI_IDX-1:0]};
  assign e     = tbl[idx];
  assign hit   = vld[idx] && e.tag_vpi == in_cell.hdr.vpi && e.tag_vci == in_cell.hdr.vci;
  assign mgmt  = is_mgmt_pt(in_cell.hdr.pt);

  assign in_ready = ready && (!out_valid || out_ready);
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk)
    if (tw_en) begin
      tbl[tw_idx] <= '{tag_vpi: tw_match_vpi, tag_vci: tw_match_vci,
                       new_vpi: tw_new_vpi,   new_vci: tw_new_vci,
                       vc: tw_vc, to_ep: tw_to_ep};
    end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      init_q    <= '0;
      out_valid <= 1'b0;
      miss      <= 1'b0;
    end else begin
      miss <= 1'b0;
      if (!ready) begin
        vld[init_q[TBL_BITS-1:0]] <= 1'b0;
        init_q <= init_q + 1'b1;
      end else if (tw_en)
        vld[tw_idx] <= tw_valid;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        if (hit) begin
          out_valid <= 1'b1;
          out_vc    <= e.vc;
          out_to_ep <= e.to_ep || mgmt;
          out_cell  <= in_cell;
          if (!e.to_ep && !mgmt) begin
            out_cell.hdr.vpi <= e.new_vpi;
            out_cell.hdr.vci <= e.new_vci;
          end
        end else
          miss <= 1'b1;
      end
    end
  end

endmodule
