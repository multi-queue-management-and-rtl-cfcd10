// port_out_mux: output side of a port, merging cells and level-1 credits.
//
// The transmit side of a port carries the cells scheduled for it and, when
// the device on that port uses level-1 (hop-by-hop) credits, the credits
// this chip returns for the cells that device sent us and that have since
// left our buffers. Returned credits are counted; while any is pending the
// link sends a credit, otherwise the next cell. Credits go first because
// they are short and keep the upstream device sending; this priority, and
// sending one credit per link transfer, are this design's choices. Credit
// return counts `ret` of 0..2 per clock come from the opposite direction.
// Interface: `cell_valid/cell_ready` from the direction that sends on this
// port; the link side is valid/ready with `link_is_credit` telling a
// credit (the cell field is then zero) from a cell. Synchronous reset.
module port_out_mux
  import muqpro_pkg::*;
#(
  parameter int PEND_BITS = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        l1_en,
  input  logic        cell_valid,
  output logic        cell_ready,
  input  cell_t       cell_in,
  input  logic [1:0]  ret,
  output logic        link_valid,
  input  logic        link_ready,
  output logic        link_is_credit,
  output cell_t       link_cell,
  output logic [PEND_BITS-1:0] pending
);
  logic [PEND_BITS-1:0] pend_q;
  logic                 send_cr;

  assign pending        = pend_q;
  assign send_cr        = l1_en && pend_q != '0;
  assign link_valid     = send_cr || cell_valid;
  assign link_is_credit = send_cr;
  assign link_cell      = send_cr ? '0 : cell_in;
  assign cell_ready     = link_ready && !send_cr;

  always_ff @(posedge clk) begin
    if (!rst_n)
      pend_q <= '0;
    else if (!l1_en)
      pend_q <= '0;
    else
      pend_q <= pend_q + PEND_BITS'(ret) - PEND_BITS'(send_cr && link_ready);
  end

endmodule
