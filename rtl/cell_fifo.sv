// cell_fifo: small first-in first-out buffer of cells with their VC number.
//
// Holds the cells that the lookup stage sends to the embedded processor
// (management cells and cells of connections it terminates). A full FIFO
// refuses further cells (`in_ready` low); the caller then discards them.
// The depth is this design's choice. Interface: valid/ready on both sides,
// one write and one read per cycle; the output is the oldest entry, read
// combinationally from the storage array. Synchronous active-low reset.
module cell_fifo
  import muqpro_pkg::*;
#(
  parameter int DEPTH   = 16,
  parameter int VC_BITS = 12,
  parameter int A_BITS  = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  cell_t              in_cell,
  input  logic [VC_BITS-1:0] in_vc,
  output logic               out_valid,
  input  logic               out_ready,
  output cell_t              out_cell,
  output logic [VC_BITS-1:0] out_vc,
  output logic [A_BITS:0]    level
);
  cell_t              mem_c [DEPTH];
  logic [VC_BITS-1:0] mem_v [DEPTH];
  logic [A_BITS-1:0]  wp, rp;
  logic [A_BITS:0]    cnt;
  logic               wr, rd;

  assign in_ready  = cnt != (A_BITS+1)'(DEPTH);
  assign out_valid = cnt != '0;
  assign out_cell  = mem_c[rp];
  assign out_vc    = mem_v[rp];
  assign level     = cnt;
  assign wr        = in_valid && in_ready;
  assign rd        = out_valid && out_ready;

  always_ff @(posedge clk)
    if (wr) begin
      mem_c[wp] <= in_cell;
      mem_v[wp] <= in_vc;
    end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (wr) wp <= (wp == A_BITS'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (rd) rp <= (rp == A_BITS'(DEPTH-1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (A_BITS+1)'(wr) - (A_BITS+1)'(rd);
    end
  end

endmodule
