// muqpro_pkg: types shared by the multi-queue processor core.
//
// A cell is carried on one wide bus: the 32-bit ATM header (VPI, VCI,
// payload type, CLP) and the 48-byte payload. The HEC byte is left to the
// physical-layer interface, which regenerates it; this is a choice of this
// design, as is the 12-bit (NNI-style) VPI field.
// The scheduling policies are the three selection rules of the weighted
// round-robin framework: round-robin (RR), highest-value-first (HVF) and
// highest-priority-first (HPF).
package muqpro_pkg;

  localparam int PAYLOAD_BITS = 384;  // 48 bytes
  localparam int VPI_BITS     = 12;
  localparam int VCI_BITS     = 16;

  typedef struct packed {
    logic [VPI_BITS-1:0] vpi;
    logic [VCI_BITS-1:0] vci;
    logic [2:0]          pt;   // payload type
    logic                clp;  // cell loss priority
  } atm_hdr_t;

  typedef struct packed {
    atm_hdr_t                hdr;
    logic [PAYLOAD_BITS-1:0] payload;
  } cell_t;

  typedef enum logic [1:0] {
    POL_RR  = 2'd0,
    POL_HVF = 2'd1,
    POL_HPF = 2'd2
  } sched_policy_e;

  // Payload types 100, 101 (F5 OAM) and 110 (resource management) are
  // management cells and go to the embedded processor.
  function automatic logic is_mgmt_pt(input logic [2:0] pt);
    return pt[2] && (pt[1:0] != 2'b11);
  endfunction

endpackage
