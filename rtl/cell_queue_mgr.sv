// cell_queue_mgr: per-VC cell queues kept as linked lists in a shared buffer.
//
// Every VC has its own FIFO of cells, so that a burst on one connection
// cannot delay another. All queues share one cell buffer (which stands for
// the external cell memory) and are chained through a next-pointer table
// (which stands for the linked-list pointers in the management memory).
// Free slots are handed out first from a pointer that sweeps the buffer once
// after reset and then from a free list of returned slots. When a dequeue
// and an enqueue happen in the same cycle, the slot just freed is reused at
// once for the new cell. Per queue the block keeps head, tail and length;
// the lengths are cleared by a sweep of NUM_Q cycles after reset, during
// which `ready` is low. Sizes and storage layout are this design's choice.
// Interface (synchronous, active-low reset): one enqueue and one dequeue per
// cycle. `deq_cell` is the head cell of `deq_q`, read combinationally; it is
// removed at the end of a cycle with `deq` high. Enqueue needs `!full` unless
// a dequeue happens in the same cycle; dequeue needs a non-empty queue.
// `qry_q`/`qry_len` is a combinational length query port. A one-bit tag
// travels with each cell (the direction controller uses it to mark cells
// injected by the embedded processor).
module cell_queue_mgr
  import muqpro_pkg::*;
#(
  parameter int NUM_Q     = 4096,
  parameter int BUF_CELLS = 16384,
  parameter int Q_BITS    = $clog2(NUM_Q),
  parameter int P_BITS    = $clog2(BUF_CELLS),
  parameter int L_BITS    = $clog2(BUF_CELLS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              ready,
  input  logic              enq,
  input  logic [Q_BITS-1:0] enq_q,
  input  cell_t             enq_cell,
  input  logic              enq_tag,
  input  logic              deq,
  input  logic [Q_BITS-1:0] deq_q,
  output cell_t             deq_cell,
  output logic              deq_tag,
  input  logic [Q_BITS-1:0] qry_q,
  output logic [L_BITS-1:0] qry_len,
  output logic              full,
  output logic [L_BITS-1:0] used
);
  cell_t             cells [BUF_CELLS];
  logic              tags  [BUF_CELLS];
  logic [P_BITS-1:0] nxt   [BUF_CELLS];
  logic [P_BITS-1:0] qhead [NUM_Q];
  logic [P_BITS-1:0] qtail [NUM_Q];
  logic [L_BITS-1:0] qlen  [NUM_Q];

  logic [L_BITS-1:0] fresh_q;     // slots never used yet start here
  logic [P_BITS-1:0] free_head_q; // LIFO of returned slots
  logic [L_BITS-1:0] free_cnt_q;
  logic [L_BITS-1:0] used_q;
  logic [Q_BITS:0]   init_q;

  logic [P_BITS-1:0] deq_slot, new_slot;
  logic              from_fresh, from_free;

  assign ready    = init_q[Q_BITS];
  assign full     = (used_q == L_BITS'(BUF_CELLS));
  assign used     = used_q;
  assign qry_len  = qlen[qry_q];
  assign deq_slot = qhead[deq_q];
  assign deq_cell = cells[deq_slot];
  assign deq_tag  = tags[deq_slot];

  always_comb begin
    from_fresh = 1'b0;
    from_free  = 1'b0;
    if (deq)                              new_slot = deq_slot;
    else if (fresh_q != L_BITS'(BUF_CELLS)) begin
      new_slot   = P_BITS'(fresh_q);
      from_fresh = enq;
    end else begin
      new_slot   = free_head_q;
      from_free  = enq;
    end
  end

  // Cell storage and link table (no reset: every slot is written before use).
  always_ff @(posedge clk) begin
    if (enq) begin
      cells[new_slot] <= enq_cell;
      tags[new_slot]  <= enq_tag;
    end
    if (deq && !enq)
      nxt[deq_slot] <= free_head_q;              // freed slot onto free list
    else if (enq && qlen[enq_q] != '0 && !(deq && deq_q == enq_q && qlen[deq_q] == L_BITS'(1)))
      nxt[qtail[enq_q]] <= new_slot;             // append to queue
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fresh_q     <= '0;
      free_head_q <= '0;
      free_cnt_q  <= '0;
      used_q      <= '0;
      init_q      <= '0;
    end else if (!ready) begin
      qlen[init_q[Q_BITS-1:0]] <= '0;
      init_q <= init_q + 1'b1;
    end else begin
      // queue tables
      if (deq && enq && deq_q == enq_q) begin
        if (qlen[deq_q] == L_BITS'(1)) qhead[deq_q] <= new_slot;
        else                           qhead[deq_q] <= nxt[deq_slot];
        qtail[enq_q] <= new_slot;
      end else begin
        if (deq) begin
          qhead[deq_q] <= nxt[deq_slot];
          qlen[deq_q]  <= qlen[deq_q] - 1'b1;
        end
        if (enq) begin
          if (qlen[enq_q] == '0) qhead[enq_q] <= new_slot;
          qtail[enq_q] <= new_slot;
          qlen[enq_q]  <= qlen[enq_q] + 1'b1;
        end
      end
      // free-slot bookkeeping
      if (from_fresh) fresh_q <= fresh_q + 1'b1;
      if (from_free) begin
        free_head_q <= nxt[free_head_q];
        free_cnt_q  <= free_cnt_q - 1'b1;
      end
      if (deq && !enq) begin
        free_head_q <= deq_slot;
        free_cnt_q  <= free_cnt_q + 1'b1;
      end
      used_q <= used_q + L_BITS'(enq) - L_BITS'(deq);
    end
  end

  a_deq_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    deq |-> ready && qlen[deq_q] != '0);
  a_enq_room: assert property (@(posedge clk) disable iff (!rst_n)
    enq |-> ready && (!full || deq));

endmodule
