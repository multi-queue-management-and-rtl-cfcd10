// vc_active_lists: per-class round-robin lists of the VCs ready to send.
//
// Within a service class, VCs are served one cell at a time in round-robin
// order. This block keeps, for every class, a singly linked list of the VCs
// of that class that are ready (non-empty queue and allowed to send). The
// list head is the VC to serve next; the controller pops it and, if the VC
// is still ready after sending one cell, pushes it back at the tail. The
// length of list i is N_i, the ready-VC count used by the class scheduler.
// All lists share one next-pointer table indexed by VC number, which works
// because a VC belongs to one class and is on its list at most once. How
// the lists are stored is this design's choice; the design calls only for
// linked-list pointers held in the management SRAM.
// Interface: one push and one pop per cycle, in any classes (also the same
// one). `pop_vc` is the head of list `pop_class`, read combinationally.
// Popping an empty list is illegal (asserted).
module vc_active_lists #(
  parameter int NUM_CLASS = 6,
  parameter int NUM_VC    = 4096,
  parameter int VC_BITS   = $clog2(NUM_VC),
  parameter int N_BITS    = VC_BITS + 1,
  parameter int CW        = $clog2(NUM_CLASS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push,
  input  logic [VC_BITS-1:0]     push_vc,
  input  logic [CW-1:0]          push_class,
  input  logic                   pop,
  input  logic [CW-1:0]          pop_class,
  output logic [VC_BITS-1:0]     pop_vc,
  output logic [NUM_CLASS-1:0][N_BITS-1:0] count
);
  logic [VC_BITS-1:0] nxt  [NUM_VC];
  logic [VC_BITS-1:0] head [NUM_CLASS];
  logic [VC_BITS-1:0] tail [NUM_CLASS];
  logic [N_BITS-1:0]  cnt  [NUM_CLASS];

  assign pop_vc = head[pop_class];

  always_ff @(posedge clk) begin
    if (push && cnt[push_class] != '0 && !(pop && pop_class == push_class && cnt[push_class] == N_BITS'(1)))
      nxt[tail[push_class]] <= push_vc;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < NUM_CLASS; c++) begin
        cnt[c]  <= '0;
        head[c] <= '0;
        tail[c] <= '0;
      end
    end else begin
      for (int c = 0; c < NUM_CLASS; c++) begin
        logic do_push, do_pop;
        do_push = push && push_class == CW'(c);
        do_pop  = pop  && pop_class  == CW'(c);
        if (do_push) tail[c] <= push_vc;
        if (do_pop && do_push && cnt[c] == N_BITS'(1))
          head[c] <= push_vc;
        else if (do_pop)
          head[c] <= nxt[head[c]];
        else if (do_push && cnt[c] == '0)
          head[c] <= push_vc;
        cnt[c] <= cnt[c] + N_BITS'(do_push) - N_BITS'(do_pop);
      end
    end
  end

  always_comb
    for (int c = 0; c < NUM_CLASS; c++) count[c] = cnt[c];

  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    pop |-> cnt[pop_class] != '0);
  a_push_room: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> cnt[push_class] != N_BITS'(NUM_VC) || (pop && pop_class == push_class));

endmodule
