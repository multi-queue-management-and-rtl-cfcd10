// tb_cell_queue_mgr: self-checking test of the per-VC cell queues.
// A small instance (8 queues, 16 buffer slots) gets random enqueues and
// dequeues, often in the same cycle and on the same queue, and is driven
// to a full buffer. A model of SystemVerilog queues predicts every dequeued
// cell and tag, every queue length, the occupancy and the full flag; the
// length of the reset sweep is checked too.
module tb_cell_queue_mgr;
  import muqpro_pkg::*;
  localparam int NQ = 8, NB = 16, QB = 3, LB = 5;
  logic clk = 0, rst_n = 0, ready;
  logic enq = 0, deq = 0, enq_tag, deq_tag, full;
  logic [QB-1:0] enq_q, deq_q, qry_q;
  cell_t enq_cell, deq_cell;
  logic [LB-1:0] qry_len, used;
  int checks = 0, failures = 0;

  cell_queue_mgr #(.NUM_Q(NQ), .BUF_CELLS(NB)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { cell_t c; bit t; } ent_t;
  ent_t mq [NQ][$];
  int total = 0;

  function automatic cell_t rnd_cell();
    cell_t c;
    for (int i = 0; i < $bits(cell_t) / 32; i++) c[i*32 +: 32] = $urandom;
    return c;
  endfunction

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("%s", msg);
    end
  endtask

  initial begin
    int cyc;
    qry_q = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    cyc = 0;
    @(posedge clk);
    while (!ready) begin @(posedge clk); cyc++; end
    chk(cyc == NQ - 1, $sformatf("init sweep took %0d cycles", cyc + 1));
    for (int t = 0; t < 20000; t++) begin
      int dq, eq;
      bit de, dd;
      ent_t e;
      @(negedge clk);
      // bias towards filling up in some phases, draining in others
      dq = $urandom_range(0, NQ - 1);
      eq = $urandom_range(0, NQ - 1);
      dd = mq[dq].size() > 0 && ($urandom_range(0, 99) < ((t / 500) % 2 ? 70 : 30));
      de = (total < NB || dd) && ($urandom_range(0, 99) < ((t / 500) % 2 ? 30 : 70));
      if ($urandom_range(0, 3) == 0) eq = dq;
      deq = dd; deq_q = QB'(dq);
      enq = de; enq_q = QB'(eq);
      enq_cell = rnd_cell(); enq_tag = 1'($urandom);
      qry_q = QB'($urandom_range(0, NQ - 1));
      #1;
      chk(int'(qry_len) == mq[qry_q].size(), $sformatf("len q%0d %0d vs %0d", qry_q, qry_len, mq[qry_q].size()));
      chk(full == (total == NB) && int'(used) == total, $sformatf("full/used %0b %0d vs %0d", full, used, total));
      if (dd) begin
        e = mq[dq].pop_front();
        chk(deq_cell == e.c && deq_tag == e.t, $sformatf("t=%0d deq q%0d wrong cell", t, dq));
        total--;
      end
      if (de) begin
        e.c = enq_cell; e.t = enq_tag;
        mq[eq].push_back(e);
        total++;
      end
      @(posedge clk);
    end
    @(negedge clk); enq = 0; deq = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
