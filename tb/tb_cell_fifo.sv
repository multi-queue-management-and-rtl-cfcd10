// tb_cell_fifo: self-checking test of the cell FIFO towards the embedded
// processor. Random writes and reads with random stalls on both sides fill
// and drain a depth-4 instance; a queue model predicts each cell and VC
// number, the level, and when the FIFO refuses input because it is full.
module tb_cell_fifo;
  import muqpro_pkg::*;
  localparam int D = 4, VB = 5;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  cell_t in_cell, out_cell;
  logic [VB-1:0] in_vc, out_vc;
  logic [2:0] level;
  int checks = 0, failures = 0, fulls = 0;

  cell_fifo #(.DEPTH(D), .VC_BITS(VB)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { cell_t c; logic [VB-1:0] v; } e_t;
  e_t m [$];

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("%s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 10000; t++) begin
      e_t e;
      @(negedge clk);
      in_valid = $urandom_range(0, 99) < ((t / 300) % 2 ? 80 : 30);
      out_ready = $urandom_range(0, 99) < ((t / 300) % 2 ? 30 : 80);
      for (int i = 0; i < $bits(cell_t) / 32; i++) in_cell[i*32 +: 32] = $urandom;
      in_vc = VB'($urandom);
      #1;
      chk(int'(level) == m.size() && in_ready == (m.size() < D) && out_valid == (m.size() > 0),
          $sformatf("t=%0d level %0d/%0d", t, level, m.size()));
      if (!in_ready) fulls++;
      if (out_valid && out_ready) begin
        e = m.pop_front();
        chk(out_cell == e.c && out_vc == e.v, $sformatf("t=%0d data mismatch", t));
      end
      if (in_valid && in_ready) begin
        e.c = in_cell; e.v = in_vc; m.push_back(e);
      end
      @(posedge clk);
    end
    chk(fulls > 0, "never full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
