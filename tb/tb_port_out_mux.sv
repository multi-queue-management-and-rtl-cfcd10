// tb_port_out_mux: self-checking test of the port output multiplexer.
// Cells and credit-return counts of 0..2 per clock arrive at random while
// the link stalls at random. The test checks that no credit or cell is
// lost or duplicated, that pending credits are sent before cells, that the
// cell field is zero on a credit, and that with level-1 credits disabled
// only cells are sent.
module tb_port_out_mux;
  import muqpro_pkg::*;
  logic clk = 0, rst_n = 0, l1_en;
  logic cell_valid = 0, cell_ready, link_valid, link_ready, link_is_credit;
  cell_t cell_in, link_cell;
  logic [1:0] ret;
  logic [15:0] pending;
  int checks = 0, failures = 0;

  port_out_mux dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("%s", msg); end
  endtask

  int mpend;
  cell_t cq [$];

  initial begin
    ret = 0; l1_en = 1; link_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    mpend = 0;
    for (int t = 0; t < 8000; t++) begin
      @(negedge clk);
      if (t == 6000) begin l1_en = 0; mpend = 0; end
      if (!cell_valid || cell_ready) begin
        cell_valid = $urandom_range(0, 1);
        for (int i = 0; i < $bits(cell_t) / 32; i++) cell_in[i*32 +: 32] = $urandom;
      end
      ret = 2'($urandom_range(0, 99) < 70 ? 0 : $urandom_range(1, 2));
      link_ready = $urandom_range(0, 3) != 0;
      #1;
      chk(int'(pending) == mpend, $sformatf("t=%0d pending %0d/%0d", t, pending, mpend));
      if (l1_en && mpend > 0)
        chk(link_valid && link_is_credit && link_cell == '0 && !cell_ready, $sformatf("t=%0d credit not first", t));
      else
        chk(link_valid == cell_valid && !link_is_credit && (!cell_valid || link_cell == cell_in) &&
            cell_ready == link_ready, $sformatf("t=%0d cell path", t));
      if (l1_en) mpend += int'(ret) - ((mpend > 0 && link_ready) ? 1 : 0);
      @(posedge clk);
      if (t == 6000) mpend = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
