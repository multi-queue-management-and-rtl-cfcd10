// tb_vc_translate: self-checking test of the VP/VC lookup stage.
// A table of random connections is written into a small instance; cells of
// known and unknown connections, management cells (payload types 100, 101,
// 110) and cells of processor-terminated connections are sent with random
// output stalls. A reference map predicts for every cell whether it is
// discarded, its VC number, the processor flag and the translated header,
// and the test checks that cells leave in order one cycle after entry.
module tb_vc_translate;
  import muqpro_pkg::*;
  localparam int TB = 6, VB = 6;
  logic clk = 0, rst_n = 0, ready;
  logic tw_en = 0, tw_valid, tw_to_ep;
  logic [TB-1:0] tw_idx;
  logic [VPI_BITS-1:0] tw_match_vpi, tw_new_vpi;
  logic [VCI_BITS-1:0] tw_match_vci, tw_new_vci;
  logic [VB-1:0] tw_vc, out_vc;
  logic in_valid = 0, in_ready, out_valid, out_ready, out_to_ep, miss;
  cell_t in_cell, out_cell;
  int checks = 0, failures = 0;

  vc_translate #(.TBL_BITS(TB), .VPI_IDX(2), .VC_BITS(VB)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit v; logic [11:0] vpi; logic [15:0] vci, nvci; logic [11:0] nvpi; int vc; bit ep; } rent_t;
  rent_t tbl [1 << TB];
  typedef struct { bit drop; cell_t c; int vc; bit ep; } exp_t;
  exp_t expq [$];
  int sent = 0, got = 0, drops = 0;

  function automatic int idx_of(logic [11:0] vpi, logic [15:0] vci);
    return int'({vpi[1:0], vci[TB-3:0]});
  endfunction

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("%s", msg); end
  endtask

  // output side: random backpressure, compare in order
  always @(posedge clk) if (rst_n) begin
    if (miss) begin
      exp_t e;
      e = expq.pop_front();
      chk(e.drop, "unexpected miss");
      drops++;
    end
    if (out_valid && out_ready) begin
      exp_t e;
      e = expq.pop_front();
      chk(!e.drop && out_cell == e.c && int'(out_vc) == e.vc && out_to_ep == e.ep,
          $sformatf("cell %0d mismatch vc %0d/%0d ep %0b/%0b", got, out_vc, e.vc, out_to_ep, e.ep));
      got++;
    end
  end

  initial begin
    out_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (ready);
    // fill table
    for (int i = 0; i < (1 << TB); i++) begin
      rent_t r;
      r.v = $urandom_range(0, 4) != 0;
      r.vci = 16'($urandom); r.vpi = 12'($urandom);
      r.vci[TB-3:0] = (TB-2)'(i); r.vpi[1:0] = 2'(i >> (TB-2));
      r.nvpi = 12'($urandom); r.nvci = 16'($urandom);
      r.vc = $urandom_range(0, (1 << VB) - 1); r.ep = $urandom_range(0, 7) == 0;
      tbl[i] = r;
      @(negedge clk);
      tw_en = 1; tw_idx = TB'(i); tw_valid = r.v; tw_match_vpi = r.vpi; tw_match_vci = r.vci;
      tw_new_vpi = r.nvpi; tw_new_vci = r.nvci; tw_vc = VB'(r.vc); tw_to_ep = r.ep;
      @(posedge clk); #1 tw_en = 0;
    end
    for (int n = 0; n < 3000; n++) begin
      cell_t c; exp_t e; rent_t r; int k;
      for (int i = 0; i < $bits(cell_t) / 32; i++) c[i*32 +: 32] = $urandom;
      k = $urandom_range(0, (1 << TB) - 1);
      r = tbl[k];
      if ($urandom_range(0, 3) != 0) begin c.hdr.vpi = r.vpi; c.hdr.vci = r.vci; end
      else begin  // same index, different tag
        c.hdr.vpi = r.vpi; c.hdr.vci = r.vci; c.hdr.vci[15] = ~r.vci[15];
      end
      c.hdr.pt = 3'($urandom_range(0, 7));
      r = tbl[idx_of(c.hdr.vpi, c.hdr.vci)];
      e.c = c;
      e.drop = !(r.v && r.vpi == c.hdr.vpi && r.vci == c.hdr.vci);
      e.vc = r.vc;
      e.ep = r.ep || (c.hdr.pt inside {3'b100, 3'b101, 3'b110});
      if (!e.ep) begin e.c.hdr.vpi = r.nvpi; e.c.hdr.vci = r.nvci; end
      @(negedge clk);
      out_ready = $urandom_range(0, 3) != 0;
      in_valid = 1; in_cell = c;
      @(posedge clk);
      while (!in_ready) begin
        @(negedge clk); out_ready = $urandom_range(0, 3) != 0; @(posedge clk);
      end
      expq.push_back(e);
      sent++;
      #1 in_valid = 0;
    end
    @(negedge clk); out_ready = 1;
    repeat (5) @(posedge clk);
    chk(got + drops == sent && expq.size() == 0, $sformatf("sent %0d got %0d dropped %0d", sent, got, drops));
    chk(drops > 0 && got > 0, "no misses or no hits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
