// pointer_buffer_tb: random test of the issue and commit pointer buffers.
//
// Each cycle drives random issue writes (up to four, later slots win), random commits
// (up to four, in program order, each returning the pointer it replaces) and an
// occasional restore, and compares the eight issue-side read ports, the old-pointer
// outputs and the committed-map read port with two model tables. Reads are
// combinational; writes and the restore copy (commit-side table, including commits of
// the same cycle, into the issue-side table) must be visible one clock later.
// Row 0 must always read 0; reset must clear every row.
module pointer_buffer_tb;
  import mips_pkg::*;
  logic clk = 0, rst = 1, restore = 0;
  always #5 clk = ~clk;
  lreg_t [7:0] ra = '0;
  pptr_t [7:0] rd;
  logic  [3:0] we = '0, ce = '0;
  lreg_t [3:0] wa = '0, ca = '0;
  pptr_t [3:0] wd = '0, cd = '0, old;
  lreg_t aa = '0;
  pptr_t ad;
  pointer_buffer dut (.clk, .rst, .restore_i(restore), .raddr_i(ra), .rdata_o(rd),
    .we_i(we), .waddr_i(wa), .wdata_i(wd), .ce_i(ce), .caddr_i(ca), .cdata_i(cd),
    .old_o(old), .arch_raddr_i(aa), .arch_rdata_o(ad));
  pptr_t mi [32], mc [32];
  int checks = 0, failures = 0, restores = 0;
  task automatic check(string w, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
  initial begin
    for (int r = 0; r < 32; r++) begin mi[r] = '0; mc[r] = '0; end
    @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 1500; t++) begin
      pptr_t cn [32];
      for (int i = 0; i < 8; i++) ra[i] = lreg_t'($urandom);
      for (int k = 0; k < 4; k++) begin
        we[k] = $urandom % 2; wa[k] = lreg_t'($urandom % 8); wd[k] = pptr_t'($urandom);
        ce[k] = $urandom % 2; ca[k] = lreg_t'($urandom % 8); cd[k] = pptr_t'($urandom);
      end
      restore = ($urandom % 16) == 0;
      aa = lreg_t'($urandom % 8);
      #1;
      for (int i = 0; i < 8; i++) check("ipb read", 32'(rd[i]), 32'(ra[i] == 0 ? '0 : mi[ra[i]]));
      check("cpb read", 32'(ad), 32'(mc[aa]));
      cn = mc;
      for (int k = 0; k < 4; k++) begin
        check("old pointer", 32'(old[k]), 32'(cn[ca[k]]));
        if (ce[k] && ca[k] != 0) cn[ca[k]] = cd[k];
      end
      @(posedge clk); #1;
      mc = cn;
      if (restore) begin mi = cn; restores++; end
      else for (int k = 0; k < 4; k++) if (we[k] && wa[k] != 0) mi[wa[k]] = wd[k];
    end
    rst = 1; @(posedge clk); #1 rst = 0;
    for (int r = 0; r < 32; r++) begin
      aa = lreg_t'(r); ra[0] = lreg_t'(r); #1;
      check("reset cpb", 32'(ad), 0); check("reset ipb", 32'(rd[0]), 0);
    end
    checks++; if (restores == 0) begin failures++; $display("FAIL no restore"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
