// bpb_tb: random test of the branch prediction buffer against a reference table.
//
// Random counter writes and fetch addresses in a small window; after every step it
// compares per-slot hits and counters, the nearest-hit prediction and slot, the
// read/write clash flag (write to a bank/index being read in the same cycle) and the
// count of valid entries with a model of {valid, tag, counter} per bank and index.
// Reads are combinational, writes take effect at the next clock; both are checked.
module bpb_tb;
  import mips_pkg::*;
  localparam int unsigned IDX_W = 4;
  localparam int unsigned E = 1 << IDX_W;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [31:0] pc = '0, wa = '0;
  logic [1:0]  wc = '0;
  logic        wr = 0, hit, conf;
  logic [1:0]  pred, slot;
  logic [3:0]  sh;
  logic [3:0][1:0] sc;
  logic [IDX_W+2:0] nv;
  bpb #(.IDX_W(IDX_W)) dut (.clk, .rst, .pc_i(pc), .wr_i(wr), .wr_addr_i(wa), .wr_ctr_i(wc),
    .hit_o(hit), .pred_o(pred), .slot_o(slot), .slot_hit_o(sh), .slot_ctr_o(sc),
    .conflict_o(conf), .nvalid_o(nv));

  logic        mv [4][E];
  logic [11-IDX_W:0] mt [4][E];
  logic [1:0]  mc [4][E];
  int checks = 0, failures = 0;
  task automatic check(string w, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask

  task automatic compare();
    logic [3:0] eh; logic [1:0] ep, es; logic ec; int n;
    eh = '0; ep = '0; es = '0; ec = 0; n = 0;
    for (int k = 0; k < 4; k++) begin
      logic [31:0] a; a = pc + 32'(4 * k);
      eh[k] = mv[a[3:2]][a[IDX_W+3:4]] && mt[a[3:2]][a[IDX_W+3:4]] == a[15:IDX_W+4];
      if (eh[k]) check("slot ctr", 32'(sc[k]), 32'(mc[a[3:2]][a[IDX_W+3:4]]));
      if (wr && wa[IDX_W+3:2] == a[IDX_W+3:2]) ec = 1;
    end
    for (int k = 3; k >= 0; k--)
      if (eh[k]) begin
        logic [31:0] a; a = pc + 32'(4 * k);
        es = 2'(k); ep = mc[a[3:2]][a[IDX_W+3:4]];
      end
    for (int b = 0; b < 4; b++) for (int e = 0; e < E; e++) n += int'(mv[b][e]);
    check("slot hits", 32'(sh), 32'(eh));
    check("hit", 32'(hit), 32'(|eh));
    if (|eh) begin check("pred", 32'(pred), 32'(ep)); check("slot", 32'(slot), 32'(es)); end
    check("conflict", 32'(conf), 32'(ec));
    check("nvalid", 32'(nv), 32'(n));
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    for (int b = 0; b < 4; b++) for (int e = 0; e < E; e++) begin mv[b][e] = 0; mt[b][e] = '0; mc[b][e] = '0; end
    @(posedge clk); #1 rst = 0;
    compare();
    for (int i = 0; i < 800; i++) begin
      wr = ($urandom % 2) == 0;
      wa = {16'h0, 4'($urandom % 3), 10'($urandom), 2'b00};
      wc = 2'($urandom);
      pc = {16'h0, 4'($urandom % 3), 10'($urandom), 2'b00};
      #1 compare();
      @(posedge clk); #1;
      if (wr) begin
        mv[wa[3:2]][wa[IDX_W+3:4]] = 1;
        mt[wa[3:2]][wa[IDX_W+3:4]] = wa[15:IDX_W+4];
        mc[wa[3:2]][wa[IDX_W+3:4]] = wc;
      end
    end
    rst = 1; wr = 0; @(posedge clk); #1 rst = 0;
    for (int b = 0; b < 4; b++) for (int e = 0; e < E; e++) mv[b][e] = 0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
