// btb_tb: random test of the branch target buffer against a reference table.
//
// Drives random writes (addresses confined to a small window so that reads hit often)
// and random fetch addresses; after every clock it compares the per-slot hits, the
// selected target (nearest hit to PC), the slot number, the write-busy stall and the
// count of valid entries with a model holding {valid, tag, target} per bank and index.
// Reads are combinational (zero cycles), writes visible one clock later, both checked.
module btb_tb;
  import mips_pkg::*;
  localparam int unsigned IDX_W = 4;
  localparam int unsigned E = 1 << IDX_W;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [31:0] pc = '0, wa = '0, wbta = '0;
  logic        wr = 0, hit, busy;
  logic [31:0] bta;
  logic [1:0]  slot;
  logic [3:0]  sh;
  logic [IDX_W+2:0] nv;
  btb #(.IDX_W(IDX_W)) dut (.clk, .rst, .pc_i(pc), .wr_i(wr), .wr_addr_i(wa), .wr_bta_i(wbta),
    .hit_o(hit), .bta_o(bta), .slot_o(slot), .slot_hit_o(sh), .busy_o(busy), .nvalid_o(nv));

  logic        mv [4][E];
  logic [11-IDX_W:0] mt [4][E];
  logic [31:0] mb [4][E];
  int checks = 0, failures = 0;
  task automatic check(string w, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask

  task automatic compare();
    logic [3:0] eh; logic [31:0] eb; logic [1:0] es; int n;
    eh = '0; eb = '0; es = '0; n = 0;
    for (int k = 0; k < 4; k++) begin
      logic [31:0] a; a = pc + 32'(4 * k);
      eh[k] = !wr && mv[a[3:2]][a[IDX_W+3:4]] && mt[a[3:2]][a[IDX_W+3:4]] == a[15:IDX_W+4];
    end
    for (int k = 3; k >= 0; k--)
      if (eh[k]) begin
        logic [31:0] a; a = pc + 32'(4 * k);
        es = 2'(k); eb = mb[a[3:2]][a[IDX_W+3:4]];
      end
    for (int b = 0; b < 4; b++) for (int e = 0; e < E; e++) n += int'(mv[b][e]);
    check("slot hits", 32'(sh), 32'(eh));
    check("hit", 32'(hit), 32'(|eh));
    if (|eh) begin check("bta", bta, eb); check("slot", 32'(slot), 32'(es)); end
    check("busy", 32'(busy), 32'(wr));
    check("nvalid", 32'(nv), 32'(n));
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    for (int b = 0; b < 4; b++) for (int e = 0; e < E; e++) begin mv[b][e] = 0; mt[b][e] = '0; mb[b][e] = '0; end
    @(posedge clk); #1 rst = 0;
    compare();
    for (int i = 0; i < 600; i++) begin
      wr   = ($urandom % 3) == 0;
      wa   = {16'h0, 4'($urandom % 3), 10'($urandom), 2'b00};
      wbta = $urandom & ~32'h3;
      pc   = {16'h0, 4'($urandom % 3), 10'($urandom), 2'b00};
      #1 compare();
      @(posedge clk); #1;
      if (wr) begin
        mv[wa[3:2]][wa[IDX_W+3:4]] = 1;
        mt[wa[3:2]][wa[IDX_W+3:4]] = wa[15:IDX_W+4];
        mb[wa[3:2]][wa[IDX_W+3:4]] = wbta;
        // written entry must be readable in the next cycle
        wr = 0; pc = wa; #1 compare();
        check("write then read", 32'(hit && slot == 0 && bta == wbta), 32'd1);
      end
    end
    // reset clears every entry
    rst = 1; @(posedge clk); #1 rst = 0;
    for (int b = 0; b < 4; b++) for (int e = 0; e < E; e++) mv[b][e] = 0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
