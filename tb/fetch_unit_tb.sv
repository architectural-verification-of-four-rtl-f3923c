// fetch_unit_tb: random test of the fetch stage with its two predictors.
//
// The instruction memory is a 256-word array with random branches and jumps sprinkled
// among ALU words. Each cycle the testbench may write the BTB or BPB (as commit would),
// stall the stage or restore it to a random address. A reference model holds the
// predictor contents and applies the block rules: no branch -> four slots, PC+16;
// branch in slot 3 -> three slots, PC+12; predicted taken at slot k (BTB and BPB hits
// at k, counter >= 2) -> slots 0..k+1, target; second branch after the delay slot ->
// slots 0..k+1, PC+4(k+2); otherwise four slots, PC+16. One clock after each step it
// checks the registered block (valid mask, PC, words, taken bits, target, per-slot BPB
// state), the next fetch address, that a predictor write or read/write clash inserts an
// empty block, and that stall and restore behave.
module fetch_unit_tb;
  import mips_pkg::*;
  localparam int unsigned IDX_W = 4;
  localparam int unsigned E = 1 << IDX_W;
  logic clk = 0, rst = 1, stall = 0, restore = 0, btw = 0, bpw = 0;
  always #5 clk = ~clk;
  logic [31:0] rpc = '0, iaddr, btwa = '0, btwt = '0, bpwa = '0, pco, tgt;
  logic [1:0] bpwc = '0;
  logic [3:0][31:0] imem_o, ins;
  logic [3:0] vo, pt;
  logic [3:0][2:0] pinf;
  logic fst;
  logic [IDX_W+2:0] bn, pn;
  logic [31:0] imem [256];
  always_comb for (int k = 0; k < 4; k++) imem_o[k] = imem[8'((iaddr >> 2) + 32'(k))];
  fetch_unit #(.RESET_PC(32'h0), .IDX_W(IDX_W)) dut (.clk, .rst, .stall_i(stall),
    .restore_i(restore), .restore_pc_i(rpc), .imem_addr_o(iaddr), .imem_i(imem_o),
    .btb_wr_i(btw), .btb_wr_addr_i(btwa), .btb_wr_bta_i(btwt), .bpb_wr_i(bpw),
    .bpb_wr_addr_i(bpwa), .bpb_wr_ctr_i(bpwc), .valid_o(vo), .pc_o(pco), .instr_o(ins),
    .pred_taken_o(pt), .pred_target_o(tgt), .pred_info_o(pinf), .fstall_o(fst),
    .btb_nvalid_o(bn), .bpb_nvalid_o(pn));
  logic bv [4][E], pv [4][E];
  logic [11-IDX_W:0] bt [4][E], ptg [4][E];
  logic [31:0] bb [4][E];
  logic [1:0] pc2 [4][E];
  int checks = 0, failures = 0, ntaken = 0, nrefetch = 0, nslot3 = 0, nfst = 0;
  task automatic check(string w, logic [63:0] g, logic [63:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  function automatic logic [31:0] br(int k);
    case ($urandom % 3)
      0: return {6'h05, 5'd8, 5'd9, 16'($urandom % 40 - 20)};   // bne
      1: return {6'h02, 26'($urandom % 256)};                    // j
      default: return {6'h00, 5'd31, 15'd0, 6'h08};             // jr
    endcase
  endfunction
  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
  initial begin
    logic [31:0] pcm;
    for (int i = 0; i < 256; i++) imem[i] = ($urandom % 4 == 0) ? br(i) : {6'h09, 5'd1, 5'd2, 16'(i)};
    for (int b = 0; b < 4; b++) for (int e = 0; e < E; e++) begin bv[b][e] = 0; pv[b][e] = 0; bt[b][e] = 0; ptg[b][e] = 0; bb[b][e] = 0; pc2[b][e] = 0; end
    @(posedge clk); #1 rst = 0;
    pcm = 0;
    for (int t = 0; t < 3000; t++) begin
      logic [3:0] bjm, em, etk; int k0; logic found, second, taken, efs, conf;
      logic [31:0] enext; logic [3:0] sh; logic [3:0] bh;
      // predictor writes: train on branch addresses in the program
      btw = $urandom % 8 == 0; bpw = $urandom % 5 == 0;
      btwa = 4 * ($urandom % 256); btwt = 4 * ($urandom % 256);
      bpwa = ($urandom % 2) ? btwa : 4 * ($urandom % 256); bpwc = 2'($urandom);
      stall = $urandom % 10 == 0; restore = $urandom % 40 == 0; rpc = 4 * ($urandom % 256);
      #1;
      check("fetch address", 64'(iaddr), 64'(pcm));
      // reference block decision
      found = 0; k0 = 0; second = 0; conf = 0;
      for (int k = 3; k >= 0; k--) begin bjm[k] = is_bj(imem[8'(pcm / 4 + k)]); if (bjm[k]) begin found = 1; k0 = k; end end
      for (int k = 0; k < 4; k++) if (found && k > k0 + 1 && bjm[k]) second = 1;
      for (int k = 0; k < 4; k++) begin
        logic [31:0] a; a = pcm + 4 * k;
        bh[k] = bv[a[3:2]][a[IDX_W+3:4]] && bt[a[3:2]][a[IDX_W+3:4]] == a[15:IDX_W+4];
        sh[k] = pv[a[3:2]][a[IDX_W+3:4]] && ptg[a[3:2]][a[IDX_W+3:4]] == a[15:IDX_W+4];
        if (bpw && bpwa[IDX_W+3:2] == a[IDX_W+3:2]) conf = 1;
      end
      begin
        int fb, fp; fb = -1; fp = -1;
        for (int k = 3; k >= 0; k--) begin if (bh[k]) fb = k; if (sh[k]) fp = k; end
        taken = 0;
        if (found) begin
          logic [31:0] a; a = pcm + 4 * k0;
          taken = !btw && fb == k0 && fp == k0 && pc2[a[3:2]][a[IDX_W+3:4]][1];
        end
      end
      efs = btw || conf;
      check("fetch stall flag", 64'(fst), 64'(efs));
      em = 4'b1111; etk = 0; enext = pcm + 16;
      if (found && k0 == 3) begin em = 4'b0111; enext = pcm + 12; end
      else if (found && taken) begin
        logic [31:0] a; a = pcm + 4 * k0;
        em = 4'((1 << (k0 + 2)) - 1); etk[k0] = 1; enext = bb[a[3:2]][a[IDX_W+3:4]];
      end else if (found && second) begin em = 4'((1 << (k0 + 2)) - 1); enext = pcm + 4 * (k0 + 2); end
      @(posedge clk); #1;
      if (restore) begin
        check("restore empties block", 64'(vo), 0);
        pcm = rpc;
      end else if (stall) begin
        ;
      end else if (efs) begin
        check("stall inserts empty block", 64'(vo), 0); nfst++;
      end else begin
        check("valid mask", 64'(vo), 64'(em));
        check("block pc", 64'(pco), 64'(pcm));
        for (int k = 0; k < 4; k++) check("word", 64'(ins[k]), 64'(imem[8'(pcm / 4 + k)]));
        check("taken bits", 64'(pt), 64'(etk));
        if (etk != 0) check("target", 64'(tgt), 64'(enext));
        for (int k = 0; k < 4; k++) if (sh[k]) begin
          logic [31:0] a; a = pcm + 4 * k;
          check("bpb state", 64'(pinf[k]), 64'({1'b1, pc2[a[3:2]][a[IDX_W+3:4]]}));
        end
        if (etk != 0) ntaken++; else if (found && k0 == 3) nslot3++; else if (found && second) nrefetch++;
        pcm = enext;
      end
      if (btw) begin bv[btwa[3:2]][btwa[IDX_W+3:4]] = 1; bt[btwa[3:2]][btwa[IDX_W+3:4]] = btwa[15:IDX_W+4]; bb[btwa[3:2]][btwa[IDX_W+3:4]] = btwt; end
      if (bpw) begin pv[bpwa[3:2]][bpwa[IDX_W+3:4]] = 1; ptg[bpwa[3:2]][bpwa[IDX_W+3:4]] = bpwa[15:IDX_W+4]; pc2[bpwa[3:2]][bpwa[IDX_W+3:4]] = bpwc; end
    end
    checks++;
    if (ntaken == 0 || nrefetch == 0 || nslot3 == 0 || nfst == 0) begin
      failures++; $display("FAIL coverage taken=%0d refetch=%0d slot3=%0d fstall=%0d", ntaken, nrefetch, nslot3, nfst);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
