// reorder_buffer_tb: random test of the reorder buffer's allocation, completion, the two
// commit stages and the misprediction restore.
//
// Blocks of one to four instructions (plain, store, branch with or without a delay
// slot, occasionally BREAK) are allocated when at least four slots are free; results
// complete in random order over the two buses and the branch bus (random
// misprediction, direction and target); commit is randomly held. A program-order model
// computes, before each clock, the group commit I must select (complete prefix of up to
// four, one branch at most, a mispredicted branch only together with its delay-slot
// instruction, BREAK ends the group). One clock later (commit II) it checks the commit
// valid bits and destinations, the store count, the BPB and BTB update, and restore
// with its restart address; after a restore the buffer must be empty. Also checks the
// tags handed to allocated slots and the free count.
module reorder_buffer_tb;
  import mips_pkg::*;
  localparam int unsigned DEPTH = 64;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic alloc = 0, bbv = 0, hold = 0;
  logic [3:0] sv = '0, wb = '0, bj = '0, ds = '0, st = '0, brk = '0, done = '0;
  logic [3:0][31:0] pc = '0;
  lreg_t [3:0] ld = '0;
  pptr_t [3:0] pd = '0;
  rob_tag_t [3:0] tag;
  logic [6:0] free;
  rob_tag_t head;
  result_t [1:0] cdb = '0;
  logic [1:0] cv = '0;
  brbus_t bb = '0;
  logic [63:0] wsb = '0;
  logic [3:0] c_v, c_wb; lreg_t [3:0] c_ld; pptr_t [3:0] c_pd;
  logic [2:0] c_st; logic c_brk, c_br, bpw, btw, rs;
  logic [31:0] bpa, bta_a, bta, rpc; logic [1:0] bpc;
  reorder_buffer #(.DEPTH(DEPTH)) dut (.clk, .rst, .alloc_i(alloc), .slot_valid_i(sv), .pc_i(pc),
    .wb_i(wb), .ldest_i(ld), .pdest_i(pd), .is_bj_i(bj), .ds_instr_i(ds), .is_store_i(st),
    .is_break_i(brk), .done_i(done), .tag_o(tag), .free_o(free), .head_o(head), .cdb_i(cdb),
    .cdb_valid_i(cv), .brbus_valid_i(bbv), .brbus_i(bb), .wsb_i(wsb), .c_valid_o(c_v),
    .c_wb_o(c_wb), .c_ldest_o(c_ld), .c_pdest_o(c_pd), .c_stores_o(c_st), .c_break_o(c_brk),
    .c_branch_o(c_br), .bpb_wr_o(bpw), .bpb_addr_o(bpa), .bpb_ctr_o(bpc), .btb_wr_o(btw),
    .btb_addr_o(bta_a), .btb_bta_o(bta), .restore_o(rs), .restore_pc_o(rpc), .hold_i(hold));

  typedef struct { lreg_t ld; pptr_t pd; logic wb, bj, ds, st, brk, cmp, mis, tk;
                   logic [31:0] bta, pc; logic [1:0] ctr; } e_t;
  e_t q [$];
  int checks = 0, failures = 0, commits = 0, restores = 0, groups4 = 0;
  logic [31:0] pcn = 32'h400;
  logic last_ds = 0;
  task automatic check(string w, logic [63:0] g, logic [63:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
  initial begin
    logic prev_rs; prev_rs = 0;
    @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 4000; t++) begin
      int n; logic er, stop, bseen; int nst; int bi; rob_tag_t h0;
      e_t g [$];
      // ---- expected commit I group
      n = 0; er = 0; stop = 0; bseen = 0; bi = -1;
      for (int i = 0; i < 4 && !stop; i++) begin
        if (i >= q.size() || !q[i].cmp) break;
        if (q[i].bj) begin
          if (bseen) break;
          bseen = 1;
          if (q[i].mis) begin
            if (!q[i].ds) begin n = i + 1; er = 1; bi = i; end
            else if (i < 3 && i + 1 < q.size() && q[i + 1].cmp) begin n = i + 2; er = 1; bi = i; end
            stop = 1;
          end else begin n = i + 1; bi = i; end
        end else if (q[i].brk) begin n = i + 1; stop = 1; end
        else n = i + 1;
      end
      if (bi >= n) bi = -1;
      hold = $urandom % 10 == 0;
      if (hold || prev_rs) begin n = 0; er = 0; bi = -1; end
      // ---- completions
      cv = '0; bbv = 0; wsb = '0;
      if (!prev_rs) begin
        for (int b = 0; b < 2; b++) begin
          int k; k = $urandom % (q.size() + 1);
          if (k < q.size() && !q[k].cmp && !q[k].bj && !(b == 1 && cv[0] && cdb[0].reo == rob_tag_t'(head + k))) begin
            cv[b] = 1; cdb[b] = '0; cdb[b].reo = rob_tag_t'(head + k);
          end
        end
        begin
          int k; k = $urandom % (q.size() + 1);
          if (k < q.size() && !q[k].cmp && q[k].bj) begin
            bbv = 1; wsb = 64'(1) << rob_tag_t'(head + k);
            bb = '0; bb.mispred = $urandom % 3 == 0; bb.code[2] = $urandom % 2;
            bb.bta = $urandom & ~3; bb.correct_pred = 2'($urandom);
          end
        end
      end
      // ---- allocation
      alloc = !prev_rs && free >= 4 && $urandom % 2;
      sv = '0;
      if (alloc) begin
        int m; m = 1 + $urandom % 4;
        for (int k = 0; k < 4; k++) begin
          sv[k] = k < m; pc[k] = pcn + 4 * k;
          ld[k] = lreg_t'($urandom); pd[k] = pptr_t'($urandom); wb[k] = $urandom % 2;
          case ($urandom % 8)
            0, 1: begin bj[k] = 1; st[k] = 0; brk[k] = 0; end
            2:    begin bj[k] = 0; st[k] = 1; brk[k] = 0; end
            3:    begin bj[k] = 0; st[k] = 0; brk[k] = $urandom % 4 == 0; end
            default: begin bj[k] = 0; st[k] = 0; brk[k] = 0; end
          endcase
          if (last_ds) begin bj[k] = 0; brk[k] = 0; end   // no branch in a delay slot
          ds[k] = bj[k] && $urandom % 2; done[k] = !bj[k] && $urandom % 6 == 0;
          if (k < m) last_ds = ds[k];
        end
        pcn += 16;
      end
      #1;
      check("free", 64'(free), 64'(DEPTH - q.size()));
      check("head", 64'(head), 64'(head));
      begin
        int off; off = q.size();
        for (int k = 0; k < 4; k++) if (sv[k]) begin
          check("tag", 64'(tag[k]), 64'(rob_tag_t'(head + off))); off++;
        end
      end
      nst = 0; for (int i = 0; i < n; i++) nst += int'(q[i].st);
      h0 = head;
      g.delete();
      for (int i = 0; i < n; i++) g.push_back(q[i]);
      @(posedge clk); #1;
      // ---- commit II outputs
      for (int i = 0; i < 4; i++) begin
        check("commit valid", 64'(c_v[i]), 64'(i < n));
        if (i < n) check("commit dest", 64'({c_ld[i], c_pd[i], c_wb[i]}), 64'({g[i].ld, g[i].pd, g[i].wb}));
      end
      check("stores", 64'(c_st), 64'(nst));
      check("bpb write", 64'(bpw), 64'(bi >= 0));
      if (bi >= 0) begin
        check("bpb addr/ctr", 64'({bpa, bpc}), 64'({g[bi].pc, g[bi].ctr}));
        check("btb write", 64'(btw), 64'(g[bi].mis && g[bi].tk));
        if (btw) check("btb addr/target", {bta_a, bta}, {g[bi].pc, g[bi].bta});
      end else check("btb idle", 64'(btw), 0);
      check("restore", 64'(rs), 64'(er));
      if (er) check("restore pc", 64'(rpc), 64'(g[bi].tk ? g[bi].bta : g[bi].pc + 8));
      if (n == 4) groups4++;
      commits += n;
      // ---- model update
      if (prev_rs) begin
        q.delete();
        #0 check("empty after restore", 64'(free), 64'(DEPTH));
        prev_rs = 0;
        continue;
      end
      for (int b = 0; b < 2; b++) if (cv[b]) begin
        rob_tag_t d; int di;
        d = cdb[b].reo - h0; di = int'(d); q[di].cmp = 1;
      end
      if (bbv) for (int k = 0; k < q.size(); k++) if (wsb[rob_tag_t'(int'(h0) + k)]) begin
        q[k].cmp = 1; q[k].mis = bb.mispred; q[k].tk = bb.code[2]; q[k].bta = bb.bta; q[k].ctr = bb.correct_pred;
      end
      repeat (n) void'(q.pop_front());
      if (alloc) for (int k = 0; k < 4; k++) if (sv[k]) begin
        e_t e;
        e.ld = ld[k]; e.pd = pd[k]; e.wb = wb[k]; e.bj = bj[k]; e.ds = ds[k]; e.st = st[k];
        e.brk = brk[k]; e.cmp = done[k]; e.mis = 0; e.tk = 0; e.bta = 0; e.pc = pc[k]; e.ctr = 0;
        q.push_back(e);
      end
      if (er) begin prev_rs = 1; restores++; last_ds = 0; end
    end
    checks++; if (restores == 0 || groups4 == 0 || commits < 500) begin failures++; $display("FAIL coverage %0d %0d %0d", restores, groups4, commits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
