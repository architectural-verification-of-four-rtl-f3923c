// store_buffer_tb: random test of the store buffer against a queue model.
//
// Every cycle: a random store is pushed (if not full), a random number of the oldest
// uncommitted stores is committed, the memory port is randomly busy with a load and a
// restore is occasionally raised. Checks that the oldest committed store is written to
// memory exactly when the port is free (loads first), in order and with its byte
// enables; that a restore drops only the uncommitted stores; that byte-wise forwarding
// for a random load address returns the youngest matching bytes; and full/empty flags.
module store_buffer_tb;
  import mips_pkg::*;
  localparam int unsigned DEPTH = 8;
  logic clk = 0, rst = 1, restore = 0, push = 0, busy = 0;
  always #5 clk = ~clk;
  logic [29:0] pa = '0, la = '0, ma;
  logic [3:0] pbe = '0, fm, mbe;
  logic [31:0] pd = '0, fd, md;
  logic [2:0] cc = '0;
  logic full, we, empty;
  store_buffer #(.DEPTH(DEPTH)) dut (.clk, .rst, .restore_i(restore), .push_i(push),
    .push_addr_i(pa), .push_be_i(pbe), .push_data_i(pd), .full_o(full), .commit_cnt_i(cc),
    .ld_addr_i(la), .fwd_mask_o(fm), .fwd_data_o(fd), .mem_busy_i(busy), .mem_we_o(we),
    .mem_addr_o(ma), .mem_be_o(mbe), .mem_data_o(md), .empty_o(empty));
  typedef struct { logic [29:0] a; logic [3:0] be; logic [31:0] d; } st_t;
  st_t q [$];
  int ncmt = 0;
  int checks = 0, failures = 0, writes = 0, fwds = 0, drops = 0;
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
    @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 4000; t++) begin
      logic [3:0] em; logic [31:0] ed; logic ewe; int pre;
      push = $urandom % 2; pa = 30'($urandom % 6); pbe = 4'($urandom) | 4'b0001 << ($urandom % 4);
      pd = $urandom; busy = $urandom % 3 == 0; restore = $urandom % 25 == 0;
      cc = 3'($urandom % (q.size() - ncmt + 1)); if (cc > 4) cc = 4;
      la = 30'($urandom % 6);
      #1;
      em = '0; ed = '0;
      foreach (q[i]) if (q[i].a == la)
        for (int b = 0; b < 4; b++) if (q[i].be[b]) begin em[b] = 1; ed[8*b +: 8] = q[i].d[8*b +: 8]; end
      check("forward mask", 64'(fm), 64'(em));
      for (int b = 0; b < 4; b++) if (em[b]) check("forward byte", 64'(fd[8*b +: 8]), 64'(ed[8*b +: 8]));
      if (em != 0) fwds++;
      ewe = ncmt > 0 && !busy;
      check("memory write", 64'(we), 64'(ewe));
      if (ewe) check("memory write word", 64'({ma, mbe, md}), 64'({q[0].a, q[0].be, q[0].d}));
      check("full", 64'(full), 64'(q.size() == DEPTH));
      check("empty", 64'(empty), 64'(q.size() == 0));
      @(posedge clk); #1;
      pre = q.size();
      ncmt += cc;
      if (ewe) begin void'(q.pop_front()); ncmt--; writes++; end
      if (restore) begin
        if (q.size() > ncmt) drops++;
        while (q.size() > ncmt) void'(q.pop_back());
      end else if (push && pre < DEPTH) begin
        q.push_back('{pa, pbe, pd});
      end
    end
    checks++; if (writes == 0 || fwds == 0 || drops == 0) begin failures++; $display("FAIL coverage"); end
    $display("stores written to memory: %0d", writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
