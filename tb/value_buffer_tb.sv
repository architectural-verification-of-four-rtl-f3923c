// value_buffer_tb: random test of the 64-location value buffer and its status bits.
//
// Each cycle drives two random bus writes (one-hot write select, write-enable bit),
// random allocate, commit and free masks and an occasional restore, and compares the
// eight read ports (data and valid), the observation port and the allocate / commit
// vectors with a model. Reads are combinational; all updates appear after one clock.
// Location 0 must stay zero, valid, allocated and committed; after reset every location
// is valid and only location 0 is allocated.
module value_buffer_tb;
  import mips_pkg::*;
  logic clk = 0, rst = 1, restore = 0;
  always #5 clk = ~clk;
  pptr_t [7:0] rp = '0;
  logic [7:0][31:0] rdat;
  logic [7:0] rv;
  result_t [1:0] cdb = '0;
  logic [1:0] cv = '0;
  logic [63:0] aset = '0, cset = '0, dal = '0, alc, cmt;
  pptr_t op = '0;
  logic [31:0] od;
  value_buffer dut (.clk, .rst, .restore_i(restore), .rptr_i(rp), .rdata_o(rdat), .rvalid_o(rv),
    .cdb_i(cdb), .cdb_valid_i(cv), .alloc_set_i(aset), .commit_set_i(cset), .dealloc_i(dal),
    .alloc_o(alc), .commit_o(cmt), .obs_ptr_i(op), .obs_data_o(od));
  logic [31:0] md [64];
  logic [63:0] mv, ma, mcm;
  int checks = 0, failures = 0;
  task automatic check(string w, logic [63:0] g, logic [63:0] e);
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
    for (int l = 0; l < 64; l++) md[l] = '0;
    @(posedge clk); #1 rst = 0;
    mv = '1; ma = 64'd1; mcm = 64'd1;
    for (int t = 0; t < 1500; t++) begin
      for (int i = 0; i < 8; i++) rp[i] = pptr_t'($urandom);
      op = pptr_t'($urandom);
      for (int b = 0; b < 2; b++) begin
        pptr_t p; p = pptr_t'($urandom);
        if (b == 1 && p == cdb[0].dest) p = p + 1'b1;
        cdb[b] = '0; cdb[b].dest = p; cdb[b].wb_dest = onehot64(p);
        cdb[b].data = $urandom; cdb[b].wb = $urandom % 4 != 0;
        cv[b] = $urandom % 2;
      end
      aset = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      cset = {$urandom, $urandom} & {$urandom, $urandom};
      dal  = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      restore = ($urandom % 20) == 0;
      #1;
      for (int i = 0; i < 8; i++) begin
        check("read data", 64'(rdat[i]), 64'(md[rp[i]]));
        check("read valid", 64'(rv[i]), 64'(mv[rp[i]]));
      end
      check("obs", 64'(od), 64'(md[op]));
      check("alloc", alc, ma);
      check("commit", cmt, mcm);
      @(posedge clk); #1;
      mcm = (mcm | cset) & ~dal;
      ma  = (ma | aset) & ~dal;
      mv  = mv & ~aset;
      for (int b = 0; b < 2; b++)
        if (cv[b] && cdb[b].wb) begin
          mv = mv | cdb[b].wb_dest;
          if (cdb[b].dest != 0) md[cdb[b].dest] = cdb[b].data;
        end
      if (restore) ma = mcm;
      ma[0] = 1; mcm[0] = 1; mv[0] = 1;
    end
    cv = '0; aset = '0; cset = '0; dal = '0; restore = 0;
    rst = 1; @(posedge clk); #1 rst = 0; #1;
    check("reset alloc", alc, 64'd1);
    check("reset commit", cmt, 64'd1);
    for (int l = 0; l < 8; l++) begin rp[l] = pptr_t'(l * 8 + 3); end
    #1 check("reset valid", 64'(rv), 64'hff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
