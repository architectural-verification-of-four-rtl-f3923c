// source_overwrite_tb: random test of intra-block source renaming.
//
// Random blocks with logical numbers drawn from a few registers (so that same-block
// dependences are frequent): for each slot and each source the expected pointer is the
// new destination pointer of the nearest earlier slot with that logical destination
// (not $zero), otherwise the pointer read from the issue pointer buffer. The unit is
// combinational; outputs are checked 1 ns after the inputs change.
module source_overwrite_tb;
  import mips_pkg::*;
  lreg_t [3:0] rs = '0, rt = '0, rd = '0;
  pptr_t [3:0] nd = '0, rsp = '0, rtp = '0, ors, ort;
  source_overwrite dut (.rs_i(rs), .rt_i(rt), .rd_i(rd), .new_dest_i(nd),
    .rs_ipb_i(rsp), .rt_ipb_i(rtp), .owrs_o(ors), .owrt_o(ort));
  int checks = 0, failures = 0, hits = 0;
  task automatic check(string w, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  function automatic pptr_t expect_src(lreg_t s, int j, pptr_t ipb);
    pptr_t p; p = ipb;
    for (int i = 0; i < j; i++) if (rd[i] != 0 && rd[i] == s) p = nd[i];
    return p;
  endfunction
  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
  initial begin
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < 4; k++) begin
        rs[k] = lreg_t'($urandom % 4); rt[k] = lreg_t'($urandom % 4); rd[k] = lreg_t'($urandom % 4);
        nd[k] = pptr_t'($urandom); rsp[k] = pptr_t'($urandom); rtp[k] = pptr_t'($urandom);
      end
      #1;
      for (int j = 0; j < 4; j++) begin
        check($sformatf("rs slot %0d", j), 32'(ors[j]), 32'(expect_src(rs[j], j, rsp[j])));
        check($sformatf("rt slot %0d", j), 32'(ort[j]), 32'(expect_src(rt[j], j, rtp[j])));
        if (ors[j] != rsp[j]) hits++;
      end
    end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL no overwrite exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
