// dest_overwrite_tb: random test of intra-block destination fix-up.
//
// Random blocks with destinations drawn from a few registers: slot i must carry the new
// pointer of the latest slot j >= i with the same non-zero logical destination, and
// its own pointer otherwise. Combinational; checked 1 ns after the inputs change.
module dest_overwrite_tb;
  import mips_pkg::*;
  lreg_t [3:0] d = '0;
  pptr_t [3:0] nd = '0, od;
  dest_overwrite dut (.dest_i(d), .new_dest_i(nd), .ow_dest_o(od));
  int checks = 0, failures = 0, hits = 0;
  task automatic check(string w, logic [31:0] g, logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
  initial begin
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < 4; k++) begin d[k] = lreg_t'($urandom % 4); nd[k] = pptr_t'($urandom); end
      #1;
      for (int i = 0; i < 4; i++) begin
        pptr_t e; e = nd[i];
        for (int j = i + 1; j < 4; j++) if (d[i] != 0 && d[j] == d[i]) e = nd[j];
        check($sformatf("slot %0d", i), 32'(od[i]), 32'(e));
        if (e != nd[i]) hits++;
      end
    end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL no overwrite exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
