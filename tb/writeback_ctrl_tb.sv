// writeback_ctrl_tb: random test of the common-data-bus arbiter.
//
// Applies random request sets from the five units with distinct random reorder slots
// and a random reorder-buffer head, and checks that the (at most two) oldest requests
// by distance from the head are granted, bus I carrying the oldest and bus II the next,
// that nothing else is granted and that valid flags match. Combinational; checked 1 ns
// after the inputs change.
module writeback_ctrl_tb;
  import mips_pkg::*;
  localparam int unsigned N = 5;
  logic [N-1:0] req = '0, grant;
  result_t [N-1:0] res = '0;
  rob_tag_t head = '0;
  result_t [1:0] cdb;
  logic [1:0] cv;
  writeback_ctrl #(.N(N)) dut (.req_i(req), .res_i(res), .rob_head_i(head), .grant_o(grant),
    .cdb_o(cdb), .cdb_valid_o(cv));
  int checks = 0, failures = 0;
  task automatic check(string w, logic [127:0] g, logic [127:0] e);
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
    for (int t = 0; t < 4000; t++) begin
      int order [$]; logic [N-1:0] eg; int ages [N];
      order.delete();
      req = N'($urandom); head = rob_tag_t'($urandom);
      for (int u = 0; u < int'(N); u++) begin
        res[u] = '0; res[u].data = $urandom;
        res[u].reo = head + rob_tag_t'(u * 11 + ($urandom % 11));   // distinct ages
        ages[u] = int'(rob_tag_t'(res[u].reo - head));
      end
      #1;
      for (int u = 0; u < int'(N); u++) if (req[u]) order.push_back(u);
      order.sort() with (ages[item]);
      eg = '0;
      for (int b = 0; b < 2; b++)
        if (b < order.size()) begin
          eg[order[b]] = 1;
          check($sformatf("bus %0d word", b), 128'(cdb[b]), 128'(res[order[b]]));
        end
      check("grants", 128'(grant), 128'(eg));
      check("valid", 128'(cv), 128'(order.size() >= 2 ? 2'b11 : order.size() == 1 ? 2'b01 : 2'b00));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
