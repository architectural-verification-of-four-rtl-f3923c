// prioritizer_tb: random test of the free-location prioritizer.
//
// Applies random allocate vectors of varying density (including nearly full and full
// ones) and compares the four returned pointers, their found flags, the updated
// allocate vector and the full (stall) flag with a model that scans for the four
// lowest-numbered zero bits. The unit is combinational; results are checked 1 ns after
// the input changes.
module prioritizer_tb;
  import mips_pkg::*;
  localparam int unsigned N = NPHYS, K = FETCH_W;
  logic [N-1:0] alloc = '0, upd;
  logic [K-1:0][$clog2(N)-1:0] ptr;
  logic [K-1:0] found;
  logic full;
  prioritizer #(.N(N), .K(K)) dut (.alloc_i(alloc), .ptr_o(ptr), .found_o(found),
    .alloc_upd_o(upd), .full_o(full));
  int checks = 0, failures = 0;
  task automatic check(string w, logic [63:0] g, logic [63:0] e);
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
      logic [N-1:0] m; int n; int free;
      case (t % 4)
        0: alloc = {$urandom, $urandom};
        1: alloc = {$urandom, $urandom} | {$urandom, $urandom} | {$urandom, $urandom};
        2: begin alloc = '1; for (int z = 0; z < int'($urandom % 6); z++) alloc[$urandom % N] = 1'b0; end
        default: alloc = (t % 8 == 3) ? '0 : '1;
      endcase
      #1;
      m = alloc; n = 0; free = 0;
      for (int i = 0; i < N; i++) if (!alloc[i]) free++;
      for (int i = 0; i < N && n < int'(K); i++)
        if (!m[i]) begin
          check($sformatf("ptr%0d", n), 64'(ptr[n]), 64'(i));
          m[i] = 1'b1; n++;
        end
      for (int k = 0; k < int'(K); k++) check("found", 64'(found[k]), 64'(k < n));
      check("alloc_upd", upd, m);
      check("full", 64'(full), 64'(free < int'(K)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
