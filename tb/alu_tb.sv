// alu_tb: random test of the arithmetic and logic unit.
//
// Issues random operations of the whole ALU set with random operands (signed
// extremes included) and a random bus-grant pattern. For every accepted operation it
// checks that the request appears exactly one clock after acceptance (the one-cycle
// latency of the unit), that the result word carries the expected data, destination,
// pre-decoded one-hot select, reorder slot and write-back bit, that the overflow flag is
// right for ADD/ADDI/SUB, and that a result waiting for a grant is held unchanged with
// ready_o low.
module alu_tb;
  import mips_pkg::*;
  logic clk = 0, rst = 1, flush = 0;
  always #5 clk = ~clk;
  logic in_v = 0, ready, req, grant = 0, ovf;
  op_t  op = OP_ADD;
  logic [31:0] a = '0, b = '0;
  logic [4:0] sa = '0;
  pptr_t dest = '0;
  rob_tag_t reo = '0;
  logic wb = 0;
  result_t res;
  alu dut (.clk, .rst, .flush_i(flush), .in_valid_i(in_v), .exec_i(op), .op1_i(a), .op2_i(b),
    .sa_i(sa), .dest_i(dest), .reo_i(reo), .wb_bit_i(wb), .ready_o(ready), .req_o(req),
    .grant_i(grant), .alu_result_o(res), .int_overflow_o(ovf));
  int checks = 0, failures = 0, waits = 0;
  task automatic check(string w, logic [127:0] g, logic [127:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  function automatic logic [32:0] model(op_t o, logic [31:0] x, logic [31:0] y, logic [4:0] s);
    logic [31:0] si, r; logic v;
    si = {{16{y[15]}}, y[15:0]}; v = 0;
    case (o)
      OP_ADD:   begin r = x + y;  v = (x[31] == y[31]) && (r[31] != x[31]); end
      OP_ADDU:  r = x + y;
      OP_SUB:   begin r = x - y;  v = (x[31] != y[31]) && (r[31] != x[31]); end
      OP_SUBU:  r = x - y;
      OP_AND:   r = x & y;
      OP_OR:    r = x | y;
      OP_XOR:   r = x ^ y;
      OP_NOR:   r = ~(x | y);
      OP_SLT:   r = ($signed(x) < $signed(y)) ? 1 : 0;
      OP_SLTU:  r = (x < y) ? 1 : 0;
      OP_SLL:   r = y << s;
      OP_SRL:   r = y >> s;
      OP_SRA:   r = $signed(y) >>> s;
      OP_SLLV:  r = y << x[4:0];
      OP_SRLV:  r = y >> x[4:0];
      OP_SRAV:  r = $signed(y) >>> x[4:0];
      OP_ADDI:  begin r = x + si; v = (x[31] == si[31]) && (r[31] != x[31]); end
      OP_ADDIU: r = x + si;
      OP_SLTI:  r = ($signed(x) < $signed(si)) ? 1 : 0;
      OP_SLTIU: r = (x < si) ? 1 : 0;
      OP_ANDI:  r = x & {16'd0, y[15:0]};
      OP_ORI:   r = x | {16'd0, y[15:0]};
      OP_XORI:  r = x ^ {16'd0, y[15:0]};
      OP_LUI:   r = {y[15:0], 16'd0};
      default:  r = 0;
    endcase
    return {v, r};
  endfunction
  function automatic logic [31:0] rnd();
    case ($urandom % 6)
      0: return 32'h7fffffff; 1: return 32'h80000000; 2: return 32'hffffffff;
      default: return $urandom;
    endcase
  endfunction
  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
  initial begin
    @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 1500; t++) begin
      logic [32:0] e; result_t held; int n;
      op = op_t'($urandom % 24); a = rnd(); b = rnd(); sa = 5'($urandom);
      dest = pptr_t'($urandom); reo = rob_tag_t'($urandom); wb = $urandom % 4 != 0;
      e = model(op, a, b, sa);
      in_v = 1; grant = 0;
      check("ready when idle", 128'(ready), 1);
      @(posedge clk); #1;
      in_v = 0;
      check("latency 1 cycle", 128'(req), 1);
      check("data", 128'(res.data), 128'(e[31:0]));
      check("result fields", 128'({res.dest, res.reo, res.wb, res.wb_dest}),
            128'({dest, reo, wb, wb ? onehot64(dest) : 64'd0}));
      if (op == OP_ADD || op == OP_SUB || op == OP_ADDI) check("overflow", 128'(ovf), 128'(e[32]));
      held = res; n = $urandom % 3;
      for (int w = 0; w < n; w++) begin
        @(posedge clk); #1; waits++;
        check("held while waiting", 128'(res), 128'(held));
        check("not ready while waiting", 128'(ready), 0);
        check("request kept", 128'(req), 1);
      end
      grant = 1; #1;
      check("ready with grant", 128'(ready), 1);
      @(posedge clk); #1 grant = 0;
      check("request dropped", 128'(req), 0);
    end
    // back-to-back issue with immediate grants: one result per cycle
    grant = 1; in_v = 1;
    for (int t = 0; t < 20; t++) begin
      op = OP_ADDU; a = t; b = 100;
      @(posedge clk); #1;
      check("pipelined result", 128'(res.data), 128'(t + 100));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
