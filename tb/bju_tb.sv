// bju_tb: random test of the branch and jump unit.
//
// Issues random branches and jumps of every MIPS I form with random operands (often
// equal or zero so both outcomes occur), random fetch-time predictions (sometimes right,
// sometimes wrong in direction or target) and random grant delays for link results.
// Checks the one-cycle latency (branch bus valid the clock after acceptance when no
// link result waits), every branch-bus field (updated counter, code, destinations,
// delay-slot flag, branch address, target, misprediction), the pre-decoded reorder
// slot and the PC+8 link result on the data bus.
module bju_tb;
  import mips_pkg::*;
  logic clk = 0, rst = 1, flush = 0;
  always #5 clk = ~clk;
  logic in_v = 0, ready, req, grant = 0, bbv, ds = 0, pt = 0, wb = 0;
  op_t  op = OP_BEQ;
  logic [31:0] a = '0, b = '0, pc = '0, ptgt = '0;
  pptr_t dest = '0;
  lreg_t ld = '0;
  rob_tag_t reo = '0;
  logic [15:0] off = '0;
  logic [25:0] idx = '0;
  logic [2:0]  pred = '0;
  result_t res;
  brbus_t  bb;
  logic [63:0] wsb;
  bju dut (.clk, .rst, .flush_i(flush), .in_valid_i(in_v), .opcode_i(op), .op1_i(a), .op2_i(b),
    .dest_i(dest), .ldest_i(ld), .reo_i(reo), .wb_bit_i(wb), .pc_i(pc), .offset_i(off),
    .index_i(idx), .ds_instr_i(ds), .pred_taken_i(pt), .pred_target_i(ptgt),
    .prediction_i(pred), .ready_o(ready), .req_o(req), .grant_i(grant), .bju_result_o(res),
    .brbus_valid_o(bbv), .brbus_o(bb), .wsb_o(wsb));
  int checks = 0, failures = 0, mis = 0, links = 0;
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
    for (int t = 0; t < 1500; t++) begin
      logic tk, jmp, lnk, emis; logic [31:0] tgt; logic [1:0] c0;
      op   = op_t'(24 + $urandom % 12);
      a    = ($urandom % 3 == 0) ? 0 : (($urandom % 2) ? 32'h80000000 | $urandom : $urandom % 5);
      b    = ($urandom % 2) ? a : $urandom % 5;
      pc   = $urandom & ~32'h3; off = 16'($urandom); idx = 26'($urandom);
      dest = pptr_t'($urandom); ld = lreg_t'($urandom); reo = rob_tag_t'($urandom);
      ds   = $urandom % 2; pred = 3'($urandom);
      case (op)
        OP_BEQ: tk = a == b;                 OP_BNE: tk = a != b;
        OP_BLEZ: tk = $signed(a) <= 0;       OP_BGTZ: tk = $signed(a) > 0;
        OP_BLTZ, OP_BLTZAL: tk = $signed(a) < 0;
        OP_BGEZ, OP_BGEZAL: tk = $signed(a) >= 0;
        default: tk = 1;
      endcase
      jmp = op inside {OP_J, OP_JAL, OP_JR, OP_JALR};
      lnk = op inside {OP_JAL, OP_JALR, OP_BLTZAL, OP_BGEZAL};
      wb  = lnk;
      tgt = (op inside {OP_J, OP_JAL}) ? {pc[31:28] + 4'(pc[27:0] > 28'hffffffb), idx, 2'b00}
          : (op inside {OP_JR, OP_JALR}) ? a : pc + 4 + {{14{off[15]}}, off, 2'b00};
      if (op inside {OP_J, OP_JAL}) begin logic [31:0] p4; p4 = pc + 4; tgt = {p4[31:28], idx, 2'b00}; end
      case ($urandom % 3)
        0: begin pt = tk; ptgt = tgt; end
        1: begin pt = ~tk; ptgt = tgt; end
        default: begin pt = 1; ptgt = tgt ^ 32'h40; end
      endcase
      emis = (tk != pt) || (tk && tgt != ptgt);
      c0 = pred[2] ? pred[1:0] : 2'b01;
      in_v = 1; check("ready", 64'(ready), 1);
      @(posedge clk); #1 in_v = 0;
      if (lnk) begin
        int n; n = $urandom % 3; links++;
        check("link request", 64'(req), 1);
        check("link data", 64'(res.data), 64'(pc + 8));
        check("link select", res.wb_dest, onehot64(dest));
        repeat (n) begin
          check("bus waits for grant", 64'(bbv), 0);
          @(posedge clk); #1;
        end
        grant = 1; #1;
      end
      check("latency: branch bus valid", 64'(bbv), 1);
      check("taken/jump/link", 64'(bb.code), 64'({tk, jmp, lnk}));
      check("target", 64'(bb.bta), 64'(tgt));
      check("mispredict", 64'(bb.mispred), 64'(emis));
      check("counter", 64'(bb.correct_pred), 64'(ctr_next(c0, tk)));
      check("fields", 64'({bb.ldest, bb.dest, bb.ds_instr, bb.bj_addr, bb.one}),
            64'({ld, dest, ds, pc[19:0], 1'b1}));
      check("slot select", wsb, 64'(1) << reo);
      mis += int'(emis);
      @(posedge clk); #1 grant = 0;
      check("idle", 64'(bbv), 0);
    end
    checks++; if (mis == 0 || links == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
