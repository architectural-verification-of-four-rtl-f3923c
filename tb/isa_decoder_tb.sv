// isa_decoder_tb: random test of the four-slot instruction decoder.
//
// Builds blocks of four instructions from a table of MIPS I formats with random register
// fields, immediates and occasional NOPs, invalid encodings and invalid slots. For each
// slot it checks the functional-unit code, the operation, the renamed register fields
// (which field is the destination, which sources are read), the immediate and shift
// amount, the immediate/shift/branch/jump/NOP flags, the instruction index of J/JAL, and
// for the block the instruction count; reset and restore must blank the block.
// Combinational; outputs are checked 1 ns after the inputs change.
module isa_decoder_tb;
  import mips_pkg::*;
  logic reset = 0, restore = 0;
  logic [3:0] valid = '0;
  logic [3:0][31:0] instr = '0;
  dec_t [3:0] dec;
  logic [3:0] inst_id, shift_id, branch, jump, nop_id, j_or_jal;
  logic [5:0] no_inst;
  logic [7:0] imm;
  logic [103:0] index;
  isa_decoder dut (.reset, .restore, .valid_i(valid), .instr_i(instr), .dec_o(dec),
    .inst_id, .no_inst, .immediate(imm), .shift_id, .branch, .jump, .nop_id,
    .instr_index(index), .j_or_jal);
  int checks = 0, failures = 0;
  task automatic check(string w, logic [63:0] g, logic [63:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  // expected decode of one word: {fu, op, rd, rs, rt, uses immediate}
  typedef struct { fu_t fu; op_t op; lreg_t rd, rs, rt; logic im; } x_t;
  function automatic x_t gen(output logic [31:0] w);
    x_t x; logic [4:0] s, t, d; logic [15:0] i;
    s = 5'($urandom); t = 5'($urandom); d = 5'($urandom); i = 16'($urandom);
    x = '{FU_NOP, OP_NONE, 5'd0, 5'd0, 5'd0, 1'b0};
    case ($urandom % 19)
      0: begin w = {6'h00, s, t, d, 5'($urandom), 6'h21}; x = '{FU_ALU, OP_ADDU, d, s, t, 0}; end
      1: begin w = {6'h00, 5'd0, t, d, 5'($urandom), 6'h03}; x = '{FU_ALU, OP_SRA, d, 5'd0, t, 0}; end
      2: begin w = {6'h00, s, t, d, 5'd0, 6'h2a}; x = '{FU_ALU, OP_SLT, d, s, t, 0}; end
      3: begin w = {6'h09, s, t, i}; x = '{FU_ALU, OP_ADDIU, t, s, 5'd0, 1}; end
      4: begin w = {6'h0f, s, t, i}; x = '{FU_ALU, OP_LUI, t, 5'd0, 5'd0, 1}; end
      5: begin w = {6'h23, s, t, i}; x = '{FU_LSU, OP_LW, t, s, 5'd0, 1}; end
      6: begin w = {6'h28, s, t, i}; x = '{FU_LSU, OP_SB, 5'd0, s, t, 0}; end
      7: begin w = {6'h05, s, t, i}; x = '{FU_BJU, OP_BNE, 5'd0, s, t, 0}; end
      8: begin w = {6'h06, s, 5'd0, i}; x = '{FU_BJU, OP_BLEZ, 5'd0, s, 5'd0, 0}; end
      9: begin w = {6'h03, 26'($urandom)}; x = '{FU_BJU, OP_JAL, 5'd31, 5'd0, 5'd0, 1}; end
      10: begin w = {6'h00, s, 15'd0, 6'h08}; x = '{FU_BJU, OP_JR, 5'd0, s, 5'd0, 0}; end
      11: begin w = {6'h00, s, t, 10'd0, 6'h18}; x = '{FU_MDU, OP_MULT, 5'd0, s, t, 0}; end
      12: begin w = {6'h00, 10'd0, d, 5'd0, 6'h12}; x = '{FU_MDU, OP_MFLO, d, 5'd0, 5'd0, 0}; end
      13: begin w = {6'h01, s, 5'h11, i}; x = '{FU_BJU, OP_BGEZAL, 5'd31, s, 5'd0, 0}; end
      14: begin w = {6'h00, 20'($urandom), 6'h0d}; x = '{FU_CP0, OP_BREAK, 5'd0, 5'd0, 5'd0, 0}; end
      15: begin w = {6'h10, 5'd0, t, d, 11'd0}; x = '{FU_ALU, OP_OR, t, 5'd0, 5'd0, 0}; end   // MFC0 reads 0
      16: begin w = {6'h22, s, t, i}; x = '{FU_LSU, OP_LWL, t, s, t, 0}; end
      17: begin w = {6'h2e, s, t, i}; x = '{FU_LSU, OP_SWR, 5'd0, s, t, 0}; end
      default: begin w = ($urandom % 2) ? 32'd0 : {6'h3f, 26'($urandom)}; end   // NOP / unknown
    endcase
    return x;
  endfunction
  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
  initial begin
    for (int t = 0; t < 3000; t++) begin
      x_t x [4]; int n;
      n = 0;
      for (int k = 0; k < 4; k++) begin
        logic [31:0] w;
        x[k] = gen(w); instr[k] = w; valid[k] = $urandom % 8 != 0;
        if (!valid[k]) x[k] = '{FU_NOP, OP_NONE, 5'd0, 5'd0, 5'd0, 1'b0};
      end
      reset = $urandom % 50 == 0; restore = $urandom % 50 == 0;
      #1;
      for (int k = 0; k < 4; k++) begin
        logic blank, isj; blank = reset || restore;
        isj = x[k].op inside {OP_J, OP_JAL, OP_JR, OP_JALR};
        if (blank) begin
          check("blank fu", 64'(dec[k].fu), 64'(FU_NOP));
          check("blank id", 64'(inst_id[k]), 0);
          continue;
        end
        check($sformatf("fu %h", instr[k]), 64'(dec[k].fu), 64'(x[k].fu));
        check($sformatf("op %h", instr[k]), 64'(dec[k].op), 64'(x[k].op));
        check($sformatf("regs %h", instr[k]), 64'({dec[k].rd, dec[k].rs, dec[k].rt}), 64'({x[k].rd, x[k].rs, x[k].rt}));
        if (x[k].fu != FU_NOP) begin
          check("imm field", 64'(dec[k].imm), 64'(instr[k][15:0]));
          if (x[k].op == OP_SRA) check("sa", 64'(dec[k].sa), 64'(instr[k][10:6]));
        end
        check("inst_id", 64'(inst_id[k]), 64'(x[k].fu != FU_NOP));
        check("nop_id", 64'(nop_id[k]), 64'(x[k].fu == FU_NOP));
        check("immediate flag", 64'(imm[2*k+1]), 64'(!x[k].im || x[k].fu == FU_NOP));
        check("shift", 64'(shift_id[k]), 64'(x[k].op == OP_SRA));
        check("jump", 64'(jump[k]), 64'(isj));
        check("branch", 64'(branch[k]), 64'(x[k].fu == FU_BJU && !isj));
        check("j/jal", 64'(j_or_jal[k]), 64'(x[k].op == OP_JAL));
        if (x[k].op == OP_JAL) check("index", 64'(index[26*k +: 26]), 64'(instr[k][25:0]));
        n += int'(x[k].fu != FU_NOP);
      end
      check("count", 64'(no_inst), 64'((reset || restore) ? 0 : n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
