// isa_decoder: MIPS I decoder for one four-instruction block.
//
// Each 32-bit instruction is turned into a 45-bit word {FU code, opcode, RD, RS, RT, SA,
// immediate} (mips_pkg::dec_t). RD is the logical destination (rt for I-type results,
// 31 for the link instructions, 0 when the instruction writes no register); RS and RT are
// the logical sources (0 when unused, which reads $zero). LWL and LWR also read rt, whose
// old value supplies the bytes the load does not replace. Block-level side outputs:
// inst_id (non-NOP slots), nop_id, no_inst (count of non-NOPs), immediate (two bits per
// slot, bit 2k for the RS operand and 2k+1 for the RT operand, cleared where the operand
// is immediate data), shift_id, branch, jump, j_or_jal and instr_index (four 26-bit
// J-type indices). Slots cleared in valid_i, the all-zero word and encodings outside
// the implemented set decode as NOPs; floating point is not decoded. Reset or restore
// clears every output. Purely combinational (first half of decode/issue).
// Coprocessor 0 is a constant-zero unit in this design: MFC0 is decoded as an ALU OR of
// $zero with $zero into rt, so it writes 0; MTC0, RFE, SYSCALL and BREAK keep the CP0 code.
// The port list and output format follow the description; the internal opcode numbering
// and the source/destination field conventions are this design's own.
module isa_decoder
  import mips_pkg::*;
(
  input  logic                     reset,
  input  logic                     restore,
  input  logic [FETCH_W-1:0]       valid_i,
  input  logic [FETCH_W-1:0][31:0] instr_i,
  output dec_t [FETCH_W-1:0]       dec_o,
  output logic [FETCH_W-1:0]       inst_id,
  output logic [5:0]               no_inst,
  output logic [2*FETCH_W-1:0]     immediate,
  output logic [FETCH_W-1:0]       shift_id,
  output logic [FETCH_W-1:0]       branch,
  output logic [FETCH_W-1:0]       jump,
  output logic [FETCH_W-1:0]       nop_id,
  output logic [26*FETCH_W-1:0]    instr_index,
  output logic [FETCH_W-1:0]       j_or_jal
);

  function automatic dec_t decode1(input logic [31:0] w);
    dec_t d;
    logic [5:0] opc, fn;
    lreg_t rs, rt, rd;
    opc = w[31:26]; fn = w[5:0];
    rs = w[25:21]; rt = w[20:16]; rd = w[15:11];
    d = '{fu: FU_NOP, op: OP_NONE, rd: 5'd0, rs: 5'd0, rt: 5'd0, sa: 5'd0, imm: w[15:0]};
    unique case (opc)
      6'h00: begin
        d.rs = rs; d.rt = rt; d.rd = rd; d.sa = w[10:6]; d.fu = FU_ALU;
        unique case (fn)
          6'h00: d.op = OP_SLL;   6'h02: d.op = OP_SRL;   6'h03: d.op = OP_SRA;
          6'h04: d.op = OP_SLLV;  6'h06: d.op = OP_SRLV;  6'h07: d.op = OP_SRAV;
          6'h20: d.op = OP_ADD;   6'h21: d.op = OP_ADDU;  6'h22: d.op = OP_SUB;
          6'h23: d.op = OP_SUBU;  6'h24: d.op = OP_AND;   6'h25: d.op = OP_OR;
          6'h26: d.op = OP_XOR;   6'h27: d.op = OP_NOR;   6'h2a: d.op = OP_SLT;
          6'h2b: d.op = OP_SLTU;
          6'h08: begin d.fu = FU_BJU; d.op = OP_JR;   d.rt = 5'd0; d.rd = 5'd0; end
          6'h09: begin d.fu = FU_BJU; d.op = OP_JALR; d.rt = 5'd0; end
          6'h0c: begin d.fu = FU_CP0; d.op = OP_SYSCALL; d.rs = 5'd0; d.rt = 5'd0; d.rd = 5'd0; end
          6'h0d: begin d.fu = FU_CP0; d.op = OP_BREAK;   d.rs = 5'd0; d.rt = 5'd0; d.rd = 5'd0; end
          6'h10: begin d.fu = FU_MDU; d.op = OP_MFHI; d.rs = 5'd0; d.rt = 5'd0; end
          6'h12: begin d.fu = FU_MDU; d.op = OP_MFLO; d.rs = 5'd0; d.rt = 5'd0; end
          6'h11: begin d.fu = FU_MDU; d.op = OP_MTHI; d.rt = 5'd0; d.rd = 5'd0; end
          6'h13: begin d.fu = FU_MDU; d.op = OP_MTLO; d.rt = 5'd0; d.rd = 5'd0; end
          6'h18: begin d.fu = FU_MDU; d.op = OP_MULT;  d.rd = 5'd0; end
          6'h19: begin d.fu = FU_MDU; d.op = OP_MULTU; d.rd = 5'd0; end
          6'h1a: begin d.fu = FU_MDU; d.op = OP_DIV;   d.rd = 5'd0; end
          6'h1b: begin d.fu = FU_MDU; d.op = OP_DIVU;  d.rd = 5'd0; end
          default: begin d.fu = FU_NOP; d.op = OP_NONE; d.rs = '0; d.rt = '0; d.rd = '0; end
        endcase
      end
      6'h01: begin
        d.fu = FU_BJU; d.rs = rs;
        unique case (rt)
          5'h00: d.op = OP_BLTZ;
          5'h01: d.op = OP_BGEZ;
          5'h10: begin d.op = OP_BLTZAL; d.rd = 5'd31; end
          5'h11: begin d.op = OP_BGEZAL; d.rd = 5'd31; end
          default: begin d.fu = FU_NOP; d.op = OP_NONE; d.rs = '0; end
        endcase
      end
      6'h02: begin d.fu = FU_BJU; d.op = OP_J; end
      6'h03: begin d.fu = FU_BJU; d.op = OP_JAL; d.rd = 5'd31; end
      6'h04: begin d.fu = FU_BJU; d.op = OP_BEQ;  d.rs = rs; d.rt = rt; end
      6'h05: begin d.fu = FU_BJU; d.op = OP_BNE;  d.rs = rs; d.rt = rt; end
      6'h06: begin d.fu = FU_BJU; d.op = OP_BLEZ; d.rs = rs; end
      6'h07: begin d.fu = FU_BJU; d.op = OP_BGTZ; d.rs = rs; end
      6'h08: begin d.fu = FU_ALU; d.op = OP_ADDI;  d.rs = rs; d.rd = rt; end
      6'h09: begin d.fu = FU_ALU; d.op = OP_ADDIU; d.rs = rs; d.rd = rt; end
      6'h0a: begin d.fu = FU_ALU; d.op = OP_SLTI;  d.rs = rs; d.rd = rt; end
      6'h0b: begin d.fu = FU_ALU; d.op = OP_SLTIU; d.rs = rs; d.rd = rt; end
      6'h0c: begin d.fu = FU_ALU; d.op = OP_ANDI;  d.rs = rs; d.rd = rt; end
      6'h0d: begin d.fu = FU_ALU; d.op = OP_ORI;   d.rs = rs; d.rd = rt; end
      6'h0e: begin d.fu = FU_ALU; d.op = OP_XORI;  d.rs = rs; d.rd = rt; end
      6'h0f: begin d.fu = FU_ALU; d.op = OP_LUI;   d.rd = rt; end
      6'h10: begin
        // Coprocessor 0 reads as constant zero: MFC0 becomes OR rt,$0,$0 on an ALU.
        if (rs == 5'h00) begin d.fu = FU_ALU; d.op = OP_OR; d.rd = rt; end
        else begin
          d.fu = FU_CP0;
          d.op = (rs == 5'h04) ? OP_MTC0 : OP_RFE;
        end
      end
      6'h20: begin d.fu = FU_LSU; d.op = OP_LB;  d.rs = rs; d.rd = rt; end
      6'h21: begin d.fu = FU_LSU; d.op = OP_LH;  d.rs = rs; d.rd = rt; end
      6'h22: begin d.fu = FU_LSU; d.op = OP_LWL; d.rs = rs; d.rt = rt; d.rd = rt; end
      6'h23: begin d.fu = FU_LSU; d.op = OP_LW;  d.rs = rs; d.rd = rt; end
      6'h24: begin d.fu = FU_LSU; d.op = OP_LBU; d.rs = rs; d.rd = rt; end
      6'h25: begin d.fu = FU_LSU; d.op = OP_LHU; d.rs = rs; d.rd = rt; end
      6'h26: begin d.fu = FU_LSU; d.op = OP_LWR; d.rs = rs; d.rt = rt; d.rd = rt; end
      6'h28: begin d.fu = FU_LSU; d.op = OP_SB;  d.rs = rs; d.rt = rt; end
      6'h29: begin d.fu = FU_LSU; d.op = OP_SH;  d.rs = rs; d.rt = rt; end
      6'h2a: begin d.fu = FU_LSU; d.op = OP_SWL; d.rs = rs; d.rt = rt; end
      6'h2b: begin d.fu = FU_LSU; d.op = OP_SW;  d.rs = rs; d.rt = rt; end
      6'h2e: begin d.fu = FU_LSU; d.op = OP_SWR; d.rs = rs; d.rt = rt; end
      default: ;
    endcase
    if (w == 32'd0) d = '{fu: FU_NOP, op: OP_NONE, rd: 5'd0, rs: 5'd0, rt: 5'd0, sa: 5'd0, imm: 16'd0};
    return d;
  endfunction

  function automatic logic uses_imm(input op_t op);
    return op inside {OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI,
                      OP_LB, OP_LBU, OP_LH, OP_LHU, OP_LW, OP_J, OP_JAL};
  endfunction

  always_comb begin
    logic [5:0] cnt;
    cnt = '0;
    for (int k = 0; k < FETCH_W; k++) begin
      dec_o[k] = valid_i[k] ? decode1(instr_i[k])
                            : '{fu: FU_NOP, op: OP_NONE, rd: 5'd0, rs: 5'd0, rt: 5'd0, sa: 5'd0, imm: 16'd0};
      nop_id[k]   = (dec_o[k].fu == FU_NOP);
      inst_id[k]  = ~nop_id[k];
      cnt         = cnt + {5'd0, inst_id[k]};
      immediate[2*k]   = 1'b1;
      immediate[2*k+1] = ~uses_imm(dec_o[k].op) | nop_id[k];
      shift_id[k] = dec_o[k].op inside {OP_SLL, OP_SRL, OP_SRA};
      jump[k]     = dec_o[k].op inside {OP_J, OP_JAL, OP_JR, OP_JALR};
      branch[k]   = (dec_o[k].fu == FU_BJU) & ~jump[k];
      j_or_jal[k] = dec_o[k].op inside {OP_J, OP_JAL};
      instr_index[26*k +: 26] = j_or_jal[k] ? instr_i[k][25:0] : 26'd0;
    end
    no_inst = cnt;
    if (reset || restore) begin
      for (int k = 0; k < FETCH_W; k++)
        dec_o[k] = '{fu: FU_NOP, op: OP_NONE, rd: 5'd0, rs: 5'd0, rt: 5'd0, sa: 5'd0, imm: 16'd0};
      inst_id = '0; no_inst = '0; immediate = '1; shift_id = '0; branch = '0;
      jump = '0; nop_id = '1; instr_index = '0; j_or_jal = '0;
    end
  end
endmodule
