// alu: arithmetic and logic unit, single cycle, with a result register held until a
// common data bus is granted.
//
// An operation accepted when in_valid_i && ready_o is computed combinationally and
// registered; the registered 109-bit word alu_result_o = {reorder slot, pre-decoded
// destination (one-hot of 64), data, destination pointer, write-back bit} requests a
// bus (req_o) until grant_i. ready_o is high when the register is empty or leaving,
// so a unit waiting for a bus stalls its reservation station, as described.
// op1 is the RS operand, op2 the RT operand or the zero-padded 16-bit immediate, which
// the unit sign-extends for ADDI/ADDIU/SLTI/SLTIU and shifts for LUI. int_overflow_o
// flags signed overflow of ADD/ADDI/SUB (exceptions are not taken: the result is still
// written). Shifts use sa (SLL/SRL/SRA) or op1[4:0] (the variable forms) applied to
// op2. The ports and result format follow the description; the operation set is MIPS I.
module alu
  import mips_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     flush_i,
  input  logic     in_valid_i,
  input  op_t      exec_i,
  input  logic [31:0] op1_i,
  input  logic [31:0] op2_i,
  input  logic [4:0]  sa_i,
  input  pptr_t    dest_i,
  input  rob_tag_t reo_i,
  input  logic     wb_bit_i,
  output logic     ready_o,
  output logic     req_o,
  input  logic     grant_i,
  output result_t  alu_result_o,
  output logic     int_overflow_o
);
  logic [31:0] res, simm;
  logic        ovf;

  assign simm = {{16{op2_i[15]}}, op2_i[15:0]};

  always_comb begin
    res = '0; ovf = 1'b0;
    unique case (exec_i)
      OP_ADD:   begin res = op1_i + op2_i; ovf = (op1_i[31] == op2_i[31]) && (res[31] != op1_i[31]); end
      OP_ADDU:  res = op1_i + op2_i;
      OP_SUB:   begin res = op1_i - op2_i; ovf = (op1_i[31] != op2_i[31]) && (res[31] != op1_i[31]); end
      OP_SUBU:  res = op1_i - op2_i;
      OP_AND:   res = op1_i & op2_i;
      OP_OR:    res = op1_i | op2_i;
      OP_XOR:   res = op1_i ^ op2_i;
      OP_NOR:   res = ~(op1_i | op2_i);
      OP_SLT:   res = {31'd0, $signed(op1_i) < $signed(op2_i)};
      OP_SLTU:  res = {31'd0, op1_i < op2_i};
      OP_SLL:   res = op2_i << sa_i;
      OP_SRL:   res = op2_i >> sa_i;
      OP_SRA:   res = 32'($signed(op2_i) >>> sa_i);
      OP_SLLV:  res = op2_i << op1_i[4:0];
      OP_SRLV:  res = op2_i >> op1_i[4:0];
      OP_SRAV:  res = 32'($signed(op2_i) >>> op1_i[4:0]);
      OP_ADDI:  begin res = op1_i + simm; ovf = (op1_i[31] == simm[31]) && (res[31] != op1_i[31]); end
      OP_ADDIU: res = op1_i + simm;
      OP_SLTI:  res = {31'd0, $signed(op1_i) < $signed(simm)};
      OP_SLTIU: res = {31'd0, op1_i < simm};
      OP_ANDI:  res = op1_i & {16'd0, op2_i[15:0]};
      OP_ORI:   res = op1_i | {16'd0, op2_i[15:0]};
      OP_XORI:  res = op1_i ^ {16'd0, op2_i[15:0]};
      OP_LUI:   res = {op2_i[15:0], 16'd0};
      default:  res = '0;
    endcase
  end

  logic out_v;
  assign req_o   = out_v;
  assign ready_o = ~out_v | grant_i;

  always_ff @(posedge clk) begin
    if (rst || flush_i) begin
      out_v <= 1'b0;
      int_overflow_o <= 1'b0;
    end else if (ready_o) begin
      out_v <= in_valid_i;
      if (in_valid_i) begin
        alu_result_o   <= '{reo: reo_i, wb_dest: wb_bit_i ? onehot64(dest_i) : '0,
                            data: res, dest: dest_i, wb: wb_bit_i};
        int_overflow_o <= ovf;
      end
    end
  end
endmodule
