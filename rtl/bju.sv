// bju: branch and jump unit, single cycle.
//
// Evaluates the condition and target of a branch or jump: conditional branches compare
// OP I/OP II (or OP I with zero) and jump to PC+4 + (sign-extended offset << 2); J/JAL
// build {PC+4[31:28], index, 00}; JR/JALR jump to OP I. The outcome is compared with
// the fetch-time prediction (taken bit and target): a mismatch in direction, or a taken
// branch whose target differs from the predicted one, is a misprediction. The unit
// computes the updated two-bit counter from the fetch-time BPB state (a branch without
// BPB entry starts from weakly-not-taken, 01). Results leave through an output register:
// brbus_o (the 71-bit branch bus to the reorder buffer, with wsb_o its pre-decoded slot)
// is valid in the cycle the result leaves; link instructions (JAL, JALR, BLTZAL, BGEZAL)
// also put PC+8 on a common data bus (bju_result_o) and wait for grant_i.
// Branch-bus fields: CODE = {taken, jump, link}; BTA = computed target; BJ ADDRESS =
// low 20 bits of the branch PC. Field layout and ports follow the description; the
// CODE bit assignment and the counter start value are this design's choices.
module bju
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        flush_i,
  input  logic        in_valid_i,
  input  op_t         opcode_i,
  input  logic [31:0] op1_i,
  input  logic [31:0] op2_i,
  input  pptr_t       dest_i,
  input  lreg_t       ldest_i,
  input  rob_tag_t    reo_i,
  input  logic        wb_bit_i,
  input  logic [31:0] pc_i,
  input  logic [15:0] offset_i,
  input  logic [25:0] index_i,
  input  logic        ds_instr_i,
  input  logic        pred_taken_i,
  input  logic [31:0] pred_target_i,
  input  logic [2:0]  prediction_i,
  output logic        ready_o,
  output logic        req_o,
  input  logic        grant_i,
  output result_t     bju_result_o,
  output logic        brbus_valid_o,
  output brbus_t      brbus_o,
  output logic [NPHYS-1:0] wsb_o
);
  logic        taken, is_jump, link;
  logic [31:0] target, pc4;

  always_comb begin
    pc4     = pc_i + 32'd4;
    is_jump = opcode_i inside {OP_J, OP_JAL, OP_JR, OP_JALR};
    link    = opcode_i inside {OP_JAL, OP_JALR, OP_BLTZAL, OP_BGEZAL};
    target  = pc4 + {{14{offset_i[15]}}, offset_i, 2'b00};
    unique case (opcode_i)
      OP_BEQ:  taken = (op1_i == op2_i);
      OP_BNE:  taken = (op1_i != op2_i);
      OP_BLEZ: taken = $signed(op1_i) <= 0;
      OP_BGTZ: taken = $signed(op1_i) > 0;
      OP_BLTZ, OP_BLTZAL: taken = $signed(op1_i) < 0;
      OP_BGEZ, OP_BGEZAL: taken = $signed(op1_i) >= 0;
      OP_J, OP_JAL: begin taken = 1'b1; target = {pc4[31:28], index_i, 2'b00}; end
      OP_JR, OP_JALR: begin taken = 1'b1; target = op1_i; end
      default: taken = 1'b0;
    endcase
  end

  logic   out_v;
  brbus_t bb_n;

  always_comb begin
    bb_n.correct_pred = ctr_next(prediction_i[2] ? prediction_i[1:0] : 2'b01, taken);
    bb_n.code     = {taken, is_jump, link};
    bb_n.ldest    = ldest_i;
    bb_n.dest     = dest_i;
    bb_n.ds_instr = ds_instr_i;
    bb_n.bj_addr  = pc_i[19:0];
    bb_n.bta      = target;
    bb_n.mispred  = (taken != pred_taken_i) || (taken && target != pred_target_i);
    bb_n.one      = 1'b1;
  end

  logic leave;
  assign req_o         = out_v & bju_result_o.wb;
  assign leave         = out_v & (~bju_result_o.wb | grant_i);
  assign ready_o       = ~out_v | leave;
  assign brbus_valid_o = leave;

  always_ff @(posedge clk) begin
    if (rst || flush_i) begin
      out_v <= 1'b0;
    end else if (ready_o) begin
      out_v <= in_valid_i;
      if (in_valid_i) begin
        brbus_o      <= bb_n;
        wsb_o        <= NPHYS'(1) << reo_i;
        bju_result_o <= '{reo: reo_i, wb_dest: (wb_bit_i && link) ? onehot64(dest_i) : '0,
                          data: pc_i + 32'd8, dest: dest_i, wb: wb_bit_i && link};
      end
    end
  end
endmodule
