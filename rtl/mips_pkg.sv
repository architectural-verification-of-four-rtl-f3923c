// mips_pkg: types and constants shared by the four-wide speculative MIPS I core.
//
// Holds the functional-unit codes, the internal operation codes the decoder hands to
// the functional units, the packed decoded-instruction word (45 bits, laid out as the
// decoder output format: FU code, opcode, RD, RS, RT, SA, immediate), the 109-bit
// functional-unit result / common-data-bus word and the 71-bit branch-bus word.
// The FU codes and the three bit layouts follow the design description; the numbering
// of the internal operation codes is this design's own choice.
package mips_pkg;

  localparam int unsigned XLEN       = 32;
  localparam int unsigned NLOG       = 32;   // logical (architectural) registers
  localparam int unsigned NPHYS      = 64;   // value-buffer locations
  localparam int unsigned PW         = 6;    // pseudo-pointer width
  localparam int unsigned ROB_W      = 6;    // reorder-buffer tag width
  localparam int unsigned FETCH_W    = 4;    // instructions per block

  typedef logic [PW-1:0]    pptr_t;
  typedef logic [4:0]       lreg_t;
  typedef logic [ROB_W-1:0] rob_tag_t;

  // Functional unit codes (3 bits).
  typedef enum logic [2:0] {
    FU_NOP = 3'b000,
    FU_CP0 = 3'b001,
    FU_MDU = 3'b010,
    FU_ALU = 3'b011,
    FU_BJU = 3'b100,
    FU_LSU = 3'b101
  } fu_t;

  // Internal 6-bit operation codes understood by the functional units.
  typedef enum logic [5:0] {
    // ALU
    OP_ADD  = 6'd0,  OP_ADDU = 6'd1,  OP_SUB  = 6'd2,  OP_SUBU = 6'd3,
    OP_AND  = 6'd4,  OP_OR   = 6'd5,  OP_XOR  = 6'd6,  OP_NOR  = 6'd7,
    OP_SLT  = 6'd8,  OP_SLTU = 6'd9,  OP_SLL  = 6'd10, OP_SRL  = 6'd11,
    OP_SRA  = 6'd12, OP_SLLV = 6'd13, OP_SRLV = 6'd14, OP_SRAV = 6'd15,
    OP_ADDI = 6'd16, OP_ADDIU= 6'd17, OP_SLTI = 6'd18, OP_SLTIU= 6'd19,
    OP_ANDI = 6'd20, OP_ORI  = 6'd21, OP_XORI = 6'd22, OP_LUI  = 6'd23,
    // BJU
    OP_BEQ  = 6'd24, OP_BNE  = 6'd25, OP_BLEZ = 6'd26, OP_BGTZ = 6'd27,
    OP_BLTZ = 6'd28, OP_BGEZ = 6'd29, OP_BLTZAL = 6'd30, OP_BGEZAL = 6'd31,
    OP_J    = 6'd32, OP_JAL  = 6'd33, OP_JR   = 6'd34, OP_JALR = 6'd35,
    // MDU
    OP_MULT = 6'd36, OP_MULTU= 6'd37, OP_DIV  = 6'd38, OP_DIVU = 6'd39,
    OP_MFHI = 6'd40, OP_MFLO = 6'd41, OP_MTHI = 6'd42, OP_MTLO = 6'd43,
    // LSU
    OP_LB   = 6'd44, OP_LBU  = 6'd45, OP_LH   = 6'd46, OP_LHU  = 6'd47,
    OP_LW   = 6'd48, OP_LWL  = 6'd49, OP_LWR  = 6'd50, OP_SB   = 6'd51,
    OP_SH   = 6'd52, OP_SW   = 6'd53, OP_SWL  = 6'd54, OP_SWR  = 6'd55,
    // CP0 and miscellaneous
    OP_MFC0 = 6'd56, OP_MTC0 = 6'd57, OP_RFE  = 6'd58,
    OP_SYSCALL = 6'd59, OP_BREAK = 6'd60,
    OP_NONE = 6'd63
  } op_t;

  // Decoder output word for one instruction (45 bits).
  typedef struct packed {
    fu_t          fu;    // [44:42]
    op_t          op;    // [41:36]
    lreg_t        rd;    // [35:31] logical destination (0 = none)
    lreg_t        rs;    // [30:26]
    lreg_t        rt;    // [25:21]
    logic [4:0]   sa;    // [20:16]
    logic [15:0]  imm;   // [15:0]
  } dec_t;

  // Functional-unit result / common-data-bus word (109 bits).
  typedef struct packed {
    rob_tag_t          reo;      // [108:103] reorder-buffer slot
    logic [NPHYS-1:0]  wb_dest;  // [102:39]  pre-decoded value-buffer location
    logic [31:0]       data;     // [38:7]
    pptr_t             dest;     // [6:1]     destination pseudo-pointer
    logic              wb;       // [0]       1: write the value buffer
  } result_t;

  // Branch bus word from the branch and jump unit to the reorder buffer (71 bits).
  typedef struct packed {
    logic [1:0]   correct_pred;  // [70:69] updated 2-bit counter
    logic [2:0]   code;          // [68:66] 3'b001 for link instructions
    lreg_t        ldest;         // [65:61]
    pptr_t        dest;          // [60:55]
    logic         ds_instr;      // [54]
    logic [19:0]  bj_addr;       // [53:34] low bits of the branch address
    logic [31:0]  bta;           // [33:2]  address to continue from after the delay slot
    logic         mispred;       // [1]
    logic         one;           // [0]     always 1
  } brbus_t;


  // Operation handed from dispatch to a reservation station and from there to a unit.
  typedef struct packed {
    op_t          op;
    logic [4:0]   sa;
    logic [15:0]  imm;
    logic [25:0]  index;        // J/JAL instruction index
    logic [31:0]  pc;
    logic [31:0]  a;            // RS operand
    logic [31:0]  b;            // RT operand or immediate
    logic         a_ok, b_ok;   // operand present
    pptr_t        a_tag, b_tag; // pointer awaited when not present
    pptr_t        dest;
    lreg_t        ldest;
    logic         wb;           // writes a destination
    rob_tag_t     reo;
    logic         pred_taken;
    logic [31:0]  pred_target;
    logic [2:0]   pred;         // {BPB hit, counter}
    logic         ds_instr;
  } uop_t;

  function automatic logic [NPHYS-1:0] onehot64(input pptr_t p);
    return NPHYS'(1) << p;
  endfunction


  // Event counters brought out of the core.
  typedef struct packed {
    logic [31:0] cycles;        // cycles since reset
    logic [31:0] retired;       // committed instructions
    logic [31:0] branches;      // committed branches and jumps
    logic [31:0] restores;      // mispredictions (system restores)
    logic [31:0] dstall;        // cycles the dispatch stage could not place a whole block
    logic [31:0] fstall;        // fetch stalls from predictor port conflicts
    logic [31:0] rename_stall;  // cycles the prioritizer found fewer than four locations
    logic [31:0] rob_stall;     // cycles the reorder buffer had too few free slots
    logic [31:0] wb_wait;       // unit-cycles a finished result waited for a bus
    logic [31:0] src_ow;        // source pointers replaced by source overwrite
    logic [31:0] dst_ow;        // destination pointers replaced by destination overwrite
    logic [31:0] sb_fwd;        // loads that took bytes from the store buffer
    logic [31:0] pred_taken;    // blocks ended by a taken prediction
    logic [31:0] ovf;           // ALU signed overflows (not trapped)
  } perf_t;

  // Saturating two-bit counter step.
  function automatic logic [1:0] ctr_next(input logic [1:0] c, input logic taken);
    if (taken) return (c == 2'b11) ? 2'b11 : c + 2'b01;
    else       return (c == 2'b00) ? 2'b00 : c - 2'b01;
  endfunction

  // True for MIPS I branch and jump encodings.
  function automatic logic is_bj(input logic [31:0] w);
    logic [5:0] opc;
    opc = w[31:26];
    if (opc == 6'd0) return (w[5:0] == 6'h08) || (w[5:0] == 6'h09);
    return (opc == 6'h01) || (opc >= 6'h02 && opc <= 6'h07);
  endfunction

endpackage
