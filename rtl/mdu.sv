// mdu: multiply and divide unit with the Hi-Lo buffer.
//
// Accepts one operation at a time and finishes it LAT cycles later (four in the
// description). MULT/MULTU/DIV/DIVU write the 64-bit result into the Hi-Lo buffer
// (HI = high word or remainder, LO = low word or quotient) in the last cycle of
// execution and report completion on a common data bus without a register write
// (wb = 0); MTHI/MTLO write HI/LO from OP I; MFHI/MFLO return HI/LO as a register
// result. Results are held until grant_i. Division by zero leaves LO = all ones and
// HI = dividend. flush_i drops the operation in flight but, as in the description,
// Hi-Lo writes already done are not undone. The unit is not pipelined; its
// reservation station issues in program order so HI/LO readers follow their writers.
// Latency follows the description; the non-pipelined organisation and the
// divide-by-zero values are this design's choices.
module mdu
  import mips_pkg::*;
#(
  parameter int unsigned LAT = 4
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     flush_i,
  input  logic     in_valid_i,
  input  op_t      exec_i,
  input  logic [31:0] op1_i,
  input  logic [31:0] op2_i,
  input  pptr_t    dest_i,
  input  rob_tag_t reo_i,
  input  logic     wb_bit_i,
  output logic     ready_o,
  output logic     req_o,
  input  logic     grant_i,
  output result_t  mdu_result_o,
  output logic [31:0] hi_o,
  output logic [31:0] lo_o
);
  logic [$clog2(LAT+1)-1:0] cnt_q;
  logic        busy_q, done_q;
  op_t         op_q;
  logic [31:0] a_q, b_q;
  pptr_t       dest_q;
  rob_tag_t    reo_q;
  logic        wb_q;
  logic [31:0] hi_q, lo_q;

  assign hi_o    = hi_q;
  assign lo_o    = lo_q;
  assign req_o   = done_q;
  assign ready_o = ~busy_q & (~done_q | grant_i);

  logic [63:0] prod;
  logic [31:0] quo, rem;
  always_comb begin
    prod = '0; quo = '1; rem = a_q;
    unique case (op_q)
      OP_MULT:  prod = 64'($signed({{32{a_q[31]}}, a_q}) * $signed({{32{b_q[31]}}, b_q}));
      OP_MULTU: prod = {32'd0, a_q} * {32'd0, b_q};
      OP_DIV:   if (b_q != 0) begin
                  quo = 32'($signed(a_q) / $signed(b_q));
                  rem = 32'($signed(a_q) % $signed(b_q));
                end
      OP_DIVU:  if (b_q != 0) begin quo = a_q / b_q; rem = a_q % b_q; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hi_q <= '0; lo_q <= '0;
    end
    if (rst || flush_i) begin
      busy_q <= 1'b0; done_q <= 1'b0; cnt_q <= '0;
    end else begin
      if (done_q && grant_i) done_q <= 1'b0;
      if (in_valid_i && ready_o) begin
        busy_q <= 1'b1; cnt_q <= ($clog2(LAT+1))'(1);
        op_q <= exec_i; a_q <= op1_i; b_q <= op2_i;
        dest_q <= dest_i; reo_q <= reo_i; wb_q <= wb_bit_i;
      end else if (busy_q) begin
        if (cnt_q == ($clog2(LAT+1))'(LAT-1)) begin
          // last cycle of execution: Hi-Lo write, result registered
          busy_q <= 1'b0; done_q <= 1'b1;
          unique case (op_q)
            OP_MULT, OP_MULTU: begin hi_q <= prod[63:32]; lo_q <= prod[31:0]; end
            OP_DIV, OP_DIVU:   begin hi_q <= rem; lo_q <= quo; end
            OP_MTHI: hi_q <= a_q;
            OP_MTLO: lo_q <= a_q;
            default: ;
          endcase
          mdu_result_o <= '{reo: reo_q,
                            wb_dest: (wb_q && op_q inside {OP_MFHI, OP_MFLO}) ? onehot64(dest_q) : '0,
                            data: (op_q == OP_MFHI) ? hi_q : lo_q, dest: dest_q,
                            wb: wb_q && op_q inside {OP_MFHI, OP_MFLO}};
        end else begin
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end
endmodule
