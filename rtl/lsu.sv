// lsu: load and store unit, two stages, with the store buffer.
//
// Stage 1 (the cycle after issue) holds the effective address OP I + sign-extended
// offset. In stage 2 a load reads the data memory word (combinational port
// dmem_raddr_o / dmem_rdata_i) and the store buffer; bytes found in the store buffer
// win, so the newest copy is used. The byte or halfword is selected and sign- or
// zero-extended (big-endian byte order) and the result waits for a common data bus.
// A store computes byte enables and positions its data, is written into the store
// buffer in stage 2 and reports completion on a bus without a register write. The
// store buffer drains committed stores to memory in cycles when no load reads it.
// Operations issue in program order (the reservation station is in-order), so every
// older store is in the store buffer before a younger load looks. The unaligned pair
// LWL/LWR merges the addressed bytes into the old rt value (OP II); SWL/SWR write only
// the bytes from the address to the end or start of the word. Latency two cycles as
// described; byte order and the port shapes are this design's choices.
module lsu
  import mips_pkg::*;
#(
  parameter int unsigned SB_DEPTH = 8
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     restore_i,
  input  logic     in_valid_i,
  input  op_t      exec_i,
  input  logic [31:0] op1_i,
  input  logic [31:0] op2_i,
  input  logic [15:0] offset_i,
  input  pptr_t    dest_i,
  input  rob_tag_t reo_i,
  input  logic     wb_bit_i,
  output logic     ready_o,
  output logic     req_o,
  input  logic     grant_i,
  output result_t  lsu_result_o,
  input  logic [2:0] store_commit_cnt_i,
  output logic [31:0] dmem_raddr_o,
  input  logic [31:0] dmem_rdata_i,
  output logic        dmem_we_o,
  output logic [31:0] dmem_waddr_o,
  output logic [3:0]  dmem_be_o,
  output logic [31:0] dmem_wdata_o,
  output logic        sb_empty_o,
  output logic        fwd_o
);
  logic        s1_v, out_v;
  op_t         s1_op;
  logic [31:0] s1_addr, s1_data;
  pptr_t       s1_dest;
  rob_tag_t    s1_reo;
  logic        s1_wb;

  logic s1_load, s1_adv, sb_full;
  logic [3:0]  fwd_mask;
  logic [31:0] fwd_data, word, ldval, st_data;
  logic [3:0]  st_be;

  assign s1_load = s1_op inside {OP_LB, OP_LBU, OP_LH, OP_LHU, OP_LW, OP_LWL, OP_LWR};
  assign req_o   = out_v;
  assign s1_adv  = s1_v & (~out_v | grant_i) & (s1_load | ~sb_full);
  assign ready_o = ~s1_v | s1_adv;

  assign dmem_raddr_o = {s1_addr[31:2], 2'b00};

  always_comb begin
    int o;
    o = int'(s1_addr[1:0]);
    for (int b = 0; b < 4; b++) word[8*b +: 8] = fwd_mask[b] ? fwd_data[8*b +: 8] : dmem_rdata_i[8*b +: 8];
    unique case (s1_op)
      OP_LB:  ldval = {{24{word[8*(3-o)+7]}}, word[8*(3-o) +: 8]};
      OP_LBU: ldval = {24'd0, word[8*(3-o) +: 8]};
      OP_LH:  ldval = s1_addr[1] ? {{16{word[15]}}, word[15:0]} : {{16{word[31]}}, word[31:16]};
      OP_LHU: ldval = s1_addr[1] ? {16'd0, word[15:0]} : {16'd0, word[31:16]};
      // unaligned word: memory bytes replace the high (LWL) or low (LWR) part of rt
      OP_LWL: ldval = (word << 8*o) | (s1_data & ~(32'hFFFF_FFFF << 8*o));
      OP_LWR: ldval = (word >> 8*(3-o)) | (s1_data & ~(32'hFFFF_FFFF >> 8*(3-o)));
      default: ldval = word;
    endcase
    unique case (s1_op)
      OP_SB:   begin st_be = 4'b0001 << (3 - o); st_data = {4{s1_data[7:0]}}; end
      OP_SH:   begin st_be = s1_addr[1] ? 4'b0011 : 4'b1100; st_data = {2{s1_data[15:0]}}; end
      OP_SWL:  begin st_be = 4'b1111 >> o; st_data = s1_data >> 8*o; end
      OP_SWR:  begin st_be = 4'(4'b1111 << (3-o)); st_data = s1_data << 8*(3-o); end
      default: begin st_be = 4'b1111; st_data = s1_data; end
    endcase
  end

  store_buffer #(.DEPTH(SB_DEPTH)) u_sb (
    .clk, .rst, .restore_i,
    .push_i(s1_adv & ~s1_load), .push_addr_i(s1_addr[31:2]), .push_be_i(st_be), .push_data_i(st_data),
    .full_o(sb_full), .commit_cnt_i(store_commit_cnt_i),
    .ld_addr_i(s1_addr[31:2]), .fwd_mask_o(fwd_mask), .fwd_data_o(fwd_data),
    .mem_busy_i(s1_v & s1_load), .mem_we_o(dmem_we_o), .mem_addr_o(dmem_waddr_o[31:2]),
    .mem_be_o(dmem_be_o), .mem_data_o(dmem_wdata_o), .empty_o(sb_empty_o));
  assign dmem_waddr_o[1:0] = 2'b00;
  assign fwd_o = s1_adv & s1_load & (|fwd_mask);

  always_ff @(posedge clk) begin
    if (rst || restore_i) begin
      s1_v <= 1'b0; out_v <= 1'b0;
    end else begin
      if (out_v && grant_i) out_v <= 1'b0;
      if (s1_adv) begin
        out_v <= 1'b1;
        lsu_result_o <= '{reo: s1_reo, wb_dest: (s1_load && s1_wb) ? onehot64(s1_dest) : '0,
                          data: ldval, dest: s1_dest, wb: s1_load && s1_wb};
      end
      if (ready_o) begin
        s1_v <= in_valid_i;
        if (in_valid_i) begin
          s1_op   <= exec_i;
          s1_addr <= op1_i + {{16{offset_i[15]}}, offset_i};
          s1_data <= op2_i;
          s1_dest <= dest_i;
          s1_reo  <= reo_i;
          s1_wb   <= wb_bit_i;
        end
      end
    end
  end
endmodule
