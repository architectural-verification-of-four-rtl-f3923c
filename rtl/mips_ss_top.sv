// mips_ss_top: four-instruction speculative superscalar MIPS I core with pointer-based
// pseudo-register renaming.
//
// Pipeline (one block of four instructions per cycle):
//   Fetch      fetch_unit: PC, four words from the instruction memory, BTB/BPB lookup.
//   Decode     isa_decoder; prioritizer picks four free value-buffer locations; the
//              issue pointer buffer (IPB) is read for the eight sources and
//              source_overwrite patches sources written earlier in the same block.
//              When the block moves on, the destinations (after dest_overwrite) are
//              written into the IPB, the chosen locations are marked allocated and
//              invalid, and the reorder buffer reserves one slot per non-NOP.
//   Dispatch   the value buffer is read (plus the common data buses of the same cycle)
//              and each instruction is written into the reservation station of its
//              unit, at most one per station per cycle; the next block waits until the
//              whole block is placed (dispatch stall).
//   Execute    two ALUs (1 cycle), branch/jump unit (1 cycle), load/store unit
//              (2 cycles, store buffer), multiply/divide unit (4 cycles, Hi-Lo).
//   Write back writeback_ctrl puts two results per cycle on common data buses I and II,
//              writing the value buffer, waking reservation stations and completing
//              reorder-buffer slots; the branch unit has its own bus to the reorder
//              buffer.
//   Commit I/II reorder_buffer picks up to four completed instructions in order; in the
//              next cycle their pseudo-pointers are written into the commit pointer
//              buffer (CPB), the pointers they replace are freed, predictors are
//              updated, and a mispredicted branch (after its delay slot) triggers a
//              restore: CPB copied into the IPB, uncommitted locations freed, stations,
//              units and pipeline registers emptied, PC loaded with the correct address.
// Coprocessor 0 reads as constant zero: the decoder turns MFC0 into an ALU operation that
// writes 0, and MTC0, RFE, SYSCALL and BREAK complete at dispatch without a result;
// committing BREAK raises halt_o. Memories are outside:
// imem is read four words at a time, dmem has a combinational read port and a byte-
// enabled write port. arch_reg_i/arch_val_o read a committed register; perf_o holds
// event counters. The organisation follows the description; the exact cycle in which
// the IPB and status bits are written (end of decode) is this design's.
module mips_ss_top
  import mips_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000,
  parameter int unsigned RS_DEPTH = 4,
  parameter int unsigned ROB_DEPTH = 64,
  parameter int unsigned MDU_LAT  = 4,
  parameter int unsigned SB_DEPTH = 8,
  parameter int unsigned BP_IDX_W = 4
) (
  input  logic                     clk,
  input  logic                     rst,
  output logic [31:0]              imem_addr_o,
  input  logic [FETCH_W-1:0][31:0] imem_rdata_i,
  output logic [31:0]              dmem_raddr_o,
  input  logic [31:0]              dmem_rdata_i,
  output logic                     dmem_we_o,
  output logic [31:0]              dmem_waddr_o,
  output logic [3:0]               dmem_be_o,
  output logic [31:0]              dmem_wdata_o,
  output logic                     halt_o,
  input  lreg_t                    arch_reg_i,
  output logic [31:0]              arch_val_o,
  output logic [31:0]              hi_o,
  output logic [31:0]              lo_o,
  output perf_t                    perf_o,
  output logic [BP_IDX_W+2:0]      btb_nvalid_o,
  output logic [BP_IDX_W+2:0]      bpb_nvalid_o
);
  localparam int unsigned NU = 5;  // units on the buses: ALU I, ALU II, BJU, LSU, MDU
  localparam int unsigned U_ALU1 = 0, U_ALU2 = 1, U_BJU = 2, U_LSU = 3, U_MDU = 4;

  // ------------------------------------------------------------------ commit / restore
  logic         restore;
  logic [31:0]  restore_pc;
  logic [3:0]   c_valid, c_wb;
  lreg_t [3:0]  c_ldest;
  pptr_t [3:0]  c_pdest, c_old;
  logic [2:0]   c_stores;
  logic         c_break, c_branch;
  logic         bpb_wr, btb_wr;
  logic [31:0]  bpb_addr, btb_addr, btb_bta;
  logic [1:0]   bpb_ctr;

  // ------------------------------------------------------------------ fetch
  logic                     f_stall, fstall;
  logic [FETCH_W-1:0]       fd_valid, fd_pred_taken;
  logic [31:0]              fd_pc, fd_pred_target;
  logic [FETCH_W-1:0][31:0] fd_instr;
  logic [FETCH_W-1:0][2:0]  fd_pred_info;

  fetch_unit #(.RESET_PC(RESET_PC), .IDX_W(BP_IDX_W)) u_fetch (
    .clk, .rst, .stall_i(f_stall), .restore_i(restore), .restore_pc_i(restore_pc),
    .imem_addr_o, .imem_i(imem_rdata_i),
    .btb_wr_i(btb_wr), .btb_wr_addr_i(btb_addr), .btb_wr_bta_i(btb_bta),
    .bpb_wr_i(bpb_wr), .bpb_wr_addr_i(bpb_addr), .bpb_wr_ctr_i(bpb_ctr),
    .valid_o(fd_valid), .pc_o(fd_pc), .instr_o(fd_instr), .pred_taken_o(fd_pred_taken),
    .pred_target_o(fd_pred_target), .pred_info_o(fd_pred_info), .fstall_o(fstall),
    .btb_nvalid_o, .bpb_nvalid_o);

  // ------------------------------------------------------------------ decode / rename
  dec_t [3:0]  dec;
  logic [3:0]  inst_id, shift_id, br_id, jmp_id, nop_id, j_or_jal;
  logic [5:0]  no_inst;
  logic [7:0]  immediate;
  logic [103:0] instr_index;

  isa_decoder u_dec (
    .reset(rst), .restore, .valid_i(fd_valid), .instr_i(fd_instr), .dec_o(dec),
    .inst_id, .no_inst, .immediate, .shift_id, .branch(br_id), .jump(jmp_id),
    .nop_id, .instr_index, .j_or_jal);

  logic [NPHYS-1:0] vb_alloc, vb_commit;
  pptr_t [3:0]      new_ptr;
  logic [3:0]       pri_found;
  logic [NPHYS-1:0] pri_upd;
  logic             pri_full;

  prioritizer u_pri (.alloc_i(vb_alloc), .ptr_o(new_ptr), .found_o(pri_found),
                     .alloc_upd_o(pri_upd), .full_o(pri_full));

  lreg_t [3:0] rs_l, rt_l, rd_l;
  logic  [3:0] has_dest;
  always_comb
    for (int k = 0; k < 4; k++) begin
      rs_l[k]     = dec[k].rs;
      rt_l[k]     = dec[k].rt;
      has_dest[k] = inst_id[k] && dec[k].rd != 5'd0 && dec[k].fu != FU_CP0;
      rd_l[k]     = has_dest[k] ? dec[k].rd : 5'd0;
    end

  lreg_t [7:0] ipb_raddr;
  pptr_t [7:0] ipb_rdata;
  pptr_t [3:0] rs_ipb, rt_ipb, owrs, owrt, owdest;
  always_comb
    for (int k = 0; k < 4; k++) begin
      ipb_raddr[2*k]   = rs_l[k];
      ipb_raddr[2*k+1] = rt_l[k];
      rs_ipb[k] = ipb_rdata[2*k];
      rt_ipb[k] = ipb_rdata[2*k+1];
    end

  source_overwrite u_sow (.rs_i(rs_l), .rt_i(rt_l), .rd_i(rd_l), .new_dest_i(new_ptr),
                          .rs_ipb_i(rs_ipb), .rt_ipb_i(rt_ipb), .owrs_o(owrs), .owrt_o(owrt));
  dest_overwrite u_dow (.dest_i(rd_l), .new_dest_i(new_ptr), .ow_dest_o(owdest));

  // ROB
  rob_tag_t [3:0] rob_tag;
  rob_tag_t       rob_head;
  logic [$clog2(ROB_DEPTH+1)-1:0] rob_free;

  // dispatch-stage state
  logic [3:0]        ds_pending, ds_sent;
  dec_t [3:0]        ds_dec;
  logic [3:0][31:0]  ds_pc;
  pptr_t [3:0]       ds_s1, ds_s2, ds_dst;
  logic [3:0]        ds_wb, ds_useimm, ds_jidx, ds_ptaken, ds_dsi;
  logic [3:0][25:0]  ds_index;
  logic [31:0]       ds_ptarget;
  logic [3:0][2:0]   ds_pinfo;
  rob_tag_t [3:0]    ds_reo;

  logic d_valid, d_fire, ds_free, rob_ok;
  assign d_valid = |fd_valid;
  assign ds_free = ((ds_pending & ~ds_sent) == '0);
  assign rob_ok  = 32'(rob_free) >= 32'(no_inst);
  assign d_fire  = d_valid & ds_free & rob_ok & ~pri_full & ~restore;
  assign f_stall = d_valid & ~d_fire;

  logic [3:0] ipb_we, ds_instr_k, is_store_k, is_break_k, done_k, is_bj_k;
  logic [3:0][31:0] slot_pc;
  logic [NPHYS-1:0] alloc_set;
  always_comb begin
    alloc_set = '0;
    for (int k = 0; k < 4; k++) begin
      ipb_we[k]     = d_fire & has_dest[k];
      if (ipb_we[k]) alloc_set = alloc_set | onehot64(new_ptr[k]);
      slot_pc[k]    = fd_pc + 32'(4 * k);
      is_bj_k[k]    = inst_id[k] && dec[k].fu == FU_BJU;
      ds_instr_k[k] = is_bj_k[k] && (k < 3) && inst_id[(k < 3) ? k + 1 : k];
      is_store_k[k] = dec[k].op inside {OP_SB, OP_SH, OP_SW, OP_SWL, OP_SWR};
      is_break_k[k] = dec[k].op == OP_BREAK;
      done_k[k]     = dec[k].fu == FU_CP0;
    end
  end

  // ------------------------------------------------------------------ register file
  logic [NPHYS-1:0] commit_set, dealloc;
  always_comb begin
    commit_set = '0; dealloc = '0;
    for (int j = 0; j < 4; j++)
      if (c_valid[j] && c_wb[j]) begin
        commit_set = commit_set | onehot64(c_pdest[j]);
        dealloc    = dealloc | onehot64(c_old[j]);
      end
  end

  pptr_t arch_ptr;
  pointer_buffer u_pb (
    .clk, .rst, .restore_i(restore),
    .raddr_i(ipb_raddr), .rdata_o(ipb_rdata),
    .we_i(ipb_we), .waddr_i(rd_l), .wdata_i(owdest),
    .ce_i(c_valid & c_wb), .caddr_i(c_ldest), .cdata_i(c_pdest), .old_o(c_old),
    .arch_raddr_i(arch_reg_i), .arch_rdata_o(arch_ptr));

  result_t [1:0]    cdb;
  logic    [1:0]    cdb_v;
  pptr_t   [7:0]    vb_rptr;
  logic    [7:0][31:0] vb_rdata;
  logic    [7:0]    vb_rvalid;

  value_buffer u_vb (
    .clk, .rst, .restore_i(restore), .rptr_i(vb_rptr), .rdata_o(vb_rdata), .rvalid_o(vb_rvalid),
    .cdb_i(cdb), .cdb_valid_i(cdb_v), .alloc_set_i(alloc_set), .commit_set_i(commit_set),
    .dealloc_i(dealloc), .alloc_o(vb_alloc), .commit_o(vb_commit),
    .obs_ptr_i(arch_ptr), .obs_data_o(arch_val_o));

  // ------------------------------------------------------------------ decode -> dispatch register
  always_ff @(posedge clk) begin
    if (rst || restore) begin
      ds_pending <= '0;
    end else if (d_fire) begin
      for (int k = 0; k < 4; k++) begin
        ds_pending[k] <= inst_id[k] && dec[k].fu != FU_CP0;
        ds_dec[k]     <= dec[k];
        ds_pc[k]      <= slot_pc[k];
        ds_s1[k]      <= owrs[k];
        ds_s2[k]      <= owrt[k];
        ds_dst[k]     <= new_ptr[k];
        ds_wb[k]      <= has_dest[k];
        ds_useimm[k]  <= ~immediate[2*k+1] & ~j_or_jal[k];
        ds_jidx[k]    <= j_or_jal[k];
        ds_index[k]   <= instr_index[26*k +: 26];
        ds_ptaken[k]  <= fd_pred_taken[k];
        ds_pinfo[k]   <= fd_pred_info[k];
        ds_dsi[k]     <= ds_instr_k[k];
        ds_reo[k]     <= rob_tag[k];
      end
      ds_ptarget <= fd_pred_target;
    end else begin
      ds_pending <= ds_pending & ~ds_sent;
    end
  end

  // ------------------------------------------------------------------ dispatch
  logic [NU-1:0] rs_in_v, rs_in_rdy, rs_iss_v, fu_rdy;
  uop_t [NU-1:0] rs_in_uop, rs_iss_uop;
  uop_t [3:0]    ds_uop;

  always_comb
    for (int k = 0; k < 4; k++) begin
      vb_rptr[2*k]   = ds_s1[k];
      vb_rptr[2*k+1] = ds_s2[k];
    end

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      logic [31:0] av, bv;
      logic        aok, bok;
      av = vb_rdata[2*k];   aok = vb_rvalid[2*k];
      bv = vb_rdata[2*k+1]; bok = vb_rvalid[2*k+1];
      for (int b = 0; b < 2; b++) begin
        if (cdb_v[b] && cdb[b].wb && cdb[b].dest == ds_s1[k] && ds_s1[k] != '0) begin av = cdb[b].data; aok = 1'b1; end
        if (cdb_v[b] && cdb[b].wb && cdb[b].dest == ds_s2[k] && ds_s2[k] != '0) begin bv = cdb[b].data; bok = 1'b1; end
      end
      if (ds_useimm[k])    begin bv = {16'd0, ds_dec[k].imm}; bok = 1'b1; end
      else if (ds_jidx[k]) begin bv = {6'd0, ds_index[k]};    bok = 1'b1; end
      ds_uop[k] = '{op: ds_dec[k].op, sa: ds_dec[k].sa, imm: ds_dec[k].imm, index: ds_index[k],
                    pc: ds_pc[k], a: av, b: bv, a_ok: aok, b_ok: bok, a_tag: ds_s1[k], b_tag: ds_s2[k],
                    dest: ds_dst[k], ldest: ds_wb[k] ? ds_dec[k].rd : 5'd0, wb: ds_wb[k],
                    reo: ds_reo[k], pred_taken: ds_ptaken[k], pred_target: ds_ptarget,
                    pred: ds_pinfo[k], ds_instr: ds_dsi[k]};
    end
  end

  always_comb begin
    logic [NU-1:0] used;
    int u;
    used = '0; ds_sent = '0; rs_in_v = '0;
    for (int v = 0; v < NU; v++) rs_in_uop[v] = ds_uop[0];
    for (int k = 0; k < 4; k++) begin
      u = -1;
      if (ds_pending[k] && !restore) begin
        unique case (ds_dec[k].fu)
          FU_ALU: if (!used[U_ALU1] && rs_in_rdy[U_ALU1]) u = U_ALU1;
                  else if (!used[U_ALU2] && rs_in_rdy[U_ALU2]) u = U_ALU2;
          FU_BJU: if (!used[U_BJU] && rs_in_rdy[U_BJU]) u = U_BJU;
          FU_LSU: if (!used[U_LSU] && rs_in_rdy[U_LSU]) u = U_LSU;
          FU_MDU: if (!used[U_MDU] && rs_in_rdy[U_MDU]) u = U_MDU;
          default: u = -1;
        endcase
        if (u >= 0) begin
          used[u] = 1'b1; rs_in_v[u] = 1'b1; rs_in_uop[u] = ds_uop[k]; ds_sent[k] = 1'b1;
        end
      end
      // keep the in-order stations in program order
      if (ds_pending[k] && !ds_sent[k] && ds_dec[k].fu inside {FU_LSU, FU_MDU}) begin
        if (ds_dec[k].fu == FU_LSU) used[U_LSU] = 1'b1; else used[U_MDU] = 1'b1;
      end
    end
  end

  // ------------------------------------------------------------------ stations and units
  for (genvar u = 0; u < NU; u++) begin : g_rs
    reservation_station #(.DEPTH(RS_DEPTH), .IN_ORDER(u == U_LSU || u == U_MDU)) u_rs (
      .clk, .rst, .flush_i(restore), .in_valid_i(rs_in_v[u]), .in_uop_i(rs_in_uop[u]),
      .in_ready_o(rs_in_rdy[u]), .cdb_i(cdb), .cdb_valid_i(cdb_v), .rob_head_i(rob_head),
      .fu_ready_i(fu_rdy[u]), .issue_valid_o(rs_iss_v[u]), .issue_uop_o(rs_iss_uop[u]),
      .count_o());
  end

  logic    [NU-1:0] wb_req, wb_gnt;
  result_t [NU-1:0] wb_res;
  logic    [1:0]    ovf;

  for (genvar u = 0; u < 2; u++) begin : g_alu
    alu u_alu (
      .clk, .rst, .flush_i(restore), .in_valid_i(rs_iss_v[u]), .exec_i(rs_iss_uop[u].op),
      .op1_i(rs_iss_uop[u].a), .op2_i(rs_iss_uop[u].b), .sa_i(rs_iss_uop[u].sa),
      .dest_i(rs_iss_uop[u].dest), .reo_i(rs_iss_uop[u].reo), .wb_bit_i(rs_iss_uop[u].wb),
      .ready_o(fu_rdy[u]), .req_o(wb_req[u]), .grant_i(wb_gnt[u]), .alu_result_o(wb_res[u]),
      .int_overflow_o(ovf[u]));
  end

  logic          brbus_v;
  brbus_t        brbus;
  logic [NPHYS-1:0] wsb;
  uop_t          bu;
  assign bu = rs_iss_uop[U_BJU];

  bju u_bju (
    .clk, .rst, .flush_i(restore), .in_valid_i(rs_iss_v[U_BJU]), .opcode_i(bu.op),
    .op1_i(bu.a), .op2_i(bu.b), .dest_i(bu.dest), .ldest_i(bu.ldest), .reo_i(bu.reo),
    .wb_bit_i(bu.wb), .pc_i(bu.pc), .offset_i(bu.imm), .index_i(bu.index),
    .ds_instr_i(bu.ds_instr), .pred_taken_i(bu.pred_taken), .pred_target_i(bu.pred_target),
    .prediction_i(bu.pred), .ready_o(fu_rdy[U_BJU]), .req_o(wb_req[U_BJU]),
    .grant_i(wb_gnt[U_BJU]), .bju_result_o(wb_res[U_BJU]), .brbus_valid_o(brbus_v),
    .brbus_o(brbus), .wsb_o(wsb));

  uop_t lu;
  logic sb_empty, sb_fwd;
  assign lu = rs_iss_uop[U_LSU];
  lsu #(.SB_DEPTH(SB_DEPTH)) u_lsu (
    .clk, .rst, .restore_i(restore), .in_valid_i(rs_iss_v[U_LSU]), .exec_i(lu.op),
    .op1_i(lu.a), .op2_i(lu.b), .offset_i(lu.imm), .dest_i(lu.dest), .reo_i(lu.reo),
    .wb_bit_i(lu.wb), .ready_o(fu_rdy[U_LSU]), .req_o(wb_req[U_LSU]), .grant_i(wb_gnt[U_LSU]),
    .lsu_result_o(wb_res[U_LSU]), .store_commit_cnt_i(c_stores),
    .dmem_raddr_o, .dmem_rdata_i, .dmem_we_o, .dmem_waddr_o, .dmem_be_o, .dmem_wdata_o,
    .sb_empty_o(sb_empty), .fwd_o(sb_fwd));

  uop_t mu;
  assign mu = rs_iss_uop[U_MDU];
  mdu #(.LAT(MDU_LAT)) u_mdu (
    .clk, .rst, .flush_i(restore), .in_valid_i(rs_iss_v[U_MDU]), .exec_i(mu.op),
    .op1_i(mu.a), .op2_i(mu.b), .dest_i(mu.dest), .reo_i(mu.reo), .wb_bit_i(mu.wb),
    .ready_o(fu_rdy[U_MDU]), .req_o(wb_req[U_MDU]), .grant_i(wb_gnt[U_MDU]),
    .mdu_result_o(wb_res[U_MDU]), .hi_o, .lo_o);

  writeback_ctrl #(.N(NU)) u_wb (.req_i(wb_req), .res_i(wb_res), .rob_head_i(rob_head),
                                 .grant_o(wb_gnt), .cdb_o(cdb), .cdb_valid_o(cdb_v));

  // ------------------------------------------------------------------ reorder buffer
  pptr_t [3:0] rob_pdest;
  always_comb for (int k = 0; k < 4; k++) rob_pdest[k] = new_ptr[k];

  reorder_buffer #(.DEPTH(ROB_DEPTH)) u_rob (
    .clk, .rst, .alloc_i(d_fire), .slot_valid_i(inst_id), .pc_i(slot_pc), .wb_i(has_dest),
    .ldest_i(rd_l), .pdest_i(rob_pdest), .is_bj_i(is_bj_k), .ds_instr_i(ds_instr_k),
    .is_store_i(is_store_k), .is_break_i(is_break_k), .done_i(done_k),
    .tag_o(rob_tag), .free_o(rob_free), .head_o(rob_head),
    .cdb_i(cdb), .cdb_valid_i(cdb_v), .brbus_valid_i(brbus_v), .brbus_i(brbus), .wsb_i(wsb),
    .c_valid_o(c_valid), .c_wb_o(c_wb), .c_ldest_o(c_ldest), .c_pdest_o(c_pdest),
    .c_stores_o(c_stores), .c_break_o(c_break), .c_branch_o(c_branch),
    .bpb_wr_o(bpb_wr), .bpb_addr_o(bpb_addr), .bpb_ctr_o(bpb_ctr),
    .btb_wr_o(btb_wr), .btb_addr_o(btb_addr), .btb_bta_o(btb_bta),
    .restore_o(restore), .restore_pc_o(restore_pc), .hold_i(halt_o | c_break));

  // ------------------------------------------------------------------ status and counters
  always_ff @(posedge clk) begin
    if (rst) begin
      halt_o <= 1'b0;
      perf_o <= '0;
    end else begin
      int unsigned nret, nsow, ndow, nwait;
      nret = 0; nsow = 0; ndow = 0; nwait = 0;
      for (int j = 0; j < 4; j++) nret += 32'(c_valid[j]);
      for (int k = 0; k < 4; k++) begin
        if (d_fire && inst_id[k] && owrs[k] != rs_ipb[k]) nsow++;
        if (d_fire && inst_id[k] && owrt[k] != rt_ipb[k]) nsow++;
        if (d_fire && has_dest[k] && owdest[k] != new_ptr[k]) ndow++;
      end
      for (int u = 0; u < NU; u++) nwait += 32'(wb_req[u] && !wb_gnt[u]);
      if (c_break) halt_o <= 1'b1;
      perf_o.cycles       <= perf_o.cycles + 1;
      perf_o.retired      <= perf_o.retired + nret;
      perf_o.branches     <= perf_o.branches + 32'(c_branch);
      perf_o.restores     <= perf_o.restores + 32'(restore);
      perf_o.dstall       <= perf_o.dstall + 32'(!restore && (ds_pending & ~ds_sent) != '0);
      perf_o.fstall       <= perf_o.fstall + 32'(fstall);
      perf_o.rename_stall <= perf_o.rename_stall + 32'(d_valid && pri_full);
      perf_o.rob_stall    <= perf_o.rob_stall + 32'(d_valid && !rob_ok && !pri_full);
      perf_o.wb_wait      <= perf_o.wb_wait + nwait;
      perf_o.src_ow       <= perf_o.src_ow + nsow;
      perf_o.dst_ow       <= perf_o.dst_ow + ndow;
      perf_o.sb_fwd       <= perf_o.sb_fwd + 32'(sb_fwd);
      perf_o.pred_taken   <= perf_o.pred_taken + 32'(d_fire && (|fd_pred_taken));
      perf_o.ovf          <= perf_o.ovf + 32'(ovf[0]) + 32'(ovf[1]);
    end
  end

endmodule
