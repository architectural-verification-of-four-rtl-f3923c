// reorder_buffer: wrap-around FIFO that puts completed instructions back in program
// order, commits up to four per cycle and detects mispredicted branches at its head.
//
// Issue side: a block reserves one slot per non-NOP instruction (alloc_i with the slot
// mask), in program order at the issue pointer (tail); tag_o gives each slot its tag.
// free_o is the number of empty slots. Completion: the two common data buses mark their
// slots complete; the branch bus (pre-decoded slot wsb_i) completes a branch/jump and
// records misprediction, outcome, target and the updated counter.
// Commit I (combinational on the head): the four entries from the commit pointer are
// taken up to the first incomplete one, with at most one branch/jump per group. A
// mispredicted branch/jump is taken together with its delay-slot instruction (when it
// has one, ds_instr) or not at all, and ends the group; so does BREAK. The chosen group
// is registered. Commit II (the registered group) drives the commit outputs: logical
// and pseudo destinations for the commit pointer buffer, the number of committed
// stores, the BPB update of the branch/jump, the BTB write when a mispredicted
// branch/jump was taken, and restore_o with restore_pc_o (target if taken, else PC+8)
// for a misprediction. During a restore cycle nothing new commits and at its edge the
// buffer empties. DEPTH is 64 (6-bit tags, as in the result format). Commit width,
// head-of-queue misprediction handling and the two commit stages follow the description;
// the entry layout and the group rules are this design's.
module reorder_buffer
  import mips_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic                clk,
  input  logic                rst,
  // allocation (dispatch)
  input  logic                alloc_i,
  input  logic [3:0]          slot_valid_i,
  input  logic [3:0][31:0]    pc_i,
  input  logic [3:0]          wb_i,
  input  lreg_t [3:0]         ldest_i,
  input  pptr_t [3:0]         pdest_i,
  input  logic [3:0]          is_bj_i,
  input  logic [3:0]          ds_instr_i,
  input  logic [3:0]          is_store_i,
  input  logic [3:0]          is_break_i,
  input  logic [3:0]          done_i,        // complete at allocation (CP0 / misc)
  output rob_tag_t [3:0]      tag_o,
  output logic [$clog2(DEPTH+1)-1:0] free_o,
  output rob_tag_t            head_o,
  // completion
  input  result_t [1:0]       cdb_i,
  input  logic [1:0]          cdb_valid_i,
  input  logic                brbus_valid_i,
  input  brbus_t              brbus_i,
  input  logic [NPHYS-1:0]    wsb_i,
  // commit II outputs
  output logic [3:0]          c_valid_o,
  output logic [3:0]          c_wb_o,
  output lreg_t [3:0]         c_ldest_o,
  output pptr_t [3:0]         c_pdest_o,
  output logic [2:0]          c_stores_o,
  output logic                c_break_o,
  output logic                c_branch_o,
  output logic                bpb_wr_o,
  output logic [31:0]         bpb_addr_o,
  output logic [1:0]          bpb_ctr_o,
  output logic                btb_wr_o,
  output logic [31:0]         btb_addr_o,
  output logic [31:0]         btb_bta_o,
  output logic                restore_o,
  output logic [31:0]         restore_pc_o,
  input  logic                hold_i         // stop committing (after BREAK)
);
  localparam int unsigned AW = $clog2(DEPTH);

  typedef struct packed {
    logic        complete;
    logic        wb;
    lreg_t       ldest;
    pptr_t       pdest;
    logic        is_bj;
    logic        ds_instr;
    logic        is_store;
    logic        is_break;
    logic        mispred;
    logic        taken;
    logic [31:0] bta;
    logic [1:0]  ctr;
    logic [31:0] pc;
  } ent_t;

  ent_t            ent_q [DEPTH];
  logic [DEPTH-1:0] vld_q;
  logic [AW-1:0]   head_q, tail_q;
  logic [AW:0]     count_q;

  assign head_o = rob_tag_t'(head_q);
  assign free_o = ($clog2(DEPTH+1))'(DEPTH) - ($clog2(DEPTH+1))'(count_q);

  always_comb begin
    logic [AW-1:0] t;
    t = tail_q;
    for (int k = 0; k < 4; k++) begin
      tag_o[k] = rob_tag_t'(t);
      if (slot_valid_i[k]) t = t + 1'b1;
    end
  end

  // ---------------- Commit I ----------------
  logic [3:0] sel;
  logic       sel_restore;
  always_comb begin
    logic stop, bj_seen;
    sel = '0; sel_restore = 1'b0; stop = 1'b0; bj_seen = 1'b0;
    for (int i = 0; i < 4; i++) begin
      logic [AW-1:0] ix, nx;
      ix = head_q + AW'(i);
      nx = ix + 1'b1;
      if (!stop) begin
        if (!vld_q[ix] || !ent_q[ix].complete) stop = 1'b1;
        else if (ent_q[ix].is_bj) begin
          if (bj_seen) stop = 1'b1;
          else begin
            bj_seen = 1'b1;
            if (ent_q[ix].mispred) begin
              stop = 1'b1;
              if (!ent_q[ix].ds_instr) begin
                sel[i] = 1'b1; sel_restore = 1'b1;
              end else if (i < 3 && vld_q[nx] && ent_q[nx].complete) begin
                sel[i] = 1'b1; sel[i+1] = 1'b1; sel_restore = 1'b1;
              end
            end else sel[i] = 1'b1;
          end
        end else if (ent_q[ix].is_break) begin
          sel[i] = 1'b1; stop = 1'b1;
        end else sel[i] = 1'b1;
      end
    end
    if (restore_o || hold_i) begin sel = '0; sel_restore = 1'b0; end
  end

  // ---------------- Commit II register ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      c_valid_o <= '0; c_stores_o <= '0; c_break_o <= 1'b0; c_branch_o <= 1'b0;
      bpb_wr_o <= 1'b0; btb_wr_o <= 1'b0; restore_o <= 1'b0;
    end else begin
      logic [2:0] ns;
      ns = '0;
      bpb_wr_o <= 1'b0; btb_wr_o <= 1'b0; c_break_o <= 1'b0; c_branch_o <= 1'b0;
      for (int i = 0; i < 4; i++) begin
        logic [AW-1:0] ix;
        ix = head_q + AW'(i);
        c_valid_o[i] <= sel[i];
        c_wb_o[i]    <= ent_q[ix].wb;
        c_ldest_o[i] <= ent_q[ix].ldest;
        c_pdest_o[i] <= ent_q[ix].pdest;
        if (sel[i] && ent_q[ix].is_store) ns = ns + 1'b1;
        if (sel[i] && ent_q[ix].is_break) c_break_o <= 1'b1;
        if (sel[i] && ent_q[ix].is_bj) begin
          c_branch_o   <= 1'b1;
          bpb_wr_o     <= 1'b1;
          bpb_addr_o   <= ent_q[ix].pc;
          bpb_ctr_o    <= ent_q[ix].ctr;
          btb_wr_o     <= ent_q[ix].mispred & ent_q[ix].taken;
          btb_addr_o   <= ent_q[ix].pc;
          btb_bta_o    <= ent_q[ix].bta;
          restore_pc_o <= ent_q[ix].taken ? ent_q[ix].bta : ent_q[ix].pc + 32'd8;
        end
      end
      c_stores_o <= ns;
      restore_o  <= sel_restore;
    end
  end

  // ---------------- queue state ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      vld_q <= '0; head_q <= '0; tail_q <= '0; count_q <= '0;
    end else if (restore_o) begin
      vld_q <= '0; tail_q <= head_q; count_q <= '0;
    end else begin
      logic [AW-1:0] h, t;
      logic [AW:0]   c;
      h = head_q; t = tail_q; c = count_q;
      // completion
      for (int b = 0; b < 2; b++)
        if (cdb_valid_i[b]) ent_q[cdb_i[b].reo].complete <= 1'b1;
      if (brbus_valid_i)
        for (int e = 0; e < DEPTH; e++)
          if (wsb_i[e]) begin
            ent_q[e].complete <= 1'b1;
            ent_q[e].mispred  <= brbus_i.mispred;
            ent_q[e].taken    <= brbus_i.code[2];
            ent_q[e].bta      <= brbus_i.bta;
            ent_q[e].ctr      <= brbus_i.correct_pred;
          end
      // commit I: retire the selected group
      for (int i = 0; i < 4; i++)
        if (sel[i]) begin vld_q[h] <= 1'b0; h = h + 1'b1; c = c - 1'b1; end
      // allocation
      if (alloc_i)
        for (int k = 0; k < 4; k++)
          if (slot_valid_i[k]) begin
            ent_q[t] <= '{complete: done_i[k], wb: wb_i[k], ldest: ldest_i[k], pdest: pdest_i[k],
                          is_bj: is_bj_i[k], ds_instr: ds_instr_i[k], is_store: is_store_i[k],
                          is_break: is_break_i[k], mispred: 1'b0, taken: 1'b0, bta: '0,
                          ctr: 2'b00, pc: pc_i[k]};
            vld_q[t] <= 1'b1;
            t = t + 1'b1; c = c + 1'b1;
          end
      head_q <= h; tail_q <= t; count_q <= c;
    end
  end
endmodule
