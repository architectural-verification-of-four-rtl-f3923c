// fetch_unit: program counter, four-word fetch and next-PC prediction.
//
// Each cycle the four words at PC..PC+12 are read from the instruction memory
// (combinational port imem_addr_o / imem_i, an ideal cache) while the branch target
// buffer and branch prediction buffer are looked up with the same PC. The first
// branch/jump word in the block (slot k) decides the block and the next PC:
//   * none:                       all four slots, next PC = PC+16;
//   * k = 3:                      slots 0..2, next PC = PC+12 (the branch is refetched
//                                 at the head of the next block so that its delay slot
//                                 travels with it);
//   * predicted taken (BTB and BPB nearest hits both at slot k, counter MSB = 1):
//                                 slots 0..k+1 (branch and delay slot), next PC = target;
//   * otherwise, with a second branch/jump after the delay slot:
//                                 slots 0..k+1, next PC = PC+4(k+2) (refetch);
//   * otherwise:                  all four slots, next PC = PC+16.
// The block, its PC, the per-slot predicted-taken bits, the predicted target and the
// per-slot {BPB hit, counter} are registered into the fetch/decode pipeline register.
// stall_i holds PC and that register; restore_i loads PC with restore_pc_i and empties
// the register. A BTB write (single port) or a BPB read/write clash stalls fetch for one
// cycle and inserts an empty block (fstall_o).
// Prediction rules follow the description; refetching a branch found in the last slot
// is this design's way of keeping every delay slot in the block of its branch.
module fetch_unit
  import mips_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000,
  parameter int unsigned IDX_W    = 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     stall_i,
  input  logic                     restore_i,
  input  logic [31:0]              restore_pc_i,
  // instruction memory
  output logic [31:0]              imem_addr_o,
  input  logic [FETCH_W-1:0][31:0] imem_i,
  // predictor update from commit
  input  logic                     btb_wr_i,
  input  logic [31:0]              btb_wr_addr_i,
  input  logic [31:0]              btb_wr_bta_i,
  input  logic                     bpb_wr_i,
  input  logic [31:0]              bpb_wr_addr_i,
  input  logic [1:0]               bpb_wr_ctr_i,
  // fetch/decode pipeline register
  output logic [FETCH_W-1:0]       valid_o,
  output logic [31:0]              pc_o,
  output logic [FETCH_W-1:0][31:0] instr_o,
  output logic [FETCH_W-1:0]       pred_taken_o,
  output logic [31:0]              pred_target_o,
  output logic [FETCH_W-1:0][2:0]  pred_info_o,
  // status
  output logic                     fstall_o,
  output logic [IDX_W+2:0]         btb_nvalid_o,
  output logic [IDX_W+2:0]         bpb_nvalid_o
);
  logic [31:0] pc_q;
  logic        btb_hit, btb_busy, bpb_hit, bpb_conf;
  logic [31:0] btb_bta;
  logic [1:0]  btb_slot, bpb_slot, bpb_pred;
  logic [3:0]  btb_slot_hit, bpb_slot_hit;
  logic [3:0][1:0] bpb_slot_ctr;

  btb #(.IDX_W(IDX_W)) u_btb (
    .clk, .rst, .pc_i(pc_q), .wr_i(btb_wr_i), .wr_addr_i(btb_wr_addr_i), .wr_bta_i(btb_wr_bta_i),
    .hit_o(btb_hit), .bta_o(btb_bta), .slot_o(btb_slot), .slot_hit_o(btb_slot_hit),
    .busy_o(btb_busy), .nvalid_o(btb_nvalid_o));

  bpb #(.IDX_W(IDX_W)) u_bpb (
    .clk, .rst, .pc_i(pc_q), .wr_i(bpb_wr_i), .wr_addr_i(bpb_wr_addr_i), .wr_ctr_i(bpb_wr_ctr_i),
    .hit_o(bpb_hit), .pred_o(bpb_pred), .slot_o(bpb_slot), .slot_hit_o(bpb_slot_hit),
    .slot_ctr_o(bpb_slot_ctr), .conflict_o(bpb_conf), .nvalid_o(bpb_nvalid_o));

  assign imem_addr_o = pc_q;
  assign fstall_o    = btb_busy | bpb_conf;

  logic [FETCH_W-1:0] mask, taken_slot;
  logic [31:0]        next_pc;

  always_comb begin
    logic [FETCH_W-1:0] bj;
    logic               found, second, taken;
    int unsigned        k0;
    for (int k = 0; k < FETCH_W; k++) bj[k] = is_bj(imem_i[k]);
    found = 1'b0; k0 = 0;
    for (int k = FETCH_W-1; k >= 0; k--) if (bj[k]) begin found = 1'b1; k0 = k; end
    second = 1'b0;
    for (int k = 0; k < FETCH_W; k++) if (found && k > k0 + 1 && bj[k]) second = 1'b1;
    taken = found && btb_hit && bpb_hit && bpb_pred[1] &&
            (32'(btb_slot) == k0) && (32'(bpb_slot) == k0);
    mask       = '1;
    taken_slot = '0;
    next_pc    = pc_q + 32'd16;
    if (found && k0 == FETCH_W-1) begin
      mask    = 4'b0111;
      next_pc = pc_q + 32'd12;
    end else if (found && taken) begin
      mask           = 4'((1 << (k0 + 2)) - 1);
      taken_slot[k0] = 1'b1;
      next_pc        = btb_bta;
    end else if (found && second) begin
      mask    = 4'((1 << (k0 + 2)) - 1);
      next_pc = pc_q + 32'(4 * (k0 + 2));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc_q    <= RESET_PC;
      valid_o <= '0;
    end else if (restore_i) begin
      pc_q    <= restore_pc_i;
      valid_o <= '0;
    end else if (!stall_i) begin
      if (fstall_o) begin
        valid_o <= '0;
      end else begin
        pc_q          <= next_pc;
        valid_o       <= mask;
        pc_o          <= pc_q;
        instr_o       <= imem_i;
        pred_taken_o  <= taken_slot;
        pred_target_o <= btb_bta;
        for (int k = 0; k < FETCH_W; k++) pred_info_o[k] <= {bpb_slot_hit[k], bpb_slot_ctr[k]};
      end
    end
  end
endmodule
