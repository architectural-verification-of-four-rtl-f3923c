// bpb: branch prediction buffer of two-bit saturating counters, four banks with a
// separate read port and write port.
//
// Same address split as the branch target buffer (bank [3:2], index, tag). The read side
// decodes the PC and reads four consecutive words in the fetch stage; tags and valid
// bits give per-slot hits, hit_o is their OR and pred_o the counter of the hit nearest
// to PC (its MSB is the prediction: 1 taken, 0 not taken). The write side decodes the
// committed branch/jump address and stores {tag, counter, valid} for every committed
// branch, whatever its outcome. conflict_o flags a write to a location being read in
// the same cycle, which the core treats as a one-cycle fetch stall. Reads are
// combinational, writes on the clock edge; reset clears the valid bits.
// Organisation, ports and stall follow the description; sizes are this design's choice
// (see btb).
module bpb
  import mips_pkg::*;
#(
  parameter int unsigned IDX_W = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] pc_i,
  input  logic        wr_i,
  input  logic [31:0] wr_addr_i,
  input  logic [1:0]  wr_ctr_i,
  output logic        hit_o,
  output logic [1:0]  pred_o,
  output logic [1:0]  slot_o,
  output logic [3:0]  slot_hit_o,
  output logic [3:0][1:0] slot_ctr_o,
  output logic        conflict_o,
  output logic [IDX_W+2:0] nvalid_o
);
  localparam int unsigned TAG_W   = 12 - IDX_W;
  localparam int unsigned ENTRIES = 1 << IDX_W;

  logic [TAG_W-1:0]   tag_q [4][ENTRIES];
  logic [1:0]         ctr_q [4][ENTRIES];
  logic [ENTRIES-1:0] vld_q [4];

  always_comb begin
    conflict_o = 1'b0;
    for (int k = 0; k < 4; k++) begin
      logic [31:0] a;
      logic [1:0]  b;
      logic [IDX_W-1:0] ix;
      a  = pc_i + 32'(4 * k);
      b  = a[3:2];
      ix = a[IDX_W+3:4];
      slot_hit_o[k] = vld_q[b][ix] & (tag_q[b][ix] == a[15:IDX_W+4]);
      slot_ctr_o[k] = ctr_q[b][ix];
      if (wr_i && wr_addr_i[IDX_W+3:2] == a[IDX_W+3:2]) conflict_o = 1'b1;
    end
    hit_o  = |slot_hit_o;
    slot_o = 2'd0;
    pred_o = slot_ctr_o[0];
    for (int k = 3; k >= 0; k--)
      if (slot_hit_o[k]) begin slot_o = 2'(k); pred_o = slot_ctr_o[k]; end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int b = 0; b < 4; b++) vld_q[b] <= '0;
    end else if (wr_i) begin
      tag_q[wr_addr_i[3:2]][wr_addr_i[IDX_W+3:4]] <= wr_addr_i[15:IDX_W+4];
      ctr_q[wr_addr_i[3:2]][wr_addr_i[IDX_W+3:4]] <= wr_ctr_i;
      vld_q[wr_addr_i[3:2]][wr_addr_i[IDX_W+3:4]] <= 1'b1;
    end
  end
  // Utilisation: number of valid locations over all banks.
  always_comb begin
    nvalid_o = '0;
    for (int b = 0; b < 4; b++)
      for (int e = 0; e < ENTRIES; e++) nvalid_o = nvalid_o + (IDX_W+3)'(vld_q[b][e]);
  end
endmodule
