// btb: branch target buffer, four single-ported banks read at four consecutive words.
//
// The low 16 bits of an address split into byte offset [1:0], bank number [3:2],
// index [IDX_W+3:4] and tag [15:IDX_W+4]. In the fetch stage the block addresses
// PC, PC+4, PC+8 and PC+12 fall into four different banks; every bank compares its
// stored tag and valid bit, the four hits are ORed into hit_o and a priority selector
// returns the target of the hit nearest to PC (slot_o gives its position, slot_hit_o
// the raw per-slot hits). A write (taken branch that mispredicted, from commit) uses the
// same single port: the multiplexer selects the branch address, the bank it names
// stores {tag, target, valid}, and busy_o tells fetch to stall for that cycle.
// Reads are combinational, the write lands on the clock edge. Reset clears the valid
// bits. Bank organisation, fields and the write-stall follow the description; 16
// entries per bank is this design's reading of the reported utilisation figures.
module btb
  import mips_pkg::*;
#(
  parameter int unsigned IDX_W = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] pc_i,
  input  logic        wr_i,
  input  logic [31:0] wr_addr_i,
  input  logic [31:0] wr_bta_i,
  output logic        hit_o,
  output logic [31:0] bta_o,
  output logic [1:0]  slot_o,
  output logic [3:0]  slot_hit_o,
  output logic        busy_o,
  output logic [IDX_W+2:0] nvalid_o
);
  localparam int unsigned TAG_W   = 12 - IDX_W;
  localparam int unsigned ENTRIES = 1 << IDX_W;

  logic [TAG_W-1:0] tag_q   [4][ENTRIES];
  logic [31:0]      bta_q   [4][ENTRIES];
  logic [ENTRIES-1:0] vld_q [4];

  logic [3:0][31:0] slot_bta;

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      logic [31:0] a;
      logic [1:0]  b;
      logic [IDX_W-1:0] ix;
      a  = pc_i + 32'(4 * k);
      b  = a[3:2];
      ix = a[IDX_W+3:4];
      slot_hit_o[k] = ~wr_i & vld_q[b][ix] & (tag_q[b][ix] == a[15:IDX_W+4]);
      slot_bta[k]   = bta_q[b][ix];
    end
    hit_o  = |slot_hit_o;
    slot_o = 2'd0;
    bta_o  = slot_bta[0];
    for (int k = 3; k >= 0; k--)
      if (slot_hit_o[k]) begin slot_o = 2'(k); bta_o = slot_bta[k]; end
  end

  assign busy_o = wr_i;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int b = 0; b < 4; b++) vld_q[b] <= '0;
    end else if (wr_i) begin
      tag_q[wr_addr_i[3:2]][wr_addr_i[IDX_W+3:4]] <= wr_addr_i[15:IDX_W+4];
      bta_q[wr_addr_i[3:2]][wr_addr_i[IDX_W+3:4]] <= wr_bta_i;
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
