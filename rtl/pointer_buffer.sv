// pointer_buffer: issue pointer buffer (IPB) and commit pointer buffer (CPB).
//
// Both are 32-row tables of 6-bit pseudo-pointers indexed by the logical register number.
// The IPB maps every logical register to the newest (possibly speculative) value-buffer
// location: eight read ports serve the RS/RT sources of a block and four write ports
// take the (destination-overwritten) pointers of the renamed destinations, later slots
// winning. The CPB maps logical registers to committed locations: up to four commits per
// cycle, each returning the pointer it replaces (old_o, for de-allocation), with
// program-order semantics inside the group. On restore_i the IPB is overwritten with the
// CPB contents, including the commits of the same cycle. Row 0 ($zero) reads 0 and is
// never written; reset forces every row to 0.
// Reads are combinational; writes, commits and the restore copy land on the clock edge
// (the half-cycle read/write split of the description becomes read-before-edge /
// write-at-edge). arch_raddr_i / arch_rdata_o read the CPB for observation.
module pointer_buffer
  import mips_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  restore_i,
  // issue side
  input  lreg_t [7:0]           raddr_i,
  output pptr_t [7:0]           rdata_o,
  input  logic  [3:0]           we_i,
  input  lreg_t [3:0]           waddr_i,
  input  pptr_t [3:0]           wdata_i,
  // commit side
  input  logic  [3:0]           ce_i,
  input  lreg_t [3:0]           caddr_i,
  input  pptr_t [3:0]           cdata_i,
  output pptr_t [3:0]           old_o,
  // observation
  input  lreg_t                 arch_raddr_i,
  output pptr_t                 arch_rdata_o
);
  pptr_t ipb_q [NLOG];
  pptr_t cpb_q [NLOG];
  pptr_t cpb_n [NLOG];

  always_comb begin
    for (int i = 0; i < 8; i++) rdata_o[i] = (raddr_i[i] == 5'd0) ? '0 : ipb_q[raddr_i[i]];
    arch_rdata_o = cpb_q[arch_raddr_i];
  end

  // Commit group applied in program order.
  always_comb begin
    for (int r = 0; r < NLOG; r++) cpb_n[r] = cpb_q[r];
    for (int j = 0; j < 4; j++) begin
      old_o[j] = cpb_n[caddr_i[j]];
      if (ce_i[j] && caddr_i[j] != 5'd0) cpb_n[caddr_i[j]] = cdata_i[j];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < NLOG; r++) begin ipb_q[r] <= '0; cpb_q[r] <= '0; end
    end else begin
      for (int r = 0; r < NLOG; r++) cpb_q[r] <= cpb_n[r];
      if (restore_i) begin
        for (int r = 0; r < NLOG; r++) ipb_q[r] <= cpb_n[r];
      end else begin
        for (int j = 0; j < 4; j++)
          if (we_i[j] && waddr_i[j] != 5'd0) ipb_q[waddr_i[j]] <= wdata_i[j];
      end
    end
  end
endmodule
