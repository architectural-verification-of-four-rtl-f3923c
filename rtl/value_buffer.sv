// value_buffer: the single 64 x 32-bit register file holding architectural and
// pseudo-register values, with a valid, an allocate and a commit bit per location.
//
// Eight combinational read ports return data and valid bit for the source pointers of a
// block (dispatch stage). Two write ports take the common data buses; each carries a
// pre-decoded one-hot write select (wb_dest) and the write sets the valid bit. Status
// bits: alloc_set_i marks locations handed to new destinations (allocate = 1,
// valid = 0, commit = 0); commit_set_i marks committed destinations; dealloc_i frees
// locations whose mapping was replaced at commit (allocate = 0, commit = 0). On
// restore_i every allocated location that is not committed is freed. Location 0 is
// $zero: always reads 0, always valid, allocated and committed. After reset only
// location 0 is allocated and every location is valid and holds 0.
// All updates land on the clock edge (the description writes in the first half of
// write-back; here a write is visible from the next cycle, and the dispatch stage
// bypasses the buses of the current cycle itself).
module value_buffer
  import mips_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               restore_i,
  input  pptr_t [7:0]        rptr_i,
  output logic  [7:0][31:0]  rdata_o,
  output logic  [7:0]        rvalid_o,
  input  result_t [1:0]      cdb_i,
  input  logic  [1:0]        cdb_valid_i,
  input  logic  [NPHYS-1:0]  alloc_set_i,
  input  logic  [NPHYS-1:0]  commit_set_i,
  input  logic  [NPHYS-1:0]  dealloc_i,
  output logic  [NPHYS-1:0]  alloc_o,
  output logic  [NPHYS-1:0]  commit_o,
  input  pptr_t              obs_ptr_i,
  output logic  [31:0]       obs_data_o
);
  logic [31:0]      mem_q [NPHYS];
  logic [NPHYS-1:0] vld_q, alc_q, cmt_q;

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      rdata_o[i]  = (rptr_i[i] == '0) ? 32'd0 : mem_q[rptr_i[i]];
      rvalid_o[i] = (rptr_i[i] == '0) ? 1'b1  : vld_q[rptr_i[i]];
    end
    obs_data_o = (obs_ptr_i == '0) ? 32'd0 : mem_q[obs_ptr_i];
  end

  assign alloc_o  = alc_q;
  assign commit_o = cmt_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      vld_q <= '1;
      alc_q <= NPHYS'(1);
      cmt_q <= NPHYS'(1);
      for (int l = 0; l < NPHYS; l++) mem_q[l] <= '0;
    end else begin
      logic [NPHYS-1:0] c_n, a_n, v_n;
      c_n = (cmt_q | commit_set_i) & ~dealloc_i;
      a_n = (alc_q | alloc_set_i) & ~dealloc_i;
      v_n = vld_q & ~alloc_set_i;
      for (int b = 0; b < 2; b++)
        if (cdb_valid_i[b] && cdb_i[b].wb) v_n = v_n | cdb_i[b].wb_dest;
      if (restore_i) a_n = c_n;
      a_n[0] = 1'b1; c_n[0] = 1'b1; v_n[0] = 1'b1;
      cmt_q <= c_n;
      alc_q <= a_n;
      vld_q <= v_n;
      for (int b = 0; b < 2; b++)
        if (cdb_valid_i[b] && cdb_i[b].wb)
          for (int l = 1; l < NPHYS; l++)
            if (cdb_i[b].wb_dest[l]) mem_q[l] <= cdb_i[b].data;
    end
  end
endmodule
