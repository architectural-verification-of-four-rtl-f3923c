// store_buffer: in-order queue of executed stores between the load/store unit and the
// data memory.
//
// A store is written here when it executes (push_i: word address, byte enables, data),
// instead of into the memory. Entries become committed when the reorder buffer commits
// their stores (commit_cnt_i = number of stores committed this cycle, applied to the
// oldest uncommitted entries). The oldest committed entry is written to memory when
// the memory port is free, i.e. no load uses it this cycle (mem_busy_i): loads go first.
// On restore_i the uncommitted entries (wrong path) are dropped. Loads look here first:
// for every byte the youngest matching entry supplies the data (fwd_mask_o / fwd_data_o),
// so a load always sees the latest store. full_o stops the load/store unit.
// The store buffer, load priority and load look-up follow the description; committing
// before the memory write, the depth and the byte-wise forwarding are this design's
// choices.
module store_buffer
  import mips_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        restore_i,
  input  logic        push_i,
  input  logic [29:0] push_addr_i,
  input  logic [3:0]  push_be_i,
  input  logic [31:0] push_data_i,
  output logic        full_o,
  input  logic [2:0]  commit_cnt_i,
  input  logic [29:0] ld_addr_i,
  output logic [3:0]  fwd_mask_o,
  output logic [31:0] fwd_data_o,
  input  logic        mem_busy_i,
  output logic        mem_we_o,
  output logic [29:0] mem_addr_o,
  output logic [3:0]  mem_be_o,
  output logic [31:0] mem_data_o,
  output logic        empty_o
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [29:0] addr_q [DEPTH];
  logic [3:0]  be_q   [DEPTH];
  logic [31:0] data_q [DEPTH];
  logic [AW-1:0] head_q, tail_q;
  logic [AW:0]   count_q, ncmt_q;   // entries, committed entries (a prefix from head)

  assign full_o  = (count_q == (AW+1)'(DEPTH));
  assign empty_o = (count_q == '0);

  always_comb begin
    fwd_mask_o = '0;
    fwd_data_o = '0;
    for (int i = 0; i < DEPTH; i++) begin   // oldest to youngest, younger overrides
      logic [AW-1:0] idx;
      idx = head_q + AW'(i);
      if ((AW+1)'(i) < count_q && addr_q[idx] == ld_addr_i)
        for (int b = 0; b < 4; b++)
          if (be_q[idx][b]) begin
            fwd_mask_o[b] = 1'b1;
            fwd_data_o[8*b +: 8] = data_q[idx][8*b +: 8];
          end
    end
  end

  assign mem_we_o   = (ncmt_q != '0) && !mem_busy_i && !rst;  // no write while in reset
  assign mem_addr_o = addr_q[head_q];
  assign mem_be_o   = be_q[head_q];
  assign mem_data_o = data_q[head_q];

  always_ff @(posedge clk) begin
    if (rst) begin
      head_q <= '0; tail_q <= '0; count_q <= '0; ncmt_q <= '0;
    end else begin
      logic [AW:0] cnt_n, ncmt_n;
      logic [AW-1:0] head_n;
      cnt_n  = count_q;
      ncmt_n = ncmt_q + (AW+1)'(commit_cnt_i);
      head_n = head_q;
      if (mem_we_o) begin
        head_n = head_q + 1'b1; cnt_n = cnt_n - 1'b1; ncmt_n = ncmt_n - 1'b1;
      end
      if (restore_i) begin
        tail_q <= head_n + AW'(ncmt_n);
        cnt_n  = ncmt_n;
      end else if (push_i && !full_o) begin
        addr_q[tail_q] <= push_addr_i;
        be_q[tail_q]   <= push_be_i;
        data_q[tail_q] <= push_data_i;
        tail_q <= tail_q + 1'b1;
        cnt_n  = cnt_n + 1'b1;
      end
      head_q  <= head_n;
      count_q <= cnt_n;
      ncmt_q  <= ncmt_n;
    end
  end
endmodule
