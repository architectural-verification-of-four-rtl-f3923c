// prioritizer: picks four free value-buffer locations for the destinations of one
// instruction block.
//
// Four first-zero stages are chained: each stage marks the lowest location whose
// allocate bit is clear, its one-hot output is encoded to a 6-bit pseudo-pointer and
// ORed into the allocate vector fed to the next stage. The last OR gives the updated
// allocate bits. found_o[k] says stage k found a location; full_o is raised when fewer
// than four were found, which the core uses as a structural stall. This chain is the
// structure the description gives; it is purely combinational (one cycle in the
// decode/issue stage).
module prioritizer
  import mips_pkg::*;
#(
  parameter int unsigned N = NPHYS,
  parameter int unsigned K = FETCH_W
) (
  input  logic [N-1:0]         alloc_i,
  output logic [K-1:0][$clog2(N)-1:0] ptr_o,
  output logic [K-1:0]         found_o,
  output logic [N-1:0]         alloc_upd_o,
  output logic                 full_o
);
  logic [K:0][N-1:0]   chain;
  logic [K-1:0][N-1:0] onehot;

  assign chain[0] = alloc_i;

  for (genvar k = 0; k < K; k++) begin : g_stage
    first_zero #(.N(N)) u_fz (.bits_i(chain[k]), .first_o(onehot[k]));
    assign chain[k+1] = chain[k] | onehot[k];
    assign found_o[k] = |onehot[k];
    // one-hot to binary encoder
    always_comb begin
      ptr_o[k] = '0;
      for (int i = 0; i < N; i++)
        if (onehot[k][i]) ptr_o[k] = ptr_o[k] | i[$clog2(N)-1:0];
    end
  end

  assign alloc_upd_o = chain[K];
  assign full_o      = ~&found_o;
endmodule
