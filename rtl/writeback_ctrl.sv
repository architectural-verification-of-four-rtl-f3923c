// writeback_ctrl: assigns the two common data buses to the functional units.
//
// Up to N units request a bus with a finished 109-bit result. Each cycle the controller
// grants the two requests whose reorder-buffer slots are oldest (distance from the
// reorder-buffer head), drives them onto common data bus I and II, and leaves the others
// waiting: a unit without a grant holds its result and stalls, as described. Granting
// by age is this design's choice (the description does not give a priority); it lets
// the instruction at the head of the reorder buffer always complete. Combinational.
module writeback_ctrl
  import mips_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0]    req_i,
  input  result_t [N-1:0] res_i,
  input  rob_tag_t        rob_head_i,
  output logic [N-1:0]    grant_o,
  output result_t [1:0]   cdb_o,
  output logic [1:0]      cdb_valid_o
);
  always_comb begin
    logic [N-1:0] left;
    grant_o = '0;
    cdb_valid_o = '0;
    cdb_o = '0;
    left = req_i;
    for (int b = 0; b < 2; b++) begin
      int unsigned best, best_age;
      best = 0; best_age = 64;
      for (int u = 0; u < N; u++) begin
        int unsigned age;
        age = 32'(rob_tag_t'(res_i[u].reo - rob_head_i));
        if (left[u] && age < best_age) begin best = u; best_age = age; end
      end
      if (best_age < 64) begin
        grant_o[best] = 1'b1;
        left[best]    = 1'b0;
        cdb_o[b]      = res_i[best];
        cdb_valid_o[b] = 1'b1;
      end
    end
  end
endmodule
