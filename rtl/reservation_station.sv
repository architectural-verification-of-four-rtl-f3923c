// reservation_station: holds dispatched operations of one functional unit until both
// operands are present, then issues them.
//
// DEPTH entries (four in the description). One operation can be written per cycle
// (in_valid_i; in_ready_o is low when full). Entries whose operand is missing snoop
// both common data buses every cycle and capture the value whose destination pointer
// matches the awaited tag. Each cycle the station issues, when fu_ready_i, the oldest
// ready entry, age being the distance of its reorder-buffer tag from rob_head_i; with
// IN_ORDER = 1 only the oldest entry may issue, ready or not (used for the units that
// keep program order: memory and multiply/divide). flush_i empties the station
// (restore). Issue happens from registered state, so a value captured from a bus is
// used in the next cycle, as described. Out-of-order issue and the snooping follow the
// description; the age rule, the one-write-per-cycle limit and IN_ORDER are this
// design's choices.
module reservation_station
  import mips_pkg::*;
#(
  parameter int unsigned DEPTH    = 4,
  parameter bit          IN_ORDER = 1'b0
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          flush_i,
  input  logic          in_valid_i,
  input  uop_t          in_uop_i,
  output logic          in_ready_o,
  input  result_t [1:0] cdb_i,
  input  logic [1:0]    cdb_valid_i,
  input  rob_tag_t      rob_head_i,
  input  logic          fu_ready_i,
  output logic          issue_valid_o,
  output uop_t          issue_uop_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o
);
  uop_t             ent_q [DEPTH];
  logic [DEPTH-1:0] vld_q;

  int unsigned sel, freeslot;
  logic        have_free;

  always_comb begin
    int unsigned best_age;
    logic        oldest_ready;
    have_free = 1'b0; freeslot = 0;
    for (int i = DEPTH-1; i >= 0; i--) if (!vld_q[i]) begin have_free = 1'b1; freeslot = i; end
    issue_valid_o = 1'b0; sel = 0; best_age = 64; oldest_ready = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      int unsigned age;
      age = 32'(rob_tag_t'(ent_q[i].reo - rob_head_i));
      if (vld_q[i] && age < best_age) begin
        if (IN_ORDER) begin
          best_age = age; sel = i; oldest_ready = ent_q[i].a_ok & ent_q[i].b_ok;
        end else if (ent_q[i].a_ok && ent_q[i].b_ok) begin
          best_age = age; sel = i; oldest_ready = 1'b1;
        end
      end
    end
    issue_valid_o = oldest_ready & fu_ready_i & ~flush_i;
    issue_uop_o   = ent_q[sel];
    count_o = '0;
    for (int i = 0; i < DEPTH; i++) count_o = count_o + ($clog2(DEPTH+1))'(vld_q[i]);
  end

  assign in_ready_o = have_free;

  always_ff @(posedge clk) begin
    if (rst || flush_i) begin
      vld_q <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (vld_q[i]) begin
          for (int b = 0; b < 2; b++) begin
            if (cdb_valid_i[b] && cdb_i[b].wb) begin
              if (!ent_q[i].a_ok && ent_q[i].a_tag == cdb_i[b].dest) begin
                ent_q[i].a    <= cdb_i[b].data;
                ent_q[i].a_ok <= 1'b1;
              end
              if (!ent_q[i].b_ok && ent_q[i].b_tag == cdb_i[b].dest) begin
                ent_q[i].b    <= cdb_i[b].data;
                ent_q[i].b_ok <= 1'b1;
              end
            end
          end
        end
      end
      if (issue_valid_o) vld_q[sel] <= 1'b0;
      if (in_valid_i && have_free) begin
        ent_q[freeslot] <= in_uop_i;
        vld_q[freeslot] <= 1'b1;
      end
    end
  end
endmodule
