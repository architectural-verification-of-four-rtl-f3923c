// rs_check: stimulus and reference model for one reservation station (used by
// reservation_station_tb, once per issue policy).
//
// Each cycle it may write a random operation whose operands are present or await one of
// a pool of tags, broadcast up to two awaited tags on the two buses with fresh values,
// and toggle the unit's ready signal. A model list of entries gives, before each clock,
// the operation that must issue: the oldest ready one (out-of-order policy) or the
// oldest one if ready (in-order policy). Checks issue valid, reorder slot and operand
// values, write acceptance (in_ready), the occupancy count, and that a flush empties the
// station. Reports its check and failure counts and raises done_o at the end.
module rs_check
  import mips_pkg::*;
#(
  parameter bit IN_ORDER = 1'b0
) (
  input  logic clk,
  output int   checks_o,
  output int   failures_o,
  output logic done_o
);
  localparam int unsigned DEPTH = 4;
  logic rst = 1, flush = 0, in_v = 0, in_rdy, fu_rdy = 0, iv;
  uop_t in_u = '0, iu;
  result_t [1:0] cdb = '0;
  logic [1:0] cv = '0;
  rob_tag_t head = '0;
  logic [$clog2(DEPTH+1)-1:0] cnt;
  reservation_station #(.DEPTH(DEPTH), .IN_ORDER(IN_ORDER)) dut (.clk, .rst, .flush_i(flush),
    .in_valid_i(in_v), .in_uop_i(in_u), .in_ready_o(in_rdy), .cdb_i(cdb), .cdb_valid_i(cv),
    .rob_head_i(head), .fu_ready_i(fu_rdy), .issue_valid_o(iv), .issue_uop_o(iu), .count_o(cnt));

  uop_t m [$];
  logic [31:0] val [16];     // value each tag will carry
  logic        busy [16];    // tag awaited and not yet broadcast
  int checks = 0, failures = 0, issued = 0;
  rob_tag_t seq;
  assign checks_o = checks;
  assign failures_o = failures;
  task automatic check(string w, logic [63:0] g, logic [63:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL[in_order=%0d] %s got %h exp %h", IN_ORDER, w, g, e); end
  endtask

  initial begin
    done_o = 0;
    for (int i = 0; i < 16; i++) begin val[i] = $urandom; busy[i] = 0; end
    head = rob_tag_t'($urandom); seq = head;
    @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 3000; t++) begin
      int exp_i; int best; logic [3:0] bc_tag [2]; logic acc, did;
      // broadcasts
      cv = '0;
      for (int b = 0; b < 2; b++) begin
        int tg; tg = 1 + $urandom % 15;
        cdb[b] = '0; bc_tag[b] = 0;
        if ($urandom % 2 && busy[tg] && !(b == 1 && cv[0] && bc_tag[0] == 4'(tg))) begin
          cv[b] = 1; cdb[b].wb = 1; cdb[b].dest = pptr_t'(tg); cdb[b].data = val[tg];
          cdb[b].wb_dest = onehot64(pptr_t'(tg)); bc_tag[b] = 4'(tg);
        end
      end
      // new operation
      in_v = $urandom % 2 && rob_tag_t'(seq - head) < 60;
      in_u = '0; in_u.reo = seq; in_u.op = OP_ADDU;
      for (int s = 0; s < 2; s++) begin
        int tg; logic ok; tg = 1 + $urandom % 15; ok = $urandom % 3 == 0;
        if ((cv[0] && bc_tag[0] == 4'(tg)) || (cv[1] && bc_tag[1] == 4'(tg))) ok = 1;
        if (s == 0) begin in_u.a_ok = ok; in_u.a_tag = pptr_t'(tg); in_u.a = ok ? $urandom : 32'hdead; end
        else        begin in_u.b_ok = ok; in_u.b_tag = pptr_t'(tg); in_u.b = ok ? $urandom : 32'hdead; end
      end
      fu_rdy = $urandom % 4 != 0;
      flush = $urandom % 300 == 0;
      #1;
      // expected issue
      exp_i = -1; best = 1000;
      foreach (m[i]) begin
        int age; age = int'(rob_tag_t'(m[i].reo - head));
        if (age < best && (IN_ORDER || (m[i].a_ok && m[i].b_ok))) begin best = age; exp_i = i; end
      end
      if (exp_i >= 0 && !(m[exp_i].a_ok && m[exp_i].b_ok)) exp_i = -1;
      check("count", 64'(cnt), 64'(m.size()));
      check("in_ready", 64'(in_rdy), 64'(m.size() < DEPTH));
      check("issue valid", 64'(iv), 64'(exp_i >= 0 && fu_rdy && !flush));
      if (iv && exp_i >= 0) begin
        check("issue slot", 64'(iu.reo), 64'(m[exp_i].reo));
        check("operands", {iu.a, iu.b}, {m[exp_i].a, m[exp_i].b});
      end
      acc = in_v && in_rdy; did = iv && exp_i >= 0;
      @(posedge clk); #1;
      if (flush) begin
        m.delete();
        for (int i = 0; i < 16; i++) busy[i] = 0;
        continue;
      end
      if (did) begin m.delete(exp_i); issued++; end
      for (int b = 0; b < 2; b++) if (cv[b]) begin
        foreach (m[i]) begin
          if (!m[i].a_ok && m[i].a_tag == cdb[b].dest) begin m[i].a_ok = 1; m[i].a = cdb[b].data; end
          if (!m[i].b_ok && m[i].b_tag == cdb[b].dest) begin m[i].b_ok = 1; m[i].b = cdb[b].data; end
        end
        busy[bc_tag[b]] = 0; val[bc_tag[b]] = $urandom;
      end
      if (acc) begin
        if (!in_u.a_ok) begin busy[in_u.a_tag] = 1; end
        if (!in_u.b_ok) begin busy[in_u.b_tag] = 1; end
        m.push_back(in_u); seq++;
      end
      // the head advances past issued work occasionally
      if (m.size() == 0) head = seq;
    end
    checks++; if (issued < 100) begin failures++; $display("FAIL too few issues"); end
    done_o = 1;
  end
endmodule
