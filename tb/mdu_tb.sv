// mdu_tb: random test of the multiply and divide unit and its Hi-Lo buffer.
//
// Issues random MULT/MULTU/DIV/DIVU/MTHI/MTLO/MFHI/MFLO operations (division by zero and
// signed extremes included) with random grant delays. For each one it checks the
// four-cycle latency (result request three clocks after the accepting clock, i.e. four
// cycles counting the issue cycle, against one for the ALU), that the unit refuses new
// work while busy, the Hi-Lo contents against a model, the MFHI/MFLO data and write-back
// flags, and that a flush drops the operation in flight.
module mdu_tb;
  import mips_pkg::*;
  localparam int unsigned LAT = 4;
  logic clk = 0, rst = 1, flush = 0;
  always #5 clk = ~clk;
  logic in_v = 0, ready, req, grant = 0;
  op_t  op = OP_MULT;
  logic [31:0] a = '0, b = '0, hi, lo;
  pptr_t dest = '0;
  rob_tag_t reo = '0;
  logic wb = 0;
  result_t res;
  mdu #(.LAT(LAT)) dut (.clk, .rst, .flush_i(flush), .in_valid_i(in_v), .exec_i(op), .op1_i(a),
    .op2_i(b), .dest_i(dest), .reo_i(reo), .wb_bit_i(wb), .ready_o(ready), .req_o(req),
    .grant_i(grant), .mdu_result_o(res), .hi_o(hi), .lo_o(lo));
  logic [31:0] mhi = 0, mlo = 0;
  int checks = 0, failures = 0;
  task automatic check(string w, logic [63:0] g, logic [63:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  function automatic logic [31:0] rnd();
    case ($urandom % 6)
      0: return 32'h80000000; 1: return 32'hffffffff; 2: return 0;
      default: return $urandom;
    endcase
  endfunction
  initial begin
    repeat (30000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
  initial begin
    @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 1200; t++) begin
      op_t ops [8];
      logic [31:0] ehi, elo, edata; int n;
      ops = '{OP_MULT, OP_MULTU, OP_DIV, OP_DIVU, OP_MTHI, OP_MTLO, OP_MFHI, OP_MFLO};
      op = ops[$urandom % 8]; a = rnd(); b = rnd();
      dest = pptr_t'($urandom); reo = rob_tag_t'($urandom); wb = op inside {OP_MFHI, OP_MFLO};
      ehi = mhi; elo = mlo;
      case (op)
        OP_MULT:  {ehi, elo} = $signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b});
        OP_MULTU: {ehi, elo} = {32'd0, a} * {32'd0, b};
        OP_DIV:   if (b != 0) begin elo = $signed(a) / $signed(b); ehi = $signed(a) % $signed(b); end
                  else begin elo = '1; ehi = a; end
        OP_DIVU:  if (b != 0) begin elo = a / b; ehi = a % b; end else begin elo = '1; ehi = a; end
        OP_MTHI:  ehi = a;
        OP_MTLO:  elo = a;
        default: ;
      endcase
      edata = (op == OP_MFHI) ? mhi : mlo;
      check("ready when idle", 64'(ready), 1);
      in_v = 1;
      @(posedge clk); #1 in_v = 0;
      for (int c = 1; c < int'(LAT); c++) begin
        check("no result before latency", 64'(req), 0);
        check("busy refuses work", 64'(ready), 0);
        if ($urandom % 50 == 0 && c == 1) begin
          // flush drops the operation
          flush = 1; @(posedge clk); #1 flush = 0;
          check("flushed", 64'(req), 0);
          op = OP_NONE;
          break;
        end
        @(posedge clk); #1;
      end
      if (op == OP_NONE) continue;
      check("latency 4 cycles", 64'(req), 1);
      check("hi", 64'(hi), 64'(ehi));
      check("lo", 64'(lo), 64'(elo));
      check("wb bit", 64'(res.wb), 64'(wb));
      if (wb) begin
        check("move-from data", 64'(res.data), 64'(edata));
        check("dest", 64'(res.dest), 64'(dest));
        check("one-hot select", res.wb_dest, onehot64(dest));
      end
      check("reo", 64'(res.reo), 64'(reo));
      mhi = ehi; mlo = elo;
      n = $urandom % 3;
      repeat (n) begin @(posedge clk); #1 check("held", 64'(req), 1); end
      grant = 1; @(posedge clk); #1 grant = 0;
      check("released", 64'(req), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
