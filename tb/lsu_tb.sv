// lsu_tb: random test of the load/store unit with its store buffer and a data memory.
//
// Runs a random program-order stream of byte, halfword and word loads and stores over a
// small address window (so loads often hit stores still in the store buffer). Each
// store is committed a random number of cycles after it completes; the memory port is
// modelled as a 16-word array written through the byte enables. Checks: the two-cycle
// latency (result request one clock after the accepting clock when the bus is free),
// load data against a program-order byte model (big-endian, sign/zero extension),
// that store results carry no register write, that forwarding is reported, and that
// after draining the memory equals the model.
module lsu_tb;
  import mips_pkg::*;
  logic clk = 0, rst = 1, restore = 0, in_v = 0, ready, req, grant = 0, wb = 0;
  always #5 clk = ~clk;
  op_t op = OP_LW;
  logic [31:0] a = '0, b = '0, raddr, rdata, waddr, wdata;
  logic [15:0] off = '0;
  pptr_t dest = '0;
  rob_tag_t reo = '0;
  logic [2:0] scc = '0;
  logic we, sbe, fwd;
  logic [3:0] be;
  result_t res;
  lsu #(.SB_DEPTH(8)) dut (.clk, .rst, .restore_i(restore), .in_valid_i(in_v), .exec_i(op),
    .op1_i(a), .op2_i(b), .offset_i(off), .dest_i(dest), .reo_i(reo), .wb_bit_i(wb),
    .ready_o(ready), .req_o(req), .grant_i(grant), .lsu_result_o(res),
    .store_commit_cnt_i(scc), .dmem_raddr_o(raddr), .dmem_rdata_i(rdata), .dmem_we_o(we),
    .dmem_waddr_o(waddr), .dmem_be_o(be), .dmem_wdata_o(wdata), .sb_empty_o(sbe), .fwd_o(fwd));
  logic [31:0] mem [16];
  logic [7:0]  model [64];
  assign rdata = mem[raddr[5:2]];
  always @(posedge clk) if (we) for (int i = 0; i < 4; i++) if (be[i]) mem[waddr[5:2]][8*i +: 8] <= wdata[8*i +: 8];
  int checks = 0, failures = 0, fwds = 0, pending = 0;
  task automatic check(string w, logic [63:0] g, logic [63:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  // commits trickle in behind completed stores
  always @(posedge clk) begin
    if (fwd) fwds++;
  end
  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
  initial begin
    for (int i = 0; i < 16; i++) mem[i] = $urandom;
    for (int i = 0; i < 64; i++) model[i] = mem[i / 4][8 * (3 - i % 4) +: 8];
    @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 1500; t++) begin
      op_t ops [12]; int ea, n; logic [31:0] e;
      ops = '{OP_LB, OP_LBU, OP_LH, OP_LHU, OP_LW, OP_SB, OP_SH, OP_SW, OP_LWL, OP_LWR, OP_SWL, OP_SWR};
      op = ops[$urandom % 12];
      ea = $urandom % 64;
      if (op inside {OP_LH, OP_LHU, OP_SH}) ea &= ~1;
      if (op inside {OP_LW, OP_SW}) ea &= ~3;
      a = 32'($urandom % 32); off = 16'(ea - int'(a)); b = $urandom;
      dest = pptr_t'($urandom); reo = rob_tag_t'($urandom); wb = op inside {OP_LB, OP_LBU, OP_LH, OP_LHU, OP_LW, OP_LWL, OP_LWR};
      case (op)
        OP_LB:  e = {{24{model[ea][7]}}, model[ea]};
        OP_LBU: e = {24'd0, model[ea]};
        OP_LH:  e = {{16{model[ea][7]}}, model[ea], model[ea + 1]};
        OP_LHU: e = {16'd0, model[ea], model[ea + 1]};
        OP_LW:  e = {model[ea], model[ea + 1], model[ea + 2], model[ea + 3]};
        OP_SB:  model[ea] = b[7:0];
        OP_SH:  begin model[ea] = b[15:8]; model[ea + 1] = b[7:0]; end
        // big-endian unaligned pairs, byte by byte
        OP_LWL: begin e = b; for (int i = 0; i <= 3 - ea % 4; i++) e[31 - 8*i -: 8] = model[ea + i]; end
        OP_LWR: begin e = b; for (int i = 0; i <= ea % 4; i++) e[8*i +: 8] = model[ea - i]; end
        OP_SWL: for (int i = 0; i <= 3 - ea % 4; i++) model[ea + i] = b[31 - 8*i -: 8];
        OP_SWR: for (int i = 0; i <= ea % 4; i++) model[ea - i] = b[8*i +: 8];
        default: begin model[ea] = b[31:24]; model[ea + 1] = b[23:16]; model[ea + 2] = b[15:8]; model[ea + 3] = b[7:0]; end
      endcase
      while (!ready) begin
        scc = (pending > 0) ? 3'd1 : 3'd0; @(posedge clk); #1; if (scc != 0) pending--;
      end
      in_v = 1;
      scc = (pending > 0 && $urandom % 2) ? 3'd1 : 3'd0;
      @(posedge clk); #1 in_v = 0; if (scc != 0) pending--; scc = 0;
      n = 0;
      while (!req) begin
        scc = (pending > 0 && n > 0) ? 3'd1 : 3'd0;
        @(posedge clk); #1; n++; if (scc != 0) pending--; scc = 0;
      end
      if (wb) check("latency 2 cycles", 64'(n), 1);
      check("result write-back", 64'(res.wb), 64'(wb));
      if (wb) begin
        check($sformatf("load %s @%0d", op.name(), ea), 64'(res.data), 64'(e));
        check("select", res.wb_dest, onehot64(dest));
      end
      check("reo", 64'(res.reo), 64'(reo));
      grant = 1; @(posedge clk); #1 grant = 0;
      if (!wb) pending++;
    end
    while (pending > 0) begin scc = 1; @(posedge clk); #1 pending--; end
    scc = 0;
    repeat (20) @(posedge clk);
    #1 check("store buffer drained", 64'(sbe), 1);
    for (int i = 0; i < 64; i++) check("memory", 64'(mem[i / 4][8 * (3 - i % 4) +: 8]), 64'(model[i]));
    checks++; if (fwds == 0) begin failures++; $display("FAIL no forwarding"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
