// mips_ss_top_tb: end-to-end test of the four-wide core at its default parameters.
//
// The testbench assembles a MIPS I program into an ideal instruction memory (word array
// read four words at a time) and runs it against an ideal byte-enabled data memory.
// The program computes 4! in a subroutine (JAL/JR, BLEZ loop, MULT/MFLO, J), sums 10..1
// in a BNE loop whose delay slot stores a byte, exercises loads behind stores (store-
// buffer forwarding), same-block dependences (source and destination overwrite),
// MULT/DIV/MFHI/MFLO, LUI/ORI/SH/LH/SRA/SLT, MFC0 (reads zero), LWL/SWR, then two long multiply chains followed by
// floods of independent instructions (register writes, then coprocessor moves) that fill the free-location pool (prioritizer
// stall) and the reorder buffer (reorder-buffer stall), and ends with BREAK.
// Expected register and memory values are computed here from the program's meaning.
// Besides the results, every mechanism is required to occur at least once:
// misprediction restore, taken prediction, dispatch stall, prioritizer stall, reorder-
// buffer stall, bus wait, source overwrite, destination overwrite, store-buffer
// forwarding. Counters of the run (cycles, IPC, restores, BTB/BPB utilisation) are
// printed.
module mips_ss_top_tb;
  import mips_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [31:0] imem [1024];
  logic [31:0] dmem [4096];

  logic [31:0]              imem_addr;
  logic [FETCH_W-1:0][31:0] imem_rdata;
  logic [31:0] dmem_raddr, dmem_rdata, dmem_waddr, dmem_wdata;
  logic        dmem_we, halt;
  logic [3:0]  dmem_be;
  lreg_t       arch_reg;
  logic [31:0] arch_val, hi, lo;
  perf_t       perf;
  logic [6:0]  btb_nv, bpb_nv;

  mips_ss_top dut (
    .clk, .rst, .imem_addr_o(imem_addr), .imem_rdata_i(imem_rdata),
    .dmem_raddr_o(dmem_raddr), .dmem_rdata_i(dmem_rdata), .dmem_we_o(dmem_we),
    .dmem_waddr_o(dmem_waddr), .dmem_be_o(dmem_be), .dmem_wdata_o(dmem_wdata),
    .halt_o(halt), .arch_reg_i(arch_reg), .arch_val_o(arch_val), .hi_o(hi), .lo_o(lo),
    .perf_o(perf), .btb_nvalid_o(btb_nv), .bpb_nvalid_o(bpb_nv));

  always_comb
    for (int k = 0; k < FETCH_W; k++) imem_rdata[k] = imem[10'((imem_addr >> 2) + 32'(k))];
  assign dmem_rdata = dmem[dmem_raddr[13:2]];
  always @(posedge clk)
    if (dmem_we)
      for (int b = 0; b < 4; b++)
        if (dmem_be[b]) dmem[dmem_waddr[13:2]][8*b +: 8] <= dmem_wdata[8*b +: 8];

  // ---------------------------------------------------------------- assembler
  int unsigned pc_w = 0;
  function automatic logic [31:0] R(int rs, int rt, int rd, int sa, int fn);
    return {6'd0, 5'(rs), 5'(rt), 5'(rd), 5'(sa), 6'(fn)};
  endfunction
  function automatic logic [31:0] I(int op, int rs, int rt, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  task automatic emit(logic [31:0] w); imem[pc_w] = w; pc_w++; endtask

  localparam int ZERO=0, AT=1, V0=2, V1=3, A0=4, A1=5, A2=6, A3=7, T0=8, T1=9, T2=10, T3=11,
                 T4=12, T5=13, T6=14, T7=15, S0=16, S1=17, S2=18, S3=19, S4=20, S5=21, S6=22,
                 S7=23, T8=24, T9=25, K0=26, K1=27, GP=28, SP=29, FP=30, RA=31;

  logic [31:0] exp_reg [32];
  logic        chk_reg [32];
  int checks = 0, failures = 0;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  int unsigned fact_addr, loop_addr;
  logic [31:0] t8v;
  int fill_regs [8] = '{AT, V1, A1, A2, A3, K1, GP, FP};

  initial begin
    for (int i = 0; i < 1024; i++) imem[i] = 32'd0;
    for (int i = 0; i < 4096; i++) dmem[i] = 32'd0;
    dmem[32'h1008 >> 2] = 32'hAABBCCDD;
    for (int r = 0; r < 32; r++) chk_reg[r] = 1'b0;

    fact_addr = 400;                                 // word address of the subroutine
    emit(I(6'h09, ZERO, SP, 16'h1000));              // addiu sp, zero, 0x1000
    emit(I(6'h09, ZERO, A0, 4));                     // addiu a0, zero, 4
    emit({6'h03, 26'(fact_addr)});                   // jal fact
    emit(32'd0);                                     // nop (delay slot)
    emit(I(6'h2b, SP, V0, 4));                       // sw v0, 4(sp)
    emit(I(6'h09, ZERO, T0, 0));                     // addiu t0, zero, 0
    emit(I(6'h09, ZERO, T1, 10));                    // addiu t1, zero, 10
    loop_addr = pc_w;
    emit(R(T0, T1, T0, 0, 6'h21));                   // loop: addu t0, t0, t1
    emit(I(6'h09, T1, T1, -1));                      // addiu t1, t1, -1
    emit(I(6'h05, T1, ZERO, int'(loop_addr) - int'(pc_w) - 1)); // bne t1, zero, loop
    emit(I(6'h28, SP, T1, 8));                       // sb t1, 8(sp) (delay slot)
    emit(I(6'h2b, SP, T0, 12));                      // sw t0, 12(sp)
    emit(I(6'h23, SP, T2, 12));                      // lw t2, 12(sp)
    emit(I(6'h24, SP, T3, 15));                      // lbu t3, 15(sp)
    emit(I(6'h09, ZERO, S0, 1));                     // addiu s0, zero, 1
    emit(R(S0, S0, S0, 0, 6'h21));                   // addu s0, s0, s0
    emit(R(S0, S0, S0, 0, 6'h21));                   // addu s0, s0, s0
    emit(R(S0, S0, S1, 0, 6'h21));                   // addu s1, s0, s0
    for (int i = 0; i < 4; i++) begin
      emit(I(6'h09, ZERO, S2, 7));                   // addiu s2, zero, 7
      emit(I(6'h09, ZERO, S2, 9));                   // addiu s2, zero, 9
    end
    emit(I(6'h09, ZERO, T4, -7));                    // addiu t4, zero, -7
    emit(I(6'h09, ZERO, T5, 3));                     // addiu t5, zero, 3
    emit(R(T4, T5, 0, 0, 6'h18));                    // mult t4, t5
    emit(R(0, 0, S3, 0, 6'h12));                     // mflo s3
    emit(R(T4, T5, 0, 0, 6'h1a));                    // div t4, t5
    emit(R(0, 0, S4, 0, 6'h12));                     // mflo s4
    emit(R(0, 0, S5, 0, 6'h10));                     // mfhi s5
    emit(I(6'h0f, ZERO, S6, 16'h1234));              // lui s6, 0x1234
    emit(I(6'h0d, S6, S6, 16'h5678));                // ori s6, s6, 0x5678
    emit(I(6'h29, SP, S6, 16));                      // sh s6, 16(sp)
    emit(I(6'h21, SP, S7, 16));                      // lh s7, 16(sp)
    emit(R(0, T4, T6, 1, 6'h03));                    // sra t6, t4, 1
    emit(R(T4, T5, T7, 0, 6'h2a));                   // slt t7, t4, t5
    // long dependent multiply chain, then a flood of independent writes
    emit(I(6'h09, ZERO, T8, 3));                     // addiu t8, zero, 3
    for (int i = 0; i < 6; i++) begin
      emit(R(T8, T8, 0, 0, 6'h18));                  // mult t8, t8
      emit(R(0, 0, T8, 0, 6'h12));                   // mflo t8
    end
    emit(R(T8, ZERO, T9, 0, 6'h21));                 // addu t9, t8, zero
    for (int i = 0; i < 72; i++)
      emit(I(6'h09, ZERO, fill_regs[i % 8], i + 1)); // addiu fill, zero, i+1
    // second chain, then coprocessor moves that need only a reorder-buffer slot
    for (int i = 0; i < 6; i++) begin
      emit(R(T8, T8, 0, 0, 6'h18));                  // mult t8, t8
      emit(R(0, 0, T8, 0, 6'h12));                   // mflo t8
    end
    for (int i = 0; i < 72; i++)
      emit({6'h10, 5'h04, 5'(T0), 5'd12, 11'd0});    // mtc0 t0, $12 (completes at dispatch)
    emit(I(6'h09, ZERO, K1, -1));                    // addiu k1, zero, -1
    emit(I(6'h22, ZERO, K1, 32'h1006));              // lwl k1, 0x1006(zero): 0x0018ffff
    emit(I(6'h2e, ZERO, K1, 32'h1015));              // swr k1, 0x1015(zero): 0xffff0000
    emit(I(6'h09, ZERO, K0, 77));                    // addiu k0, zero, 77
    emit({6'h10, 5'h00, 5'(K0), 5'd12, 11'd0});      // mfc0 k0, $12 (coprocessor 0 reads 0)
    emit(R(0, 0, 0, 0, 6'h0d));                      // break
    if (pc_w >= fact_addr) $fatal(1, "program overlaps subroutine");
    pc_w = fact_addr;
    emit(I(6'h09, ZERO, V0, 1));                     // fact: addiu v0, zero, 1
    emit(I(6'h06, A0, ZERO, 6));                     // fl: blez a0, fd (+6)
    emit(32'd0);                                     // nop
    emit(R(V0, A0, 0, 0, 6'h18));                    // mult v0, a0
    emit(R(0, 0, V0, 0, 6'h12));                     // mflo v0
    emit(I(6'h09, A0, A0, -1));                      // addiu a0, a0, -1
    emit({6'h02, 26'(fact_addr + 1)});               // j fl
    emit(32'd0);                                     // nop
    emit(R(RA, 0, 0, 0, 6'h08));                     // fd: jr ra
    emit(32'd0);                                     // nop

    // expected architectural state
    t8v = 32'd3;
    for (int i = 0; i < 12; i++) t8v = t8v * t8v;
    exp_reg[SP] = 32'h1000; exp_reg[A0] = 0;   exp_reg[V0] = 24;  exp_reg[RA] = 16;
    exp_reg[T0] = 55;       exp_reg[T1] = 0;   exp_reg[T2] = 55;  exp_reg[T3] = 32'h37;
    exp_reg[S0] = 4;        exp_reg[S1] = 8;   exp_reg[S2] = 9;   exp_reg[S3] = -32'sd21;
    exp_reg[S4] = -32'sd2;  exp_reg[S5] = -32'sd1; exp_reg[S6] = 32'h12345678;
    exp_reg[S7] = 32'h5678; exp_reg[T4] = -32'sd7; exp_reg[T5] = 3;
    exp_reg[T6] = -32'sd4;  exp_reg[T7] = 1;   exp_reg[T8] = t8v;
    begin
      logic [31:0] t9v;
      t9v = 32'd3;
      for (int i = 0; i < 6; i++) t9v = t9v * t9v;
      exp_reg[T9] = t9v;
    end
    for (int i = 0; i < 72; i++) exp_reg[fill_regs[i % 8]] = 32'(i + 1);
    foreach (exp_reg[r]) chk_reg[r] = 1'b1;
    chk_reg[ZERO] = 1'b1; exp_reg[ZERO] = 0;
    exp_reg[K0] = 0;   // MFC0 result
    exp_reg[K1] = 32'h0018ffff;
  end

  // ---------------------------------------------------------------- run
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: program did not reach BREAK");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    arch_reg = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    wait (halt === 1'b1);
    repeat (20) @(posedge clk);   // let committed stores drain
    for (int r = 0; r < 32; r++) begin
      arch_reg = lreg_t'(r);
      #1;
      if (chk_reg[r]) check($sformatf("reg %0d", r), arch_val, exp_reg[r]);
    end
    check("mem 0x1004 (4!)", dmem[32'h1004 >> 2], 32'd24);
    check("mem 0x1008 (sb)", dmem[32'h1008 >> 2], 32'h00BBCCDD);
    check("mem 0x100c (sum)", dmem[32'h100c >> 2], 32'd55);
    check("mem 0x1010 (sh)", dmem[32'h1010 >> 2], 32'h56780000);
    check("mem 0x1014 (swr)", dmem[32'h1014 >> 2], 32'hffff0000);
    $display("cycles=%0d retired=%0d IPC=%0.3f branches=%0d restores=%0d mispredict=%0.1f%%",
             perf.cycles, perf.retired, real'(perf.retired) / real'(perf.cycles),
             perf.branches, perf.restores, 100.0 * real'(perf.restores) / real'(perf.branches));
    $display("dispatch_stall=%0d fetch_stall=%0d rename_stall=%0d rob_stall=%0d bus_wait=%0d",
             perf.dstall, perf.fstall, perf.rename_stall, perf.rob_stall, perf.wb_wait);
    $display("src_overwrite=%0d dst_overwrite=%0d sb_forward=%0d pred_taken=%0d BTB=%0d/64 BPB=%0d/64",
             perf.src_ow, perf.dst_ow, perf.sb_fwd, perf.pred_taken, btb_nv, bpb_nv);
    // every mechanism must have happened
    checks++; if (perf.restores == 0)     begin failures++; $display("FAIL no restore"); end
    checks++; if (perf.pred_taken == 0)   begin failures++; $display("FAIL no taken prediction"); end
    checks++; if (perf.dstall == 0)       begin failures++; $display("FAIL no dispatch stall"); end
    checks++; if (perf.rename_stall == 0) begin failures++; $display("FAIL no prioritizer stall"); end
    checks++; if (perf.rob_stall == 0)    begin failures++; $display("FAIL no reorder-buffer stall"); end
    checks++; if (perf.wb_wait == 0)      begin failures++; $display("FAIL no bus wait"); end
    checks++; if (perf.src_ow == 0)       begin failures++; $display("FAIL no source overwrite"); end
    checks++; if (perf.dst_ow == 0)       begin failures++; $display("FAIL no destination overwrite"); end
    checks++; if (perf.sb_fwd == 0)       begin failures++; $display("FAIL no store-buffer forwarding"); end
    checks++; if (btb_nv == 0 || bpb_nv == 0) begin failures++; $display("FAIL predictors unused"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
