// Self-checking testbench for iu_pipeline with models of its memories: instruction and data
// memories answering after a random delay, and a 4-entry write buffer model that drains at a
// random rate and forwards its youngest matching store to loads.
// Program 1 exercises loops, flags and all branch outcomes, loads and stores, a load-use
// hazard and a burst of stores that fills the write buffer; registers, memory and the retired
// count are compared with values worked out by hand. Programs 2 and 3 must stop with a data
// page fault and an illegal-instruction exception at known addresses. Program 4 times one
// FDIVD or FSQRTD with single-cycle memories: in analysis mode the run length must not depend
// on the operands, and the exact operations (-1/2, sqrt 4) must run 3 cycles longer in
// analysis mode than in operation mode (18 against 15, 26 against 23 cycles), while the
// inexact ones (1/3, sqrt 2) take the same time in both.
module iu_pipeline_tb;
  import mbpta_pkg::*;
  import sparc_asm_pkg::*;
  logic clk = 0, rst_n = 0, analysis_mode = 0;
  logic i_req, i_ready, i_resp_valid = 0, i_fault = 0;
  logic [31:0] i_addr, i_rdata = 0;
  logic d_req, d_ready, d_resp_valid = 0, d_fault = 0;
  logic [31:0] d_addr, d_rdata = 0;
  logic wb_push, wb_full, wb_fwd_hit;
  logic [31:0] wb_push_addr, wb_push_data, wb_lookup_addr, wb_fwd_data;
  logic halted;
  exc_t exc_cause;
  logic [31:0] exc_pc, retired, dbg_data;
  logic [5:0] dbg_addr = 0;
  logic ev_raw_stall, ev_wbuf_stall, ev_fpu_stall, ev_mispredict, ev_wb_forward;
  int checks = 0, failures = 0;

  iu_pipeline dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- memories: word arrays, fault above 64 KB ----
  logic [31:0] imem [4096];
  logic [31:0] dmem [16384];
  bit rand_lat = 1;
  int i_busy = 0, d_busy = 0;
  logic [31:0] i_pend, d_pend;
  assign i_ready = (i_busy == 0);
  assign d_ready = (d_busy == 0);
  always @(posedge clk) begin
    i_resp_valid <= 0; d_resp_valid <= 0; i_fault <= 0; d_fault <= 0;
    if (i_busy > 1) i_busy <= i_busy - 1;
    else if (i_busy == 1) begin
      i_busy <= 0; i_resp_valid <= 1; i_rdata <= imem[i_pend[13:2]];
    end else if (i_req && rst_n) begin
      i_pend <= i_addr; i_busy <= rand_lat ? 1 + $urandom % 3 : 1;
    end
    if (d_busy > 1) d_busy <= d_busy - 1;
    else if (d_busy == 1) begin
      d_busy <= 0; d_resp_valid <= 1;
      d_fault <= d_pend >= 32'h1_0000;
      d_rdata <= (d_pend >= 32'h1_0000) ? 32'd0 : dmem[d_pend[15:2]];
    end else if (d_req && rst_n) begin
      d_pend <= d_addr; d_busy <= rand_lat ? 1 + $urandom % 3 : 1;
    end
  end

  // ---- write buffer model: wn entries in wa/wd, oldest first ----
  logic [31:0] wa [4], wd [4];
  int wn = 0;
  assign wb_full = (wn == 4);
  always_comb begin
    wb_fwd_hit = 0; wb_fwd_data = 0;
    for (int i = 0; i < 4; i++)
      if (i < wn && wa[i] == wb_lookup_addr) begin wb_fwd_hit = 1; wb_fwd_data = wd[i]; end
  end
  always @(posedge clk) begin
    int n;
    n = wn;
    if (!rst_n) n = 0;
    else if (n != 0 && (!rand_lat || ($urandom % 4) == 0)) begin
      dmem[wa[0][15:2]] = wd[0];
      for (int i = 0; i < 3; i++) begin wa[i] = wa[i + 1]; wd[i] = wd[i + 1]; end
      n--;
    end
    if (wb_push && rst_n) begin
      checks++;
      if (n >= 4) begin failures++; $display("FAIL push into a full buffer"); end
      else begin wa[n] = wb_push_addr; wd[n] = wb_push_data; n++; end
    end
    wn <= n;
  end

  int n_raw = 0, n_wbuf = 0, n_fpu = 0, n_misp = 0, n_fwd = 0;
  always @(posedge clk) begin
    n_raw += int'(ev_raw_stall); n_wbuf += int'(ev_wbuf_stall); n_fpu += int'(ev_fpu_stall);
    n_misp += int'(ev_mispredict); n_fwd += int'(ev_wb_forward);
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h, expected %h", what, got, exp); end
  endtask

  task automatic reg_is(input int r, input logic [31:0] exp);
    dbg_addr = 6'(r);
    #1 chk($sformatf("r%0d", r), dbg_data, exp);
  endtask

  logic [31:0] prog [$];
  int cycles;
  task automatic run(input bit amode, input bit rl);
    foreach (imem[i]) imem[i] = 32'hFFFF_FFFF;
    foreach (prog[i]) imem[i] = prog[i];
    rand_lat = rl;
    analysis_mode = amode;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cycles = 0;
    while (!halted && cycles < 20000) begin @(negedge clk); cycles++; end
    repeat (50) @(negedge clk);   // let the write buffer drain
  endtask

  task automatic fp_run(input bit amode, input bit sq, input logic [63:0] x, input logic [63:0] y,
                        output int cyc, output logic [63:0] res);
    dmem[32'h3000 >> 2] = x[63:32]; dmem[(32'h3000 >> 2) + 1] = x[31:0];
    dmem[(32'h3000 >> 2) + 2] = y[63:32]; dmem[(32'h3000 >> 2) + 3] = y[31:0];
    prog = {};
    prog.push_back(sethi(1, 32'h3000));
    for (int i = 0; i < 4; i++) prog.push_back(mem_i(LDF, i, 1, i * 4));
    prog.push_back(sq ? fpop(FSQRTD, 4, 0, 2) : fpop(FDIVD, 4, 0, 2));
    prog.push_back(ta0());
    run(amode, 1'b0);
    cyc = cycles;
    dbg_addr = 6'd36; #1 res[63:32] = dbg_data;
    dbg_addr = 6'd37; #1 res[31:0] = dbg_data;
  endtask

  initial begin
    int ca, co, ca2;
    logic [63:0] r;
    foreach (dmem[i]) dmem[i] = 32'(i) * 3;
    // ---- program 1 ----
    prog = {};
    prog.push_back(alu_i(ADD, 1, 0, 10));         // 0  r1 = 10
    prog.push_back(alu_i(ADD, 2, 0, 0));          // 1  r2 = 0
    prog.push_back(alu_r(ADD, 2, 2, 1));          // 2  loop: r2 += r1
    prog.push_back(alu_i(SUBCC, 1, 1, 1));        // 3  r1 -= 1
    prog.push_back(bicc(C_NE, -2));               // 4  bne loop
    prog.push_back(sethi(3, 32'h2000));           // 5  r3 = 0x2000
    prog.push_back(mem_i(ST, 2, 3, 0));           // 6  [0x2000] = 55
    prog.push_back(mem_i(LD, 4, 3, 0));           // 7  r4 = 55
    prog.push_back(alu_i(ADD, 5, 4, 1));          // 8  r5 = 56 (load-use)
    for (int i = 1; i <= 5; i++)
      prog.push_back(mem_i(ST, 5, 3, i * 4));     // 9-13 store burst
    prog.push_back(mem_i(LD, 14, 3, 20));         // 14 r14 = 56 (from the buffer)
    prog.push_back(bicc(C_A, 2));                 // 15 ba +2
    prog.push_back(alu_i(ADD, 6, 0, 99));         // 16 skipped
    prog.push_back(alu_i(ADD, 7, 0, -3));         // 17 r7 = -3
    prog.push_back(alu_i(SUBCC, 0, 7, 1));        // 18 -4: N
    prog.push_back(bicc(C_L, 2));                 // 19 bl +2 (taken)
    prog.push_back(alu_i(ADD, 8, 0, 1));          // 20 skipped
    prog.push_back(bicc(C_E, 2));                 // 21 be +2 (not taken)
    prog.push_back(alu_i(ADD, 9, 0, 7));          // 22 r9 = 7
    prog.push_back(alu_i(SLL, 10, 9, 3));         // 23 r10 = 56
    prog.push_back(alu_r(XOR_, 11, 10, 5));       // 24 r11 = 0
    prog.push_back(alu_r(OR_, 12, 10, 9));        // 25 r12 = 63
    prog.push_back(sethi(13, 32'h1234_5400));     // 26
    prog.push_back(alu_i(OR_, 13, 13, 32'h78));   // 27 r13 = 0x12345478
    prog.push_back(ta0());                        // 28 (pc 0x70)
    for (int rep = 0; rep < 4; rep++) begin
      run(rep[0], 1'b1);
      chk("halt", 32'(halted), 1);
      chk("cause", 32'(exc_cause), 32'(EXC_HALT));
      chk("exc_pc", exc_pc, 32'h70);
      chk("retired", retired, 53);
      reg_is(1, 0); reg_is(2, 55); reg_is(4, 55); reg_is(5, 56); reg_is(6, 0); reg_is(7, 32'hFFFF_FFFD);
      reg_is(8, 0); reg_is(9, 7); reg_is(10, 56); reg_is(11, 0); reg_is(12, 63);
      reg_is(13, 32'h1234_5478); reg_is(14, 56); reg_is(0, 0);
      chk("mem 0x2000", dmem[32'h2000 >> 2], 55);
      for (int i = 1; i <= 5; i++) chk("mem burst", dmem[(32'h2000 >> 2) + i], 56);
    end
    // ---- program 2: data page fault ----
    prog = {};
    prog.push_back(sethi(1, 32'h0002_0000));
    prog.push_back(alu_i(ADD, 5, 0, 1));
    prog.push_back(mem_i(LD, 2, 1, 0));           // pc 8: faults
    prog.push_back(alu_i(ADD, 3, 0, 1));          // must not execute
    prog.push_back(ta0());
    run(1'b1, 1'b1);
    chk("fault cause", 32'(exc_cause), 32'(EXC_DPAGE));
    chk("fault pc", exc_pc, 8);
    reg_is(5, 1); reg_is(3, 0);
    // ---- program 3: illegal instruction ----
    prog = {};
    prog.push_back(alu_i(ADD, 5, 0, 2));
    prog.push_back(alu_i(ADD, 6, 0, 3));
    prog.push_back(32'hFFFF_FFFF);                // pc 8
    run(1'b0, 1'b1);
    chk("illegal cause", 32'(exc_cause), 32'(EXC_ILLEGAL));
    chk("illegal pc", exc_pc, 8);
    reg_is(6, 3);
    // ---- program 4: FPU latency ----
    fp_run(1'b1, 1'b0, 64'hBFF0_0000_0000_0000, 64'h4000_0000_0000_0000, ca, r);
    chk("-1/2 hi", r[63:32], 32'hBFE0_0000);
    fp_run(1'b0, 1'b0, 64'hBFF0_0000_0000_0000, 64'h4000_0000_0000_0000, co, r);
    chk("FDIVD exact: analysis - operation", 32'(ca - co), 3);
    fp_run(1'b1, 1'b0, 64'h3FF0_0000_0000_0000, 64'h4008_0000_0000_0000, ca2, r);
    chk("1/3", r[63:32], 32'h3FD5_5555);
    chk("FDIVD analysis time independent of data", 32'(ca2), 32'(ca));
    fp_run(1'b0, 1'b0, 64'h3FF0_0000_0000_0000, 64'h4008_0000_0000_0000, co, r);
    chk("FDIVD inexact: analysis - operation", 32'(ca2 - co), 0);
    fp_run(1'b1, 1'b1, 0, 64'h4010_0000_0000_0000, ca, r);
    chk("sqrt 4", r[63:32], 32'h4000_0000);
    fp_run(1'b0, 1'b1, 0, 64'h4010_0000_0000_0000, co, r);
    chk("FSQRTD exact: analysis - operation", 32'(ca - co), 3);
    fp_run(1'b1, 1'b1, 0, 64'h4000_0000_0000_0000, ca2, r);
    chk("sqrt 2", r[63:32], 32'h3FF6_A09E);
    chk("FSQRTD analysis time independent of data", 32'(ca2), 32'(ca));
    fp_run(1'b1, 1'b0, 64'h3FF0_0000_0000_0000, 64'h4008_0000_0000_0000, co, r);
    $display("cycles sqrt %0d div %0d", ca, co);
    chk("FSQRTD longer than FDIVD by 8", 32'(ca - co), 8);
    // ---- every mechanism happened ----
    checks++;
    if (n_raw == 0 || n_wbuf == 0 || n_fpu == 0 || n_misp == 0 || n_fwd == 0) begin
      failures++;
      $display("FAIL coverage raw %0d wbuf %0d fpu %0d mispredict %0d forward %0d", n_raw, n_wbuf, n_fpu, n_misp, n_fwd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
