// End-to-end testbench for mbpta_core at its default parameters.
//
// A small SPARC program (a store/load loop, a write-buffer-filling burst of stores, a store
// and load through a remapped page, FDIVD and FSQRTD, shifts and logic, taken and not-taken
// branches) is run several times with different random seeds, in analysis and in operation
// mode. Each run must end with the same architectural results (registers and memory, worked
// out by hand and with the simulator's real arithmetic); the execution time may vary with the
// seed. A second program loads from an unmapped page and must stop with a data page fault at
// the load. Every mechanism of the design is counted over all runs and must occur at least
// once: cache hits and misses, TLB misses and walks, read-after-write interlocks, a full write
// buffer, store-to-load forwarding, FPU stalls, branch mispredictions, queuing in front of the
// memory controller, and both memory-controller modes.
module mbpta_core_tb;
  import mbpta_pkg::*;
  import sparc_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic analysis_mode = 0, flush = 0;
  logic [31:0] place_seed = 0, repl_seed = 0;
  logic dram_req_valid, dram_resp_valid;
  mem_req_t dram_req;
  logic [31:0] dram_rdata;
  logic halted, store_fault, bound_violation;
  exc_t exc_cause;
  logic [31:0] exc_pc, retired, dbg_data;
  logic [5:0] dbg_addr = 0;
  logic ev_il1_hit, ev_il1_miss, ev_dl1_hit, ev_dl1_miss, ev_itlb_miss, ev_dtlb_miss;
  logic ev_raw_stall, ev_wbuf_stall, ev_fpu_stall, ev_mispredict, ev_wb_forward, ev_membuf_wait;

  mbpta_core dut (.*);
  dram_model u_dram (.clk, .dram_req_valid, .dram_req, .dram_resp_valid, .dram_rdata);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles;

  // mechanism counters
  longint n_il1_hit, n_il1_miss, n_dl1_hit, n_dl1_miss, n_itlb, n_dtlb, n_raw, n_wbuf,
          n_fpu, n_mis, n_fwd, n_mq, n_bound, n_analysis_runs, n_operation_runs;

  always @(posedge clk) if (rst_n) begin
    n_il1_hit  += longint'(ev_il1_hit);
    n_il1_miss += longint'(ev_il1_miss);
    n_dl1_hit  += longint'(ev_dl1_hit);
    n_dl1_miss += longint'(ev_dl1_miss);
    n_itlb     += longint'(ev_itlb_miss);
    n_dtlb     += longint'(ev_dtlb_miss);
    n_raw      += longint'(ev_raw_stall);
    n_wbuf     += longint'(ev_wbuf_stall);
    n_fpu      += longint'(ev_fpu_stall);
    n_mis      += longint'(ev_mispredict);
    n_fwd      += longint'(ev_wb_forward);
    n_mq       += longint'(ev_membuf_wait);
    n_bound    += longint'(bound_violation);
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic poke(input logic [31:0] addr, input logic [31:0] v);
    u_dram.mem[(addr >> 2) % 65536] = v;
  endtask
  function automatic logic [31:0] peek(input logic [31:0] addr);
    return u_dram.mem[(addr >> 2) % 65536];
  endfunction

  localparam logic [31:0] PT = 32'h0001_0000;

  // Page table: identity for pages 0-15, except page 5 -> frame 7 and page 6 unmapped.
  task automatic load_page_table();
    for (int v = 0; v < 16; v++) begin
      logic [31:0] pte;
      pte = {20'(v), 11'd0, 1'b1};
      if (v == 5) pte = {20'd7, 11'd0, 1'b1};
      if (v == 6) pte = 32'd0;
      poke(PT + 32'(v * 4), pte);
    end
  endtask

  logic [31:0] prog [$];

  localparam int BIG_LINES = 520;
  // retired instructions of program 1: see the program listing
  localparam int RETIRED1 = 33 + 26 + 4 + 1 + 6 + 2 + 4 + 1 + 5 + 6 + 2 + 2 * (4 + 5 * BIG_LINES);

  task automatic load_prog1();
    prog = {};
    prog.push_back(sethi(1, 32'h2000));            // 0  r1 = 0x2000
    prog.push_back(alu_i(ADD, 2, 0, 5));           // 1  r2 = 5
    prog.push_back(alu_i(ADD, 3, 0, 0));           // 2  r3 = 0
    prog.push_back(alu_r(ADD, 3, 3, 2));           // 3  loop: r3 += r2
    prog.push_back(mem_i(ST, 3, 1, 0));            // 4  [r1] = r3
    prog.push_back(mem_i(LD, 4, 1, 0));            // 5  r4 = [r1]
    prog.push_back(alu_i(ADD, 1, 1, 4));           // 6  r1 += 4
    prog.push_back(alu_i(SUBCC, 2, 2, 1));         // 7  r2 -= 1
    prog.push_back(bicc(C_NE, -5));                // 8  bne loop
    prog.push_back(sethi(5, 32'h3000));            //    r5 = 0x3000
    prog.push_back(alu_i(ADD, 26, 0, 3));          //    r26 = 3
    for (int i = 0; i < 6; i++)                    //    sloop: six stores, one per DL1 line
      prog.push_back(mem_i(ST, 3, 5, i * 64));
    prog.push_back(alu_i(SUBCC, 26, 26, 1));
    prog.push_back(bicc(C_NE, -7));                //    bne sloop
    prog.push_back(sethi(6, 32'h5000));            // 16 r6 = 0x5000 (frame 7)
    prog.push_back(alu_i(ADD, 7, 0, 32'h123));     // 17 r7 = 0x123
    prog.push_back(mem_i(ST, 7, 6, 8));            // 18 [0x5008] = r7
    prog.push_back(mem_i(LD, 8, 6, 8));            // 19 r8 = [0x5008]
    prog.push_back(sethi(9, 32'h4000));            // 20 r9 = 0x4000
    for (int i = 0; i < 6; i++)
      prog.push_back(mem_i(LDF, i, 9, i * 4));     // 21-26 f0..f5
    prog.push_back(fpop(FDIVD, 6, 0, 2));          // 27 f6:f7 = f0:f1 / f2:f3
    prog.push_back(fpop(FSQRTD, 8, 0, 4));         // 28 f8:f9 = sqrt(f4:f5)
    for (int i = 0; i < 4; i++)
      prog.push_back(mem_i(STF, 6 + i, 9, 32 + i * 4)); // 29-32
    prog.push_back(mem_i(LD, 10, 9, 40));          // 33 r10 = high word of sqrt(3)
    prog.push_back(alu_i(ADD, 11, 0, -8));         // 34 r11 = -8
    prog.push_back(alu_i(SRA, 12, 11, 1));         // 35 r12 = -4
    prog.push_back(alu_i(SRL, 13, 11, 28));        // 36 r13 = 15
    prog.push_back(alu_r(AND_, 14, 12, 13));       // 37 r14 = 12
    prog.push_back(alu_i(XOR_, 15, 14, 5));        // 38 r15 = 9
    prog.push_back(alu_i(SUBCC, 0, 15, 9));        // 39 Z = 1
    prog.push_back(bicc(C_E, 2));                  //    be +2 (taken)
    prog.push_back(alu_i(ADD, 16, 0, 1));          //    skipped
    prog.push_back(bicc(C_L, 2));                  //    bl +2 (not taken)
    prog.push_back(alu_i(ADD, 17, 0, 2));          //    r17 = 2
    prog.push_back(alu_i(SLL, 18, 13, 4));         //    r18 = 0xF0
    prog.push_back(alu_r(OR_, 19, 18, 17));        //    r19 = 0xF2
    // Two passes over BIG_LINES lines, more than the 16 KB DL1 holds: capacity and conflict
    // misses under random placement and replacement make the time depend on the seeds.
    prog.push_back(sethi(20, 32'h8000));           //    r20 = 0x8000
    prog.push_back(alu_i(ADD, 21, 0, 2));          //    r21 = 2 passes
    prog.push_back(alu_i(ADD, 22, 20, 0));         //    outer: r22 = r20
    prog.push_back(alu_i(ADD, 23, 0, BIG_LINES));  //    r23 = line count
    prog.push_back(mem_i(LD, 24, 22, 0));          //    inner: r24 = [r22]
    prog.push_back(alu_r(ADD, 25, 25, 24));        //    r25 += r24
    prog.push_back(alu_i(ADD, 22, 22, 32));        //    next line
    prog.push_back(alu_i(SUBCC, 23, 23, 1));
    prog.push_back(bicc(C_NE, -4));                //    bne inner
    prog.push_back(alu_i(SUBCC, 21, 21, 1));
    prog.push_back(bicc(C_NE, -8));                //    bne outer
    prog.push_back(ta0());                         //    halt
  endtask

  task automatic init_memory();
    for (int i = 0; i < 65536; i++) u_dram.mem[i] = '0;
    load_page_table();
    foreach (prog[i]) poke(32'(i * 4), prog[i]);
    poke(32'h4000, 32'hBFF00000); poke(32'h4004, 32'h0);   // -1.0
    poke(32'h4008, 32'h40000000); poke(32'h400C, 32'h0);   //  2.0
    poke(32'h4010, 32'h40080000); poke(32'h4014, 32'h0);   //  3.0
    for (int i = 0; i < BIG_LINES; i++) poke(32'h8000 + 32'(i * 32), 32'(i));
  endtask

  task automatic run(input logic amode, input logic [31:0] ps, input logic [31:0] rs,
                     output longint cyc);
    rst_n = 0;
    analysis_mode = amode;
    place_seed = ps;
    repl_seed = rs;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    flush = 1;
    @(negedge clk);
    flush = 0;
    cyc = 0;
    while (!halted && cyc < 2000000) begin
      @(negedge clk);
      cyc++;
    end
    // let the write buffer drain
    repeat (400) @(negedge clk);
    if (amode) n_analysis_runs++;
    else n_operation_runs++;
  endtask

  task automatic chk_reg(input string what, input int r, input logic [31:0] exp);
    dbg_addr = 6'(r);
    #1;
    chk(what, dbg_data, exp);
  endtask

  task automatic check_prog1(input string tag);
    logic [63:0] q, s;
    q = $realtobits(-1.0 / 2.0);
    s = $realtobits($sqrt(3.0));
    chk({tag, " halt cause"}, 32'(exc_cause), 32'(EXC_HALT));
    chk({tag, " halt pc"}, exc_pc, 32'((prog.size() - 1) * 4));
    chk_reg({tag, " r1"}, 1, 32'h2014);
    chk_reg({tag, " r2"}, 2, 32'd0);
    chk_reg({tag, " r3"}, 3, 32'd15);
    chk_reg({tag, " r4"}, 4, 32'd15);
    chk_reg({tag, " r8"}, 8, 32'h123);
    chk_reg({tag, " r10"}, 10, s[63:32]);
    chk_reg({tag, " r12"}, 12, 32'hFFFF_FFFC);
    chk_reg({tag, " r13"}, 13, 32'd15);
    chk_reg({tag, " r14"}, 14, 32'd12);
    chk_reg({tag, " r15"}, 15, 32'd9);
    chk_reg({tag, " r16"}, 16, 32'd0);
    chk_reg({tag, " r17"}, 17, 32'd2);
    chk_reg({tag, " r19"}, 19, 32'hF2);
    chk_reg({tag, " f6"}, 32 + 6, q[63:32]);
    chk_reg({tag, " f7"}, 32 + 7, q[31:0]);
    chk_reg({tag, " f8"}, 32 + 8, s[63:32]);
    chk_reg({tag, " f9"}, 32 + 9, s[31:0]);
    chk({tag, " mem 0x2000"}, peek(32'h2000), 32'd5);
    chk({tag, " mem 0x2010"}, peek(32'h2010), 32'd15);
    chk({tag, " mem 0x3140"}, peek(32'h3140), 32'd15);
    chk({tag, " mem frame 7"}, peek(32'h7008), 32'h123);
    chk({tag, " mem page 5 untouched"}, peek(32'h5008), 32'h0);
    chk({tag, " mem sqrt lo"}, peek(32'h402C), s[31:0]);
    chk({tag, " store fault"}, 32'(store_fault), 32'd0);
    chk({tag, " retired"}, retired, 32'(RETIRED1));
    chk_reg({tag, " r25"}, 25, 32'(BIG_LINES * (BIG_LINES - 1)));
  endtask

  localparam int NSEEDS = 4;
  longint t_an [NSEEDS], t_op [NSEEDS];

  initial begin
    load_prog1();
    for (int k = 0; k < NSEEDS; k++) begin
      for (int m = 0; m < 2; m++) begin
        longint c;
        init_memory();
        run(m == 0, 32'h1234_5677 * 32'(k + 1), 32'h9E37_79B9 ^ 32'(k * 7919), c);
        if (m == 0) t_an[k] = c; else t_op[k] = c;
        check_prog1($sformatf("seed %0d %s", k, m == 0 ? "analysis" : "operation"));
        $display("seed %0d %s mode: %0d cycles", k, m == 0 ? "analysis" : "operation", c);
      end
      // the analysis-mode time of a run upper-bounds the operation-mode time of the same run
      checks++;
      if (t_an[k] < t_op[k]) begin
        failures++;
        $display("FAIL analysis mode faster than operation mode for seed %0d", k);
      end
    end
    // different seeds must give different execution times (the placement is randomised)
    begin
      int distinct;
      distinct = 0;
      for (int k = 1; k < NSEEDS; k++) if (t_an[k] != t_an[0]) distinct++;
      checks++;
      if (distinct == 0) begin
        failures++;
        $display("FAIL execution time does not depend on the seed");
      end
    end

    // Program 2: a load from the unmapped page 6 stops the core with a data page fault.
    prog = {};
    prog.push_back(sethi(1, 32'h6000));
    prog.push_back(mem_i(LD, 2, 1, 0));
    prog.push_back(alu_i(ADD, 3, 0, 1));
    prog.push_back(ta0());
    begin
      longint c;
      init_memory();
      run(1'b1, 32'h1, 32'h2, c);
      chk("page fault cause", 32'(exc_cause), 32'(EXC_DPAGE));
      chk("page fault pc", exc_pc, 32'd4);
      chk_reg("no write after fault", 3, 32'd0);
    end

    $display("events: il1 hit %0d miss %0d, dl1 hit %0d miss %0d, itlb miss %0d, dtlb miss %0d",
             n_il1_hit, n_il1_miss, n_dl1_hit, n_dl1_miss, n_itlb, n_dtlb);
    $display("events: raw stall %0d, wbuf full %0d, fpu stall %0d, mispredict %0d, forward %0d, membuf queue %0d",
             n_raw, n_wbuf, n_fpu, n_mis, n_fwd, n_mq);
    begin
      longint ev [14];
      string nm [14];
      ev = '{n_il1_hit, n_il1_miss, n_dl1_hit, n_dl1_miss, n_itlb, n_dtlb, n_raw, n_wbuf,
             n_fpu, n_mis, n_fwd, n_mq, longint'(n_analysis_runs), longint'(n_operation_runs)};
      nm = '{"il1 hit", "il1 miss", "dl1 hit", "dl1 miss", "itlb miss", "dtlb miss", "raw stall",
             "wbuf full", "fpu stall", "mispredict", "forward", "membuf queue", "analysis run",
             "operation run"};
      for (int i = 0; i < 14; i++) begin
        checks++;
        if (ev[i] == 0) begin
          failures++;
          $display("FAIL mechanism never exercised: %s", nm[i]);
        end
      end
    end
    chk("no latency-bound violation", 32'(n_bound), 32'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
