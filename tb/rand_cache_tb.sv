// Self-checking testbench for rand_cache in its DL1 configuration (32-byte lines,
// write-through, no-write-allocate), with models of the TLB, the page walker and memory.
// Virtual page v (0..7) maps to frame v+16; page 8 has no valid entry. A reference copy of
// memory, updated by every store, gives the value each load must return. Also checked: a hit
// answers exactly 2 cycles after the request, a fault is reported only for page 8, a store
// never allocates a line, a flush empties the cache, and the line-fill count is the number of
// misses. The TLB model forgets entries at random, so the walker path is exercised too.
module rand_cache_tb;
  import mbpta_pkg::*;
  localparam int LINE = 32;
  logic clk = 0, rst_n = 0, flush = 0;
  logic [31:0] seed = 32'h1234_5678, rnd;
  logic rnd_step;
  logic cpu_req = 0, cpu_we = 0, cpu_ready, cpu_resp_valid, cpu_fault;
  logic [31:0] cpu_addr = 0, cpu_wdata = 0, cpu_rdata;
  logic [19:0] tlb_vpn, tlb_ppn, tlb_fill_ppn;
  logic tlb_hit, tlb_fill, pw_start, pw_done = 0, pw_fault = 0;
  logic [19:0] pw_ppn = 0;
  logic mem_req_valid, mem_req_ready = 0, mem_resp_valid = 0;
  mem_req_t mem_req;
  logic [31:0] mem_rdata = 0;
  logic ev_hit, ev_miss;
  int checks = 0, failures = 0;

  rand_cache #(.SIZE_BYTES(16384), .WAYS(4), .LINE_BYTES(LINE), .WRITE_THROUGH(1'b1)) dut (.*);
  prng u_rng (.clk, .rst_n, .load(1'b0), .seed(32'd0), .step(rnd_step), .value(rnd));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- TLB model: frame = page + 16 ----
  logic [15:0] tlb_valid = '0;
  assign tlb_hit = (tlb_vpn < 16) && tlb_valid[tlb_vpn[3:0]];
  assign tlb_ppn = tlb_vpn + 20'd16;
  always @(posedge clk) begin
    if (tlb_fill) begin
      checks++;
      if (tlb_fill_ppn !== tlb_vpn + 20'd16) begin failures++; $display("FAIL TLB fill %h", tlb_fill_ppn); end
      tlb_valid[tlb_vpn[3:0]] <= 1'b1;
    end
    if (($urandom % 16) == 0) tlb_valid[$urandom % 8] <= 1'b0;
  end

  // ---- page walker model: 3 cycles, page 8 invalid ----
  int n_walk = 0;
  initial begin
    forever begin
      @(posedge clk);
      if (pw_start) begin
        logic [19:0] v;
        v = tlb_vpn;
        n_walk++;
        repeat (3) @(posedge clk);
        #1 pw_done = 1; pw_fault = (v == 8); pw_ppn = v + 20'd16;
        @(posedge clk);
        #1 pw_done = 0; pw_fault = 0;
      end
    end
  end

  // ---- memory model (physical) ----
  logic [31:0] pmem [logic [31:0]];
  int n_mem_rd = 0, n_mem_wr = 0;
  function automatic logic [31:0] pinit(input logic [31:0] a);
    return a * 32'h9E37_79B9 + 32'h55;
  endfunction
  initial begin
    forever begin
      @(negedge clk);
      mem_req_ready = ($urandom % 2) == 0;
      if (mem_req_valid && mem_req_ready) begin
        mem_req_t r;
        r = mem_req;
        @(negedge clk);
        mem_req_ready = 0;
        repeat ($urandom % 4) @(negedge clk);
        if (r.we) begin pmem[r.addr] = r.wdata; n_mem_wr++; end
        else begin
          n_mem_rd++;
          mem_rdata = pmem.exists(r.addr) ? pmem[r.addr] : pinit(r.addr);
        end
        mem_resp_valid = 1;
        @(negedge clk);
        mem_resp_valid = 0;
      end
    end
  end

  int n_hit = 0, n_miss = 0;
  always @(posedge clk) begin
    if (ev_hit) n_hit++;
    if (ev_miss) n_miss++;
  end

  // reference, by virtual address
  logic [31:0] vref [logic [31:0]];
  function automatic logic [31:0] expect_rd(input logic [31:0] va);
    if (vref.exists(va)) return vref[va];
    return pinit({va[31:12] + 20'd16, va[11:0]});
  endfunction

  task automatic access(input logic we, input logic [31:0] va, input logic [31:0] d,
                        output logic [31:0] r, output logic f, output int lat);
    @(negedge clk);
    while (!cpu_ready) @(negedge clk);
    cpu_req = 1; cpu_we = we; cpu_addr = va; cpu_wdata = d;
    @(negedge clk);
    cpu_req = 0;
    lat = 1;
    while (!cpu_resp_valid) begin @(negedge clk); lat++; end
    r = cpu_rdata; f = cpu_fault;
  endtask

  logic [31:0] recent [8];
  initial begin
    logic [31:0] va, d, r;
    logic f;
    int lat, h0, m0, rd0, n_hit_lat;
    n_hit_lat = 0;
    foreach (recent[i]) recent[i] = 32'h100 + 32'(i) * 4;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      logic we;
      if (($urandom % 2) == 0) va = recent[$urandom % 8] ^ {27'd0, 3'($urandom), 2'b00};
      else va = {20'($urandom % 9), 10'($urandom), 2'b00};
      we = ($urandom % 4) == 0;
      d = $urandom;
      h0 = n_hit; m0 = n_miss; rd0 = n_mem_rd;
      access(we, va, d, r, f, lat);
      checks++;
      if (f !== (va[31:12] == 8)) begin failures++; $display("FAIL fault %h: %0d", va, f); end
      if (!f && we) vref[va] = d;
      if (!f && !we) begin
        checks++;
        if (r !== expect_rd(va)) begin failures++; $display("FAIL read %h: %h vs %h", va, r, expect_rd(va)); end
        if (n_hit != h0) begin
          n_hit_lat++;
          checks++;
          if (lat != 2) begin failures++; $display("FAIL hit latency %0d", lat); end
        end else if (n_miss != m0 && !f) begin
          checks++;
          if (n_mem_rd - rd0 != LINE / 4) begin failures++; $display("FAIL refill read %0d words", n_mem_rd - rd0); end
        end
      end
      if (we && !f) begin
        // no-write-allocate: the store reads nothing from memory
        checks++;
        if (n_mem_rd != rd0) begin failures++; $display("FAIL store allocated a line"); end
      end
      recent[$urandom % 8] = {va[31:2], 2'b00};
    end
    // hit, then flush, then the same address must miss
    access(1'b0, 32'h0000_0200, 0, r, f, lat);
    access(1'b0, 32'h0000_0200, 0, r, f, lat);
    checks++;
    if (lat != 2) begin failures++; $display("FAIL repeat access not a hit (%0d)", lat); end
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    m0 = n_miss;
    access(1'b0, 32'h0000_0200, 0, r, f, lat);
    checks++;
    if (n_miss != m0 + 1 || r !== expect_rd(32'h200)) begin failures++; $display("FAIL flush did not empty the cache"); end
    checks++;
    if (n_hit_lat < 100 || n_walk == 0 || n_miss < 100) begin
      failures++; $display("FAIL coverage hits %0d walks %0d misses %0d", n_hit_lat, n_walk, n_miss);
    end
    $display("hits %0d misses %0d walks %0d", n_hit, n_miss, n_walk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
