// Self-checking testbench for rand_tlb (8 entries): fills, hits, the random victim choice once
// the TLB is full (the entry named by rnd mod 8 is the one evicted), and flush.
module rand_tlb_tb;
  logic clk = 0, rst_n = 0, flush = 0, fill = 0, lookup_hit, rnd_step;
  logic [19:0] lookup_vpn = 0, lookup_ppn, fill_vpn = 0, fill_ppn = 0;
  logic [31:0] rnd = 0;
  int checks = 0, failures = 0;

  rand_tlb dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_fill(input logic [19:0] v, input logic [19:0] p, input logic [31:0] r,
                         input logic exp_step);
    @(negedge clk);
    fill = 1; fill_vpn = v; fill_ppn = p; rnd = r;
    lookup_vpn = v;
    #1;
    checks++;
    if (rnd_step !== exp_step) begin failures++; $display("FAIL rnd_step %0d", rnd_step); end
    @(negedge clk);
    fill = 0;
  endtask

  logic h;
  task automatic look(input logic [19:0] v, output logic [19:0] p);
    lookup_vpn = v;
    #1;
    p = lookup_ppn;
    h = lookup_hit;
  endtask

  logic [19:0] resident [8];  // which vpn sits in entry i (reference model)

  initial begin
    logic [19:0] p;
    repeat (2) @(negedge clk);
    rst_n = 1;
    look(20'h1, p);
    checks++; if (h) begin failures++; $display("FAIL hit after reset"); end
    // fill the empty entries in order 0..7
    for (int i = 0; i < 8; i++) begin
      do_fill(20'(100 + i), 20'(500 + i), $urandom, 1'b0);
      resident[i] = 20'(100 + i);
    end
    for (int i = 0; i < 8; i++) begin
      look(20'(100 + i), p);
      checks++;
      if (!h || p !== 20'(500 + i)) begin failures++; $display("FAIL lookup %0d", i); end
    end
    // replacements with a known random number: entry r%8 is evicted
    for (int k = 0; k < 40; k++) begin
      logic [31:0] r;
      int victim;
      r = $urandom;
      victim = int'(r % 8);
      do_fill(20'(1000 + k), 20'(2000 + k), r, 1'b1);
      resident[victim] = 20'(1000 + k);
      for (int i = 0; i < 8; i++) begin
        look(resident[i], p);
        checks++;
        if (!h) begin failures++; $display("FAIL entry %0d lost", i); end
      end
    end
    // flush
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    for (int i = 0; i < 8; i++) begin
      look(resident[i], p);
      checks++;
      if (h) begin failures++; $display("FAIL hit after flush"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
