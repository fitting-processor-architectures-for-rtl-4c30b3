// Self-checking testbench for prng: the state sequence is compared with a bit-level model of
// the x^32+x^22+x^2+x+1 Galois register, the zero seed must be replaced, and the output bits
// must be balanced over a long run.
module prng_tb;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [31:0] seed = 0, value;
  int checks = 0, failures = 0;

  prng dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: shift right; when the bit shifted out is 1, flip bits 31, 21, 1 and 0
  function automatic logic [31:0] ref_next(input logic [31:0] s);
    logic [31:0] n;
    n = {1'b0, s[31:1]};
    if (s[0]) begin
      n[31] = ~n[31]; n[21] = ~n[21]; n[1] = ~n[1]; n[0] = ~n[0];
    end
    return n;
  endfunction

  initial begin
    logic [31:0] r;
    int ones;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (value !== 32'd1) begin failures++; $display("FAIL reset value %h", value); end
    load = 1; seed = 32'hDEADBEEF;
    @(negedge clk);
    load = 0;
    checks++; if (value !== 32'hDEADBEEF) begin failures++; $display("FAIL load"); end
    r = 32'hDEADBEEF;
    ones = 0;
    step = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      r = ref_next(r);
      checks++;
      if (value !== r) begin failures++; if (failures < 5) $display("FAIL step %0d: %h vs %h", i, value, r); end
      ones += int'(value[0]);
    end
    step = 0;
    @(negedge clk);
    checks++; if (value !== r) begin failures++; $display("FAIL hold without step"); end
    checks++;
    if (ones < 9500 || ones > 10500) begin failures++; $display("FAIL bit balance %0d", ones); end
    load = 1; seed = 0;
    @(negedge clk);
    load = 0;
    checks++; if (value !== 32'd1) begin failures++; $display("FAIL zero seed gives %h", value); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
