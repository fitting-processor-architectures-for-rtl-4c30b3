// Self-checking testbench for fpu_divsqrt.
// Results are compared with the simulator's own double arithmetic ($bitstoreal, /, $sqrt),
// which rounds to nearest-even like the unit. Latencies are checked against the example
// operands of the latency table (15/18 cycles for FDIVD, 23/26 for FSQRTD) in operation mode
// and against the fixed 18/26 cycles in analysis mode.
module fpu_divsqrt_tb;
  logic clk = 0, rst_n = 0;
  logic analysis_mode, start, op, busy, done;
  logic [63:0] a, b, result;
  int checks = 0, failures = 0;

  fpu_divsqrt dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic o, input logic [63:0] x, input logic [63:0] y,
                     output logic [63:0] r, output int lat);
    @(negedge clk);
    op = o; a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    r = result;
  endtask

  function automatic logic [63:0] ref_res(input logic o, input logic [63:0] x, input logic [63:0] y);
    real rx, ry;
    rx = $bitstoreal(x);
    ry = $bitstoreal(y);
    return o ? $realtobits($sqrt(rx)) : $realtobits(rx / ry);
  endfunction

  task automatic check(input logic o, input logic [63:0] x, input logic [63:0] y, input int exp_lat);
    logic [63:0] r, e;
    int lat;
    run(o, x, y, r, lat);
    e = ref_res(o, x, y);
    checks++;
    if (r !== e) begin
      failures++;
      $display("FAIL %s %h %h: got %h expected %h", o ? "sqrt" : "div", x, y, r, e);
    end
    if (exp_lat > 0) begin
      checks++;
      if (lat != exp_lat) begin
        failures++;
        $display("FAIL latency %s %h %h: got %0d expected %0d", o ? "sqrt" : "div", x, y, lat, exp_lat);
      end
    end
  endtask

  function automatic logic [63:0] rnd_normal();
    logic [63:0] v;
    v = {$urandom, $urandom};
    v[62:52] = 11'(700 + ($urandom % 640));   // well inside the normal range
    return v;
  endfunction

  int n_short = 0, n_long = 0;

  initial begin
    analysis_mode = 0; start = 0; op = 0; a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Latency table examples, operation mode
    check(0, 64'hBFF0000000000000, 64'h4000000000000000, 15);
    check(0, 64'h001ABC0000000010, 64'h3FF000400A07610C, 18);
    check(1, 64'h4030000000000000, 64'h0, 23);
    check(1, 64'h4008000000000000, 64'h0, 26);
    // Same operands, analysis mode: always the worst case
    analysis_mode = 1;
    check(0, 64'hBFF0000000000000, 64'h4000000000000000, 18);
    check(0, 64'h001ABC0000000010, 64'h3FF000400A07610C, 18);
    check(1, 64'h4030000000000000, 64'h0, 26);
    check(1, 64'h4008000000000000, 64'h0, 26);

    // Special cases (IEEE 754)
    analysis_mode = 0;
    begin
      logic [63:0] r; int lat;
      run(0, 64'h3FF0000000000000, 64'h0, r, lat);                 // 1/0 = +inf
      checks++; if (r !== 64'h7FF0000000000000) begin failures++; $display("FAIL 1/0 %h", r); end
      run(0, 64'h0, 64'h0, r, lat);                                 // 0/0 = NaN
      checks++; if (r !== 64'h7FF8000000000000) begin failures++; $display("FAIL 0/0 %h", r); end
      run(1, 64'hC000000000000000, 64'h0, r, lat);                 // sqrt(-2) = NaN
      checks++; if (r !== 64'h7FF8000000000000) begin failures++; $display("FAIL sqrt(-2) %h", r); end
      run(1, 64'h7FF0000000000000, 64'h0, r, lat);                 // sqrt(inf) = inf
      checks++; if (r !== 64'h7FF0000000000000) begin failures++; $display("FAIL sqrt(inf) %h", r); end
    end

    // Random normal operands in both modes
    for (int i = 0; i < 400; i++) begin
      logic [63:0] x, y;
      analysis_mode = i[0];
      x = rnd_normal();
      y = rnd_normal();
      check(0, x, y, analysis_mode ? 18 : 0);
      x[63] = 0;
      check(1, x, 0, analysis_mode ? 26 : 0);
    end
    // Exact random quotients: (k*y)/y with small integers
    analysis_mode = 0;
    for (int i = 1; i < 40; i++) begin
      real q;
      q = real'(i) * 3.0;
      check(0, $realtobits(q), $realtobits(3.0), 15);
      check(1, $realtobits(real'(i * i)), 64'h0, 23);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
