// Self-checking testbench for write_buffer: random pushes and drains against a queue model.
// Checks FIFO drain order, the full flag (push refused at DEPTH entries) and that a load sees
// the youngest buffered store to its word.
module write_buffer_tb;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0, push = 0, full, empty, drain_valid, drain_ack = 0, fwd_hit;
  logic [31:0] push_addr = 0, push_data = 0, drain_addr, drain_data, lookup_addr = 0, fwd_data;
  int checks = 0, failures = 0, n_full = 0, n_fwd = 0;

  write_buffer #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] qa [$], qd [$];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // check the state against the model
      checks++;
      if (full !== (qa.size() == DEPTH) || empty !== (qa.size() == 0) ||
          drain_valid !== (qa.size() != 0)) begin
        failures++; $display("FAIL flags size=%0d full=%0d", qa.size(), full);
      end
      if (qa.size() != 0) begin
        checks++;
        if (drain_addr !== qa[0] || drain_data !== qd[0]) begin
          failures++; $display("FAIL head %h %h vs %h %h", drain_addr, drain_data, qa[0], qd[0]);
        end
      end
      // lookup of a random word among a small address set
      lookup_addr = {28'd0, 2'($urandom), 2'b00} | 32'h100;
      #1;
      begin
        logic h; logic [31:0] d;
        h = 0; d = 0;
        foreach (qa[i]) if (qa[i] == lookup_addr) begin h = 1; d = qd[i]; end
        checks++;
        if (fwd_hit !== h || (h && fwd_data !== d)) begin
          failures++; $display("FAIL forward %h: %0d %h vs %0d %h", lookup_addr, fwd_hit, fwd_data, h, d);
        end
        if (h) n_fwd++;
      end
      if (full) n_full++;
      // drive the next cycle
      push = ($urandom % 3) != 0;
      push_addr = {28'd0, 2'($urandom), 2'b00} | 32'h100;
      push_data = $urandom;
      drain_ack = drain_valid && (($urandom % 3) == 0);
      @(posedge clk);
      if (drain_ack && qa.size() != 0) begin void'(qa.pop_front()); void'(qd.pop_front()); end
      if (push && !full) begin qa.push_back(push_addr); qd.push_back(push_data); end
      #1;
      push = 0; drain_ack = 0;
    end
    checks++;
    if (n_full == 0 || n_fwd == 0) begin failures++; $display("FAIL coverage full=%0d fwd=%0d", n_full, n_fwd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
