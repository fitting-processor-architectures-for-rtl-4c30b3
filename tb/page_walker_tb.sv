// Self-checking testbench for page_walker: a memory model answers the walker's read after a
// random delay; the read address must be PT_BASE + 4*vpn, and the walker must return the
// page number of the entry, or a fault when its valid bit is clear.
module page_walker_tb;
  import mbpta_pkg::*;
  localparam logic [31:0] PT_BASE = 32'h0001_0000;
  logic clk = 0, rst_n = 0, start = 0, busy, done, fault;
  logic [19:0] vpn = 0, ppn;
  logic mem_req_valid, mem_req_ready = 0, mem_resp_valid = 0;
  mem_req_t mem_req;
  logic [31:0] mem_rdata = 0;
  int checks = 0, failures = 0;

  page_walker #(.PT_BASE(PT_BASE)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // page-table contents: entry for vpn v = {v ^ 20'h5A5A5, ..., valid = v % 3 != 0}
  function automatic logic [31:0] pte(input logic [31:0] addr);
    logic [19:0] v;
    v = 20'((addr - PT_BASE) >> 2);
    return {v ^ 20'h5A5A5, 11'd0, (v % 3) != 0};
  endfunction

  // memory model
  initial begin
    forever begin
      @(negedge clk);
      mem_req_ready = ($urandom % 2) == 0;
      if (mem_req_valid && mem_req_ready) begin
        logic [31:0] a;
        a = mem_req.addr;
        checks++;
        if (a !== PT_BASE + {10'd0, vpn, 2'b00} || mem_req.we) begin
          failures++; $display("FAIL walk address %h for vpn %h", a, vpn);
        end
        @(negedge clk);
        mem_req_ready = 0;
        repeat ($urandom % 6) @(negedge clk);
        mem_resp_valid = 1;
        mem_rdata = pte(a);
        @(negedge clk);
        mem_resp_valid = 0;
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      logic [19:0] v;
      int lat;
      v = 20'($urandom % 4096);
      @(negedge clk);
      vpn = v; start = 1;
      @(negedge clk);
      start = 0;
      lat = 0;
      while (!done && lat < 100) begin
        @(negedge clk);
        lat++;
      end
      checks++;
      if (!done || fault !== ((v % 3) == 0) || (!fault && ppn !== (v ^ 20'h5A5A5))) begin
        failures++; $display("FAIL walk %h: done %0d fault %0d ppn %h", v, done, fault, ppn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
