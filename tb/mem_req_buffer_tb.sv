// Self-checking testbench for mem_req_buffer: four requesters issue random reads and writes,
// each with one transaction outstanding; a controller model serves the buffer's head one at
// a time with a random delay. Each requester must get exactly its own answers, and the
// controller must see the requests in the order the buffer accepted them.
module mem_req_buffer_tb;
  import mbpta_pkg::*;
  localparam int NREQ = 4, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic [NREQ-1:0] req_valid = 0, req_ready, resp_valid;
  mem_req_t req [NREQ];
  logic [31:0] resp_rdata;
  logic mc_req_valid, mc_req_ready = 0, mc_resp_valid = 0;
  mem_req_t mc_req;
  logic [31:0] mc_resp_rdata = 0;
  logic [$clog2(DEPTH+1)-1:0] occupancy;
  int checks = 0, failures = 0, max_occ = 0;

  mem_req_buffer #(.NREQ(NREQ), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  mem_req_t accepted [$];
  int done_cnt [NREQ];

  // requesters: the answer to a request is its address plus its requester number
  for (genvar g = 0; g < NREQ; g++) begin : g_req
    initial begin
      req[g] = '0;
      done_cnt[g] = 0;
      @(posedge rst_n);
      for (int n = 0; n < 50; n++) begin
        @(negedge clk);
        repeat ($urandom % 4) @(negedge clk);
        req[g] = '{addr: {30'($urandom), 2'(g)}, we: 1'($urandom), wdata: $urandom};
        req_valid[g] = 1;
        do @(posedge clk); while (!req_ready[g]);
        accepted.push_back(req[g]);
        #1 req_valid[g] = 0;
        do @(posedge clk); while (!resp_valid[g]);
        checks++;
        if (resp_rdata !== ~req[g].addr) begin
          failures++; $display("FAIL requester %0d got %h", g, resp_rdata);
        end
        done_cnt[g]++;
      end
    end
  end

  // controller model
  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      mc_req_ready = 1;
      if (int'(occupancy) > max_occ) max_occ = int'(occupancy);
      if (mc_req_valid) begin
        mem_req_t r;
        r = mc_req;
        @(posedge clk);
        #1 mc_req_ready = 0;
        checks++;
        if (accepted.size() == 0 || r !== accepted[0]) begin
          failures++; $display("FAIL controller order: %h", r.addr);
        end
        if (accepted.size() != 0) void'(accepted.pop_front());
        repeat (1 + $urandom % 8) @(negedge clk);
        mc_resp_valid = 1;
        mc_resp_rdata = ~r.addr;
        @(negedge clk);
        mc_resp_valid = 0;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done_cnt[0] == 50 && done_cnt[1] == 50 && done_cnt[2] == 50 && done_cnt[3] == 50);
    checks++;
    if (max_occ < 2) begin failures++; $display("FAIL buffer never held two requests"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
