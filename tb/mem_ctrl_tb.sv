// Self-checking testbench for mem_ctrl with the DRAM model (history-dependent latency).
// Analysis mode: every access is answered exactly LAT_MAX cycles after acceptance.
// Operation mode: the answer comes one cycle after the DRAM's. Read data must match what was
// written (words never written are not compared). A DRAM slower than LAT_MAX must raise bound_violation.
module mem_ctrl_tb;
  import mbpta_pkg::*;
  localparam int LAT_MAX = 20;
  logic clk = 0, rst_n = 0, analysis_mode = 0;
  logic req_valid = 0, req_ready, resp_valid, bound_violation;
  mem_req_t req = '0;
  logic [31:0] resp_rdata;
  logic dram_req_valid, dram_resp_valid, slow_resp_valid;
  mem_req_t dram_req;
  logic [31:0] dram_rdata, slow_rdata;
  logic use_slow = 0;
  int checks = 0, failures = 0;

  mem_ctrl #(.LAT_MAX(LAT_MAX)) dut (
    .clk, .rst_n, .analysis_mode, .req_valid, .req, .req_ready, .resp_valid, .resp_rdata,
    .dram_req_valid, .dram_req,
    .dram_resp_valid(use_slow ? slow_resp_valid : dram_resp_valid),
    .dram_rdata(use_slow ? slow_rdata : dram_rdata),
    .bound_violation
  );
  dram_model #(.WORDS(1024)) u_dram (.clk, .dram_req_valid, .dram_req, .dram_resp_valid, .dram_rdata);
  dram_model #(.WORDS(1024), .READ_LAT(30), .WRITE_LAT(30)) u_slow (
    .clk, .dram_req_valid, .dram_req, .dram_resp_valid(slow_resp_valid), .dram_rdata(slow_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] shadow [256];
  bit written [256];
  int lat_seen [int];
  int n_violation = 0;
  always @(posedge clk) if (rst_n && bound_violation) n_violation++;

  task automatic access(input logic we, input logic [7:0] w, input logic [31:0] d,
                        output logic [31:0] r, output int lat);
    @(negedge clk);
    req = '{addr: {22'd0, w, 2'b00}, we: we, wdata: d};
    req_valid = 1;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    while (!resp_valid) begin @(negedge clk); lat++; end
    r = resp_rdata;
  endtask

  initial begin
    foreach (shadow[i]) begin shadow[i] = 0; written[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 2; m++) begin
      analysis_mode = (m == 0);
      for (int i = 0; i < 300; i++) begin
        logic we; logic [7:0] w; logic [31:0] d, r; int lat;
        we = 1'($urandom);
        w = 8'($urandom);
        d = $urandom;
        access(we, w, d, r, lat);
        if (we) begin shadow[w] = d; written[w] = 1; end
        else if (written[w]) begin
          checks++;
          if (r !== shadow[w]) begin failures++; $display("FAIL read %0d: %h vs %h", w, r, shadow[w]); end
        end
        checks++;
        if (analysis_mode && lat != LAT_MAX) begin
          failures++; $display("FAIL analysis latency %0d", lat);
        end
        if (!analysis_mode) begin
          lat_seen[lat] = 1;
          if (lat > LAT_MAX) begin failures++; $display("FAIL operation latency %0d", lat); end
        end
      end
    end
    // the DRAM's own latency varies with its history; operation mode exposes it
    checks++;
    if (lat_seen.num() < 2) begin failures++; $display("FAIL operation-mode latency never varied"); end
    checks++;
    if (n_violation != 0) begin failures++; $display("FAIL unexpected bound violation"); end
    // a DRAM slower than the bound
    use_slow = 1;
    analysis_mode = 1;
    begin
      logic [31:0] r; int lat;
      access(1'b0, 8'd3, 32'd0, r, lat);
      checks++;
      if (n_violation == 0 || lat <= LAT_MAX) begin
        failures++; $display("FAIL slow DRAM: violations %0d latency %0d", n_violation, lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
