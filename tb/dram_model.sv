// Behavioural model of the external DRAM (not synthesizable logic; testbench use only).
//
// A word array of WORDS 32-bit words (the byte address is taken modulo its size). One access
// at a time: dram_req_valid pulses with the request; dram_resp_valid pulses with the read data
// (or as the acknowledge of a write) after a latency that depends on the previous access, as
// in real DRAM: READ_LAT for a read, WRITE_LAT for a write, plus TURN_LAT when a read follows a
// write. This history-dependent latency is what the memory controller hides in analysis mode.
module dram_model
  import mbpta_pkg::*;
#(
  parameter int unsigned WORDS     = 65536,
  parameter int unsigned READ_LAT  = 8,
  parameter int unsigned WRITE_LAT = 6,
  parameter int unsigned TURN_LAT  = 5
) (
  input  logic        clk,
  input  logic        dram_req_valid,
  input  mem_req_t    dram_req,
  output logic        dram_resp_valid,
  output logic [31:0] dram_rdata
);
  logic [31:0] mem [WORDS];
  logic        last_write = 1'b0;
  int          countdown  = 0;
  mem_req_t    cur;

  initial begin
    dram_resp_valid = 1'b0;
    dram_rdata      = '0;
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
  end

  function automatic int unsigned widx(input logic [31:0] a);
    return int'((a >> 2) % WORDS);
  endfunction

  always @(posedge clk) begin
    dram_resp_valid <= 1'b0;
    if (dram_req_valid) begin
      cur = dram_req;
      if (dram_req.we) countdown = WRITE_LAT;
      else countdown = READ_LAT + (last_write ? TURN_LAT : 0);
      last_write = dram_req.we;
    end else if (countdown > 0) begin
      countdown--;
      if (countdown == 1) begin
        dram_resp_valid <= 1'b1;
        if (cur.we) begin
          mem[widx(cur.addr)] = cur.wdata;
          dram_rdata <= '0;
        end else begin
          dram_rdata <= mem[widx(cur.addr)];
        end
      end
    end
  end
endmodule
