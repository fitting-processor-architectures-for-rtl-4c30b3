// Hardware page-table walker: refills a TLB after a TLB miss.
//
// The design only says that TLB misses are handled by a hardware walker; the page-table format
// is this design's choice: a single-level table of 32-bit entries at PT_BASE, indexed by the
// virtual page number (entry address = PT_BASE + 4*vpn). An entry holds the physical page
// number in bits 31:12 and a valid flag in bit 0; an entry with bit 0 clear is a page fault.
//
// Interface: a `start` pulse with `vpn` launches one memory read through the request/response
// port (mem_req_valid held until mem_req_ready). When the response arrives, `done` pulses for
// one cycle with `ppn` and `fault`. The walk takes 1 cycle plus the memory latency.
// The walker only reads, so mem_req.we and mem_req.wdata are constant zero, and the low two
// address bits are always zero (word-aligned entries).
module page_walker
  import mbpta_pkg::*;
#(
  parameter logic [31:0] PT_BASE = 32'h0001_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [19:0] vpn,
  output logic        busy,
  output logic        done,
  output logic [19:0] ppn,
  output logic        fault,
  output logic        mem_req_valid,
  output mem_req_t    mem_req,
  input  logic        mem_req_ready,
  input  logic        mem_resp_valid,
  input  logic [31:0] mem_rdata
);
  typedef enum logic [1:0] {PW_IDLE, PW_REQ, PW_WAIT} pw_state_t;
  pw_state_t   state;
  logic [19:0] vpn_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= PW_IDLE;
      vpn_q <= '0;
      done  <= 1'b0;
      ppn   <= '0;
      fault <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        PW_IDLE: if (start) begin
          vpn_q <= vpn;
          state <= PW_REQ;
        end
        PW_REQ: if (mem_req_ready) state <= PW_WAIT;
        PW_WAIT: if (mem_resp_valid) begin
          done  <= 1'b1;
          ppn   <= mem_rdata[31:12];
          fault <= !mem_rdata[0];
          state <= PW_IDLE;
        end
        default: state <= PW_IDLE;
      endcase
    end
  end

  assign busy          = (state != PW_IDLE);
  assign mem_req_valid = (state == PW_REQ);
  assign mem_req.addr  = PT_BASE + {10'd0, vpn_q, 2'b00};
  assign mem_req.we    = 1'b0;
  assign mem_req.wdata = '0;
endmodule
