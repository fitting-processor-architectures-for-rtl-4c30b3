// Request buffer between the core and the memory controller (the buffer in front of DRAM).
//
// All traffic that leaves the core - instruction-cache refills and instruction-side page walks,
// data-cache refills, data-side page walks and write-through stores - is serialised through
// this FIFO, so a data request can wait behind an instruction request of a younger
// instruction. The buffer adds no randomness of its own: it only propagates the jitter of the
// randomised caches and TLBs.
//
// Each of the NREQ requesters has at most one transaction outstanding. One request is enqueued
// per cycle; when several requesters ask in the same cycle the lowest index is taken first
// (this arbitration and DEPTH are this design's choices). The oldest entry goes to the memory
// controller with a valid/ready handshake; the controller serves one request at a time, so its
// response is routed back to the requester of the request it last accepted.
// resp_rdata is the controller's read data passed straight through; only resp_valid is
// routed per requester.
module mem_req_buffer
  import mbpta_pkg::*;
#(
  parameter int unsigned NREQ  = 4,
  parameter int unsigned DEPTH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  // requester side
  input  logic [NREQ-1:0]     req_valid,
  input  mem_req_t            req      [NREQ],
  output logic [NREQ-1:0]     req_ready,
  output logic [NREQ-1:0]     resp_valid,
  output logic [31:0]         resp_rdata,
  // memory-controller side
  output logic                mc_req_valid,
  output mem_req_t            mc_req,
  input  logic                mc_req_ready,
  input  logic                mc_resp_valid,
  input  logic [31:0]         mc_resp_rdata,
  output logic [$clog2(DEPTH+1)-1:0] occupancy
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned IW = (NREQ > 1) ? $clog2(NREQ) : 1;

  mem_req_t      q_req [DEPTH];
  logic [IW-1:0] q_id  [DEPTH];
  logic [PW-1:0] head, tail;
  logic [PW:0]   count;
  logic [IW-1:0] inflight_id;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  logic          grant_any;
  logic [IW-1:0] grant_id;
  always_comb begin
    grant_any = 1'b0;
    grant_id  = '0;
    for (int i = int'(NREQ) - 1; i >= 0; i--) begin
      if (req_valid[i]) begin
        grant_any = 1'b1;
        grant_id  = IW'(i);
      end
    end
  end

  logic enq, deq;
  assign enq = grant_any && (count != (PW+1)'(DEPTH));
  assign deq = mc_req_valid && mc_req_ready;

  always_comb begin
    req_ready = '0;
    if (enq) req_ready[grant_id] = 1'b1;
  end

  assign mc_req_valid = (count != '0);
  assign mc_req       = q_req[head];
  assign occupancy    = ($clog2(DEPTH+1))'(count);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head        <= '0;
      tail        <= '0;
      count       <= '0;
      inflight_id <= '0;
    end else begin
      if (enq) tail <= inc(tail);
      if (deq) begin
        head        <= inc(head);
        inflight_id <= q_id[head];
      end
      count <= count + (PW+1)'(enq) - (PW+1)'(deq);
    end
  end

  always_ff @(posedge clk) begin
    if (enq) begin
      q_req[tail] <= req[grant_id];
      q_id[tail]  <= grant_id;
    end
  end

  always_comb begin
    resp_valid = '0;
    if (mc_resp_valid) resp_valid[inflight_id] = 1'b1;
  end
  assign resp_rdata = mc_resp_rdata;
endmodule
