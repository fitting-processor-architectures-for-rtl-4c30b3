// Write buffer between the memory stage and the write-through DL1.
//
// Stores leave the pipeline into this FIFO and are drained in order to the data cache and on
// to memory. When the buffer is full, `full` blocks the pipeline's memory stage. Loads also
// look the buffer up: `fwd_hit` / `fwd_data` give the youngest buffered store to the same word,
// so a load never reads a stale value from DL1 or memory. Depth and the forwarding rule are
// this design's choices; the design only states that loads access the buffer and that a full
// buffer blocks the pipeline.
//
// Interface: push (with push_addr/push_data) is accepted when !full. The oldest entry is
// presented on drain_valid/drain_addr/drain_data and removed when drain_ack pulses.
// A store pushed in a cycle is visible to lookups from the next cycle.
module write_buffer #(
  parameter int unsigned DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        push,
  input  logic [31:0] push_addr,
  input  logic [31:0] push_data,
  output logic        full,
  output logic        empty,
  output logic        drain_valid,
  output logic [31:0] drain_addr,
  output logic [31:0] drain_data,
  input  logic        drain_ack,
  input  logic [31:0] lookup_addr,
  output logic        fwd_hit,
  output logic [31:0] fwd_data
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [31:0]  addr_q [DEPTH];
  logic [31:0]  data_q [DEPTH];
  logic [PW-1:0] head, tail;
  logic [PW:0]   count;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign full        = (count == (PW+1)'(DEPTH));
  assign empty       = (count == '0);
  assign drain_valid = !empty;
  assign drain_addr  = addr_q[head];
  assign drain_data  = data_q[head];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (push && !full) tail <= inc(tail);
      if (drain_ack && !empty) head <= inc(head);
      count <= count + (PW+1)'(push && !full) - (PW+1)'(drain_ack && !empty);
    end
  end

  always_ff @(posedge clk) begin
    if (push && !full) begin
      addr_q[tail] <= {push_addr[31:2], 2'b00};
      data_q[tail] <= push_data;
    end
  end

  // Walk from oldest to youngest so the youngest match wins.
  always_comb begin
    logic [PW-1:0] p;
    fwd_hit  = 1'b0;
    fwd_data = '0;
    p = head;
    for (int i = 0; i < int'(DEPTH); i++) begin
      if ((PW+1)'(i) < count && addr_q[p] == {lookup_addr[31:2], 2'b00}) begin
        fwd_hit  = 1'b1;
        fwd_data = data_q[p];
      end
      p = inc(p);
    end
  end
endmodule
