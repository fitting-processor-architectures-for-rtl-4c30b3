// Set-associative L1 cache with random placement and random replacement (IL1 and DL1).
//
// Placement: the set of a line is rand_placement(line address, seed), so set conflicts between
// lines change with the per-run seed. Replacement: on a refill an invalid way is used if there
// is one, otherwise a way named by a pseudo-random number. The hit and miss latencies are
// fixed, so the only jitter left is the random hit/miss outcome: every access has a latency
// with a true probability.
//
// The cache is virtually indexed and tagged. As in the design, the TLB is consulted only on a
// miss (or, for the write-through DL1, for the memory write of a store): the physical line
// address comes from the TLB, or from the page walker after a TLB miss. The stored tag is the
// whole virtual line address, since with hashed placement the index bits do not identify a
// line. WRITE_THROUGH=1 gives the DL1: a store updates the line only on a hit
// (no-write-allocate) and is always written to memory.
//
// Interface: cpu_req is accepted when cpu_ready; the answer is cpu_resp_valid (one cycle) with
// cpu_rdata and cpu_fault (an invalid page). A hit answers 2 cycles after the request (accept,
// lookup). A miss then translates (1 cycle on a TLB hit) and reads the line one word at a time
// through the memory port, the word the request wanted being answered after the last one.
// Lines refill in word order from word 0; that order, the word-wide memory port and the
// preference for invalid ways are this design's choices.
// tlb_fill_ppn is pw_ppn passed through: a walked translation is written to the TLB as is.
module rand_cache
  import mbpta_pkg::*;
#(
  parameter int unsigned SIZE_BYTES    = 16384,
  parameter int unsigned WAYS          = 4,
  parameter int unsigned LINE_BYTES    = 16,
  parameter bit          WRITE_THROUGH = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic [31:0] seed,
  input  logic [31:0] rnd,
  output logic        rnd_step,
  // processor side
  input  logic        cpu_req,
  input  logic        cpu_we,
  input  logic [31:0] cpu_addr,
  input  logic [31:0] cpu_wdata,
  output logic        cpu_ready,
  output logic        cpu_resp_valid,
  output logic [31:0] cpu_rdata,
  output logic        cpu_fault,
  // TLB
  output logic [19:0] tlb_vpn,
  input  logic        tlb_hit,
  input  logic [19:0] tlb_ppn,
  output logic        tlb_fill,
  output logic [19:0] tlb_fill_ppn,
  // page walker
  output logic        pw_start,
  input  logic        pw_done,
  input  logic [19:0] pw_ppn,
  input  logic        pw_fault,
  // memory
  output logic        mem_req_valid,
  output mem_req_t    mem_req,
  input  logic        mem_req_ready,
  input  logic        mem_resp_valid,
  input  logic [31:0] mem_rdata,
  // event pulses for statistics
  output logic        ev_hit,
  output logic        ev_miss
);
  localparam int unsigned LINE_WORDS = LINE_BYTES / 4;
  localparam int unsigned SETS       = SIZE_BYTES / (WAYS * LINE_BYTES);
  localparam int unsigned OFF_W      = $clog2(LINE_BYTES);
  localparam int unsigned WOFF_W     = $clog2(LINE_WORDS);
  localparam int unsigned IDX_W      = $clog2(SETS);
  localparam int unsigned LA_W       = 32 - OFF_W;
  localparam int unsigned WAY_W      = (WAYS > 1) ? $clog2(WAYS) : 1;

  logic [LA_W-1:0]   tag_q   [WAYS][SETS];
  logic [SETS-1:0]   valid_q [WAYS];
  logic [31:0]       data_q  [WAYS][SETS*LINE_WORDS];

  typedef enum logic [2:0] {C_IDLE, C_LOOKUP, C_XLATE, C_WALK, C_REFILL, C_MEMW} c_state_t;
  c_state_t state;

  logic [31:0]       addr_q, wdata_q;
  logic              we_q;
  logic [19:0]       ppn_q;
  logic [WAY_W-1:0]  victim_q;
  logic [WOFF_W-1:0] word_cnt;
  logic              req_sent;
  logic [31:0]       want_q;

  logic [LA_W-1:0]   line_addr;
  logic [IDX_W-1:0]  set_idx;
  logic [WOFF_W-1:0] word_off;
  assign line_addr = addr_q[31:OFF_W];
  assign word_off  = addr_q[OFF_W-1:2];

  rand_placement #(.LA_W(LA_W), .IDX_W(IDX_W)) u_place (
    .line_addr(line_addr), .seed(seed), .set_idx(set_idx)
  );

  // Tag compare in every way of the selected set.
  logic             hit;
  logic [WAY_W-1:0] hit_way;
  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < int'(WAYS); w++) begin
      if (valid_q[w][set_idx] && tag_q[w][set_idx] == line_addr) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
    end
  end

  // Victim choice: first invalid way, otherwise random.
  logic [WAY_W-1:0] victim;
  logic             have_free;
  always_comb begin
    have_free = 1'b0;
    victim    = WAY_W'(rnd % WAYS);
    for (int w = int'(WAYS) - 1; w >= 0; w--) begin
      if (!valid_q[w][set_idx]) begin
        have_free = 1'b1;
        victim    = WAY_W'(w);
      end
    end
  end

  function automatic int unsigned didx(input logic [IDX_W-1:0] s, input logic [WOFF_W-1:0] o);
    return int'(s) * LINE_WORDS + int'(o);
  endfunction

  assign cpu_ready    = (state == C_IDLE) && !flush;
  assign tlb_vpn      = addr_q[31:12];
  assign tlb_fill_ppn = pw_ppn;
  assign tlb_fill     = (state == C_WALK) && pw_done && !pw_fault;
  assign pw_start     = (state == C_XLATE) && !tlb_hit;
  assign rnd_step     = (state == C_LOOKUP) && !hit && !(WRITE_THROUGH && we_q) && !have_free;
  assign ev_hit       = (state == C_LOOKUP) && hit;
  assign ev_miss      = (state == C_LOOKUP) && !hit;

  assign mem_req_valid = ((state == C_REFILL) || (state == C_MEMW)) && !req_sent;
  always_comb begin
    mem_req.we    = (state == C_MEMW);
    mem_req.wdata = wdata_q;
    if (state == C_MEMW) mem_req.addr = {ppn_q, addr_q[11:2], 2'b00};
    else mem_req.addr = {ppn_q, addr_q[11:OFF_W], word_cnt, 2'b00};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= C_IDLE;
      addr_q         <= '0;
      wdata_q        <= '0;
      we_q           <= 1'b0;
      ppn_q          <= '0;
      victim_q       <= '0;
      word_cnt       <= '0;
      req_sent       <= 1'b0;
      want_q         <= '0;
      cpu_resp_valid <= 1'b0;
      cpu_rdata      <= '0;
      cpu_fault      <= 1'b0;
      for (int w = 0; w < int'(WAYS); w++) valid_q[w] <= '0;
    end else begin
      cpu_resp_valid <= 1'b0;
      cpu_fault      <= 1'b0;
      if (flush && state == C_IDLE) begin
        for (int w = 0; w < int'(WAYS); w++) valid_q[w] <= '0;
      end
      unique case (state)
        C_IDLE: if (cpu_req && !flush) begin
          addr_q  <= cpu_addr;
          we_q    <= cpu_we && WRITE_THROUGH;
          wdata_q <= cpu_wdata;
          state   <= C_LOOKUP;
        end
        C_LOOKUP: begin
          if (we_q) begin
            // write-through, no-write-allocate: update on a hit, always go to memory
            state <= C_XLATE;
          end else if (hit) begin
            cpu_resp_valid <= 1'b1;
            cpu_rdata      <= data_q[hit_way][didx(set_idx, word_off)];
            state          <= C_IDLE;
          end else begin
            victim_q <= victim;
            state    <= C_XLATE;
          end
        end
        C_XLATE: begin
          word_cnt <= '0;
          req_sent <= 1'b0;
          if (tlb_hit) begin
            ppn_q <= tlb_ppn;
            state <= we_q ? C_MEMW : C_REFILL;
          end else begin
            state <= C_WALK;
          end
        end
        C_WALK: if (pw_done) begin
          if (pw_fault) begin
            cpu_resp_valid <= 1'b1;
            cpu_fault      <= 1'b1;
            cpu_rdata      <= '0;
            state          <= C_IDLE;
          end else begin
            ppn_q <= pw_ppn;
            state <= we_q ? C_MEMW : C_REFILL;
          end
        end
        C_REFILL: begin
          if (mem_req_valid && mem_req_ready) req_sent <= 1'b1;
          if (mem_resp_valid) begin
            req_sent <= 1'b0;
            if (word_cnt == word_off) want_q <= mem_rdata;
            if (word_cnt == WOFF_W'(LINE_WORDS - 1)) begin
              tag_q[victim_q][set_idx]   <= line_addr;
              valid_q[victim_q][set_idx] <= 1'b1;
              cpu_resp_valid             <= 1'b1;
              cpu_rdata <= (word_cnt == word_off) ? mem_rdata : want_q;
              state     <= C_IDLE;
            end else begin
              word_cnt <= word_cnt + 1'b1;
            end
          end
        end
        C_MEMW: begin
          if (mem_req_valid && mem_req_ready) req_sent <= 1'b1;
          if (mem_resp_valid) begin
            req_sent       <= 1'b0;
            cpu_resp_valid <= 1'b1;
            state          <= C_IDLE;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  // Data array writes: refill words, and store hits.
  always_ff @(posedge clk) begin
    if (state == C_REFILL && mem_resp_valid)
      data_q[victim_q][didx(set_idx, word_cnt)] <= mem_rdata;
    else if (state == C_LOOKUP && we_q && hit)
      data_q[hit_way][didx(set_idx, word_off)] <= wdata_q;
  end
endmodule
