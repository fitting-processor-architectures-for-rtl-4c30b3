// MBPTA-compliant processor core: top level.
//
// A seven-stage in-order pipeline (iu_pipeline) with its two first-level paths and the path to
// memory, wired as in the design's block diagram:
//   instruction side: IL1 (16 KB, 4-way, 16 B lines) with the ITLB and a page walker;
//   data side:        DL1 (16 KB, 4-way, 32 B lines, write-through, no-write-allocate) with the
//                     DTLB, a page walker, and the write buffer in front of it;
//   memory path:      one request buffer that serialises all misses, walks and stores of both
//                     sides, then the memory controller, whose latency is upper-bounded in
//                     analysis mode. The DRAM itself is outside (dram_* ports).
// Every cache and TLB uses random placement (caches) and random replacement, each with its
// own pseudo-random generator; FDIVD/FSQRTD run at their worst-case latency in analysis mode.
// With these, the execution time of a program is a random variable whose distribution can be
// sampled by measurement: each run draws new seeds, and `analysis_mode` makes the remaining
// input-dependent latencies take their upper bound.
//
// Run protocol: hold `flush` for one cycle (with rst_n high) to invalidate the caches and TLBs
// and load the random generators from `repl_seed`; `place_seed` selects the cache placement
// for the run. The core fetches from RESET_PC and stops at a Ticc instruction (or an
// exception), raising `halted`.
//
// The data cache port is shared by pipeline loads and write-buffer drains; a load waiting in
// the memory stage goes first (this design's choice). A store whose page turns out invalid when
// it drains is reported by the sticky `store_fault`, since it has already left the pipeline.
// Request-buffer port order (this design's choice): 0 IL1, 1 ITLB walker, 2 DL1, 3 DTLB walker.
module mbpta_core
  import mbpta_pkg::*;
#(
  parameter logic [31:0] RESET_PC  = 32'h0000_0000,
  parameter logic [31:0] PT_BASE   = 32'h0001_0000,
  parameter int unsigned IL1_BYTES = 16384,
  parameter int unsigned DL1_BYTES = 16384,
  parameter int unsigned L1_WAYS   = 4,
  parameter int unsigned IL1_LINE  = 16,
  parameter int unsigned DL1_LINE  = 32,
  parameter int unsigned TLB_ENTRIES = 8,
  parameter int unsigned WBUF_DEPTH  = 4,
  parameter int unsigned MEMBUF_DEPTH = 4,
  parameter int unsigned MEM_LAT_MAX  = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        analysis_mode,
  input  logic        flush,
  input  logic [31:0] place_seed,
  input  logic [31:0] repl_seed,
  // DRAM
  output logic        dram_req_valid,
  output mem_req_t    dram_req,
  input  logic        dram_resp_valid,
  input  logic [31:0] dram_rdata,
  // status
  output logic        halted,
  output exc_t        exc_cause,
  output logic [31:0] exc_pc,
  output logic [31:0] retired,
  output logic        store_fault,
  output logic        bound_violation,
  input  logic [5:0]  dbg_addr,
  output logic [31:0] dbg_data,
  // event pulses
  output logic        ev_il1_hit,
  output logic        ev_il1_miss,
  output logic        ev_dl1_hit,
  output logic        ev_dl1_miss,
  output logic        ev_itlb_miss,
  output logic        ev_dtlb_miss,
  output logic        ev_raw_stall,
  output logic        ev_wbuf_stall,
  output logic        ev_fpu_stall,
  output logic        ev_mispredict,
  output logic        ev_wb_forward,
  output logic        ev_membuf_wait
);
  // ---------------------------------------------------------------- random generators
  logic [31:0] rnd_il1, rnd_dl1, rnd_itlb, rnd_dtlb;
  logic        stp_il1, stp_dl1, stp_itlb, stp_dtlb;

  prng u_rng_il1  (.clk, .rst_n, .load(flush), .seed(repl_seed ^ 32'h1111_1111), .step(stp_il1),  .value(rnd_il1));
  prng u_rng_dl1  (.clk, .rst_n, .load(flush), .seed(repl_seed ^ 32'h2222_2222), .step(stp_dl1),  .value(rnd_dl1));
  prng u_rng_itlb (.clk, .rst_n, .load(flush), .seed(repl_seed ^ 32'h4444_4444), .step(stp_itlb), .value(rnd_itlb));
  prng u_rng_dtlb (.clk, .rst_n, .load(flush), .seed(repl_seed ^ 32'h8888_8888), .step(stp_dtlb), .value(rnd_dtlb));

  // ---------------------------------------------------------------- request buffer ports
  localparam int unsigned NREQ = 4;
  logic [NREQ-1:0] mq_valid, mq_ready, mq_resp;
  mem_req_t        mq_req [NREQ];
  logic [31:0]     mq_rdata;

  // ---------------------------------------------------------------- pipeline
  logic        i_req, i_ready, i_resp_valid, i_fault;
  logic [31:0] i_addr, i_rdata;
  logic        d_req, d_ready, d_resp_valid, d_fault;
  logic [31:0] d_addr, d_rdata;
  logic        wb_push, wb_full, wb_fwd_hit;
  logic [31:0] wb_push_addr, wb_push_data, wb_lookup_addr, wb_fwd_data;

  iu_pipeline #(.RESET_PC(RESET_PC)) u_iu (
    .clk, .rst_n, .analysis_mode,
    .i_req, .i_addr, .i_ready, .i_resp_valid, .i_rdata, .i_fault,
    .d_req, .d_addr, .d_ready, .d_resp_valid, .d_rdata, .d_fault,
    .wb_push, .wb_push_addr, .wb_push_data, .wb_full,
    .wb_lookup_addr, .wb_fwd_hit, .wb_fwd_data,
    .halted, .exc_cause, .exc_pc, .retired,
    .ev_raw_stall, .ev_wbuf_stall, .ev_fpu_stall, .ev_mispredict, .ev_wb_forward,
    .dbg_addr, .dbg_data
  );

  // ---------------------------------------------------------------- instruction side
  logic [19:0] itlb_vpn, itlb_ppn, itlb_fill_ppn, ipw_ppn;
  logic        itlb_hit, itlb_fill, ipw_start, ipw_done, ipw_fault, ipw_busy;

  rand_cache #(.SIZE_BYTES(IL1_BYTES), .WAYS(L1_WAYS), .LINE_BYTES(IL1_LINE), .WRITE_THROUGH(1'b0)) u_il1 (
    .clk, .rst_n, .flush, .seed(place_seed), .rnd(rnd_il1), .rnd_step(stp_il1),
    .cpu_req(i_req), .cpu_we(1'b0), .cpu_addr(i_addr), .cpu_wdata(32'd0),
    .cpu_ready(i_ready), .cpu_resp_valid(i_resp_valid), .cpu_rdata(i_rdata), .cpu_fault(i_fault),
    .tlb_vpn(itlb_vpn), .tlb_hit(itlb_hit), .tlb_ppn(itlb_ppn),
    .tlb_fill(itlb_fill), .tlb_fill_ppn(itlb_fill_ppn),
    .pw_start(ipw_start), .pw_done(ipw_done), .pw_ppn(ipw_ppn), .pw_fault(ipw_fault),
    .mem_req_valid(mq_valid[0]), .mem_req(mq_req[0]), .mem_req_ready(mq_ready[0]),
    .mem_resp_valid(mq_resp[0]), .mem_rdata(mq_rdata),
    .ev_hit(ev_il1_hit), .ev_miss(ev_il1_miss)
  );

  rand_tlb #(.ENTRIES(TLB_ENTRIES)) u_itlb (
    .clk, .rst_n, .flush,
    .lookup_vpn(itlb_vpn), .lookup_hit(itlb_hit), .lookup_ppn(itlb_ppn),
    .fill(itlb_fill), .fill_vpn(itlb_vpn), .fill_ppn(itlb_fill_ppn),
    .rnd(rnd_itlb), .rnd_step(stp_itlb)
  );

  page_walker #(.PT_BASE(PT_BASE)) u_ipw (
    .clk, .rst_n, .start(ipw_start), .vpn(itlb_vpn), .busy(ipw_busy),
    .done(ipw_done), .ppn(ipw_ppn), .fault(ipw_fault),
    .mem_req_valid(mq_valid[1]), .mem_req(mq_req[1]), .mem_req_ready(mq_ready[1]),
    .mem_resp_valid(mq_resp[1]), .mem_rdata(mq_rdata)
  );

  // ---------------------------------------------------------------- data side
  logic        drain_valid, drain_ack, wb_empty;
  logic [31:0] drain_addr, drain_data;

  write_buffer #(.DEPTH(WBUF_DEPTH)) u_wbuf (
    .clk, .rst_n,
    .push(wb_push), .push_addr(wb_push_addr), .push_data(wb_push_data),
    .full(wb_full), .empty(wb_empty),
    .drain_valid, .drain_addr, .drain_data, .drain_ack,
    .lookup_addr(wb_lookup_addr), .fwd_hit(wb_fwd_hit), .fwd_data(wb_fwd_data)
  );

  // DL1 port arbitration between loads and write-buffer drains.
  logic        dl1_req, dl1_we, dl1_ready, dl1_resp_valid, dl1_fault;
  logic [31:0] dl1_addr, dl1_wdata, dl1_rdata;
  logic        owner_drain, dl1_busy;
  logic        drain_go;

  assign d_ready   = dl1_ready;
  assign drain_go  = dl1_ready && !d_req && drain_valid && !dl1_busy;
  assign dl1_req   = d_req || drain_go;
  assign dl1_we    = !d_req;
  assign dl1_addr  = d_req ? d_addr : drain_addr;
  assign dl1_wdata = drain_data;

  assign d_resp_valid = dl1_resp_valid && !owner_drain;
  assign d_rdata      = dl1_rdata;
  assign d_fault      = dl1_fault;
  assign drain_ack    = dl1_resp_valid && owner_drain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owner_drain <= 1'b0;
      dl1_busy    <= 1'b0;
      store_fault <= 1'b0;
    end else begin
      if (dl1_resp_valid) begin
        dl1_busy <= 1'b0;
        if (owner_drain && dl1_fault) store_fault <= 1'b1;
      end
      // a new access may start in the cycle the previous one answers
      if (dl1_req) begin
        owner_drain <= !d_req;
        dl1_busy    <= 1'b1;
      end
    end
  end

  logic [19:0] dtlb_vpn, dtlb_ppn, dtlb_fill_ppn, dpw_ppn;
  logic        dtlb_hit, dtlb_fill, dpw_start, dpw_done, dpw_fault, dpw_busy;

  rand_cache #(.SIZE_BYTES(DL1_BYTES), .WAYS(L1_WAYS), .LINE_BYTES(DL1_LINE), .WRITE_THROUGH(1'b1)) u_dl1 (
    .clk, .rst_n, .flush, .seed(place_seed ^ 32'h5A5A_5A5A), .rnd(rnd_dl1), .rnd_step(stp_dl1),
    .cpu_req(dl1_req), .cpu_we(dl1_we), .cpu_addr(dl1_addr), .cpu_wdata(dl1_wdata),
    .cpu_ready(dl1_ready), .cpu_resp_valid(dl1_resp_valid), .cpu_rdata(dl1_rdata), .cpu_fault(dl1_fault),
    .tlb_vpn(dtlb_vpn), .tlb_hit(dtlb_hit), .tlb_ppn(dtlb_ppn),
    .tlb_fill(dtlb_fill), .tlb_fill_ppn(dtlb_fill_ppn),
    .pw_start(dpw_start), .pw_done(dpw_done), .pw_ppn(dpw_ppn), .pw_fault(dpw_fault),
    .mem_req_valid(mq_valid[2]), .mem_req(mq_req[2]), .mem_req_ready(mq_ready[2]),
    .mem_resp_valid(mq_resp[2]), .mem_rdata(mq_rdata),
    .ev_hit(ev_dl1_hit), .ev_miss(ev_dl1_miss)
  );

  rand_tlb #(.ENTRIES(TLB_ENTRIES)) u_dtlb (
    .clk, .rst_n, .flush,
    .lookup_vpn(dtlb_vpn), .lookup_hit(dtlb_hit), .lookup_ppn(dtlb_ppn),
    .fill(dtlb_fill), .fill_vpn(dtlb_vpn), .fill_ppn(dtlb_fill_ppn),
    .rnd(rnd_dtlb), .rnd_step(stp_dtlb)
  );

  page_walker #(.PT_BASE(PT_BASE)) u_dpw (
    .clk, .rst_n, .start(dpw_start), .vpn(dtlb_vpn), .busy(dpw_busy),
    .done(dpw_done), .ppn(dpw_ppn), .fault(dpw_fault),
    .mem_req_valid(mq_valid[3]), .mem_req(mq_req[3]), .mem_req_ready(mq_ready[3]),
    .mem_resp_valid(mq_resp[3]), .mem_rdata(mq_rdata)
  );

  assign ev_itlb_miss = ipw_start;
  assign ev_dtlb_miss = dpw_start;

  // ---------------------------------------------------------------- path to memory
  logic     mc_req_valid, mc_req_ready, mc_resp_valid;
  mem_req_t mc_req;
  logic [31:0] mc_rdata;
  logic [$clog2(MEMBUF_DEPTH+1)-1:0] mq_occupancy;

  mem_req_buffer #(.NREQ(NREQ), .DEPTH(MEMBUF_DEPTH)) u_membuf (
    .clk, .rst_n,
    .req_valid(mq_valid), .req(mq_req), .req_ready(mq_ready),
    .resp_valid(mq_resp), .resp_rdata(mq_rdata),
    .mc_req_valid, .mc_req, .mc_req_ready, .mc_resp_valid, .mc_resp_rdata(mc_rdata),
    .occupancy(mq_occupancy)
  );

  // A request waits in the buffer while the controller serves another one.
  assign ev_membuf_wait = mc_req_valid && !mc_req_ready;

  mem_ctrl #(.LAT_MAX(MEM_LAT_MAX)) u_mc (
    .clk, .rst_n, .analysis_mode,
    .req_valid(mc_req_valid), .req(mc_req), .req_ready(mc_req_ready),
    .resp_valid(mc_resp_valid), .resp_rdata(mc_rdata),
    .dram_req_valid, .dram_req, .dram_resp_valid, .dram_rdata,
    .bound_violation
  );
endmodule
