// Translation lookaside buffer with random replacement (used as ITLB and DTLB).
//
// Fully associative, ENTRIES entries, 4 KB pages: a 20-bit virtual page number maps to a
// 20-bit physical page number. Lookup is combinational. On a fill, an invalid entry is used if
// there is one, otherwise the entry named by the low bits of a pseudo-random number, so which
// translation is evicted is a random event and not a function of the access history (unlike
// LRU). Preferring an invalid entry is this design's choice. `flush` invalidates every entry,
// which gives each measurement run the same initial state.
//
// Interface: lookup_vpn -> lookup_hit / lookup_ppn in the same cycle. fill with fill_vpn /
// fill_ppn writes at the clock edge and pulses rnd_step to advance the random source.
module rand_tlb #(
  parameter int unsigned ENTRIES = 8,
  parameter int unsigned VPN_W   = 20,
  parameter int unsigned PPN_W   = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic [VPN_W-1:0] lookup_vpn,
  output logic             lookup_hit,
  output logic [PPN_W-1:0] lookup_ppn,
  input  logic             fill,
  input  logic [VPN_W-1:0] fill_vpn,
  input  logic [PPN_W-1:0] fill_ppn,
  input  logic [31:0]      rnd,
  output logic             rnd_step
);
  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [ENTRIES-1:0] valid;
  logic [VPN_W-1:0]   vpn_q [ENTRIES];
  logic [PPN_W-1:0]   ppn_q [ENTRIES];

  always_comb begin
    lookup_hit = 1'b0;
    lookup_ppn = '0;
    for (int i = 0; i < int'(ENTRIES); i++) begin
      if (valid[i] && vpn_q[i] == lookup_vpn) begin
        lookup_hit = 1'b1;
        lookup_ppn = ppn_q[i];
      end
    end
  end

  logic [IW-1:0] victim;
  logic          have_free;
  always_comb begin
    have_free = 1'b0;
    victim    = IW'(rnd % ENTRIES);
    for (int i = int'(ENTRIES) - 1; i >= 0; i--) begin
      if (!valid[i]) begin
        have_free = 1'b1;
        victim    = IW'(i);
      end
    end
  end

  assign rnd_step = fill && !have_free;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else if (flush) begin
      valid <= '0;
    end else if (fill) begin
      valid[victim] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (fill) begin
      vpn_q[victim] <= fill_vpn;
      ppn_q[victim] <= fill_ppn;
    end
  end
endmodule
