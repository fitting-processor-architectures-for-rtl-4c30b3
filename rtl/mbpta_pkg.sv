// Shared types and constants of the time-randomised processor.
//
// The memory system carries single 32-bit word transactions: every requester (cache line
// refill, page-table walk, write-through store) issues one word request at a time and waits for
// its response. The request type below is the payload of those transactions. The exception
// causes are the ones this core raises; their encoding is this design's own.
package mbpta_pkg;

  typedef struct packed {
    logic [31:0] addr;   // physical byte address, word aligned
    logic        we;     // 1: write wdata, 0: read
    logic [31:0] wdata;
  } mem_req_t;

  typedef enum logic [2:0] {
    EXC_NONE      = 3'd0,
    EXC_ILLEGAL   = 3'd1,   // unknown instruction
    EXC_IPAGE     = 3'd2,   // instruction fetch hit an invalid page-table entry
    EXC_DPAGE     = 3'd3,   // load or store hit an invalid page-table entry
    EXC_HALT      = 3'd4    // trap-always instruction: stops the core
  } exc_t;

  // SPARC V8 field values used by the decoder (op, op2, op3, opf, cond).
  localparam logic [1:0] OP_BRANCH = 2'b00;
  localparam logic [1:0] OP_ALU    = 2'b10;
  localparam logic [1:0] OP_MEM    = 2'b11;

  localparam logic [2:0] OP2_BICC  = 3'b010;
  localparam logic [2:0] OP2_SETHI = 3'b100;

  localparam logic [5:0] OP3_ADD   = 6'h00;
  localparam logic [5:0] OP3_AND   = 6'h01;
  localparam logic [5:0] OP3_OR    = 6'h02;
  localparam logic [5:0] OP3_XOR   = 6'h03;
  localparam logic [5:0] OP3_SUB   = 6'h04;
  localparam logic [5:0] OP3_ADDCC = 6'h10;
  localparam logic [5:0] OP3_SUBCC = 6'h14;
  localparam logic [5:0] OP3_SLL   = 6'h25;
  localparam logic [5:0] OP3_SRL   = 6'h26;
  localparam logic [5:0] OP3_SRA   = 6'h27;
  localparam logic [5:0] OP3_FPOP1 = 6'h34;
  localparam logic [5:0] OP3_TICC  = 6'h3A;

  localparam logic [5:0] OP3_LD    = 6'h00;
  localparam logic [5:0] OP3_ST    = 6'h04;
  localparam logic [5:0] OP3_LDF   = 6'h20;
  localparam logic [5:0] OP3_STF   = 6'h24;

  localparam logic [8:0] OPF_FSQRTD = 9'h02A;
  localparam logic [8:0] OPF_FDIVD  = 9'h04E;

endpackage
