// Seven-stage in-order integer pipeline with a double-precision divide/square-root unit.
//
// Stages, with a pipeline buffer (register) between each pair: fetch (F), decode (D), register
// access (RA), execute (Exe), memory (M), exception (Exc), write-back (WB). This follows the
// stage list of the design. Every stage has a fixed latency except where the design itself
// puts variability: F waits for the instruction cache, M waits for the data cache on a load or
// for room in the write buffer on a store, and Exe waits for FDIVD/FSQRTD, whose latency is
// fixed to the worst case in analysis mode. A stalled stage holds its buffer; a buffer can take
// a new instruction when it is empty or its instruction moves on in the same cycle.
//
// Instruction set: a subset of SPARC V8 with SPARC V8 encodings (this design's choice of
// subset): SETHI, ADD, ADDcc, SUB, SUBcc, AND, OR, XOR, SLL, SRL, SRA (register or 13-bit
// immediate), LD, ST, LDF, STF, Bicc (all 16 conditions), FDIVD, FSQRTD, and Ticc, which stops
// the core. There are 32 flat integer registers (r0 reads 0) and 32 single-precision FP
// registers, pairs forming doubles (even register = high word). Not modelled: register
// windows, branch delay slots and annulling, traps through a trap table.
//
// Control: branches are predicted taken - D redirects fetch to the target - and the condition
// is checked in Exe; a wrong prediction squashes D and RA and refetches the next instruction.
// Data hazards are resolved by interlock: RA holds an instruction while an older one in Exe,
// M, Exc or WB still has to write one of its source registers (no forwarding; this design's
// choice). Exceptions (illegal instruction, page fault on fetch or load, Ticc) are taken in
// Exc: younger instructions are squashed, and the core halts with `exc_cause`/`exc_pc`.
//
// Memory ports: the instruction port and the load port use the caches' request/response
// protocol (req accepted when ready, one response pulse). Stores go to the write buffer
// (push, blocked while full); loads also present their address to the write buffer and take
// its youngest matching store if there is one.
module iu_pipeline
  import mbpta_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        analysis_mode,
  // instruction cache
  output logic        i_req,
  output logic [31:0] i_addr,
  input  logic        i_ready,
  input  logic        i_resp_valid,
  input  logic [31:0] i_rdata,
  input  logic        i_fault,
  // data cache, loads
  output logic        d_req,
  output logic [31:0] d_addr,
  input  logic        d_ready,
  input  logic        d_resp_valid,
  input  logic [31:0] d_rdata,
  input  logic        d_fault,
  // write buffer
  output logic        wb_push,
  output logic [31:0] wb_push_addr,
  output logic [31:0] wb_push_data,
  input  logic        wb_full,
  output logic [31:0] wb_lookup_addr,
  input  logic        wb_fwd_hit,
  input  logic [31:0] wb_fwd_data,
  // status
  output logic        halted,
  output exc_t        exc_cause,
  output logic [31:0] exc_pc,
  output logic [31:0] retired,
  // event pulses
  output logic        ev_raw_stall,
  output logic        ev_wbuf_stall,
  output logic        ev_fpu_stall,
  output logic        ev_mispredict,
  output logic        ev_wb_forward,
  // register read port for inspection (0-31 integer, 32-63 FP)
  input  logic [5:0]  dbg_addr,
  output logic [31:0] dbg_data
);
  typedef enum logic [3:0] {
    K_NOP, K_ALU, K_SETHI, K_LD, K_ST, K_LDF, K_STF, K_BR, K_FDIV, K_FSQRT
  } kind_t;

  typedef struct packed {
    logic [31:0] pc;
    exc_t        exc;
    kind_t       kind;
    logic [5:0]  alu_op;
    logic        setcc;
    logic [3:0]  cond;
    logic [31:0] target;
    logic [5:0]  rs1, rs2, rd;      // register ids: 0-31 integer, 32-63 FP
    logic        use_rs1, use_rs2, use_rd;
    logic        use_imm;
    logic [31:0] imm;
    logic        wr_en, dbl;
  } dec_t;

  typedef struct packed {
    dec_t        d;
    logic [63:0] a, b;              // operands (doubles for FP, low word for integer)
    logic [31:0] sd;                // store data
    logic [63:0] res;
  } stage_t;

  // ---------------------------------------------------------------- register files
  logic [31:0] ireg [32];
  logic [31:0] freg [32];
  logic [3:0]  icc;                 // N Z V C

  function automatic logic [31:0] rd32(input logic [5:0] r);
    if (r[5]) return freg[r[4:0]];
    return (r[4:0] == 5'd0) ? 32'd0 : ireg[r[4:0]];
  endfunction
  function automatic logic [63:0] rd64(input logic [5:0] r);
    return {freg[{r[4:1], 1'b0}], freg[{r[4:1], 1'b1}]};
  endfunction

  assign dbg_data = rd32(dbg_addr);

  // ---------------------------------------------------------------- pipeline buffers
  logic        fd_v;  logic [31:0] fd_pc, fd_inst; exc_t fd_exc;   // F -> D
  logic        dr_v;  dec_t   dr;                                 // D -> RA
  logic        re_v;  stage_t re;                                 // RA -> Exe
  logic        em_v;  stage_t em;                                 // Exe -> M
  logic        mx_v;  stage_t mx;                                 // M -> Exc
  logic        xw_v;  stage_t xw;                                 // Exc -> WB

  // ---------------------------------------------------------------- decode (D)
  dec_t dec;
  always_comb begin
    logic [1:0] op;
    logic [5:0] op3;
    logic [8:0] opf;
    logic [4:0] rd_f, rs1_f, rs2_f;
    op    = fd_inst[31:30];
    op3   = fd_inst[24:19];
    opf   = fd_inst[13:5];
    rd_f  = fd_inst[29:25];
    rs1_f = fd_inst[18:14];
    rs2_f = fd_inst[4:0];
    dec         = '0;
    dec.pc      = fd_pc;
    dec.exc     = fd_exc;
    dec.kind    = K_NOP;
    dec.alu_op  = op3;
    dec.cond    = fd_inst[28:25];
    dec.target  = fd_pc + {{8{fd_inst[21]}}, fd_inst[21:0], 2'b00};
    dec.rs1     = {1'b0, rs1_f};
    dec.rs2     = {1'b0, rs2_f};
    dec.rd      = {1'b0, rd_f};
    dec.use_imm = fd_inst[13];
    dec.imm     = {{19{fd_inst[12]}}, fd_inst[12:0]};
    unique case (op)
      OP_BRANCH: begin
        if (fd_inst[24:22] == OP2_SETHI) begin
          dec.kind  = K_SETHI;
          dec.imm   = {fd_inst[21:0], 10'd0};
          dec.wr_en = (rd_f != 5'd0);
        end else if (fd_inst[24:22] == OP2_BICC) begin
          dec.kind = K_BR;
        end else if (fd_exc == EXC_NONE) begin
          dec.exc = EXC_ILLEGAL;
        end
      end
      OP_ALU: begin
        unique case (op3)
          OP3_ADD, OP3_AND, OP3_OR, OP3_XOR, OP3_SUB, OP3_ADDCC, OP3_SUBCC,
          OP3_SLL, OP3_SRL, OP3_SRA: begin
            dec.kind    = K_ALU;
            dec.use_rs1 = 1'b1;
            dec.use_rs2 = !fd_inst[13];
            dec.wr_en   = (rd_f != 5'd0);
            dec.setcc   = (op3 == OP3_ADDCC) || (op3 == OP3_SUBCC);
          end
          OP3_FPOP1: begin
            dec.use_imm = 1'b0;
            dec.rs1     = {1'b1, rs1_f};
            dec.rs2     = {1'b1, rs2_f};
            dec.rd      = {1'b1, rd_f};
            dec.dbl     = 1'b1;
            dec.wr_en   = 1'b1;
            if (opf == OPF_FDIVD) begin
              dec.kind    = K_FDIV;
              dec.use_rs1 = 1'b1;
              dec.use_rs2 = 1'b1;
            end else if (opf == OPF_FSQRTD) begin
              dec.kind    = K_FSQRT;
              dec.use_rs2 = 1'b1;
            end else begin
              dec.wr_en = 1'b0;
              if (fd_exc == EXC_NONE) dec.exc = EXC_ILLEGAL;
            end
          end
          OP3_TICC: if (fd_exc == EXC_NONE) dec.exc = EXC_HALT;
          default:  if (fd_exc == EXC_NONE) dec.exc = EXC_ILLEGAL;
        endcase
      end
      default: begin  // OP_MEM
        dec.use_rs1 = 1'b1;
        dec.use_rs2 = !fd_inst[13];
        unique case (op3)
          OP3_LD:  begin dec.kind = K_LD;  dec.wr_en = (rd_f != 5'd0); end
          OP3_ST:  begin dec.kind = K_ST;  dec.use_rd = 1'b1; end
          OP3_LDF: begin dec.kind = K_LDF; dec.rd = {1'b1, rd_f}; dec.wr_en = 1'b1; end
          OP3_STF: begin dec.kind = K_STF; dec.rd = {1'b1, rd_f}; dec.use_rd = 1'b1; end
          default: if (fd_exc == EXC_NONE) dec.exc = EXC_ILLEGAL;
        endcase
      end
    endcase
    if (dec.exc != EXC_NONE) begin
      dec.kind  = K_NOP;
      dec.wr_en = 1'b0;
      dec.use_rs1 = 1'b0; dec.use_rs2 = 1'b0; dec.use_rd = 1'b0;
    end
  end

  // ---------------------------------------------------------------- hazards (RA)
  function automatic logic writes(input logic v, input dec_t p, input logic [5:0] r);
    if (!v || !p.wr_en) return 1'b0;
    if (p.dbl) return r[5:1] == p.rd[5:1];
    return r == p.rd;
  endfunction
  function automatic logic src_busy(input logic [5:0] r, input logic dbl_src);
    logic [5:0] r0, r1;
    r0 = dbl_src ? {r[5:1], 1'b0} : r;
    r1 = dbl_src ? {r[5:1], 1'b1} : r;
    return writes(re_v, re.d, r0) || writes(em_v, em.d, r0) || writes(mx_v, mx.d, r0) ||
           writes(xw_v, xw.d, r0) || writes(re_v, re.d, r1) || writes(em_v, em.d, r1) ||
           writes(mx_v, mx.d, r1) || writes(xw_v, xw.d, r1);
  endfunction

  logic dr_fp_src;
  assign dr_fp_src = (dr.kind == K_FDIV) || (dr.kind == K_FSQRT);
  logic raw_hazard;
  assign raw_hazard = dr_v && ((dr.use_rs1 && src_busy(dr.rs1, dr_fp_src)) ||
                               (dr.use_rs2 && src_busy(dr.rs2, dr_fp_src)) ||
                               (dr.use_rd  && src_busy(dr.rd, 1'b0)));

  // ---------------------------------------------------------------- execute (Exe)
  logic        fpu_busy, fpu_done, fpu_start;
  logic [63:0] fpu_result;
  logic        fpu_have;        // result of the instruction in Exe is ready
  logic [63:0] fpu_res_q;
  logic        fpu_started;

  fpu_divsqrt u_fpu (
    .clk, .rst_n, .analysis_mode,
    .start (fpu_start),
    .op    (re.d.kind == K_FSQRT),
    .a     ((re.d.kind == K_FSQRT) ? re.b : re.a),
    .b     (re.b),
    .busy  (fpu_busy),
    .done  (fpu_done),
    .result(fpu_result)
  );

  logic re_is_fp;
  assign re_is_fp  = re_v && (re.d.kind == K_FDIV || re.d.kind == K_FSQRT);
  assign fpu_start = re_is_fp && !fpu_started && !fpu_busy;

  logic [31:0] alu_b, alu_res;
  logic [32:0] sum;
  logic [3:0]  icc_n;
  always_comb begin
    alu_b = re.d.use_imm ? re.d.imm : re.b[31:0];
    sum   = '0;
    icc_n = icc;
    unique case (re.d.alu_op)
      OP3_ADD, OP3_ADDCC: begin
        sum     = {1'b0, re.a[31:0]} + {1'b0, alu_b};
        alu_res = sum[31:0];
        icc_n   = {alu_res[31], alu_res == 0,
                   (re.a[31] == alu_b[31]) && (alu_res[31] != re.a[31]), sum[32]};
      end
      OP3_SUB, OP3_SUBCC: begin
        sum     = {1'b0, re.a[31:0]} - {1'b0, alu_b};
        alu_res = sum[31:0];
        icc_n   = {alu_res[31], alu_res == 0,
                   (re.a[31] != alu_b[31]) && (alu_res[31] != re.a[31]), sum[32]};
      end
      OP3_AND: alu_res = re.a[31:0] & alu_b;
      OP3_OR:  alu_res = re.a[31:0] | alu_b;
      OP3_XOR: alu_res = re.a[31:0] ^ alu_b;
      OP3_SLL: alu_res = re.a[31:0] << alu_b[4:0];
      OP3_SRL: alu_res = re.a[31:0] >> alu_b[4:0];
      OP3_SRA: alu_res = 32'($signed(re.a[31:0]) >>> alu_b[4:0]);
      default: alu_res = '0;
    endcase
  end

  function automatic logic cond_true(input logic [3:0] c, input logic [3:0] f);
    logic n, z, v, cy, r;
    {n, z, v, cy} = f;
    unique case (c[2:0])
      3'd0: r = 1'b0;
      3'd1: r = z;
      3'd2: r = z | (n ^ v);
      3'd3: r = n ^ v;
      3'd4: r = cy | z;
      3'd5: r = cy;
      3'd6: r = n;
      default: r = v;
    endcase
    return c[3] ? !r : r;
  endfunction

  logic br_taken;
  assign br_taken = cond_true(re.d.cond, icc);

  // ---------------------------------------------------------------- stage completion
  logic exc_flush;      // the instruction in Exc raises its exception this cycle
  assign exc_flush = mx_v && (mx.d.exc != EXC_NONE);

  logic m_is_load, m_is_store, m_issued, m_resp;
  assign m_is_load  = em_v && (em.d.kind == K_LD || em.d.kind == K_LDF) && em.d.exc == EXC_NONE;
  assign m_is_store = em_v && (em.d.kind == K_ST || em.d.kind == K_STF) && em.d.exc == EXC_NONE;
  assign m_resp     = m_is_load && m_issued && d_resp_valid;

  logic done_m, done_e, done_ra;
  assign done_m  = m_is_load ? m_resp : (m_is_store ? !wb_full : 1'b1);
  assign done_e  = re_is_fp ? (fpu_have || (fpu_started && fpu_done)) : 1'b1;
  assign done_ra = !raw_hazard;

  // A buffer is free when it is empty or its instruction leaves in this cycle.
  logic free_mx, free_em, free_re, free_dr, free_fd;
  logic adv_m, adv_e, adv_ra, adv_d;
  assign free_mx = 1'b1;                                  // Exc and WB never stall
  assign adv_m   = em_v && done_m && free_mx;
  assign free_em = !em_v || adv_m;
  assign adv_e   = re_v && done_e && free_em;
  assign free_re = !re_v || adv_e;
  assign adv_ra  = dr_v && done_ra && free_re;
  assign free_dr = !dr_v || adv_ra;
  assign adv_d   = fd_v && free_dr;
  assign free_fd = !fd_v || adv_d;

  logic mispredict, d_redirect;
  assign mispredict = adv_e && re.d.kind == K_BR && !br_taken && !exc_flush;
  assign d_redirect = adv_d && dec.kind == K_BR && !mispredict && !exc_flush;

  // ---------------------------------------------------------------- fetch (F)
  logic [31:0] pc_q, fetch_pc;
  logic        pending, kill_pending;
  logic        stop_fetch;

  assign i_addr = pc_q;
  assign i_req  = !halted && !stop_fetch && !pending && free_fd && i_ready &&
                  !mispredict && !d_redirect && !exc_flush;

  // ---------------------------------------------------------------- memory stage ports
  assign d_addr         = em.res[31:0];
  assign d_req          = m_is_load && !m_issued && !exc_flush && d_ready;
  assign wb_lookup_addr = em.res[31:0];
  assign wb_push        = m_is_store && !wb_full && !exc_flush;
  assign wb_push_addr   = em.res[31:0];
  assign wb_push_data   = em.sd;

  assign ev_raw_stall  = raw_hazard && re_v;
  assign ev_wbuf_stall = m_is_store && wb_full;
  assign ev_fpu_stall  = re_is_fp && !done_e;
  assign ev_mispredict = mispredict;
  assign ev_wb_forward = m_resp && wb_fwd_hit;

  // ---------------------------------------------------------------- sequential
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q <= RESET_PC; fetch_pc <= '0; pending <= 1'b0; kill_pending <= 1'b0;
      stop_fetch <= 1'b0;
      fd_v <= 1'b0; fd_pc <= '0; fd_inst <= '0; fd_exc <= EXC_NONE;
      dr_v <= 1'b0; dr <= '0;
      re_v <= 1'b0; re <= '0;
      em_v <= 1'b0; em <= '0;
      mx_v <= 1'b0; mx <= '0;
      xw_v <= 1'b0; xw <= '0;
      icc <= '0;
      fpu_have <= 1'b0; fpu_res_q <= '0; fpu_started <= 1'b0;
      m_issued <= 1'b0;
      halted <= 1'b0; exc_cause <= EXC_NONE; exc_pc <= '0;
      retired <= '0;
      for (int i = 0; i < 32; i++) begin
        ireg[i] <= '0;
        freg[i] <= '0;
      end
    end else begin
      // ---- WB
      if (xw_v) begin
        retired <= retired + 1'b1;
        if (xw.d.wr_en) begin
          if (xw.d.dbl) begin
            freg[{xw.d.rd[4:1], 1'b0}] <= xw.res[63:32];
            freg[{xw.d.rd[4:1], 1'b1}] <= xw.res[31:0];
          end else if (xw.d.rd[5]) begin
            freg[xw.d.rd[4:0]] <= xw.res[31:0];
          end else begin
            ireg[xw.d.rd[4:0]] <= xw.res[31:0];
          end
        end
      end
      // ---- Exc -> WB
      xw_v <= mx_v && !exc_flush;
      xw   <= mx;
      if (exc_flush) begin
        halted    <= 1'b1;
        exc_cause <= mx.d.exc;
        exc_pc    <= mx.d.pc;
      end
      // ---- M -> Exc
      if (d_req) m_issued <= 1'b1;
      if (adv_m) begin
        mx_v     <= 1'b1;
        mx       <= em;
        m_issued <= 1'b0;
        if (m_is_load) begin
          mx.res <= {32'd0, wb_fwd_hit ? wb_fwd_data : d_rdata};
          if (d_fault) mx.d.exc <= EXC_DPAGE;
        end
      end else begin
        mx_v <= 1'b0;
      end
      // ---- Exe -> M
      if (fpu_start) fpu_started <= 1'b1;
      if (fpu_started && fpu_done) begin
        fpu_have  <= 1'b1;
        fpu_res_q <= fpu_result;
      end
      if (adv_e) begin
        em_v <= 1'b1;
        em   <= re;
        fpu_have    <= 1'b0;
        fpu_started <= 1'b0;
        unique case (re.d.kind)
          K_ALU:   begin
            em.res <= {32'd0, alu_res};
            if (re.d.setcc) icc <= icc_n;
          end
          K_SETHI: em.res <= {32'd0, re.d.imm};
          K_LD, K_ST, K_LDF, K_STF: em.res <= {32'd0, re.a[31:0] + alu_b};
          K_FDIV, K_FSQRT: em.res <= fpu_have ? fpu_res_q : fpu_result;
          default: em.res <= '0;
        endcase
      end else if (free_em) begin
        em_v <= 1'b0;
      end
      // ---- RA -> Exe
      if (adv_ra) begin
        re_v   <= 1'b1;
        re.d   <= dr;
        re.a   <= dr_fp_src ? rd64(dr.rs1) : {32'd0, rd32(dr.rs1)};
        re.b   <= dr_fp_src ? rd64(dr.rs2) : {32'd0, rd32(dr.rs2)};
        re.sd  <= rd32(dr.rd);
        re.res <= '0;
      end else if (free_re) begin
        re_v <= 1'b0;
      end
      // ---- D -> RA
      if (adv_d) begin
        dr_v <= 1'b1;
        dr   <= dec;
        if (dec.exc != EXC_NONE) stop_fetch <= 1'b1;
      end else if (free_dr) begin
        dr_v <= 1'b0;
      end
      // ---- F
      if (i_req) begin
        pending  <= 1'b1;
        fetch_pc <= pc_q;
        pc_q     <= pc_q + 32'd4;
      end
      if (adv_d) fd_v <= 1'b0;
      if (pending && i_resp_valid) begin
        pending      <= 1'b0;
        kill_pending <= 1'b0;
        if (!kill_pending && !mispredict && !d_redirect && !exc_flush && !halted) begin
          fd_v    <= 1'b1;
          fd_pc   <= fetch_pc;
          fd_inst <= i_rdata;
          fd_exc  <= i_fault ? EXC_IPAGE : EXC_NONE;
        end
      end
      // ---- redirections, oldest first
      if (d_redirect) begin
        pc_q <= dec.target;
        if (pending && !i_resp_valid) kill_pending <= 1'b1;
      end
      if (mispredict) begin
        pc_q       <= re.d.pc + 32'd4;
        re_v       <= 1'b0;
        dr_v       <= 1'b0;
        fd_v       <= 1'b0;
        stop_fetch <= 1'b0;
        if (pending && !i_resp_valid) kill_pending <= 1'b1;
      end
      if (exc_flush) begin
        fd_v <= 1'b0; dr_v <= 1'b0; re_v <= 1'b0; em_v <= 1'b0; mx_v <= 1'b0;
        fpu_started <= 1'b0; fpu_have <= 1'b0;
        if (pending && !i_resp_valid) kill_pending <= 1'b1;
      end
    end
  end
endmodule
