// Encoders for the SPARC V8 instructions the core executes, used by testbenches to build
// programs. Registers are numbered 0-31 (integer or FP according to the instruction).
package sparc_asm_pkg;
  function automatic logic [31:0] sethi(input int rd, input logic [31:0] value);
    return {2'b00, 5'(rd), 3'b100, value[31:10]};
  endfunction
  function automatic logic [31:0] alu_r(input logic [5:0] op3, input int rd, input int rs1, input int rs2);
    return {2'b10, 5'(rd), op3, 5'(rs1), 1'b0, 8'd0, 5'(rs2)};
  endfunction
  function automatic logic [31:0] alu_i(input logic [5:0] op3, input int rd, input int rs1, input int simm);
    return {2'b10, 5'(rd), op3, 5'(rs1), 1'b1, 13'(simm)};
  endfunction
  function automatic logic [31:0] mem_i(input logic [5:0] op3, input int rd, input int rs1, input int simm);
    return {2'b11, 5'(rd), op3, 5'(rs1), 1'b1, 13'(simm)};
  endfunction
  // disp in instructions, relative to the branch
  function automatic logic [31:0] bicc(input logic [3:0] cond, input int disp);
    return {2'b00, 1'b0, cond, 3'b010, 22'(disp)};
  endfunction
  function automatic logic [31:0] fpop(input logic [8:0] opf, input int rd, input int rs1, input int rs2);
    return {2'b10, 5'(rd), 6'h34, 5'(rs1), opf, 5'(rs2)};
  endfunction
  function automatic logic [31:0] ta0();
    return {2'b10, 5'b01000, 6'h3A, 5'd0, 1'b1, 13'd0};
  endfunction

  localparam logic [3:0] C_A = 4'h8, C_NE = 4'h9, C_E = 4'h1, C_L = 4'h3, C_N = 4'h0;
  localparam logic [5:0] ADD = 6'h00, AND_ = 6'h01, OR_ = 6'h02, XOR_ = 6'h03, SUB = 6'h04,
                         ADDCC = 6'h10, SUBCC = 6'h14, SLL = 6'h25, SRL = 6'h26, SRA = 6'h27;
  localparam logic [5:0] LD = 6'h00, ST = 6'h04, LDF = 6'h20, STF = 6'h24;
  localparam logic [8:0] FDIVD = 9'h04E, FSQRTD = 9'h02A;
endpackage
