// rvc_pkg: shared constants, types and helper functions of the RVC front end.
//
// RVC is a variable-length extension of the early RISC-V base ISA: any
// instruction whose two least significant bits are not 11 is 16 bits long and
// maps onto exactly one 32-bit base instruction. This package holds
//   * the 32-bit base-ISA encoding used by the expander. This is the early
//     RISC-V layout with rd in bits 31:27, rs1 in 26:22, rs2 in 21:17 and the
//     opcode in 6:0 (R, I, B and J formats);
//   * the 5-bit RVC major opcodes (instruction bits 4:0);
//   * the 3-bit register-specifier maps of the compressed formats;
//   * the stack-pointer register number.
//
// Following the ISA description: the field layout of the base formats, the
// LOAD/OP-IMM/BRANCH/OP/JALR opcodes, the SUB function bit and the JALR
// return hint are those printed in the base-ISA string-length example. The
// RVC opcodes of C.ADDI, C.MOVE/C.J, C.BEQ, C.BNE and the three-register group
// are those of the compressed version of the same example. The register maps
// are the published ones, and sp is x30 in that register numbering.
// Design choices: the remaining base opcodes and function codes follow the
// usual RISC-V values, and the remaining RVC major opcodes are this design's
// own assignment from the 24 codes whose bits 1:0 are not 11.
package rvc_pkg;

  // ---------------------------------------------------------------- base ISA
  localparam logic [6:0] OPC_LOAD      = 7'h03;
  localparam logic [6:0] OPC_LOAD_FP   = 7'h07;
  localparam logic [6:0] OPC_OP_IMM    = 7'h13;
  localparam logic [6:0] OPC_OP_IMM_32 = 7'h1B;
  localparam logic [6:0] OPC_STORE     = 7'h23;
  localparam logic [6:0] OPC_STORE_FP  = 7'h27;
  localparam logic [6:0] OPC_OP        = 7'h33;
  localparam logic [6:0] OPC_BRANCH    = 7'h63;
  localparam logic [6:0] OPC_J         = 7'h67;
  localparam logic [6:0] OPC_JALR      = 7'h6B;

  localparam logic [2:0] F3_ADD  = 3'b000;
  localparam logic [2:0] F3_SLL  = 3'b001;
  localparam logic [2:0] F3_SR   = 3'b101;
  localparam logic [2:0] F3_W    = 3'b010;  // word load/store
  localparam logic [2:0] F3_D    = 3'b011;  // double-word load/store
  localparam logic [2:0] F3_BEQ  = 3'b000;
  localparam logic [2:0] F3_BNE  = 3'b001;
  localparam logic [2:0] F3_JALR_CALL = 3'b000;  // call hint
  localparam logic [2:0] F3_JALR_RET  = 3'b001;  // return / plain jump hint

  // funct10 (bits 16:7) of register-register ALU operations
  localparam logic [9:0] F10_ADD = 10'b0000000_000;
  localparam logic [9:0] F10_SUB = 10'b1000000_000;
  localparam logic [9:0] F10_OR  = 10'b0000000_110;
  localparam logic [9:0] F10_AND = 10'b0000000_111;

  localparam logic [4:0] REG_ZERO = 5'd0;
  localparam logic [4:0] REG_RA   = 5'd1;
  localparam logic [4:0] REG_SP   = 5'd30;

  // ------------------------------------------------------------- RVC opcodes
  typedef enum logic [4:0] {
    C_LI    = 5'd0,
    C_ADDI  = 5'd1,   // also C.JR / C.JALR when rd == 0
    C_MOVE  = 5'd2,   // bit 15 = 1: C.J
    C_ADDIW = 5'd4,
    C_LWSP  = 5'd5,
    C_LDSP  = 5'd6,
    C_SWSP  = 5'd8,
    C_SDSP  = 5'd9,
    C_L0    = 5'd10,  // C.LW0 / C.LD0
    C_R2    = 5'd12,  // C.ADD / C.SUB
    C_SHIFT = 5'd13,
    C_BEQ   = 5'd16,
    C_BNE   = 5'd17,
    C_LW    = 5'd20,
    C_LD    = 5'd21,
    C_FLW   = 5'd22,
    C_FLD   = 5'd24,
    C_SW    = 5'd25,
    C_SD    = 5'd26,
    C_R3    = 5'd28,
    C_FSW   = 5'd29,
    C_FSD   = 5'd30
  } rvc_op_e;

  // 3-bit specifier used for rs1a, rs2a and rda
  function automatic logic [4:0] map_a(input logic [2:0] r);
    case (r)
      3'd0:    map_a = 5'd20;  // s0
      3'd1:    map_a = 5'd21;  // s1
      default: map_a = {2'b00, r};  // v0, v1, a0..a3 are x2..x7
    endcase
  endfunction

  // 3-bit specifier used for rs2b: as map_a, but 7 selects the zero register
  function automatic logic [4:0] map_b(input logic [2:0] r);
    map_b = (r == 3'd7) ? REG_ZERO : map_a(r);
  endfunction

  // --------------------------------------------------- base-format builders
  function automatic logic [31:0] enc_r(input logic [4:0] rd, input logic [4:0] rs1,
                                        input logic [4:0] rs2, input logic [9:0] f10,
                                        input logic [6:0] opc);
    enc_r = {rd, rs1, rs2, f10, opc};
  endfunction

  function automatic logic [31:0] enc_i(input logic [4:0] rd, input logic [4:0] rs1,
                                        input logic [11:0] imm, input logic [2:0] f3,
                                        input logic [6:0] opc);
    enc_i = {rd, rs1, imm, f3, opc};
  endfunction

  // stores and branches: imm[11:7] takes the rd position
  function automatic logic [31:0] enc_b(input logic [4:0] rs1, input logic [4:0] rs2,
                                        input logic [11:0] imm, input logic [2:0] f3,
                                        input logic [6:0] opc);
    enc_b = {imm[11:7], rs1, rs2, imm[6:0], f3, opc};
  endfunction

  function automatic logic [31:0] enc_j(input logic [24:0] off, input logic [6:0] opc);
    enc_j = {off, opc};
  endfunction

endpackage
