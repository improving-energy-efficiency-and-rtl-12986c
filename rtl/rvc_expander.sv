// rvc_expander: RVC-to-RISC-V instruction expander (purely combinational).
//
// Every 16-bit RVC instruction stands for exactly one 32-bit base RISC-V
// instruction, so decoding RVC reduces to rewriting it into that instruction
// and handing the result to an unmodified base-ISA decoder. The expander looks
// at bits 1:0: if they are 11 the word is already a 32-bit instruction and is
// passed through. Otherwise bits 4:0 of the low halfword select one of the RVC
// formats, whose fields are rearranged into the early base-ISA layout (rd in
// 31:27, rs1 in 26:22, rs2 in 21:17, opcode in 6:0).
//
// RVC formats (bit 15 left, opcode always in 4:0):
//   imm6[15:10] rd[9:5]            C.ADDI C.ADDIW C.LI C.LWSP C.LDSP
//   imm6[15:10] rs2[9:5]           C.SWSP C.SDSP
//   s[15] rs1[14:10] rd[9:5]       C.LW0/C.LD0, C.ADD/C.SUB, C.MOVE
//   1[15] target[14:5]             C.J (MOVE opcode with bit 15 set)
//   s[15] rs1[14:10] 00000[9:5]    C.JR/C.JALR (ADDI opcode with rd = 0)
//   rda[15:13] rs1a[12:10] f[9:8] rs2a[7:5]      C.ADD3 C.SUB3 C.OR3 C.AND3
//   rda[15:13] f[12:11] shamt[10:5]              C.SLLI C.SRLI C.SRAI
//   rda[15:13] 10[12:11] 0[10] shamt[9:5]        C.SLLIW
//   rda/rs2b[15:13] rs1a[12:10] imm5[9:5]        loads, stores, C.BEQ, C.BNE
// 3-bit specifiers map s0, s1, v0, v1, a0..a3 (x20, x21, x2..x7); the rs2b
// specifier of stores and branches maps 7 to x0 instead of a3.
//
// The formats, the mappings and the register maps follow the ISA definition.
// Design choices, where the ISA text does not say:
//   * imm6 of C.ADDI/C.ADDIW/C.LI, imm5 of branches and the 10-bit jump
//     target are two's-complement (the branch and jump ones are in halfwords,
//     like the base ISA); the scaled load/store offsets (imm6 x4/x8 off sp,
//     imm5 x4/x8 off rs1a) are unsigned;
//   * C.JR and C.JALR take a 5-bit rs1, as in the format table, and use the
//     return (001) and call (000) hints of JALR;
//   * C.SRAI sets immediate bit 10 of SRAI;
//   * unused encodings (free opcodes, SHIFT with f = 10 and bit 10 set) raise
//     illegal_o and produce an all-zero word.
// Interface: instr_i holds a 32-bit instruction or, in its low half, an RVC
// instruction (the upper half is then ignored). No clock; the result is valid
// in the same cycle.
module rvc_expander
  import rvc_pkg::*;
(
  input  logic [31:0] instr_i,
  output logic [31:0] instr_o,
  output logic        compressed_o,
  output logic        illegal_o
);

  logic [15:0] c;
  assign c = instr_i[15:0];

  // field views of the compressed instruction
  logic [5:0]  imm6;
  logic [4:0]  rd5, rs1_5, imm5;
  logic [4:0]  rda, rs1a, rs2a, rs2b;
  logic [11:0] imm6_sx, br_off, sp_w_off, sp_d_off, r_w_off, r_d_off;
  logic [24:0] j_off;

  assign imm6     = c[15:10];
  assign rd5      = c[9:5];
  assign rs1_5    = c[14:10];
  assign imm5     = c[9:5];
  assign rda      = map_a(c[15:13]);
  assign rs1a     = map_a(c[12:10]);
  assign rs2a     = map_a(c[7:5]);
  assign rs2b     = map_b(c[15:13]);
  assign imm6_sx  = {{6{imm6[5]}}, imm6};
  assign br_off   = {{7{imm5[4]}}, imm5};
  assign sp_w_off = {4'b0, imm6, 2'b00};
  assign sp_d_off = {3'b0, imm6, 3'b000};
  assign r_w_off  = {5'b0, imm5, 2'b00};
  assign r_d_off  = {4'b0, imm5, 3'b000};
  assign j_off    = {{15{c[14]}}, c[14:5]};

  logic [31:0] exp;
  logic        bad;

  always_comb begin
    exp = '0;
    bad = 1'b0;
    case (c[4:0])
      C_LI:    exp = enc_i(rd5, REG_ZERO, imm6_sx, F3_ADD, OPC_OP_IMM);
      C_ADDI: begin
        if (rd5 != REG_ZERO)
          exp = enc_i(rd5, rd5, imm6_sx, F3_ADD, OPC_OP_IMM);
        else if (!c[15])
          exp = enc_i(REG_ZERO, rs1_5, 12'd0, F3_JALR_RET, OPC_JALR);   // C.JR
        else
          exp = enc_i(REG_RA, rs1_5, 12'd0, F3_JALR_CALL, OPC_JALR);    // C.JALR
      end
      C_MOVE: begin
        if (!c[15]) exp = enc_i(rd5, rs1_5, 12'd0, F3_ADD, OPC_OP_IMM);   // C.MOVE
        else        exp = enc_j(j_off, OPC_J);                            // C.J
      end
      C_ADDIW: exp = enc_i(rd5, rd5, imm6_sx, F3_ADD, OPC_OP_IMM_32);
      C_LWSP:  exp = enc_i(rd5, REG_SP, sp_w_off, F3_W, OPC_LOAD);
      C_LDSP:  exp = enc_i(rd5, REG_SP, sp_d_off, F3_D, OPC_LOAD);
      C_SWSP:  exp = enc_b(REG_SP, rd5, sp_w_off, F3_W, OPC_STORE);
      C_SDSP:  exp = enc_b(REG_SP, rd5, sp_d_off, F3_D, OPC_STORE);
      C_L0:    exp = enc_i(rd5, rs1_5, 12'd0, c[15] ? F3_D : F3_W, OPC_LOAD);
      C_R2:    exp = enc_r(rd5, rs1_5, rd5, c[15] ? F10_SUB : F10_ADD, OPC_OP);
      C_R3: begin
        case (c[9:8])
          2'b00:   exp = enc_r(rda, rs1a, rs2a, F10_ADD, OPC_OP);
          2'b01:   exp = enc_r(rda, rs1a, rs2a, F10_SUB, OPC_OP);
          2'b10:   exp = enc_r(rda, rs1a, rs2a, F10_OR,  OPC_OP);
          default: exp = enc_r(rda, rs1a, rs2a, F10_AND, OPC_OP);
        endcase
      end
      C_SHIFT: begin
        case (c[12:11])
          2'b00: exp = enc_i(rda, rda, {6'b0, c[10:5]}, F3_SLL, OPC_OP_IMM);
          2'b01: exp = enc_i(rda, rda, {6'b0, c[10:5]}, F3_SR,  OPC_OP_IMM);
          2'b11: exp = enc_i(rda, rda, {6'b010000, c[10:5]}, F3_SR, OPC_OP_IMM);
          default: begin
            if (!c[10]) exp = enc_i(rda, rda, {7'b0, c[9:5]}, F3_SLL, OPC_OP_IMM_32);
            else        bad = 1'b1;
          end
        endcase
      end
      C_LW:    exp = enc_i(rda, rs1a, r_w_off, F3_W, OPC_LOAD);
      C_LD:    exp = enc_i(rda, rs1a, r_d_off, F3_D, OPC_LOAD);
      C_FLW:   exp = enc_i(rda, rs1a, r_w_off, F3_W, OPC_LOAD_FP);
      C_FLD:   exp = enc_i(rda, rs1a, r_d_off, F3_D, OPC_LOAD_FP);
      C_SW:    exp = enc_b(rs1a, rs2b, r_w_off, F3_W, OPC_STORE);
      C_SD:    exp = enc_b(rs1a, rs2b, r_d_off, F3_D, OPC_STORE);
      C_FSW:   exp = enc_b(rs1a, rs2b, r_w_off, F3_W, OPC_STORE_FP);
      C_FSD:   exp = enc_b(rs1a, rs2b, r_d_off, F3_D, OPC_STORE_FP);
      C_BEQ:   exp = enc_b(rs1a, rs2b, br_off, F3_BEQ, OPC_BRANCH);
      C_BNE:   exp = enc_b(rs1a, rs2b, br_off, F3_BNE, OPC_BRANCH);
      default: bad = 1'b1;
    endcase
  end

  assign compressed_o = (instr_i[1:0] != 2'b11);
  assign instr_o      = compressed_o ? exp : instr_i;
  assign illegal_o    = compressed_o & bad;

endmodule
