// tb_rvc_expander: self-checking test of the RVC expander.
//
// Part 1 replays the string-length routine in its compressed form and
// compares each expansion with the base-ISA word of the uncompressed routine
// (hand-encoded; the two branches carry the shorter compressed offsets).
// Part 2 checks one hand-encoded example of every RVC instruction. Part 3
// drives random halfwords and compares against a reference model written in
// this file from the format table, using shift-and-or arithmetic rather than
// the package's encoders. 32-bit words must pass through untouched.
module tb_rvc_expander;

  logic [31:0] instr_i, instr_o;
  logic        compressed_o, illegal_o;

  rvc_expander dut (.*);

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- reference
  int unsigned rmap_a [8] = '{20, 21, 2, 3, 4, 5, 6, 7};

  function automatic int unsigned ra3(input int unsigned f);
    return rmap_a[f & 7];
  endfunction
  function automatic int unsigned rb3(input int unsigned f);
    return ((f & 7) == 7) ? 0 : rmap_a[f & 7];
  endfunction
  function automatic int unsigned sx(input int unsigned v, input int unsigned bits);
    return (v & (1 << (bits - 1))) ? (v | (32'hFFFF_FFFF << bits)) : v;
  endfunction
  function automatic logic [31:0] itype(int unsigned rd, int unsigned rs1, int unsigned imm,
                                        int unsigned f3, int unsigned opc);
    return (rd << 27) | (rs1 << 22) | ((imm & 12'hFFF) << 10) | (f3 << 7) | opc;
  endfunction
  function automatic logic [31:0] btype(int unsigned rs1, int unsigned rs2, int unsigned imm,
                                        int unsigned f3, int unsigned opc);
    return (((imm >> 7) & 5'h1F) << 27) | (rs1 << 22) | (rs2 << 17) |
           ((imm & 7'h7F) << 10) | (f3 << 7) | opc;
  endfunction
  function automatic logic [31:0] rtype(int unsigned rd, int unsigned rs1, int unsigned rs2,
                                        int unsigned f10, int unsigned opc);
    return (rd << 27) | (rs1 << 22) | (rs2 << 17) | (f10 << 7) | opc;
  endfunction

  // returns {illegal, expansion}
  function automatic logic [32:0] ref_expand(input logic [15:0] c);
    int unsigned op, hi6, r5, s5, b15, a, b, s1a, imm5;
    op   = c & 5'h1F;
    hi6  = (c >> 10) & 6'h3F;
    r5   = (c >> 5) & 5'h1F;
    s5   = (c >> 10) & 5'h1F;
    b15  = (c >> 15) & 1;
    a    = (c >> 13) & 7;
    s1a  = ra3((c >> 10) & 7);
    imm5 = (c >> 5) & 5'h1F;
    b    = (c >> 8) & 3;
    case (op)
      0:  return {1'b0, itype(r5, 0, sx(hi6, 6), 0, 'h13)};
      1:  if (r5 != 0) return {1'b0, itype(r5, r5, sx(hi6, 6), 0, 'h13)};
          else if (b15 == 0) return {1'b0, itype(0, s5, 0, 1, 'h6B)};
          else return {1'b0, itype(1, s5, 0, 0, 'h6B)};
      2:  if (b15 == 0) return {1'b0, itype(r5, s5, 0, 0, 'h13)};
          else return {1'b0, (sx((c >> 5) & 10'h3FF, 10) << 7) | 32'h67};
      4:  return {1'b0, itype(r5, r5, sx(hi6, 6), 0, 'h1B)};
      5:  return {1'b0, itype(r5, 30, hi6 * 4, 2, 'h03)};
      6:  return {1'b0, itype(r5, 30, hi6 * 8, 3, 'h03)};
      8:  return {1'b0, btype(30, r5, hi6 * 4, 2, 'h23)};
      9:  return {1'b0, btype(30, r5, hi6 * 8, 3, 'h23)};
      10: return {1'b0, itype(r5, s5, 0, b15 ? 3 : 2, 'h03)};
      12: return {1'b0, rtype(r5, s5, r5, b15 ? 'h200 : 0, 'h33)};
      13: begin
        int unsigned sh;
        sh = (c >> 11) & 3;
        if (sh == 0) return {1'b0, itype(ra3(a), ra3(a), (c >> 5) & 6'h3F, 1, 'h13)};
        if (sh == 1) return {1'b0, itype(ra3(a), ra3(a), (c >> 5) & 6'h3F, 5, 'h13)};
        if (sh == 3) return {1'b0, itype(ra3(a), ra3(a), 'h400 | ((c >> 5) & 6'h3F), 5, 'h13)};
        if (((c >> 10) & 1) == 0) return {1'b0, itype(ra3(a), ra3(a), imm5, 1, 'h1B)};
        return {1'b1, 32'h0};
      end
      16: return {1'b0, btype(s1a, rb3(a), sx(imm5, 5), 0, 'h63)};
      17: return {1'b0, btype(s1a, rb3(a), sx(imm5, 5), 1, 'h63)};
      20: return {1'b0, itype(ra3(a), s1a, imm5 * 4, 2, 'h03)};
      21: return {1'b0, itype(ra3(a), s1a, imm5 * 8, 3, 'h03)};
      22: return {1'b0, itype(ra3(a), s1a, imm5 * 4, 2, 'h07)};
      24: return {1'b0, itype(ra3(a), s1a, imm5 * 8, 3, 'h07)};
      25: return {1'b0, btype(s1a, rb3(a), imm5 * 4, 2, 'h23)};
      26: return {1'b0, btype(s1a, rb3(a), imm5 * 8, 3, 'h23)};
      28: begin
        int unsigned f10 [4] = '{0, 'h200, 6, 7};
        return {1'b0, rtype(ra3(a), s1a, ra3(c >> 5), f10[b], 'h33)};
      end
      29: return {1'b0, btype(s1a, rb3(a), imm5 * 4, 2, 'h27)};
      30: return {1'b0, btype(s1a, rb3(a), imm5 * 8, 3, 'h27)};
      default: return {1'b1, 32'h0};
    endcase
  endfunction

  task automatic check(input logic [31:0] in, input logic [31:0] exp_o,
                       input logic exp_c, input logic exp_ill, input string what);
    instr_i = in;
    #1;
    checks++;
    if (instr_o !== exp_o || compressed_o !== exp_c || illegal_o !== exp_ill) begin
      failures++;
      $display("FAIL %s: in=%08h out=%08h c=%0b ill=%0b expected %08h c=%0b ill=%0b",
               what, in, instr_o, compressed_o, illegal_o, exp_o, exp_c, exp_ill);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [32:0] r;
    // ---- part 1: string-length routine, compressed vs base encodings
    check(32'h0000_1062, 32'h1900_0013, 1, 0, "c.move v1,a0");
    check(32'h0000_f4b0, 32'h0140_1463, 1, 0, "c.beq a1,x0,+5");
    check(32'h0000_0461, 32'h18c0_0413, 1, 0, "c.addi v1,1");
    check(32'h0000_ebb1, 32'hf881_f4e3, 1, 0, "c.bne v0,x0,-3");
    check(32'h0000_4d9c, 32'h10c9_0033, 1, 0, "c.sub3 v0,v1,a0");
    check(32'h0000_0401, 32'h0040_00eb, 1, 0, "c.jr ra");
    check(32'h2900_0003, 32'h2900_0003, 0, 0, "lb passthrough");
    check(32'h10c0_0003, 32'h10c0_0003, 0, 0, "lb passthrough 2");
    check(32'hffff_ffff, 32'hffff_ffff, 0, 0, "long-opcode passthrough");

    // ---- part 2: one hand-encoded example per instruction
    // c.li a2,-1 : imm6=111111 rd=6 op=0   -> addi a2,x0,-1
    check({16'h0, 6'b111111, 5'd6, 5'd0},  {5'd6, 5'd0, 12'hFFF, 3'd0, 7'h13}, 1, 0, "c.li");
    // c.addiw v0,-32
    check({16'h0, 6'b100000, 5'd2, 5'd4},  {5'd2, 5'd2, 12'hFE0, 3'd0, 7'h1B}, 1, 0, "c.addiw");
    // c.lwsp a0, 3*4(sp)
    check({16'h0, 6'd3, 5'd4, 5'd5},       {5'd4, 5'd30, 12'd12, 3'd2, 7'h03}, 1, 0, "c.lwsp");
    // c.ldsp s2, 63*8(sp)
    check({16'h0, 6'd63, 5'd22, 5'd6},     {5'd22, 5'd30, 12'd504, 3'd3, 7'h03}, 1, 0, "c.ldsp");
    // c.swsp ra, 5*4(sp)  -> sw ra, 20(sp): imm 20 = 0000000_10100
    check({16'h0, 6'd5, 5'd1, 5'd8},       {5'd0, 5'd30, 5'd1, 7'd20, 3'd2, 7'h23}, 1, 0, "c.swsp");
    // c.sdsp s0, 32*8(sp) -> imm 256 = 00010_0000000
    check({16'h0, 6'd32, 5'd20, 5'd9},     {5'd2, 5'd30, 5'd20, 7'd0, 3'd3, 7'h23}, 1, 0, "c.sdsp");
    // c.lw0 t0,(a4) ; c.ld0 t0,(a4)
    check({16'h0, 1'b0, 5'd8, 5'd12, 5'd10}, {5'd12, 5'd8, 12'd0, 3'd2, 7'h03}, 1, 0, "c.lw0");
    check({16'h0, 1'b1, 5'd8, 5'd12, 5'd10}, {5'd12, 5'd8, 12'd0, 3'd3, 7'h03}, 1, 0, "c.ld0");
    // c.add v0,a1 ; c.sub v0,a1  (rd <- rs1 op rd)
    check({16'h0, 1'b0, 5'd5, 5'd2, 5'd12},  {5'd2, 5'd5, 5'd2, 10'h000, 7'h33}, 1, 0, "c.add");
    check({16'h0, 1'b1, 5'd5, 5'd2, 5'd12},  {5'd2, 5'd5, 5'd2, 10'h200, 7'h33}, 1, 0, "c.sub");
    // c.j -2 halfwords: target = 10'b1111111110
    check({16'h0, 1'b1, 10'h3FE, 5'd2},      {25'h1FF_FFFE, 7'h67}, 1, 0, "c.j");
    // c.jalr a3
    check({16'h0, 1'b1, 5'd7, 5'd0, 5'd1},   {5'd1, 5'd7, 12'd0, 3'd0, 7'h6B}, 1, 0, "c.jalr");
    // c.add3 s0,s1,a3 ; c.or3 ; c.and3
    check({16'h0, 3'd0, 3'd1, 2'b00, 3'd7, 5'd28}, {5'd20, 5'd21, 5'd7, 10'h000, 7'h33}, 1, 0, "c.add3");
    check({16'h0, 3'd0, 3'd1, 2'b10, 3'd7, 5'd28}, {5'd20, 5'd21, 5'd7, 10'h006, 7'h33}, 1, 0, "c.or3");
    check({16'h0, 3'd0, 3'd1, 2'b11, 3'd7, 5'd28}, {5'd20, 5'd21, 5'd7, 10'h007, 7'h33}, 1, 0, "c.and3");
    // shifts of a1 by 33 / 5
    check({16'h0, 3'd5, 2'b00, 6'd33, 5'd13}, {5'd5, 5'd5, 12'd33, 3'd1, 7'h13}, 1, 0, "c.slli");
    check({16'h0, 3'd5, 2'b01, 6'd33, 5'd13}, {5'd5, 5'd5, 12'd33, 3'd5, 7'h13}, 1, 0, "c.srli");
    check({16'h0, 3'd5, 2'b11, 6'd33, 5'd13}, {5'd5, 5'd5, 12'h421, 3'd5, 7'h13}, 1, 0, "c.srai");
    check({16'h0, 3'd5, 2'b10, 1'b0, 5'd5, 5'd13}, {5'd5, 5'd5, 12'd5, 3'd1, 7'h1B}, 1, 0, "c.slliw");
    check({16'h0, 3'd5, 2'b10, 1'b1, 5'd5, 5'd13}, 32'h0, 1, 1, "shift reserved");
    // c.lw v1, 31*4(s0); c.ld; c.flw; c.fld
    check({16'h0, 3'd3, 3'd0, 5'd31, 5'd20}, {5'd3, 5'd20, 12'd124, 3'd2, 7'h03}, 1, 0, "c.lw");
    check({16'h0, 3'd3, 3'd0, 5'd31, 5'd21}, {5'd3, 5'd20, 12'd248, 3'd3, 7'h03}, 1, 0, "c.ld");
    check({16'h0, 3'd3, 3'd0, 5'd1, 5'd22},  {5'd3, 5'd20, 12'd4, 3'd2, 7'h07}, 1, 0, "c.flw");
    check({16'h0, 3'd3, 3'd0, 5'd1, 5'd24},  {5'd3, 5'd20, 12'd8, 3'd3, 7'h07}, 1, 0, "c.fld");
    // c.sw x0 (rs2b = 7 selects x0), 2*4(a0); then c.sd, c.fsw, c.fsd of a2
    check({16'h0, 3'd7, 3'd4, 5'd2, 5'd25},  {5'd0, 5'd4, 5'd0, 7'd8, 3'd2, 7'h23}, 1, 0, "c.sw");
    check({16'h0, 3'd6, 3'd4, 5'd16, 5'd26}, {5'd1, 5'd4, 5'd6, 7'd0, 3'd3, 7'h23}, 1, 0, "c.sd");
    check({16'h0, 3'd6, 3'd4, 5'd1, 5'd29},  {5'd0, 5'd4, 5'd6, 7'd4, 3'd2, 7'h27}, 1, 0, "c.fsw");
    check({16'h0, 3'd6, 3'd4, 5'd1, 5'd30},  {5'd0, 5'd4, 5'd6, 7'd8, 3'd3, 7'h27}, 1, 0, "c.fsd");
    // unused major opcodes
    check({16'h0, 11'h5A5, 5'd14}, 32'h0, 1, 1, "reserved op 14");
    check({16'h0, 11'h5A5, 5'd18}, 32'h0, 1, 1, "reserved op 18");

    // ---- part 3: random halfwords against the reference model
    for (int i = 0; i < 20000; i++) begin
      logic [15:0] c;
      c = 16'($urandom);
      if (c[1:0] == 2'b11) c[1:0] = 2'($urandom_range(0, 2));
      r = ref_expand(c);
      check({16'($urandom), c}, r[31:0], 1, r[32], "random");
    end
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] w;
      w = $urandom;
      w[1:0] = 2'b11;
      check(w, w, 0, 0, "random 32-bit");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
