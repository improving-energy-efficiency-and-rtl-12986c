// rvc_length_decoder: instruction-length decoder for mixed RVC / RISC-V code.
//
// The length of an instruction is fixed by its first (lowest-addressed)
// halfword alone, which is what lets a fetch unit find instruction boundaries
// without decoding: bits 1:0 other than 11 mark a 16-bit RVC instruction, 11
// marks a 32-bit base instruction, and 11111 in bits 4:0 marks the opcode
// space the ISA reserves for instructions longer than 32 bits. This follows
// the ISA definition. This front end executes no longer instructions, so
// islong_o is only reported for the core to treat as illegal; that handling
// is a choice of this design.
// Interface: low_i is bits 4:0 of the first halfword; exactly one of the three
// outputs is set. Combinational, no clock.
module rvc_length_decoder (
  input  logic [4:0] low_i,
  output logic       is16_o,
  output logic       is32_o,
  output logic       islong_o
);

  always_comb begin
    is16_o   = (low_i[1:0] != 2'b11);
    islong_o = (low_i == 5'b11111);
    is32_o   = !is16_o && !islong_o;
  end

endmodule
