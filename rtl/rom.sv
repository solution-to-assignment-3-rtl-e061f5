// rom: 32 x 8 instruction memory, read combinationally.
//
// The word at `address` appears on `instr` in the same cycle; there is no
// clock. The contents are the parameter PROGRAM, whose default is the
// original design's sample program (40 20 41 21 42 80 61 E6 C8, then zeros).
// Making the contents a parameter, so that other programs can be loaded, is
// this design's choice; the original ROM is hard-wired. The selector is the
// 5-bit address itself, so no wider index logic is built.
module rom
  import cputypes::*;
#(
  parameter rom_image_t PROGRAM = sample_program()
) (
  input  addr_t  address,
  output iword_t instr
);

  assign instr = PROGRAM[address];

endmodule
