// cpu: top level of the single-cycle accumulator computer.
//
// The PC addresses the instruction ROM. The instruction's upper three bits
// go to the decoder, which passes them on as the ALU operation and derives
// the RAM write enable and the PC operation (increment, or jump when a JZ/JN
// condition holds on the accumulator flags). The lower five bits are at once
// the RAM address, the ALU immediate (LOADI) and the jump target. The
// accumulator is the RAM write data. One instruction completes per clock:
// PC, accumulator and RAM all update on the same rising edge.
//
// reset is synchronous and clears only the PC; while it is held, the
// instruction at address 0 keeps executing. pc_out, instr_out and acc_out
// expose the PC, the current instruction and the accumulator for test.
// The structure follows the original design; passing the program down as a
// parameter is this design's own addition.
module cpu
  import cputypes::*;
#(
  parameter rom_image_t PROGRAM = sample_program()
) (
  input  logic   reset,
  input  logic   clk,
  output addr_t  pc_out,
  output iword_t instr_out,
  output dword_t acc_out
);

  addr_t   ip;          // from PC
  iword_t  instr;       // from ROM
  dword_t  ramout;      // from RAM
  dword_t  acc;         // from ALU
  logic    zero, negative;
  opcode_t aluop;
  pc_op_t  pcop;
  logic    write;
  addr_t   field;       // address field of the instruction

  assign field = instr[AWIDTH-1:0];

  pc u_pc (
    .ia(field), .op(pcop), .reset(reset), .clk(clk), .pc_out(ip)
  );

  rom #(.PROGRAM(PROGRAM)) u_rom (
    .address(ip), .instr(instr)
  );

  ram u_ram (
    .din(acc), .a(field), .write(write), .clk(clk), .d_out(ramout)
  );

  alu u_alu (
    .d(ramout), .ia(field), .op(aluop), .clk(clk),
    .a_out(acc), .zero(zero), .negative(negative)
  );

  decoder u_decoder (
    .instr(instr), .zero(zero), .negative(negative),
    .aluop(aluop), .pcop(pcop), .write(write)
  );

  assign pc_out    = ip;
  assign instr_out = instr;
  assign acc_out   = acc;

endmodule
