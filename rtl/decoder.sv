// decoder: the controller of the single-cycle computer.
//
// Purely combinational: every instruction completes in one clock cycle, so
// the control signals are functions of the current instruction and flags.
//   aluop = instr[7:5] (the ALU uses the instruction opcode as is)
//   write = 1 for STORE only
//   pcop  = PC_JUMP for JZ with zero = 1 or JN with negative = 1,
//           PC_INCR otherwise (the decoder never issues PC_HOLD)
// The pcop and aluop rules follow the original design; write for STORE is
// taken from its decoder simulation, as the rule is not spelled out there.
// aluop is a plain copy of the opcode field and instr[4:0] is not used here
// (the address field goes from the top level straight to PC, RAM and ALU);
// the unused-bit lint warning on instr stands for that reason.
module decoder
  import cputypes::*;
(
  input  iword_t  instr,
  input  logic    zero,
  input  logic    negative,
  output opcode_t aluop,
  output pc_op_t  pcop,
  output logic    write
);

  opcode_t op;

  assign op    = opcode_t'(instr[7:5]);
  assign aluop = op;
  assign write = (op == OP_STORE);

  always_comb begin
    if ((op == OP_JZ && zero) || (op == OP_JN && negative)) pcop = PC_JUMP;
    else                                                    pcop = PC_INCR;
  end

endmodule
