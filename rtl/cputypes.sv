// cputypes: types and constants shared by the blocks of the accumulator computer.
//
// The machine has 8-bit data words, 8-bit instruction words and 5-bit
// addresses. An instruction is {opcode[2:0], address[4:0]}. The ALU uses the
// instruction opcode directly as its operation code, so one enum serves both.
// The PC datapath takes a 2-bit operation: hold, increment or jump.
// The widths and all encodings follow the original design; code 2'b11 of the
// PC operation is left unnamed and behaves as hold.
package cputypes;

  localparam int unsigned DWIDTH = 8;   // data and instruction word width
  localparam int unsigned AWIDTH = 5;   // address width (32 words)
  localparam int unsigned DEPTH  = 1 << AWIDTH;

  typedef logic [DWIDTH-1:0] dword_t;   // data memory / accumulator word
  typedef logic [DWIDTH-1:0] iword_t;   // instruction word
  typedef logic [AWIDTH-1:0] addr_t;    // instruction or data address

  // Instruction opcodes, also the ALU operation codes.
  typedef enum logic [2:0] {
    OP_LOAD  = 3'b000,   // acc <= mem[addr]
    OP_STORE = 3'b001,   // mem[addr] <= acc
    OP_LOADI = 3'b010,   // acc <= zero-extended addr field
    OP_ADD   = 3'b011,   // acc <= acc + mem[addr]
    OP_NOT   = 3'b100,   // acc <= ~acc
    OP_AND   = 3'b101,   // acc <= acc & mem[addr]
    OP_JZ    = 3'b110,   // if acc == 0: pc <= addr
    OP_JN    = 3'b111    // if acc[7]:   pc <= addr
  } opcode_t;

  // Program counter operations.
  typedef enum logic [1:0] {
    PC_HOLD = 2'b00,
    PC_INCR = 2'b01,
    PC_JUMP = 2'b10
  } pc_op_t;

  // ROM image type, used to pass a program down as a parameter.
  typedef iword_t rom_image_t [DEPTH];

  // Builds an instruction word from its two fields.
  function automatic iword_t mk_instr(opcode_t op, addr_t field);
    return {op, field};
  endfunction

  // The sample program: counts the accumulator up from -3 to 0 and then
  // stops in a loop on itself.
  //   0: LOADI 0   1: STORE 0   2: LOADI 1   3: STORE 1   4: LOADI 2
  //   5: NOT       6: ADD 1     7: JN 6      8: JZ 8
  function automatic rom_image_t sample_program();
    rom_image_t img;
    for (int i = 0; i < DEPTH; i++) img[i] = '0;
    img[0] = mk_instr(OP_LOADI, 5'd0);
    img[1] = mk_instr(OP_STORE, 5'd0);
    img[2] = mk_instr(OP_LOADI, 5'd1);
    img[3] = mk_instr(OP_STORE, 5'd1);
    img[4] = mk_instr(OP_LOADI, 5'd2);
    img[5] = mk_instr(OP_NOT,   5'd0);
    img[6] = mk_instr(OP_ADD,   5'd1);
    img[7] = mk_instr(OP_JN,    5'd6);
    img[8] = mk_instr(OP_JZ,    5'd8);
    return img;
  endfunction

endpackage
