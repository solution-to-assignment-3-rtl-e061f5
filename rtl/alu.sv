// alu: the accumulator datapath.
//
// An 8-bit accumulator register is loaded on every rising clock edge with a
// value chosen by `op` (the instruction opcode):
//   LOAD  -> d (RAM data)          LOADI -> {000, ia} (immediate)
//   ADD   -> acc + d (mod 256)     NOT   -> ~acc
//   AND   -> acc & d               STORE, JZ, JN -> acc (unchanged)
// `zero` and `negative` are combinational flags of the current accumulator
// (acc == 0, acc[7]). There is no reset, as in the original design; the
// first instruction of a program is expected to load the accumulator.
module alu
  import cputypes::*;
(
  input  dword_t  d,
  input  addr_t   ia,
  input  opcode_t op,
  input  logic    clk,
  output dword_t  a_out,
  output logic    zero,
  output logic    negative
);

  dword_t acc, acc_next;

  always_comb begin
    unique case (op)
      OP_LOAD:  acc_next = d;
      OP_LOADI: acc_next = dword_t'(ia);
      OP_ADD:   acc_next = acc + d;
      OP_NOT:   acc_next = ~acc;
      OP_AND:   acc_next = acc & d;
      default:  acc_next = acc;     // STORE, JZ, JN leave it alone
    endcase
  end

  always_ff @(posedge clk) acc <= acc_next;

  assign zero     = (acc == '0);
  assign negative = acc[DWIDTH-1];
  assign a_out    = acc;

endmodule
