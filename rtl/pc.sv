// pc: the program-counter datapath.
//
// A 5-bit register updated on every rising clock edge. With `reset` high the
// next value is 0 whatever `op` says (synchronous, active-high reset).
// Otherwise `op` selects: PC_INCR -> pc + 1 (wrapping at 32), PC_JUMP -> ia,
// PC_HOLD (and the unused code 11) -> pc. `pc_out` is the register itself.
// All of this follows the original design.
module pc
  import cputypes::*;
(
  input  addr_t  ia,
  input  pc_op_t op,
  input  logic   reset,
  input  logic   clk,
  output addr_t  pc_out
);

  addr_t pc_q, next_addr;

  always_comb begin
    case (op)
      PC_INCR: next_addr = pc_q + 1'b1;
      PC_JUMP: next_addr = ia;
      default: next_addr = pc_q;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) pc_q <= '0;
    else       pc_q <= next_addr;
  end

  assign pc_out = pc_q;

endmodule
