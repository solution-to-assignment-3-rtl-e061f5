// ram: 32 x 8 data memory with asynchronous read and synchronous write.
//
// `d_out` is the word at address `a`, combinationally. On a rising edge of
// `clk` with `write` high, `din` is stored at `a`; the read port shows the
// new value after that edge. The memory has no reset and no defined initial
// contents, as in the original design. The original writes the addressed word
// back to itself when `write` is low; a plain write enable does the same.
module ram
  import cputypes::*;
(
  input  dword_t din,
  input  addr_t  a,
  input  logic   write,
  input  logic   clk,
  output dword_t d_out
);

  dword_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (write) mem[a] <= din;
  end

  assign d_out = mem[a];

endmodule
