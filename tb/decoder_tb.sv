// decoder_tb: exhaustive check of the combinational controller over all 256
// instruction words and all four flag combinations, against the rules
// aluop = instr[7:5], write only for STORE (001), jump for JZ with zero or
// JN with negative, increment otherwise. Includes the points of the original
// decoder waveform (pcop = 2 for opcodes 6 and 7 with both flags set).
module decoder_tb;
  import cputypes::*;

  logic [7:0] instr;
  logic zero, negative, write;
  opcode_t aluop;
  pc_op_t pcop;
  int checks = 0, failures = 0;

  decoder dut (.instr(instr), .zero(zero), .negative(negative),
               .aluop(aluop), .pcop(pcop), .write(write));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int f = 0; f < 4; f++) begin
        logic [2:0] o;
        logic [1:0] exp_pc;
        instr = 8'(i); zero = f[0]; negative = f[1];
        #1;
        o = 3'(i >> 5);
        exp_pc = ((o == 3'd6 && f[0]) || (o == 3'd7 && f[1])) ? 2'd2 : 2'd1;
        checks++;
        if (3'(aluop) !== o || 2'(pcop) !== exp_pc || write !== (o == 3'd1)) begin
          failures++;
          $display("FAIL instr %02h z=%b n=%b: aluop %0d pcop %0d write %b",
                   i, f[0], f[1], aluop, pcop, write);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
