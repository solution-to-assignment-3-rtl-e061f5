// cpu_full_tb: runs the computer with its default parameters, i.e. the
// sample program in ROM, from reset to the final JZ self-loop, and checks
// PC, instruction and accumulator after every clock edge against the
// program's known trace:
//   pc    00 01 02 03 04 05 06 07 06 07 06 07 08 08
//   instr 40 20 41 21 42 80 61 E6 61 E6 61 E6 C8 C8
//   acc   00 00 00 01 01 02 FD FE FE FF FF 00 00 00
// The program loads -3 (NOT 2), adds the 1 stored at address 1 until the
// accumulator is no longer negative, and stops in "JZ 8". Reaching address 8
// on the 12th edge after reset shows one instruction per clock. Data RAM
// words 0 and 1 must end as 00 and 01.
module cpu_full_tb;
  logic clk = 0, reset;
  logic [4:0] pc_out;
  logic [7:0] instr_out, acc_out;
  int checks = 0, failures = 0;

  cpu dut (.reset(reset), .clk(clk), .pc_out(pc_out), .instr_out(instr_out),
           .acc_out(acc_out));

  always #50 clk = ~clk;

  localparam int N = 14;
  localparam logic [4:0] EXP_PC  [N] = '{5'h00, 5'h01, 5'h02, 5'h03, 5'h04, 5'h05, 5'h06,
                                         5'h07, 5'h06, 5'h07, 5'h06, 5'h07, 5'h08, 5'h08};
  localparam logic [7:0] EXP_IN  [N] = '{8'h40, 8'h20, 8'h41, 8'h21, 8'h42, 8'h80, 8'h61,
                                         8'hE6, 8'h61, 8'hE6, 8'h61, 8'hE6, 8'hC8, 8'hC8};
  localparam logic [7:0] EXP_ACC [N] = '{8'h00, 8'h00, 8'h00, 8'h01, 8'h01, 8'h02, 8'hFD,
                                         8'hFE, 8'hFE, 8'hFF, 8'hFF, 8'h00, 8'h00, 8'h00};

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first_at_8;
    first_at_8 = -1;
    reset = 1;
    // Two reset edges: the first brings the PC (undefined at power-up) to 0,
    // the second executes LOADI 0 from there, defining the accumulator.
    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (pc_out !== EXP_PC[i] || instr_out !== EXP_IN[i] || acc_out !== EXP_ACC[i]) begin
        failures++;
        $display("FAIL edge %0d: pc %02h instr %02h acc %02h, expected %02h %02h %02h",
                 i, pc_out, instr_out, acc_out, EXP_PC[i], EXP_IN[i], EXP_ACC[i]);
      end
      if (pc_out == 5'h08 && first_at_8 < 0) first_at_8 = i;
      @(negedge clk);
      reset = 0;
      @(posedge clk);
      #1;
    end
    checks++;
    if (first_at_8 != 12) begin
      failures++;
      $display("FAIL program reached address 8 after %0d edges, expected 12", first_at_8);
    end
    checks++;
    if (dut.u_ram.mem[0] !== 8'h00 || dut.u_ram.mem[1] !== 8'h01) begin
      failures++;
      $display("FAIL RAM words 0,1 = %02h %02h, expected 00 01",
               dut.u_ram.mem[0], dut.u_ram.mem[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
