// rom_tb: checks every word of the default instruction ROM against the
// sample program listing (addresses 0..8 hold 40 20 41 21 42 80 61 E6 C8,
// all other addresses 00), and checks that the read is combinational.
module rom_tb;
  import cputypes::*;

  logic [4:0] address;
  logic [7:0] instr;
  int checks = 0, failures = 0;

  rom dut (.address(address), .instr(instr));

  localparam logic [7:0] EXPECTED [9] =
    '{8'h40, 8'h20, 8'h41, 8'h21, 8'h42, 8'h80, 8'h61, 8'hE6, 8'hC8};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      logic [7:0] exp;
      address = 5'(i);
      #1;
      exp = (i < 9) ? EXPECTED[i] : 8'h00;
      checks++;
      if (instr !== exp) begin
        failures++;
        $display("FAIL address %02h: instr %02h, expected %02h", i, instr, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
