// ram_tb: replays the data-RAM waveform of the original design (write 01 to
// address 00, FF to 01, EE to 1F, then read them back with write low and
// din = 00), then writes and reads every address with random data against a
// reference array, checking that write low leaves a word unchanged.
module ram_tb;
  import cputypes::*;

  logic [7:0] din, d_out;
  logic [4:0] a;
  logic write, clk = 0;
  int checks = 0, failures = 0;
  logic [7:0] ref_mem [32];

  ram dut (.din(din), .a(a), .write(write), .clk(clk), .d_out(d_out));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (d_out !== exp) begin
      failures++;
      $display("FAIL %s: a=%02h d_out=%02h expected %02h", what, a, d_out, exp);
    end
  endtask

  task automatic cyc(input logic w, input logic [4:0] addr, input logic [7:0] data);
    @(negedge clk);
    write = w; a = addr; din = data;
    @(posedge clk);
    #1;
  endtask

  initial begin
    // waveform of the original design
    cyc(1, 5'h00, 8'h01); check(8'h01, "write 01 to 00");
    cyc(1, 5'h01, 8'hFF); check(8'hFF, "write FF to 01");
    cyc(1, 5'h1F, 8'hEE); check(8'hEE, "write EE to 1F");
    cyc(0, 5'h00, 8'h00); check(8'h01, "read 00");
    cyc(0, 5'h01, 8'h00); check(8'hFF, "read 01");
    cyc(0, 5'h1F, 8'h00); check(8'hEE, "read 1F");

    // fill every word
    for (int i = 0; i < 32; i++) begin
      ref_mem[i] = 8'($urandom);
      cyc(1, 5'(i), ref_mem[i]);
      check(ref_mem[i], "fill");
    end
    // random mix of reads and writes; write=0 must not disturb the word
    for (int n = 0; n < 400; n++) begin
      logic w; logic [4:0] addr; logic [7:0] data;
      w = 1'($urandom);
      addr = 5'($urandom);
      data = 8'($urandom);
      @(negedge clk);
      write = w; a = addr; din = data;
      #1 check(ref_mem[addr], "read before edge");
      @(posedge clk);
      if (w) ref_mem[addr] = data;
      #1 check(ref_mem[addr], "after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
