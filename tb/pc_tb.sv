// pc_tb: replays the program-counter waveform of the original design
// (reset with hold -> 00, jump to 0E -> 0E, increment -> 0F, hold -> 0F),
// checks wrap-around from 1F to 00, then random operations and resets
// against an independent model, one clock per operation.
module pc_tb;
  import cputypes::*;

  logic [4:0] ia, pc_out;
  pc_op_t op;
  logic reset, clk = 0;
  int checks = 0, failures = 0;
  logic [4:0] model;

  pc dut (.ia(ia), .op(op), .reset(reset), .clk(clk), .pc_out(pc_out));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic r, input logic [1:0] o, input logic [4:0] target,
                      input logic [4:0] exp);
    @(negedge clk);
    reset = r; op = pc_op_t'(o); ia = target;
    @(posedge clk);
    #1;
    checks++;
    if (pc_out !== exp) begin
      failures++;
      $display("FAIL reset=%b op=%0d ia=%02h: pc %02h expected %02h", r, o, target, pc_out, exp);
    end
  endtask

  initial begin
    step(1, 2'd0, 5'h00, 5'h00);
    step(0, 2'd2, 5'h0E, 5'h0E);
    step(0, 2'd1, 5'h03, 5'h0F);
    step(0, 2'd0, 5'h00, 5'h0F);
    step(0, 2'd3, 5'h07, 5'h0F);
    step(0, 2'd2, 5'h1F, 5'h1F);
    step(0, 2'd1, 5'h00, 5'h00);
    step(1, 2'd2, 5'h15, 5'h00);
    model = 5'h00;
    for (int n = 0; n < 1000; n++) begin
      logic r; logic [1:0] o; logic [4:0] t;
      r = ($urandom % 10) == 0;
      o = 2'($urandom);
      t = 5'($urandom);
      if (r)          model = 5'h00;
      else if (o == 1) model = (model == 5'h1F) ? 5'h00 : model + 5'd1;
      else if (o == 2) model = t;
      step(r, o, t, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
