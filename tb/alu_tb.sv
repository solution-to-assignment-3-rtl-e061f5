// alu_tb: replays the accumulator waveform of the original design
// (LOAD EE, STORE, LOADI 05, ADD 01, NOT, AND F0, JZ -> EE EE 05 06 F9 F0 F0),
// then runs random operations against an independent model, checking the
// accumulator one clock after each operation (single-cycle) and the
// combinational zero and negative flags.
module alu_tb;
  import cputypes::*;

  logic [7:0] d, a_out;
  logic [4:0] ia;
  opcode_t op;
  logic clk = 0, zero, negative;
  int checks = 0, failures = 0;
  logic [7:0] model;

  alu dut (.d(d), .ia(ia), .op(op), .clk(clk), .a_out(a_out),
           .zero(zero), .negative(negative));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] next_acc(logic [2:0] o, logic [7:0] acc,
                                          logic [7:0] data, logic [4:0] imm);
    case (o)
      3'd0: return data;
      3'd2: return {3'b000, imm};
      3'd3: return 8'((9'(acc) + 9'(data)) & 9'h0FF);
      3'd4: return acc ^ 8'hFF;
      3'd5: begin
        logic [7:0] r;
        for (int b = 0; b < 8; b++) r[b] = acc[b] && data[b];
        return r;
      end
      default: return acc;
    endcase
  endfunction

  task automatic step(input logic [2:0] o, input logic [7:0] data,
                      input logic [4:0] imm, input logic [7:0] exp);
    @(negedge clk);
    op = opcode_t'(o); d = data; ia = imm;
    @(posedge clk);
    #1;
    checks++;
    if (a_out !== exp) begin
      failures++;
      $display("FAIL op %0d d=%02h ia=%02h: acc %02h expected %02h", o, data, imm, a_out, exp);
    end
    checks++;
    if (zero !== (exp == 8'h00) || negative !== (exp >= 8'h80)) begin
      failures++;
      $display("FAIL flags for acc %02h: zero=%b negative=%b", exp, zero, negative);
    end
  endtask

  initial begin
    step(3'd0, 8'hEE, 5'h00, 8'hEE);
    step(3'd1, 8'h00, 5'h00, 8'hEE);
    step(3'd2, 8'h00, 5'h05, 8'h05);
    step(3'd3, 8'h01, 5'h00, 8'h06);
    step(3'd4, 8'h00, 5'h00, 8'hF9);
    step(3'd5, 8'hF0, 5'h00, 8'hF0);
    step(3'd6, 8'h00, 5'h00, 8'hF0);
    step(3'd7, 8'h00, 5'h00, 8'hF0);
    // zero flag
    step(3'd2, 8'h00, 5'h00, 8'h00);
    model = 8'h00;
    for (int n = 0; n < 1000; n++) begin
      logic [2:0] o; logic [7:0] data; logic [4:0] imm;
      o = 3'($urandom);
      data = (n % 7 == 0) ? 8'h00 : 8'($urandom);
      imm = 5'($urandom);
      model = next_acc(o, model, data, imm);
      step(o, data, imm, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
