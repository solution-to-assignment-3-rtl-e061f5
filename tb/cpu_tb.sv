// cpu_tb: end-to-end test of the accumulator computer.
//
// Two computers run side by side, each compared cycle by cycle with an
// instruction-level reference model written here (PC, instruction and
// accumulator after every clock edge, one instruction per clock):
//   dut_dir  runs a directed program that executes every opcode, takes and
//            falls through both conditional jumps, overflows an addition and
//            stores to and loads from the data RAM;
//   dut_rnd  runs a pseudo-random 32-word program (generated below) with
//            reset pulses at random times.
// The reference model starts from the computers' own RAM and accumulator
// contents, which are undefined at power-up. Each mechanism (each opcode,
// RAM write, JZ/JN taken and not taken, add overflow, reset, PC wrap from
// 31 to 0) is counted; one that never happened counts as a failure.
module cpu_tb;
  import cputypes::*;

  // ---------------------------------------------------------------- programs
  function automatic rom_image_t directed_program();
    rom_image_t p;
    for (int i = 0; i < 32; i++) p[i] = mk_instr(OP_JZ, 5'd31);
    p[0]  = mk_instr(OP_LOADI, 5'd5);    // acc = 05
    p[1]  = mk_instr(OP_STORE, 5'd3);    // m3 = 05
    p[2]  = mk_instr(OP_LOADI, 5'd28);   // acc = 1C
    p[3]  = mk_instr(OP_STORE, 5'd4);    // m4 = 1C
    p[4]  = mk_instr(OP_LOAD,  5'd3);    // acc = 05
    p[5]  = mk_instr(OP_AND,   5'd4);    // acc = 04
    p[6]  = mk_instr(OP_JZ,    5'd0);    // not taken
    p[7]  = mk_instr(OP_JN,    5'd0);    // not taken
    p[8]  = mk_instr(OP_NOT,   5'd0);    // acc = FB
    p[9]  = mk_instr(OP_JZ,    5'd0);    // not taken
    p[10] = mk_instr(OP_JN,    5'd12);   // taken
    p[11] = mk_instr(OP_LOADI, 5'd31);   // skipped
    p[12] = mk_instr(OP_ADD,   5'd3);    // FB + 05 = 00, overflow
    p[13] = mk_instr(OP_JN,    5'd0);    // not taken
    p[14] = mk_instr(OP_JZ,    5'd16);   // taken
    p[15] = mk_instr(OP_LOADI, 5'd31);   // skipped
    p[16] = mk_instr(OP_STORE, 5'd5);    // m5 = 00
    p[17] = mk_instr(OP_LOADI, 5'd1);    // acc = 01
    p[18] = mk_instr(OP_JZ,    5'd0);    // not taken, run on to 31
    p[31] = mk_instr(OP_LOADI, 5'd0);    // acc = 00, PC wraps to 0
    return p;
  endfunction

  // 32 pseudo-random instructions from a 16-bit Fibonacci LFSR (x^16+x^14+x^13+x^11+1).
  function automatic rom_image_t random_program(logic [15:0] seed);
    rom_image_t p;
    logic [15:0] s = seed;
    for (int i = 0; i < 32; i++) begin
      for (int k = 0; k < 8; k++) s = {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
      p[i] = s[7:0];
    end
    return p;
  endfunction

  localparam rom_image_t PROG_DIR = directed_program();
  localparam rom_image_t PROG_RND = random_program(16'hACE1);

  // ---------------------------------------------------------------- DUTs
  logic clk = 0;
  logic rst_dir, rst_rnd;
  logic [4:0] pc_dir, pc_rnd;
  logic [7:0] in_dir, in_rnd, acc_dir, acc_rnd;

  cpu #(.PROGRAM(PROG_DIR)) dut_dir (.reset(rst_dir), .clk(clk), .pc_out(pc_dir),
                                     .instr_out(in_dir), .acc_out(acc_dir));
  cpu #(.PROGRAM(PROG_RND)) dut_rnd (.reset(rst_rnd), .clk(clk), .pc_out(pc_rnd),
                                     .instr_out(in_rnd), .acc_out(acc_rnd));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_op [8];
  int n_write, n_jz_taken, n_jz_fall, n_jn_taken, n_jn_fall, n_overflow, n_reset, n_wrap;

  // ---------------------------------------------------------------- model
  typedef struct {
    logic [4:0] pc;
    logic [7:0] acc;
    logic [7:0] mem [32];
  } state_t;

  state_t m_dir, m_rnd;

  // One clock edge of the machine: executes prog[pc] and applies reset.
  function automatic void model_step(ref state_t s, input rom_image_t prog,
                                     input logic rst, input logic count);
    logic [7:0] ins = prog[s.pc];
    logic [2:0] o   = ins[7:5];
    logic [4:0] f   = ins[4:0];
    logic [4:0] nxt = (s.pc == 5'd31) ? 5'd0 : s.pc + 5'd1;
    logic [8:0] sum = {1'b0, s.acc} + {1'b0, s.mem[f]};
    logic [7:0] acc = s.acc;
    if (count) n_op[o]++;
    case (o)
      3'd0: acc = s.mem[f];
      3'd1: begin s.mem[f] = s.acc; if (count) n_write++; end
      3'd2: acc = {3'b000, f};
      3'd3: begin acc = sum[7:0]; if (count && sum[8]) n_overflow++; end
      3'd4: acc = ~s.acc;
      3'd5: acc = s.acc & s.mem[f];
      3'd6: if (s.acc == 8'h00) begin
              nxt = f; if (count) n_jz_taken++;
            end else if (count) n_jz_fall++;
      default: if (s.acc[7]) begin
              nxt = f; if (count) n_jn_taken++;
            end else if (count) n_jn_fall++;
    endcase
    if (count && !rst && s.pc == 5'd31 && nxt == 5'd0 && o < 3'd6) n_wrap++;
    s.acc = acc;
    s.pc  = rst ? 5'd0 : nxt;
  endfunction

  task automatic compare(input string name, input state_t s, input rom_image_t prog,
                         input logic [4:0] pc_o, input logic [7:0] in_o,
                         input logic [7:0] acc_o);
    checks++;
    if (pc_o !== s.pc || in_o !== prog[s.pc] || acc_o !== s.acc) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s t=%0t: pc %02h instr %02h acc %02h, expected %02h %02h %02h",
                 name, $time, pc_o, in_o, acc_o, s.pc, prog[s.pc], s.acc);
    end
  endtask

  localparam int CYCLES = 3000;

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_dir = 1; rst_rnd = 1;
    @(posedge clk);                       // reset edge: PC = 0
    #1;
    // start the model from the machines' own accumulator and RAM
    m_dir.pc = 5'd0; m_dir.acc = acc_dir;
    m_rnd.pc = 5'd0; m_rnd.acc = acc_rnd;
    for (int i = 0; i < 32; i++) begin
      m_dir.mem[i] = dut_dir.u_ram.mem[i];
      m_rnd.mem[i] = dut_rnd.u_ram.mem[i];
    end
    compare("dir", m_dir, PROG_DIR, pc_dir, in_dir, acc_dir);
    compare("rnd", m_rnd, PROG_RND, pc_rnd, in_rnd, acc_rnd);

    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      rst_dir = (c % 500) == 499;
      rst_rnd = ($urandom % 40) == 0;
      @(posedge clk);
      model_step(m_dir, PROG_DIR, rst_dir, 1'b1);
      model_step(m_rnd, PROG_RND, rst_rnd, 1'b0);
      if (rst_dir) n_reset++;
      #1;
      compare("dir", m_dir, PROG_DIR, pc_dir, in_dir, acc_dir);
      compare("rnd", m_rnd, PROG_RND, pc_rnd, in_rnd, acc_rnd);
    end

    // every mechanism must have happened in the directed run
    for (int o = 0; o < 8; o++) begin
      checks++;
      if (n_op[o] == 0) begin failures++; $display("FAIL opcode %0d never executed", o); end
    end
    checks += 8;
    if (n_write == 0)    begin failures++; $display("FAIL no RAM write"); end
    if (n_jz_taken == 0) begin failures++; $display("FAIL JZ never taken"); end
    if (n_jz_fall == 0)  begin failures++; $display("FAIL JZ never fell through"); end
    if (n_jn_taken == 0) begin failures++; $display("FAIL JN never taken"); end
    if (n_jn_fall == 0)  begin failures++; $display("FAIL JN never fell through"); end
    if (n_overflow == 0) begin failures++; $display("FAIL ADD never overflowed"); end
    if (n_reset == 0)    begin failures++; $display("FAIL reset never applied"); end
    if (n_wrap == 0)     begin failures++; $display("FAIL PC never wrapped"); end
    $display("ops %0d %0d %0d %0d %0d %0d %0d %0d writes %0d jz %0d/%0d jn %0d/%0d ovf %0d reset %0d wrap %0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6], n_op[7],
             n_write, n_jz_taken, n_jz_fall, n_jn_taken, n_jn_fall, n_overflow, n_reset, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
