// tb_simd_pe: self-checking test of one bit-serial PE.
// The testbench plays the control unit and the PE's memory column: it keeps
// a bit array `col`, presents col[src1+i]/col[src2+i] on rd1/rd2 for each
// repetition i and stores wd at col[dst+i] when we is high. Random 16-bit
// fields are added, subtracted and combined logically; the activity bit is
// cleared and set to check write masking; neighbour bits are received in all
// four directions; a full 32x32-bit product is formed with the multiplier
// (MCLR, 32 MLD, 32 MUL, 33 MULZ cycles, product LSB at dst+1) and compared
// with the simulator's product.
module tb_simd_pe;
  import ecg_simd_pkg::*;
  localparam int unsigned D = 512;
  logic clk = 1'b0, rst_n = 1'b0;
  pe_ctrl_t ctrl;
  logic rd1, rd2, news_in_n, news_in_e, news_in_s, news_in_w, news_out, wd, we, active;
  logic col [D];
  logic nb [4][D];   // fields seen on the four neighbour inputs
  int checks = 0, failures = 0;

  simd_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input opcode_e op, input int len, input int dst = 0, input int s1 = 0,
                     input int s2 = 0, input dir_e dir = DIR_N);
    for (int i = 0; i < len; i++) begin
      int a1;
      a1 = (op == OP_MLD) ? s1 + len - 1 - i : s1 + i;
      ctrl.op = op; ctrl.dir = dir;
      rd1 = col[a1]; rd2 = col[s2 + i];
      news_in_n = nb[0][a1]; news_in_e = nb[1][a1]; news_in_s = nb[2][a1]; news_in_w = nb[3][a1];
      @(posedge clk);
      if (we) col[dst + i] = wd;
      @(negedge clk);
    end
    ctrl.op = OP_NOP;
  endtask

  task automatic put(input int base, input int len, input logic [63:0] v);
    for (int i = 0; i < len; i++) col[base + i] = v[i];
  endtask

  function automatic logic [63:0] get(input int base, input int len);
    logic [63:0] v = '0;
    for (int i = 0; i < len; i++) v[i] = col[base + i];
    return v;
  endfunction

  task automatic check(input logic [63:0] got, input logic [63:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  initial begin
    logic [15:0] a, b;
    logic [31:0] x, y;
    ctrl.op = OP_NOP; ctrl.dir = DIR_N;
    rd1 = 0; rd2 = 0; news_in_n = 0; news_in_e = 0; news_in_s = 0; news_in_w = 0;
    for (int i = 0; i < D; i++) begin
      col[i] = 0;
      for (int d = 0; d < 4; d++) nb[d][i] = 1'($urandom);
    end
    repeat (2) @(negedge clk); rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 20; n++) begin
      a = 16'($urandom); b = 16'($urandom);
      put(0, 16, 64'(a)); put(16, 16, 64'(b));
      run(OP_CLRC, 1); run(OP_ADD, 16, 32, 0, 16);
      run(OP_ADD, 1, 48, 500, 500);   // 0+0+C stores the carry out
      check(get(32, 17) & 64'h1ffff, {47'd0, 17'(a) + 17'(b)}, "add");
      run(OP_SETC, 1); run(OP_SUB, 16, 64, 0, 16);
      check(get(64, 16), 64'(16'(a - b)), "sub");
      run(OP_AND, 16, 80, 0, 16);  check(get(80, 16), 64'(a & b), "and");
      run(OP_OR, 16, 96, 0, 16);   check(get(96, 16), 64'(a | b), "or");
      run(OP_XOR, 16, 112, 0, 16); check(get(112, 16), 64'(a ^ b), "xor");
      run(OP_NOT, 16, 128, 0);     check(get(128, 16), 64'(16'(~a)), "not");
      run(OP_MOV, 16, 144, 16);    check(get(144, 16), 64'(b), "mov");
    end
    // activity masking: M <= 0 blocks writes, SETMALL restores them
    col[200] = 1'b0; put(160, 16, 64'h0000); put(176, 16, 64'hbeef);
    run(OP_SETM, 1, 0, 200);
    checks++; if (active !== 1'b0) begin failures++; $display("FAIL mask not cleared"); end
    run(OP_MOV, 16, 160, 176); check(get(160, 16), 64'h0, "masked mov");
    run(OP_SETMALL, 1);
    run(OP_MOV, 16, 160, 176); check(get(160, 16), 64'hbeef, "unmasked mov");
    // neighbour transfers
    for (int d = 0; d < 4; d++) begin
      logic [15:0] e;
      for (int i = 0; i < 16; i++) e[i] = nb[d][210 + i];
      run(OP_NEWS, 16, 240 + 16*d, 210, 0, dir_e'(d));
      check(get(240 + 16*d, 16), 64'(e), "news");
    end
    // 32 x 32 bit-serial multiply
    for (int n = 0; n < 10; n++) begin
      x = $urandom; y = $urandom;
      if (n == 0) begin x = '1; y = '1; end
      put(320, 32, 64'(x)); put(352, 32, 64'(y));
      run(OP_MCLR, 1); run(OP_MLD, 32, 0, 320); run(OP_MUL, 32, 400, 352); run(OP_MULZ, 33, 432);
      check(get(401, 64), 64'(x) * 64'(y), "multiply");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
