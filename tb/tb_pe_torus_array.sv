// tb_pe_torus_array: self-checking test of the 4x4 torus of PEs.
// The testbench models the bit-plane memory (one N-bit word per address) and
// the broadcast of one control word to all PEs. It checks
//  * OP_NEWS in all four directions against an index model that wraps at
//    the edges (lower edge to upper edge, left edge to right edge),
//  * a SIMD bit-serial add of different 8-bit data in all 16 PEs,
//  * per-PE masking: only PEs whose activity bit is set write.
module tb_pe_torus_array;
  import ecg_simd_pkg::*;
  localparam int unsigned R = 4, C = 4, N = R * C, D = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  pe_ctrl_t ctrl;
  logic [N-1:0] rd1, rd2, wd, we, active;
  logic [N-1:0] mem [D];
  int checks = 0, failures = 0;

  pe_torus_array #(.R(R), .C(C), .MW(8)) dut (.*);

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
      ctrl.op = op; ctrl.dir = dir;
      rd1 = mem[s1 + i]; rd2 = mem[s2 + i];
      @(posedge clk);
      for (int k = 0; k < N; k++) if (we[k]) mem[dst + i][k] = wd[k];
      @(negedge clk);
    end
    ctrl.op = OP_NOP;
  endtask

  function automatic logic [7:0] get8(input int base, input int k);
    logic [7:0] v;
    for (int i = 0; i < 8; i++) v[i] = mem[base + i][k];
    return v;
  endfunction

  task automatic put8(input int base, input int k, input logic [7:0] v);
    for (int i = 0; i < 8; i++) mem[base + i][k] = v[i];
  endtask

  initial begin
    logic [7:0] a [N], b [N];
    ctrl.op = OP_NOP; ctrl.dir = DIR_N; rd1 = '0; rd2 = '0;
    for (int i = 0; i < D; i++) mem[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    @(negedge clk);
    for (int rep = 0; rep < 10; rep++) begin
      for (int k = 0; k < N; k++) begin
        a[k] = 8'($urandom); b[k] = 8'($urandom);
        put8(0, k, a[k]); put8(8, k, b[k]);
      end
      for (int d = 0; d < 4; d++) begin
        run(OP_NEWS, 8, 16, 0, 0, dir_e'(d));
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++) begin
            int src_r, src_c;
            src_r = r; src_c = c;
            case (d)
              0: src_r = (r + R - 1) % R;
              1: src_c = (c + 1) % C;
              2: src_r = (r + 1) % R;
              default: src_c = (c + C - 1) % C;
            endcase
            checks++;
            if (get8(16, r*C + c) !== a[src_r*C + src_c]) begin
              failures++;
              $display("FAIL news dir %0d PE(%0d,%0d)", d, r, c);
            end
          end
      end
      run(OP_CLRC, 1); run(OP_ADD, 8, 24, 0, 8);
      for (int k = 0; k < N; k++) begin
        checks++;
        if (get8(24, k) !== 8'(a[k] + b[k])) begin failures++; $display("FAIL add PE %0d", k); end
      end
      // mask: activity from a random plane, then MOV plane 8.. into 40..
      mem[100] = N'($urandom);
      for (int k = 0; k < N; k++) put8(40, k, 8'h00);
      run(OP_SETM, 1, 0, 100);
      checks++;
      if (active !== mem[100]) begin failures++; $display("FAIL activity bits"); end
      run(OP_MOV, 8, 40, 8);
      for (int k = 0; k < N; k++) begin
        checks++;
        if (get8(40, k) !== (mem[100][k] ? b[k] : 8'h00)) begin failures++; $display("FAIL mask PE %0d", k); end
      end
      run(OP_SETMALL, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
