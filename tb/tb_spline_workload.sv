// tb_spline_workload: runs the core step of spline-based wavelet analysis
// on the full-size processor: for every lead at once (one lead per PE), the
// four coefficients of one cubic-spline segment, c = B * y, where y holds the
// lead's four samples of the segment and B is a 4x4 coefficient matrix that
// is the same for every lead.
// The front end broadcasts each 8-bit entry of B into all PEs (same word in
// every I/O register, then OP_IOIN) and writes each lead's own 8-bit samples.
// One program per coefficient clears a 24-bit accumulator and, for each of
// the four terms, forms the 8x8-bit product on the bit-serial multipliers
// and adds it in bit-serially. The 24-bit results are read back through the
// I/O registers and compared with c computed here, for several segments.
// Unsigned integers stand in for the fixed-point spline matrix; the
// compute cycles per segment are measured and extrapolated to 410 segments
// per beat.
module tb_spline_workload;
  import ecg_simd_pkg::*;
  localparam int unsigned N = 16, PW = 6, SEGMENTS = 4;
  localparam int unsigned Y_BASE = 0, B_BASE = 64, T_BASE = 300, C_BASE = 400;
  logic clk = 1'b0, rst_n = 1'b0;
  logic prog_we = 1'b0; logic [PW-1:0] prog_addr = '0; instr_t prog_data = '0;
  logic start = 1'b0, busy, done;
  logic [PW-1:0] pc;
  logic io_we = 1'b0; logic [3:0] io_addr = '0; logic [7:0] io_wdata = '0, io_rdata;
  logic ser_en = 1'b0, ser_in = 1'b0, ser_out;
  logic [N-1:0] pe_active;
  int checks = 0, failures = 0;

  ecg_simd_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_prog(input instr_t p [$], output int cycles);
    foreach (p[i]) begin
      @(negedge clk); prog_we = 1'b1; prog_addr = PW'(i); prog_data = p[i];
    end
    @(negedge clk); prog_we = 1'b0; start = 1'b1;
    @(negedge clk); start = 1'b0;
    cycles = 0;
    while (!done && cycles < 10000) begin
      if (busy) cycles++;
      @(negedge clk);
    end
  endtask

  // write one word per PE into the I/O registers and store it at `base`
  task automatic load_field(input logic [7:0] w [N], input int base);
    instr_t p [$];
    int cyc;
    for (int k = 0; k < N; k++) begin
      @(negedge clk); io_we = 1'b1; io_addr = 4'(k); io_wdata = w[k];
    end
    @(negedge clk); io_we = 1'b0;
    p = '{mk_instr(OP_IOIN, 8, ADDR_W'(base)), mk_instr(OP_HALT, 1)};
    run_prog(p, cyc);
  endtask

  task automatic read_field(input int base, output logic [7:0] w [N]);
    instr_t p [$];
    int cyc;
    p = '{mk_instr(OP_IOOUT, 8, 0, ADDR_W'(base)), mk_instr(OP_HALT, 1)};
    run_prog(p, cyc);
    for (int k = 0; k < N; k++) begin
      io_addr = 4'(k); #1;
      w[k] = io_rdata;
    end
    @(negedge clk);
  endtask

  initial begin
    logic [7:0] bm [4][4];
    logic [7:0] y [4][N];
    logic [7:0] w [N];
    logic [23:0] c_got [N], c_exp [N];
    instr_t p [$];
    int cyc, seg_cycles, total_cycles;
    total_cycles = 0;
    repeat (3) @(negedge clk); rst_n = 1'b1;

    // coefficient matrix, broadcast to every PE
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        bm[i][j] = 8'($urandom);
        for (int k = 0; k < N; k++) w[k] = bm[i][j];
        load_field(w, B_BASE + 8 * (4 * i + j));
      end

    for (int s = 0; s < SEGMENTS; s++) begin
      // four samples of this segment, different in every lead
      for (int j = 0; j < 4; j++) begin
        for (int k = 0; k < N; k++) y[j][k] = 8'($urandom);
        if (s == 0) for (int k = 0; k < N; k++) y[j][k] = 8'hff;
        load_field(y[j], Y_BASE + 8 * j);
      end
      seg_cycles = 0;
      for (int i = 0; i < 4; i++) begin
        int cb;
        cb = C_BASE + 32 * i;
        p = '{mk_instr(OP_XOR, 24, ADDR_W'(cb), 0, 0)};       // accumulator = 0
        for (int j = 0; j < 4; j++) begin
          p.push_back(mk_instr(OP_MCLR, 1));
          p.push_back(mk_instr(OP_MLD, 8, 0, ADDR_W'(B_BASE + 8 * (4 * i + j))));
          p.push_back(mk_instr(OP_MUL, 8, ADDR_W'(T_BASE), ADDR_W'(Y_BASE + 8 * j)));
          p.push_back(mk_instr(OP_MULZ, 17, ADDR_W'(T_BASE + 8)));   // product at T_BASE+1..+24
          p.push_back(mk_instr(OP_CLRC, 1));
          p.push_back(mk_instr(OP_ADD, 24, ADDR_W'(cb), ADDR_W'(cb), ADDR_W'(T_BASE + 1)));
        end
        p.push_back(mk_instr(OP_HALT, 1));
        run_prog(p, cyc);
        checks++;
        if (cyc != 24 + 4 * (1 + 8 + 8 + 17 + 1 + 24) + 1) begin
          failures++;
          $display("FAIL coefficient program took %0d cycles", cyc);
        end
        seg_cycles += cyc;
      end
      total_cycles += seg_cycles;
      for (int i = 0; i < 4; i++) begin
        for (int k = 0; k < N; k++) c_got[k] = '0;
        for (int b = 0; b < 3; b++) begin
          read_field(C_BASE + 32 * i + 8 * b, w);
          for (int k = 0; k < N; k++) c_got[k][8*b +: 8] = w[k];
        end
        for (int k = 0; k < N; k++) begin
          c_exp[k] = '0;
          for (int j = 0; j < 4; j++) c_exp[k] += 24'(bm[i][j]) * 24'(y[j][k]);
          checks++;
          if (c_got[k] !== c_exp[k]) begin
            failures++;
            $display("FAIL segment %0d lead %0d coefficient %0d: got %0d expected %0d",
                     s, k, i, c_got[k], c_exp[k]);
          end
        end
      end
    end
    $display("compute cycles per spline segment, all 16 leads at once: %0d; 410 segments per beat: %0d",
             total_cycles / SEGMENTS, 410 * total_cycles / SEGMENTS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
