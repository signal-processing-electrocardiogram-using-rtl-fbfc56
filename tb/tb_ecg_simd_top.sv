// tb_ecg_simd_top: end-to-end test of the SIMD ECG processor at its default
// size (4x4 PEs, 32-bit multipliers, 8-bit I/O registers, 1024 bit-planes).
// Acting as the front-end processor, it
//  1. writes one 8-bit sample per lead (16 PEs) into the I/O registers and
//     runs a program that moves them into bit-planes 0..7 (OP_IOIN); repeats
//     with a second sample set into planes 8..15;
//  2. runs a compute program in every PE at once: add, subtract, an 8x8-bit
//     product on the bit-serial multiplier, transfers from the four torus
//     neighbours, and a move masked by each PE's activity bit;
//  3. brings every result back through OP_IOOUT and reads it a word at a
//     time, comparing with values computed here;
//  4. shifts the I/O registers as one serial chain.
// It counts each mechanism (I/O in/out slices, add, subtract, multiplier
// steps, each neighbour direction, edge wrap-around, masked-off writes,
// serial shifts, halts), following the program counter, and counts a failure for one that never happened.
// The compute program must take exactly the sum of its repetition counts
// plus one halt cycle.
module tb_ecg_simd_top;
  import ecg_simd_pkg::*;
  localparam int unsigned N = 16, PW = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic prog_we = 1'b0; logic [PW-1:0] prog_addr = '0; instr_t prog_data = '0;
  logic start = 1'b0, busy, done;
  logic [PW-1:0] pc;
  logic io_we = 1'b0; logic [3:0] io_addr = '0; logic [7:0] io_wdata = '0, io_rdata;
  logic ser_en = 1'b0, ser_in = 1'b0, ser_out;
  logic [N-1:0] pe_active;
  int checks = 0, failures = 0;
  // mechanism counters
  int n_ioin = 0, n_ioout = 0, n_add = 0, n_sub = 0, n_mul = 0, n_masked = 0, n_ser = 0, n_halt = 0;
  int n_news [4] = '{0, 0, 0, 0};
  int n_wrap = 0;

  ecg_simd_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (ser_en) n_ser++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // load a program, run it, return its busy cycles
  task automatic run_prog(input instr_t p [$], output int cycles);
    foreach (p[i]) begin
      @(negedge clk); prog_we = 1'b1; prog_addr = PW'(i); prog_data = p[i];
    end
    @(negedge clk); prog_we = 1'b0; start = 1'b1;
    @(negedge clk); start = 1'b0;
    cycles = 0;
    while (!done) begin
      if (busy) begin
        // count the mechanism the broadcast instruction exercises this cycle
        cycles++;
        unique case (p[pc].op)
          OP_IOIN:          n_ioin++;
          OP_IOOUT:         n_ioout++;
          OP_ADD:           n_add++;
          OP_SUB:           n_sub++;
          OP_MUL, OP_MULZ:  n_mul++;
          OP_NEWS:          n_news[p[pc].dir]++;
          OP_MOV:           n_masked += N - $countones(pe_active);
          OP_HALT:          n_halt++;
          default: ;
        endcase
      end
      if (cycles > 10000) break;
      @(negedge clk);
    end
  endtask

  task automatic fe_write(input logic [7:0] w [N]);
    for (int k = 0; k < N; k++) begin
      @(negedge clk); io_we = 1'b1; io_addr = 4'(k); io_wdata = w[k];
    end
    @(negedge clk); io_we = 1'b0;
  endtask

  // move a field of `len` planes out through the I/O registers, check words
  task automatic read_field(input int base, input int len, input logic [7:0] exp_w [N],
                            input string what);
    instr_t p [$];
    int cyc;
    p = '{mk_instr(OP_IOOUT, len, 0, ADDR_W'(base)), mk_instr(OP_HALT, 1)};
    run_prog(p, cyc);
    for (int k = 0; k < N; k++) begin
      logic [7:0] got;
      io_addr = 4'(k); #1;
      got = io_rdata >> (8 - len);
      check(got == (exp_w[k] & 8'((1 << len) - 1)), $sformatf("%s PE %0d: got %h exp %h", what, k, got, exp_w[k]));
    end
  endtask

  function automatic int nb(input int k, input int d);
    int r, c;
    r = k / 4; c = k % 4;
    case (d)
      0: r = (r + 3) % 4;
      1: c = (c + 1) % 4;
      2: r = (r + 1) % 4;
      default: c = (c + 3) % 4;
    endcase
    return r * 4 + c;
  endfunction

  initial begin
    logic [7:0] a [N], b [N], e [N];
    logic [15:0] prod [N];
    instr_t p [$];
    int cyc, exp_cyc;
    repeat (3) @(negedge clk); rst_n = 1'b1;

    for (int rep = 0; rep < 3; rep++) begin
      for (int k = 0; k < N; k++) begin a[k] = 8'($urandom); b[k] = 8'($urandom); end
      if (rep == 0) begin a[0] = 8'hff; b[0] = 8'hff; a[1] = 8'h00; end
      // 1. load samples
      fe_write(a);
      p = '{mk_instr(OP_IOIN, 8, 0), mk_instr(OP_HALT, 1)};
      run_prog(p, cyc);
      check(cyc == 9, "IOIN program length");
      fe_write(b);
      p = '{mk_instr(OP_IOIN, 8, 8), mk_instr(OP_HALT, 1)};
      run_prog(p, cyc);
      // 2. compute
      p = '{
        mk_instr(OP_XOR,   1, 500, 0, 0),          // zero plane
        mk_instr(OP_CLRC,  1),
        mk_instr(OP_ADD,   8, 16, 0, 8),            // a + b
        mk_instr(OP_ADD,   1, 24, 500, 500),        //   carry out
        mk_instr(OP_SETC,  1),
        mk_instr(OP_SUB,   8, 32, 0, 8),            // a - b
        mk_instr(OP_MCLR,  1),
        mk_instr(OP_MLD,   8, 0, 0),                // multiplicand a, MSB first
        mk_instr(OP_MUL,   8, 40, 8),               // multiplier b, LSB first
        mk_instr(OP_MULZ,  9, 48),                  // flush; product in 41..56
        mk_instr(OP_NEWS,  8, 60, 0, 0, DIR_N),
        mk_instr(OP_NEWS,  8, 68, 0, 0, DIR_E),
        mk_instr(OP_NEWS,  8, 76, 0, 0, DIR_S),
        mk_instr(OP_NEWS,  8, 84, 0, 0, DIR_W),
        mk_instr(OP_XOR,   8, 100, 0, 0),           // clear 100..107
        mk_instr(OP_SETM,  1, 0, 0),                // active where a is odd
        mk_instr(OP_MOV,   8, 100, 8),              // b where active
        mk_instr(OP_SETMALL, 1),
        mk_instr(OP_HALT,  1)
      };
      exp_cyc = 0;
      foreach (p[i]) exp_cyc += int'(p[i].len_m1) + 1;
      run_prog(p, cyc);
      check(cyc == exp_cyc, $sformatf("compute program took %0d cycles, expected %0d", cyc, exp_cyc));
      // 3. results
      for (int k = 0; k < N; k++) e[k] = 8'(a[k] + b[k]);
      read_field(16, 8, e, "sum");
      for (int k = 0; k < N; k++) e[k] = 8'((9'(a[k]) + 9'(b[k])) >> 8);
      read_field(24, 1, e, "carry");
      for (int k = 0; k < N; k++) e[k] = 8'(a[k] - b[k]);
      read_field(32, 8, e, "difference");
      for (int k = 0; k < N; k++) begin prod[k] = 16'(a[k]) * 16'(b[k]); e[k] = prod[k][7:0]; end
      read_field(41, 8, e, "product low");
      for (int k = 0; k < N; k++) e[k] = prod[k][15:8];
      read_field(49, 8, e, "product high");
      for (int d = 0; d < 4; d++) begin
        for (int k = 0; k < N; k++) begin
          e[k] = a[nb(k, d)];
          if (nb(k, d) / 4 != k / 4 && (nb(k, d) / 4 - k / 4 == 3 || k / 4 - nb(k, d) / 4 == 3)) n_wrap++;
          if (nb(k, d) % 4 != k % 4 && (nb(k, d) % 4 - k % 4 == 3 || k % 4 - nb(k, d) % 4 == 3)) n_wrap++;
        end
        read_field(60 + 8*d, 8, e, $sformatf("neighbour dir %0d", d));
      end
      for (int k = 0; k < N; k++) e[k] = a[k][0] ? b[k] : 8'h00;
      read_field(100, 8, e, "masked move");
      check(pe_active == '1, "all PEs active again");
    end
    // 4. serial chain: a word entered at ser_in appears in register 0, and
    //    the old contents of register 15 leave at ser_out LSB first
    for (int k = 0; k < N; k++) a[k] = 8'($urandom);
    fe_write(a);
    for (int t = 0; t < 8; t++) begin
      @(negedge clk);
      check(ser_out == a[N-1][t], "serial out");
      ser_en = 1'b1; ser_in = b[0][t];
    end
    @(negedge clk); ser_en = 1'b0;
    io_addr = 4'd0; #1;  check(io_rdata == b[0], "serial in");
    io_addr = 4'd1; #1;  check(io_rdata == a[0], "serial pass-through");

    $display("mechanisms: ioin=%0d ioout=%0d add=%0d sub=%0d mul=%0d news N/E/S/W=%0d/%0d/%0d/%0d wrap=%0d masked=%0d serial=%0d halt=%0d",
             n_ioin, n_ioout, n_add, n_sub, n_mul, n_news[0], n_news[1], n_news[2], n_news[3],
             n_wrap, n_masked, n_ser, n_halt);
    check(n_ioin > 0, "I/O in never happened");
    check(n_ioout > 0, "I/O out never happened");
    check(n_add > 0 && n_sub > 0 && n_mul > 0, "arithmetic never happened");
    check(n_news[0] > 0 && n_news[1] > 0 && n_news[2] > 0 && n_news[3] > 0, "a direction never used");
    check(n_wrap > 0, "edge wrap-around never happened");
    check(n_masked > 0, "masked write never happened");
    check(n_ser > 0, "serial shift never happened");
    check(n_halt > 0, "halt never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
