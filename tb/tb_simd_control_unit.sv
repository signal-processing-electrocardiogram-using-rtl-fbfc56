// tb_simd_control_unit: self-checking test of the control unit.
// Loads a program of instructions with random lengths and addresses, starts
// it, and checks every cycle the broadcast op, direction and the three
// addresses against the expected sequence (src1+i, src2+i, dst+i, and
// src1+LEN-1-i for OP_MLD), the I/O control lines, that each instruction
// takes exactly LEN cycles, and that OP_HALT ends the program with one done
// pulse. Idle cycles must broadcast OP_NOP. The program is run twice.
module tb_simd_control_unit;
  import ecg_simd_pkg::*;
  localparam int unsigned DEPTH = 64, PW = 6, NPROG = 20;
  logic clk = 1'b0, rst_n = 1'b0;
  logic prog_we = 1'b0; logic [PW-1:0] prog_addr = '0; instr_t prog_data;
  logic start = 1'b0, busy, done;
  logic [PW-1:0] pc;
  pe_ctrl_t ctrl;
  logic [ADDR_W-1:0] ra1, ra2, wa;
  logic mem_from_io, io_shift_out, io_shift_in;
  instr_t prog [NPROG];
  int checks = 0, failures = 0;

  simd_control_unit #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    opcode_e ops [7] = '{OP_ADD, OP_MLD, OP_NEWS, OP_IOIN, OP_IOOUT, OP_MUL, OP_XOR};
    prog_data = '0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int p = 0; p < NPROG; p++) begin
      if (p == NPROG - 1) prog[p] = mk_instr(OP_HALT, 1);
      else prog[p] = mk_instr(ops[$urandom % 7], 1 + $urandom % 64, ADDR_W'($urandom),
                              ADDR_W'($urandom), ADDR_W'($urandom), dir_e'($urandom % 4));
      @(negedge clk); prog_we = 1'b1; prog_addr = PW'(p); prog_data = prog[p];
    end
    @(negedge clk); prog_we = 1'b0;
    for (int run = 0; run < 2; run++) begin
      check(ctrl.op == OP_NOP && !busy, "idle before start");
      start = 1'b1; @(negedge clk); start = 1'b0;
      for (int p = 0; p < NPROG - 1; p++) begin
        int len;
        len = int'(prog[p].len_m1) + 1;
        for (int i = 0; i < len; i++) begin
          check(busy && ctrl.op == prog[p].op && ctrl.dir == prog[p].dir && pc == PW'(p), "op");
          check(ra1 == ((prog[p].op == OP_MLD) ? prog[p].src1 + ADDR_W'(len - 1 - i)
                                               : prog[p].src1 + ADDR_W'(i)), "ra1");
          check(ra2 == prog[p].src2 + ADDR_W'(i), "ra2");
          check(wa == prog[p].dst + ADDR_W'(i), "wa");
          check(io_shift_out == (prog[p].op == OP_IOIN) && mem_from_io == (prog[p].op == OP_IOIN)
                && io_shift_in == (prog[p].op == OP_IOOUT), "io lines");
          @(negedge clk);
        end
      end
      check(ctrl.op == OP_HALT && !done, "halt reached");
      @(negedge clk);
      check(done && !busy && ctrl.op == OP_NOP, "done pulse");
      @(negedge clk);
      check(!done, "done is one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
