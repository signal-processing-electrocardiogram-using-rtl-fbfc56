// simd_control_unit: the single control unit of the SIMD array.
//
// It holds the program in an instruction memory written by the front-end
// processor (prog_we/prog_addr/prog_data), and after `start` reads the
// instruction at its one program counter, decodes it and broadcasts a
// control word plus the bit-plane addresses to all PEs, the memory and the
// I/O registers. An instruction with LEN repetitions occupies exactly LEN
// cycles (repetition i uses dst+i, src1+i, src2+i; OP_MLD uses
// src1+LEN-1-i); the next instruction follows without a gap, since the
// instruction memory is read combinationally. OP_HALT ends the program:
// busy falls and done pulses for one cycle. While idle the broadcast op is
// OP_NOP. io_shift_out asks the I/O registers for a bit-slice (OP_IOIN) and
// io_shift_in makes them take one (OP_IOOUT); mem_from_io selects the I/O
// bit-slice as the memory write data.
// One control unit with one program counter broadcasting to all PEs follows
// the architecture; the program memory, the repeat mechanism and the
// instruction set are choices of this design.
module simd_control_unit
  import ecg_simd_pkg::*;
#(
  parameter int unsigned DEPTH = IMEM_DEPTH,
  localparam int unsigned PW   = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // program load from the front-end processor
  input  logic              prog_we,
  input  logic [PW-1:0]     prog_addr,
  input  instr_t            prog_data,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic [PW-1:0]     pc,
  // broadcast
  output pe_ctrl_t          ctrl,
  output logic [ADDR_W-1:0] ra1,
  output logic [ADDR_W-1:0] ra2,
  output logic [ADDR_W-1:0] wa,
  output logic              mem_from_io,
  output logic              io_shift_out,
  output logic              io_shift_in
);

  instr_t imem [DEPTH];
  instr_t ir;
  logic [PW-1:0]    pc_q;
  logic [LEN_W-1:0] rep_q;
  logic             run_q;
  logic             last_rep;

  always_ff @(posedge clk) begin
    if (prog_we) imem[prog_addr] <= prog_data;
  end

  assign ir       = imem[pc_q];
  assign last_rep = (rep_q == ir.len_m1);

  always_comb begin
    ctrl.op      = run_q ? ir.op : OP_NOP;
    ctrl.dir     = ir.dir;
    ra1          = (ir.op == OP_MLD) ? ir.src1 + ADDR_W'(ir.len_m1 - rep_q)
                                     : ir.src1 + ADDR_W'(rep_q);
    ra2          = ir.src2 + ADDR_W'(rep_q);
    wa           = ir.dst  + ADDR_W'(rep_q);
    mem_from_io  = run_q && (ir.op == OP_IOIN);
    io_shift_out = run_q && (ir.op == OP_IOIN);
    io_shift_in  = run_q && (ir.op == OP_IOOUT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q  <= '0;
      rep_q <= '0;
      run_q <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run_q) begin
        if (start) begin
          run_q <= 1'b1;
          pc_q  <= '0;
          rep_q <= '0;
        end
      end else if (ir.op == OP_HALT) begin
        run_q <= 1'b0;
        done  <= 1'b1;
      end else if (last_rep) begin
        rep_q <= '0;
        pc_q  <= pc_q + 1'b1;
      end else begin
        rep_q <= rep_q + 1'b1;
      end
    end
  end

  assign busy = run_q;
  assign pc   = pc_q;

  // The program must not be rewritten while it runs.
  a_no_prog_while_busy: assert property (@(posedge clk) disable iff (!rst_n) !(run_q && prog_we));

endmodule
