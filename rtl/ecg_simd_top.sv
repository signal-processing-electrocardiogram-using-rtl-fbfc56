// ecg_simd_top: SIMD processor for concurrent wavelet processing of
// multi-lead ECG.
//
// One control unit (single program counter) broadcasts a bit-serial
// instruction each cycle to a 4x4 torus of bit-serial PEs, one PE per ECG
// lead (12 or 15 leads) with the rest spare. Every PE owns one bit of each
// bit-plane of the memory array, so one broadcast address reaches all PEs
// at once. The digitised lead samples arrive from the front-end processor a
// word at a time through the I/O shift registers (one per PE) and are
// turned into bit-planes by OP_IOIN; results go back with OP_IOOUT and are
// read out a word at a time.
//
// Ports: the front-end processor's program load (prog_*), start/busy/done,
// the program counter pc,
// its word port to the I/O registers (io_*) and the serial I/O chain
// (ser_*). The analog-to-digital converters and the front-end processor
// are outside this module. Memory write data comes from the PEs, or from
// the I/O registers during OP_IOIN (then unmasked, all PEs written).
// The organisation follows the architecture; the instruction set, the
// memory depth and the port protocol are choices of this design.
module ecg_simd_top
  import ecg_simd_pkg::*;
#(
  parameter int unsigned R         = ROWS,
  parameter int unsigned C         = COLS,
  parameter int unsigned MW        = MUL_W,
  parameter int unsigned IOW       = IO_W,
  parameter int unsigned IMEM      = IMEM_DEPTH,
  localparam int unsigned N        = R * C,
  localparam int unsigned NAW      = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned PW       = $clog2(IMEM)
) (
  input  logic            clk,
  input  logic            rst_n,
  // program load and run control
  input  logic            prog_we,
  input  logic [PW-1:0]   prog_addr,
  input  instr_t          prog_data,
  input  logic            start,
  output logic            busy,
  output logic            done,
  output logic [PW-1:0]   pc,
  // word port to the I/O registers
  input  logic            io_we,
  input  logic [NAW-1:0]  io_addr,
  input  logic [IOW-1:0]  io_wdata,
  output logic [IOW-1:0]  io_rdata,
  // serial I/O chain
  input  logic            ser_en,
  input  logic            ser_in,
  output logic            ser_out,
  // activity bits of the PEs, for observation
  output logic [N-1:0]    pe_active
);

  pe_ctrl_t          ctrl;
  logic [ADDR_W-1:0] ra1, ra2, wa;
  logic              mem_from_io, io_shift_out, io_shift_in;
  logic [N-1:0]      rd1, rd2, pe_wd, pe_we, io_slice, mem_wd, mem_wbe;

  simd_control_unit #(.DEPTH(IMEM)) u_cu (
    .clk          (clk),
    .rst_n        (rst_n),
    .prog_we      (prog_we),
    .prog_addr    (prog_addr),
    .prog_data    (prog_data),
    .start        (start),
    .busy         (busy),
    .done         (done),
    .pc           (pc),
    .ctrl         (ctrl),
    .ra1          (ra1),
    .ra2          (ra2),
    .wa           (wa),
    .mem_from_io  (mem_from_io),
    .io_shift_out (io_shift_out),
    .io_shift_in  (io_shift_in)
  );

  pe_torus_array #(.R(R), .C(C), .MW(MW)) u_array (
    .clk    (clk),
    .rst_n  (rst_n),
    .ctrl   (ctrl),
    .rd1    (rd1),
    .rd2    (rd2),
    .wd     (pe_wd),
    .we     (pe_we),
    .active (pe_active)
  );

  assign mem_wd  = mem_from_io ? io_slice : pe_wd;
  assign mem_wbe = mem_from_io ? '1       : pe_we;

  bitplane_memory #(.N(N), .DEPTH(MEM_DEPTH)) u_mem (
    .clk (clk),
    .ra1 (ra1),
    .rd1 (rd1),
    .ra2 (ra2),
    .rd2 (rd2),
    .wa  (wa),
    .wbe (mem_wbe),
    .wd  (mem_wd)
  );

  io_register_bank #(.N(N), .W(IOW)) u_io (
    .clk       (clk),
    .rst_n     (rst_n),
    .fe_we     (io_we),
    .fe_addr   (io_addr),
    .fe_wdata  (io_wdata),
    .fe_rdata  (io_rdata),
    .shift_out (io_shift_out),
    .slice_out (io_slice),
    .shift_in  (io_shift_in),
    .slice_in  (rd1),
    .ser_en    (ser_en),
    .ser_in    (ser_in),
    .ser_out   (ser_out)
  );

endmodule
