// bitplane_memory: the memory array of the SIMD processor, organised by bit-planes.
//
// Each address holds one bit-slice: N bits, bit k belonging to processing
// element k, so the memory has as many data paths as there are PEs. One
// broadcast address therefore reaches the same bit of every PE's data.
// Two asynchronous read ports serve the two source operands of a bit-serial
// operation and one synchronous write port, with a per-PE bit enable, stores
// the result (the enable carries each PE's activity bit). Reads return the old
// contents when the same address is written in the same cycle.
// The memory with one data path per PE follows the architecture; the depth,
// the two-read/one-write organisation and the per-bit enables are choices of
// this design. Like an SRAM macro the array has no reset: a program must
// write a bit-plane before it reads it.
module bitplane_memory #(
  parameter int unsigned N     = ecg_simd_pkg::N_PE,
  parameter int unsigned DEPTH = ecg_simd_pkg::MEM_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] ra1,
  output logic [N-1:0]  rd1,
  input  logic [AW-1:0] ra2,
  output logic [N-1:0]  rd2,
  input  logic [AW-1:0] wa,
  input  logic [N-1:0]  wbe,   // per-PE write enable
  input  logic [N-1:0]  wd
);

  logic [N-1:0] mem [DEPTH];

  assign rd1 = mem[ra1];
  assign rd2 = mem[ra2];

  always_ff @(posedge clk) begin
    for (int k = 0; k < N; k++)
      if (wbe[k]) mem[wa][k] <= wd[k];
  end

endmodule
