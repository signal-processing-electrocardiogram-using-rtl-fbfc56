// io_register_bank: the I/O shift registers between the front-end processor
// and the bit-plane memory array.
//
// One W-bit shift register per PE memory column (N registers). It converts
// between the word-at-a-time format of the front-end processor and the
// bit-plane format of the array:
//  * Front-end side: fe_we writes a whole W-bit word into register fe_addr in
//    one cycle; fe_rdata reads register fe_addr combinationally.
//  * Array side: shift_out moves every register one bit towards its LSB and
//    presents the LSBs as one bit-slice on slice_out (bit k from register k),
//    so W memory write cycles store the words LSB first in W consecutive
//    bit-planes. shift_in shifts slice_in into the MSBs, so W memory read
//    cycles collect W bit-planes back into words.
//  * Serial side: ser_en shifts the whole bank as one N*W-bit chain, register
//    0 first, entering at ser_in and leaving register N-1 at ser_out; this is
//    the unaddressed bit-serial transfer mode.
// If a front-end write coincides with a shift, the written register takes the
// front-end word and the others shift. Word width 8, one register per memory
// word and the two-phase transfer (one front-end cycle, then W bit-slice
// cycles) follow the architecture; LSB-first order, port names and the
// collision rule are choices of this design.
module io_register_bank #(
  parameter int unsigned N = ecg_simd_pkg::N_PE,
  parameter int unsigned W = ecg_simd_pkg::IO_W,
  localparam int unsigned NAW = (N > 1) ? $clog2(N) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // front-end processor port
  input  logic           fe_we,
  input  logic [NAW-1:0] fe_addr,
  input  logic [W-1:0]   fe_wdata,
  output logic [W-1:0]   fe_rdata,
  // bit-slice port towards the memory array
  input  logic           shift_out,
  output logic [N-1:0]   slice_out,
  input  logic           shift_in,
  input  logic [N-1:0]   slice_in,
  // serial chain
  input  logic           ser_en,
  input  logic           ser_in,
  output logic           ser_out
);

  logic [W-1:0] regs [N];

  always_comb begin
    for (int k = 0; k < N; k++) slice_out[k] = regs[k][0];
  end
  assign fe_rdata = regs[fe_addr];
  assign ser_out  = regs[N-1][0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) regs[k] <= '0;
    end else begin
      for (int k = 0; k < N; k++) begin
        if (fe_we && fe_addr == NAW'(k))
          regs[k] <= fe_wdata;
        else if (shift_out)
          regs[k] <= {1'b0, regs[k][W-1:1]};
        else if (shift_in)
          regs[k] <= {slice_in[k], regs[k][W-1:1]};
        else if (ser_en)
          regs[k] <= {(k == 0) ? ser_in : regs[(k == 0) ? 0 : k-1][0], regs[k][W-1:1]};
      end
    end
  end

endmodule
