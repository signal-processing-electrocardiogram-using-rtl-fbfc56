// bit_serial_mult: carry-save serial/parallel multiplier of a bit-serial PE.
//
// W cells, each with a multiplicand flip-flop M, an AND gate, a full adder FA,
// a sum flip-flop S and a carry flip-flop C. Cell 0 sits at the output end.
//  * load:  the multiplicand is shifted in on `in`, most significant bit first,
//           through the M chain (cell 0 -> cell W-1). After W loads cell k
//           holds multiplicand bit k.
//  * step:  one multiplier bit is applied on `in`, least significant bit first.
//           Every cell adds (M & in), its own carry and the sum flip-flop of the
//           cell above it; S and C take the result. The partial sum thus moves
//           one cell towards the output each step.
//  * out:   the S flip-flop of cell 0. After the step that applies multiplier
//           bit t, `out` holds product bit t. Applying the W multiplier bits
//           followed by W zero bits yields all 2W product bits, LSB first.
//  * clr:   clears M, S and C (start of a new product).
// A W x W unsigned product therefore takes W load cycles plus 2W step cycles:
// no more cycles than reading the operands and the product bit by bit. The
// structure, W full adders for W bits, the MSB-first multiplicand and the
// LSB-first multiplier/product follow the architecture; the clr input, the
// unsigned interpretation and the zero fed to the top cell's sum input are
// choices of this design.
module bit_serial_mult #(
  parameter int unsigned W = ecg_simd_pkg::MUL_W
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,    // clear all flip-flops
  input  logic load,   // shift `in` into the multiplicand chain
  input  logic step,   // apply `in` as the next multiplier bit
  input  logic in,
  output logic out
);

  logic [W-1:0] m_q, s_q, c_q;
  logic [W-1:0] pp, s_above, s_d, c_d;

  always_comb begin
    pp      = m_q & {W{in}};
    s_above = {1'b0, s_q[W-1:1]};
    s_d     = pp ^ s_above ^ c_q;
    c_d     = (pp & s_above) | (pp & c_q) | (s_above & c_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_q <= '0;
      s_q <= '0;
      c_q <= '0;
    end else if (clr) begin
      m_q <= '0;
      s_q <= '0;
      c_q <= '0;
    end else if (load) begin
      m_q <= {m_q[W-2:0], in};
    end else if (step) begin
      s_q <= s_d;
      c_q <= c_d;
    end
  end

  assign out = s_q[0];

endmodule
