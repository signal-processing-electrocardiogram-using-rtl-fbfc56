// simd_pe: one bit-serial processing element of the SIMD ECG array.
//
// Every PE executes the same broadcast control word each cycle on its own
// data: bit rd1 and bit rd2 read from its column of the bit-plane memory at
// the broadcast addresses. It holds a carry flip-flop C for bit-serial
// addition and subtraction, an activity flip-flop M that gates its memory
// writes, and a W-bit bit-serial carry-save multiplier.
//  * Logic/add/sub ops produce one result bit per cycle on wd.
//  * OP_NEWS: the PE drives rd1 on news_out to its four neighbours and writes
//    the bit received from the neighbour selected by dir.
//  * OP_MCLR/OP_MLD/OP_MUL/OP_MULZ drive the multiplier; OP_MUL/OP_MULZ write
//    the multiplier's output flip-flop, which holds the product bit of the
//    previous step (one cycle latency).
// we is asserted for writing ops only while M is 1; M resets to 1.
// Bit-serial data paths and the bit-serial multiplier follow the
// architecture; the register set and operations are choices of this design.
module simd_pe
  import ecg_simd_pkg::*;
#(
  parameter int unsigned MW = MUL_W
) (
  input  logic     clk,
  input  logic     rst_n,
  input  pe_ctrl_t ctrl,
  input  logic     rd1,
  input  logic     rd2,
  input  logic     news_in_n,   // neighbour one row up
  input  logic     news_in_e,   // neighbour one column right
  input  logic     news_in_s,   // neighbour one row down
  input  logic     news_in_w,   // neighbour one column left
  output logic     news_out,
  output logic     wd,
  output logic     we,
  output logic     active       // state of the activity bit M
);

  logic c_q, m_q;
  logic b_op, sum, carry, writes;
  logic mul_clr, mul_load, mul_step, mul_in, mul_out;

  bit_serial_mult #(.W(MW)) u_mult (
    .clk (clk),
    .rst_n (rst_n),
    .clr (mul_clr),
    .load (mul_load),
    .step (mul_step),
    .in (mul_in),
    .out (mul_out)
  );

  always_comb begin
    b_op   = (ctrl.op == OP_SUB) ? ~rd2 : rd2;
    sum    = rd1 ^ b_op ^ c_q;
    carry  = (rd1 & b_op) | (rd1 & c_q) | (b_op & c_q);

    mul_clr  = (ctrl.op == OP_MCLR);
    mul_load = (ctrl.op == OP_MLD);
    mul_step = (ctrl.op == OP_MUL) || (ctrl.op == OP_MULZ);
    mul_in   = (ctrl.op == OP_MULZ) ? 1'b0 : rd1;

    writes = 1'b1;
    unique case (ctrl.op)
      OP_MOV:            wd = rd1;
      OP_NOT:            wd = ~rd1;
      OP_AND:            wd = rd1 & rd2;
      OP_OR:             wd = rd1 | rd2;
      OP_XOR:            wd = rd1 ^ rd2;
      OP_ADD, OP_SUB:    wd = sum;
      OP_MUL, OP_MULZ:   wd = mul_out;
      OP_NEWS: begin
        unique case (ctrl.dir)
          DIR_N: wd = news_in_n;
          DIR_E: wd = news_in_e;
          DIR_S: wd = news_in_s;
          DIR_W: wd = news_in_w;
        endcase
      end
      default: begin
        wd     = 1'b0;
        writes = 1'b0;
      end
    endcase
    we = writes & m_q;
  end

  assign news_out = rd1;
  assign active   = m_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q <= 1'b0;
      m_q <= 1'b1;
    end else begin
      unique case (ctrl.op)
        OP_CLRC:        c_q <= 1'b0;
        OP_SETC:        c_q <= 1'b1;
        OP_ADD, OP_SUB: if (m_q) c_q <= carry;
        OP_SETM:        m_q <= rd1;
        OP_SETMALL:     m_q <= 1'b1;
        default: ;
      endcase
    end
  end

endmodule
