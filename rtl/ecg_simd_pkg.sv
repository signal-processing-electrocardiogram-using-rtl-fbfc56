// ecg_simd_pkg: sizes, instruction encoding and broadcast control word shared
// by the SIMD ECG processor.
//
// The array sizes follow the architecture: 16 processing elements arranged as
// a 4x4 torus (one PE per ECG lead plus spares for up to 15 leads), 32-bit
// bit-serial multipliers and 8-bit I/O shift registers. The memory depth, the
// program memory depth and the whole instruction set are choices of this
// design; the architecture only states that one control unit with one program
// counter decodes instructions and broadcasts control to all PEs.
//
// Every instruction is a bit-serial operation repeated LEN times (LEN = len_m1+1).
// Repetition i works on bit-plane addresses dst+i, src1+i and src2+i, so a
// LEN-bit field stored LSB first at consecutive bit-plane addresses is
// processed in LEN clock cycles. OP_MLD walks src1 downwards instead
// (src1+LEN-1 down to src1) because the multiplier takes its multiplicand
// MSB first.
package ecg_simd_pkg;

  localparam int unsigned ROWS       = 4;     // torus rows
  localparam int unsigned COLS       = 4;     // torus columns
  localparam int unsigned N_PE       = ROWS * COLS;
  localparam int unsigned MUL_W      = 32;    // full adders per bit-serial multiplier
  localparam int unsigned IO_W       = 8;     // bits per I/O shift register
  localparam int unsigned MEM_DEPTH  = 32768; // bit-planes: one beat of 8-bit samples + work space
  localparam int unsigned ADDR_W     = $clog2(MEM_DEPTH);
  localparam int unsigned IMEM_DEPTH = 64;    // instruction words in the control unit
  localparam int unsigned LEN_W      = 6;     // repeat count field, 1..64 repetitions

  typedef enum logic [4:0] {
    OP_NOP     = 5'd0,   // nothing
    OP_HALT    = 5'd1,   // stop, control unit raises done
    OP_CLRC    = 5'd2,   // C <= 0
    OP_SETC    = 5'd3,   // C <= 1
    OP_MOV     = 5'd4,   // mem[dst] <= mem[src1]
    OP_NOT     = 5'd5,   // mem[dst] <= ~mem[src1]
    OP_AND     = 5'd6,   // mem[dst] <= mem[src1] & mem[src2]
    OP_OR      = 5'd7,   // mem[dst] <= mem[src1] | mem[src2]
    OP_XOR     = 5'd8,   // mem[dst] <= mem[src1] ^ mem[src2]
    OP_ADD     = 5'd9,   // mem[dst] <= sum(src1, src2, C), C <= carry
    OP_SUB     = 5'd10,  // mem[dst] <= sum(src1, ~src2, C), C <= carry (SETC first)
    OP_SETM    = 5'd11,  // activity bit M <= mem[src1]
    OP_SETMALL = 5'd12,  // M <= 1 in every PE
    OP_NEWS    = 5'd13,  // mem[dst] <= neighbour's mem[src1], neighbour chosen by dir
    OP_MCLR    = 5'd14,  // clear multiplier M, S and C flip-flops
    OP_MLD     = 5'd15,  // shift multiplicand bit mem[src1+LEN-1-i] into multiplier
    OP_MUL     = 5'd16,  // multiplier step with mem[src1]; mem[dst] <= product bit
    OP_MULZ    = 5'd17,  // multiplier step with 0 (flush);  mem[dst] <= product bit
    OP_IOIN    = 5'd18,  // mem[dst] <= bit-slice shifted out of the I/O registers
    OP_IOOUT   = 5'd19   // I/O registers shift in the bit-slice mem[src1]
  } opcode_e;

  // Neighbour a PE receives from in OP_NEWS.
  typedef enum logic [1:0] {
    DIR_N = 2'd0,   // from the PE one row up
    DIR_E = 2'd1,   // from the PE one column right
    DIR_S = 2'd2,   // from the PE one row down
    DIR_W = 2'd3    // from the PE one column left
  } dir_e;

  typedef struct packed {
    opcode_e           op;
    dir_e              dir;
    logic [LEN_W-1:0]  len_m1;
    logic [ADDR_W-1:0] dst;
    logic [ADDR_W-1:0] src1;
    logic [ADDR_W-1:0] src2;
  } instr_t;

  // Control word broadcast to every PE each clock cycle.
  typedef struct packed {
    opcode_e op;
    dir_e    dir;
  } pe_ctrl_t;

  // Builds an instruction word; len is the number of repetitions (1..64).
  function automatic instr_t mk_instr(opcode_e op, int unsigned len,
                                      logic [ADDR_W-1:0] dst = '0,
                                      logic [ADDR_W-1:0] src1 = '0,
                                      logic [ADDR_W-1:0] src2 = '0,
                                      dir_e dir = DIR_N);
    instr_t i;
    i.op     = op;
    i.dir    = dir;
    i.len_m1 = LEN_W'(len - 1);
    i.dst    = dst;
    i.src1   = src1;
    i.src2   = src2;
    return i;
  endfunction

endpackage
