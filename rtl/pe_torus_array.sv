// pe_torus_array: ROWS x COLS bit-serial PEs in a two-dimensional mesh whose
// lower edge is joined to the upper edge and left edge to the right edge.
//
// PE k = r*COLS + c owns bit k of every bit-plane: it reads rd1[k]/rd2[k] and
// returns wd[k]/we[k]. All PEs receive the same control word (SIMD). For
// OP_NEWS each PE's news_out goes to its four neighbours; indices wrap
// modulo ROWS and COLS, so data shifted off one edge enters at the opposite
// edge. Purely combinational between the memory and the PEs; the PEs' own
// flip-flops are the only state. The 4x4 size and the wrap-around follow the
// architecture; the bit-to-PE numbering is a choice of this design.
module pe_torus_array
  import ecg_simd_pkg::*;
#(
  parameter int unsigned R  = ROWS,
  parameter int unsigned C  = COLS,
  parameter int unsigned MW = MUL_W,
  localparam int unsigned N = R * C
) (
  input  logic     clk,
  input  logic     rst_n,
  input  pe_ctrl_t ctrl,
  input  logic [N-1:0] rd1,
  input  logic [N-1:0] rd2,
  output logic [N-1:0] wd,
  output logic [N-1:0] we,
  output logic [N-1:0] active
);

  logic [N-1:0] news;

  for (genvar r = 0; r < R; r++) begin : g_row
    for (genvar c = 0; c < C; c++) begin : g_col
      localparam int unsigned K  = r * C + c;
      localparam int unsigned KN = ((r + R - 1) % R) * C + c;
      localparam int unsigned KS = ((r + 1) % R) * C + c;
      localparam int unsigned KE = r * C + (c + 1) % C;
      localparam int unsigned KW = r * C + (c + C - 1) % C;
      simd_pe #(.MW(MW)) u_pe (
        .clk       (clk),
        .rst_n     (rst_n),
        .ctrl      (ctrl),
        .rd1       (rd1[K]),
        .rd2       (rd2[K]),
        .news_in_n (news[KN]),
        .news_in_e (news[KE]),
        .news_in_s (news[KS]),
        .news_in_w (news[KW]),
        .news_out  (news[K]),
        .wd        (wd[K]),
        .we        (we[K]),
        .active    (active[K])
      );
    end
  end

endmodule
