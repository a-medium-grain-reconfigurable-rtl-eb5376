// parallel_cell: the 4-bit bit-parallel cell, sixteen elements in a 4x4 matrix.
//
// Memory mode (math = 0): a 128x4-bit RAM with separate read and write ports.
//   ra[7] / wa[7] enable the read / write, ra[6:4] / wa[6:4] choose the row
//   of elements and the bank (see cell_decoder), ra[3:0] / wa[3:0] go to
//   every element. Column k of the matrix stores data bit k. Reads are
//   combinational and pass down each column, so ro = ri when no read is
//   enabled. Writes happen on the rising clock edge.
// Mathematics mode (math = 1): the elements are lookup tables wired as a
// multiply-accumulate array, y = a*b + c + d. The matrix is a set of nested
// L-shaped ripple chains: chain s (s = 1..4) has 2s-1 elements, running down
// column 4-s and then along row s-1. The first element of chain s adds c and
// d bit (4-s); every later element adds one output bit of the inner chain
// s-1 and the carry (z) of its predecessor. Element (row r, column k) always
// forms a[k] & b[r]. Outputs y[6:0] are the y outputs of the outermost chain
// and y[7] is the carry of its last element, so the longest path runs
// through seven elements. Which of the four element functions (package
// mgr_pkg) are loaded decides whether a, b, c and d are read as unsigned or
// two's complement; the ri/ro chain is unused in this mode.
// The cell is combinational apart from the write; the pipeline register that
// gives the cell its one-cycle latency sits in cell_tile.
// Structure, chain order and formats follow the document; the mapping of
// address bits to rows and banks is this design's choice.
module parallel_cell (
  input  logic       clk,
  input  logic       math,
  // mathematics mode
  input  logic [3:0] a, b, c, d,
  output logic [7:0] y,
  // memory mode
  input  logic [7:0] ra,
  input  logic [7:0] wa,
  input  logic [3:0] wi,
  input  logic [3:0] ri,
  output logic [3:0] ro
);
  import mgr_pkg::*;

  logic [1:0] re_row [4];
  logic [1:0] we_row [4];

  cell_decoder u_dec (
    .math (math), .ra_hi (ra[7:4]), .wa_hi (wa[7:4]),
    .re (re_row), .we (we_row)
  );

  // Each element's outputs live in its own generate scope (yo, zo, rdo) and
  // are reached by scope name, so no shared array ties unrelated elements
  // together.

  for (genvar s = 1; s <= 4; s++) begin : g_chain
    for (genvar p = 0; p <= 2*s-2; p++) begin : g_pos
      localparam int R = chain_row(s, p);
      localparam int K = chain_col(s, p);
      localparam int RS = (R == 0) ? 1 : elem_chain(R-1, K);   // element above
      localparam int RP = (R == 0) ? 0 : elem_pos(R-1, K);
      logic mc, md, e_ri, yo, zo, rdo;
      if (p == 0) begin : g_first
        assign mc = c[M-s];
        assign md = d[M-s];
      end else begin : g_next
        if (p - 1 <= 2*(s-1)-2) begin : g_y
          assign mc = g_chain[s-1].g_pos[p-1].yo;
        end else begin : g_z
          assign mc = g_chain[s-1].g_pos[2*(s-1)-2].zo;
        end
        assign md = g_chain[s].g_pos[p-1].zo;
      end
      if (R == 0) begin : g_top
        assign e_ri = ri[K];
      end else begin : g_below
        assign e_ri = g_chain[RS].g_pos[RP].rdo;
      end
      element u_el (
        .clk (clk),
        .ra  (math ? {md, mc, b[R], a[K]} : ra[3:0]),
        .re  (re_row[R]),
        .ri  (e_ri),
        .ro  (rdo),
        .wa  (wa[3:0]),
        .we  (we_row[R]),
        .wi  (wi[K]),
        .y   (yo),
        .z   (zo)
      );
    end
  end

  for (genvar q = 0; q < 7; q++) begin : g_y
    assign y[q] = g_chain[4].g_pos[q].yo;
  end
  assign y[7] = g_chain[4].g_pos[6].zo;
  for (genvar k = 0; k < 4; k++) begin : g_ro
    assign ro[k] = g_chain[elem_chain(3, k)].g_pos[elem_pos(3, k)].rdo;
  end
endmodule
