// mgr_pkg: shared types, constants and configuration helpers of the
// medium-grain reconfigurable array.
//
// The array is built from 4-bit cells, each holding a 4x4 matrix of 1-bit
// elements. An element is a 32-bit RAM (two banks of sixteen bits) that, in
// mathematics mode, acts as a 4-input, 2-output lookup table addressed by
// {d,c,b,a}; bank 0 gives output y and bank 1 gives output z.
//
// This package holds:
//   * the four element functions needed for unsigned and two's-complement
//     multiply-accumulate (alpha, beta, gamma, delta) and their truth tables;
//   * a function that, given which cell operands are two's complement, works
//     out which element function every element of the cell needs, by following
//     the sign (weight polarity) of every internal bit through the cell;
//   * the configuration command format used to load cells, crossbars and
//     H-tree switches, and the codes used inside those commands.
// The element functions and the format rule follow the document; the
// configuration command format is this design's own.
package mgr_pkg;

  // ---------------------------------------------------------------------
  // Basic sizes
  // ---------------------------------------------------------------------
  localparam int unsigned M        = 4;   // cell granularity in bits
  localparam int unsigned CELL_IN  = 6;   // input nibble slots of a cell
  localparam int unsigned CELL_OUT = 8;   // output nibble slots of a cell
  localparam int unsigned NDIR     = 8;   // mesh neighbours (N,NE,E,SE,S,SW,W,NW)
  localparam int unsigned MESH_BUS = 2;   // m-bit busses per direction
  localparam int unsigned HT_NIB   = 2;   // nibbles in a leaf H-tree bus
  localparam int unsigned LEAF_W   = HT_NIB * M;
  localparam int unsigned NMESH    = NDIR * MESH_BUS;
  localparam int unsigned NDEST    = NMESH + HT_NIB;   // output crossbar destinations
  localparam int unsigned DLY_MAX  = 7;   // extra delay registers per slot

  typedef logic [M-1:0] nib_t;

  // mesh directions; opposite(d) = (d+4)%8
  typedef enum logic [2:0] {
    DIR_N = 3'd0, DIR_NE = 3'd1, DIR_E = 3'd2, DIR_SE = 3'd3,
    DIR_S = 3'd4, DIR_SW = 3'd5, DIR_W = 3'd6, DIR_NW = 3'd7
  } dir_e;

  // ---------------------------------------------------------------------
  // Element functions (mathematics mode)
  // ---------------------------------------------------------------------
  typedef enum logic [1:0] {
    EL_ALPHA = 2'd0,   // ( 2z + y) =  (a&b) + c + d
    EL_BETA  = 2'd1,   // (-2z + y) = -(a&b) + c - d
    EL_GAMMA = 2'd2,   // (-2z + y) = -(a&b) - c + d
    EL_DELTA = 2'd3    // (-2z + y) =  (a&b) - c - d
  } elem_fn_e;

  // Truth table of one element function, as the 32 bits stored in the
  // element: bit {bank, addr} with addr = {d,c,b,a}. Bank 0 holds y and bank
  // 1 holds z. For every function y is the parity of (a&b)+c+d, and z follows
  // from the signed sum of the three inputs.
  function automatic logic [31:0] elem_lut(elem_fn_e f);
    logic [31:0] t;
    int v, y, z;
    t = '0;
    for (int ad = 0; ad < 16; ad++) begin
      int a, b, c, d, p;
      a = ad & 1; b = (ad >> 1) & 1; c = (ad >> 2) & 1; d = (ad >> 3) & 1;
      p = a & b;
      unique case (f)
        EL_ALPHA: v =  p + c + d;
        EL_BETA:  v = -p + c - d;
        EL_GAMMA: v = -p - c + d;
        default:  v =  p - c - d;
      endcase
      y = v & 1;
      if (f == EL_ALPHA) z = (v - y) / 2;    // 2z + y = v
      else               z = (y - v) / 2;    // -2z + y = v
      t[ad]      = y[0];
      t[16 + ad] = z[0];
    end
    return t;
  endfunction

  // ---------------------------------------------------------------------
  // Position of every element in the multiply-accumulate structure.
  // The 4x4 matrix is a set of nested L-shaped ripple chains. Chain s
  // (s = 1..4) has 2s-1 elements; position p of chain s sits in row r
  // (which b bit it sees) and column k (which a bit it sees).
  // ---------------------------------------------------------------------
  function automatic int chain_row(int s, int p);
    return (p < s) ? p : s - 1;
  endfunction

  function automatic int chain_col(int s, int p);
    return (p < s) ? M - s : M - s + (p - s + 1);
  endfunction

  // Inverse mapping: chain and position of the element in row r, column k.
  function automatic int elem_chain(int r, int k);
    return (r + k <= M - 1) ? M - k : r + 1;
  endfunction

  function automatic int elem_pos(int r, int k);
    return (r + k <= M - 1) ? r : 2*r + k - M + 1;
  endfunction

  // Operand formats of one cell: 1 = two's complement, 0 = unsigned.
  typedef struct packed {
    logic a, b, c, d;
  } cell_fmt_t;

  // Element function of every element (index r*4+k) for the given operand
  // formats, found by propagating the weight polarity of each bit. An element
  // whose three addends share one polarity is alpha; otherwise the odd addend
  // names the function (product: delta, c: beta, d: gamma). Output y then
  // carries the polarity of the odd addend and z that of the other two.
  // Also returns the polarity of the eight cell outputs.
  function automatic void cell_elem_fns(input cell_fmt_t fmt,
                                        output elem_fn_e fn [16],
                                        output logic [7:0] yneg);
    logic yn [1:4][0:6];
    logic zn [1:4][0:6];
    for (int s = 1; s <= 4; s++) begin
      for (int p = 0; p <= 2*s-2; p++) begin
        int r, k;
        logic sp, sc, sd;
        r = chain_row(s, p);
        k = chain_col(s, p);
        sp = (fmt.a && k == 3) ^ (fmt.b && r == 3);
        if (p == 0) begin
          sc = fmt.c && (M - s == 3);
          sd = fmt.d && (M - s == 3);
        end else begin
          sc = (p - 1 <= 2*(s-1)-2) ? yn[s-1][p-1] : zn[s-1][2*(s-1)-2];
          sd = zn[s][p-1];
        end
        if (sp == sc && sc == sd) begin
          fn[r*4+k] = EL_ALPHA; yn[s][p] = sp; zn[s][p] = sp;
        end else if (sc == sd) begin
          fn[r*4+k] = EL_DELTA; yn[s][p] = sp; zn[s][p] = sc;
        end else if (sp == sd) begin
          fn[r*4+k] = EL_BETA;  yn[s][p] = sc; zn[s][p] = sp;
        end else begin
          fn[r*4+k] = EL_GAMMA; yn[s][p] = sd; zn[s][p] = sp;
        end
      end
    end
    for (int q = 0; q < 7; q++) yneg[q] = yn[4][q];
    yneg[7] = zn[4][6];
  endfunction

  // Memory-mode word of a cell holding the given element functions.
  // Word address w = {row[1:0], bank, latch[3:0]}; data bit k belongs to the
  // element in column k of that row.
  function automatic nib_t cell_cfg_word(input elem_fn_e fn [16], input int w);
    nib_t v;
    int row, bank, latch;
    row = (w >> 5) & 3; bank = (w >> 4) & 1; latch = w & 15;
    for (int k = 0; k < 4; k++) begin
      logic [31:0] t;
      t = elem_lut(fn[row*4+k]);
      v[k] = t[bank*16 + latch];
    end
    return v;
  endfunction

  // ---------------------------------------------------------------------
  // Configuration commands
  // ---------------------------------------------------------------------
  typedef enum logic [2:0] {
    CFG_NONE     = 3'd0,
    CFG_CELL_MEM = 3'd1,  // index[6:0] = word address, data[3:0] = word
    CFG_CELL_MOD = 3'd2,  // data[0] = 1: mathematics mode
    CFG_IN_SEL   = 3'd3,  // index = input slot, data = in_sel_t
    CFG_OUT_SEL  = 3'd4,  // index = destination, data = out_sel_t
    CFG_SWITCH   = 3'd5   // index = {dest[1:0], portion}, data[2:0] = link source
  } cfg_kind_e;

  typedef struct packed {
    logic        valid;
    cfg_kind_e   kind;
    logic [15:0] unit;    // tile number (row*COLS+col) or switch number (heap order, root = 1)
    logic [15:0] index;
    logic [15:0] data;
  } cfg_cmd_t;

  // Input crossbar sources: 0..15 mesh busses (dir*2+bus), 16..17 H-tree
  // leaf nibbles, 18 the slot's constant.
  localparam int unsigned SRC_HT0   = NMESH;
  localparam int unsigned SRC_CONST = NMESH + HT_NIB;

  typedef struct packed {
    logic [3:0] unused;
    nib_t       konst;
    logic [2:0] delay;
    logic [4:0] src;
  } in_sel_t;

  // Output crossbar: src 0 = drive zero, 1..8 = cell output slot src-1.
  typedef struct packed {
    logic [8:0] unused;
    logic [2:0] delay;
    logic [3:0] src;
  } out_sel_t;

  // H-tree link sources, per m-bit portion of a destination bus
  typedef enum logic [2:0] {
    LNK_NONE = 3'd0,
    LNK_PLO  = 3'd1,   // lower half of the bus from the parent (input path)
    LNK_PHI  = 3'd2,   // upper half of the bus from the parent (input path)
    LNK_CL   = 3'd3,   // bus from the left child (output path)
    LNK_CR   = 3'd4    // bus from the right child (output path)
  } link_src_e;

  // H-tree switch destinations
  localparam int unsigned SW_CIN_L  = 0;  // input path to the left child
  localparam int unsigned SW_CIN_R  = 1;  // input path to the right child
  localparam int unsigned SW_POUT_L = 2;  // output path, lower half to parent
  localparam int unsigned SW_POUT_H = 3;  // output path, upper half to parent

endpackage
