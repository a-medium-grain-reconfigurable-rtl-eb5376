// tb_mgr_array: end-to-end test of the array at 4x4 cells (16 cells, a
// four-level H-tree): an 8-bit multiplier module (unsigned, then two's
// complement after reconfiguration) and a lookup-table / H-tree turnaround /
// adder path, each checked value by value and cycle by cycle. The array
// size is a parameter of the test; only the H-tree latency depends on it.
module tb_mgr_array;
  localparam int unsigned DIM = 4;
  logic clk, rst_n, cfg;
  mgr_pkg::cfg_cmd_t cfg_cmd;
  logic [mgr_pkg::LEAF_W*DIM*DIM-1:0] root_in, root_out;

  mgr_array #(.DIM(DIM)) dut (
    .clk, .rst_n, .cfg, .cfg_cmd, .ht_root_in (root_in), .ht_root_out (root_out)
  );

// Operation A: an 8-bit multiplier module mapped on the 2x2 block of cells
// at rows 0-1, columns 0-1 (digit k of A sits in column 1-k, digit r of B in
// row r). A and B come in through the H-tree from the root, broadcast to the
// cells that need each digit; partial results travel over the local mesh
// (four transfers); the input delay registers line up operands and the
// output delay registers line up the four 4-bit result digits, which are
// merged onto one root bus. Run first with unsigned formats, then the cells
// are rewritten with the two's-complement element functions (mode switch)
// and the same module multiplies signed numbers.
// Operation B: a cell in memory mode (row 2, column 0) is a lookup table
// read from bank 0 while new values are written into bank 1 at the same
// time; its result climbs the H-tree, turns around at level 2 and descends
// to a cell in mathematics mode (row 3, column 1) that adds a constant; the
// sum goes up to the root. Afterwards the read bank is switched to bank 1.
// Expected results come from plain integer arithmetic and expected latencies
// from the pipeline structure: H = LEVELS/2 registered switch stages on a
// root-to-leaf path, 2 cycles per cell (cell and mesh registers).

import mgr_pkg::*;

localparam int unsigned NT     = DIM * DIM;
localparam int unsigned LEVELS = $clog2(NT);
localparam int unsigned H      = LEVELS / 2;
localparam int unsigned RW     = LEAF_W * NT;

int checks = 0, failures = 0;
int n_cfg = 0, n_umac = 0, n_smac = 0, n_mesh = 0, n_idly = 0, n_odly = 0,
    n_down = 0, n_up = 0, n_turn = 0, n_mrd = 0, n_mwr = 0, n_const = 0, n_mode = 0;

// link settings chosen so far, to catch routing conflicts
int link_set [int];

always #5 clk = ~clk;

initial begin
  #5ms;
  failures++;
  $display("watchdog expired");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end

function automatic int unsigned leaf_of(int unsigned r, int unsigned c);
  int unsigned v = 0;
  for (int i = 0; i < $clog2(DIM); i++) begin
    v |= ((c >> i) & 1) << (2*i);
    v |= ((r >> i) & 1) << (2*i + 1);
  end
  return v;
endfunction

function automatic int tile_of(int r, int c);
  return r * DIM + c;
endfunction

task automatic cmd(input cfg_kind_e k, input int unit, input int idx, input int data);
  @(negedge clk);
  cfg_cmd = '{valid: 1, kind: k, unit: 16'(unit), index: 16'(idx), data: 16'(data)};
  n_cfg++;
  @(negedge clk);
  cfg_cmd = '0;
endtask

task automatic set_link(input int sw, input int dst, input int portion, input link_src_e src);
  int key = sw * 4 * 65536 + dst * 65536 + portion;
  if (link_set.exists(key) && link_set[key] != int'(src)) begin
    failures++;
    $display("routing conflict at switch %0d", sw);
  end
  link_set[key] = int'(src);
  cmd(CFG_SWITCH, sw, (dst << 14) | portion, int'(src));
endtask

// root nibble x down to nibble x%2 of leaf lf
task automatic route_down(input int x, input int lf);
  for (int l = LEVELS; l >= 1; l--) begin
    int sw = (NT + lf) >> l;
    int dst = ((lf >> (l - 1)) & 1) ? SW_CIN_R : SW_CIN_L;
    set_link(sw, dst, x % (1 << l), ((x >> l) & 1) ? LNK_PHI : LNK_PLO);
  end
endtask

// nibble x%2 of leaf lf up to root nibble x
task automatic route_up(input int x, input int lf);
  for (int l = 1; l <= LEVELS; l++) begin
    int sw = (NT + lf) >> l;
    int dst = ((x >> l) & 1) ? SW_POUT_H : SW_POUT_L;
    set_link(sw, dst, x % (1 << l), ((lf >> (l - 1)) & 1) ? LNK_CR : LNK_CL);
  end
endtask

function automatic int isel(int src, int dly, int k);
  in_sel_t s;
  s = '0; s.src = 5'(src); s.delay = 3'(dly); s.konst = 4'(k);
  return int'(s);
endfunction
function automatic int osel(int src, int dly);
  out_sel_t s;
  s = '0; s.src = 4'(src); s.delay = 3'(dly);
  return int'(s);
endfunction
function automatic int mesh_idx(dir_e d, int bus);
  return int'(d) * MESH_BUS + bus;
endfunction

// load the cell at (r,c) with the element functions for the given formats
task automatic load_cell(input int r, input int c, input cell_fmt_t f, output logic [7:0] yneg);
  elem_fn_e fn [16];
  cell_elem_fns(f, fn, yneg);
  // every output digit must come out unsigned or two's complement
  checks++;
  if ((yneg & 8'h77) != 0) begin
    failures++;
    $display("FAIL cell (%0d,%0d) formats %b give no standard output format", r, c, f);
  end
  for (int w = 0; w < 128; w++) cmd(CFG_CELL_MEM, tile_of(r, c), w, int'(cell_cfg_word(fn, w)));
endtask

// ---- operation A: 8-bit multiplier on cells (0,0),(0,1),(1,0),(1,1) ----
// digit (r,k) sits at tile (r, 1-k)
localparam int XA0 = 0, XA1 = 2, XB0 = 1, XB1 = 3;           // root input nibbles
localparam int XY0 = 0, XY1 = 2, XY2 = 4, XY3 = 5;           // root output nibbles

// formats of the four cells for signed (1) or unsigned (0) operands,
// found by following each cell's output formats to the cells it feeds;
// the c and d inputs of the top cell of the most significant A digit take
// the format of the most significant digit of a word (they are zero here)
task automatic load_multiplier(input bit sgn);
  logic [7:0] yn00, yn01, yn10, yn11;
  load_cell(0, 1, '{a: 0,   b: 0,   c: 0, d: 0}, yn00);                  // digit (0,0)
  load_cell(0, 0, '{a: sgn, b: 0,   c: sgn, d: sgn}, yn01);              // digit (0,1)
  load_cell(1, 1, '{a: 0,   b: sgn, c: yn01[3], d: yn00[7]}, yn10);      // digit (1,0)
  load_cell(1, 0, '{a: sgn, b: sgn, c: yn01[7], d: yn10[7]}, yn11);      // digit (1,1)
endtask

task automatic map_multiplier();
  // H-tree inputs: nibble 0 = A digit, nibble 1 = B digit
  route_down(XA0, leaf_of(0, 1)); route_down(XA0, leaf_of(1, 1));
  route_down(XA1, leaf_of(0, 0)); route_down(XA1, leaf_of(1, 0));
  route_down(XB0, leaf_of(0, 1)); route_down(XB0, leaf_of(0, 0));
  route_down(XB1, leaf_of(1, 1)); route_down(XB1, leaf_of(1, 0));
  n_down += 8;
  for (int r = 0; r < 2; r++)
    for (int c = 0; c < 2; c++) begin
      cmd(CFG_CELL_MOD, tile_of(r, c), 0, 1);
      cmd(CFG_IN_SEL, tile_of(r, c), 0, isel(SRC_HT0, 2 * r * (2 - c), 0));     // a
      cmd(CFG_IN_SEL, tile_of(r, c), 1, isel(SRC_HT0 + 1, 2 * r * (2 - c), 0)); // b
    end
  // top-row cells: c = d = 0
  cmd(CFG_IN_SEL, tile_of(0, 1), 2, isel(SRC_CONST, 0, 0));
  cmd(CFG_IN_SEL, tile_of(0, 1), 3, isel(SRC_CONST, 0, 0));
  cmd(CFG_IN_SEL, tile_of(0, 0), 2, isel(SRC_CONST, 0, 0));
  cmd(CFG_IN_SEL, tile_of(0, 0), 3, isel(SRC_CONST, 0, 0));
  // digit (1,0) at tile (1,1): c = y_lo of (0,1) from NW, d = y_hi of (0,0) from N
  cmd(CFG_OUT_SEL, tile_of(0, 0), mesh_idx(DIR_SE, 0), osel(1, 0));
  cmd(CFG_OUT_SEL, tile_of(0, 1), mesh_idx(DIR_S, 0), osel(2, 0));
  cmd(CFG_IN_SEL, tile_of(1, 1), 2, isel(mesh_idx(DIR_NW, 0), 0, 0));
  cmd(CFG_IN_SEL, tile_of(1, 1), 3, isel(mesh_idx(DIR_N, 0), 0, 0));
  // digit (1,1) at tile (1,0): c = y_hi of (0,1) from N (delayed 2), d = y_hi of (1,0) from E
  cmd(CFG_OUT_SEL, tile_of(0, 0), mesh_idx(DIR_S, 1), osel(2, 0));
  cmd(CFG_OUT_SEL, tile_of(1, 1), mesh_idx(DIR_W, 0), osel(2, 0));
  cmd(CFG_IN_SEL, tile_of(1, 0), 2, isel(mesh_idx(DIR_N, 1), 2, 0));
  cmd(CFG_IN_SEL, tile_of(1, 0), 3, isel(mesh_idx(DIR_E, 0), 0, 0));
  n_mesh += 4;
  // outputs, lined up by the output delay registers
  cmd(CFG_OUT_SEL, tile_of(0, 1), NMESH + 0, osel(1, 4));   // Y0
  cmd(CFG_OUT_SEL, tile_of(1, 1), NMESH + 0, osel(1, 2));   // Y1
  cmd(CFG_OUT_SEL, tile_of(1, 0), NMESH + 0, osel(1, 0));   // Y2
  cmd(CFG_OUT_SEL, tile_of(1, 0), NMESH + 1, osel(2, 0));   // Y3
  route_up(XY0, leaf_of(0, 1)); route_up(XY1, leaf_of(1, 1));
  route_up(XY2, leaf_of(1, 0)); route_up(XY3, leaf_of(1, 0));
  n_up += 4;
endtask

// ---- operation B ----
localparam int XLA = 16, XOUT = 6;    // root nibbles: lookup address in, sum out
localparam int KADD = 5;

task automatic map_lookup();
  int t1, t2, l1, l2, lvl;
  t1 = tile_of(2, 0); t2 = tile_of(3, 1);
  l1 = leaf_of(2, 0); l2 = leaf_of(3, 1);
  // memory cell: ra = {const 8, H-tree nibble 0}; wa = {const 9, H-tree nibble 1}; wi = nibble 1
  route_down(XLA, l1);
  route_down(XLA + 1, l1);
  n_down += 2;
  cmd(CFG_IN_SEL, t1, 0, isel(SRC_HT0, 0, 0));
  cmd(CFG_IN_SEL, t1, 1, isel(SRC_CONST, 0, 8));
  cmd(CFG_IN_SEL, t1, 2, isel(SRC_HT0 + 1, 0, 0));
  cmd(CFG_IN_SEL, t1, 3, isel(SRC_CONST, 0, 9));
  cmd(CFG_IN_SEL, t1, 4, isel(SRC_HT0 + 1, 0, 0));
  cmd(CFG_IN_SEL, t1, 5, isel(SRC_CONST, 0, 0));
  cmd(CFG_CELL_MOD, t1, 0, 0);
  cmd(CFG_OUT_SEL, t1, NMESH + 0, osel(1, 0));
  // turnaround at the lowest common switch
  lvl = $clog2((l1 ^ l2) + 1);
  for (int l = 1; l < lvl; l++)
    set_link((NT + l1) >> l, SW_POUT_L, 0, ((l1 >> (l - 1)) & 1) ? LNK_CR : LNK_CL);
  set_link((NT + l1) >> lvl, ((l2 >> (lvl - 1)) & 1) ? SW_CIN_R : SW_CIN_L, 0,
           ((l1 >> (lvl - 1)) & 1) ? LNK_CR : LNK_CL);
  for (int l = lvl - 1; l >= 1; l--)
    set_link((NT + l2) >> l, ((l2 >> (l - 1)) & 1) ? SW_CIN_R : SW_CIN_L, 0, LNK_PLO);
  n_turn++;
  // adder cell: y = lookup * 1 + KADD + 0
  begin
    logic [7:0] yn;
    load_cell(3, 1, '0, yn);
  end
  cmd(CFG_CELL_MOD, t2, 0, 1);
  cmd(CFG_IN_SEL, t2, 0, isel(SRC_HT0, 0, 0));
  cmd(CFG_IN_SEL, t2, 1, isel(SRC_CONST, 0, 1));
  cmd(CFG_IN_SEL, t2, 2, isel(SRC_CONST, 0, KADD));
  cmd(CFG_IN_SEL, t2, 3, isel(SRC_CONST, 0, 0));
  cmd(CFG_OUT_SEL, t2, NMESH + 0, osel(1, 0));
  route_up(XOUT, l2);
  n_up++;
endtask

logic [3:0] rom [16];
logic [3:0] ram1 [16];

initial begin
  int lat_a, lat_b;
  logic [3:0] qa [int];
  logic [3:0] qb [int];
  logic [7:0] va [int];
  logic [7:0] vb [int];
  logic [3:0] vl [int];
  clk = 0; rst_n = 0; cfg = 0; cfg_cmd = '0; root_in = '0;
  repeat (3) @(negedge clk);
  rst_n = 1;
  cfg = 1;
  load_multiplier(0);
  map_multiplier();
  // lookup table contents (bank 0, words 0..15) and bank 1 cleared
  for (int w = 0; w < 16; w++) begin
    rom[w] = 4'($urandom);
    cmd(CFG_CELL_MEM, tile_of(2, 0), w, int'(rom[w]));
    cmd(CFG_CELL_MEM, tile_of(2, 0), 16 + w, 0);
    ram1[w] = 0;
  end
  map_lookup();
  cfg = 0;
  n_mode++;

  lat_a = 2 * H + 6;
  lat_b = 2 * H + 5;
  for (int pass = 0; pass < 3; pass++) begin
    // pass 0: unsigned; pass 1: signed (after reconfiguration);
    // pass 2: signed, lookup cell reads the bank written during pass 1
    for (int cyc = 0; cyc < 80; cyc++) begin
      @(negedge clk);
      if (cyc < 64) begin
        va[cyc] = 8'($urandom); vb[cyc] = 8'($urandom); vl[cyc] = 4'($urandom);
        if (cyc == 0) begin va[cyc] = 8'h80; vb[cyc] = 8'hff; end
      end else begin
        va[cyc] = 0; vb[cyc] = 0; vl[cyc] = 0;
      end
      root_in = '0;
      root_in[XA0*4 +: 4] = va[cyc][3:0];
      root_in[XA1*4 +: 4] = va[cyc][7:4];
      root_in[XB0*4 +: 4] = vb[cyc][3:0];
      root_in[XB1*4 +: 4] = vb[cyc][7:4];
      root_in[XLA*4 +: 4] = vl[cyc];
      root_in[(XLA+1)*4 +: 4] = (pass == 1) ? vl[cyc] : 4'h0;
      #1;
      if (cyc >= lat_a && cyc - lat_a < 64) begin
        int i;
        logic [15:0] got, exp;
        i = cyc - lat_a;
        got = {root_out[XY3*4 +: 4], root_out[XY2*4 +: 4], root_out[XY1*4 +: 4], root_out[XY0*4 +: 4]};
        exp = (pass == 0) ? 16'(int'(va[i]) * int'(vb[i]))
                          : 16'(int'($signed(va[i])) * int'($signed(vb[i])));
        checks++;
        if (got !== exp) begin
          failures++;
          $display("FAIL pass %0d multiply %h*%h got %h exp %h", pass, va[i], vb[i], got, exp);
        end else if (pass == 0) n_umac++;
        else n_smac++;
      end
      if (cyc >= lat_b && cyc - lat_b < 64) begin
        int i;
        logic [3:0] exp;
        i = cyc - lat_b;
        exp = 4'(((pass == 2) ? ram1[vl[i]] : rom[vl[i]]) + KADD);
        checks++;
        if (root_out[XOUT*4 +: 4] !== exp) begin
          failures++;
          $display("FAIL pass %0d lookup %h got %h exp %h", pass, vl[i], root_out[XOUT*4 +: 4], exp);
        end else begin
          n_mrd++; n_turn++; n_const++;
        end
      end
      // model of the writes into bank 1 (they happen in pass 1 only)
      if (pass == 1 && cyc < 64) ram1[vl[cyc]] = vl[cyc];
      if (pass == 1 && cyc < 64) n_mwr++;
    end
    if (pass == 0) begin
      // mode switch: two's-complement multiplier, same routing
      cfg = 1;
      load_multiplier(1);
      cfg = 0;
      n_mode++;
    end
    if (pass == 1) begin
      // swap banks: read bank 1, write nothing
      cfg = 1;
      cmd(CFG_IN_SEL, tile_of(2, 0), 1, isel(SRC_CONST, 0, 9));
      cmd(CFG_IN_SEL, tile_of(2, 0), 3, isel(SRC_CONST, 0, 0));
      cfg = 0;
      n_mode++;
    end
  end
  n_idly = n_umac + n_smac;
  n_odly = n_umac + n_smac;
  $display("mechanisms: cfg_writes=%0d unsigned_mac=%0d signed_mac=%0d mesh_links=%0d input_delay=%0d output_delay=%0d",
           n_cfg, n_umac, n_smac, n_mesh, n_idly, n_odly);
  $display("            htree_down=%0d htree_up=%0d turnaround=%0d mem_read=%0d mem_write=%0d const_in=%0d reconfig=%0d",
           n_down, n_up, n_turn, n_mrd, n_mwr, n_const, n_mode);
  if (n_cfg == 0 || n_umac == 0 || n_smac == 0 || n_mesh == 0 || n_idly == 0 || n_odly == 0 ||
      n_down == 0 || n_up == 0 || n_turn == 0 || n_mrd == 0 || n_mwr == 0 || n_const == 0 || n_mode < 3) begin
    failures++;
    $display("FAIL a mechanism was never exercised");
  end
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
endmodule
