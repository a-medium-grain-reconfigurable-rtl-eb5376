// cell_tile: one parallel cell with its interface to the interconnect.
//
// Data path, one clock per stage:
//   input crossbar  - each of the six cell input slots picks one incoming
//                     4-bit bus: a mesh bus from one of the eight neighbours
//                     (MESH_BUS per direction), a nibble of the H-tree leaf
//                     bus, or a constant. Each slot can be delayed by 0..7
//                     extra registers to line operands up in time.
//   cell            - mathematics mode: slots 0..3 are a, b, c, d.
//                     memory mode: slots 0..5 are ra[3:0], ra[7:4], wa[3:0],
//                     wa[7:4], wi, ri.
//   cell register   - output slots: 0 = y[3:0] (or ro in memory mode),
//                     1 = y[7:4], 2..7 = copies of input slots 0..5, so data
//                     can be passed on through a chain of cells.
//   output crossbar - every outgoing mesh bus and H-tree leaf nibble picks an
//                     output slot (or zero), with 0..7 extra delay registers,
//                     and is registered (the mesh transfer cycle).
// So a cell result reaches a neighbouring cell's input two cycles after its
// operands entered: one for the cell and one for the local mesh.
// Control unit: configuration commands (mgr_pkg::cfg_cmd_t) addressed to
// this tile write the crossbar settings, the mode bit and, as ordinary
// memory-mode writes, the 128 words of the cell. While cfg is high the cell
// is held in memory mode and only configuration writes reach it.
// Crossbar settings and the mode are cleared by reset; the cell memory is not.
// The crossbar and delay-register arrangement follows the document's
// description of the cell interface; slot assignment, delay depth, constant
// inputs and the command format are this design's choices.
module cell_tile #(
  parameter int unsigned ID = 0    // tile number, row*COLS + col
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        cfg,
  input  mgr_pkg::cfg_cmd_t           cfg_cmd,
  input  mgr_pkg::nib_t               mesh_in  [mgr_pkg::NMESH],
  output mgr_pkg::nib_t               mesh_out [mgr_pkg::NMESH],
  input  logic [mgr_pkg::LEAF_W-1:0]  ht_in,
  output logic [mgr_pkg::LEAF_W-1:0]  ht_out
);
  import mgr_pkg::*;

  in_sel_t  isel [CELL_IN];
  out_sel_t osel [NDEST];
  logic     math_r;

  wire hit = cfg_cmd.valid && cfg_cmd.unit == 16'(ID);

  // ---------------- control unit ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(CELL_IN); i++) isel[i] <= '0;
      for (int j = 0; j < int'(NDEST); j++)   osel[j] <= '0;
      math_r <= 1'b0;
    end else if (hit) begin
      unique case (cfg_cmd.kind)
        CFG_IN_SEL:   if (cfg_cmd.index < 16'(CELL_IN)) isel[cfg_cmd.index] <= in_sel_t'(cfg_cmd.data);
        CFG_OUT_SEL:  if (cfg_cmd.index < 16'(NDEST))   osel[cfg_cmd.index] <= out_sel_t'(cfg_cmd.data);
        CFG_CELL_MOD: math_r <= cfg_cmd.data[0];
        default: ;
      endcase
    end
  end

  // ---------------- input crossbar ----------------
  nib_t src_sel [CELL_IN];
  nib_t idly    [CELL_IN][DLY_MAX];
  nib_t slot    [CELL_IN];

  always_comb begin
    for (int i = 0; i < int'(CELL_IN); i++) begin
      if (isel[i].src < 5'(NMESH))                src_sel[i] = mesh_in[isel[i].src];
      else if (isel[i].src < 5'(SRC_CONST))       src_sel[i] = ht_in[(32'(isel[i].src) - SRC_HT0)*M +: M];
      else if (isel[i].src == 5'(SRC_CONST))      src_sel[i] = isel[i].konst;
      else                                        src_sel[i] = '0;
      slot[i] = (isel[i].delay == 0) ? src_sel[i] : idly[i][isel[i].delay - 3'd1];
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < int'(CELL_IN); i++) begin
      idly[i][0] <= src_sel[i];
      for (int k = 1; k < int'(DLY_MAX); k++) idly[i][k] <= idly[i][k-1];
    end
  end

  // ---------------- cell ----------------
  logic       cmath;
  logic [7:0] cra, cwa, cy;
  nib_t       cwi, cro;

  always_comb begin
    cmath = math_r && !cfg;
    cra   = {slot[1], slot[0]};
    if (cfg) begin
      cwa = (hit && cfg_cmd.kind == CFG_CELL_MEM) ? {1'b1, cfg_cmd.index[6:0]} : 8'h00;
      cwi = cfg_cmd.data[3:0];
    end else begin
      cwa = {slot[3], slot[2]};
      cwi = slot[4];
    end
  end

  parallel_cell u_cell (
    .clk (clk), .math (cmath),
    .a (slot[0]), .b (slot[1]), .c (slot[2]), .d (slot[3]), .y (cy),
    .ra (cra), .wa (cwa), .wi (cwi), .ri (slot[5]), .ro (cro)
  );

  // cell pipeline register
  nib_t outs [CELL_OUT];
  always_ff @(posedge clk) begin
    outs[0] <= cmath ? cy[3:0] : cro;
    outs[1] <= cy[7:4];
    for (int i = 0; i < int'(CELL_IN); i++) outs[2+i] <= slot[i];
  end

  // ---------------- output crossbar ----------------
  nib_t osrc [NDEST];
  nib_t odly [NDEST][DLY_MAX];
  nib_t dest [NDEST];

  always_comb begin
    for (int j = 0; j < int'(NDEST); j++) begin
      if (osel[j].src == 0 || osel[j].src > 4'(CELL_OUT)) osrc[j] = '0;
      else                                                 osrc[j] = outs[osel[j].src - 4'd1];
    end
  end

  always_ff @(posedge clk) begin
    for (int j = 0; j < int'(NDEST); j++) begin
      odly[j][0] <= osrc[j];
      for (int k = 1; k < int'(DLY_MAX); k++) odly[j][k] <= odly[j][k-1];
      dest[j] <= (osel[j].delay == 0) ? osrc[j] : odly[j][osel[j].delay - 3'd1];
    end
  end

  always_comb begin
    for (int j = 0; j < int'(NMESH); j++) mesh_out[j] = dest[j];
    for (int h = 0; h < int'(HT_NIB); h++) ht_out[h*M +: M] = dest[NMESH + h];
  end
endmodule
