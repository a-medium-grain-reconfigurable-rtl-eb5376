// mgr_array: top level of the medium-grain reconfigurable array.
//
// A DIM x DIM array of 4-bit parallel cells (cell_tile), connected by two
// networks:
//   local mesh  - every tile sends MESH_BUS 4-bit busses to each of its eight
//                 neighbours (N, NE, E, SE, S, SW, W, NW; row 0 is north,
//                 column 0 is west). Busses off the edge of the array read 0.
//   global tree - a binary H-tree (htree_node) whose leaves are the tiles,
//                 taken in Morton order (leaf bits alternate column and row
//                 bits, column bit lowest) so that each level splits a block
//                 alternately across columns and rows. Each leaf bus is
//                 LEAF_W = 8 bits; the root bus, LEAF_W*DIM*DIM bits, is
//                 brought out as ht_root_in / ht_root_out for data to and
//                 from outside.
// Algorithms are mapped as word-length modules (multipliers, adders, memory
// units ...) on blocks of cells, by configuration only.
// Configuration: while cfg is high, every cell is in memory mode; one command
// per cycle on cfg_cmd writes a cell word, a cell's mode, a crossbar setting
// or an H-tree link (see mgr_pkg). Commands reach every tile and switch in
// the same cycle; each unit acts only on commands with its own number
// (tiles: row*DIM+col, switches: heap order, root = 1).
// The default DIM = 32 is the 1024-cell array the document uses for its
// reconfiguration and FFT figures. The dedicated configuration port replaces
// the document's loading of configuration data through the H-tree; see the
// README.
module mgr_array #(
  parameter int unsigned DIM = 32     // cells per row and per column, power of two
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  logic                                      cfg,
  input  mgr_pkg::cfg_cmd_t                         cfg_cmd,
  input  logic [mgr_pkg::LEAF_W*DIM*DIM-1:0]        ht_root_in,
  output logic [mgr_pkg::LEAF_W*DIM*DIM-1:0]        ht_root_out
);
  import mgr_pkg::*;

  localparam int unsigned NT     = DIM * DIM;
  localparam int unsigned LEVELS = $clog2(NT);
  localparam int unsigned LB     = $clog2(DIM);

  // Morton index of tile (r, c)
  function automatic int unsigned leaf_of(int unsigned r, int unsigned c);
    int unsigned v;
    v = 0;
    for (int i = 0; i < int'(LB); i++) begin
      v |= ((c >> i) & 1) << (2*i);
      v |= ((r >> i) & 1) << (2*i + 1);
    end
    return v;
  endfunction

  nib_t mesh_o [DIM][DIM][NMESH];
  logic [LEAF_W*NT-1:0] leaf_in, leaf_out;

  for (genvar r = 0; r < int'(DIM); r++) begin : g_row
    for (genvar c = 0; c < int'(DIM); c++) begin : g_col
      localparam int unsigned LF = leaf_of(r, c);
      nib_t mesh_i [NMESH];

      // incoming bus from direction dd comes from the neighbour in that
      // direction, which sends it towards the opposite direction
      for (genvar dd = 0; dd < int'(NDIR); dd++) begin : g_dir
        localparam int DR = (dd == 0 || dd == 1 || dd == 7) ? -1 : (dd == 3 || dd == 4 || dd == 5) ? 1 : 0;
        localparam int DC = (dd == 1 || dd == 2 || dd == 3) ?  1 : (dd == 5 || dd == 6 || dd == 7) ? -1 : 0;
        localparam int NR = r + DR;
        localparam int NC = c + DC;
        localparam int OD = (dd + 4) % 8;
        for (genvar bb = 0; bb < int'(MESH_BUS); bb++) begin : g_bus
          if (NR < 0 || NR >= int'(DIM) || NC < 0 || NC >= int'(DIM)) begin : g_edge
            assign mesh_i[dd*MESH_BUS+bb] = '0;
          end else begin : g_link
            assign mesh_i[dd*MESH_BUS+bb] = mesh_o[NR][NC][OD*MESH_BUS+bb];
          end
        end
      end

      cell_tile #(.ID(r*DIM + c)) u_tile (
        .clk, .rst_n, .cfg, .cfg_cmd,
        .mesh_in  (mesh_i),
        .mesh_out (mesh_o[r][c]),
        .ht_in    (leaf_in [LF*LEAF_W +: LEAF_W]),
        .ht_out   (leaf_out[LF*LEAF_W +: LEAF_W])
      );
    end
  end

  htree_node #(.LEVEL(LEVELS), .LEAF_W(LEAF_W), .ID(1)) u_tree (
    .clk, .rst_n, .cfg_cmd,
    .p_in (ht_root_in), .p_out (ht_root_out),
    .leaf_in, .leaf_out
  );
endmodule
