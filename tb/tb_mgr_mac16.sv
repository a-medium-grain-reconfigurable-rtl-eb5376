// tb_mgr_mac16: a 16-bit multiply-accumulate module, Y = A*B + C + D, mapped
// on a 4x4 block of cells of an 8x8 array, streaming one new operation per
// clock cycle.
// Mapping: digit position (r,k) (r = digit of B, k = digit of A) sits at
// tile (1+r, 4-k), so the least significant A digit is on the east side.
// The sixteen cells form the nested L-shaped chains of the MAC structure:
// chain s runs down column (4-s) of the digit matrix and then along its row
// s-1; each cell adds one result digit of the inner chain (diagonal mesh
// neighbour) and the high digit of its predecessor (vertical or horizontal
// neighbour). The last cell of chain s takes the inner chain's final high
// digit, which is ready two cycles before the other operands, so that input
// slot uses two delay registers. Every cell takes its own a and b digit from the H-tree; the
// digits for the cell at chain position p are sent 2p cycles after the
// first ones (staggered input, as for every module of the array), matching
// the two cycles per cell of the ripple. The digits of C and D enter at the
// row-0 tiles above the block and are passed down to the top row by those
// cells (copies of their inputs), two cycles earlier. Result digit q leaves
// at cycle 2q+2 after its first operands (staggered output) and goes up the
// H-tree. Runs unsigned, then with two's-complement element functions.
// Expected values are plain integer arithmetic; the latency of every result
// digit is checked.
module tb_mgr_mac16;
  import mgr_pkg::*;
  localparam int unsigned DIM = 8;
  localparam int unsigned NT = DIM * DIM;
  localparam int unsigned LEVELS = $clog2(NT);
  localparam int unsigned H = LEVELS / 2;
  localparam int NDIG = 4;
  logic clk = 0, rst_n = 0, cfg = 0;
  cfg_cmd_t cfg_cmd;
  logic [LEAF_W*NT-1:0] root_in, root_out;
  int checks = 0, failures = 0;
  int n_ops = 0, n_signed = 0, n_chain = 0;

  mgr_array #(.DIM(DIM)) dut (
    .clk, .rst_n, .cfg, .cfg_cmd, .ht_root_in (root_in), .ht_root_out (root_out)
  );

  always #5 clk = ~clk;

  initial begin
    #10ms; failures++;
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
  function automatic int trow(int r); return 1 + r; endfunction
  function automatic int tcol(int k); return NDIG - k; endfunction
  function automatic int tid(int r, int k); return trow(r) * DIM + tcol(k); endfunction

  task automatic cmd(input cfg_kind_e kd, input int unit, input int idx, input int data);
    @(negedge clk);
    cfg_cmd = '{valid: 1, kind: kd, unit: 16'(unit), index: 16'(idx), data: 16'(data)};
    @(negedge clk);
    cfg_cmd = '0;
  endtask
  task automatic route_down(input int x, input int lf);
    for (int l = LEVELS; l >= 1; l--)
      cmd(CFG_SWITCH, (NT + lf) >> l,
          ((((lf >> (l - 1)) & 1) ? SW_CIN_R : SW_CIN_L) << 14) | (x % (1 << l)),
          ((x >> l) & 1) ? LNK_PHI : LNK_PLO);
  endtask
  task automatic route_up(input int x, input int lf);
    for (int l = 1; l <= LEVELS; l++)
      cmd(CFG_SWITCH, (NT + lf) >> l,
          ((((x >> l) & 1) ? SW_POUT_H : SW_POUT_L) << 14) | (x % (1 << l)),
          ((lf >> (l - 1)) & 1) ? LNK_CR : LNK_CL);
  endtask
  function automatic int isel(int src, int dly, int kk);
    in_sel_t s;
    s = '0; s.src = 5'(src); s.delay = 3'(dly); s.konst = 4'(kk);
    return int'(s);
  endfunction
  function automatic int osel(int src, int dly);
    out_sel_t s;
    s = '0; s.src = 4'(src); s.delay = 3'(dly);
    return int'(s);
  endfunction
  // mesh bus index at the receiver for data coming from tile offset (dr,dc)
  function automatic int from_dir(int dr, int dc, int bus);
    dir_e d;
    if (dr < 0) d = (dc < 0) ? DIR_NW : (dc > 0) ? DIR_NE : DIR_N;
    else if (dr > 0) d = (dc < 0) ? DIR_SW : (dc > 0) ? DIR_SE : DIR_S;
    else d = (dc < 0) ? DIR_W : DIR_E;
    return int'(d) * MESH_BUS + bus;
  endfunction

  // result digit q of chain s comes from position q (low digit) or, for the
  // last one, the high digit of position 2s-2
  function automatic void inner_src(int s, int q, output int ps, output int hi);
    if (q <= 2*s-2) begin ps = q; hi = 0; end
    else begin ps = 2*s-2; hi = 1; end
  endfunction

  // route an output slot of the cell at digit (r1,k1) to input slot 'slot'
  // of the cell at digit (r2,k2), using mesh bus 'bus'
  task automatic mesh_link(int r1, int k1, int oslot, int r2, int k2, int slot, int bus, int dly);
    int dr, dc;
    dr = trow(r2) - trow(r1); dc = tcol(k2) - tcol(k1);
    cmd(CFG_OUT_SEL, tid(r1, k1), from_dir(dr, dc, bus), osel(oslot, 0));
    cmd(CFG_IN_SEL, tid(r2, k2), slot, isel(from_dir(-dr, -dc, bus), dly, 0));
    n_chain++;
  endtask

  logic ylo_neg [1:4][0:6];
  logic yhi_neg [1:4][0:6];

  task automatic load_formats(input bit sgn);
    for (int s = 1; s <= NDIG; s++)
      for (int p = 0; p <= 2*s-2; p++) begin
        int r, k, ps, hi;
        cell_fmt_t f;
        elem_fn_e fn [16];
        logic [7:0] yn;
        r = chain_row(s, p); k = chain_col(s, p);
        f.a = sgn && k == NDIG-1;
        f.b = sgn && r == NDIG-1;
        if (p == 0) begin
          f.c = sgn && (NDIG - s == NDIG-1);
          f.d = f.c;
        end else begin
          inner_src(s-1, p-1, ps, hi);
          f.c = hi ? yhi_neg[s-1][ps] : ylo_neg[s-1][ps];
          f.d = yhi_neg[s][p-1];
        end
        cell_elem_fns(f, fn, yn);
        checks++;
        if ((yn & 8'h77) != 0) begin failures++; $display("FAIL non-standard output format in cell %0d,%0d", r, k); end
        ylo_neg[s][p] = yn[3];
        yhi_neg[s][p] = yn[7];
        for (int w = 0; w < 128; w++) cmd(CFG_CELL_MEM, tid(r, k), w, int'(cell_cfg_word(fn, w)));
      end
  endtask

  task automatic map_mac();
    for (int s = 1; s <= NDIG; s++)
      for (int p = 0; p <= 2*s-2; p++) begin
        int r, k, lf;
        r = chain_row(s, p); k = chain_col(s, p);
        lf = leaf_of(trow(r), tcol(k));
        cmd(CFG_CELL_MOD, tid(r, k), 0, 1);
        route_down(2*lf, lf);
        route_down(2*lf + 1, lf);
        cmd(CFG_IN_SEL, tid(r, k), 0, isel(SRC_HT0, 0, 0));
        cmd(CFG_IN_SEL, tid(r, k), 1, isel(SRC_HT0 + 1, 0, 0));
        if (p == 0) begin
          // C and D digit from the tile above, which copies its H-tree nibbles
          int up, ulf;
          up = (trow(r) - 1) * DIM + tcol(k);
          ulf = leaf_of(trow(r) - 1, tcol(k));
          route_down(2*ulf, ulf);
          route_down(2*ulf + 1, ulf);
          cmd(CFG_IN_SEL, up, 0, isel(SRC_HT0, 0, 0));
          cmd(CFG_IN_SEL, up, 1, isel(SRC_HT0 + 1, 0, 0));
          cmd(CFG_OUT_SEL, up, from_dir(1, 0, 0), osel(3, 0));
          cmd(CFG_OUT_SEL, up, from_dir(1, 0, 1), osel(4, 0));
          cmd(CFG_IN_SEL, tid(r, k), 2, isel(from_dir(-1, 0, 0), 0, 0));
          cmd(CFG_IN_SEL, tid(r, k), 3, isel(from_dir(-1, 0, 1), 0, 0));
        end else begin
          int ps, hi;
          inner_src(s-1, p-1, ps, hi);
          mesh_link(chain_row(s-1, ps), chain_col(s-1, ps), hi ? 2 : 1, r, k, 2, 0, hi ? 2 : 0);
          mesh_link(chain_row(s, p-1), chain_col(s, p-1), 2, r, k, 3, 1, 0);
        end
        if (s == NDIG) begin
          cmd(CFG_OUT_SEL, tid(r, k), NMESH + 0, osel(1, 0));
          route_up(2*lf, lf);
          if (p == 2*s-2) begin
            cmd(CFG_OUT_SEL, tid(r, k), NMESH + 1, osel(2, 0));
            route_up(2*lf + 1, lf);
          end
        end
      end
  endtask

  localparam int NOPS = 48;
  localparam int TSPAN = NOPS + 40;
  logic [15:0] A [TSPAN], B [TSPAN], C [TSPAN], D [TSPAN];

  initial begin
    cfg_cmd = '0; root_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cfg = 1;
    load_formats(0);
    map_mac();
    cfg = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < TSPAN; i++) begin
        A[i] = 16'($urandom); B[i] = 16'($urandom); C[i] = 16'($urandom); D[i] = 16'($urandom);
      end
      A[0] = 16'h8000; B[0] = 16'h8000; C[0] = 16'h7fff; D[0] = 16'h7fff;
      A[1] = 16'hffff; B[1] = 16'hffff; C[1] = 16'hffff; D[1] = 16'hffff;
      // cycle t: operation i = t - 2p - 2 enters the cell at position p
      // (C and D two cycles earlier, at the tile above)
      for (int t = 0; t < TSPAN; t++) begin
        @(negedge clk);
        root_in = '0;
        for (int s = 1; s <= NDIG; s++)
          for (int p = 0; p <= 2*s-2; p++) begin
            int r, k, lf, i;
            r = chain_row(s, p); k = chain_col(s, p);
            lf = leaf_of(trow(r), tcol(k));
            i = t - 2*p - 2;
            if (i >= 0 && i < NOPS) begin
              root_in[(2*lf)*4 +: 4]   = A[i][4*k +: 4];
              root_in[(2*lf+1)*4 +: 4] = B[i][4*r +: 4];
            end
            if (p == 0 && t < NOPS) begin
              int ulf;
              ulf = leaf_of(trow(r) - 1, tcol(k));
              root_in[(2*ulf)*4 +: 4]   = C[t][4*(NDIG - s) +: 4];
              root_in[(2*ulf+1)*4 +: 4] = D[t][4*(NDIG - s) +: 4];
            end
          end
        #1;
        // result digit q of operation i appears at cycle i + 2 + 2q + 2 + 2H
        for (int q = 0; q < 2*NDIG; q++) begin
          int i, qq, lf, j;
          logic [31:0] full;
          qq = (q == 2*NDIG-1) ? 2*NDIG-2 : q;
          j = (q == 2*NDIG-1) ? 1 : 0;
          i = t - (2 + 2*qq + 2 + 2*H);
          if (i >= 0 && i < NOPS) begin
            lf = leaf_of(trow(chain_row(NDIG, qq)), tcol(chain_col(NDIG, qq)));
            full = (pass == 0) ? 32'(A[i]) * 32'(B[i]) + 32'(C[i]) + 32'(D[i])
                               : 32'($signed(A[i]) * $signed(B[i]) + $signed(C[i]) + $signed(D[i]));
            checks++;
            if (root_out[(2*lf + j)*4 +: 4] !== full[4*q +: 4]) begin
              failures++;
              $display("FAIL pass %0d op %0d digit %0d got %h exp %h (A=%h B=%h C=%h D=%h)",
                       pass, i, q, root_out[(2*lf + j)*4 +: 4], full[4*q +: 4], A[i], B[i], C[i], D[i]);
            end else if (q == 2*NDIG-1) begin
              n_ops++;
              if (pass == 1) n_signed++;
            end
          end
        end
      end
      if (pass == 0) begin
        cfg = 1;
        load_formats(1);
        cfg = 0;
      end
    end
    $display("operations=%0d signed=%0d mesh_links=%0d", n_ops, n_signed, n_chain);
    if (n_ops == 0 || n_signed == 0) begin failures++; $display("FAIL no complete operation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
