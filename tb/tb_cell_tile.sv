// tb_cell_tile: self-checking test of a cell with its crossbars and registers.
// Part 1 (mathematics mode, unsigned MAC cell loaded through configuration
// writes): a from mesh bus 3, b from H-tree nibble 1, c a constant, d from
// mesh bus 12 delayed by 2. Outputs: y[3:0] to mesh bus 5, y[7:4] to H-tree
// nibble 0 delayed by 3, a copy of slot 0 to mesh bus 10. Random inputs
// every cycle; each output is compared with a*b+c+d (or the copy) computed
// from the inputs seen the expected number of cycles earlier: 2 cycles
// (cell register + mesh register) plus the configured delays.
// Part 2 (memory mode): the 128 words are loaded by configuration writes and
// then read back through the crossbar (read address from the H-tree,
// result on mesh bus 0, latency 2); one word is rewritten by an ordinary
// write, with write address and data coming through the crossbar.
module tb_cell_tile;
  import mgr_pkg::*;
  logic clk = 0, rst_n = 0, cfg = 0;
  cfg_cmd_t cfg_cmd;
  nib_t mesh_in [NMESH];
  nib_t mesh_out [NMESH];
  logic [LEAF_W-1:0] ht_in, ht_out;
  int checks = 0, failures = 0;
  localparam int unsigned TID = 7;
  nib_t ha [64], hb [64], hd [64];
  nib_t mem [128];

  cell_tile #(.ID(TID)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2ms; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmd(input cfg_kind_e k, input int idx, input int data, input int unit = TID);
    @(negedge clk);
    cfg_cmd = '{valid: 1, kind: k, unit: 16'(unit), index: 16'(idx), data: 16'(data)};
    @(negedge clk);
    cfg_cmd = '0;
  endtask

  task automatic cmp(input nib_t got, input nib_t exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h @%0t", what, got, exp, $time); end
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

  initial begin
    elem_fn_e fn [16];
    logic [7:0] yneg;
    int cyc;
    cfg_cmd = '0; ht_in = 0;
    for (int i = 0; i < int'(NMESH); i++) mesh_in[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---------- part 1 ----------
    cfg = 1;
    cell_elem_fns('0, fn, yneg);
    for (int w = 0; w < 128; w++) cmd(CFG_CELL_MEM, w, int'(cell_cfg_word(fn, w)));
    cmd(CFG_CELL_MOD, 0, 1);
    cmd(CFG_IN_SEL, 0, isel(3, 0, 0));
    cmd(CFG_IN_SEL, 1, isel(SRC_HT0 + 1, 0, 0));
    cmd(CFG_IN_SEL, 2, isel(SRC_CONST, 0, 9));
    cmd(CFG_IN_SEL, 3, isel(12, 2, 0));
    cmd(CFG_OUT_SEL, 5, osel(1, 0));
    cmd(CFG_OUT_SEL, NMESH + 0, osel(2, 3));
    cmd(CFG_OUT_SEL, 10, osel(3, 0));
    cmd(CFG_CELL_MOD, 0, 0, TID + 1);   // other tile: must be ignored
    cfg = 0;
    for (cyc = 0; cyc < 60; cyc++) begin
      @(negedge clk);
      ha[cyc] = 4'($urandom); hb[cyc] = 4'($urandom); hd[cyc] = 4'($urandom);
      mesh_in[3] = ha[cyc]; ht_in[7:4] = hb[cyc]; mesh_in[12] = hd[cyc];
      ht_in[3:0] = 4'($urandom);
      #1;
      if (cyc >= 10) begin
        logic [7:0] p2, p5;
        p2 = 8'(ha[cyc-2] * hb[cyc-2] + 9 + hd[cyc-4]);
        p5 = 8'(ha[cyc-5] * hb[cyc-5] + 9 + hd[cyc-7]);
        cmp(mesh_out[5], p2[3:0], "y lo on mesh, latency 2");
        cmp(ht_out[3:0], p5[7:4], "y hi on H-tree, latency 2+3");
        cmp(mesh_out[10], ha[cyc-2], "copy of slot 0");
        cmp(mesh_out[0], 4'h0, "unused bus is zero");
      end
    end
    // ---------- part 2 ----------
    cfg = 1;
    for (int w = 0; w < 128; w++) begin
      mem[w] = 4'($urandom);
      cmd(CFG_CELL_MEM, w, int'(mem[w]));
    end
    cmd(CFG_CELL_MOD, 0, 0);
    cmd(CFG_IN_SEL, 0, isel(SRC_HT0, 0, 0));       // ra[3:0]
    cmd(CFG_IN_SEL, 1, isel(SRC_HT0 + 1, 0, 0));   // ra[7:4]
    cmd(CFG_IN_SEL, 2, isel(3, 0, 0));             // wa[3:0]
    cmd(CFG_IN_SEL, 3, isel(4, 0, 0));             // wa[7:4]
    cmd(CFG_IN_SEL, 4, isel(5, 0, 0));             // wi
    cmd(CFG_IN_SEL, 5, isel(SRC_CONST, 0, 4'hc));  // ri
    cmd(CFG_OUT_SEL, 0, osel(1, 0));
    cfg = 0;
    mesh_in[4] = 0;
    for (int w = 0; w < 128; w++) begin
      @(negedge clk);
      ht_in = {1'b1, 7'(w)};
      repeat (2) @(negedge clk);
      cmp(mesh_out[0], mem[w], "memory read");
    end
    ht_in = 8'h05; repeat (2) @(negedge clk);
    cmp(mesh_out[0], 4'hc, "ri when read disabled");
    // ordinary write of word 77
    @(negedge clk);
    mesh_in[3] = 4'hd; mesh_in[4] = 4'h8 | 4'h4; mesh_in[5] = ~mem[77];
    @(negedge clk); mesh_in[4] = 0;
    ht_in = {1'b1, 7'd77};
    repeat (2) @(negedge clk);
    cmp(mesh_out[0], ~mem[77], "ordinary write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
