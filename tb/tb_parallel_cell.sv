// tb_parallel_cell: self-checking test of the 4-bit parallel cell.
// 1. Memory mode: writes 128 random words, reads them all back, checks the
//    ri pass-through when the read enable is off, and a simultaneous read
//    and write of different addresses.
// 2. Mathematics mode: for each operand-format row of the two's-complement
//    MAC format table (alpha1 ... delta1, plus gamma1), loads the cell with
//    the element functions chosen by mgr_pkg::cell_elem_fns through ordinary
//    memory-mode writes (128 of them), then applies all 65536 combinations of
//    a, b, c, d and compares y with a*b+c+d computed from the operands read
//    with those formats; y[3:0] and y[7:4] are read with the output formats
//    the table gives. Also checks the perfect squares 0..15 of the prototype
//    test as an unsigned multiplier.
module tb_parallel_cell;
  import mgr_pkg::*;
  logic clk = 0;
  logic math;
  logic [3:0] a, b, c, d, wi, ri, ro;
  logic [7:0] y, ra, wa;
  int checks = 0, failures = 0;
  logic [3:0] mem [128];

  parallel_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sval(logic [3:0] v, logic signed_fmt);
    return signed_fmt ? int'($signed(v)) : int'(v);
  endfunction

  task automatic load(input cell_fmt_t fmt);
    elem_fn_e fn [16];
    logic [7:0] yneg;
    cell_elem_fns(fmt, fn, yneg);
    math = 0; ra = 0;
    for (int w = 0; w < 128; w++) begin
      @(negedge clk);
      wa = {1'b1, 7'(w)}; wi = cell_cfg_word(fn, w);
    end
    @(negedge clk); wa = 0; math = 1;
  endtask

  // name, a, b, c, d, y_hi, y_lo (1 = two's complement)
  typedef struct { string name; logic fa, fb, fc, fd, fyh, fyl; } fmt_row_t;
  fmt_row_t rows [8];

  initial begin
    math = 0; wa = 0; ra = 0; wi = 0; ri = 0; a = 0; b = 0; c = 0; d = 0;
    // ---- memory mode ----
    for (int w = 0; w < 128; w++) begin
      @(negedge clk); mem[w] = 4'($urandom); wa = {1'b1, 7'(w)}; wi = mem[w];
    end
    @(negedge clk); wa = 0;
    for (int w = 0; w < 128; w++) begin
      ra = {1'b1, 7'(w)}; ri = 4'($urandom); #1;
      checks++;
      if (ro !== mem[w]) begin failures++; $display("FAIL mem read %0d got %h exp %h", w, ro, mem[w]); end
    end
    ra = 8'h35; ri = 4'ha; #1;
    checks++; if (ro !== 4'ha) begin failures++; $display("FAIL ri pass-through"); end
    @(negedge clk); ra = {1'b1, 7'd9}; wa = {1'b1, 7'd100}; wi = ~mem[100]; #1;
    checks++; if (ro !== mem[9]) begin failures++; $display("FAIL read during write"); end
    @(negedge clk); wa = 0; ra = {1'b1, 7'd100}; #1;
    checks++; if (ro !== ~mem[100]) begin failures++; $display("FAIL simultaneous write"); end

    // ---- mathematics mode ----
    rows[0] = '{"alpha1", 0,0,0,0, 0,0};
    rows[1] = '{"alpha2", 1,0,1,1, 1,1};
    rows[2] = '{"beta1",  0,0,1,0, 0,1};
    rows[3] = '{"beta2",  0,1,0,1, 1,0};
    rows[4] = '{"gamma1", 0,0,0,1, 0,1};
    rows[5] = '{"gamma2", 0,1,1,0, 1,0};
    rows[6] = '{"gamma3", 1,0,1,0, 1,0};
    rows[7] = '{"delta1", 1,1,1,1, 1,0};
    for (int t = 0; t < 8; t++) begin
      int bad;
      bad = 0;
      load('{a: rows[t].fa, b: rows[t].fb, c: rows[t].fc, d: rows[t].fd});
      for (int v = 0; v < 65536; v++) begin
        int expv, got;
        {a, b, c, d} = 16'(v);
        #1;
        expv = sval(a, rows[t].fa) * sval(b, rows[t].fb) + sval(c, rows[t].fc) + sval(d, rows[t].fd);
        got = sval(y[3:0], rows[t].fyl) + 16 * sval(y[7:4], rows[t].fyh);
        checks++;
        if (got != expv) begin
          failures++;
          if (bad++ < 4) $display("FAIL %s a=%h b=%h c=%h d=%h y=%h got %0d exp %0d", rows[t].name, a, b, c, d, y, got, expv);
        end
      end
    end
    // perfect squares, unsigned multiplier
    load('{a: 0, b: 0, c: 0, d: 0});
    for (int i = 0; i < 16; i++) begin
      a = 4'(i); b = 4'(i); c = 0; d = 0; #1;
      checks++;
      if (y !== 8'(i * i)) begin failures++; $display("FAIL square %0d: %h", i, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
