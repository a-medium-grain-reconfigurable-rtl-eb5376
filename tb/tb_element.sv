// tb_element: self-checking test of one element.
// Fills both banks with random bits through the write port, checks every
// address of both banks on y/z and on ro (each read enable, and the ri
// pass-through with no enable), checks that a write to one bank leaves the
// other alone, and that reading one address while writing another works.
module tb_element;
  logic clk = 0;
  logic [3:0] ra, wa;
  logic [1:0] re, we;
  logic ri, wi, ro, y, z;
  int checks = 0, failures = 0;
  logic [15:0] m0, m1;

  element dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %b exp %b", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    re = 0; we = 0; ra = 0; wa = 0; ri = 0; wi = 0;
    for (int round = 0; round < 4; round++) begin
      m0 = 16'($urandom); m1 = 16'($urandom);
      for (int i = 0; i < 16; i++) begin
        @(negedge clk); wa = 4'(i); we = 2'b01; wi = m0[i];
        @(negedge clk); we = 2'b10; wi = m1[i];
      end
      @(negedge clk); we = 0;
      for (int i = 0; i < 16; i++) begin
        ra = 4'(i);
        for (int e = 0; e < 4; e++) begin
          re = 2'(e); ri = 1'($urandom);
          #1;
          check(y, m0[i], "y");
          check(z, m1[i], "z");
          check(ro, e == 1 ? m0[i] : e == 2 ? m1[i] : e == 3 ? m0[i] : ri, "ro");
        end
      end
      // write bank 1 only at one address while reading another
      @(negedge clk);
      wa = 4'($urandom); ra = wa + 4'd1; we = 2'b10; wi = ~m1[wa]; re = 2'b10;
      #1 check(ro, m1[ra], "read during write");
      @(negedge clk); we = 0;
      m1[wa] = ~m1[wa];
      ra = wa; #1;
      check(y, m0[wa], "bank0 untouched");
      check(z, m1[wa], "bank1 written");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
