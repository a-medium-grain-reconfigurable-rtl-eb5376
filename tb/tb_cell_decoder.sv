// tb_cell_decoder: exhaustive check of the cell's row/bank enable decoder
// against an independent model (enable bit, row = bits 2:1, bank = bit 0),
// in both modes.
module tb_cell_decoder;
  logic math;
  logic [3:0] ra_hi, wa_hi;
  logic [1:0] re [4];
  logic [1:0] we [4];
  int checks = 0, failures = 0;

  cell_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++)
      for (int x = 0; x < 16; x++)
        for (int w = 0; w < 16; w++) begin
          math = 1'(m); ra_hi = 4'(x); wa_hi = 4'(w);
          #1;
          for (int r = 0; r < 4; r++) begin
            logic [1:0] er, ew;
            er = (m == 0 && x[3] && x[2:1] == r) ? (x[0] ? 2'b10 : 2'b01) : 2'b00;
            ew = (m == 0 && w[3] && w[2:1] == r) ? (w[0] ? 2'b10 : 2'b01) : 2'b00;
            checks++;
            if (re[r] !== er || we[r] !== ew) begin
              failures++;
              $display("FAIL m=%0d ra=%h wa=%h row %0d re=%b/%b we=%b/%b", m, x, w, r, re[r], er, we[r], ew);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
