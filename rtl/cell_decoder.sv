// cell_decoder: read/write enable decoder of the parallel cell.
//
// The parallel cell is a 4x4 matrix of elements. In memory mode it is a
// 128x4-bit RAM: address bit 7 is the enable, bits 6:5 pick the row of
// elements and bit 4 picks the bank inside the elements of that row; bits
// 3:0 go straight to every element. This block turns the upper four bits of
// the read and of the write address into one pair of bank enables per row.
// In mathematics mode every enable is off, so the matrix acts only as lookup
// tables and is never written.
// The split of bits 6:4 into row and bank is this design's choice; the
// document says only that the upper four bits make the row enables.
// Purely combinational.
module cell_decoder (
  input  logic       math,     // 1: mathematics mode
  input  logic [3:0] ra_hi,    // ra[7:4]
  input  logic [3:0] wa_hi,    // wa[7:4]
  output logic [1:0] re [4],   // per row: bank read enables
  output logic [1:0] we [4]    // per row: bank write enables
);
  always_comb begin
    for (int r = 0; r < 4; r++) begin
      re[r] = '0;
      we[r] = '0;
    end
    if (!math) begin
      if (ra_hi[3]) re[ra_hi[2:1]][ra_hi[0]] = 1'b1;
      if (wa_hi[3]) we[wa_hi[2:1]][wa_hi[0]] = 1'b1;
    end
  end
endmodule
