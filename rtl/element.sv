// element: the 1-bit processing element of the cell (static design).
//
// A 32-bit memory split into two banks of sixteen bits, with a separate read
// port and write port so a cell can read one address while writing another.
//   read : ra selects one bit in each bank. re[0] puts bank 0 on ro, re[1]
//          puts bank 1 on ro; with neither enabled ro repeats ri, so elements
//          can be chained into a column that behaves as one wider memory.
//   write: wa selects one bit in each bank; on the rising clock edge the bit
//          of every bank whose we bit is set takes the value wi.
//   math : the cell drives ra with the four function inputs {d,c,b,a}; y is
//          the addressed bit of bank 0 and z that of bank 1, so the element
//          is a 4-input, 2-output lookup table.
// Reads are combinational, as in the static element of the document; the
// write is gated by the clock, which the document suggests for the static
// element. If both read enables are set, bank 0 wins (this design's choice;
// the cell decoder never sets both).
module element (
  input  logic       clk,
  input  logic [3:0] ra,   // read address, or {d,c,b,a} in mathematics mode
  input  logic [1:0] re,   // bank read enables
  input  logic       ri,   // default read data
  output logic       ro,   // read data
  input  logic [3:0] wa,   // write address
  input  logic [1:0] we,   // bank write enables
  input  logic       wi,   // write data
  output logic       y,    // bank 0 bit at ra
  output logic       z     // bank 1 bit at ra
);
  logic [15:0] bank0, bank1;

  always_ff @(posedge clk) begin
    if (we[0]) bank0[wa] <= wi;
    if (we[1]) bank1[wa] <= wi;
  end

  assign y = bank0[ra];
  assign z = bank1[ra];

  always_comb begin
    if (re[0])      ro = y;
    else if (re[1]) ro = z;
    else            ro = ri;
  end
endmodule
