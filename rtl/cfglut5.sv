// cfglut5: model of a 5-input dynamically reconfigurable look-up table, the
// shift-register LUT found in the SLICEM slices of Virtex-5 / Spartan-6 and
// later devices.
//
// The 32-entry truth table is a shift register. While CE is high, every rising
// CLK edge shifts CDI into bit 0 and moves every bit one place up; bit 31 leaves
// on CDO, so LUTs can be chained. Reading is combinational: O6 is the table
// entry addressed by I4..I0 (one 5-input function); O5 is the entry addressed by
// I3..I0 in the lower half, so with I4 tied high the cell gives two 4-input
// functions on shared inputs (O6 from bits 31:16, O5 from bits 15:0).
// Shifting 16 new bits replaces the lower half only, which is why a 4-input
// table can be exchanged in 16 cycles and a 5-input one in 32.
// Ports and the INIT parameter use the primitive's names.
module cfglut5 #(
  parameter logic [31:0] INIT = 32'h0000_0000
) (
  input  logic CLK,
  input  logic CE,
  input  logic CDI,
  input  logic I0,
  input  logic I1,
  input  logic I2,
  input  logic I3,
  input  logic I4,
  output logic O6,
  output logic O5,
  output logic CDO
);
  logic [31:0] tab = INIT;

  always_ff @(posedge CLK) begin
    if (CE) tab <= {tab[30:0], CDI};
  end

  assign O6  = tab[{I4, I3, I2, I1, I0}];
  assign O5  = tab[{1'b0, I3, I2, I1, I0}];
  assign CDO = tab[31];
endmodule
