// Cycle-count to distance conversion.
//
// One 2.7 MHz period is 0.125 mm of sound travel (340000 mm/s / 2.7 MHz),
// so a distance in millimetres is the count shifted right by three bits.
// The result keeps nine bits, enough for differences up to 511 mm, as in
// the original design. Purely combinational.
module cycles_to_mm #(
  parameter int unsigned CW = 12,
  parameter int unsigned DW = 9
) (
  input  logic [CW-1:0] delta0,
  input  logic [CW-1:0] delta1,
  input  logic [CW-1:0] delta2,
  output logic [DW-1:0] d0,
  output logic [DW-1:0] d1,
  output logic [DW-1:0] d2
);
  assign d0 = DW'(delta0 >> 3);
  assign d1 = DW'(delta1 >> 3);
  assign d2 = DW'(delta2 >> 3);
endmodule
