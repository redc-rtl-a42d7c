// comparator_unit: Comparator Unit of the DCCU.
//
// Chooses the PDN whose result has fewer deflections: sel2 is 1 when PDN2's
// count is strictly below PDN1's. On a tie PDN1 is kept; the tie rule is this
// design's choice. Combinational.
module comparator_unit
  import redc_pkg::*;
(
  input  logic [CNT_W-1:0] count1,
  input  logic [CNT_W-1:0] count2,
  output logic             sel2
);

  assign sel2 = (count2 < count1);

endmodule
