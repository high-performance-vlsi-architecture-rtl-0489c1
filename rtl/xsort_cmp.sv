// CMP_x: magnitude comparator between the new sample and one array register.
//
// gt is 1 when the sample held in REG_IN is strictly greater than REG_x and 0
// otherwise (equal values give 0, so a repeated value is placed after the
// copies already stored). Samples are unsigned: the array resets to zero and a
// zero sample must compare as the smallest value. Purely combinational.
module xsort_cmp #(
  parameter int unsigned W = xsort_pkg::W_DEFAULT
) (
  input  logic [W-1:0] in_sample,  // REG_IN
  input  logic [W-1:0] reg_value,  // REG_x
  output logic         gt          // cmp[x]
);

  always_comb gt = (in_sample > reg_value);

endmodule
