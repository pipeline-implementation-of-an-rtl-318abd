// t2_comparator: decides whether a 3x3 block is congested (type T2) from
// the 4-bit ones count of its MSB plane.
//
// T2 means the count is 4, 5 or 6; every other count (0..3, 7..9) is a
// smooth block, type T1, which is simply the inverse of this output.
// With count = {bit4, bit3, bit2, bit1} (bit1 the LSB) the set {4,5,6} is
// exactly  !bit4 & bit3 & !(bit2 & bit1) : three gates, an inverter, a
// two-input NAND and a three-input AND. Counts above 9 cannot occur.
// Purely combinational.
module t2_comparator (
  input  logic [3:0] count,
  output logic       is_t2
);
  logic b21_nand;
  always_comb begin
    b21_nand = ~(count[1] & count[0]);
    is_t2    = ~count[3] & count[2] & b21_nand;
  end
endmodule
