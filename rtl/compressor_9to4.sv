// compressor_9to4: counts the ones among nine input bits (the MSBs of the
// nine pixels of a 3x3 block) and returns the count as a 4-bit number.
//
// Structure: five full adders and two half adders, in three levels.
//   Level 1: three full adders each add one triple of inputs, giving three
//            weight-1 sums and three weight-2 carries.
//   Level 2: one full adder adds the three sums (count bit 0 and a weight-2
//            carry); one full adder adds the three carries (a weight-2 sum
//            and a weight-4 carry).
//   Level 3: a half adder joins the two weight-2 bits (count bit 1 and a
//            weight-4 carry); a second half adder joins the two weight-4
//            bits (count bits 2 and 3).
// The adder counts and the three-level arrangement follow the published
// compressor this design uses; the exact pairing of signals is this design's
// own, since any pairing by weight gives the same sum.
// Purely combinational, no clock.
module compressor_9to4 (
  input  logic [8:0] bits,
  output logic [3:0] count
);
  logic [2:0] s1, c1;       // level 1 sums (weight 1) and carries (weight 2)
  logic       s_w1, c_w2;   // level 2, adder over the sums
  logic       s_w2, c_w4;   // level 2, adder over the carries
  logic       h1_c;         // level 3, first half adder carry (weight 4)

  for (genvar g = 0; g < 3; g++) begin : g_l1
    full_adder u_fa (
      .a (bits[3*g]), .b (bits[3*g+1]), .ci(bits[3*g+2]),
      .s (s1[g]),     .co(c1[g])
    );
  end

  full_adder u_fa_sum (.a(s1[0]), .b(s1[1]), .ci(s1[2]), .s(s_w1), .co(c_w2));
  full_adder u_fa_cry (.a(c1[0]), .b(c1[1]), .ci(c1[2]), .s(s_w2), .co(c_w4));

  half_adder u_ha_w2 (.a(c_w2), .b(s_w2), .s(count[1]), .co(h1_c));
  half_adder u_ha_w4 (.a(c_w4), .b(h1_c), .s(count[2]), .co(count[3]));

  assign count[0] = s_w1;
endmodule
