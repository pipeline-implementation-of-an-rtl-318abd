// half_adder: one-bit half adder used in the last level of the 9-to-4
// compressor. Combinational: s = a ^ b, co = a & b.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
