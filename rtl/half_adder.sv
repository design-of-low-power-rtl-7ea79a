// Half adder: s = a ^ b, c = a & b.
//
// The sum uses the AND/OR/INVERTER XOR cell (5 gates) and the carry a single
// AND gate: 6 gates and 3 gate levels, the half adder figures of the cost
// model. The design uses it as the lowest bit of a ripple carry adder whose
// carry-in is fixed at 0. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  xor_aoi u_xor (.a(a), .b(b), .y(s));

  always_comb c = a & b;
endmodule
