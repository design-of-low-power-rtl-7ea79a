// Full adder in AND/OR/INVERTER form.
//
// p = a ^ b, s = p ^ cin, cout = (a & b) | (p & cin). Two XOR cells (10
// gates) and three gates for the carry give the 13 units of area of the cost
// model; the sum path is two XORs deep (6 units of delay), the carry path one
// XOR and an AND-OR (5). Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic p, g, pc;

  xor_aoi u_xor_p (.a(a), .b(b),   .y(p));
  xor_aoi u_xor_s (.a(p), .b(cin), .y(s));

  always_comb begin
    g    = a & b;
    pc   = p & cin;
    cout = g | pc;
  end
endmodule
