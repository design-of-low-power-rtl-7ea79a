// Two-input exclusive OR built only from AND, OR and INVERTER gates.
//
// y = (a & ~b) | (~a & b). The two inverters work in parallel, then the two
// AND gates, then the OR gate: three gate levels and five gates, which is the
// delay of 3 and area of 5 units the adder's unit-gate cost model gives an
// XOR. Purely combinational; every adder cell of the design uses this cell
// for its XOR so that the netlist matches the cost model gate for gate.
module xor_aoi (
  input  logic a,
  input  logic b,
  output logic y
);
  logic a_n, b_n, a_and_bn, an_and_b;

  always_comb begin
    a_n      = ~a;
    b_n      = ~b;
    a_and_bn = a & b_n;
    an_and_b = a_n & b;
    y        = a_and_bn | an_and_b;
  end
endmodule
