// One carry select block of the modified carry select adder.
//
// A GROUP_W-bit (4-bit) ripple carry adder adds a and b with a carry-in of 0,
// giving a GROUP_W+1-bit result {c0, s0}. A GROUP_W+1-bit (5-bit) BEC forms
// {c0, s0} + 1, which is the result the block would have with a carry-in of
// 1, and a 10:5 multiplexer driven by the carry out of the block below (cin)
// picks one: {cout, s} = a + b + cin. The sum of two 4-bit numbers is at most
// 30, so the increment never wraps. Purely combinational; the ripple adder
// and BEC settle while the lower blocks work, and only the multiplexer lies
// on the carry path from cin to cout.
module mcsa_group
  import mcsa_pkg::*;
(
  input  logic [GROUP_W-1:0] a,
  input  logic [GROUP_W-1:0] b,
  input  logic               cin,   // carry out of the block below
  output logic [GROUP_W-1:0] s,
  output logic               cout
);
  logic [GROUP_W-1:0] s0;
  logic               c0;

  rca #(.W(GROUP_W), .CIN_ZERO(1'b1)) u_rca (
    .a(a), .b(b), .cin(1'b0), .s(s0), .cout(c0)
  );

  bec_mux #(.W(BEC_W)) u_sel (
    .b({c0, s0}), .inc(cin), .y({cout, s})
  );
endmodule
