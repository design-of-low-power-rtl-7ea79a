// W-bit ripple carry adder: a chain of full adders, the carry of each bit
// feeding the next.
//
// {cout, s} = a + b + cin. With CIN_ZERO = 1 the adder is the carry-in-of-0
// adder of a carry select block: its carry-in is taken as 0, the cin port is
// not read, and the lowest full adder reduces to a half adder. Which cell
// sits at bit 0 is this design's choice; the rest follows the usual ripple
// structure. Purely combinational; the worst path runs from bit 0 through
// every carry to cout.
module rca #(
  parameter int unsigned W        = 4,
  parameter bit          CIN_ZERO = 1'b0
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,   // not read when CIN_ZERO = 1
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;

  if (CIN_ZERO) begin : g_lsb_ha
    half_adder u_bit0 (.a(a[0]), .b(b[0]), .s(s[0]), .c(c[1]));
  end else begin : g_lsb_fa
    full_adder u_bit0 (.a(a[0]), .b(b[0]), .cin(cin), .s(s[0]), .cout(c[1]));
  end

  // c[0] only names the carry into bit 0; bit 0's cell reads cin directly.
  assign c[0] = CIN_ZERO ? 1'b0 : cin;

  for (genvar i = 1; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
  end

  assign cout = c[W];
endmodule
