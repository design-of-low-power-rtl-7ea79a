// N-bit modified carry select adder (MCSA): {cout, sum} = a + b + cin.
//
// The operands are cut into N/4 blocks of 4 bits. Block 0 is a 4-bit ripple
// carry adder driven by cin. Each higher block (mcsa_group) adds its bits
// with one ripple carry adder at a carry-in of 0 and turns that result into
// the carry-in-of-1 result with a 5-bit binary to excess-1 converter; the
// carry out of the block below selects between the two. A conventional carry
// select adder would use a second ripple carry adder for the carry-in-of-1
// case; the converter needs fewer gates. All blocks settle their two
// candidate results at once, so after the first block the carry travels one
// multiplexer per block. Purely combinational.
//
// N must be a multiple of 4; the default of 64 is the largest width the
// design is given for (8, 16 and 32 are the others).
module mcsa
  import mcsa_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  localparam int unsigned G = num_groups(N);

  if (N % GROUP_W != 0 || N < GROUP_W) begin : g_bad_width
    $error("mcsa: N must be a positive multiple of %0d", GROUP_W);
  end

  // carry[g] is the carry into block g
  logic [G:0] carry;

  assign carry[0] = cin;

  rca #(.W(GROUP_W), .CIN_ZERO(1'b0)) u_block0 (
    .a   (a[GROUP_W-1:0]),
    .b   (b[GROUP_W-1:0]),
    .cin (carry[0]),
    .s   (sum[GROUP_W-1:0]),
    .cout(carry[1])
  );

  for (genvar g = 1; g < G; g++) begin : g_block
    mcsa_group u_group (
      .a   (a[g*GROUP_W +: GROUP_W]),
      .b   (b[g*GROUP_W +: GROUP_W]),
      .cin (carry[g]),
      .s   (sum[g*GROUP_W +: GROUP_W]),
      .cout(carry[g+1])
    );
  end

  assign cout = carry[G];
endmodule
