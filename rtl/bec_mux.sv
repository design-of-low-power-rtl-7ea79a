// Conditional incrementer: a BEC followed by a 2W:W multiplexer.
//
// y = inc ? b + 1 : b (modulo 2**W). One multiplexer input takes b itself,
// the other the BEC's excess-1 output, and inc selects. This is how a carry
// select block obtains its carry-in-of-1 result from the carry-in-of-0 one
// without a second adder. Default W = 5 as used in each block; W = 4 is the
// 4-bit converter with an 8:4 multiplexer. Purely combinational; the path
// from inc to y is a single multiplexer.
module bec_mux #(
  parameter int unsigned W = 5
) (
  input  logic [W-1:0] b,
  input  logic         inc,
  output logic [W-1:0] y
);
  logic [W-1:0] b_plus1;

  bec  #(.W(W)) u_bec (.b(b), .x(b_plus1));
  mux2 #(.W(W)) u_mux (.d0(b), .d1(b_plus1), .sel(inc), .y(y));
endmodule
