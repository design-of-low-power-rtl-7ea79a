// Binary to excess-1 converter (BEC): x = b + 1 modulo 2**W.
//
// Bit 0 is inverted; every higher bit i is XORed with the AND of all bits
// below it: x[i] = b[i] ^ (b[0] & ... & b[i-1]). The AND terms are formed as
// a chain, each reusing the one below, so a W-bit BEC costs one inverter,
// W-2 AND gates and W-1 XOR cells. All ones wrap to all zeros. The default
// W = 5 is the converter each 4-bit block of the adder uses (a W-bit block
// needs a W+1-bit BEC to cover its carry out); W = 4 gives the basic 4-bit
// converter. W must be at least 2. Purely combinational.
module bec #(
  parameter int unsigned W = 5
) (
  input  logic [W-1:0] b,
  output logic [W-1:0] x
);
  // all_low[i] = AND of b[i-1:0]
  logic [W-1:1] all_low;

  assign x[0] = ~b[0];

  for (genvar i = 1; i < W; i++) begin : g_bit
    if (i == 1) begin : g_first
      assign all_low[1] = b[0];
    end else begin : g_chain
      assign all_low[i] = all_low[i-1] & b[i-1];
    end
    xor_aoi u_xor (.a(b[i]), .b(all_low[i]), .y(x[i]));
  end
endmodule
