// W-bit wide 2:1 multiplexer in AND/OR/INVERTER form.
//
// y = (d0 & ~sel) | (d1 & sel), bit by bit; one inverter on the select line
// is shared by all bits. For W = 1 this is four gates and three gate levels,
// the area 4 and delay 3 of the cost model. A W-bit instance is what the
// design calls a 2W:W multiplexer (the 8:4 multiplexer after a 4-bit BEC, the
// 10:5 one after a 5-bit BEC). Purely combinational.
module mux2 #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] d0,   // chosen when sel = 0
  input  logic [W-1:0] d1,   // chosen when sel = 1
  input  logic         sel,
  output logic [W-1:0] y
);
  logic sel_n;

  always_comb begin
    sel_n = ~sel;
    y     = (d0 & {W{sel_n}}) | (d1 & {W{sel}});
  end
endmodule
