// Modified carry select adder between input and output registers.
//
// The operands a, b and the carry-in are captured on a rising clock edge,
// added by the N-bit MCSA, and {cout, sum} is captured on the next edge: a
// result appears at the outputs two clock edges after its operands are
// presented, and a new addition can start every cycle. The register stages
// give the adder a single clock and a register-to-register path whose delay
// is the adder's own, the setting in which its speed is measured; their
// exact form (one stage on each side, asynchronous active-low reset clearing
// all of them to 0) is this design's choice. Pins: 3N data bits plus cin,
// cout, clk and rst_n.
module mcsa_top #(
  parameter int unsigned N = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N-1:0] a_q, b_q, sum_d;
  logic         cin_q, cout_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      b_q   <= '0;
      cin_q <= 1'b0;
    end else begin
      a_q   <= a;
      b_q   <= b;
      cin_q <= cin;
    end
  end

  mcsa #(.N(N)) u_adder (
    .a(a_q), .b(b_q), .cin(cin_q), .sum(sum_d), .cout(cout_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum  <= '0;
      cout <= 1'b0;
    end else begin
      sum  <= sum_d;
      cout <= cout_d;
    end
  end
endmodule
