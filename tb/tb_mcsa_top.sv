// End-to-end testbench for mcsa_top at its default width (64 bits, no
// parameter override). A new random addition is presented every clock,
// just after a rising edge; the result must appear just after the second
// rising edge that follows (input register, then output register), so the
// scoreboard holds the one addition in flight between those edges. This
// checks both the sums and the two-edge latency at one addition per cycle:
// a one-edge or three-edge design would show the wrong addition's result.
//
// It also counts how often each mechanism of the adder was exercised and
// counts a failure for any that never happened: for every carry select
// block, its carry-in-of-1 (BEC) result being selected and its carry-in-of-0
// (ripple adder) result being selected; a carry that travels from the
// carry-in through every block; a carry out of the whole adder; and the
// asynchronous reset clearing the outputs. These carries are worked out
// from the operands, independently of the adder.
module tb_mcsa_top;
  localparam int unsigned N   = 64;
  localparam int unsigned G   = N / 4;
  localparam int unsigned OPS = 20000;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [N-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;
  int cycles = 0;

  typedef struct packed {
    logic         valid;
    logic [N:0]   result;
  } exp_t;

  exp_t in_flight;
  int   sel_bec [G];
  int   sel_rca [G];
  int   full_ripples = 0, carry_outs = 0, resets_seen = 0;

  mcsa_top dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (OPS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // carry into each block, from the operands alone
  task automatic count_mechanisms(input logic [N-1:0] x, input logic [N-1:0] y, input logic c);
    logic [N:0] partial;
    for (int g = 1; g < G; g++) begin
      partial = {1'b0, N'(x & ((N'(1) << (4 * g)) - 1))} + {1'b0, N'(y & ((N'(1) << (4 * g)) - 1))} + (N+1)'(c);
      if (partial[4 * g]) sel_bec[g]++;
      else                sel_rca[g]++;
    end
    if (c && (x ^ y) == '1) full_ripples++;
  endtask

  task automatic step(input logic [N-1:0] x, input logic [N-1:0] y, input logic c);
    logic [N:0] e;
    a = x; b = y; cin = c;
    e = {1'b0, x} + {1'b0, y} + (N+1)'(c);
    count_mechanisms(x, y, c);
    if (e[N]) carry_outs++;
    @(posedge clk);
    #1;
    // the edge just taken captured x, y, c and put the previous addition out
    if (in_flight.valid) begin
      checks++;
      if ({cout, sum} !== in_flight.result) begin
        failures++;
        $display("FAIL cycle %0d: got %0b_%h expected %h", cycles, cout, sum, in_flight.result);
      end
    end
    in_flight = '{valid: 1'b1, result: e};
  endtask

  initial begin
    foreach (sel_bec[g]) begin
      sel_bec[g] = 0;
      sel_rca[g] = 0;
    end
    in_flight = '0;
    a = '0; b = '0; cin = 1'b0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (sum !== '0 || cout !== 1'b0) begin
      failures++;
      $display("FAIL outputs not cleared by reset");
    end else resets_seen++;
    rst_n = 1'b1;

    step('1, '0, 1'b1);
    step('1, '1, 1'b1);
    step('0, '0, 1'b0);
    step(64'h0123_4567_89AB_CDEF, 64'hFEDC_BA98_7654_3210, 1'b1);
    for (int i = 0; i < OPS; i++)
      step({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    // flush the last result
    step('0, '0, 1'b0);

    // reset in the middle of a stream clears the outputs at once
    step('1, '1, 1'b1);
    step('1, '1, 1'b1);
    rst_n = 1'b0;
    #1;
    checks++;
    if (sum !== '0 || cout !== 1'b0) begin
      failures++;
      $display("FAIL asynchronous reset did not clear outputs");
    end else resets_seen++;
    rst_n = 1'b1;

    for (int g = 1; g < G; g++) begin
      checks += 2;
      if (sel_bec[g] == 0) begin
        failures++;
        $display("FAIL block %0d never selected its BEC (carry-in 1) result", g);
      end
      if (sel_rca[g] == 0) begin
        failures++;
        $display("FAIL block %0d never selected its ripple adder (carry-in 0) result", g);
      end
    end
    checks += 3;
    if (full_ripples == 0) begin failures++; $display("FAIL no full-length carry"); end
    if (carry_outs == 0)   begin failures++; $display("FAIL no carry out"); end
    if (resets_seen < 2)   begin failures++; $display("FAIL reset not exercised"); end
    $display("mechanisms: block1 BEC/RCA %0d/%0d, block%0d BEC/RCA %0d/%0d, full-length carries %0d, carry outs %0d, resets %0d",
             sel_bec[1], sel_rca[1], G - 1, sel_bec[G-1], sel_rca[G-1], full_ripples, carry_outs, resets_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
