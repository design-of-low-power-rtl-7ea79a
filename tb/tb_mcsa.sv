// Self-checking testbench for mcsa at the four widths the adder is built in:
// 64 bits (the default), 32, 16 and 8. The 8-bit adder is checked on every
// operand pair and carry-in; the wider ones on corner cases (a carry that
// must travel through every block, all ones plus all ones, zero) and on
// random operands. Expected results come from the simulator's own addition.
module tb_mcsa;
  localparam int unsigned RANDOM_OPS = 20000;

  logic [63:0] a64, b64, s64;
  logic [31:0] a32, b32, s32;
  logic [15:0] a16, b16, s16;
  logic [7:0]  a8,  b8,  s8;
  logic        cin, c64, c32, c16, c8;
  int checks = 0, failures = 0;

  mcsa            dut64 (.a(a64), .b(b64), .cin(cin), .sum(s64), .cout(c64));
  mcsa #(.N(32))  dut32 (.a(a32), .b(b32), .cin(cin), .sum(s32), .cout(c32));
  mcsa #(.N(16))  dut16 (.a(a16), .b(b16), .cin(cin), .sum(s16), .cout(c16));
  mcsa #(.N(8))   dut8  (.a(a8),  .b(b8),  .cin(cin), .sum(s8),  .cout(c8));

  task automatic check_wide();
    logic [64:0] e64;
    logic [32:0] e32;
    logic [16:0] e16;
    #1;
    e64 = {1'b0, a64} + {1'b0, b64} + 65'(cin);
    e32 = {1'b0, a32} + {1'b0, b32} + 33'(cin);
    e16 = {1'b0, a16} + {1'b0, b16} + 17'(cin);
    checks += 3;
    if ({c64, s64} !== e64) begin
      failures++;
      $display("FAIL 64 a=%h b=%h cin=%0b -> %0b_%h exp %h", a64, b64, cin, c64, s64, e64);
    end
    if ({c32, s32} !== e32) begin
      failures++;
      $display("FAIL 32 a=%h b=%h cin=%0b -> %0b_%h exp %h", a32, b32, cin, c32, s32, e32);
    end
    if ({c16, s16} !== e16) begin
      failures++;
      $display("FAIL 16 a=%h b=%h cin=%0b -> %0b_%h exp %h", a16, b16, cin, c16, s16, e16);
    end
  endtask

  task automatic drive_wide(input logic [63:0] a, input logic [63:0] b, input logic c);
    a64 = a;       b64 = b;
    a32 = a[31:0]; b32 = b[31:0];
    a16 = a[15:0]; b16 = b[15:0];
    cin = c;
    check_wide();
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0;
    // corner cases
    drive_wide('1, '0, 1'b1);        // carry ripples through every block
    drive_wide('0, '1, 1'b1);
    drive_wide('1, '1, 1'b0);
    drive_wide('1, '1, 1'b1);
    drive_wide('0, '0, 1'b0);
    drive_wide('0, '0, 1'b1);
    drive_wide(64'h0F0F_0F0F_0F0F_0F0F, 64'h0101_0101_0101_0101, 1'b0);
    drive_wide(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 1'b0);
    // random operands
    for (int i = 0; i < RANDOM_OPS; i++)
      drive_wide({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    // exhaustive 8-bit
    for (int i = 0; i < (1 << 17); i++) begin
      {cin, a8, b8} = 17'(i);
      #1;
      checks++;
      if ({c8, s8} !== 9'(int'(a8) + int'(b8) + int'(cin))) begin
        failures++;
        $display("FAIL 8 a=%h b=%h cin=%0b -> %0b_%h", a8, b8, cin, c8, s8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
