// Self-checking testbench for mux2: the 1-bit default (all eight input
// combinations) and a 4-bit instance (the 8:4 multiplexer) on random data.
module tb_mux2;
  logic       d0, d1, sel, y;
  logic [3:0] w0, w1, wy;
  logic       wsel;
  int checks = 0, failures = 0;

  mux2           dut1 (.d0(d0), .d1(d1), .sel(sel), .y(y));
  mux2 #(.W(4))  dut4 (.d0(w0), .d1(w1), .sel(wsel), .y(wy));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {sel, d1, d0} = 3'(i);
      #1;
      checks++;
      if (y !== (i >= 4 ? i[1] : i[0])) begin
        failures++;
        $display("FAIL sel=%0b d1=%0b d0=%0b y=%0b", sel, d1, d0, y);
      end
    end
    for (int i = 0; i < 200; i++) begin
      w0 = 4'($urandom); w1 = 4'($urandom); wsel = 1'($urandom);
      #1;
      checks++;
      if (wy !== (wsel ? w1 : w0)) begin
        failures++;
        $display("FAIL sel=%0b d1=%h d0=%h y=%h", wsel, w1, w0, wy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
