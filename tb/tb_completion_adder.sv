// tb_completion_adder: checks the hybrid ripple / lookahead / conditional-sum
// adder against integer addition.
//
// Corner cases make a carry run the full width, start in each segment and
// each lookahead block, and hit both sides of the conditional-sum
// multiplexer; random operands follow. sum and cout must equal a + b.
// Coverage counters make sure both multiplexer settings were used.
module tb_completion_adder;
  localparam int unsigned W = 22;

  logic [W-1:0] a, b, sum;
  logic         cout;
  int checks = 0, failures = 0;
  int mux_hi = 0, mux_lo = 0;

  completion_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W:0] exp_v;
    #1;
    exp_v = {1'b0, a} + {1'b0, b};
    checks++;
    if ({cout, sum} !== exp_v) begin
      failures++;
      $display("FAIL %h + %h = %h, got %b %h", a, b, exp_v, cout, sum);
    end
    if (exp_v[17] ^ a[17] ^ b[17]) mux_hi++; else mux_lo++;
  endtask

  initial begin
    // carry born at each bit position and propagated to the top
    for (int i = 0; i < W; i++) begin
      a = W'(1) << i;
      b = ~(W'(0));
      check();
      a = (W'(1) << i);
      b = (W'(1) << i) | (~(W'(0)) << (i + 1));
      check();
    end
    a = '1; b = '0; check();
    a = '0; b = '0; check();
    for (int t = 0; t < 50000; t++) begin
      a = W'($urandom);
      b = W'($urandom);
      check();
    end
    checks++;
    if (mux_hi == 0 || mux_lo == 0) begin
      failures++;
      $display("FAIL conditional-sum mux not exercised both ways (%0d/%0d)", mux_hi, mux_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
