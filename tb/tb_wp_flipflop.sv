// tb_wp_flipflop: checks the write-port flip-flop as an edge-triggered
// register: q takes d at each rising clock edge and holds it while d keeps
// changing during the rest of the cycle.
module tb_wp_flipflop;
  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  logic [W-1:0] d, q, sampled;
  int checks = 0, failures = 0;

  wp_flipflop #(.W(W)) dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    @(negedge clk);
    for (int t = 0; t < 1000; t++) begin
      d = W'($urandom);
      sampled = d;
      @(posedge clk);
      #1;
      checks++;
      if (q !== sampled) begin
        failures++;
        $display("FAIL q=%h expected %h after edge", q, sampled);
      end
      // change d while the clock is high and low: q must hold
      d = ~sampled;
      #2;
      checks++;
      if (q !== sampled) begin
        failures++;
        $display("FAIL q changed to %h while clock high", q);
      end
      @(negedge clk);
      d = sampled ^ W'($urandom);
      #2;
      checks++;
      if (q !== sampled) begin
        failures++;
        $display("FAIL q changed to %h while clock low", q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
