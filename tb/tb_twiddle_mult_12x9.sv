// tb_twiddle_mult_12x9: end-to-end test of the 12x9b multiplier.
//
// A new operand pair is applied every clock cycle (single-cycle throughput)
// and every one of the 2^21 pairs of a 12-bit multiplicand and a 9-bit
// multiplier is multiplied, after a first sequence that steps the multiplier
// from 0x000 to 0x001 with the multiplicand at all ones (the pattern that
// exercises the longest carry path; the product goes from 0 to all ones).
// Each product is compared with the integer product, two rising edges after
// its operands were applied (one edge into the input flip-flops, one into the
// output flip-flops), and is checked not to be there one edge earlier.
// Coverage counters: every Booth select S0..S5, both settings of the
// conditional-sum multiplexer, a carry out of each lookahead block, and
// negative, positive and zero products must all occur.
module tb_twiddle_mult_12x9;
  import mult_pkg::*;

  logic             clk = 1'b0;
  logic [YW-1:0]    multiplicand;
  logic [XW-1:0]    multiplier;
  logic [PRODW-1:0] product;
  int checks = 0, failures = 0;
  longint unsigned cycles = 0;

  twiddle_mult_12x9 dut (
    .clk         (clk),
    .multiplicand(multiplicand),
    .multiplier  (multiplier),
    .product     (product)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  localparam longint unsigned NPAIRS = longint'(1) << (YW + XW);

  initial begin : watchdog
    repeat (NPAIRS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // coverage of the mechanisms inside the datapath
  int sel_seen [6];
  int mux_one = 0, mux_zero = 0;
  int blk_carry [3];
  int n_neg = 0, n_pos = 0, n_zero = 0;

  always @(negedge clk) begin
    for (int j = 0; j < NDIG; j++) begin
      for (int k = 0; k < 6; k++) begin
        if (dut.sel[j][k]) sel_seen[k]++;
      end
    end
    if (dut.u_add.c[17]) mux_one++; else mux_zero++;
    if (dut.u_add.c[9])  blk_carry[0]++;
    if (dut.u_add.c[14]) blk_carry[1]++;
    if (dut.u_add.c[17]) blk_carry[2]++;
  end

  // operands applied one and two edges ago
  int exp1 = 0, exp2 = 0;
  bit v1 = 0, v2 = 0;
  int ncheck = 0;

  task automatic apply(input logic [YW-1:0] y, input logic [XW-1:0] x);
    // called just after a falling edge
    multiplicand = y;
    multiplier   = x;
    @(posedge clk);
    @(negedge clk);
    // result of the pair applied two edges ago must be on the output now
    exp2 = exp1; v2 = v1;
    exp1 = int'($signed(y)) * int'($signed(x));
    v1   = 1'b1;
    if (v2) begin
      checks++;
      if (product !== PRODW'(exp2)) begin
        failures++;
        if (failures < 20) $display("FAIL product %h expected %h", product, PRODW'(exp2));
      end
      if (exp2 < 0) n_neg++; else if (exp2 > 0) n_pos++; else n_zero++;
      // latency: the newest pair's product is not visible yet
      if (PRODW'(exp1) != PRODW'(exp2)) begin
        checks++;
        if (product === PRODW'(exp1)) begin
          failures++;
          if (failures < 20) $display("FAIL product appeared one cycle early");
        end
      end
    end
  endtask

  task automatic flush();
    apply('0, '0);
    apply('0, '0);
  endtask

  initial begin
    longint unsigned c0;
    multiplicand = '0;
    multiplier   = '0;
    @(negedge clk);
    // longest carry path: 0xFFF x 0x000 then 0xFFF x 0x001
    apply(12'hFFF, 9'h000);
    apply(12'hFFF, 9'h001);
    apply(12'hFFF, 9'h001);
    checks++;
    if (product !== '1) begin
      failures++;
      $display("FAIL 0xFFF x 0x001 gave %h", product);
    end
    // every operand pair, one per cycle
    c0 = cycles;
    for (longint unsigned v = 0; v < NPAIRS; v++) begin
      apply(YW'(v >> XW), XW'(v));
    end
    flush();
    // throughput: NPAIRS + 2 products in as many cycles
    checks++;
    if (cycles - c0 != NPAIRS + 2) begin
      failures++;
      $display("FAIL %0d cycles for %0d multiplies", cycles - c0, NPAIRS + 2);
    end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (sel_seen[k] == 0) begin failures++; $display("FAIL select S%0d never used", k); end
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (blk_carry[k] == 0) begin failures++; $display("FAIL no carry out of lookahead block %0d", k); end
    end
    checks++;
    if (mux_one == 0 || mux_zero == 0) begin
      failures++;
      $display("FAIL conditional-sum mux used %0d/%0d", mux_zero, mux_one);
    end
    checks++;
    if (n_neg == 0 || n_pos == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL product signs %0d/%0d/%0d", n_neg, n_zero, n_pos);
    end
    $display("selects S0..S5: %0d %0d %0d %0d %0d %0d; mux 0/1: %0d/%0d; block carries %0d %0d %0d",
             sel_seen[0], sel_seen[1], sel_seen[2], sel_seen[3], sel_seen[4], sel_seen[5],
             mux_zero, mux_one, blk_carry[0], blk_carry[1], blk_carry[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
