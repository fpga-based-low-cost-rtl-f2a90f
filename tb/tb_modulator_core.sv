// tb_modulator_core: runs the generic ROM modulator in two configurations and
// compares every output sample and bit with mod_scoreboard:
//   A - defaults (BPSK carriers, 2 clocks per sample, 40 samples per bit);
//   B - a 3-period and a 1-period-at-90-degree carrier, 1 clock per sample,
//       8 samples per bit, 6-bit words (short, to cover many words).
// d_in is changed at random during the run, and reset is applied again half
// way through. Each run must see both carrier switches and several words.
module tb_modulator_core;
  timeunit 1ns;
  timeprecision 1ps;

  logic        clk = 1'b0;
  logic        rst;
  logic [13:0] din_a;
  logic [5:0]  din_b;
  logic [31:0] res_a, res_b;
  logic        dout_a, dout_b;
  int          ca, fa, ba, wa, t0a, t1a;
  int          cb, fb, bb, wb, t0b, t1b;
  int          checks = 0;
  int          failures = 0;

  always #10 clk = ~clk;

  modulator_core dut_a (.clk(clk), .rst(rst), .d_in(din_a), .result(res_a), .d_out(dout_a));
  mod_scoreboard sb_a (.clk(clk), .rst(rst), .d_in(din_a), .result(res_a), .d_out(dout_a),
                       .checks(ca), .failures(fa), .n_bits(ba), .n_words(wa),
                       .n_to0(t0a), .n_to1(t1a));

  modulator_core #(
    .F1_CYCLES(3), .F1_PHASE_DEG(0), .F0_CYCLES(1), .F0_PHASE_DEG(90),
    .CLKS_PER_SAMPLE_P(1), .SAMPLES_PER_BIT_P(8), .DATA_W_P(6)
  ) dut_b (.clk(clk), .rst(rst), .d_in(din_b), .result(res_b), .d_out(dout_b));
  mod_scoreboard #(
    .F1_CYCLES(3), .F1_PHASE(0), .F0_CYCLES(1), .F0_PHASE(90), .CPS(1), .SPB(8), .DW(6)
  ) sb_b (.clk(clk), .rst(rst), .d_in(din_b), .result(res_b), .d_out(dout_b),
          .checks(cb), .failures(fb), .n_bits(bb), .n_words(wb), .n_to0(t0b), .n_to1(t1b));

  task automatic need(input string what, input int count, input int least);
    checks++;
    if (count < least) begin
      failures++;
      $display("FAIL %s happened %0d times, expected at least %0d", what, count, least);
    end
  endtask

  initial begin
    rst   = 1'b1;
    din_a = 14'b01100101001011;
    din_b = 6'b100110;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      if (i == 3000) rst = 1'b1;
      else rst = 1'b0;
      if ($urandom_range(0, 499) == 0) din_a = 14'($urandom());
      if ($urandom_range(0, 29) == 0)  din_b = 6'($urandom());
    end
    @(negedge clk);
    need("A words", wa, 4);
    need("A switch 1->0", t0a, 3);
    need("A switch 0->1", t1a, 3);
    need("B words", wb, 50);
    need("B switch 1->0", t0b, 20);
    need("B switch 0->1", t1b, 20);
    checks   += ca + cb;
    failures += fa + fb;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
