// tb_bpsk_bfsk_top: end-to-end test of the top with every parameter at its
// default. Both modulators run side by side at 50 MHz; each output is checked
// sample by sample and bit by bit against mod_scoreboard. The BPSK side starts
// with the data word of the original BPSK trace, the BFSK side with that of the
// BFSK trace; afterwards both words are changed at random while words are being
// sent, and reset is applied once more part way through. The test counts, and
// requires at least once each: a BPSK phase change in either direction, a BFSK
// tone change in either direction, a word boundary at which a changed d_in is
// taken over, a repeated word, and a restart after reset.
module tb_bpsk_bfsk_top;
  timeunit 1ns;
  timeprecision 1ps;

  logic        clk = 1'b0;
  logic        rst;
  logic [13:0] p_din, f_din;
  logic [31:0] p_res, f_res;
  logic        p_dout, f_dout;
  int          pc, pf, pb, pw, p0, p1;
  int          fc, ff, fb, fw, f0, f1;
  int          checks = 0;
  int          failures = 0;
  int          n_resets = 0;
  int          n_new_word = 0;
  int          n_same_word = 0;
  logic [13:0] last_p = '0;
  int          last_pw = 0;

  always #10 clk = ~clk;

  bpsk_bfsk_top dut (
    .clk(clk), .rst(rst),
    .bpsk_d_in(p_din), .bpsk_result(p_res), .bpsk_d_out(p_dout),
    .bfsk_d_in(f_din), .bfsk_result(f_res), .bfsk_d_out(f_dout)
  );

  mod_scoreboard #(.F1_CYCLES(1), .F1_PHASE(0), .F0_CYCLES(1), .F0_PHASE(180)) sb_p (
    .clk(clk), .rst(rst), .d_in(p_din), .result(p_res), .d_out(p_dout),
    .checks(pc), .failures(pf), .n_bits(pb), .n_words(pw), .n_to0(p0), .n_to1(p1));
  mod_scoreboard #(.F1_CYCLES(2), .F1_PHASE(0), .F0_CYCLES(1), .F0_PHASE(0)) sb_f (
    .clk(clk), .rst(rst), .d_in(f_din), .result(f_res), .d_out(f_dout),
    .checks(fc), .failures(ff), .n_bits(fb), .n_words(fw), .n_to0(f0), .n_to1(f1));

  // Word boundaries on the BPSK side: was the word taken over new or repeated?
  always @(negedge clk) if (!rst && pw != last_pw) begin
    if (last_pw != 0) begin
      if (p_din != last_p) n_new_word++;
      else                 n_same_word++;
    end
    last_pw = pw;
    last_p  = p_din;
  end

  task automatic need(input string what, input int count);
    checks++;
    if (count < 1) begin
      failures++;
      $display("FAIL %s never happened", what);
    end else $display("  %s: %0d", what, count);
  endtask

  initial begin
    rst   = 1'b1;
    p_din = 14'b01100101001011;
    f_din = 14'b00100101011010;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // Two full words with the trace data, unchanged (2 x 14 x 80 clocks).
    repeat (2 * 1120 + 5) @(negedge clk);
    // Random data changes while sending.
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      if (i == 3000) begin
        rst = 1'b1;
        n_resets++;
        last_pw = 0;
      end else rst = 1'b0;
      if ($urandom_range(0, 699) == 0) p_din = 14'($urandom());
      if ($urandom_range(0, 699) == 0) f_din = 14'($urandom());
    end
    @(negedge clk);
    need("BPSK phase change 180->0", p1);
    need("BPSK phase change 0->180", p0);
    need("BFSK tone change f0->f1", f1);
    need("BFSK tone change f1->f0", f0);
    need("new data word taken at word boundary", n_new_word);
    need("word repeated", n_same_word);
    need("restart after reset", n_resets);
    checks   += pc + fc;
    failures += pf + ff;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
