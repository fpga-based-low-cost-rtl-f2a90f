// tb_bit_separator: drives bit strobes at random intervals and checks that
// d_out steps through d_in least significant bit first, one bit per strobe,
// that d_in is captured only at the first bit of a word (it is changed at
// random in between), that d_out holds between strobes, and that reset
// restarts at bit 0.
module tb_bit_separator;
  timeunit 1ns;
  timeprecision 1ps;

  logic        clk = 1'b0;
  logic        rst;
  logic        en;
  logic [13:0] d_in;
  logic        d_out;
  logic [13:0] word;
  logic        exp_bit;
  int          idx;
  int          checks = 0;
  int          failures = 0;
  int          words = 0;

  always #10 clk = ~clk;

  bit_separator dut (.clk(clk), .rst(rst), .en(en), .d_in(d_in), .d_out(d_out));

  initial begin
    rst  = 1'b1;
    en   = 1'b0;
    d_in = 14'b00100101011010;
    idx  = 0;
    word = '0;
    exp_bit = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      en = ($urandom_range(0, 2) == 0);
      if ($urandom_range(0, 9) == 0) d_in = 14'($urandom());
      if (i == 2000) rst = 1'b1;
      @(posedge clk);
      if (rst) begin
        idx = 0;
        exp_bit = 1'b0;
      end else if (en) begin
        if (idx == 0) begin
          word = d_in;
          words++;
        end
        exp_bit = word[idx];
        idx = (idx + 1) % 14;
      end
      @(negedge clk);
      rst = 1'b0;
      checks++;
      if (d_out !== exp_bit) begin
        failures++;
        $display("FAIL step %0d: d_out=%b expected %b", i, d_out, exp_bit);
      end
    end
    checks++;
    if (words < 20) begin
      failures++;
      $display("FAIL only %0d words", words);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
