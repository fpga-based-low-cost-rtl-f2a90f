// tb_sample_counter: drives clk_en at random and compares q with a model
// counter of modulus 40; checks that q holds while clk_en is low, that it
// wraps from 39 to 0, and that reset clears it.
module tb_sample_counter;
  timeunit 1ns;
  timeprecision 1ps;

  logic       clk = 1'b0;
  logic       rst;
  logic       en;
  logic [5:0] q;
  int         model;
  int         checks = 0;
  int         failures = 0;
  int         wraps = 0;

  always #10 clk = ~clk;

  sample_counter dut (.clock(clk), .rst(rst), .clk_en(en), .q(q));

  initial begin
    rst = 1'b1;
    en  = 1'b0;
    model = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      en = ($urandom_range(0, 3) != 0);
      if (i == 1000) rst = 1'b1;
      @(posedge clk);
      if (rst)     model = 0;
      else if (en) begin
        if (model == 39) wraps++;
        model = (model + 1) % 40;
      end
      @(negedge clk);
      rst = 1'b0;
      checks++;
      if (int'(q) != model) begin
        failures++;
        $display("FAIL step %0d: q=%0d expected %0d", i, q, model);
      end
    end
    checks++;
    if (wraps < 10) begin
      failures++;
      $display("FAIL only %0d wraps", wraps);
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
