// tb_control_block: checks the two strobes of control_block against the clock
// count since reset: `rom` in every odd clock (every 2nd clock), and
// `bit_separator` in clock 0 of every 80 (one bit = 1.6 us at 50 MHz). A second
// instance with one clock per sample and 8 samples per bit checks that the
// strobes follow the parameters. Reset is applied twice to check that it
// restarts the phase.
module tb_control_block;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0;
  logic rst;
  logic rom_a, bit_a, rom_b, bit_b;
  int   checks = 0;
  int   failures = 0;
  int   n;
  int   n_bit_a = 0;

  always #10 clk = ~clk;

  control_block dut_a (.clk(clk), .rst(rst), .rom(rom_a), .bit_separator(bit_a));
  control_block #(.CLKS_PER_SAMPLE_P(1), .SAMPLES_PER_BIT_P(8)) dut_b (
    .clk(clk), .rst(rst), .rom(rom_b), .bit_separator(bit_b));

  task automatic run(input int cycles);
    for (n = 0; n < cycles; n++) begin
      checks++;
      if (rom_a !== (n % 2 == 1)) begin
        failures++;
        $display("FAIL clock %0d: rom=%b", n, rom_a);
      end
      checks++;
      if (bit_a !== (n % 80 == 0)) begin
        failures++;
        $display("FAIL clock %0d: bit_separator=%b", n, bit_a);
      end
      if (bit_a) n_bit_a++;
      checks++;
      if (rom_b !== 1'b1 || bit_b !== (n % 8 == 0)) begin
        failures++;
        $display("FAIL clock %0d: small instance rom=%b bit=%b", n, rom_b, bit_b);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    run(400);
    @(negedge clk) rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    run(237);
    checks++;
    if (n_bit_a != 5 + 3) begin
      failures++;
      $display("FAIL bit strobes: %0d", n_bit_a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
