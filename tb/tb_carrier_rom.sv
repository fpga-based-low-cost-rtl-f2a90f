// tb_carrier_rom: reads every address of three ROMs (one period at 0 degrees,
// one period at 180 degrees, two periods at 0 degrees) and compares each word
// with the reference sine in single precision. Also checks a set of sample
// words quoted from the original simulation traces, the one-clock read
// latency, and that out-of-range addresses read 0.
module tb_carrier_rom
  import tb_ref_pkg::ref_carrier;
;
  timeunit 1ns;
  timeprecision 1ps;
  logic        clk = 1'b0;
  logic [5:0]  addr;
  logic [31:0] q_a, q_b, q_c;
  int          checks = 0;
  int          failures = 0;

  always #10 clk = ~clk;

  carrier_rom #(.CYCLES(1), .PHASE_DEG(0))   rom_a (.clock(clk), .address(addr), .q(q_a));
  carrier_rom #(.CYCLES(1), .PHASE_DEG(180)) rom_b (.clock(clk), .address(addr), .q(q_b));
  carrier_rom #(.CYCLES(2), .PHASE_DEG(0))   rom_c (.clock(clk), .address(addr), .q(q_c));

  task automatic expect_word(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  task automatic read(input int a);
    @(negedge clk) addr = 6'(a);
    @(posedge clk);
    #1;
  endtask

  initial begin
    addr = '0;
    for (int a = 0; a < 40; a++) begin
      read(a);
      expect_word($sformatf("0 deg [%0d]", a),   q_a, ref_carrier(1, 0, a, 40));
      expect_word($sformatf("180 deg [%0d]", a), q_b, ref_carrier(1, 180, a, 40));
      expect_word($sformatf("2 cyc [%0d]", a),   q_c, ref_carrier(2, 0, a, 40));
    end
    // Words printed in the original traces.
    read(0);  expect_word("trace a0", q_a, 32'h00000000);
    read(1);  expect_word("trace a1", q_a, 32'h3E20305B);
    read(2);  expect_word("trace a2", q_a, 32'h3E9E377A);
    read(3);  expect_word("trace a3", q_a, 32'h3EE87171);
    read(36); expect_word("trace b36", q_b, 32'h3F167918);
    read(37); expect_word("trace b37", q_b, 32'h3EE87171);
    read(38); expect_word("trace b38", q_b, 32'h3E9E377A);
    read(39); expect_word("trace b39", q_b, 32'h3E20305B);
    read(36); expect_word("trace c36", q_c, 32'hBF737871);
    read(37); expect_word("trace c37", q_c, 32'hBF4F1BBD);
    read(38); expect_word("trace c38", q_c, 32'hBF167918);
    // Latency: the output must not follow a new address before the clock edge.
    read(10);
    @(negedge clk) addr = 6'd30;
    #1 expect_word("latency hold", q_a, 32'h3F800000);
    @(posedge clk);
    #1 expect_word("latency update", q_a, 32'hBF800000);
    read(45); expect_word("out of range", q_a, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
