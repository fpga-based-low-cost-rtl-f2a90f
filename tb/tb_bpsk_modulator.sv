// tb_bpsk_modulator: BPSK modulator run with the data word of the original BPSK
// simulation, 01100101001011, at a 50 MHz clock.
// All samples and bits are compared with mod_scoreboard for two words.
// Besides, the testbench checks the d_out sequence bit by bit (LSB first),
// that d_out only changes on a 1.6 us grid (80 clocks of 20 ns), and the
// seven sample words around the first 0->1 symbol change as printed in the
// original simulation trace: four words before the change, the 0 with which
// the new bit starts, and the two words after it.
module tb_bpsk_modulator;
  timeunit 1ns;
  timeprecision 1ps;

  logic        clk = 1'b0;
  logic        rst;
  logic [13:0] d_in;
  logic [31:0] result;
  logic        d_out;
  int          sc, sf, sbits, swords, sto0, sto1;
  int          checks = 0;
  int          failures = 0;
  int          n_grid = 0;
  localparam logic [13:0] DATA = 14'b01100101001011;
  localparam logic [31:0] TRACE [7] = '{32'h3F167918, 32'h3EE87171, 32'h3E9E377A, 32'h3E20305B,
                                        32'h00000000, 32'h3E20305B, 32'h3E9E377A};
  logic [31:0] hist [$];
  realtime     t_start;
  logic        prev = 1'b0;
  bit          seen_switch = 1'b0;
  logic        prev_t = 1'b0;

  always #10 clk = ~clk;  // 50 MHz

  bpsk_modulator dut (.clk(clk), .rst(rst), .d_in(d_in), .result(result), .d_out(d_out));
  mod_scoreboard #(.F1_CYCLES(1), .F1_PHASE(0), .F0_CYCLES(1), .F0_PHASE(180)) sb (
    .clk(clk), .rst(rst), .d_in(d_in), .result(result), .d_out(d_out),
    .checks(sc), .failures(sf), .n_bits(sbits), .n_words(swords), .n_to0(sto0), .n_to1(sto1));

  task automatic expect_word(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: result=%h expected %h", what, got, exp);
    end
  endtask

  // Bit period: every d_out change lies a whole number of bits after reset.
  always @(negedge clk) if (!rst) begin
    if (d_out !== prev) begin
      checks++;
      n_grid++;
      if (($rtoi(($realtime - t_start) / 1ns) % 1600) != 10) begin
        failures++;
        $display("FAIL d_out edge at %t is off the 1.6 us bit grid", $realtime);
      end
    end
    prev = d_out;
  end

  // Trace words around the first change away from bit value 0.
  always @(negedge clk) if (!rst) begin
    if (!seen_switch && hist.size() >= 8 && d_out !== 1'b0 && prev_t === 1'b0) begin
      seen_switch = 1'b1;
      expect_word("4th word before change", hist[hist.size()-7], TRACE[0]);
      expect_word("3rd word before change", hist[hist.size()-5], TRACE[1]);
      expect_word("2nd word before change", hist[hist.size()-3], TRACE[2]);
      expect_word("word before change",     hist[hist.size()-1], TRACE[3]);
      expect_word("first word of new bit",  result,              TRACE[4]);
      fork
        begin
          repeat (2) @(negedge clk);
          expect_word("second word of new bit", result, TRACE[5]);
          repeat (2) @(negedge clk);
          expect_word("third word of new bit", result, TRACE[6]);
        end
      join_none
    end
    hist.push_back(result);
    if (hist.size() > 16) void'(hist.pop_front());
    prev_t = d_out;
  end

  initial begin
    rst  = 1'b1;
    d_in = DATA;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    t_start = $realtime + 10ns;  // first active rising edge
    @(negedge clk);
    for (int b = 0; b < 28; b++) begin
      checks++;
      if (d_out !== DATA[b % 14]) begin
        failures++;
        $display("FAIL bit %0d: d_out=%b expected %b", b, d_out, DATA[b % 14]);
      end
      repeat (80) @(negedge clk);
    end
    checks++;
    if (!seen_switch || n_grid < 10 || sto0 == 0 || sto1 == 0 || swords < 2) begin
      failures++;
      $display("FAIL coverage: trace switch %0b, edges %0d, 1->0 %0d, 0->1 %0d, words %0d",
               seen_switch, n_grid, sto0, sto1, swords);
    end
    checks   += sc;
    failures += sf;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
