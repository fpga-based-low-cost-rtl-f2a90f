// tb_sample_mux: random data on both inputs and a random select; result must
// be data1x for sel = 1 and data0x for sel = 0.
module tb_sample_mux;
  timeunit 1ns;
  timeprecision 1ps;

  logic [31:0] d1, d0, r;
  logic        sel;
  int          checks = 0;
  int          failures = 0;

  sample_mux dut (.data1x(d1), .data0x(d0), .sel(sel), .result(r));

  initial begin
    for (int i = 0; i < 500; i++) begin
      d1  = $urandom();
      d0  = $urandom();
      sel = 1'($urandom_range(0, 1));
      #1;
      checks++;
      if (r !== (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%b d1=%h d0=%h result=%h", sel, d1, d0, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
