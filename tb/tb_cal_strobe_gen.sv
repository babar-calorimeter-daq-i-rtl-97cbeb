// tb_cal_strobe_gen: at the default length, checks that a calibration command
// gives a strobe of exactly 29750 system clocks (500 us at 59.5 MHz), that
// each of the four outputs follows its enable, and that a command during the
// strobe does not stretch it.
module tb_cal_strobe_gen;
  logic clk = 0, rst_n = 0, cal = 0;
  logic [3:0] calen = 0, out;
  logic strobe;
  int checks = 0, failures = 0;

  cal_strobe_gen dut (.clk, .rst_n, .cal_i(cal), .calen_i(calen), .strobe_o(strobe),
                      .cal_strobe_o(out));

  always #8 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse_and_measure(input bit retrigger, output int len);
    len = 0;
    cal = 1; @(negedge clk); cal = 0;
    while (strobe) begin
      len++;
      if (retrigger && len == 1000) cal = 1; else cal = 0;
      check(out == calen, "gated outputs");
      @(negedge clk);
    end
    cal = 0;
  endtask

  initial begin
    int len;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(!strobe && out == 0, "idle");
    calen = 4'b1010;
    pulse_and_measure(0, len);
    check(len == 29750, $sformatf("strobe length %0d exp 29750", len));
    calen = 4'b0111;
    pulse_and_measure(1, len);
    check(len == 29750, $sformatf("retriggered length %0d exp 29750", len));
    repeat (10) @(negedge clk);
    check(!strobe && out == 0, "idle after");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
