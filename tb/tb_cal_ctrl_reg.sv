// tb_cal_ctrl_reg: writes random six-bit values and checks the strobe enables
// CALEN0-3 (bits 0-3) and capacitor selects CALSEL0-1 (bits 4-5), and that
// a read with loop-back returns the value in write order and leaves it.
module tb_cal_ctrl_reg;
  logic clk = 0, rst_n = 0, d = 0, shift = 0, q;
  logic [3:0] calen;
  logic [1:0] calsel;
  int checks = 0, failures = 0;

  cal_ctrl_reg dut (.clk, .rst_n, .d_i(d), .shift_i(shift), .q_o(q),
                    .calen_o(calen), .calsel_o(calsel));

  always #8 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [5:0] v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(calen == 0 && calsel == 0, "reset value");
    for (int t = 0; t < 20; t++) begin
      v = 6'($urandom);
      for (int k = 0; k < 6; k++) begin
        d = v[k]; shift = 1; @(negedge clk); shift = 0; @(negedge clk);
      end
      check(calen == v[3:0] && calsel == v[5:4], $sformatf("value %h", v));
      for (int k = 0; k < 6; k++) begin
        check(q == v[k], $sformatf("readback bit %0d", k));
        d = q; shift = 1; @(negedge clk); shift = 0;
      end
      check(calen == v[3:0] && calsel == v[5:4], "unchanged by read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
