// tb_data_formatter: loads random samples every sixteen clocks and checks the
// three-bit output of each of the sixteen clocks against the packet layout:
// crystal i of the formatter occupies clocks 4i..4i+3 with bits {A2,A1,A0},
// {A5,A4,A3}, {A8,A7,A6}, {R1,R0,A9}. Also checks the LINKTEST pattern.
module tb_data_formatter;
  import iob_pkg::*;
  logic clk = 0, rst_n = 0, formsync = 0, linktest = 0;
  sample_t [3:0] smp;
  logic [2:0] dout;
  int checks = 0, failures = 0;

  data_formatter dut (.clk, .rst_n, .formsync_i(formsync), .linktest_i(linktest),
                      .sample_i(smp), .data_o(dout));

  always #8 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    sample_t [3:0] held;
    logic [2:0] e;
    smp = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 40; p++) begin
      linktest = (p >= 30);
      for (int i = 0; i < 4; i++) smp[i] = sample_t'($urandom);
      formsync = 1; @(negedge clk); formsync = 0;
      held = smp;
      for (int i = 0; i < 4; i++) smp[i] = sample_t'($urandom);  // inputs move on
      for (int r = 0; r < 16; r++) begin
        unique case (r % 4)
          0: e = held[r / 4].adc[2:0];
          1: e = held[r / 4].adc[5:3];
          2: e = held[r / 4].adc[8:6];
          default: e = {held[r / 4].range, held[r / 4].adc[9]};
        endcase
        if (linktest) e = 3'(r % 8);
        check(dout == e, $sformatf("period %0d clock %0d: %b exp %b", p, r, dout, e));
        if (r < 15) @(negedge clk);
      end
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
