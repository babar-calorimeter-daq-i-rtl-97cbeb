// tb_clk_divider: checks the sixteen-state divider against a counter kept by
// the testbench: state sequence, SAMPLE = 1/16 and DIGITISE = 1/4 or 1/16 of
// the system clock (counted as rising edges over 320 clocks), the period end
// flag, and the synchronous reset by SYNC.
module tb_clk_divider;
  logic clk = 0, rst_n = 0, sync = 0, dclksel = 0;
  logic [3:0] state;
  logic sample, digitise, period_end;
  int checks = 0, failures = 0;
  int exp_state;

  clk_divider dut (.clk, .rst_n, .sync_i(sync), .dclksel_i(dclksel),
                   .state_o(state), .sample_o(sample), .digitise_o(digitise),
                   .period_end_o(period_end));

  always #8 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic count_edges(input int cycles, output int n_s, output int n_d);
    logic ps, pd;
    n_s = 0; n_d = 0; ps = sample; pd = digitise;
    repeat (cycles) begin
      @(negedge clk);
      if (sample && !ps) n_s++;
      if (digitise && !pd) n_d++;
      ps = sample; pd = digitise;
    end
  endtask

  initial begin
    int ns, nd;
    repeat (3) @(negedge clk);
    rst_n = 1;
    exp_state = 0;
    check(state == 0, "state 0 after reset");
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      exp_state = (exp_state + 1) % 16;
      check(state == 4'(exp_state), $sformatf("state %0d exp %0d", state, exp_state));
      check(period_end == (exp_state == 15), "period_end");
    end
    count_edges(320, ns, nd);
    check(ns == 20, $sformatf("SAMPLE edges %0d exp 20", ns));
    check(nd == 80, $sformatf("DIGITISE 14.9 MHz edges %0d exp 80", nd));
    dclksel = 1;
    repeat (16) @(negedge clk);
    count_edges(320, ns, nd);
    check(nd == 20, $sformatf("DIGITISE 3.7 MHz edges %0d exp 20", nd));
    // SYNC at an arbitrary state
    repeat (5) @(negedge clk);
    check(state != 0, "not zero before SYNC");
    sync = 1; @(negedge clk); sync = 0;
    check(state == 0, "state 0 after SYNC");
    @(negedge clk);
    check(state == 1, "counts on after SYNC");
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
