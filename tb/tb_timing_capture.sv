// tb_timing_capture: drives random trigger and calibration strobes over many
// sample periods and compares T, C, and the per-packet copies T, C, Tr, Cs
// with a reference kept by the testbench.
module tb_timing_capture;
  logic clk = 0, rst_n = 0, trig = 0, cal = 0;
  logic [3:0] state = 0;
  logic period_end;
  logic [3:0] t, c, tf, cf;
  logic tr, cs;
  int checks = 0, failures = 0;
  int ref_t = 0, ref_c = 0, ref_tf = 0, ref_cf = 0;
  bit ref_tp = 0, ref_cp = 0, ref_tr = 0, ref_cs = 0;
  int n_tr = 0, n_cs = 0;

  assign period_end = (state == 15);

  timing_capture dut (.clk, .rst_n, .state_i(state), .period_end_i(period_end),
    .trig_i(trig), .cal_i(cal), .t_o(t), .c_o(c), .t_frame_o(tf), .c_frame_o(cf),
    .tr_frame_o(tr), .cs_frame_o(cs));

  always #8 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      trig = ($urandom_range(0, 39) == 0);
      cal  = ($urandom_range(0, 59) == 0);
      @(posedge clk);
      // reference update for this edge
      if (trig) ref_t = state;
      if (cal)  ref_c = state;
      if (state == 15) begin
        ref_tf = ref_t; ref_cf = ref_c;
        ref_tr = ref_tp | trig; ref_cs = ref_cp | cal;
        ref_tp = 0; ref_cp = 0;
        if (ref_tr) n_tr++;
        if (ref_cs) n_cs++;
      end else begin
        ref_tp |= trig; ref_cp |= cal;
      end
      state <= state + 1;
      @(negedge clk);
      check(t == 4'(ref_t) && c == 4'(ref_c), "T/C live");
      check(tf == 4'(ref_tf) && cf == 4'(ref_cf) && tr == ref_tr && cs == ref_cs,
            $sformatf("frame copy at %0d", i));
    end
    check(n_tr > 10 && n_cs > 10, "flags exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
