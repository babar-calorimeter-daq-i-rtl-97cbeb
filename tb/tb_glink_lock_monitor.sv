// tb_glink_lock_monitor: toggles the three LOCKED inputs and checks the
// synchronised state, that only rising transitions set the sticky flags, that
// a flag survives until read, and that a read (toggle) clears it.
module tb_glink_lock_monitor;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [2:0] locked = 0, lock, edg;
  int checks = 0, failures = 0;

  glink_lock_monitor dut (.clk, .rst_n, .locked_i(locked), .clr_toggle_i(clr),
                          .lock_o(lock), .edge_o(edg));

  always #8 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic settle; repeat (5) @(negedge clk); endtask

  initial begin
    logic [2:0] exp_edge;
    repeat (2) @(negedge clk);
    rst_n = 1;
    settle();
    check(lock == 0 && edg == 0, "reset");
    exp_edge = 0;
    for (int t = 0; t < 200; t++) begin
      logic [2:0] nl;
      nl = 3'($urandom);
      exp_edge |= nl & ~locked;
      locked = nl;
      settle();
      check(lock == locked, "instantaneous state");
      check(edg == exp_edge, $sformatf("edges %b exp %b", edg, exp_edge));
      if ($urandom_range(0, 2) == 0) begin
        clr = ~clr; settle();
        exp_edge = 0;
        check(edg == 0, "cleared by read");
      end
    end
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
