// tb_control_reg: shifts random bytes into the control register and checks
// that the parallel outputs do not move while shifting, take the whole value
// at the load, decode to the named bits, and that q_o returns the bits in the
// order they were written.
module tb_control_reg;
  import iob_pkg::*;
  logic clk = 0, rst_n = 0, d = 0, shift = 0, load = 0, q;
  logic [7:0] par;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  control_reg dut (.clk, .rst_n, .d_i(d), .shift_i(shift), .load_i(load), .q_o(q),
                   .par_o(par), .ctrl_o(ctrl));

  always #8 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [7:0] v, old;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(par == 0, "reset value");
    old = 0;
    for (int t = 0; t < 20; t++) begin
      v = 8'($urandom);
      for (int k = 0; k < 8; k++) begin
        d = v[k]; shift = 1; @(negedge clk); shift = 0;
        check(par == old, "parallel stage still while shifting");
        repeat (2) @(negedge clk);
      end
      load = 1; @(negedge clk); load = 0;
      check(par == v, $sformatf("loaded %h exp %h", par, v));
      check(ctrl.link_enable == v[0] && ctrl.linktest == v[1] && ctrl.dclksel == v[2] &&
            ctrl.fin_reset_n == v[3] && ctrl.fin_off == v[4] &&
            ctrl.glink_reset_n == v[5] && ctrl.sernosel == v[6], "decoded bits");
      // read back with loop-back
      for (int k = 0; k < 8; k++) begin
        check(q == v[k], $sformatf("readback bit %0d", k));
        d = q; shift = 1; @(negedge clk); shift = 0;
      end
      check(par == v, "parallel unchanged by read");
      old = v;
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
