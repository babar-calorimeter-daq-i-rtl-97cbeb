// tb_flink_ctrl: runs packets through the FLINK control-bit generator of
// fibre 2 with random inputs and checks every word of every packet against
// the packet layout: word 0 a control word with bits 19-18 zero, words 1-15
// data words carrying W0..W9, T0..T3, Tr in bit 19 and F0, F1, S0..S7 (or
// H0..H9), C0..C3, Cs in bit 18. Also checks the wall clock count, its
// clearing by SYNC, and idle (fill) words with LINK_ENABLE clear.
module tb_flink_ctrl;
  logic clk = 0, rst_n = 0, sync = 0, link_en = 0, sernosel = 0;
  logic [3:0] state = 0;
  logic period_end;
  logic [7:0] serial;
  logic [9:0] header, h_snap;
  logic [3:0] t, c;
  logic tr, cs;
  logic [1:0] bits;
  logic cav, dav;
  logic [9:0] wall;
  int checks = 0, failures = 0;
  int w_exp = 0;
  int n_ser = 0, n_hdr = 0, n_idle = 0;

  assign period_end = (state == 15);

  flink_ctrl #(.FIBRE(2'd2)) dut (.clk, .rst_n, .state_i(state), .period_end_i(period_end),
    .sync_i(sync), .link_enable_i(link_en), .sernosel_i(sernosel), .serial_i(serial),
    .header_i(header), .t_i(t), .c_i(c), .tr_i(tr), .cs_i(cs), .bits_o(bits),
    .cav_o(cav), .dav_o(dav), .wall_o(wall));

  always #8 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic e19, e18;
    serial = 8'hA5; header = 10'h2C3; h_snap = 10'h000; t = 0; c = 0; tr = 0; cs = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 120; p++) begin
      // state 0..15 of one packet; inputs of this packet set at the start
      link_en  = (p % 10 != 3);
      sernosel = p[0];
      t = 4'($urandom); c = 4'($urandom); tr = 1'($urandom); cs = 1'($urandom);
      if (p == 60) w_exp = 0;
      #1;
      for (int r = 0; r < 16; r++) begin
        if (!link_en) begin
          e19 = 0; e18 = 0;
        end else if (r == 0) begin
          e19 = 0; e18 = 0;
        end else if (r <= 10) begin
          e19 = 1'(w_exp >> (r - 1));
          if (sernosel) e18 = (r == 1) ? 1'b0 : (r == 2) ? 1'b1 : serial[r - 3];
          else          e18 = h_snap[10 - r];
        end else if (r <= 14) begin
          e19 = t[r - 11]; e18 = c[r - 11];
        end else begin
          e19 = tr; e18 = cs;
        end
        check(bits == {e19, e18}, $sformatf("packet %0d word %0d: %b exp %b%b", p, r, bits, e19, e18));
        check(cav == (link_en && r == 0) && dav == (link_en && r != 0), $sformatf("word type p%0d r%0d cav %b dav %b", p, r, cav, dav));
        if (link_en && r == 1) begin if (sernosel) n_ser++; else n_hdr++; end
        if (!link_en && r == 0) n_idle++;
        if ($urandom_range(0, 3) == 0) header = 10'($urandom);
        if (r == 15) h_snap = header;          // value taken at the period end
        sync = (p == 59 && r == 7);
        @(posedge clk);
        if (sync) state <= 0; else state <= state + 1;
        if (r == 15) w_exp = (w_exp + 1) % 1024;
        @(negedge clk);
        sync = 0;
        if (p == 59 && r == 7) begin
          check(wall == 0, "wall clock cleared by SYNC");
          break;
        end
      end
      if (p == 59) begin
        // restart packet alignment after SYNC: state is now 0
        w_exp = 0;
        h_snap = h_snap;
      end
    end
    check(n_ser > 10 && n_hdr > 10 && n_idle > 5, "all modes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
