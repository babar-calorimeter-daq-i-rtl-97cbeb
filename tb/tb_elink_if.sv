// tb_elink_if: plays the environmental monitoring board. It sends start bit
// and command on EIN with rising ECLK edges and checks EOUT after each rising
// edge for every transaction: test pattern, serial number (LSB first, then
// zeros), G-LINK status (lock and edge flags of a, b, c, edges cleared by the
// read), an invalid command, an ADC access (MUX address, chip select, eight
// clocked command bits, SSTRB then DOUT on EOUT, end on EIN high) and Finisar
// accesses (chip select, READY on EOUT, abort with READY high, eight data
// clocks, end after READY). The system clock runs for the lock monitor.
module tb_elink_if;
  logic clk = 0, eclk = 0, rst_n = 1, ein = 0;
  logic eout, clr_toggle;
  logic [7:0] serial = 8'b1011_0010;
  logic [2:0] locked = 0, lock, edg;
  logic [2:0] adb_addr, fin_cs_n;
  logic adc_din, adc_sclk, adc_cs_n, adc_dout = 0, adc_sstrb = 1;
  logic fin_di, fin_dclk, fin_do = 0, fin_ready = 1;
  int checks = 0, failures = 0;
  int n_adc_sclk = 0, n_fin_dclk = 0;
  logic last, pre;

  glink_lock_monitor u_lock (.clk, .rst_n, .locked_i(locked), .clr_toggle_i(clr_toggle),
                             .lock_o(lock), .edge_o(edg));

  elink_if dut (.eclk, .rst_n, .ein_i(ein), .eout_o(eout), .serial_i(serial),
    .lock_i(lock), .edge_i(edg), .clr_toggle_o(clr_toggle), .adb_addr_o(adb_addr),
    .adc_din_o(adc_din), .adc_sclk_o(adc_sclk), .adc_cs_n_o(adc_cs_n),
    .adc_dout_i(adc_dout), .adc_sstrb_i(adc_sstrb), .fin_di_o(fin_di),
    .fin_dclk_o(fin_dclk), .fin_cs_n_o(fin_cs_n), .fin_do_i(fin_do),
    .fin_ready_i(fin_ready));

  always #8 clk = ~clk;
  always @(posedge adc_sclk) n_adc_sclk++;
  always @(posedge fin_dclk) n_fin_dclk++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one ECLK period with EIN = v; 'last' is EOUT just after the rising edge
  task automatic bit_out(input bit v);
    ein = v; #200;
    pre = eout;
    eclk = 1; #5; last = eout; #195;
    eclk = 0;
  endtask

  task automatic command(input logic [5:0] c);  // c[0] = c0, sent first
    bit_out(1);
    for (int i = 0; i < 6; i++) bit_out(c[i]);
  endtask

  // command whose last rising edge leaves ECLK high
  task automatic command_hold(input logic [5:0] c);
    bit_out(1);
    for (int i = 0; i < 5; i++) bit_out(c[i]);
    ein = c[5]; #200; eclk = 1; #5; last = eout; #195;
  endtask

  task automatic idle(input int n); repeat (n) bit_out(0); endtask

  initial begin
    logic [11:0] adc_val;
    logic [7:0] fin_q, fin_d;
    int n0;
    #1 rst_n = 0;   // a real edge for the asynchronous resets
    #100 rst_n = 1;
    idle(3);
    // test pattern
    command(6'b00_0011);
    for (int k = 0; k < 7; k++) begin
      bit_out(1);
      check(last == ((k % 2) == 0), $sformatf("test pattern edge %0d", k));
    end
    bit_out(0);
    check(last == 0, "test pattern ends");
    idle(2);
    // serial number, LSB first, then zeros
    command(6'b00_1011);
    for (int k = 0; k < 11; k++) begin
      bit_out(1);
      check(last == ((k < 8) ? serial[k] : 1'b0), $sformatf("serial bit %0d", k));
    end
    bit_out(0);
    idle(2);
    // G-LINK status: a rises and stays, b rises and falls, c stays low
    locked = 3'b001; #500; locked = 3'b011; #500; locked = 3'b001; #500;
    command(6'b00_0111);
    begin
      logic [5:0] e;
      e = 6'b00_1011;  // lock a, edge a, lock b=0, edge b=1, lock c=0, edge c=0
      for (int k = 0; k < 8; k++) begin
        bit_out(1);
        check(last == ((k < 6) ? e[k] : 1'b0), $sformatf("glink bit %0d", k));
      end
    end
    bit_out(0);
    idle(2);
    #500;
    command(6'b00_0111);
    begin
      logic [5:0] e;
      e = 6'b00_0001;  // edges cleared, a still locked
      for (int k = 0; k < 6; k++) begin
        bit_out(1);
        check(last == e[k], $sformatf("glink second read bit %0d", k));
      end
    end
    bit_out(0);
    idle(2);
    // invalid command: start bit then c0 = 0, back to idle; a test command
    // right after must work
    bit_out(1); bit_out(0);
    command(6'b00_0011);
    bit_out(1);
    check(last == 1, "command after invalid one");
    bit_out(0);
    idle(2);
    // ADC access, MUX address 5 = a0 1, a1 0, a2 1
    n0 = n_adc_sclk;
    command(6'b101_001);
    check(adb_addr == 3'd5, "ADB MUX address");
    check(adc_cs_n == 0, "ADC selected");
    for (int k = 0; k < 7; k++) begin
      bit_out(k % 3 == 0);
      check(adc_din == ein, "DIN follows EIN");
    end
    // eighth command bit; ECLK then stays high through the conversion
    ein = 1; #200; eclk = 1; #100;
    check(n_adc_sclk - n0 == 8, $sformatf("ADC command clocks %0d", n_adc_sclk - n0));
    ein = 0;
    check(eout == 1, "SSTRB high on EOUT");
    adc_sstrb = 0; #5; check(eout == 0, "SSTRB low on EOUT"); #1000;
    adc_sstrb = 1; #5; check(eout == 1, "SSTRB back high"); #200;
    eclk = 0;
    adc_val = 12'hB6D;
    for (int k = 11; k >= 0; k--) begin
      adc_dout = adc_val[k];   // ADC moved its output on the falling edge
      bit_out(0);
      check(pre == adc_val[k], $sformatf("ADC data bit %0d", k));
    end
    check(adc_cs_n == 0, "ADC still selected");
    bit_out(1);
    check(adc_cs_n == 1, "ADC access ended by EIN high");
    idle(2);
    // Finisar 2 (a0 0, a1 1), READY high at the next rising edge: abort
    command_hold(6'b010_101);
    check(fin_cs_n == 3'b101, "Finisar 2 selected");
    check(eout == 1, "READY (high) shown");
    #300; eclk = 0; #200;
    bit_out(0);
    check(fin_cs_n == 3'b111, "abort when not ready");
    idle(2);
    // Finisar 3 (a0 1, a1 1), full access
    n0 = n_fin_dclk;
    command_hold(6'b011_101);
    check(fin_cs_n == 3'b011, "Finisar 3 selected");
    #300; fin_ready = 0; #5;
    check(eout == 0, "READY low on EOUT");
    fin_d = 8'h5C; fin_q = 8'hE1;
    fin_do = fin_q[0];
    #100; eclk = 0; #5;
    check(eout == fin_q[0], "first Finisar output bit after the falling edge");
    for (int k = 0; k < 8; k++) begin
      ein = fin_d[k]; #100;
      pre = eout;
      check(pre == fin_q[k], $sformatf("Finisar data bit %0d", k));
      eclk = 1; #5;
      check(fin_di == fin_d[k], "SI follows EIN");
      #195;
      if (k < 7) begin
        eclk = 0; #5;
        fin_do = fin_q[k + 1];   // Finisar output moves on the falling edge
      end
    end
    check(n_fin_dclk - n0 == 8, $sformatf("Finisar clocks %0d", n_fin_dclk - n0));
    check(eout == 0 && fin_cs_n == 3'b011, "READY low shown after data");
    #500; fin_ready = 1; #5;
    check(eout == 1, "READY high shown");
    #100; eclk = 0; #200;
    bit_out(0);
    check(fin_cs_n == 3'b111, "Finisar access ended");
    // Finisar number 0 is ignored
    command(6'b000_101);
    check(fin_cs_n == 3'b111, "Finisar 0 ignored");
    idle(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
