// tb_iob_top: end-to-end test of a barrel I/O board at its default sizes
// (six ADBs, three fibres, 500 us calibration strobe). It acts as the fast
// control system on the C-LINK and D-LINK, as the ADBs (crystal samples,
// CARE register models, calibration DAC model), as the DAQ reading the three
// G-LINK word streams, and as the environmental monitoring board on the
// ELINK. Every mechanism is made to happen and counted: register write and
// read-back of every register kind, SYNC, trigger and calibration strobes seen
// in the packets, the 500 us strobe, DIGITISE rate switch, link idle (fill),
// link test pattern, serial/header mode, crystal data of all 72 crystals in
// the right word and bit positions, and the ELINK transactions.
module tb_iob_top;
  import iob_pkg::*;
  localparam int CB = 16;
  logic clk = 0, rst_n = 1, clink = 0;
  logic dlink, clk_ret, sample, digitise;
  sample_t [71:0] xtal;
  logic sdo, dac_sclk, dac_cs_n;
  logic [6:0] care_sclk, care_q;
  logic [3:0] cal_strobe;
  logic [1:0] calsel;
  logic [2:0][19:0] gdata;
  logic [2:0] gcav, gdav, glocked = 0;
  logic grst_n, frst_n, foff;
  logic [7:0] serial = 8'h3C;
  logic eclk = 0, ein = 0, eout;
  logic [2:0] adb_addr, fin_cs_n;
  logic adc_din, adc_sclk, adc_cs_n, adc_dout = 0, adc_sstrb = 1;
  logic fin_di, fin_dclk, fin_do = 0, fin_ready = 1;
  logic [CB-1:0] care_val [6];
  logic [7:0] care6_val;
  logic [15:0] vcal;
  int dac_n;
  int checks = 0, failures = 0, cyc = 0;
  logic last, pre;

  typedef enum int {M_WRITE, M_READ, M_SYNC, M_TRIG, M_CAL, M_STROBE500, M_DCLK,
                    M_IDLE, M_LINKTEST, M_SERNO_MODE, M_HDR_MODE, M_XTAL,
                    M_E_TEST, M_E_SERNO, M_E_GLINK, M_E_ADC, M_E_FIN, M_E_INVALID,
                    M_NUM} mech_e;
  int mech [M_NUM];

  iob_top dut (.clk, .rst_n, .clink_i(clink), .dlink_o(dlink), .clk_ret_o(clk_ret),
    .sample_o(sample), .digitise_o(digitise), .xtal_i(xtal), .reg_sdo_o(sdo),
    .care_sclk_o(care_sclk), .care_q_i(care_q), .dac_sclk_o(dac_sclk),
    .dac_cs_n_o(dac_cs_n), .cal_strobe_o(cal_strobe), .calsel_o(calsel),
    .glink_data_o(gdata), .glink_cav_o(gcav), .glink_dav_o(gdav),
    .glink_reset_n_o(grst_n), .fin_reset_n_o(frst_n), .fin_off_o(foff),
    .glink_locked_i(glocked), .serial_i(serial), .eclk, .ein_i(ein), .eout_o(eout),
    .adb_addr_o(adb_addr), .adc_din_o(adc_din), .adc_sclk_o(adc_sclk),
    .adc_cs_n_o(adc_cs_n), .adc_dout_i(adc_dout), .adc_sstrb_i(adc_sstrb),
    .fin_di_o(fin_di), .fin_dclk_o(fin_dclk), .fin_cs_n_o(fin_cs_n), .fin_do_i(fin_do),
    .fin_ready_i(fin_ready));

  for (genvar i = 0; i < 6; i++) begin : g_care
    care_reg_model #(.N(CB)) u_m (.sclk(care_sclk[i]), .d(sdo), .q(care_q[i]),
                                  .value(care_val[i]));
  end
  care_reg_model #(.N(8)) u_m6 (.sclk(care_sclk[6]), .d(sdo), .q(care_q[6]),
                                .value(care6_val));
  cal_dac_model u_dac (.sclk(dac_sclk), .d(sdo), .cs_n(dac_cs_n), .vcal, .nbits(dac_n));

  always #8 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // calibration strobe length in system clocks
  int strobe_rise = -1, strobe_len = 0;
  logic strobe_prev = 0;
  always @(negedge clk) begin
    if ((cal_strobe != 0) && !strobe_prev) strobe_rise = cyc;
    if ((cal_strobe == 0) && strobe_prev)  strobe_len = cyc - strobe_rise;
    strobe_prev = (cal_strobe != 0);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- C-LINK / D-LINK ----------------
  task automatic send(input logic [4:0] opc, input logic [4:0] adr,
                      input int n, input logic [31:0] d, output int p);
    logic [9:0] h;
    h = {opc, adr};
    @(negedge clk); clink = 1; p = cyc + 1;
    for (int i = 9; i >= 0; i--) begin @(negedge clk); clink = h[i]; end
    if (n > 0) begin
      repeat (4) begin @(negedge clk); clink = 0; end
      for (int k = 0; k < n; k++) begin
        @(negedge clk); clink = d[k];
        if (k < n - 1) repeat (15) begin @(negedge clk); clink = 1'($urandom); end
      end
      repeat (15) begin @(negedge clk); clink = 0; end
      mech[M_WRITE]++;
    end
    @(negedge clk); clink = 0;
  endtask

  task automatic read_reg(input logic [4:0] opc, input logic [4:0] adr, input int n,
                          output logic [31:0] v);
    int p, t;
    logic [15:0] hdr;
    send(opc, adr, 0, 0, p);
    t = 0;
    while (!dlink && t < 100) begin @(negedge clk); t++; end
    check(t < 100, "D-LINK response starts");
    for (int j = 0; j < 16; j++) begin hdr[j] = dlink; @(negedge clk); end
    check(hdr == {3'b000, adr[0], adr[1], adr[2], adr[3], adr[4],
                  opc[0], opc[1], opc[2], opc[3], opc[4], 3'b101}, "response header");
    v = 0;
    for (int k = 0; k < n; k++) begin
      repeat (15) @(negedge clk);
      v[k] = dlink; @(negedge clk);
    end
    mech[M_READ]++;
    repeat (20) @(negedge clk);
  endtask

  task automatic write_ctrl(input logic [7:0] v);
    int p;
    send(OP_WR_CTRL, 0, 8, 32'(v), p);
    repeat (5) @(negedge clk);
  endtask

  // one packet of fibre f, from word 0
  task automatic packet(input int f, output logic [15:0][19:0] w, output bit typed_ok);
    typed_ok = 1;
    while (!gcav[f]) @(negedge clk);
    for (int r = 0; r < 16; r++) begin
      w[r] = gdata[f];
      if (gcav[f] != (r == 0) || gdav[f] != (r != 0)) typed_ok = 0;
      @(negedge clk);
    end
  endtask

  // ---------------- ELINK ----------------
  task automatic bit_out(input bit v);
    ein = v; #200;
    pre = eout;
    eclk = 1; #5; last = eout; #195;
    eclk = 0;
  endtask
  task automatic ecommand(input logic [5:0] c);
    bit_out(1);
    for (int i = 0; i < 6; i++) bit_out(c[i]);
  endtask

  initial begin
    logic [31:0] v, rv;
    logic [15:0][19:0] w;
    bit ok;
    int p, len, e_sync, nd;
    logic [3:0] exp_t;
    logic pd;
    for (int i = 0; i < 72; i++) xtal[i] = sample_t'(i * 37 + 5);
    #1 rst_n = 0;   // a real edge for the asynchronous resets
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(clk_ret == clk, "return clock");
    // links idle after reset: fill frames only
    ok = 1;
    repeat (40) begin if (gcav != 0 || gdav != 0) ok = 0; @(negedge clk); end
    check(ok, "fill frames while LINK_ENABLE is clear");
    mech[M_IDLE]++;
    check(!grst_n && !frst_n, "transmitters held in reset");
    // registers
    write_ctrl(8'b0110_1001);   // enable, FIN_RESET* off, GLINK_RESET* off, SERNOSEL
    check(grst_n && frst_n && !foff, "transmitter controls");
    read_reg(OP_RD_CTRL, 0, 8, rv);
    check(rv[7:0] == 8'b0110_1001, "control read-back");
    send(OP_WR_CAL, 0, 6, 32'b10_0101, p);
    read_reg(OP_RD_CAL, 0, 6, rv);
    check(rv[5:0] == 6'b10_0101 && calsel == 2'b10, "cal control");
    for (int i = 0; i < 7; i++) begin
      v = $urandom;
      send(OP_WR_CARE, 5'(i), (i == 6) ? 8 : CB, v, p);
      read_reg(OP_RD_CARE, 5'(i), (i == 6) ? 8 : CB, rv);
      if (i < 6) check(rv[CB-1:0] == v[CB-1:0] && care_val[i] == v[CB-1:0], "CARE");
      else       check(rv[7:0] == v[7:0] && care6_val == v[7:0], "CARE 6");
    end
    send(OP_WR_DAC, 0, 16, 32'h0000_C3A5, p);
    repeat (20) @(negedge clk);
    check(dac_n == 16 && vcal == 16'hA5C3, $sformatf("DAC %h", vcal));
    // SYNC
    send(OP_SYNC, 0, 0, 0, p);
    e_sync = p + 11;
    mech[M_SYNC]++;
    // DIGITISE rates
    nd = 0; pd = digitise;
    repeat (160) begin @(negedge clk); if (digitise && !pd) nd++; pd = digitise; end
    check(nd == 40, $sformatf("DIGITISE at 14.9 MHz: %0d edges", nd));
    write_ctrl(8'b0110_1101);
    repeat (16) @(negedge clk);
    nd = 0; pd = digitise;
    repeat (160) begin @(negedge clk); if (digitise && !pd) nd++; pd = digitise; end
    check(nd == 10, $sformatf("DIGITISE at 3.7 MHz: %0d edges", nd));
    mech[M_DCLK]++;
    // crystal data on all three fibres, serial number mode
    repeat (40) @(negedge clk);
    for (int f = 0; f < 3; f++) begin
      packet(f, w, ok);
      check(ok, "word types");
      for (int r = 0; r < 16; r++)
        for (int k = 0; k < 6; k++) begin
          logic [11:0] s;
          s = xtal[24 * f + 4 * k + r / 4];
          check(w[r][3 * k +: 3] == s[3 * (r % 4) +: 3],
                $sformatf("fibre %0d word %0d column %0d", f, r, k));
        end
      for (int r = 1; r <= 10; r++)
        check(w[r][18] == (r == 1 ? 1'(f + 1) : r == 2 ? 1'((f + 1) >> 1) : serial[r - 3]),
              "serial/fibre field");
      check(w[0][19:18] == 0, "control word carries crystal bits only");
      mech[M_XTAL]++;
    end
    mech[M_SERNO_MODE]++;
    // trigger, header mode
    write_ctrl(8'b0010_1101);
    while ((cyc - e_sync) % 16 != 6) @(negedge clk);
    send(OP_L1A, 5'h0B, 0, 0, p);
    exp_t = 4'((p + 10 - e_sync) % 16);
    repeat (12) @(negedge clk);
    packet(1, w, ok);
    check(w[15][19] == 1, "Tr");
    check({w[14][19], w[13][19], w[12][19], w[11][19]} == exp_t, "T field");
    for (int i = 0; i < 10; i++)
      check(w[1 + i][18] == (i < 5 ? OP_L1A[4 - i] : 1'(5'h0B >> (9 - i))), "H field");
    mech[M_TRIG]++; mech[M_HDR_MODE]++;
    // calibration strobe: 500 us on the enabled groups (CALEN = 0101)
    send(OP_CAL, 0, 0, 0, p);
    exp_t = 4'((p + 10 - e_sync) % 16);
    mech[M_CAL]++;
    packet(2, w, ok);
    check(w[15][18] == 1 && {w[14][18], w[13][18], w[12][18], w[11][18]} == exp_t,
          "Cs and C fields");
    while (cal_strobe != 0) begin
      check(cal_strobe == 4'b0101, "strobe gating");
      @(negedge clk);
    end
    @(negedge clk);
    check(strobe_len == 29750, $sformatf("strobe length %0d clocks", strobe_len));
    mech[M_STROBE500]++;
    // link test pattern
    write_ctrl(8'b0010_1011);
    repeat (40) @(negedge clk);
    packet(0, w, ok);
    for (int r = 0; r < 16; r++) check(w[r][17:0] == {6{3'(r % 8)}}, "test pattern");
    mech[M_LINKTEST]++;
    // back to idle links
    write_ctrl(8'b0010_1000);
    repeat (20) @(negedge clk);
    check(gcav == 0 && gdav == 0, "links idle again");
    mech[M_IDLE]++;

    // ---------------- ELINK ----------------
    ecommand(6'b00_0011);
    for (int k = 0; k < 4; k++) begin bit_out(1); check(last == ((k % 2) == 0), "E test"); end
    bit_out(0); bit_out(0);
    mech[M_E_TEST]++;
    ecommand(6'b00_1011);
    for (int k = 0; k < 9; k++) begin
      bit_out(1); check(last == (k < 8 ? serial[k] : 1'b0), "E serial");
    end
    bit_out(0); bit_out(0);
    mech[M_E_SERNO]++;
    glocked = 3'b100; #300; glocked = 3'b110; #300;
    ecommand(6'b00_0111);
    begin
      logic [5:0] e; e = 6'b11_1100;   // a 0/0, b 1/1, c 1/1
      for (int k = 0; k < 6; k++) begin bit_out(1); check(last == e[k], "E glink"); end
    end
    bit_out(0); bit_out(0);
    mech[M_E_GLINK]++;
    bit_out(1); bit_out(0);   // invalid command
    bit_out(0);
    mech[M_E_INVALID]++;
    // ADC channel 6 (+5V Finisar)
    ecommand(6'b110_001);
    check(adb_addr == 3'd6 && !adc_cs_n, "ADC selected, MUX address");
    for (int k = 0; k < 7; k++) bit_out(1);
    ein = 1; #200; eclk = 1; #100;
    adc_sstrb = 0; #5; check(eout == 0, "SSTRB on EOUT"); #500; adc_sstrb = 1; #200;
    eclk = 0;
    for (int k = 11; k >= 0; k--) begin
      adc_dout = 1'(12'h5A7 >> k); bit_out(0);
      check(pre == 1'(12'h5A7 >> k), "ADC data");
    end
    bit_out(1);
    check(adc_cs_n, "ADC access ended");
    mech[M_E_ADC]++;
    // Finisar 1; ECLK stays high after the command until READY is low
    bit_out(1);
    for (int i = 0; i < 5; i++) bit_out(1'(6'b001_101 >> i));
    ein = 0; #200; eclk = 1; #200;
    check(fin_cs_n == 3'b110, "Finisar 1 selected");
    fin_ready = 0; #5; check(eout == 0, "READY on EOUT");
    fin_do = 1; #100; eclk = 0; #100;
    for (int k = 0; k < 8; k++) begin
      ein = k[1]; #100;
      check(eout == !k[0], "Finisar data");
      eclk = 1; #200;
      if (k < 7) begin eclk = 0; #5; fin_do = k[0]; #95; end
    end
    #300; fin_ready = 1; #5; check(eout == 1, "READY after data");
    #100; eclk = 0; #200;
    bit_out(0);
    check(fin_cs_n == 3'b111, "Finisar released");
    mech[M_E_FIN]++;

    for (int m = 0; m < M_NUM; m++) begin
      check(mech[m] > 0, $sformatf("mechanism %s happened", mech_e'(m)));
      $display("mechanism %-14s %0d", mech_e'(m), mech[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
