// tb_protocol_receiver: drives the IOB controller through its C-LINK as the
// fast control system would and checks what the board does: control register
// write and D-LINK read-back, CARE register and calibration DAC writes through
// behavioural models, calibration control, SYNC resetting the divider,
// trigger and calibration strobes seen in the FLINK packet (T, C, Tr, Cs), the
// 500 us calibration strobe gated by CALEN, serial number / header mode of
// the FLINK and the fibre numbers. An end-cap controller (four ADBs) on the
// same C-LINK must never clock CARE registers 4 and 5.
module tb_protocol_receiver;
  import iob_pkg::*;
  localparam int CB = 16;
  logic clk = 0, rst_n = 0, clink = 0;
  logic dlink, sample, digitise, formsync, linktest;
  logic [3:0] state;
  logic sdo, dac_sclk, dac_cs_n;
  logic [6:0] care_sclk, care_q;
  logic [3:0] cal_strobe;
  logic [1:0] calsel;
  ctrl_t ctrl;
  logic [7:0] serial = 8'h9E;
  logic [2:0][1:0] fbits;
  logic [2:0] cav, dav;
  logic [CB-1:0] care_val [6];
  logic [7:0] care6_val;
  logic [15:0] vcal;
  int dac_n;
  int checks = 0, failures = 0;
  int cyc = 0;
  // end-cap controller
  logic [6:0] ec_care_sclk;
  int ec_care45 = 0;

  protocol_receiver dut (.clk, .rst_n, .clink_i(clink), .dlink_o(dlink),
    .sample_o(sample), .digitise_o(digitise), .formsync_o(formsync), .linktest_o(linktest),
    .state_o(state), .reg_sdo_o(sdo), .care_sclk_o(care_sclk), .care_q_i(care_q),
    .dac_sclk_o(dac_sclk), .dac_cs_n_o(dac_cs_n), .cal_strobe_o(cal_strobe),
    .calsel_o(calsel), .ctrl_o(ctrl), .serial_i(serial), .flink_bits_o(fbits),
    .flink_cav_o(cav), .flink_dav_o(dav));

  protocol_receiver #(.N_ADB(4)) ec (.clk, .rst_n, .clink_i(clink), .dlink_o(),
    .sample_o(), .digitise_o(), .formsync_o(), .linktest_o(), .state_o(),
    .reg_sdo_o(), .care_sclk_o(ec_care_sclk), .care_q_i(7'h7F), .dac_sclk_o(),
    .dac_cs_n_o(), .cal_strobe_o(), .calsel_o(), .ctrl_o(), .serial_i(serial),
    .flink_bits_o(), .flink_cav_o(), .flink_dav_o());
  always @(posedge clk) if (ec_care_sclk[5:4] != 0) ec_care45++;

  for (genvar i = 0; i < 6; i++) begin : g_care
    care_reg_model #(.N(CB)) u_m (.sclk(care_sclk[i]), .d(sdo), .q(care_q[i]),
                                  .value(care_val[i]));
  end
  care_reg_model #(.N(8)) u_m6 (.sclk(care_sclk[6]), .d(sdo), .q(care_q[6]),
                                .value(care6_val));
  cal_dac_model u_dac (.sclk(dac_sclk), .d(sdo), .cs_n(dac_cs_n), .vcal, .nbits(dac_n));

  always #8 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // send a C-LINK packet; data bit k 15+16k clocks after the start bit;
  // returns the clock edge that sampled the start bit
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
    end
    @(negedge clk); clink = 0;
  endtask

  // read a register and decode the D-LINK response
  task automatic read_reg(input logic [4:0] opc, input logic [4:0] adr, input int n,
                          output logic [31:0] v);
    int p, t;
    logic [15:0] hdr;
    send(opc, adr, 0, 0, p);
    t = 0;
    while (!dlink && t < 100) begin @(negedge clk); t++; end
    check(t < 100, "D-LINK response starts");
    for (int j = 0; j < 16; j++) begin hdr[j] = dlink; @(negedge clk); end
    check(hdr[0] && !hdr[1] && hdr[2] && hdr[15:13] == 0, "response header fixed bits");
    for (int j = 0; j < 5; j++) check(hdr[3 + j] == opc[4 - j] && hdr[8 + j] == adr[4 - j],
                                      "response header C and A");
    v = 0;
    for (int k = 0; k < n; k++) begin
      for (int j = 0; j < 15; j++) begin
        check(dlink == 0, "filler zero"); @(negedge clk);
      end
      v[k] = dlink; @(negedge clk);
    end
    repeat (20) @(negedge clk);
  endtask

  // capture one FLINK packet of fibre f: col19[r], col18[r] for words r
  task automatic packet(input int f, output logic [15:0] c19, output logic [15:0] c18,
                        output bit ok);
    ok = 1;
    while (state != 0) @(negedge clk);
    for (int r = 0; r < 16; r++) begin
      c19[r] = fbits[f][1]; c18[r] = fbits[f][0];
      if (cav[f] != (r == 0) || dav[f] != (r != 0)) ok = 0;
      @(negedge clk);
    end
  endtask

  initial begin
    logic [31:0] v, rv;
    logic [15:0] c19, c18;
    bit ok;
    int p, s0, len, e_sync;
    logic [3:0] exp_t;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(ctrl == 0 && cav == 0 && dav == 0, "links idle after reset");
    // control register: LINK_ENABLE, FIN_RESET*, GLINK_RESET*, SERNOSEL
    v = 32'b0110_1001;
    send(OP_WR_CTRL, 0, 8, v, p);
    repeat (5) @(negedge clk);
    check(ctrl.link_enable && ctrl.fin_reset_n && ctrl.glink_reset_n && ctrl.sernosel &&
          !ctrl.linktest && !ctrl.dclksel && !ctrl.fin_off, "control register written");
    read_reg(OP_RD_CTRL, 0, 8, rv);
    check(rv[7:0] == v[7:0], $sformatf("control read-back %h", rv[7:0]));
    // calibration control: CALEN = 1010, CALSEL = 01
    v = 32'b01_1010;
    send(OP_WR_CAL, 0, 6, v, p);
    repeat (5) @(negedge clk);
    check(calsel == 2'b01, "CALSEL");
    read_reg(OP_RD_CAL, 0, 6, rv);
    check(rv[5:0] == v[5:0], "cal control read-back");
    // CARE registers and DAC
    for (int i = 0; i < 7; i++) begin
      v = $urandom;
      send(OP_WR_CARE, 5'(i), (i == 6) ? 8 : CB, v, p);
      repeat (20) @(negedge clk);
      if (i < 6) check(care_val[i] == v[CB-1:0], $sformatf("CARE %0d written", i));
      else       check(care6_val == v[7:0], "CARE 6 written");
      read_reg(OP_RD_CARE, 5'(i), (i == 6) ? 8 : CB, rv);
      check(i == 6 ? rv[7:0] == v[7:0] : rv[CB-1:0] == v[CB-1:0],
            $sformatf("CARE %0d read-back", i));
    end
    v = 32'h0000_8001;
    send(OP_WR_DAC, 0, 16, v, p);
    repeat (20) @(negedge clk);
    check(dac_n == 16 && vcal == 16'h8001, $sformatf("DAC value %h", vcal));
    // read DAC is a no-op: no response
    send(OP_RD_DAC, 0, 0, 0, p);
    s0 = 0;
    repeat (60) begin @(negedge clk); if (dlink) s0++; end
    check(s0 == 0, "no response to DAC read");
    // SYNC: divider state 0 in the clock after the decode
    send(OP_SYNC, 0, 0, 0, p);
    e_sync = p + 11;
    while (cyc < p + 11) @(negedge clk);
    check(state == 0, $sformatf("state %0d after SYNC", state));
    // trigger: T = state at decode, Tr in the next packet
    while (state != 3) @(negedge clk);
    send(OP_L1A, 5'h11, 0, 0, p);
    while (cyc < p + 11) @(negedge clk);
    exp_t = 4'((p + 10 - e_sync) % 16);  // divider state while the strobe is latched
    packet(0, c19, c18, ok);
    check(ok, "word types");
    check(c19[15] == 1, "Tr set in packet after trigger");
    check(c19[14:11] == exp_t, $sformatf("T field %0d exp %0d", c19[14:11], exp_t));
    check(c18[10:1] == {8'h9E, 2'b01}, $sformatf("serial/fibre field %b", c18[10:1]));
    packet(1, c19, c18, ok);
    check(c18[2:1] == 2'b10, "fibre 2 number");
    packet(0, c19, c18, ok);
    check(c19[15] == 0, "Tr clear a packet later");
    // header mode
    v = 32'b0010_1001;
    send(OP_WR_CTRL, 0, 8, v, p);
    send(OP_L1A, 5'h16, 0, 0, p);
    repeat (20) @(negedge clk);
    packet(2, c19, c18, ok);
    for (int i = 0; i < 10; i++)
      check(c18[1 + i] == (i < 5 ? OP_L1A[4 - i] : 1'(5'h16 >> (9 - i))),
            $sformatf("H%0d", i));
    // calibration strobe: 29750 clocks on enabled outputs, C and Cs in packet
    send(OP_CAL, 0, 0, 0, p);
    while (cyc < p + 12) @(negedge clk);
    check(cal_strobe == 4'b1010, "gated calibration strobe");
    len = 0;
    while (cal_strobe != 0) begin @(negedge clk); len++; end
    check(len == 29750 - 1, $sformatf("calibration strobe %0d clocks after the first", len));
    // C latched and shown
    send(OP_CAL, 0, 0, 0, p);
    exp_t = 4'((p + 10 - e_sync) % 16);
    packet(0, c19, c18, ok);
    check(c18[15] == 1 && c18[14:11] == exp_t, $sformatf("Cs and C %0d exp %0d", c18[14:11], exp_t));
    check(ec_care45 == 0, "end-cap board never clocks CARE 4 and 5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
