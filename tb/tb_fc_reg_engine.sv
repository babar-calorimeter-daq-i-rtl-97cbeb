// tb_fc_reg_engine: drives register requests and C-LINK write data at the
// times the C-LINK decoder would, against behavioural models of the CARE
// registers and the calibration DAC and simple shift registers standing for
// the internal ones. Checks: written values; bit order (DAC most significant
// first); one data bit per 16 clocks (busy for exactly 16 clocks per bit);
// the D-LINK response bit by bit and clock by clock (header 1,0,1,C,A,000 and
// one data bit in the last clock of every further 16); registers unchanged
// after a read (loop-back); the control register load pulse; and that a
// request arriving during an access is ignored.
module tb_fc_reg_engine;
  import iob_pkg::*;
  localparam int CB = 16;
  logic clk = 0, rst_n = 0, clink = 0, req_valid = 0;
  fc_req_t req;
  logic busy, hold, dlink, sdo, dac_sclk, dac_cs_n;
  logic [6:0] care_q, care_sclk;
  logic cal_q, cal_shift, ctrl_q, ctrl_shift, ctrl_load;
  logic [5:0] cal_sr;
  logic [7:0] ctrl_sr;
  logic [CB-1:0] care_val [6];
  logic [7:0] care6_val;
  logic [15:0] vcal;
  int dac_n;
  int checks = 0, failures = 0;
  int cyc = 0, nload = 0;

  fc_reg_engine #(.CARE_BITS(CB)) dut (.clk, .rst_n, .clink_i(clink),
    .req_valid_i(req_valid), .req_i(req), .busy_o(busy), .hold_o(hold), .dlink_o(dlink),
    .sdo_o(sdo), .care_q_i(care_q), .care_sclk_o(care_sclk), .dac_sclk_o(dac_sclk),
    .dac_cs_n_o(dac_cs_n), .cal_q_i(cal_q), .cal_shift_o(cal_shift),
    .ctrl_q_i(ctrl_q), .ctrl_shift_o(ctrl_shift), .ctrl_load_o(ctrl_load));

  for (genvar i = 0; i < 6; i++) begin : g_care
    care_reg_model #(.N(CB)) u_m (.sclk(care_sclk[i]), .d(sdo), .q(care_q[i]),
                                  .value(care_val[i]));
  end
  care_reg_model #(.N(8)) u_m6 (.sclk(care_sclk[6]), .d(sdo), .q(care_q[6]),
                                .value(care6_val));
  cal_dac_model u_dac (.sclk(dac_sclk), .d(sdo), .cs_n(dac_cs_n), .vcal, .nbits(dac_n));

  initial begin cal_sr = '0; ctrl_sr = '0; end
  always @(posedge clk) begin
    if (cal_shift)  cal_sr  <= {sdo, cal_sr[5:1]};
    if (ctrl_shift) ctrl_sr <= {sdo, ctrl_sr[7:1]};
    if (ctrl_load)  nload++;
  end
  assign cal_q  = cal_sr[0];
  assign ctrl_q = ctrl_sr[0];

  always #8 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic fc_req_t mk(input bit w, input fc_target_e t, input int care,
                                 input logic [4:0] opc);
    fc_req_t r; r = '0; r.write = w; r.target = t; r.care = 3'(care);
    r.header = {opc, 5'(care)}; return r;
  endfunction

  // issue a request; returns the accepting clock edge
  task automatic issue(input fc_req_t r, output int acc);
    @(negedge clk); req = r; req_valid = 1; acc = cyc + 1;
    @(negedge clk); req_valid = 0; req = '0;
  endtask

  // write n bits d[0..n-1]; D(k) on the line at edge acc+4+16k, noise otherwise
  task automatic do_write(input fc_req_t r, input logic [31:0] d, input int n);
    int acc, nbusy;
    issue(r, acc);
    nbusy = 1;  // busy during the clock after the accepting edge
    while (busy) begin
      int k;
      k = (cyc + 1 - acc - 4);
      if (k >= 0 && k % 16 == 0 && k / 16 < n) clink = d[k / 16];
      else clink = 1'($urandom);
      @(negedge clk);
      if (busy) nbusy++;
    end
    clink = 0;
    check(nbusy == 16 * n, $sformatf("write busy %0d clocks exp %0d", nbusy, 16 * n));
    repeat (4) @(negedge clk);
  endtask

  // read n bits and compare the D-LINK stream with header + data
  task automatic do_read(input fc_req_t r, input logic [31:0] d, input int n);
    int acc;
    logic exp_bit;
    issue(r, acc);
    // issue() returned at the negedge after edge acc; bit j shows after edge acc+1+j
    for (int j = 0; j < 16 * (n + 1); j++) begin
      @(negedge clk);
      if (j < 16) begin
        unique case (j)
          0, 2: exp_bit = 1;
          3, 4, 5, 6, 7, 8, 9, 10, 11, 12: exp_bit = r.header[12 - j];
          default: exp_bit = 0;
        endcase
      end else exp_bit = (j % 16 == 15) ? d[j / 16 - 1] : 1'b0;
      check(dlink == exp_bit, $sformatf("dlink bit %0d = %0d exp %0d", j, dlink, exp_bit));
    end
    @(negedge clk);
    check(!busy && dlink == 0, "read finished");
    repeat (4) @(negedge clk);
  endtask

  initial begin
    logic [31:0] v;
    int acc;
    req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // CARE registers 0..5
    for (int i = 0; i < 6; i++) begin
      v = $urandom;
      do_write(mk(1, TGT_CARE, i, OP_WR_CARE), v, CB);
      check(care_val[i] == v[CB-1:0], $sformatf("CARE %0d written", i));
    end
    for (int i = 0; i < 6; i++) begin
      v = 32'(care_val[i]);
      do_read(mk(0, TGT_CARE, i, OP_RD_CARE), v, CB);
      check(care_val[i] == v[CB-1:0], $sformatf("CARE %0d unchanged by read", i));
    end
    // CARE register 6, 8 bits
    v = $urandom;
    do_write(mk(1, TGT_CARE, 6, OP_WR_CARE), v, 8);
    check(care6_val == v[7:0], "CARE 6 written");
    do_read(mk(0, TGT_CARE, 6, OP_RD_CARE), v, 8);
    check(care6_val == v[7:0], "CARE 6 unchanged");
    // calibration DAC, most significant bit first
    v = $urandom;
    do_write(mk(1, TGT_DAC, 0, OP_WR_DAC), v, 16);
    check(dac_n == 16, $sformatf("DAC got %0d bits", dac_n));
    for (int k = 0; k < 16; k++)
      check(vcal[15 - k] == v[k], $sformatf("DAC bit %0d", k));
    // calibration control
    v = $urandom;
    do_write(mk(1, TGT_CAL, 0, OP_WR_CAL), v, 6);
    check(cal_sr == v[5:0], "cal control written");
    do_read(mk(0, TGT_CAL, 0, OP_RD_CAL), v, 6);
    check(cal_sr == v[5:0], "cal control unchanged");
    // control register with load pulse
    v = $urandom;
    nload = 0;
    do_write(mk(1, TGT_CTRL, 0, OP_WR_CTRL), v, 8);
    check(ctrl_sr == v[7:0] && nload == 1, "control written and loaded once");
    do_read(mk(0, TGT_CTRL, 0, OP_RD_CTRL), v, 8);
    check(ctrl_sr == v[7:0] && nload == 1, "control unchanged, no load on read");
    // a request during an access is ignored
    issue(mk(0, TGT_CAL, 0, OP_RD_CAL), acc);
    repeat (20) @(negedge clk);
    issue(mk(1, TGT_CARE, 1, OP_WR_CARE), acc);
    v = 32'(care_val[1]);
    while (busy) @(negedge clk);
    check(care_val[1] == v[CB-1:0], "request during access ignored");
    check(hold == 0 && busy == 0, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
