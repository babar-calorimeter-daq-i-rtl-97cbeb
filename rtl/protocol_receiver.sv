// protocol_receiver: the IOB controller, the single programmable logic device
// that decodes the C-LINK fast control stream and runs the rest of the board.
// It holds the clock divider (SAMPLE and DIGITISE clocks, SYNC), the T/C
// synchronisation registers, the C-LINK decoder, the register access engine
// with its D-LINK responses, the control register (serial + parallel), the
// calibration control register, the 500 us calibration strobe timer, and the
// two FLINK control bits of each DAQ fibre. FORMSYNC tells the ADB data
// formatters when a new sample period starts. External registers (CARE
// control registers on the ADBs, the calibration DAC) share one serial data
// line and get a clock each; their serial outputs come back for read-back.
// N_ADB is 6 on barrel boards (three fibres) and 4 on end-cap boards (two
// fibres, CARE registers 4 and 5 absent). CARE register 6 is a test register
// present on both.
// Timing: all logic runs on the 59.5 MHz system clock; C-LINK and D-LINK are
// one bit per clock.
// The functions and register layouts follow the board description; the
// phase of SAMPLE and DIGITISE to the divider state, the timing inside each
// 16-clock register bit slot and reset values of zero are this design's.
module protocol_receiver
  import iob_pkg::*;
#(
  parameter int unsigned N_ADB         = 6,
  parameter int unsigned CARE_BITS     = 16,
  parameter int unsigned STROBE_CYCLES = CAL_STROBE_CYCLES,
  localparam int unsigned N_FIBRE      = N_ADB / 2
) (
  input  logic               clk,           // 59.5 MHz system clock
  input  logic               rst_n,
  input  logic               clink_i,
  output logic               dlink_o,
  // clocks to the front end
  output logic               sample_o,
  output logic               digitise_o,
  output logic               formsync_o,
  output logic               linktest_o,
  output logic [3:0]         state_o,
  // external fast control registers
  output logic               reg_sdo_o,     // shared serial data
  output logic [6:0]         care_sclk_o,
  input  logic [6:0]         care_q_i,
  output logic               dac_sclk_o,
  output logic               dac_cs_n_o,
  // calibration
  output logic [3:0]         cal_strobe_o,
  output logic [1:0]         calsel_o,
  // control register outputs
  output ctrl_t              ctrl_o,
  // FLINK control bits per fibre
  input  logic [7:0]         serial_i,
  output logic [N_FIBRE-1:0][1:0] flink_bits_o,
  output logic [N_FIBRE-1:0] flink_cav_o,
  output logic [N_FIBRE-1:0] flink_dav_o
);

  logic       sync_s, l1a_s, cal_s;
  logic       req_valid;
  fc_req_t    req;
  logic [9:0] header;
  logic       eng_busy, eng_hold;
  logic       cal_q, cal_shift, ctrl_q, ctrl_shift, ctrl_load;
  logic [CTRL_BITS-1:0] ctrl_par;
  logic [3:0] calen;
  logic       strobe;
  logic       period_end;
  logic [3:0] state;
  logic [3:0] t_live, c_live, t_frame, c_frame;
  logic       tr_frame, cs_frame;
  logic [6:0] care_q_present;
  logic [6:0] care_sclk_all;

  clink_rx u_rx (
    .clk, .rst_n, .clink_i, .hold_i(eng_hold),
    .sync_o(sync_s), .l1a_o(l1a_s), .cal_o(cal_s),
    .req_valid_o(req_valid), .req_o(req), .header_o(header)
  );

  // CARE registers 4 and 5 exist only on barrel boards
  always_comb begin
    care_q_present = care_q_i;
    care_sclk_o    = care_sclk_all;
    for (int i = 0; i < 6; i++) begin
      if (i >= N_ADB) begin
        care_q_present[i] = 1'b0;
        care_sclk_o[i]    = 1'b0;
      end
    end
  end

  fc_reg_engine #(.CARE_BITS(CARE_BITS), .N_CARE(7)) u_eng (
    .clk, .rst_n, .clink_i, .req_valid_i(req_valid), .req_i(req),
    .busy_o(eng_busy), .hold_o(eng_hold), .dlink_o,
    .sdo_o(reg_sdo_o), .care_q_i(care_q_present), .care_sclk_o(care_sclk_all),
    .dac_sclk_o, .dac_cs_n_o,
    .cal_q_i(cal_q), .cal_shift_o(cal_shift),
    .ctrl_q_i(ctrl_q), .ctrl_shift_o(ctrl_shift), .ctrl_load_o(ctrl_load)
  );

  control_reg u_ctrl (
    .clk, .rst_n, .d_i(reg_sdo_o), .shift_i(ctrl_shift), .load_i(ctrl_load),
    .q_o(ctrl_q), .par_o(ctrl_par), .ctrl_o
  );

  cal_ctrl_reg u_cal (
    .clk, .rst_n, .d_i(reg_sdo_o), .shift_i(cal_shift),
    .q_o(cal_q), .calen_o(calen), .calsel_o
  );

  cal_strobe_gen #(.STROBE_CYCLES(STROBE_CYCLES)) u_strobe (
    .clk, .rst_n, .cal_i(cal_s), .calen_i(calen),
    .strobe_o(strobe), .cal_strobe_o
  );

  clk_divider u_div (
    .clk, .rst_n, .sync_i(sync_s), .dclksel_i(ctrl_o.dclksel),
    .state_o(state), .sample_o, .digitise_o, .period_end_o(period_end)
  );

  timing_capture u_tc (
    .clk, .rst_n, .state_i(state), .period_end_i(period_end),
    .trig_i(l1a_s), .cal_i(cal_s),
    .t_o(t_live), .c_o(c_live), .t_frame_o(t_frame), .c_frame_o(c_frame),
    .tr_frame_o(tr_frame), .cs_frame_o(cs_frame)
  );

  for (genvar f = 0; f < N_FIBRE; f++) begin : g_fibre
    flink_ctrl #(.FIBRE(2'(f + 1))) u_fl (
      .clk, .rst_n, .state_i(state), .period_end_i(period_end), .sync_i(sync_s),
      .link_enable_i(ctrl_o.link_enable), .sernosel_i(ctrl_o.sernosel),
      .serial_i, .header_i(header),
      .t_i(t_frame), .c_i(c_frame), .tr_i(tr_frame), .cs_i(cs_frame),
      .bits_o(flink_bits_o[f]), .cav_o(flink_cav_o[f]), .dav_o(flink_dav_o[f]),
      .wall_o()
    );
  end

  assign formsync_o = period_end;
  assign linktest_o = ctrl_o.linktest;
  assign state_o    = state;

  // Rules between the parts, checked in simulation
  // write data is taken from the C-LINK only while an access runs
  a_hold_in_access: assert property (@(posedge clk) disable iff (!rst_n)
    eng_hold |-> eng_busy);
  // a register clock runs only during an access, and one at a time
  a_one_reg_clock: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({care_sclk_all, dac_sclk_o}) && (!(|care_sclk_all || dac_sclk_o) || eng_busy));
  // each calibration strobe output is the strobe gated by its enable
  a_strobe_gated: assert property (@(posedge clk) disable iff (!rst_n)
    cal_strobe_o == (calen & {4{strobe}}));

endmodule
