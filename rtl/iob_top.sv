// iob_top: one calorimeter I/O board (IOB) with the data formatters of the
// ADC boards (ADBs) it serves. The board receives the 59.5 MHz system clock
// and the C-LINK fast control stream, returns a copy of the clock and the
// D-LINK register read-back stream, clocks and controls the ADBs, writes the
// calibration DAC and distributes the calibration strobe, and sends the
// sampled calorimeter data to the DAQ on one G-LINK per pair of ADBs.
// Each ADB carries 12 crystals read by three CARE chips of four channels;
// each CARE is followed by a data formatter that turns its 48 bits per sample
// period into 3 bits per system clock. A G-LINK word is 20 bits: the 18 bits
// of the six formatters of two ADBs (formatter k of the fibre in bits
// 3k+2..3k, crystals X(4k)..X(4k+3)) and two bits from the protocol receiver.
// The ELINK environmental monitoring interface, on its own clock, reads the
// board serial number, the G-LINK lock status, the monitoring ADC and the
// Finisar diagnostic ports.
// N_ADB = 6 is the barrel board (three fibres), 4 the end-cap board.
// The G-LINK transmitters, Finisar transmitters, ADCs, CARE chips, DAC and
// analogue parts are outside this design; their digital pins are ports.
// The partition, clock rates, register set and packet layout follow the
// board description; the order of the two ADBs inside a G-LINK word, the
// use of one reset for both clock domains and the fill-frame signalling by
// clearing both word flags are this design's choices.
// Timing: everything except the ELINK runs on clk; G-LINK words change on
// every clk edge, sixteen words per sample period, word 0 first.
module iob_top
  import iob_pkg::*;
#(
  parameter int unsigned N_ADB         = 6,
  parameter int unsigned CARE_BITS     = 16,
  parameter int unsigned STROBE_CYCLES = CAL_STROBE_CYCLES,
  localparam int unsigned N_FIBRE      = N_ADB / 2,
  localparam int unsigned N_XTAL       = N_ADB * 12
) (
  input  logic                       clk,          // 59.5 MHz system clock
  input  logic                       rst_n,
  // transition board cable
  input  logic                       clink_i,
  output logic                       dlink_o,
  output logic                       clk_ret_o,    // return clock
  // ADB clocks and samples
  output logic                       sample_o,
  output logic                       digitise_o,
  input  sample_t [N_XTAL-1:0]       xtal_i,       // sample of each crystal
  // fast control registers outside the controller
  output logic                       reg_sdo_o,
  output logic [6:0]                 care_sclk_o,
  input  logic [6:0]                 care_q_i,
  output logic                       dac_sclk_o,
  output logic                       dac_cs_n_o,
  // calibration
  output logic [3:0]                 cal_strobe_o,
  output logic [1:0]                 calsel_o,
  // DAQ links
  output logic [N_FIBRE-1:0][19:0]   glink_data_o,
  output logic [N_FIBRE-1:0]         glink_cav_o,
  output logic [N_FIBRE-1:0]         glink_dav_o,
  output logic                       glink_reset_n_o,
  output logic                       fin_reset_n_o,
  output logic                       fin_off_o,
  input  logic [N_FIBRE-1:0]         glink_locked_i,
  // board serial number
  input  logic [7:0]                 serial_i,
  // ELINK and environmental monitoring
  input  logic                       eclk,
  input  logic                       ein_i,
  output logic                       eout_o,
  output logic [2:0]                 adb_addr_o,
  output logic                       adc_din_o,
  output logic                       adc_sclk_o,
  output logic                       adc_cs_n_o,
  input  logic                       adc_dout_i,
  input  logic                       adc_sstrb_i,
  output logic                       fin_di_o,
  output logic                       fin_dclk_o,
  output logic [2:0]                 fin_cs_n_o,
  input  logic                       fin_do_i,
  input  logic                       fin_ready_i
);

  logic                     formsync, linktest;
  logic [3:0]               state;
  ctrl_t                    ctrl;
  logic [N_FIBRE-1:0][1:0]  fl_bits;
  logic [N_ADB*3-1:0][2:0]  fmt;
  logic [2:0]               lock, lock_edge;
  logic [2:0]               locked3;
  logic                     clr_toggle;

  protocol_receiver #(.N_ADB(N_ADB), .CARE_BITS(CARE_BITS),
                      .STROBE_CYCLES(STROBE_CYCLES)) u_pr (
    .clk, .rst_n, .clink_i, .dlink_o,
    .sample_o, .digitise_o, .formsync_o(formsync), .linktest_o(linktest),
    .state_o(state),
    .reg_sdo_o, .care_sclk_o, .care_q_i, .dac_sclk_o, .dac_cs_n_o,
    .cal_strobe_o, .calsel_o, .ctrl_o(ctrl),
    .serial_i, .flink_bits_o(fl_bits), .flink_cav_o(glink_cav_o),
    .flink_dav_o(glink_dav_o)
  );

  // three formatters per ADB, four crystals each
  for (genvar m = 0; m < N_ADB * 3; m++) begin : g_fmt
    data_formatter u_fmt (
      .clk, .rst_n, .formsync_i(formsync), .linktest_i(linktest),
      .sample_i(xtal_i[4*m +: 4]), .data_o(fmt[m])
    );
  end

  for (genvar f = 0; f < N_FIBRE; f++) begin : g_word
    assign glink_data_o[f] = {fl_bits[f], fmt[6*f +: 6]};
  end

  // unused lock inputs of an end-cap board read as unlocked
  always_comb begin
    locked3 = '0;
    locked3[N_FIBRE-1:0] = glink_locked_i;
  end

  glink_lock_monitor #(.N_LINK(3)) u_lock (
    .clk, .rst_n, .locked_i(locked3), .clr_toggle_i(clr_toggle),
    .lock_o(lock), .edge_o(lock_edge)
  );

  elink_if u_elink (
    .eclk, .rst_n, .ein_i, .eout_o, .serial_i,
    .lock_i(lock), .edge_i(lock_edge), .clr_toggle_o(clr_toggle),
    .adb_addr_o, .adc_din_o, .adc_sclk_o, .adc_cs_n_o, .adc_dout_i, .adc_sstrb_i,
    .fin_di_o, .fin_dclk_o, .fin_cs_n_o, .fin_do_i, .fin_ready_i
  );

  assign clk_ret_o       = clk;
  assign glink_reset_n_o = ctrl.glink_reset_n;
  assign fin_reset_n_o   = ctrl.fin_reset_n;
  assign fin_off_o       = ctrl.fin_off;

endmodule
