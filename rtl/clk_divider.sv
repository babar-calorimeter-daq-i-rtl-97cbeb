// clk_divider: the IOB clock divider. A four-bit state register counts the
// 59.5 MHz system clock through sixteen states; the SYNC fast control strobe
// resets it to zero synchronously so that all boards of the detector count in
// step. SAMPLE (to the CARE chips) is state bit 3, one sixteenth of the system
// clock (3.7 MHz). DIGITISE (to the ADCs) is state bit 1 (14.9 MHz) or, when
// the DCLKSEL control bit is set, state bit 3 (3.7 MHz). The counter, its
// sixteen states, its SYNC reset and the two ratios are the board
// description's; which state bits drive the clocks, and the period_end flag
// (state 15, the last clock of a sample period) used to frame the FLINK
// packets, are this design's choices.
// Timing: state advances every clock; sync_i seen at edge k makes state 0
// after edge k.
module clk_divider (
  input  logic       clk,
  input  logic       rst_n,       // asynchronous board reset, active low
  input  logic       sync_i,      // SYNC strobe decoded by the receiver
  input  logic       dclksel_i,   // control register DCLKSEL
  output logic [3:0] state_o,     // divider state, latched as T[3:0]/C[3:0]
  output logic       sample_o,    // SAMPLE clock, 3.7 MHz
  output logic       digitise_o,  // DIGITISE clock, 14.9 or 3.7 MHz
  output logic       period_end_o // last clock of a sample period
);

  logic [3:0] state_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      state_q <= '0;
    else if (sync_i) state_q <= '0;
    else             state_q <= state_q + 4'd1;
  end

  assign state_o      = state_q;
  assign sample_o     = state_q[3];
  assign digitise_o   = dclksel_i ? state_q[3] : state_q[1];
  assign period_end_o = (state_q == 4'hF);

endmodule
