// timing_capture: the T[3:0] and C[3:0] registers of the synchronisation
// check. A decoded Level 1 trigger strobe latches the clock divider state into
// T, a decoded calibration strobe latches it into C. Tr (Cs) records that a
// trigger (calibration strobe) arrived during the sample period. At the last
// clock of each sample period the four values are copied to frame outputs
// that stay constant while the next FLINK packet is sent, and Tr/Cs restart
// from zero. The latching is the board description's; the frame copy at the
// period end is this design's way of holding the values for one packet.
// Timing: a strobe at edge k is in T/C after edge k; the frame copy changes
// only at the edge that ends a sample period.
module timing_capture (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] state_i,      // clock divider state
  input  logic       period_end_i, // last clock of the sample period
  input  logic       trig_i,       // L1 trigger accept decoded
  input  logic       cal_i,        // calibration strobe decoded
  output logic [3:0] t_o,          // live T register
  output logic [3:0] c_o,          // live C register
  output logic [3:0] t_frame_o,    // T for the packet being sent
  output logic [3:0] c_frame_o,    // C for the packet being sent
  output logic       tr_frame_o,   // trigger seen in the previous period
  output logic       cs_frame_o    // cal strobe seen in the previous period
);

  logic [3:0] t_q, c_q;
  logic       tr_pend_q, cs_pend_q;
  logic [3:0] t_next, c_next;

  assign t_next = trig_i ? state_i : t_q;
  assign c_next = cal_i  ? state_i : c_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_q        <= '0;
      c_q        <= '0;
      tr_pend_q  <= 1'b0;
      cs_pend_q  <= 1'b0;
      t_frame_o  <= '0;
      c_frame_o  <= '0;
      tr_frame_o <= 1'b0;
      cs_frame_o <= 1'b0;
    end else begin
      t_q <= t_next;
      c_q <= c_next;
      if (period_end_i) begin
        t_frame_o  <= t_next;
        c_frame_o  <= c_next;
        tr_frame_o <= tr_pend_q | trig_i;
        cs_frame_o <= cs_pend_q | cal_i;
        tr_pend_q  <= 1'b0;
        cs_pend_q  <= 1'b0;
      end else begin
        tr_pend_q <= tr_pend_q | trig_i;
        cs_pend_q <= cs_pend_q | cal_i;
      end
    end
  end

  assign t_o = t_q;
  assign c_o = c_q;

endmodule
