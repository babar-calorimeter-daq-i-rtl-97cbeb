// cal_dac_model: behavioural model of the serial calibration DAC's digital
// port. While cs_n is low each rising sclk edge shifts one bit in, most
// significant first; the rising edge of cs_n loads the DAC output register
// and counts the bits received. It cannot be read back.
module cal_dac_model (
  input  logic        sclk,
  input  logic        d,
  input  logic        cs_n,
  output logic [15:0] vcal,
  output int          nbits
);
  logic [15:0] sr;
  int          cnt, cnt_at_select;
  initial begin vcal = '0; sr = '0; cnt = 0; cnt_at_select = 0; nbits = 0; end
  always @(posedge sclk) if (!cs_n) begin sr <= {sr[14:0], d}; cnt <= cnt + 1; end
  always @(negedge cs_n) cnt_at_select <= cnt;
  always @(posedge cs_n) begin vcal <= sr; nbits <= cnt - cnt_at_select; end
endmodule
