// cal_ctrl_reg: the calibration control register, a plain six-bit shift
// register inside the controller. After a six-bit write, the first bit sent
// is bit 0. Bits (board description): 0-3 CALEN0-3, strobe enables that gate
// the calibration strobe to four groups of pre-amplifiers; 4-5 CALSEL0-1,
// calibration capacitor selects sent to the pre-amplifiers as CMOS levels.
// Being a plain shift register its outputs follow the data while it shifts,
// as the board description accepts. Reset to zero is this design's choice.
// q_o is the next bit shifted out (for read-back with loop-back).
module cal_ctrl_reg
  import iob_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       d_i,
  input  logic       shift_i,
  output logic       q_o,
  output logic [3:0] calen_o,
  output logic [1:0] calsel_o
);

  logic [CAL_BITS-1:0] sr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       sr_q <= '0;
    else if (shift_i) sr_q <= {d_i, sr_q[CAL_BITS-1:1]};
  end

  assign q_o      = sr_q[0];
  assign calen_o  = sr_q[3:0];
  assign calsel_o = sr_q[5:4];

endmodule
