// cal_strobe_gen: calibration strobe timing. A decoded calibration strobe
// command raises the strobe, which the controller itself drops STROBE_CYCLES
// system clocks later (500 us at 59.5 MHz = 29750 clocks, as the board
// description asks). The strobe goes to four groups of pre-amplifiers, each
// gated by its CALEN enable from the calibration control register. A new
// calibration command while the strobe is high is ignored (this design's
// choice). The analogue part (DAC, mixing of the AC-coupled strobe onto the
// calibration voltage pair) is outside this module.
// Timing: cal_i at edge k makes strobe_o high from edge k for exactly
// STROBE_CYCLES clocks.
module cal_strobe_gen #(
  parameter int unsigned STROBE_CYCLES = 29750
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cal_i,       // calibration strobe decoded
  input  logic [3:0] calen_i,     // strobe enables
  output logic       strobe_o,    // ungated strobe
  output logic [3:0] cal_strobe_o // gated strobes to the pre-amplifiers
);

  localparam int unsigned CW = $clog2(STROBE_CYCLES + 1);
  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q    <= '0;
      strobe_o <= 1'b0;
    end else if (!strobe_o) begin
      if (cal_i) begin
        strobe_o <= 1'b1;
        cnt_q    <= CW'(STROBE_CYCLES - 1);
      end
    end else if (cnt_q == '0) begin
      strobe_o <= 1'b0;
    end else begin
      cnt_q <= cnt_q - 1'b1;
    end
  end

  assign cal_strobe_o = calen_i & {4{strobe_o}};

endmodule
