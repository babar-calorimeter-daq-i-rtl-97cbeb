// data_formatter: the data formatter that follows each CARE chip on an ADC
// board (ADB). Once per sample period (at FORMSYNC, the last system clock of
// the period) it takes the four 12-bit samples of its CARE, each the two
// range bits and the ten ADC bits, and over the next sixteen 59.5 MHz clocks
// sends them three bits at a time: 48 bits at 3.7 MHz become 3 bits at
// 59.5 MHz. Clock r of the period (r = 0..15, equal to the divider state)
// carries bits 3r+2..3r of {X3, X2, X1, X0}, each X = {R1, R0, A9..A0}, so a
// crystal takes four consecutive words, low ADC bits first and
// {R1, R0, A9} last, the layout of the FLINK packet.
// With LINKTEST set the formatter sends a known repeating pattern instead:
// in clock r the three bits are r modulo 8 (the pattern itself is this
// design's choice; the board description only asks for a known one).
module data_formatter
  import iob_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          formsync_i,  // load a new set of samples
  input  logic          linktest_i,  // send the test pattern
  input  sample_t [3:0] sample_i,    // the four channels of this CARE
  output logic [2:0]    data_o       // three bits per system clock
);

  localparam logic [47:0] TEST_PATTERN = 48'o7654321076543210;

  logic [47:0] sr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          sr_q <= '0;
    else if (formsync_i) sr_q <= linktest_i ? TEST_PATTERN : sample_i;
    else                 sr_q <= {3'b000, sr_q[47:3]};
  end

  assign data_o = sr_q[2:0];

endmodule
