// flink_ctrl: the two bits (19 and 18) that the protocol receiver adds to
// every 20-bit G-LINK word of one DAQ fibre (FLINK), and the word type.
// A packet is one sample period of sixteen words, word r sent while the clock
// divider is in state r. Word 0 is a G-LINK control word (its 18 formatter
// bits are crystal data, bits 19-18 are zero); words 1-15 are data words and
// carry, in bit 19: W0..W9 (wall clock), T0..T3, Tr; and in bit 18: either
// F0, F1, S0..S7 (fibre and board serial number, SERNOSEL=1) or H0..H9 (header
// of the last C-LINK packet, SERNOSEL=0), then C0..C3, Cs.
// The wall clock is a ten-bit counter advanced once per sample period and
// cleared by SYNC. With LINK_ENABLE clear, neither word flag is raised, so
// the G-LINK transmitter sends fill frames.
// The packet layout follows the board description's packet figure. Which
// flag marks a control or data word (cav/dav, as on common G-LINK
// transmitters), clearing the wall clock on SYNC, and H0..H4 = C0..C4,
// H5..H9 = D0..D4 of the last header are this design's choices.
module flink_ctrl #(
  parameter logic [1:0] FIBRE = 2'd1   // fibre number on this board, 1..3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] state_i,       // divider state = word number
  input  logic       period_end_i,
  input  logic       sync_i,        // SYNC strobe clears the wall clock
  input  logic       link_enable_i,
  input  logic       sernosel_i,
  input  logic [7:0] serial_i,      // IOB serial number
  input  logic [9:0] header_i,      // last C-LINK header, bit 9 = C0
  input  logic [3:0] t_i,           // T for this packet
  input  logic [3:0] c_i,           // C for this packet
  input  logic       tr_i,
  input  logic       cs_i,
  output logic [1:0] bits_o,        // {bit 19, bit 18}
  output logic       cav_o,         // control word
  output logic       dav_o,         // data word
  output logic [9:0] wall_o         // wall clock W9..W0
);

  logic [9:0]  w_q;
  logic [9:0]  h_q;
  logic [15:0] col19, col18;
  logic [9:0]  id_field;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_q <= '0;
      h_q <= '0;
    end else begin
      if (sync_i)            w_q <= '0;
      else if (period_end_i) w_q <= w_q + 10'd1;
      if (period_end_i) h_q <= header_i;
    end
  end

  // id_field[i] is the bit sent in word i+1 of column 18
  always_comb begin
    if (sernosel_i) id_field = {serial_i, FIBRE[1], FIBRE[0]};
    else for (int i = 0; i < 10; i++) id_field[i] = h_q[9-i];
  end

  // col[r] is the bit sent in word r
  assign col19 = {tr_i, t_i, w_q, 1'b0};
  assign col18 = {cs_i, c_i, id_field, 1'b0};

  always_comb begin
    bits_o = 2'b00;
    if (link_enable_i) bits_o = {col19[state_i], col18[state_i]};
  end
  assign cav_o  = link_enable_i && (state_i == 4'd0);
  assign dav_o  = link_enable_i && (state_i != 4'd0);
  assign wall_o = w_q;

endmodule
