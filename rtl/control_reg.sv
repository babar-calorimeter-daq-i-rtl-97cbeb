// control_reg: the IOB control register, a serial stage and a parallel stage.
// Fast control writes shift data into the serial stage, one bit per shift
// enable, first bit into bit 0 position after a full write; at the end of
// the write the whole serial stage is copied into the parallel stage, so the
// control outputs never see shifting data. Reads come from the serial stage
// (q_o is the bit that is shifted out next) with the engine looping it back.
// Bit meaning (board description): 0 LINK_ENABLE, 1 LINKTEST, 2 DCLKSEL,
// 3 FIN_RESET*, 4 FIN_OFF, 5 GLINK_RESET*, 6 SERNOSEL, 7 unused.
// The reset value (all zero: links idle, Finisar and G-LINK transmitters held
// in reset, DIGITISE at 14.9 MHz) is this design's choice.
module control_reg
  import iob_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 d_i,      // serial data in
  input  logic                 shift_i,  // shift one bit in
  input  logic                 load_i,   // copy serial stage to parallel stage
  output logic                 q_o,      // serial data out
  output logic [CTRL_BITS-1:0] par_o,    // parallel stage
  output ctrl_t                ctrl_o    // decoded control bits
);

  logic [CTRL_BITS-1:0] ser_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ser_q <= '0;
      par_o <= '0;
    end else begin
      if (shift_i) ser_q <= {d_i, ser_q[CTRL_BITS-1:1]};
      if (load_i)  par_o <= ser_q;
    end
  end

  assign q_o = ser_q[0];

  assign ctrl_o.link_enable   = par_o[CR_LINK_ENABLE];
  assign ctrl_o.linktest      = par_o[CR_LINKTEST];
  assign ctrl_o.dclksel       = par_o[CR_DCLKSEL];
  assign ctrl_o.fin_reset_n   = par_o[CR_FIN_RESET_N];
  assign ctrl_o.fin_off       = par_o[CR_FIN_OFF];
  assign ctrl_o.glink_reset_n = par_o[CR_GLINK_RST_N];
  assign ctrl_o.sernosel      = par_o[CR_SERNOSEL];

endmodule
