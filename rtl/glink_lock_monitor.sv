// glink_lock_monitor: remembers G-LINK PLL lock events for the slow
// environmental monitoring link. Each G-LINK transmitter's LOCKED output is
// brought into the 59.5 MHz system clock domain by two flip-flops. A sticky
// flag per link is set by every rising (0 to 1) transition of LOCKED and is
// cleared when the monitoring interface has read the status, which it
// signals by toggling clr_toggle_i (a toggle crosses clock domains safely;
// it is re-synchronised here). lock_o gives the instantaneous state.
// The latched positive transition follows the board description; the
// synchronisers and the toggle handshake are this design's choices. An edge
// that arrives between the read and the clear (a few system clocks) is lost.
module glink_lock_monitor #(
  parameter int unsigned N_LINK = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_LINK-1:0] locked_i,     // asynchronous LOCKED inputs
  input  logic              clr_toggle_i, // from the ELINK clock domain
  output logic [N_LINK-1:0] lock_o,       // synchronised LOCKED
  output logic [N_LINK-1:0] edge_o        // positive edge since last read
);

  logic [N_LINK-1:0] s1_q, s2_q, prev_q;
  logic [2:0]        clr_q;
  logic              clr_pulse;

  assign clr_pulse = clr_q[2] ^ clr_q[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q   <= '0;
      s2_q   <= '0;
      prev_q <= '0;
      clr_q  <= '0;
      edge_o <= '0;
    end else begin
      s1_q   <= locked_i;
      s2_q   <= s1_q;
      prev_q <= s2_q;
      clr_q  <= {clr_q[1:0], clr_toggle_i};
      edge_o <= (clr_pulse ? '0 : edge_o) | (s2_q & ~prev_q);
    end
  end

  assign lock_o = s2_q;

endmodule
