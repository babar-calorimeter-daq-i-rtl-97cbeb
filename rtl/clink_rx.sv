// clink_rx: C-LINK deserialiser and command decoder of the protocol receiver.
// The C-LINK idles at '0'; a '1' is a start bit, followed by ten bits sent
// one per 59.5 MHz clock: opcode C0..C4 then data/address D0..D4 (A0..A4).
// Packets may start on any clock, and back-to-back packets are separated by a
// single '0', so the receiver is ready for a new start bit on the clock after
// the last header bit. Decoded global strobes (SYNC, L1 accept, calibration)
// become one-clock pulses; register read and write opcodes become a request
// for the register engine. While the engine collects write data from the
// C-LINK (hold_i), the line is not searched for start bits. The header of
// every packet is kept as the ten-bit H field of the FLINK.
// C0 and A0 are taken as the most significant bits of opcode and address.
// Codes the board description lists as no-ops or reserved, and CARE register
// numbers above 6, do nothing.
// Timing: with the start bit sampled at edge s, the header is complete at
// edge s+10 and the strobe or request pulse is high in the following cycle.
module clink_rx
  import iob_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clink_i,     // C-LINK serial data, synchronous to clk
  input  logic       hold_i,      // register engine is reading write data
  output logic       sync_o,      // SYNC strobe
  output logic       l1a_o,       // Level 1 trigger accept
  output logic       cal_o,       // calibration strobe
  output logic       req_valid_o, // register access request
  output fc_req_t    req_o,
  output logic [9:0] header_o     // header of the last packet (bit 9 = C0)
);

  typedef enum logic {S_IDLE, S_HDR} state_e;
  state_e     state_q;
  logic [3:0] cnt_q;
  logic [8:0] sr_q;
  logic [9:0] hdr;
  logic [4:0] opc;
  logic [4:0] addr;
  logic       done;

  assign hdr  = {sr_q, clink_i};
  assign opc  = hdr[9:5];
  assign addr = hdr[4:0];
  assign done = (state_q == S_HDR) && (cnt_q == 4'd9);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
      sr_q    <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (!hold_i && !(req_valid_o && req_o.write) && clink_i) begin
          state_q <= S_HDR;
          cnt_q   <= '0;
        end
        S_HDR: begin
          sr_q  <= hdr[8:0];
          cnt_q <= cnt_q + 4'd1;
          if (done) state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Decode of a complete header
  fc_req_t req_d;
  logic    req_ok;
  always_comb begin
    req_d        = '0;
    req_d.header = hdr;
    req_d.care   = addr[2:0];
    req_ok       = 1'b0;
    unique case (fc_opcode_e'(opc))
      OP_WR_CTRL: begin req_ok = 1'b1; req_d.write = 1'b1; req_d.target = TGT_CTRL; end
      OP_WR_DAC:  begin req_ok = 1'b1; req_d.write = 1'b1; req_d.target = TGT_DAC;  end
      OP_WR_CAL:  begin req_ok = 1'b1; req_d.write = 1'b1; req_d.target = TGT_CAL;  end
      OP_WR_CARE: begin req_ok = (addr <= 5'd6); req_d.write = 1'b1; req_d.target = TGT_CARE; end
      OP_RD_CTRL: begin req_ok = 1'b1; req_d.target = TGT_CTRL; end
      OP_RD_CAL:  begin req_ok = 1'b1; req_d.target = TGT_CAL;  end
      OP_RD_CARE: begin req_ok = (addr <= 5'd6); req_d.target = TGT_CARE; end
      default:    req_ok = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_o      <= 1'b0;
      l1a_o       <= 1'b0;
      cal_o       <= 1'b0;
      req_valid_o <= 1'b0;
      req_o       <= '0;
      header_o    <= '0;
    end else begin
      sync_o      <= done && (opc == OP_SYNC);
      l1a_o       <= done && (opc == OP_L1A);
      cal_o       <= done && (opc == OP_CAL);
      req_valid_o <= done && req_ok;
      if (done) begin
        req_o    <= req_d;
        header_o <= hdr;
      end
    end
  end

endmodule
