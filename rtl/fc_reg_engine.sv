// fc_reg_engine: fast control register access engine of the protocol
// receiver. All front-end registers are shift registers written and read one
// bit per sixteen system clocks (3.7 Mbit/s): only every sixteenth C-LINK bit
// after a write header is data, and only every sixteenth D-LINK bit of a read
// response is data.
//
// Write: data bit D(k) is on the C-LINK 15+16k clocks after the start bit. It
// is placed on the shared serial data line (sdo) and clocked into the target
// register: external registers (the CARE control registers on the ADBs and
// the calibration DAC) get a clock pulse, internal ones (calibration control,
// control register) a one-clock shift enable. After a control register write
// the serial stage is loaded into the parallel stage (ctrl_load_o). The DAC
// chip enable is held low for the whole DAC write.
//
// Read: a response is sent on the D-LINK: a 16-bit header (1, 0, REG=1,
// C0..C4, A0..A4, 0, 0, 0), then for each data bit fifteen zeros and the bit.
// Each bit is taken from the register's serial output, driven back into its
// input and shifted, so the register is unchanged after the read.
//
// Register lengths: control 8, calibration control 6, DAC 16, CARE register 6
// eight bits, CARE registers 0-5 CARE_BITS (length not given in the board
// description, 16 assumed). The bit-per-sixteen-clocks rate, the response
// format and the loop-back follow the board description. The position of the
// register clock inside the sixteen-clock bit slot (data changes at slot
// clock 4, clock rises at slot clock 8, falls at slot clock 0) is this
// design's choice. A request that arrives while an access is in progress is
// ignored.
module fc_reg_engine
  import iob_pkg::*;
#(
  parameter int unsigned CARE_BITS = 16,   // length of CARE registers 0-5
  parameter int unsigned N_CARE    = 7     // CARE registers 0..6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clink_i,      // C-LINK (write data)
  input  logic              req_valid_i,
  input  fc_req_t           req_i,
  output logic              busy_o,       // access in progress
  output logic              hold_o,       // write data is being read from C-LINK
  output logic              dlink_o,      // D-LINK serial response
  // shared serial data to all registers
  output logic              sdo_o,
  // external registers
  input  logic [N_CARE-1:0] care_q_i,     // CARE register serial outputs
  output logic [N_CARE-1:0] care_sclk_o,
  output logic              dac_sclk_o,
  output logic              dac_cs_n_o,
  // internal registers
  input  logic              cal_q_i,
  output logic              cal_shift_o,
  input  logic              ctrl_q_i,
  output logic              ctrl_shift_o,
  output logic              ctrl_load_o
);

  fc_req_t    cur_q;
  logic       busy_q;
  logic [3:0] ph_q;     // clock within the 16-clock bit slot
  logic [5:0] row_q;    // slot number
  logic [5:0] nbits;
  logic [5:0] last_row;
  logic       active;   // this slot carries a data bit
  logic       finish;
  logic       sdi;
  logic       sclk_q;
  logic       rd_bit_q;

  always_comb begin
    unique case (cur_q.target)
      TGT_CARE: nbits = (cur_q.care == 3'd6) ? 6'(CARE6_BITS) : 6'(CARE_BITS);
      TGT_CAL:  nbits = 6'(CAL_BITS);
      TGT_DAC:  nbits = 6'(DAC_BITS);
      TGT_CTRL: nbits = 6'(CTRL_BITS);
      default:  nbits = 6'd0;
    endcase
  end

  // Writes use slots 0..N-1 (data arrives three clocks into slot 0),
  // reads use slot 0 for the response header and slots 1..N for data.
  assign last_row = cur_q.write ? nbits - 6'd1 : nbits;
  assign active   = busy_q && (cur_q.write ? (row_q < nbits)
                                           : (row_q >= 6'd1 && row_q <= nbits));
  assign finish   = busy_q && (row_q == last_row) && (ph_q == 4'd15);

  always_comb begin
    unique case (cur_q.target)
      TGT_CARE: sdi = care_q_i[cur_q.care];
      TGT_CAL:  sdi = cal_q_i;
      TGT_CTRL: sdi = ctrl_q_i;
      default:  sdi = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q   <= 1'b0;
      cur_q    <= '0;
      ph_q     <= '0;
      row_q    <= '0;
      sdo_o    <= 1'b0;
      sclk_q   <= 1'b0;
      rd_bit_q <= 1'b0;
      dlink_o  <= 1'b0;
    end else begin
      if (!busy_q) begin
        if (req_valid_i) begin
          busy_q <= 1'b1;
          cur_q  <= req_i;
          ph_q   <= '0;
          row_q  <= '0;
        end
      end else begin
        ph_q <= ph_q + 4'd1;
        if (ph_q == 4'd15) row_q <= row_q + 6'd1;
        if (finish) busy_q <= 1'b0;
      end
      // data bit: from the C-LINK (write) or looped back (read)
      if (active && ph_q == 4'd3) begin
        sdo_o    <= cur_q.write ? clink_i : sdi;
        rd_bit_q <= sdi;
      end
      sclk_q <= active && (ph_q >= 4'd7) && (ph_q <= 4'd14);
      // D-LINK response
      dlink_o <= 1'b0;
      if (busy_q && !cur_q.write) begin
        if (row_q == 6'd0) begin
          unique case (ph_q)
            4'd0, 4'd2: dlink_o <= 1'b1;
            4'd3, 4'd4, 4'd5, 4'd6, 4'd7, 4'd8, 4'd9, 4'd10, 4'd11, 4'd12:
              dlink_o <= cur_q.header[4'd12 - ph_q];
            default: dlink_o <= 1'b0;
          endcase
        end else if (active && ph_q == 4'd15) begin
          dlink_o <= rd_bit_q;
        end
      end
    end
  end

  // DAC chip enable for the duration of a DAC write
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dac_cs_n_o <= 1'b1;
    else if (!busy_q && req_valid_i && req_i.write && req_i.target == TGT_DAC)
      dac_cs_n_o <= 1'b0;
    else if (finish) dac_cs_n_o <= 1'b1;
  end

  logic shift_now;
  assign shift_now = active && (ph_q == 4'd8);

  always_comb begin
    care_sclk_o = '0;
    if (cur_q.target == TGT_CARE) care_sclk_o[cur_q.care] = sclk_q;
  end
  assign dac_sclk_o   = sclk_q && (cur_q.target == TGT_DAC);
  assign cal_shift_o  = shift_now && (cur_q.target == TGT_CAL);
  assign ctrl_shift_o = shift_now && (cur_q.target == TGT_CTRL);
  assign ctrl_load_o  = finish && cur_q.write && (cur_q.target == TGT_CTRL);
  assign busy_o       = busy_q;
  assign hold_o       = busy_q && cur_q.write;

  // The DAC is selected only during an access, and the register clocks
  // never run for a target other than the one being accessed.
  a_dac_select_in_access: assert property (@(posedge clk) disable iff (!rst_n)
    !dac_cs_n_o |-> busy_q);
  a_one_reg_clock: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({care_sclk_o, dac_sclk_o, cal_shift_o, ctrl_shift_o}));

endmodule
