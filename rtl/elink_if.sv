// elink_if: the environmental monitoring interface, the IOB end of the ELINK
// to the environmental monitoring board (EMB). The EMB supplies the clock
// ECLK and drives EIN; every transfer in either direction happens on a rising
// ECLK edge, and EOUT changes after rising edges. Idle lines are '0'.
// A transaction starts with a start bit '1' and a six-bit command c0..c5,
// least significant bit first:
//   1 0 0 a0 a1 a2  ADC access, ADB analogue MUX address a (MAX192 ADC)
//   1 0 1 a0 a1 x   Finisar transmitter number a (1..3) access
//   1 1 0 0 x x     test pattern: EOUT toggles every edge while EIN is high
//   1 1 0 1 x x     IOB serial number, 8 bits LSB first while EIN is high,
//                   then zeros
//   1 1 1 x x x     G-LINK status while EIN is high: lock a, edge a, lock b,
//                   edge b, lock c, edge c, then zeros (reading clears edges)
//   0 x x x x x     invalid: back to waiting for a start bit at once
// EIN low during the three streaming commands ends them.
// ADC: chip select is held low; EIN is wired to the ADC's DIN and ECLK is
// passed to its SCLK for the whole access. Eight command bits are clocked in;
// EOUT then shows SSTRB while the EMB holds ECLK high. From the next falling
// edge EOUT shows DOUT (data leaves the ADC on falling edges, the EMB samples
// it on rising edges). A rising edge with EIN high ends the access.
// Finisar: the selected chip select goes low and EOUT shows READY while the
// EMB holds ECLK high. A rising edge with READY high aborts; with READY low
// it clocks the first of eight data bits in. From the first falling edge EOUT
// shows the Finisar's serial output, so the EMB samples output bit k at the
// rising edge that clocks in input bit k. After the eighth rising edge EOUT
// shows READY again and the next rising edge ends the access.
// The command codes and the transaction rules follow the board description;
// gating ECLK to the ADC and Finisar with enables sampled on the falling edge
// (so the gated clocks cannot glitch), which edge clocks the first Finisar
// bit, and ignoring Finisar number 0 are this design's choices.
module elink_if (
  input  logic       eclk,          // ELINK clock from the EMB
  input  logic       rst_n,         // asynchronous reset, active low
  input  logic       ein_i,
  output logic       eout_o,
  input  logic [7:0] serial_i,      // IOB serial number
  input  logic [2:0] lock_i,        // G-LINK LOCKED (a, b, c)
  input  logic [2:0] edge_i,        // G-LINK positive edge seen (a, b, c)
  output logic       clr_toggle_o,  // toggles when the G-LINK status is read
  // ADB analogue MUX and MAX192 ADC
  output logic [2:0] adb_addr_o,
  output logic       adc_din_o,
  output logic       adc_sclk_o,
  output logic       adc_cs_n_o,
  input  logic       adc_dout_i,
  input  logic       adc_sstrb_i,
  // Finisar transmitters' diagnostic port
  output logic       fin_di_o,
  output logic       fin_dclk_o,
  output logic [2:0] fin_cs_n_o,    // FCS1*..FCS3*
  input  logic       fin_do_i,
  input  logic       fin_ready_i
);

  typedef enum logic [3:0] {
    E_IDLE, E_CMD, E_TEST, E_SERNO, E_GLINK,
    E_ADC_CMD, E_ADC_CONV, E_ADC_READ,
    E_FIN_WAIT, E_FIN_DATA, E_FIN_END
  } estate_e;

  estate_e    st_q;
  logic [2:0] cnt_q;
  logic [4:0] cmd_q;        // c0..c4 received so far (c0 in bit 0)
  logic [7:0] sh_q;         // bits still to be sent by SERNO/GLINK
  logic [3:0] left_q;       // number of bits still in sh_q
  logic       eout_q;
  logic [1:0] fin_sel_q;
  logic [2:0] lock_s1, lock_s2, edge_s1, edge_s2;
  logic [5:0] cmd;
  logic       adc_en_q, fin_en_q;
  logic       fell_q;       // ECLK has fallen since entering ADC_CONV/FIN_WAIT

  assign cmd = {ein_i, cmd_q};

  // status bits from the system clock domain
  always_ff @(posedge eclk or negedge rst_n) begin
    if (!rst_n) begin
      lock_s1 <= '0; lock_s2 <= '0; edge_s1 <= '0; edge_s2 <= '0;
    end else begin
      lock_s1 <= lock_i; lock_s2 <= lock_s1;
      edge_s1 <= edge_i; edge_s2 <= edge_s1;
    end
  end

  always_ff @(posedge eclk or negedge rst_n) begin
    if (!rst_n) begin
      st_q         <= E_IDLE;
      cnt_q        <= '0;
      cmd_q        <= '0;
      sh_q         <= '0;
      left_q       <= '0;
      eout_q       <= 1'b0;
      fin_sel_q    <= '0;
      adb_addr_o   <= '0;
      clr_toggle_o <= 1'b0;
    end else begin
      unique case (st_q)
        E_IDLE: begin
          eout_q <= 1'b0;
          cnt_q  <= '0;
          if (ein_i) st_q <= E_CMD;
        end
        E_CMD: begin
          if (cnt_q < 3'd5) cmd_q[cnt_q] <= ein_i;
          cnt_q        <= cnt_q + 3'd1;
          if (cnt_q == 3'd0 && !ein_i) st_q <= E_IDLE;
          else if (cnt_q == 3'd5) begin
            cnt_q <= '0;
            if (!cmd[1]) begin
              if (!cmd[2]) begin
                adb_addr_o <= cmd[5:3];
                st_q       <= E_ADC_CMD;
              end else if (cmd[4:3] != 2'd0) begin
                fin_sel_q <= cmd[4:3];
                st_q      <= E_FIN_WAIT;
              end else begin
                st_q <= E_IDLE;
              end
            end else if (!cmd[2]) begin
              if (!cmd[3]) st_q <= E_TEST;
              else begin
                sh_q   <= serial_i;
                left_q <= 4'd8;
                st_q   <= E_SERNO;
              end
            end else begin
              sh_q         <= {2'b00, edge_s2[2], lock_s2[2], edge_s2[1], lock_s2[1],
                               edge_s2[0], lock_s2[0]};
              left_q       <= 4'd6;
              clr_toggle_o <= ~clr_toggle_o;
              st_q         <= E_GLINK;
            end
          end
        end
        E_TEST: begin
          if (!ein_i) begin st_q <= E_IDLE; eout_q <= 1'b0; end
          else eout_q <= ~eout_q;
        end
        E_SERNO, E_GLINK: begin
          if (!ein_i) begin st_q <= E_IDLE; eout_q <= 1'b0; end
          else begin
            eout_q <= (left_q != 0) ? sh_q[0] : 1'b0;
            sh_q   <= {1'b0, sh_q[7:1]};
            if (left_q != 0) left_q <= left_q - 4'd1;
          end
        end
        E_ADC_CMD: begin
          cnt_q <= cnt_q + 3'd1;
          if (cnt_q == 3'd7) st_q <= E_ADC_CONV;
        end
        E_ADC_CONV: st_q <= E_ADC_READ;
        E_ADC_READ: if (ein_i) st_q <= E_IDLE;
        E_FIN_WAIT: begin
          cnt_q <= '0;
          if (fin_ready_i) st_q <= E_IDLE;
          else             st_q <= E_FIN_DATA;
        end
        E_FIN_DATA: begin
          cnt_q <= cnt_q + 3'd1;
          if (cnt_q == 3'd6) st_q <= E_FIN_END;
        end
        E_FIN_END: st_q <= E_IDLE;
        default: st_q <= E_IDLE;
      endcase
    end
  end

  // clock enables change only while ECLK is low
  always_ff @(negedge eclk or negedge rst_n) begin
    if (!rst_n) begin
      adc_en_q <= 1'b0;
      fin_en_q <= 1'b0;
      fell_q   <= 1'b0;
    end else begin
      fell_q   <= st_q inside {E_ADC_CONV, E_FIN_WAIT};
      adc_en_q <= st_q inside {E_ADC_CMD, E_ADC_CONV, E_ADC_READ};
      fin_en_q <= st_q inside {E_FIN_WAIT, E_FIN_DATA};
    end
  end

  assign adc_sclk_o = eclk & adc_en_q;
  assign fin_dclk_o = eclk & fin_en_q;
  assign adc_din_o  = ein_i;
  assign fin_di_o   = ein_i;
  assign adc_cs_n_o = !(st_q inside {E_ADC_CMD, E_ADC_CONV, E_ADC_READ});

  always_comb begin
    fin_cs_n_o = 3'b111;
    if (st_q inside {E_FIN_WAIT, E_FIN_DATA, E_FIN_END})
      fin_cs_n_o[fin_sel_q - 2'd1] = 1'b0;
  end

  always_comb begin
    unique case (st_q)
      E_ADC_CMD, E_ADC_READ:  eout_o = adc_dout_i;
      E_ADC_CONV:             eout_o = fell_q ? adc_dout_i : adc_sstrb_i;
      E_FIN_WAIT:             eout_o = fell_q ? fin_do_i : fin_ready_i;
      E_FIN_END:              eout_o = fin_ready_i;
      E_FIN_DATA:             eout_o = fin_do_i;
      default:                eout_o = eout_q;
    endcase
  end

  // At most one device on the monitoring port is selected, and a device
  // clock only runs while that device is selected.
  a_one_select: assert property (@(posedge eclk) disable iff (!rst_n)
    $onehot0({~adc_cs_n_o, ~fin_cs_n_o}));
  a_adc_clock_selected: assert property (@(posedge eclk) disable iff (!rst_n)
    adc_sclk_o |-> !adc_cs_n_o);
  a_fin_clock_selected: assert property (@(posedge eclk) disable iff (!rst_n)
    fin_dclk_o |-> !(&fin_cs_n_o));

endmodule
