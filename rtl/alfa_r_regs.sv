// alfa_r_regs: register file and front-end configuration logic of Alfa-R.
//
// Seven 16-bit registers are reached through the SPI client:
//   0x00 CONTROL (write only)  15 TEST_MODE, 14 GAIN_ENABLE, 13 DAC_ENABLE,
//                              12 MUX_CLOCK (writing 1 steps the charge
//                              multiplexer counter)
//   0x01 STATUS  (read only)   15 TEST_MODE, 14 GAIN_ENABLE, 13 DAC_ENABLE,
//                              12 MUX_HOLD, 11 reserved, 10..5 MUX_CNT,
//                              0 TX_ERROR
//   0x02..0x05 MASK1..MASK4    channel mask, MASK1 = channels 15..0, ...
//   0x06 STREAM                5 RST_GAIN, 4 D_GAIN, 3 CLK_GAIN,
//                              2 RST_DAC, 1 D_DAC, 0 CLK_DAC
// The STREAM bits drive the Maroc GAIN and DAC serial ports directly, so
// software draws the serial waveform by writing one vector per time slice.
// A port whose enable flag is 0 has all its lines held high.  MUX_HOLD is 1
// after reset, goes to 0 with the first MUX_CLOCK write and back to 1 with the
// 64th, when the 6-bit MUX_CNT wraps to 0; each MUX_CLOCK write also gives a
// one-clock pulse on the multiplexer clock line.
//
// Follows the document: offsets, bit layouts, defaults, the HOLD sequence and
// the port gating.  This design's choices: the position of TX_ERROR in the
// status word, MASKn covering channels 16n-1..16n-16, masks resetting to all
// ones (every channel enabled), reads of CONTROL returning 0, and the mux
// clock being a single-clock pulse.
module alfa_r_regs
  import alfa_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr_en,
  input  logic [OFFSET_W-1:0] wr_offset,
  input  logic [REG_W-1:0]    wr_data,
  input  logic [OFFSET_W-1:0] rd_offset,
  output logic [REG_W-1:0]    rd_data,
  input  logic                tx_error,
  output logic [FE_W-1:0]     mask,
  output logic                test_mode,
  output maroc_cfg_t          cfg
);
  logic       gain_en, dac_en, mux_hold, mux_pulse;
  logic [5:0] mux_cnt;
  logic [5:0] stream;
  logic [REG_W-1:0] mask_r [4];
  logic [REG_W-1:0] status;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      test_mode <= 1'b0;
      gain_en   <= 1'b0;
      dac_en    <= 1'b0;
      mux_hold  <= 1'b1;
      mux_cnt   <= '0;
      mux_pulse <= 1'b0;
      stream    <= '0;
      for (int i = 0; i < 4; i++) mask_r[i] <= '1;
    end else begin
      mux_pulse <= 1'b0;
      if (wr_en) begin
        unique case (wr_offset)
          R_CONTROL: begin
            test_mode <= wr_data[BIT_TEST_MODE];
            gain_en   <= wr_data[BIT_GAIN_ENABLE];
            dac_en    <= wr_data[BIT_DAC_ENABLE];
            if (wr_data[BIT_MUX_CLOCK]) begin
              mux_cnt   <= mux_cnt + 1'b1;
              mux_pulse <= 1'b1;
              if (mux_cnt == 6'd0)  mux_hold <= 1'b0;  // first write
              if (mux_cnt == 6'd63) mux_hold <= 1'b1;  // 64th write
            end
          end
          R_MASK1: mask_r[0] <= wr_data;
          R_MASK2: mask_r[1] <= wr_data;
          R_MASK3: mask_r[2] <= wr_data;
          R_MASK4: mask_r[3] <= wr_data;
          R_STREAM: stream <= wr_data[5:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    status = '0;
    status[BIT_TEST_MODE]   = test_mode;
    status[BIT_GAIN_ENABLE] = gain_en;
    status[BIT_DAC_ENABLE]  = dac_en;
    status[BIT_MUX_HOLD]    = mux_hold;
    status[10:5]            = mux_cnt;
    status[BIT_TX_ERROR]    = tx_error;
  end

  always_comb begin
    unique case (rd_offset)
      R_STATUS: rd_data = status;
      R_MASK1:  rd_data = mask_r[0];
      R_MASK2:  rd_data = mask_r[1];
      R_MASK3:  rd_data = mask_r[2];
      R_MASK4:  rd_data = mask_r[3];
      R_STREAM: rd_data = {10'b0, stream};
      default:  rd_data = '0;
    endcase
  end

  assign mask = {mask_r[3], mask_r[2], mask_r[1], mask_r[0]};

  always_comb begin
    cfg.gain_rst = gain_en ? stream[5] : 1'b1;
    cfg.gain_d   = gain_en ? stream[4] : 1'b1;
    cfg.gain_clk = gain_en ? stream[3] : 1'b1;
    cfg.dac_rst  = dac_en  ? stream[2] : 1'b1;
    cfg.dac_d    = dac_en  ? stream[1] : 1'b1;
    cfg.dac_clk  = dac_en  ? stream[0] : 1'b1;
    cfg.mux_hold = mux_hold;
    cfg.mux_clk  = mux_pulse;
  end

endmodule
