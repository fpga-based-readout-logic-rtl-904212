// spi_client: SPI bus client shared by the Alfa-R and Alfa-M controllers.
//
// The ELMB card is the bus master.  A frame is 32 bits long, sent MSB first
// on cmd_in while cmd_sel_n is low, with one cmd_clk strobe per bit:
//   [31:27] ADDR  [26] R/W (1 = write)  [25:20] OFFSET  [19:16] unused
//   [15:0]  DATA
// A write carries all 32 bits on cmd_in; when the 32nd bit has been taken and
// ADDR is this client's address (or the broadcast address 31, if
// ACCEPT_BCAST is set), wr_en pulses for one clock with wr_offset and
// wr_data.  A read carries only bits 31..16 on cmd_in; once they have arrived
// and ADDR matches, the client samples rd_data for rd_offset and returns it
// MSB first on cmd_out during the last 16 strobes, with cmd_out_en high so
// that the board can merge the clients' outputs.  Broadcast reads are not
// answered.  Frame layout, address map and bit order follow the document.
//
// This design's choices, where the document is silent: the bus signals are
// synchronised into the 40 MHz clock domain and edge-detected, so each cmd_clk
// phase must last at least 3 clock periods; cmd_in is taken on the rising
// cmd_clk edge; cmd_out changes after a falling cmd_clk edge, so it is stable
// at the next rising edge; a frame that ends before 32 strobes has no effect.
module spi_client
  import alfa_pkg::*;
#(
  parameter bit ACCEPT_BCAST = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ADDR_W-1:0]   my_addr,
  // SPI bus
  input  logic                cmd_sel_n,
  input  logic                cmd_clk,
  input  logic                cmd_in,
  output logic                cmd_out,
  output logic                cmd_out_en,
  // register port
  output logic                wr_en,
  output logic [OFFSET_W-1:0] wr_offset,
  output logic [REG_W-1:0]    wr_data,
  output logic [OFFSET_W-1:0] rd_offset,
  input  logic [REG_W-1:0]    rd_data
);
  logic [1:0] sel_sync, din_sync;
  logic [2:0] clk_sync;
  logic       sel, clk_rise, clk_fall;
  logic [SPI_FRAME_W-1:0] sr;
  logic [5:0]             bit_cnt;
  logic [REG_W-1:0]       rd_shadow;
  logic                   reading;

  // header fields once bits 31..16 are in sr[15:0]
  logic [ADDR_W-1:0] hdr_addr;
  logic              hdr_wr;
  // fields of a complete frame
  logic [ADDR_W-1:0] frm_addr;
  logic              frm_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_sync <= '1;
      clk_sync <= '0;
      din_sync <= '0;
    end else begin
      sel_sync <= {sel_sync[0], cmd_sel_n};
      clk_sync <= {clk_sync[1:0], cmd_clk};
      din_sync <= {din_sync[0], cmd_in};
    end
  end

  assign sel      = !sel_sync[1];
  assign clk_rise =  clk_sync[1] && !clk_sync[2];
  assign clk_fall = !clk_sync[1] &&  clk_sync[2];

  assign hdr_addr  = sr[15:11];
  assign hdr_wr    = sr[10];
  assign rd_offset = sr[9:4];
  assign frm_addr  = sr[31:27];
  assign frm_wr    = sr[26];
  assign wr_offset = sr[25:20];
  assign wr_data   = sr[15:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr         <= '0;
      bit_cnt    <= '0;
      wr_en      <= 1'b0;
      rd_shadow  <= '0;
      reading    <= 1'b0;
      cmd_out    <= 1'b0;
    end else begin
      wr_en <= 1'b0;
      if (!sel) begin
        bit_cnt <= '0;
        reading <= 1'b0;
        cmd_out <= 1'b0;
      end else begin
        if (clk_rise && bit_cnt < 6'd32) begin
          sr      <= {sr[SPI_FRAME_W-2:0], din_sync[1]};
          bit_cnt <= bit_cnt + 1'b1;
        end
        // header complete: start answering a read addressed to this client
        if (bit_cnt == 6'd16 && !reading && !hdr_wr && hdr_addr == my_addr) begin
          reading   <= 1'b1;
          rd_shadow <= rd_data;
        end
        if (clk_fall && reading && bit_cnt >= 6'd16 && bit_cnt < 6'd32) begin
          cmd_out   <= rd_shadow[REG_W-1];
          rd_shadow <= {rd_shadow[REG_W-2:0], 1'b0};
        end
        // frame complete: perform a write addressed to this client
        if (bit_cnt == 6'd32 && frm_wr &&
            (frm_addr == my_addr || (ACCEPT_BCAST && frm_addr == ADDR_BROADCAST))) begin
          wr_en   <= 1'b1;
          bit_cnt <= 6'd33;  // one write per frame
        end
      end
    end
  end

  assign cmd_out_en = reading;

endmodule
