// alfa_r: local readout controller of one PMF (64-channel front-end module).
//
// Data path, one stage per clock of the 40 MHz LHC clock:
//   1. The 64 front-end bits are AND-ed with the channel mask.
//   2. The masked word is merged with the 4 LSB of a free-running local
//      bunch-crossing counter and written into the pipeline, which returns
//      it PIPE_LATENCY clocks later, when the L1 trigger decision arrives.
//   3. On an L1 accept the pipeline output is merged with the 3 LSB of a
//      local L1-accept counter and pushed into the derandomizer FIFO
//      (71 bits x DERAND_DEPTH); the counter then advances.  Without an
//      accept the pipeline output is simply overwritten.
//   4. On Data_Req from Alfa-M the oldest event is sent MSB first on the
//      serial link with Data_Ready (see alfa_r_serializer).
// The two counter tags do not time-stamp the event; they let Alfa-M check that
// the fragments it merges from all PMFs belong to the same event.  Registers
// (mask, Maroc configuration stream, charge multiplexer control, status) are
// reached over the SPI bus at address my_addr or the broadcast address.
//
// Follows the document: the stage order, the 71-bit derandomizer, the 256
// clock pipeline and 256-slot derandomizer, the serial handshake and the
// register map.  The document's text gives 3 BC bits and 4 L1 bits with a
// 67-bit pipeline, while its block diagram and serial timing diagram give 4 BC
// bits, 3 L1 bits and a 68-bit pipeline; this design follows the diagrams.
// This design's choices: both local counters reset to 0 with rst_n, an L1
// accept that finds the derandomizer full loses that event, and TEST_MODE is
// stored and reported but generates no test vectors (their content is not
// specified).
module alfa_r
  import alfa_pkg::*;
#(
  parameter int PIPE_LATENCY = 256,
  parameter int DERAND_DEPTH = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ADDR_W-1:0]   my_addr,
  // front end
  input  logic [FE_W-1:0]     fe_data,
  output maroc_cfg_t          cfg,
  output logic                test_mode,
  // trigger
  input  logic                l1a,
  // serial link to Alfa-M
  input  logic                data_req,
  output logic                ser_data,
  output logic                data_ready,
  // SPI bus
  input  logic                cmd_sel_n,
  input  logic                cmd_clk,
  input  logic                cmd_in,
  output logic                cmd_out,
  output logic                cmd_out_en
);
  logic [FE_W-1:0]      mask;
  logic [BC_TAG_W-1:0]  bc_cnt;
  logic [L1_TAG_W-1:0]  l1_cnt;
  logic [PIPE_W-1:0]    pipe_out;
  event_word_t          derand_in, derand_out;
  logic                 derand_empty, derand_full, derand_rd;
  logic [$clog2(DERAND_DEPTH):0] derand_count;  // fill level, for monitoring
  logic                 tx_error;

  logic                 wr_en;
  logic [OFFSET_W-1:0]  wr_offset, rd_offset;
  logic [REG_W-1:0]     wr_data, rd_data;

  // local counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bc_cnt <= '0;
      l1_cnt <= '0;
    end else begin
      bc_cnt <= bc_cnt + 1'b1;
      if (l1a) l1_cnt <= l1_cnt + 1'b1;
    end
  end

  pipeline_buffer #(.WIDTH(PIPE_W), .LATENCY(PIPE_LATENCY)) u_pipeline (
    .clk, .rst_n,
    .din  ({bc_cnt, fe_data & mask}),
    .dout (pipe_out)
  );

  assign derand_in = {l1_cnt, pipe_out};

  sync_fifo #(.WIDTH(EVENT_W), .DEPTH(DERAND_DEPTH)) u_derandomizer (
    .clk, .rst_n,
    .wr_en (l1a),
    .din   (derand_in),
    .rd_en (derand_rd),
    .dout  (derand_out),
    .empty (derand_empty),
    .full  (derand_full),
    .count (derand_count)
  );

  alfa_r_serializer #(.WIDTH(EVENT_W)) u_serializer (
    .clk, .rst_n,
    .data_req,
    .fifo_empty (derand_empty),
    .fifo_dout  (derand_out),
    .fifo_rd    (derand_rd),
    .ser_data,
    .data_ready,
    .tx_error
  );

  spi_client #(.ACCEPT_BCAST(1'b1)) u_spi (
    .clk, .rst_n, .my_addr,
    .cmd_sel_n, .cmd_clk, .cmd_in, .cmd_out, .cmd_out_en,
    .wr_en, .wr_offset, .wr_data, .rd_offset, .rd_data
  );

  alfa_r_regs u_regs (
    .clk, .rst_n,
    .wr_en, .wr_offset, .wr_data, .rd_offset, .rd_data,
    .tx_error, .mask, .test_mode, .cfg
  );

  // The derandomizer depth is chosen so that it never fills at the expected
  // trigger rate; an accept into a full derandomizer would lose the event.
  a_no_derand_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(l1a && derand_full)) else $error("alfa_r: L1 accept with a full derandomizer");

endmodule
