// alfa_m: global readout controller on the Roman Pot motherboard.
//
// Every TTC L1 accept is broadcast to the Alfa-R controllers (by the board)
// and, together with the full TTC bunch-crossing number (12 bits) and L1
// accept count (24 bits), queued in the L1 accept buffer.  The packet builder
// takes one entry at a time, raises Data_Req to all N_PMF Alfa-R controllers,
// receives their 71-bit event fragments in N_PMF deserializers, checks the
// fragments' counter tags against the TTC values and writes the data block
// into the 32-bit output link buffer, from which the optical link serializer
// fetches a word whenever gol_ready is high (link_valid && gol_ready = one
// word taken).  CONTROL and STATUS registers are reached over SPI at
// address 0.
//
// Follows the document: the 256-slot L1 accept buffer, the 256 x 32-bit
// output buffer, the deserializer / 23-to-1 multiplexer / register /
// 64-to-32 multiplexer structure and the block format.  This design's
// choices: an L1 accept that finds the L1 accept buffer full is lost, and
// gol_ready is used both as the STATUS flag and as the link-free signal.
module alfa_m
  import alfa_pkg::*;
#(
  parameter int N_PMF         = 23,
  parameter int L1A_DEPTH     = 256,
  parameter int OUT_DEPTH     = 256,
  parameter int DESER_TIMEOUT = 80
) (
  input  logic                clk,
  input  logic                rst_n,
  // TTC
  input  logic                ttc_l1a,
  input  logic [BCID_W-1:0]   ttc_bcid,
  input  logic [EVCNT_W-1:0]  ttc_evcnt,
  input  logic                ttc_ready,
  input  logic                qpll_error,
  input  logic                qpll_lock,
  // Alfa-R serial links
  output logic                data_req,
  input  logic [N_PMF-1:0]    ser_data,
  input  logic [N_PMF-1:0]    data_ready,
  // optical link serializer
  input  logic                gol_ready,
  output logic [31:0]         link_data,
  output logic                link_valid,
  // SPI bus
  input  logic                cmd_sel_n,
  input  logic                cmd_clk,
  input  logic                cmd_in,
  output logic                cmd_out,
  output logic                cmd_out_en,
  // monitoring
  output logic                test_mode,
  output logic                busy,
  output logic                timed_out,
  output logic [N_PMF-1:0]    link_overrun
);
  l1a_entry_t               l1a_entry;
  logic                     l1a_empty, l1a_full, l1a_rd;
  logic [$clog2(L1A_DEPTH):0] l1a_count;

  event_word_t [N_PMF-1:0]  words;
  logic [N_PMF-1:0]         link_done;
  logic                     deser_clear;

  logic [4:0]               sel;
  logic                     sel_load, sel_hi;
  logic [TAG_W-1:0]         sel_tag;
  logic [31:0]              sel_half;

  logic                     out_full, out_empty, out_wr;
  logic [31:0]              out_data;
  logic [$clog2(OUT_DEPTH):0] out_count;

  logic                     wr_en;
  logic [OFFSET_W-1:0]      wr_offset, rd_offset;
  logic [REG_W-1:0]         wr_data, rd_data;

  sync_fifo #(.WIDTH($bits(l1a_entry_t)), .DEPTH(L1A_DEPTH)) u_l1a_buffer (
    .clk, .rst_n,
    .wr_en (ttc_l1a),
    .din   ({ttc_bcid, ttc_evcnt}),
    .rd_en (l1a_rd),
    .dout  (l1a_entry),
    .empty (l1a_empty),
    .full  (l1a_full),
    .count (l1a_count)
  );

  for (genvar i = 0; i < N_PMF; i++) begin : g_link
    alfa_m_deserializer #(.WIDTH(EVENT_W)) u_deser (
      .clk, .rst_n,
      .clear      (deser_clear),
      .ser_data   (ser_data[i]),
      .data_ready (data_ready[i]),
      .word       (words[i]),
      .done       (link_done[i]),
      .overrun    (link_overrun[i])
    );
  end

  alfa_m_word_select #(.N_PMF(N_PMF)) u_select (
    .clk, .rst_n, .words, .sel, .load(sel_load), .sel_hi,
    .tag(sel_tag), .half(sel_half)
  );

  alfa_m_builder #(.N_PMF(N_PMF), .DESER_TIMEOUT(DESER_TIMEOUT)) u_builder (
    .clk, .rst_n,
    .l1a_empty, .l1a_entry, .l1a_rd,
    .data_req, .deser_clear,
    .link_done, .link_busy(data_ready),
    .sel, .sel_load, .sel_hi, .sel_tag, .sel_half,
    .out_full, .out_wr, .out_data,
    .busy, .timed_out
  );

  sync_fifo #(.WIDTH(32), .DEPTH(OUT_DEPTH)) u_out_buffer (
    .clk, .rst_n,
    .wr_en (out_wr),
    .din   (out_data),
    .rd_en (gol_ready),
    .dout  (link_data),
    .empty (out_empty),
    .full  (out_full),
    .count (out_count)
  );

  assign link_valid = !out_empty;

  // The L1 accept buffer is as deep as the derandomizers; an accept into a
  // full buffer would lose the event and desynchronise the event counts.
  a_no_l1a_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(ttc_l1a && l1a_full)) else $error("alfa_m: L1 accept with a full L1 accept buffer");

  spi_client #(.ACCEPT_BCAST(1'b0)) u_spi (
    .clk, .rst_n, .my_addr(ADDR_MOTHERBOARD),
    .cmd_sel_n, .cmd_clk, .cmd_in, .cmd_out, .cmd_out_en,
    .wr_en, .wr_offset, .wr_data, .rd_offset, .rd_data
  );

  alfa_m_regs u_regs (
    .clk, .rst_n,
    .wr_en, .wr_offset, .wr_data, .rd_offset, .rd_data,
    .gol_ready, .ttc_ready, .qpll_error, .qpll_lock, .test_mode
  );

endmodule
