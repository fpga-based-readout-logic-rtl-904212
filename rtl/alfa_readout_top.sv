// alfa_readout_top: readout sub-system of one Roman Pot.
//
// N_PMF Alfa-R local controllers, one per PMF front-end module (PMF k has SPI
// address k), and one Alfa-M global controller on the motherboard.  The TTC
// L1 accept goes to Alfa-M and to every Alfa-R in the same clock; Alfa-M's
// Data_Req is broadcast to every Alfa-R; each Alfa-R has its own serial data
// and Data_Ready line back to Alfa-M.  All controllers hang on one SPI bus
// driven by the ELMB card; the answering client's read data is merged onto
// cmd_out (only the addressed client drives it).  Everything runs on the
// 40 MHz LHC clock.
//
// The fabric follows the document (23 PMFs, shared SPI, broadcast trigger and
// request, point-to-point serial links).  Merging cmd_out as an OR of the
// enabled outputs stands in for the board's shared line and is this design's
// choice.
module alfa_readout_top
  import alfa_pkg::*;
#(
  parameter int N_PMF         = 23,
  parameter int PIPE_LATENCY  = 256,
  parameter int DERAND_DEPTH  = 256,
  parameter int L1A_DEPTH     = 256,
  parameter int OUT_DEPTH     = 256,
  parameter int DESER_TIMEOUT = 80
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // front end
  input  logic [N_PMF-1:0][FE_W-1:0] fe_data,
  output maroc_cfg_t [N_PMF-1:0]    fe_cfg,
  output logic [N_PMF-1:0]          pmf_test_mode,
  // TTC, QPLL
  input  logic                      ttc_l1a,
  input  logic [BCID_W-1:0]         ttc_bcid,
  input  logic [EVCNT_W-1:0]        ttc_evcnt,
  input  logic                      ttc_ready,
  input  logic                      qpll_error,
  input  logic                      qpll_lock,
  // optical link serializer
  input  logic                      gol_ready,
  output logic [31:0]               link_data,
  output logic                      link_valid,
  // SPI bus from the ELMB
  input  logic                      cmd_sel_n,
  input  logic                      cmd_clk,
  input  logic                      cmd_in,
  output logic                      cmd_out,
  // monitoring
  output logic                      m_test_mode,
  output logic                      m_busy,
  output logic                      m_timed_out,
  output logic [N_PMF-1:0]          link_overrun
);
  logic                data_req;
  logic [N_PMF-1:0]    ser_data, data_ready;
  logic [N_PMF:0]      spi_out, spi_out_en;

  for (genvar i = 0; i < N_PMF; i++) begin : g_pmf
    alfa_r #(.PIPE_LATENCY(PIPE_LATENCY), .DERAND_DEPTH(DERAND_DEPTH)) u_alfa_r (
      .clk, .rst_n,
      .my_addr    (ADDR_W'(i + 1)),
      .fe_data    (fe_data[i]),
      .cfg        (fe_cfg[i]),
      .test_mode  (pmf_test_mode[i]),
      .l1a        (ttc_l1a),
      .data_req,
      .ser_data   (ser_data[i]),
      .data_ready (data_ready[i]),
      .cmd_sel_n, .cmd_clk, .cmd_in,
      .cmd_out    (spi_out[i + 1]),
      .cmd_out_en (spi_out_en[i + 1])
    );
  end

  alfa_m #(
    .N_PMF(N_PMF), .L1A_DEPTH(L1A_DEPTH), .OUT_DEPTH(OUT_DEPTH),
    .DESER_TIMEOUT(DESER_TIMEOUT)
  ) u_alfa_m (
    .clk, .rst_n,
    .ttc_l1a, .ttc_bcid, .ttc_evcnt, .ttc_ready, .qpll_error, .qpll_lock,
    .data_req, .ser_data, .data_ready,
    .gol_ready, .link_data, .link_valid,
    .cmd_sel_n, .cmd_clk, .cmd_in,
    .cmd_out    (spi_out[0]),
    .cmd_out_en (spi_out_en[0]),
    .test_mode  (m_test_mode),
    .busy       (m_busy),
    .timed_out  (m_timed_out),
    .link_overrun
  );

  assign cmd_out = |(spi_out & spi_out_en);

endmodule
