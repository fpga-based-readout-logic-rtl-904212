// alfa_m_regs: the two registers of the Alfa-M global controller.
//
//   0x00 CONTROL (write only)  15 TEST_MODE
//   0x01 STATUS  (read only)   15 TEST_MODE, 14 GOL_READY, 13 TTC_READY,
//                              12 QPLL_ERROR, 11 QPLL_LOCK
// The status flags other than TEST_MODE are the live levels of the optical
// link serializer, TTC receiver and QPLL status lines.  Offsets and bits
// follow the document; TEST_MODE is stored and brought out, but no test
// vector generator is attached since the vectors are not specified.  Reads
// of CONTROL return 0 (this design's choice).
module alfa_m_regs
  import alfa_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr_en,
  input  logic [OFFSET_W-1:0] wr_offset,
  input  logic [REG_W-1:0]    wr_data,
  input  logic [OFFSET_W-1:0] rd_offset,
  output logic [REG_W-1:0]    rd_data,
  input  logic                gol_ready,
  input  logic                ttc_ready,
  input  logic                qpll_error,
  input  logic                qpll_lock,
  output logic                test_mode
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                test_mode <= 1'b0;
    else if (wr_en && wr_offset == M_CONTROL)  test_mode <= wr_data[BIT_TEST_MODE];
  end

  always_comb begin
    rd_data = '0;
    if (rd_offset == M_STATUS) begin
      rd_data[BIT_TEST_MODE]  = test_mode;
      rd_data[BIT_GOL_READY]  = gol_ready;
      rd_data[BIT_TTC_READY]  = ttc_ready;
      rd_data[BIT_QPLL_ERROR] = qpll_error;
      rd_data[BIT_QPLL_LOCK]  = qpll_lock;
    end
  end

endmodule
