// tb_alfa_m_regs: checks the Alfa-M STATUS bit positions against the status
// inputs, TEST_MODE set and cleared through CONTROL, and the write-only
// CONTROL register.
module tb_alfa_m_regs;
  import alfa_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [5:0] wr_offset = '0, rd_offset = '0;
  logic [15:0] wr_data = '0, rd_data;
  logic gol_ready = 0, ttc_ready = 0, qpll_error = 0, qpll_lock = 0, test_mode;
  int checks = 0, failures = 0;

  alfa_m_regs dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] v;
    repeat (3) @(posedge clk);
    rst_n = 1;
    rd_offset = M_STATUS;
    for (int i = 0; i < 16; i++) begin
      v = 4'(i);
      {gol_ready, ttc_ready, qpll_error, qpll_lock} = v;
      #1 check(rd_data == {1'b0, v, 11'b0}, "status flags at bits 14..11");
    end
    @(negedge clk) wr_en = 1; wr_offset = M_CONTROL; wr_data = 16'h8000;
    @(negedge clk) wr_en = 0;
    check(test_mode && rd_data[15], "TEST_MODE set");
    @(negedge clk) wr_en = 1; wr_offset = 6'd5; wr_data = 16'h0000;
    @(negedge clk) wr_en = 0;
    check(test_mode, "write to another offset ignored");
    @(negedge clk) wr_en = 1; wr_offset = M_CONTROL; wr_data = 16'h7FFF;
    @(negedge clk) wr_en = 0;
    check(!test_mode && !rd_data[15], "TEST_MODE cleared");
    rd_offset = M_CONTROL;
    #1 check(rd_data == 16'h0, "control is write-only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
