// tb_alfa_m_deserializer: sends random 71-bit words MSB first with gaps in
// Data_Ready and checks the reassembled word, the done flag after exactly 71
// bits, clear, and the overrun flag for extra bits.
module tb_alfa_m_deserializer;
  localparam int W = 71;
  logic clk = 0, rst_n = 0, clear = 0, ser_data = 0, data_ready = 0;
  logic [W-1:0] word;
  logic done, overrun;
  int checks = 0, failures = 0;

  alfa_m_deserializer dut (.*);

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
    logic [W-1:0] w;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 10; e++) begin
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      check(!done && word == '0, "cleared");
      w = {$urandom, $urandom, 7'($urandom)};
      for (int b = W - 1; b >= 0; b--) begin
        // optional idle clock between bits on odd events
        if (e % 2 == 1 && b % 9 == 0) begin data_ready = 0; @(negedge clk); end
        data_ready = 1; ser_data = w[b];
        @(negedge clk);
        check(done == (b == 0), "done exactly after 71 bits");
      end
      data_ready = 0;
      @(negedge clk);
      check(word == w, "word reassembled");
      check(!overrun, "no overrun");
    end
    data_ready = 1; ser_data = 1;
    @(negedge clk) data_ready = 0;
    check(overrun && word == w, "extra bit flagged and ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
