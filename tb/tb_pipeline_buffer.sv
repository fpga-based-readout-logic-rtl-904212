// tb_pipeline_buffer: checks that the pipeline returns every word exactly
// LATENCY clocks after it was written, at the default size (68 bits, 256
// clocks) and at a short latency of 5.
module tb_pipeline_buffer;
  localparam int W = 68;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] din_a = '0, dout_a, din_b = '0, dout_b;
  int checks = 0, failures = 0;
  logic [W-1:0] hist_a[$], hist_b[$];

  pipeline_buffer dut_a (.clk, .rst_n, .din(din_a), .dout(dout_a));
  pipeline_buffer #(.WIDTH(W), .LATENCY(5)) dut_b (.clk, .rst_n, .din(din_b), .dout(dout_b));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 1200; c++) begin
      din_a = {$urandom, $urandom, 4'($urandom)};
      din_b = {$urandom, $urandom, 4'($urandom)};
      #1;
      if (hist_a.size() == 256) begin
        checks++;
        if (dout_a != hist_a[0]) begin failures++; $display("FAIL a cycle %0d", c); end
        void'(hist_a.pop_front());
      end
      if (hist_b.size() == 5) begin
        checks++;
        if (dout_b != hist_b[0]) begin failures++; $display("FAIL b cycle %0d", c); end
        void'(hist_b.pop_front());
      end
      hist_a.push_back(din_a);
      hist_b.push_back(din_b);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
