// tb_alfa_r_serializer: feeds events from a queue model of the derandomizer,
// plays the Alfa-M side of the Data_Req / Data_Ready handshake and checks
// that each event comes out MSB first, with Data_Ready high for exactly 71
// clocks starting one clock after the request, that a request with no event
// waits, and that dropping Data_Req early sets the transmission error.
module tb_alfa_r_serializer;
  localparam int W = 71;
  logic clk = 0, rst_n = 0;
  logic data_req = 0, fifo_empty, fifo_rd, ser_data, data_ready, tx_error;
  logic [W-1:0] fifo_dout;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0;

  alfa_r_serializer dut (.*);

  assign fifo_empty = (q.size() == 0);
  assign fifo_dout  = fifo_empty ? '0 : q[0];
  logic pop_pending = 1'b0;
  always @(posedge clk) pop_pending <= fifo_rd;
  always @(negedge clk) if (pop_pending && q.size() > 0) void'(q.pop_front());

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // one request; early_drop > 0 withdraws data_req after that many valid bits
  task automatic transfer(input logic [W-1:0] expect_word, input int early_drop);
    logic [W-1:0] got;
    int n, wait_cyc;
    @(negedge clk) data_req = 1;
    wait_cyc = 0;
    @(negedge clk);
    while (!data_ready && wait_cyc < 200) begin wait_cyc++; @(negedge clk); end
    check(wait_cyc == 0, "data_ready one clock after request");
    n = 0; got = '0;
    while (data_ready && n < 100) begin
      got = {got[W-2:0], ser_data};
      n++;
      if (early_drop > 0 && n == early_drop) data_req = 0;
      @(negedge clk);
    end
    check(n == W, "71 valid bits");
    check(got == expect_word, "word MSB first");
    repeat (2) @(negedge clk);
    check(!data_ready, "data_ready stays low while request held");
    data_req = 0;
    @(negedge clk);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] w;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 6; e++) q.push_back({$urandom, $urandom, 7'($urandom)});
    for (int e = 0; e < 6; e++) begin
      w = q[0];
      transfer(w, 0);
    end
    check(!tx_error, "no error after clean transfers");
    // request with an empty derandomizer: nothing is sent until an event arrives
    @(negedge clk) data_req = 1;
    repeat (10) begin @(negedge clk); check(!data_ready, "no data while empty"); end
    q.push_back({W{1'b1}});
    @(negedge clk);
    @(negedge clk);
    check(data_ready, "starts once an event is present");
    while (data_ready) @(negedge clk);
    data_req = 0;
    @(negedge clk);
    check(!tx_error, "still no error");
    // handshake violation
    w = {$urandom, $urandom, 7'($urandom)};
    q.push_back(w);
    transfer(w, 20);
    check(tx_error, "early drop of Data_Req flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
