// tb_sync_fifo: random push/pop test of the FIFO at its default size
// (71 bits x 256), against a queue model.  Checks the head word, empty, full,
// count, that a write into a full FIFO is dropped and a read of an empty one
// is ignored.
module tb_sync_fifo;
  localparam int W = 71, D = 256;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] din = '0, dout;
  logic empty, full;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  int n_full = 0, n_empty_rd = 0, pre;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 3; phase++) begin
      for (int i = 0; i < 1500; i++) begin
        @(negedge clk);
        // compare state before this edge
        check(empty == (model.size() == 0), "empty");
        check(full == (model.size() == D), "full");
        check(int'(count) == model.size(), "count");
        if (model.size() > 0) check(dout == model[0], "head");
        // phase 0: mostly writes, 1: mostly reads, 2: balanced
        wr_en = ($urandom_range(0, 99) < (phase == 0 ? 80 : phase == 1 ? 20 : 50));
        rd_en = ($urandom_range(0, 99) < (phase == 0 ? 20 : phase == 1 ? 80 : 50));
        din = {$urandom, $urandom, $urandom};
        @(posedge clk);
        #1;
        pre = model.size();
        if (rd_en && pre > 0) void'(model.pop_front());
        else if (rd_en) n_empty_rd++;
        if (wr_en && pre < D) model.push_back(din);
        else if (wr_en) n_full++;
      end
    end
    check(n_full > 0, "full condition reached");
    check(n_empty_rd > 0, "empty read reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
