// tb_alfa_m_word_select: loads each of the 23 link words in random order and
// checks the tag and both 32-bit halves one clock after the load.
module tb_alfa_m_word_select;
  import alfa_pkg::*;
  localparam int N = 23;
  logic clk = 0, rst_n = 0;
  event_word_t [N-1:0] words;
  logic [4:0] sel = '0;
  logic load = 0, sel_hi = 0;
  logic [6:0] tag;
  logic [31:0] half;
  int checks = 0, failures = 0;

  alfa_m_word_select dut (.*);

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
    int k;
    for (int i = 0; i < N; i++) words[i] = {$urandom, $urandom, 7'($urandom)};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      k = $urandom_range(0, N - 1);
      @(negedge clk) sel = 5'(k); load = 1;
      @(negedge clk) load = 0; sel = 5'($urandom_range(0, N - 1));
      check(tag == {words[k].l1, words[k].bc}, "tag");
      sel_hi = 0; #1 check(half == words[k].data[31:0], "low half");
      sel_hi = 1; #1 check(half == words[k].data[63:32], "high half");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
