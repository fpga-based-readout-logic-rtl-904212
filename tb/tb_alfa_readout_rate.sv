// tb_alfa_readout_rate: the whole readout at its default sizes under the
// nominal trigger load: 300 L1 accepts with random spacing (geometric, mean
// 400 clocks = 100 kHz at 40 MHz, minimum 1 clock, so bursts occur).  Every
// output word is compared with the reference block; the testbench reports
// the deepest backlog of accepts waiting for readout and the longest time
// from an accept to the EOF word of its block, and checks that no event is
// lost or damaged and that the backlog stays far below the 256-slot buffers.
module tb_alfa_readout_rate;
  import alfa_pkg::*;
  import alfa_tb_pkg::*;
  localparam int N = 23, L = 256, N_EV = 300, MEAN_GAP = 400;
  logic clk = 0, rst_n = 0;
  logic [N-1:0][63:0] fe_data;
  maroc_cfg_t [N-1:0] fe_cfg;
  logic [N-1:0] pmf_test_mode, link_overrun;
  logic ttc_l1a = 0, gol_ready = 1;
  logic [11:0] ttc_bcid = '0;
  logic [23:0] ttc_evcnt = '0;
  logic [31:0] link_data;
  logic link_valid, cmd_out, m_test_mode, m_busy, m_timed_out;

  alfa_readout_top dut (
    .clk, .rst_n, .fe_data, .fe_cfg, .pmf_test_mode,
    .ttc_l1a, .ttc_bcid, .ttc_evcnt, .ttc_ready(1'b1), .qpll_error(1'b0), .qpll_lock(1'b1),
    .gol_ready, .link_data, .link_valid,
    .cmd_sel_n(1'b1), .cmd_clk(1'b0), .cmd_in(1'b0), .cmd_out,
    .m_test_mode, .m_busy, .m_timed_out, .link_overrun);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  always #12.5 clk = ~clk;

  int unsigned edge_idx = 0;
  always @(posedge clk) if (rst_n) edge_idx <= edge_idx + 1;
  bit accepted[int unsigned];
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) fe_data[i] = fe_pattern(i, edge_idx);
    if (ttc_l1a) ttc_evcnt = ttc_evcnt + 1;
    ttc_l1a = (edge_idx >= L) && accepted.exists(edge_idx - L);
    ttc_bcid = 12'(edge_idx - L);
  end

  logic [31:0] expq[$];
  int unsigned l1a_time[$];
  int n_words = 0, n_l1a = 0, n_blocks = 0, max_pending = 0, max_lat = 0, min_gap = 1 << 30;
  longint sum_lat = 0;
  int lat;
  always @(posedge clk) if (rst_n) begin
    if (ttc_l1a) begin n_l1a++; l1a_time.push_back(edge_idx); end
    if (n_l1a - n_blocks > max_pending) max_pending = n_l1a - n_blocks;
    if (link_valid && gol_ready) begin
      n_words++;
      if (expq.size() == 0) check(0, "unexpected word");
      else begin
        checks++;
        if (link_data != expq[0]) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d got %h expected %h", n_words, link_data, expq[0]);
        end
        void'(expq.pop_front());
      end
      if (link_data == EOF_WORD && l1a_time.size() > 0) begin
        lat = int'(edge_idx - l1a_time.pop_front());
        n_blocks++;
        sum_lat += lat;
        if (lat > max_lat) max_lat = lat;
      end
    end
  end

  initial begin
    #100ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned k, gap;
    data_arr_t d;
    logic [31:0] blk[$];
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    k = 10;
    for (int e = 0; e < N_EV; e++) begin
      gap = 1;
      while ($urandom_range(0, MEAN_GAP - 1) != 0) gap++;
      if (e > 0 && gap < min_gap) min_gap = gap;
      k += gap;
      d = new[N];
      for (int i = 0; i < N; i++) d[i] = fe_pattern(i, k);
      expected_block(blk, 12'(k), 24'(e), '0, d);
      foreach (blk[j]) expq.push_back(blk[j]);
      accepted[k] = 1;
    end
    wait (edge_idx > k + L + 10);
    wait (expq.size() == 0 && !m_busy);
    repeat (20) @(negedge clk);
    $display("accepts %0d over %0d clocks, shortest gap %0d, deepest backlog %0d, latency L1A->EOF mean %0d max %0d clocks",
             n_l1a, edge_idx, min_gap, max_pending, int'(sum_lat / (n_blocks > 0 ? n_blocks : 1)), max_lat);
    check(n_blocks == N_EV && n_words == N_EV * (7 + 2 * N), "every event read out");
    check(max_pending < 64, "backlog far below the 256-slot buffers");
    // one event needs at most ~200 clocks from request to EOF, and every
    // event already waiting ahead of it adds at most as much
    check(max_lat < 200 * max_pending + 200, "readout latency bounded by the backlog");
    check(!m_timed_out && link_overrun == '0, "no timeout, no overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
