// tb_alfa_readout_top: end-to-end run of the whole Roman Pot readout at the
// default sizes: 23 Alfa-R controllers (256-clock pipeline, 256-slot
// derandomizers) and Alfa-M (256-slot L1 accept and output buffers).
//
// The testbench plays the front-end chips (a known data pattern per PMF and
// bunch crossing), the TTC (BCID = crossing number mod 4096, L1 accepts sent
// exactly 256 clocks after the accepted crossing, event count), the ELMB
// (SPI register traffic) and the optical link (fetching words, sometimes
// blocked).  Every word of every data block is compared with a block built
// from the pattern, the masks and the TTC values.  Mechanisms counted, each
// of which must occur: channel masking, SPI writes (addressed and broadcast)
// and reads, Maroc configuration lines and charge multiplexer stepping,
// back-to-back accepts queued in the derandomizers and the L1 accept buffer,
// a full output buffer stalling the builder, and a BC mismatch flagged in
// PMFERR (the TTC model sends a wrong BCID once).
module tb_alfa_readout_top;
  import alfa_pkg::*;
  import alfa_tb_pkg::*;
  localparam int N = 23, L = 256;
  logic clk = 0, rst_n = 0;
  logic [N-1:0][63:0] fe_data;
  maroc_cfg_t [N-1:0] fe_cfg;
  logic [N-1:0] pmf_test_mode, link_overrun;
  logic ttc_l1a = 0, ttc_ready = 1, qpll_error = 0, qpll_lock = 1, gol_ready = 1;
  logic [11:0] ttc_bcid = '0;
  logic [23:0] ttc_evcnt = '0;
  logic [31:0] link_data;
  logic link_valid, cmd_out, m_test_mode, m_busy, m_timed_out;
  spi_master_bfm #(.HALF_NS(100)) bus ();
  assign bus.cmd_out = cmd_out;

  alfa_readout_top dut (
    .clk, .rst_n, .fe_data, .fe_cfg, .pmf_test_mode,
    .ttc_l1a, .ttc_bcid, .ttc_evcnt, .ttc_ready, .qpll_error, .qpll_lock,
    .gol_ready, .link_data, .link_valid,
    .cmd_sel_n(bus.cmd_sel_n), .cmd_clk(bus.cmd_clk), .cmd_in(bus.cmd_in), .cmd_out,
    .m_test_mode, .m_busy, .m_timed_out, .link_overrun);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  always #12.5 clk = ~clk;

  // ---------------- front end and TTC
  int unsigned edge_idx = 0;
  always @(posedge clk) if (rst_n) edge_idx <= edge_idx + 1;
  bit accepted[int unsigned];
  bit bad_bcid[int unsigned];
  logic [N-1:0][63:0] mask;
  int n_masked = 0;
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) fe_data[i] = fe_pattern(i, edge_idx);
    if (ttc_l1a) ttc_evcnt = ttc_evcnt + 1;
    ttc_l1a = (edge_idx >= L) && accepted.exists(edge_idx - L);
    ttc_bcid = 12'(edge_idx - L) ^ ((ttc_l1a && bad_bcid.exists(edge_idx - L)) ? 12'h001 : 12'h000);
  end

  // ---------------- optical link and checking
  logic [31:0] expq[$];
  int n_words = 0, n_l1a = 0, n_req = 0, max_pending = 0, n_req_blocked = 0;
  // each event processed by Alfa-M is one rising edge of m_busy
  logic busy_d = 0;
  always @(posedge clk) if (rst_n) begin
    busy_d <= m_busy;
    if (ttc_l1a) n_l1a++;
    if (m_busy && !busy_d) begin n_req++; if (!gol_ready) n_req_blocked++; end
    if (n_l1a - n_req > max_pending) max_pending = n_l1a - n_req;
    if (link_valid && gol_ready) begin
      n_words++;
      if (expq.size() == 0) check(0, "unexpected word");
      else begin
        checks++;
        if (link_data != expq[0]) begin
          failures++;
          $display("FAIL word %0d got %h expected %h", n_words, link_data, expq[0]);
        end
        void'(expq.pop_front());
      end
    end
  end

  // schedule an accept of crossing k and queue its expected block
  int n_events = 0, n_mismatch = 0;
  task automatic plan(input int unsigned k, input bit corrupt);
    data_arr_t d = new[N];
    logic [31:0] blk[$];
    logic [24:0] err = '0;
    for (int i = 0; i < N; i++) begin
      d[i] = fe_pattern(i, k) & mask[i];
      if (d[i] != fe_pattern(i, k)) n_masked++;
    end
    if (corrupt) begin err[N-1:0] = '1; bad_bcid[k] = 1; n_mismatch++; end
    expected_block(blk, 12'(k) ^ (corrupt ? 12'h001 : 12'h000), 24'(n_events), err, d);
    foreach (blk[j]) expq.push_back(blk[j]);
    accepted[k] = 1;
    n_events++;
  endtask

  initial begin
    #40ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] r;
    int unsigned base;
    int n_spi_wr = 0, n_spi_rd = 0, n_cfg = 0, n_hold = 0;
    for (int i = 0; i < N; i++) mask[i] = '1;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // ---------------- configuration
    bus.read_reg(5'd0, M_STATUS, r); n_spi_rd++;
    check(r == 16'h6800, "Alfa-M status");
    foreach (mask[i]) if (i == 0 || i == 11 || i == 22) begin
      for (int m = 0; m < 4; m++) begin
        r = 16'($urandom);
        mask[i][16*m +: 16] = r;
        bus.write_reg(5'(i + 1), 6'(R_MASK1 + m), r); n_spi_wr++;
      end
    end
    bus.read_reg(5'd12, R_MASK2, r); n_spi_rd++;
    check(r == mask[11][31:16], "PMF 12 mask read back");
    bus.read_reg(5'd2, R_MASK2, r); n_spi_rd++;
    check(r == 16'hFFFF, "PMF 2 mask untouched");
    bus.write_reg(5'd31, R_CONTROL, 16'h6000); n_spi_wr++;
    bus.write_reg(5'd31, R_STREAM, 16'b100_110); n_spi_wr++;
    for (int i = 0; i < N; i++)
      if ({fe_cfg[i].gain_rst, fe_cfg[i].gain_d, fe_cfg[i].gain_clk,
           fe_cfg[i].dac_rst, fe_cfg[i].dac_d, fe_cfg[i].dac_clk} == 6'b100110) n_cfg++;
    check(n_cfg == N, "broadcast stream reaches every PMF's configuration lines");
    bus.write_reg(5'd7, R_CONTROL, 16'h7000); n_spi_wr++;
    bus.read_reg(5'd7, R_STATUS, r); n_spi_rd++;
    check(r == 16'h6020, "PMF 7 multiplexer stepped once");
    for (int i = 0; i < N; i++) if (!fe_cfg[i].mux_hold) n_hold++;
    check(n_hold == 1, "only PMF 7 has HOLD low");
    bus.read_reg(5'd23, R_STATUS, r); n_spi_rd++;
    check(r == 16'h7000, "PMF 23 status after broadcast control write");
    // ---------------- events: single, back-to-back, spaced
    base = edge_idx + 10;
    plan(base, 0);
    plan(base + 1, 0);
    plan(base + 2, 0);
    plan(base + 3, 1);
    plan(base + 50, 0);
    plan(base + 400, 0);
    wait (edge_idx > base + 400 + L + 10);
    wait (expq.size() == 0 && !m_busy);
    // ---------------- link blocked: output buffer fills, builder stalls
    @(negedge clk) gol_ready = 0;
    base = edge_idx + 10;
    for (int e = 0; e < 8; e++) plan(base + 7 * e, 0);
    wait (edge_idx > base + 49 + L + 2000);
    @(negedge clk) gol_ready = 1;
    wait (expq.size() == 0 && !m_busy);
    repeat (20) @(negedge clk);
    // ---------------- mechanisms
    $display("events %0d words %0d masked fragments %0d mismatches %0d max pending %0d requests while blocked %0d spi wr %0d rd %0d",
             n_events, n_words, n_masked, n_mismatch, max_pending, n_req_blocked, n_spi_wr, n_spi_rd);
    check(n_words == n_events * (7 + 2 * N), "every block delivered");
    check(n_masked > 0, "masking happened");
    check(n_mismatch > 0, "tag mismatch flagged");
    check(max_pending >= 3, "accepts queued in derandomizers and L1 accept buffer");
    check(n_req_blocked >= 4 && n_req_blocked < 8, "full output buffer stalled the builder");
    check(n_spi_wr > 0 && n_spi_rd > 0, "SPI writes and reads");
    check(!m_timed_out && link_overrun == '0, "no timeout, no overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
