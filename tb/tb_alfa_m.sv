// tb_alfa_m: the Alfa-M controller at its default sizes with 23 behavioural
// Alfa-R link models.  Each Data_Req is answered, one clock later, with the
// prepared 71-bit fragment of every PMF, MSB first under Data_Ready.  L1
// accepts come in bursts, so several wait in the L1 accept buffer; the
// optical link is held busy long enough for the output buffer to fill and
// stall the builder.  Every word leaving the link is compared with the
// reference block.  Also covered: a tag mismatch, a silent PMF (timeout), and
// the CONTROL / STATUS registers over SPI.
module tb_alfa_m;
  import alfa_pkg::*;
  import alfa_tb_pkg::*;
  localparam int N = 23;
  logic clk = 0, rst_n = 0;
  logic ttc_l1a = 0, ttc_ready = 1, qpll_error = 0, qpll_lock = 1, gol_ready = 0;
  logic [11:0] ttc_bcid = '0;
  logic [23:0] ttc_evcnt = '0;
  logic data_req, link_valid, test_mode, busy, timed_out, cmd_out, cmd_out_en;
  logic [N-1:0] ser_data, data_ready, link_overrun;
  logic [31:0] link_data;
  spi_master_bfm #(.HALF_NS(100)) bus ();
  assign bus.cmd_out = cmd_out & cmd_out_en;

  alfa_m dut (
    .clk, .rst_n, .ttc_l1a, .ttc_bcid, .ttc_evcnt, .ttc_ready, .qpll_error, .qpll_lock,
    .data_req, .ser_data, .data_ready, .gol_ready, .link_data, .link_valid,
    .cmd_sel_n(bus.cmd_sel_n), .cmd_clk(bus.cmd_clk), .cmd_in(bus.cmd_in),
    .cmd_out, .cmd_out_en, .test_mode, .busy, .timed_out, .link_overrun);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  always #12.5 clk = ~clk;

  // per-event fragments, in L1 accept order
  typedef struct { logic [70:0] w[N]; bit silent[N]; } ev_frag_t;
  ev_frag_t frags[$];
  logic [31:0] expq[$];
  int n_l1a = 0, n_req = 0, n_req_blocked = 0;
  int n_events_sent = 0, n_words = 0, n_timeouts = 0, max_l1a_q = 0;

  // link models
  logic req_d = 0;
  int   bitpos = -1;
  ev_frag_t cur;
  always @(posedge clk) begin
    req_d <= data_req;
    if (data_req && !req_d && rst_n) begin
      cur = frags.pop_front();
      bitpos <= 70;
    end else if (bitpos >= 0) bitpos <= bitpos - 1;
  end
  always_comb for (int i = 0; i < N; i++) begin
    data_ready[i] = (bitpos >= 0) && !cur.silent[i];
    ser_data[i]   = (bitpos >= 0) && cur.w[i][bitpos < 0 ? 0 : bitpos];
  end

  // optical link side
  always @(posedge clk) if (rst_n) begin
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
    // accepts not yet requested = entries waiting in the L1 accept buffer
    if (n_l1a - n_req > max_l1a_q) max_l1a_q = n_l1a - n_req;
    if (ttc_l1a) n_l1a++;
    if (data_req && !req_d) begin
      n_req++;
      if (!gol_ready) n_req_blocked++;
    end
    if (timed_out && !$past(timed_out)) n_timeouts++;
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // issue one L1 accept with its fragments; kind 1: PMF 7 BC tag wrong,
  // kind 2: PMF 12 silent (its data words read as zero)
  task automatic accept(input int kind);
    ev_frag_t f;
    logic [24:0] err = '0;
    data_arr_t d = new[N];
    logic [31:0] blk[$];
    logic [11:0] b = 12'($urandom);
    for (int i = 0; i < N; i++) begin
      d[i] = {$urandom, $urandom};
      f.w[i] = {ttc_evcnt[2:0], b[3:0], d[i]};
      f.silent[i] = 0;
    end
    if (kind == 1) begin f.w[7][67:64] = ~b[3:0]; err[7] = 1; end
    if (kind == 2) begin f.silent[12] = 1; err[12] = 1; d[12] = '0; end
    expected_block(blk, b, ttc_evcnt, err, d);
    foreach (blk[k]) expq.push_back(blk[k]);
    frags.push_back(f);
    @(negedge clk) ttc_l1a = 1; ttc_bcid = b;
    @(negedge clk) ttc_l1a = 0; ttc_evcnt = ttc_evcnt + 1;
    n_events_sent++;
  endtask

  initial begin
    logic [15:0] r;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    gol_ready = 1;
    bus.read_reg(5'd0, M_STATUS, r);
    check(r == 16'h6800, "status: GOL ready, TTC ready, QPLL locked");
    qpll_error = 1; qpll_lock = 0; ttc_ready = 0;
    bus.read_reg(5'd0, M_STATUS, r);
    check(r == 16'h5000, "status: QPLL error, not locked, TTC not ready");
    qpll_error = 0; qpll_lock = 1; ttc_ready = 1;
    bus.write_reg(5'd0, M_CONTROL, 16'h8000);
    bus.read_reg(5'd0, M_STATUS, r);
    check(r == 16'hE800 && test_mode, "TEST_MODE set");
    bus.write_reg(5'd31, M_CONTROL, 16'h0000);
    check(test_mode, "PMF broadcast does not reach Alfa-M");
    bus.write_reg(5'd0, M_CONTROL, 16'h0000);
    // single clean event
    accept(0);
    wait (expq.size() == 0);
    // burst of accepts with the link blocked: L1 accept buffer and output buffer fill
    gol_ready = 0;
    for (int e = 0; e < 8; e++) accept(e == 3 ? 1 : 0);
    repeat (3000) @(negedge clk);
    gol_ready = 1;
    wait (expq.size() == 0);
    // a silent PMF
    accept(2);
    accept(0);
    wait (expq.size() == 0 && !busy);
    repeat (20) @(negedge clk);
    check(n_words == 11 * (7 + 2 * N), "all blocks delivered");
    check(max_l1a_q >= 4, "several L1 accepts queued");
    // 8 blocks of 53 words do not fit the 256-word buffer: the builder
    // must have stopped taking events while the link was blocked
    check(n_req_blocked < 8 && n_req_blocked >= 4, "builder stalled on a full output buffer");
    check(n_timeouts == 1, "one timeout");
    check(link_overrun == '0, "no overrun");
    $display("max L1A queue %0d, requests while link blocked %0d", max_l1a_q, n_req_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
