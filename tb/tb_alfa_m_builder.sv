// tb_alfa_m_builder: the packet builder with testbench models around it: an
// L1 accept queue, 23 serial links that deliver their fragments a random
// number of clocks after Data_Req, a word selector, and an output buffer of
// only 16 words that is drained at random.  Each produced block is compared
// with the reference model.  Covered: clean events, tag mismatches on chosen
// PMFs, a link that never answers (timeout, its PMFERR bit set, Data_Req
// dropped after DESER_TIMEOUT clocks), Data_Req held until every link is
// done, and stalls on a full output buffer.
module tb_alfa_m_builder;
  import alfa_pkg::*;
  import alfa_tb_pkg::*;
  localparam int N = 23, TMO = 80, CAP = 16;
  logic clk = 0, rst_n = 0;

  logic l1a_empty, l1a_rd, data_req, deser_clear, sel_load, sel_hi, out_full, out_wr, busy, timed_out;
  l1a_entry_t l1a_entry;
  logic [N-1:0] link_done, link_busy;
  logic [4:0] sel;
  logic [6:0] sel_tag;
  logic [31:0] sel_half, out_data;

  alfa_m_builder #(.N_PMF(N), .DESER_TIMEOUT(TMO)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  always #5 clk = ~clk;

  // L1 accept queue
  l1a_entry_t l1q[$];
  assign l1a_empty = (l1q.size() == 0);
  assign l1a_entry = l1a_empty ? '0 : l1q[0];

  // per-event link data chosen by the stimulus
  event_word_t cur_words[N];
  int          delay[N];         // clocks from request to start, -1 = never
  event_word_t held;
  assign sel_tag  = {held.l1, held.bc};
  assign sel_half = sel_hi ? held.data[63:32] : held.data[31:0];

  // output buffer model
  logic [31:0] outq[$];
  assign out_full = (outq.size() >= CAP);
  int stall_cycles = 0, req_cycles = 0, pops_pending = 0;
  bit drain_en = 1;
  int drain_pct = 75;

  int req_age;
  logic pop_l1 = 0;
  always @(posedge clk) if (rst_n) begin
    pop_l1 <= l1a_rd;
    if (sel_load) held <= cur_words[sel];
    if (out_wr) outq.push_back(out_data);
    if (busy && out_full) stall_cycles++;
    if (data_req) req_age <= req_age + 1; else req_age <= 0;
  end
  always @(negedge clk) begin
    if (pop_l1) void'(l1q.pop_front());
  end
  // link timing: link i busy from delay[i]+1 to delay[i]+71 after request
  always_comb begin
    for (int i = 0; i < N; i++) begin
      link_busy[i] = data_req && delay[i] >= 0 && req_age > delay[i] && req_age <= delay[i] + 71;
    end
  end
  logic [N-1:0] done_r;
  always @(posedge clk) begin
    if (deser_clear) done_r <= '0;
    else for (int i = 0; i < N; i++) if (link_busy[i] && req_age == delay[i] + 71) done_r[i] <= 1'b1;
  end
  assign link_done = done_r;

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drain
  logic [31:0] got[$];
  always @(negedge clk) if (rst_n && drain_en && outq.size() > 0 && $urandom_range(0, 99) < drain_pct) got.push_back(outq.pop_front());

  task automatic run_event(input int kind);
    // kind 0: clean, 1: tag mismatch on PMFs 2 and 17, 2: PMF 5 silent
    l1a_entry_t e;
    logic [24:0] err;
    data_arr_t d;
    logic [31:0] blk[$];
    int t0, drop_age;
    e.bcid = 12'($urandom); e.evcnt = 24'($urandom);
    err = '0;
    d = new[N];
    for (int i = 0; i < N; i++) begin
      cur_words[i].data = {$urandom, $urandom};
      cur_words[i].l1 = e.evcnt[2:0];
      cur_words[i].bc = e.bcid[3:0];
      delay[i] = $urandom_range(0, 5);
      d[i] = cur_words[i].data;
    end
    if (kind == 1) begin
      cur_words[2].bc = cur_words[2].bc + 1;  err[2] = 1;
      cur_words[17].l1 = cur_words[17].l1 ^ 3'b100; err[17] = 1;
    end
    if (kind == 2) begin delay[5] = -1; err[5] = 1; end
    expected_block(blk, e.bcid, e.evcnt, err, d);
    got = {};
    @(negedge clk) l1q.push_back(e);
    t0 = 0; drop_age = -1;
    while (got.size() < blk.size() && t0 < 5000) begin
      @(posedge clk);
      if (data_req) drop_age = req_age;
      t0++;
    end
    check(got.size() == blk.size(), "block length 7 + 2*NPMF");
    for (int k = 0; k < blk.size() && k < got.size(); k++)
      if (got[k] != blk[k]) begin
        check(0, $sformatf("word %0d got %h expected %h", k, got[k], blk[k]));
      end
    checks++;
    if (kind == 2) begin
      check(timed_out, "timeout flagged");
      check(drop_age == TMO, $sformatf("Data_Req dropped after timeout (age %0d)", drop_age));
    end else begin
      check(!timed_out, "no timeout");
      begin
        int last = 0;
        for (int i = 0; i < N; i++) if (delay[i] + 71 > last) last = delay[i] + 71;
        check(drop_age >= last, "Data_Req held until every link finished");
        check(drop_age <= last + 3, "Data_Req dropped soon after the last link");
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 12; i++) begin
      drain_pct = (i >= 6) ? 20 : 75;
      run_event(i % 3);
    end
    check(stall_cycles > 0, "output buffer full stall happened");
    $display("stall cycles %0d", stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
