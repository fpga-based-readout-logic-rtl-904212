// tb_alfa_r: one Alfa-R controller at its default sizes (256-clock pipeline,
// 256-slot derandomizer), configured over SPI.  The testbench drives a known
// front-end pattern, issues L1 accepts exactly PIPE_LATENCY clocks after
// chosen bunch crossings (some back to back, so several events wait in the
// derandomizer), plays the Alfa-M side of the serial handshake and checks
// every received event: {L1 tag, BC tag, masked data}.  It also checks SPI
// read-back, the Maroc configuration lines, the 71-clock Data_Ready window,
// and that an early Data_Req drop shows up as TX_ERROR in STATUS.
module tb_alfa_r;
  import alfa_pkg::*;
  import alfa_tb_pkg::*;
  localparam int L = 256;
  localparam logic [4:0] ADDR = 5'd4;
  logic clk = 0, rst_n = 0;
  logic [63:0] fe_data = '0;
  logic l1a = 0, data_req = 0, ser_data, data_ready, test_mode, cmd_out, cmd_out_en;
  maroc_cfg_t cfg;
  spi_master_bfm #(.HALF_NS(100)) bus ();
  assign bus.cmd_out = cmd_out & cmd_out_en;

  alfa_r dut (
    .clk, .rst_n, .my_addr(ADDR), .fe_data, .cfg, .test_mode, .l1a,
    .data_req, .ser_data, .data_ready,
    .cmd_sel_n(bus.cmd_sel_n), .cmd_clk(bus.cmd_clk), .cmd_in(bus.cmd_in),
    .cmd_out, .cmd_out_en);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  always #12.5 clk = ~clk;

  // bunch-crossing index of the next clock edge
  int unsigned edge_idx = 0;
  always @(posedge clk) if (rst_n) edge_idx <= edge_idx + 1;
  bit accepted[int unsigned];
  logic [63:0] mask = '1;
  always @(negedge clk) if (rst_n) begin
    fe_data = fe_pattern(0, edge_idx);
    l1a = (edge_idx >= L) && accepted.exists(edge_idx - L);
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fetch(output logic [70:0] w, output int nbits, input int early_drop);
    int guard;
    @(negedge clk) data_req = 1;
    guard = 0;
    while (!data_ready && guard < 100) begin @(negedge clk); guard++; end
    nbits = 0; w = '0;
    while (data_ready) begin
      w = {w[69:0], ser_data}; nbits++;
      if (early_drop > 0 && nbits == early_drop) data_req = 0;
      @(negedge clk);
    end
    data_req = 0;
    @(negedge clk);
  endtask

  initial begin
    logic [15:0] r;
    logic [70:0] w;
    int nb, k;
    int unsigned base;
    int unsigned crossings[$];
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // --- configuration over SPI
    bus.read_reg(ADDR, R_STATUS, r);
    check(r == 16'h1000, "status after reset");
    for (int i = 0; i < 4; i++) begin
      r = 16'($urandom);
      mask[16*i +: 16] = r;
      bus.write_reg(ADDR, 6'(R_MASK1 + i), r);
    end
    bus.read_reg(ADDR, R_MASK3, r);
    check(r == mask[47:32], "mask 3 read back over SPI");
    bus.write_reg(5'd9, R_MASK1, 16'h0000);   // another PMF: no effect
    bus.read_reg(ADDR, R_MASK1, r);
    check(r == mask[15:0], "write to other address ignored");
    bus.write_reg(ADDR, R_CONTROL, 16'h6000);
    bus.write_reg(5'd31, R_STREAM, 16'b101_011);   // broadcast
    check({cfg.gain_rst, cfg.gain_d, cfg.gain_clk, cfg.dac_rst, cfg.dac_d, cfg.dac_clk} == 6'b101011,
          "configuration lines follow broadcast stream write");
    bus.write_reg(ADDR, R_CONTROL, 16'h7000);
    bus.read_reg(ADDR, R_STATUS, r);
    check(r == 16'h6020, "GAIN/DAC enabled, HOLD low, MUX_CNT 1");
    check(!cfg.mux_hold, "hold line low");
    // --- events
    base = edge_idx + 20;
    crossings = {base, base + 1, base + 2, base + 37, base + 120, base + 121, base + 300};
    foreach (crossings[i]) accepted[crossings[i]] = 1;
    wait (edge_idx > crossings[$] + L + 2);
    k = 0;
    foreach (crossings[i]) begin
      fetch(w, nb, 0);
      check(nb == 71, "71 valid bits");
      check(w[70:68] == 3'(i), "L1 tag counts accepts");
      check(w[67:64] == 4'(crossings[i] % 16), "BC tag of the accepted crossing");
      check(w[63:0] == (fe_pattern(0, crossings[i]) & mask), "masked data of the accepted crossing");
    end
    bus.read_reg(ADDR, R_STATUS, r);
    check(r[0] == 1'b0, "no transmission error yet");
    // --- handshake violation
    accepted[edge_idx + 5] = 1;
    wait (edge_idx > crossings[$] + L + 10);
    repeat (L + 10) @(negedge clk);
    fetch(w, nb, 30);
    check(nb == 71, "transfer completes after early drop");
    bus.read_reg(ADDR, R_STATUS, r);
    check(r[0] == 1'b1, "TX_ERROR reported in STATUS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
