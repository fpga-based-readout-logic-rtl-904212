// tb_alfa_r_regs: register-level test of the Alfa-R register file.  Checks
// the reset defaults, mask and stream read-back, the control flags mirrored
// in STATUS, the HOLD / MUX_CNT sequence over 64 MUX_CLOCK writes (HOLD low
// from the 1st to the 63rd, high again after the 64th), the mux clock pulse,
// the pulled-high GAIN/DAC ports while disabled and the TX_ERROR bit.
module tb_alfa_r_regs;
  import alfa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [5:0] wr_offset = '0, rd_offset = '0;
  logic [15:0] wr_data = '0, rd_data;
  logic tx_error = 0, test_mode;
  logic [63:0] mask;
  maroc_cfg_t cfg;
  int checks = 0, failures = 0, pulses = 0;

  alfa_r_regs dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) if (rst_n && cfg.mux_clk) pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic wr(input logic [5:0] o, input logic [15:0] d);
    @(negedge clk); wr_en = 1; wr_offset = o; wr_data = d;
    @(negedge clk); wr_en = 0;
  endtask

  logic [15:0] rv;
  task automatic rd(input logic [5:0] o);
    rd_offset = o;
    #1;
    rv = rd_data;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] s, m[4];
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    rd(R_STATUS); s = rv;
    check(s == 16'h1000, "status default: only MUX_HOLD set");
    check(mask == '1, "masks default to all channels on");
    check(cfg.gain_rst && cfg.gain_d && cfg.gain_clk && cfg.dac_rst && cfg.dac_d && cfg.dac_clk,
          "ports pulled high while disabled");
    for (int i = 0; i < 4; i++) begin
      m[i] = 16'($urandom);
      wr(6'(R_MASK1 + i), m[i]);
    end
    for (int i = 0; i < 4; i++) begin rd(6'(R_MASK1 + i)); check(rv == m[i], "mask read-back"); end
    check(mask == {m[3], m[2], m[1], m[0]}, "mask vector order");
    wr(R_STREAM, 16'hFFEA);
    rd(R_STREAM);
    check(rv == 16'h002A, "stream keeps 6 bits");
    check(cfg.gain_rst && cfg.gain_d && cfg.gain_clk, "gain still pulled high");
    wr(R_CONTROL, 16'h4000);
    rd(R_STATUS);
    check(rv[15:13] == 3'b010, "GAIN_ENABLE mirrored");
    // stream 101010: gain rst=1 d=0 clk=1, dac rst=0 d=1 clk=0
    check({cfg.gain_rst, cfg.gain_d, cfg.gain_clk} == 3'b101, "gain port follows stream");
    check({cfg.dac_rst, cfg.dac_d, cfg.dac_clk} == 3'b111, "dac still pulled high");
    wr(R_CONTROL, 16'h6000);
    check({cfg.dac_rst, cfg.dac_d, cfg.dac_clk} == 3'b010, "dac port follows stream");
    // the example sequence of the gain stream: 100, 000, 110, 111 on bits 5..3
    wr(R_STREAM, 16'b100_000); check({cfg.gain_rst, cfg.gain_d, cfg.gain_clk} == 3'b100, "slice 1");
    wr(R_STREAM, 16'b000_000); check({cfg.gain_rst, cfg.gain_d, cfg.gain_clk} == 3'b000, "slice 2");
    wr(R_STREAM, 16'b110_000); check({cfg.gain_rst, cfg.gain_d, cfg.gain_clk} == 3'b110, "slice 3");
    wr(R_STREAM, 16'b111_000); check({cfg.gain_rst, cfg.gain_d, cfg.gain_clk} == 3'b111, "slice 4");
    // charge multiplexer
    for (int n = 1; n <= 64; n++) begin
      wr(R_CONTROL, 16'h7000);
      rd(R_STATUS); s = rv;
      check(s[10:5] == 6'(n), "MUX_CNT counts writes");
      check(s[12] == (n == 64), "HOLD low from 1st to 63rd write, high after 64th");
      check(s[15:13] == 3'b011, "flags kept while stepping");
    end
    check(pulses == 64, "one mux clock pulse per MUX_CLOCK write");
    wr(R_CONTROL, 16'h8000);
    rd(R_STATUS); s = rv;
    check(s[15:13] == 3'b100 && test_mode, "TEST_MODE set, enables cleared");
    check(s[10:5] == 6'd0 && s[12], "no step without MUX_CLOCK");
    rd(R_CONTROL);
    check(rv == 16'h0, "control is write-only");
    tx_error = 1;
    rd(R_STATUS);
    check(rv[0], "TX_ERROR visible");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
