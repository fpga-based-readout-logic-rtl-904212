// tb_spi_client: drives SPI frames from the master model into two clients,
// one at address 3 accepting broadcasts and one at address 0 that does not.
// Checks that writes reach only the addressed client (and PMF broadcasts only
// the PMF client) with the right offset and data, that exactly one write
// strobe is given per frame, and that reads return the register value MSB
// first on cmd_out with the output enable only on the addressed client.
module tb_spi_client;
  import alfa_pkg::*;
  logic clk = 0, rst_n = 0;
  spi_master_bfm #(.HALF_NS(100)) bus ();

  logic        out_a, en_a, wr_a, out_b, en_b, wr_b;
  logic [5:0]  woff_a, roff_a, woff_b, roff_b;
  logic [15:0] wdat_a, wdat_b, rdat_a, rdat_b;
  int checks = 0, failures = 0;
  int n_wr_a = 0, n_wr_b = 0;
  logic [5:0]  last_off_a, last_off_b;
  logic [15:0] last_dat_a, last_dat_b;

  spi_client #(.ACCEPT_BCAST(1'b1)) dut_a (
    .clk, .rst_n, .my_addr(5'd3),
    .cmd_sel_n(bus.cmd_sel_n), .cmd_clk(bus.cmd_clk), .cmd_in(bus.cmd_in),
    .cmd_out(out_a), .cmd_out_en(en_a),
    .wr_en(wr_a), .wr_offset(woff_a), .wr_data(wdat_a), .rd_offset(roff_a), .rd_data(rdat_a));
  spi_client #(.ACCEPT_BCAST(1'b0)) dut_b (
    .clk, .rst_n, .my_addr(5'd0),
    .cmd_sel_n(bus.cmd_sel_n), .cmd_clk(bus.cmd_clk), .cmd_in(bus.cmd_in),
    .cmd_out(out_b), .cmd_out_en(en_b),
    .wr_en(wr_b), .wr_offset(woff_b), .wr_data(wdat_b), .rd_offset(roff_b), .rd_data(rdat_b));

  // register contents seen by the clients: a function of the offset
  assign rdat_a = 16'hA500 ^ {10'b0, roff_a} ^ 16'h1234;
  assign rdat_b = 16'h5A00 ^ {roff_b, 10'b0};
  assign bus.cmd_out = (out_a & en_a) | (out_b & en_b);

  always #12.5 clk = ~clk;

  int en_both = 0;
  always @(posedge clk) if (rst_n) begin
    if (wr_a) begin n_wr_a++; last_off_a = woff_a; last_dat_a = wdat_a; end
    if (wr_b) begin n_wr_b++; last_off_b = woff_b; last_dat_b = wdat_b; end
    if (en_a && en_b) en_both++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] r;
    logic [15:0] d;
    logic [5:0]  o;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      d = 16'($urandom); o = 6'($urandom_range(0, 6));
      bus.write_reg(5'd3, o, d);
      check(n_wr_a == i + 1 && n_wr_b == 0, $sformatf("write to PMF 3 only %0d %0d", n_wr_a, n_wr_b));
      check(last_off_a == o && last_dat_a == d, "PMF write offset/data");
    end
    d = 16'hBEEF;
    bus.write_reg(5'd0, 6'd0, d);
    check(n_wr_a == 8 && n_wr_b == 1, "write to motherboard only");
    check(last_off_b == 6'd0 && last_dat_b == d, "motherboard write data");
    bus.write_reg(5'd31, 6'd5, 16'h0F0F);
    check(n_wr_a == 9 && n_wr_b == 1, "broadcast reaches PMF, not motherboard");
    check(last_off_a == 6'd5 && last_dat_a == 16'h0F0F, "broadcast data");
    bus.write_reg(5'd7, 6'd1, 16'hFFFF);
    check(n_wr_a == 9 && n_wr_b == 1, "other address ignored");
    for (int i = 0; i < 7; i++) begin
      bus.read_reg(5'd3, 6'(i), r);
      check(r == (16'hA500 ^ 16'(i) ^ 16'h1234), "read PMF register");
    end
    bus.read_reg(5'd0, 6'd1, r);
    check(r == (16'h5A00 ^ {6'd1, 10'b0}), "read motherboard register");
    bus.read_reg(5'd9, 6'd1, r);
    check(r == 16'h0, "nobody answers address 9");
    check(n_wr_a == 9 && n_wr_b == 1, "reads cause no writes");
    check(en_both == 0, "never two drivers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
