// spi_master_bfm: bus-functional model of the ELMB acting as SPI master.
//
// xfer() sends one 32-bit frame MSB first: cmd_sel_n low, then for each bit
// cmd_in is set while cmd_clk is low and cmd_clk is raised for HALF_NS.
// During the last 16 strobes cmd_out is sampled at each rising cmd_clk edge
// and returned as rdata (meaningful for read frames).
interface spi_master_bfm #(parameter int HALF_NS = 100);
  logic cmd_sel_n = 1'b1;
  logic cmd_clk   = 1'b0;
  logic cmd_in    = 1'b0;
  logic cmd_out;

  task automatic xfer(input logic [31:0] frame, input bit is_read, output logic [15:0] rdata);
    rdata = '0;
    cmd_sel_n = 1'b0;
    #(HALF_NS);
    for (int b = 31; b >= 0; b--) begin
      cmd_in = (is_read && b < 16) ? 1'b0 : frame[b];
      #(HALF_NS);
      cmd_clk = 1'b1;
      if (b < 16) rdata[b] = cmd_out;
      #(HALF_NS);
      cmd_clk = 1'b0;
    end
    #(HALF_NS);
    cmd_sel_n = 1'b1;
    cmd_in = 1'b0;
    #(2 * HALF_NS);
  endtask

  task automatic write_reg(input logic [4:0] addr, input logic [5:0] offset, input logic [15:0] data);
    logic [15:0] dummy;
    xfer({addr, 1'b1, offset, 4'b0, data}, 1'b0, dummy);
  endtask

  task automatic read_reg(input logic [4:0] addr, input logic [5:0] offset, output logic [15:0] data);
    xfer({addr, 1'b0, offset, 4'b0, 16'h0}, 1'b1, data);
  endtask
endinterface
