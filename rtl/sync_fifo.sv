// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used three times in the readout chain: as the Alfa-R derandomizer (71 bit x
// 256), which holds accepted events until Alfa-M asks for them; as the Alfa-M
// L1 accept buffer (256 slots), which queues TTC decisions while an earlier
// event is still being read out; and as the Alfa-M output link buffer
// (32 bit x 256), from which the optical link serializer fetches words.
// Widths and depths are parameters; the defaults are the derandomizer's.
//
// Interface: din is stored on a clock edge with wr_en high and the FIFO not
// full; dout always shows the oldest word while empty is low, and rd_en
// removes it on the clock edge.  A write into a full FIFO is dropped and a
// read from an empty one is ignored (the document says nothing about
// overflow; these are this design's choices).  count gives the fill level.
// DEPTH must be a power of two.
module sync_fifo #(
  parameter int WIDTH = 71,
  parameter int DEPTH = 256
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           din,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH):0]     count
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign empty = (wr_ptr == rd_ptr);
  assign full  = (wr_ptr[AW] != rd_ptr[AW]) && (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]);
  assign count = wr_ptr - rd_ptr;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign dout  = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
    end
  end


endmodule
