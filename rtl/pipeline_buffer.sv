// pipeline_buffer: fixed-latency delay line of the Alfa-R controller.
//
// Every clock the masked front-end data, merged with the local bunch-crossing
// tag, is written in; the word written LATENCY clocks earlier is presented on
// dout in the same clock, which is the clock in which the first-level trigger
// decision for that bunch crossing reaches the controller.  The document gives
// the function (a pipeline sized for a trigger latency of up to 256 clocks,
// with the depth as a parameter); building it as a circular RAM with one
// pointer that is both write and read address is this design's choice.
//
// Timing: dout in clock cycle c equals din of cycle c - LATENCY.  dout is read
// combinationally from the RAM location that the current clock edge is about
// to overwrite.  Until LATENCY words have been written dout is undefined
// content; the memory is not reset.
module pipeline_buffer #(
  parameter int WIDTH   = 68,
  parameter int LATENCY = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  localparam int AW = (LATENCY > 1) ? $clog2(LATENCY) : 1;

  logic [WIDTH-1:0] mem [LATENCY];
  logic [AW-1:0]    ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            ptr <= '0;
    else if (ptr == AW'(LATENCY - 1))      ptr <= '0;
    else                                   ptr <= ptr + 1'b1;
  end

endmodule
