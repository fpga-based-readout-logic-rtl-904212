// alfa_m_deserializer: input shift register of one Alfa-R serial link.
//
// While data_ready is high, ser_data is shifted in at the LSB end on every
// clock, so a word sent MSB first ends up in its original bit order.  A bit
// counter tells when WIDTH bits have arrived (done).  clear zeroes the word and
// the counter before the next event is requested, so a link that stays silent
// delivers an all-zero word; a received word stays readable until then.
// Bits beyond WIDTH in one event are ignored and flagged on overrun.  The
// document gives the function (one input shift register per link, 71-bit
// words); the counter, clear and overrun flag are this design's choices.
module alfa_m_deserializer #(
  parameter int WIDTH = 71
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             ser_data,
  input  logic             data_ready,
  output logic [WIDTH-1:0] word,
  output logic             done,
  output logic             overrun
);
  logic [$clog2(WIDTH+1)-1:0] cnt;

  assign done = (cnt == $bits(cnt)'(WIDTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word    <= '0;
      cnt     <= '0;
      overrun <= 1'b0;
    end else if (clear) begin
      word    <= '0;
      cnt     <= '0;
      overrun <= 1'b0;
    end else if (data_ready) begin
      if (done) begin
        overrun <= 1'b1;
      end else begin
        word <= {word[WIDTH-2:0], ser_data};
        cnt  <= cnt + 1'b1;
      end
    end
  end

endmodule
