// alfa_r_serializer: parallel-to-serial output stage of the Alfa-R controller.
//
// Alfa-M asks for an event by raising data_req.  When the request is seen and
// the derandomizer holds an event, the oldest event is popped into a shift
// register and sent out MSB first, one bit per clock on ser_data, with
// data_ready high for exactly the WIDTH clocks that carry valid bits.  Then
// data_ready drops and the serializer waits for Alfa-M to drop data_req
// before it accepts the next request.  If data_req falls while data_ready is
// still high, the handshake was violated: tx_error is set and stays set until
// reset, and the transmission completes anyway so that the link stays in
// step.  This handshake and the MSB-first order follow the document; holding
// a request until an event is present, completing an interrupted transfer and
// keeping the error sticky are this design's choices.
//
// Timing: data_ready rises on the first clock edge after data_req is sampled
// high with an event available, then stays high for WIDTH clocks.
module alfa_r_serializer #(
  parameter int WIDTH = 71
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             data_req,
  input  logic             fifo_empty,
  input  logic [WIDTH-1:0] fifo_dout,
  output logic             fifo_rd,
  output logic             ser_data,
  output logic             data_ready,
  output logic             tx_error
);
  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_RELEASE} state_t;

  state_t                     state;
  logic [WIDTH-1:0]           shreg;
  logic [$clog2(WIDTH)-1:0]   bit_cnt;

  assign fifo_rd    = (state == S_IDLE) && data_req && !fifo_empty;
  assign ser_data   = (state == S_SHIFT) && shreg[WIDTH-1];
  assign data_ready = (state == S_SHIFT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      shreg    <= '0;
      bit_cnt  <= '0;
      tx_error <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (fifo_rd) begin
          shreg   <= fifo_dout;
          bit_cnt <= '0;
          state   <= S_SHIFT;
        end
        S_SHIFT: begin
          if (!data_req) tx_error <= 1'b1;
          shreg   <= {shreg[WIDTH-2:0], 1'b0};
          bit_cnt <= bit_cnt + 1'b1;
          if (bit_cnt == $bits(bit_cnt)'(WIDTH - 1)) state <= S_RELEASE;
        end
        S_RELEASE: if (!data_req) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
