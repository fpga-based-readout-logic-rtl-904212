// alfa_m_word_select: 23-to-1 multiplexer, holding register and 64-to-32 bit
// multiplexer between the Alfa-M deserializers and the data packet builder.
//
// On a clock with load high the word of link sel is copied into the register.
// The register's 7 tag bits (L1 and BC tags) go to the builder for the event
// check, and its 64 data bits leave as one 32-bit half: bits 31..0 when
// sel_hi is 0, bits 63..32 when it is 1.  The structure follows the
// document's block diagram; one clock from load to valid output is this
// design's choice.  A sel beyond N_PMF-1 loads zeros.
module alfa_m_word_select
  import alfa_pkg::*;
#(
  parameter int N_PMF = 23
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  event_word_t [N_PMF-1:0]     words,
  input  logic [4:0]                  sel,
  input  logic                        load,
  input  logic                        sel_hi,
  output logic [TAG_W-1:0]            tag,
  output logic [31:0]                 half
);
  event_word_t held, muxed;

  always_comb begin
    muxed = '0;
    for (int i = 0; i < N_PMF; i++)
      if (sel == 5'(i)) muxed = words[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    held <= '0;
    else if (load) held <= muxed;
  end

  assign tag  = {held.l1, held.bc};
  assign half = sel_hi ? held.data[63:32] : held.data[31:0];

endmodule
