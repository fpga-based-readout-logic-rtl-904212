// alfa_m_builder: controller engine and data packet builder of Alfa-M.
//
// For every entry in the L1 accept buffer it produces one data block in the
// output link buffer:
//   word 1            SOF     0xB0F00000
//   word 2            BCID    {20'b0, BCID[11:0]}      from the TTC
//   word 3            EVCNT   {8'b0, EVCNT[23:0]}      from the TTC
//   word 4            PMFERR  {7'b0, PMFERR[24:0]}     bit k-1 = PMF k
//   word 5            NPMF    {24'b0, N_PMF}
//   words 6..5+2N     PMFkL = data[31:0], PMFkH = data[63:32], k = 1..N
//   word 6+2N         PARITY  XOR of words 2 .. 5+2N
//   word 7+2N         EOF     0xE0F00000
// Sequence: pop the L1 accept entry, clear the deserializers and raise
// data_req (broadcast to all Alfa-R).  While the events are being shifted in,
// SOF, BCID and EVCNT are already written.  When every link has delivered its
// 71 bits and dropped Data_Ready, or DESER_TIMEOUT clocks after the request,
// data_req is dropped.  A first pass over the links through the word
// selector compares each fragment's L1 tag with EVCNT[2:0] and its BC tag with
// BCID[3:0]; a mismatch or a missing fragment sets that PMF's PMFERR bit.  A
// second pass copies the data halves out, then PARITY and EOF follow.  Every
// write waits while the output buffer is full.
//
// Follows the document: the block layout, the broadcast request, the header
// being prepared during deserialization, the tag check flagged in a header
// word, and PMFs multiplexed first to last.  This design's choices: PMFERR is
// written after the check (so SOF, BCID and EVCNT are the words prepared
// early), the timeout, the two passes, and the cycle counts (2 clocks per PMF
// for the check, 3 for the copy).
module alfa_m_builder
  import alfa_pkg::*;
#(
  parameter int N_PMF         = 23,
  parameter int DESER_TIMEOUT = 80
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // L1 accept buffer read side
  input  logic                 l1a_empty,
  input  l1a_entry_t           l1a_entry,
  output logic                 l1a_rd,
  // Alfa-R links
  output logic                 data_req,
  output logic                 deser_clear,
  input  logic [N_PMF-1:0]     link_done,
  input  logic [N_PMF-1:0]     link_busy,
  // word selector
  output logic [4:0]           sel,
  output logic                 sel_load,
  output logic                 sel_hi,
  input  logic [TAG_W-1:0]     sel_tag,
  input  logic [31:0]          sel_half,
  // output link buffer write side
  input  logic                 out_full,
  output logic                 out_wr,
  output logic [31:0]          out_data,
  // monitoring
  output logic                 busy,
  output logic                 timed_out
);
  typedef enum logic [3:0] {
    S_IDLE, S_SOF, S_BCID, S_EVCNT, S_WAIT, S_CHK_LOAD, S_CHK_CMP,
    S_PMFERR, S_NPMF, S_D_LOAD, S_D_LO, S_D_HI, S_PARITY, S_EOF
  } state_t;

  state_t               state;
  l1a_entry_t           ev;
  logic [4:0]           idx;
  logic [PMFERR_W-1:0]  pmferr;
  logic [31:0]          parity;
  logic [$clog2(DESER_TIMEOUT+1)-1:0] timer;
  logic                 is_write, all_in;
  logic [TAG_W-1:0]     expect_tag;

  assign expect_tag = {ev.evcnt[L1_TAG_W-1:0], ev.bcid[BC_TAG_W-1:0]};
  assign all_in     = (&link_done) && !(|link_busy);

  always_comb begin
    is_write = 1'b1;
    out_data = '0;
    unique case (state)
      S_SOF:    out_data = SOF_WORD;
      S_BCID:   out_data = 32'(ev.bcid);
      S_EVCNT:  out_data = 32'(ev.evcnt);
      S_PMFERR: out_data = 32'(pmferr);
      S_NPMF:   out_data = 32'(N_PMF);
      S_D_LO,
      S_D_HI:   out_data = sel_half;
      S_PARITY: out_data = parity;
      S_EOF:    out_data = EOF_WORD;
      default:  is_write = 1'b0;
    endcase
  end

  assign out_wr      = is_write && !out_full;
  assign l1a_rd      = (state == S_IDLE) && !l1a_empty;
  assign deser_clear = l1a_rd;
  assign sel         = idx;
  assign sel_load    = (state == S_CHK_LOAD) || (state == S_D_LOAD);
  assign sel_hi      = (state == S_D_HI);
  assign busy        = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      ev        <= '0;
      idx       <= '0;
      pmferr    <= '0;
      parity    <= '0;
      timer     <= '0;
      data_req  <= 1'b0;
      timed_out <= 1'b0;
    end else begin
      if (out_wr && state != S_SOF && state != S_PARITY && state != S_EOF)
        parity <= parity ^ out_data;
      unique case (state)
        S_IDLE: if (l1a_rd) begin
          ev        <= l1a_entry;
          data_req  <= 1'b1;
          timer     <= '0;
          parity    <= '0;
          pmferr    <= '0;
          timed_out <= 1'b0;
          state     <= S_SOF;
        end
        S_SOF, S_BCID, S_EVCNT: begin
          if (timer != $bits(timer)'(DESER_TIMEOUT)) timer <= timer + 1'b1;
          if (out_wr) state <= state_t'(state + 1'b1);
        end
        S_WAIT: begin
          if (timer != $bits(timer)'(DESER_TIMEOUT)) timer <= timer + 1'b1;
          if (all_in || timer == $bits(timer)'(DESER_TIMEOUT)) begin
            timed_out <= !all_in;
            data_req  <= 1'b0;
            idx       <= '0;
            state     <= S_CHK_LOAD;
          end
        end
        S_CHK_LOAD: state <= S_CHK_CMP;
        S_CHK_CMP: begin
          pmferr[idx] <= (sel_tag != expect_tag) || !link_done[idx];
          if (idx == 5'(N_PMF - 1)) begin
            state <= S_PMFERR;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_CHK_LOAD;
          end
        end
        S_PMFERR: if (out_wr) state <= S_NPMF;
        S_NPMF: if (out_wr) begin
          idx   <= '0;
          state <= S_D_LOAD;
        end
        S_D_LOAD: state <= S_D_LO;
        S_D_LO:   if (out_wr) state <= S_D_HI;
        S_D_HI:   if (out_wr) begin
          if (idx == 5'(N_PMF - 1)) begin
            state <= S_PARITY;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_D_LOAD;
          end
        end
        S_PARITY: if (out_wr) state <= S_EOF;
        S_EOF:    if (out_wr) state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  // The Data_Req handshake: the request is only withdrawn once every link has
  // finished, unless the timeout forces it.
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    $fell(data_req) |-> $past(all_in) || $past(timer) == $bits(timer)'(DESER_TIMEOUT));

endmodule
