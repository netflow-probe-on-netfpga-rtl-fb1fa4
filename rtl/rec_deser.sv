// rec_deser: collects one record from a word stream into a word array.
//
// Words are taken one per cycle while the buffer is not full and stored in
// order; the record ends with the first word whose ctrl is non-zero (the
// CTRL_LAST marker) or when MAXW words have arrived. The record is then held on
// rec_words / rec_n with rec_valid high until the consumer pulses rec_take;
// no new word is taken while a record is held.
//
// Interface: stream input (in_word, in_wr, in_rdy), record output (rec_valid,
// rec_words[0..MAXW-1], rec_n = number of words, rec_take).
// Timing: a record of n words is available the cycle after its last word is
// taken; in_rdy returns the cycle after rec_take.
// This helper and the record framing it expects are this design's own; the
// original only says the units talk over data, control, write and ready lines.
module rec_deser
  import nf_pkg::*;
#(
  parameter int unsigned MAXW = 5
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  nf_word_t                 in_word,
  input  logic                     in_wr,
  output logic                     in_rdy,
  output logic                     rec_valid,
  output logic [MAXW-1:0][63:0]    rec_words,
  output logic [$clog2(MAXW+1)-1:0] rec_n,
  input  logic                     rec_take
);
  localparam int unsigned CW = $clog2(MAXW+1);

  logic [CW-1:0] cnt;

  assign in_rdy = !rec_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      rec_valid <= 1'b0;
      rec_n     <= '0;
      rec_words <= '0;
    end else begin
      if (rec_valid && rec_take) rec_valid <= 1'b0;
      if (in_wr && in_rdy) begin
        rec_words[cnt] <= in_word.data;
        if (in_word.ctrl != 8'h00 || cnt == CW'(MAXW - 1)) begin
          rec_valid <= 1'b1;
          rec_n     <= cnt + 1'b1;
          cnt       <= '0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
