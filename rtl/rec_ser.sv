// rec_ser: sends a record of up to MAXW words as a word stream.
//
// When idle (busy low) a pulse on load copies ld_words / ld_n (1..MAXW words)
// into the send buffer. The words then leave one per cycle, word 0 first, each
// held on out_word with out_wr high until out_rdy takes it. Every word has
// ctrl = 0 except the last, which has CTRL_LAST. busy falls in the cycle after
// the last word is taken, so a new record can be loaded then.
// This helper and the record framing it produces are this design's own; the
// original only says the units talk over data, control, write and ready lines.
module rec_ser
  import nf_pkg::*;
#(
  parameter int unsigned MAXW = 5
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      load,
  input  logic [MAXW-1:0][63:0]     ld_words,
  input  logic [$clog2(MAXW+1)-1:0] ld_n,
  output logic                      busy,
  output nf_word_t                  out_word,
  output logic                      out_wr,
  input  logic                      out_rdy
);
  localparam int unsigned CW = $clog2(MAXW+1);

  logic [MAXW-1:0][63:0] buf_q;
  logic [CW-1:0]         n_q;
  logic [CW-1:0]         idx;

  assign out_wr        = busy;
  assign out_word.data = buf_q[idx];
  assign out_word.ctrl = (idx == n_q - 1'b1) ? CTRL_LAST : 8'h00;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      idx   <= '0;
      n_q   <= '0;
      buf_q <= '0;
    end else if (!busy) begin
      if (load) begin
        buf_q <= ld_words;
        n_q   <= ld_n;
        idx   <= '0;
        busy  <= 1'b1;
      end
    end else if (out_rdy) begin
      if (idx == n_q - 1'b1) begin
        busy <= 1'b0;
        idx  <= '0;
      end else begin
        idx <= idx + 1'b1;
      end
    end
  end

  // A load while busy would be lost.
  a_no_load_when_busy: assert property (@(posedge clk) disable iff (!rst_n) !(load && busy));
endmodule
