// input_arbiter: merges the packets of NUM_IN input queues into one stream.
//
// The arbiter serves one whole packet at a time. When idle it grants, in
// round-robin order starting after the last served input, the first input whose
// write strobe is high; the grant takes one cycle. While granted, the chosen
// input is wired straight to the output (word, write and ready) until the end
// of its packet passes: the first word with ctrl != 0 after a ctrl = 0 word.
// The original design only names this unit (it belongs to the NetFPGA
// reference pipeline); round robin per packet is this design's choice.
//
// Interface: NUM_IN stream inputs as packed arrays, one stream output.
// Timing: one idle cycle between packets, then one word per cycle.
module input_arbiter
  import nf_pkg::*;
#(
  parameter int unsigned NUM_IN = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  nf_word_t [NUM_IN-1:0] in_word,
  input  logic     [NUM_IN-1:0] in_wr,
  output logic     [NUM_IN-1:0] in_rdy,
  output nf_word_t              out_word,
  output logic                  out_wr,
  input  logic                  out_rdy
);
  localparam int unsigned SW = (NUM_IN > 1) ? $clog2(NUM_IN) : 1;

  logic          locked;
  logic [SW-1:0] sel;
  logic [SW-1:0] last;
  logic          in_payload;
  logic          found;
  logic [SW-1:0] next_sel;

  // Round-robin search for the next requesting input.
  always_comb begin
    found    = 1'b0;
    next_sel = last;
    for (int k = 1; k <= int'(NUM_IN); k++) begin
      automatic int unsigned cand = (int'(last) + k) % NUM_IN;
      if (!found && in_wr[cand]) begin
        found    = 1'b1;
        next_sel = SW'(cand);
      end
    end
  end

  always_comb begin
    in_rdy   = '0;
    out_word = in_word[sel];
    out_wr   = locked && in_wr[sel];
    if (locked) in_rdy[sel] = out_rdy;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      locked     <= 1'b0;
      sel        <= '0;
      last       <= SW'(NUM_IN - 1);
      in_payload <= 1'b0;
    end else if (!locked) begin
      if (found) begin
        locked <= 1'b1;
        sel    <= next_sel;
      end
    end else if (out_wr && out_rdy) begin
      if (out_word.ctrl == 8'h00) begin
        in_payload <= 1'b1;
      end else if (in_payload) begin
        locked     <= 1'b0;
        in_payload <= 1'b0;
        last       <= sel;
      end
    end
  end
endmodule
