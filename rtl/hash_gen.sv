// hash_gen: CRC-64 flow hash; prepends it to every packet record.
//
// The hash is computed only from the flow key: source and destination IP
// address, source and destination port, input interface and protocol, as in the
// original design. It is a CRC-64 whose register starts at the 64-bit init
// seed set by software (registers INITSEED1:INITSEED0). The polynomial
// (CRC-64/ECMA-182 by default, MSB first, no reflection, no final XOR) and the
// key bit order (the order of the list above, 112 bits) are this design's
// choice. All 112 key bits are folded in one cycle.
//
// Each incoming 4-word record (timestamp word + 3 packet words) leaves as a
// 5-word record whose new first word is the full 64-bit hash.
module hash_gen
  import nf_pkg::*;
#(
  parameter logic [63:0] CRC_POLY = CRC64_POLY
) (
  input  logic        clk,
  input  logic        rst_n,
  input  nf_word_t    in_word,
  input  logic        in_wr,
  output logic        in_rdy,
  output nf_word_t    out_word,
  output logic        out_wr,
  input  logic        out_rdy,
  input  logic [63:0] init_seed
);
  logic             rec_valid;
  logic [3:0][63:0] rec_words;
  logic [2:0]       rec_n;
  logic             ser_busy;
  logic             move;
  pkt_rec_t         pr;
  logic [63:0]      hash;

  assign move = rec_valid && !ser_busy;
  assign pr   = pr_unpack3(rec_words[1], rec_words[2], rec_words[3]);
  assign hash = crc64_key(init_seed, flow_key(pr), CRC_POLY);

  rec_deser #(.MAXW(4)) u_deser (
    .clk, .rst_n, .in_word, .in_wr, .in_rdy,
    .rec_valid, .rec_words, .rec_n, .rec_take(move)
  );

  rec_ser #(.MAXW(5)) u_ser (
    .clk, .rst_n,
    .load     (move),
    .ld_words ({rec_words, hash}),
    .ld_n     (rec_n + 3'd1),
    .busy     (ser_busy),
    .out_word, .out_wr, .out_rdy
  );
endmodule
