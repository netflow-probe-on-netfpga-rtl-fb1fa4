// l3l4_extract: L3/L4 header parser, builds the packet record.
//
// Input: NetFPGA packets: a module header word (ctrl = 0xff) carrying the
// input port in [31:16] and the frame length in bytes in [15:0], then the
// Ethernet frame (no preamble, no FCS), 8 bytes per word, ending with a word
// whose ctrl is non-zero. Output: one 3-word packet record per accepted packet
// (layout in nf_pkg). Packets that are not TCP/IPv4, UDP/IPv4 or ICMP, and the
// payload of every packet, are dropped. These rules are the original design's.
//
// As in the original, two processes work independently. The capture process
// takes one word per cycle, keeps the first HDR_WORDS frame words and, at the
// last word of the packet, decodes them into a record held in a pending
// register. The output process moves the pending record into a serializer that
// sends it while the next packet is being captured. The capture process stalls
// only while a finished record waits for the serializer to become free.
//
// Decoding (this design's choices where the original is silent): EtherType
// 0x0800, IP version 4, IHL >= 5, protocol 1, 6 or 17, and a frame long enough
// to hold the fields read. L4 fields are found at byte 14 + 4*IHL. ICMP puts
// type*256+code in DstPort and 0 in SrcPort; non-first fragments get zero ports.
// dOctets is the frame length from the module header. input is the low 8 bits
// of the input port. The counters count every packet and every accepted one.
module l3l4_extract
  import nf_pkg::*;
#(
  parameter int unsigned HDR_WORDS = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  nf_word_t    in_word,
  input  logic        in_wr,
  output logic        in_rdy,
  output nf_word_t    out_word,
  output logic        out_wr,
  input  logic        out_rdy,
  output logic [31:0] total_packets,
  output logic [31:0] accepted_packets
);
  localparam int unsigned HB = HDR_WORDS * 8;

  logic [HDR_WORDS-1:0][63:0] hdr;
  logic [7:0]                 word_idx;
  logic                       in_frame;
  logic [15:0]                in_port;
  logic [15:0]                byte_len;

  logic                       pend;
  pkt_rec_t                   pend_rec;
  logic                       ser_busy;

  logic                       take;
  logic                       is_last;
  logic [HDR_WORDS-1:0][63:0] hdr_now;  // header words including this word

  assign in_rdy  = !pend || !ser_busy;
  assign take    = in_wr && in_rdy;
  assign is_last = in_frame && in_word.ctrl != 8'h00;

  always_comb begin
    hdr_now = hdr;
    if (word_idx < 8'(HDR_WORDS)) hdr_now[word_idx[$clog2(HDR_WORDS)-1:0]] = in_word.data;
  end

  // ---- decode ----
  logic [7:0] hb [HB];
  logic       accept;
  pkt_rec_t   rec;

  always_comb begin
    automatic logic [15:0] eth_type;
    automatic logic [3:0]  ihl;
    automatic logic [12:0] frag;
    automatic int unsigned l4;
    automatic int unsigned need;

    for (int i = 0; i < int'(HB); i++) hb[i] = hdr_now[i/8][63-8*(i%8) -: 8];

    eth_type = {hb[12], hb[13]};
    ihl      = hb[14][3:0];
    frag     = {hb[20][4:0], hb[21]};
    l4       = 14 + 4 * int'(ihl);

    rec           = '0;
    rec.tos       = hb[15];
    rec.octets    = byte_len;
    rec.ttl       = hb[22];
    rec.proto     = hb[23];
    rec.src_ip    = {hb[26], hb[27], hb[28], hb[29]};
    rec.dst_ip    = {hb[30], hb[31], hb[32], hb[33]};
    rec.in_if     = in_port[7:0];

    need = 34;
    if (frag == 13'd0) begin
      case (hb[23])
        8'd6: begin
          rec.src_port  = {hb[l4], hb[l4+1]};
          rec.dst_port  = {hb[l4+2], hb[l4+3]};
          rec.tcp_flags = hb[l4+13];
          need          = l4 + 14;
        end
        8'd17: begin
          rec.src_port = {hb[l4], hb[l4+1]};
          rec.dst_port = {hb[l4+2], hb[l4+3]};
          need         = l4 + 4;
        end
        8'd1: begin
          rec.dst_port = {hb[l4], hb[l4+1]};
          need         = l4 + 2;
        end
        default: ;
      endcase
    end

    accept = eth_type == 16'h0800 && hb[14][7:4] == 4'd4 && ihl >= 4'd5 &&
             (hb[23] == 8'd1 || hb[23] == 8'd6 || hb[23] == 8'd17) &&
             32'(byte_len) >= 32'(need);
  end

  // ---- capture process ----
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hdr              <= '0;
      word_idx         <= '0;
      in_frame         <= 1'b0;
      in_port          <= '0;
      byte_len         <= '0;
      pend             <= 1'b0;
      pend_rec         <= '0;
      total_packets    <= '0;
      accepted_packets <= '0;
    end else begin
      if (pend && !ser_busy) pend <= 1'b0;
      if (take) begin
        if (!in_frame && in_word.ctrl != 8'h00) begin
          // module header word(s) in front of the frame
          if (in_word.ctrl == CTRL_HDR) begin
            in_port  <= in_word.data[31:16];
            byte_len <= in_word.data[15:0];
          end
        end else begin
          hdr <= hdr_now;
          if (word_idx != 8'hff) word_idx <= word_idx + 8'd1;
          in_frame <= 1'b1;
          if (is_last) begin
            in_frame      <= 1'b0;
            word_idx      <= '0;
            total_packets <= total_packets + 32'd1;
            if (accept) begin
              accepted_packets <= accepted_packets + 32'd1;
              pend             <= 1'b1;
              pend_rec         <= rec;
            end
          end
        end
      end
    end
  end

  // ---- output process ----
  rec_ser #(.MAXW(3)) u_ser (
    .clk, .rst_n,
    .load     (pend && !ser_busy),
    .ld_words ({pr_word2(pend_rec), pr_word1(pend_rec), pr_word0(pend_rec)}),
    .ld_n     (2'd3),
    .busy     (ser_busy),
    .out_word, .out_wr, .out_rdy
  );
endmodule
