// tb_pkg: packet builders and reference models shared by the testbenches.
//
// build_packet turns a packet description into the words a NetFPGA input
// queue delivers: a module header word (ctrl 0xff, input port in [31:16],
// frame length in bytes in [15:0]) followed by the Ethernet frame, 8 bytes per
// word, big-endian, the last word marked by the ctrl bit of its last byte.
// ref_crc64 is a bit-serial CRC-64/ECMA-182 written independently of the RTL.
package tb_pkg;
  import nf_pkg::*;

  typedef struct {
    logic [15:0] ethertype;
    logic [3:0]  version;
    logic [3:0]  ihl;
    logic [7:0]  tos;
    logic [7:0]  ttl;
    logic [7:0]  proto;
    logic [12:0] frag;
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] sport;    // ICMP: type in [15:8], code in [7:0]
    logic [15:0] dport;
    logic [7:0]  tcp_flags;
    int          payload;  // bytes after the L4 header
    logic [15:0] in_port;
  } pkt_desc_t;

  function automatic pkt_desc_t default_desc();
    pkt_desc_t d;
    d.ethertype = 16'h0800; d.version = 4; d.ihl = 5; d.tos = 8'h10; d.ttl = 8'd63;
    d.proto = 8'd6; d.frag = 0; d.src_ip = 32'h0a000001; d.dst_ip = 32'h0a000002;
    d.sport = 16'd1234; d.dport = 16'd80; d.tcp_flags = 8'h12; d.payload = 0;
    d.in_port = 16'd0;
    return d;
  endfunction

  // Frame bytes (no preamble, no FCS), padded to 60 bytes.
  function automatic void frame_bytes(pkt_desc_t d, ref logic [7:0] b[$]);
    int l4len;
    b.delete();
    repeat (6) b.push_back(8'hff);                       // dst MAC
    b.push_back(8'h00); b.push_back(8'h11); b.push_back(8'h22);
    b.push_back(8'h33); b.push_back(8'h44); b.push_back(8'h55);
    b.push_back(d.ethertype[15:8]); b.push_back(d.ethertype[7:0]);
    l4len = (d.proto == 6) ? 20 : 8;
    b.push_back({d.version, d.ihl}); b.push_back(d.tos);
    b.push_back(8'(((d.ihl * 4) + l4len + d.payload) >> 8));
    b.push_back(8'((d.ihl * 4) + l4len + d.payload));
    b.push_back(8'h12); b.push_back(8'h34);
    b.push_back({3'b000, d.frag[12:8]}); b.push_back(d.frag[7:0]);
    b.push_back(d.ttl); b.push_back(d.proto); b.push_back(8'h00); b.push_back(8'h00);
    for (int i = 3; i >= 0; i--) b.push_back(d.src_ip[8*i +: 8]);
    for (int i = 3; i >= 0; i--) b.push_back(d.dst_ip[8*i +: 8]);
    for (int i = 5; i < int'(d.ihl); i++) repeat (4) b.push_back(8'h01);  // options
    b.push_back(d.sport[15:8]); b.push_back(d.sport[7:0]);
    b.push_back(d.dport[15:8]); b.push_back(d.dport[7:0]);
    if (d.proto == 6) begin
      repeat (8) b.push_back(8'hab);                     // seq, ack
      b.push_back(8'h50); b.push_back(d.tcp_flags);
      repeat (6) b.push_back(8'h00);
    end else begin
      repeat (4) b.push_back(8'hcd);
    end
    for (int i = 0; i < d.payload; i++) b.push_back(8'(i * 7 + 3));
    while (b.size() < 60) b.push_back(8'h00);
  endfunction

  function automatic void bytes_to_words(logic [7:0] b[$], logic [15:0] in_port,
                                         ref nf_word_t w[$]);
    nf_word_t x;
    int n;
    w.delete();
    x.ctrl = 8'hff;
    x.data = {32'h0, in_port, 16'(b.size())};
    w.push_back(x);
    n = (b.size() + 7) / 8;
    for (int i = 0; i < n; i++) begin
      x.data = '0;
      for (int k = 0; k < 8; k++)
        if (8 * i + k < b.size()) x.data[63-8*k -: 8] = b[8*i+k];
      if (i == n - 1) x.ctrl = 8'h01 << (8 - (b.size() - 8 * i));
      else            x.ctrl = 8'h00;
      w.push_back(x);
    end
  endfunction

  function automatic void build_packet(pkt_desc_t d, ref nf_word_t w[$]);
    logic [7:0] b[$];
    frame_bytes(d, b);
    bytes_to_words(b, d.in_port, w);
  endfunction

  // Reference CRC: one bit at a time, field by field.
  function automatic logic [63:0] ref_crc_bits(logic [63:0] c, logic [31:0] v, int nbits);
    for (int i = nbits - 1; i >= 0; i--) begin
      if (c[63] != v[i]) c = (c << 1) ^ 64'h42F0E1EBA9EA3693;
      else               c = c << 1;
    end
    return c;
  endfunction

  function automatic logic [63:0] ref_crc64(logic [63:0] seed, logic [31:0] sip,
      logic [31:0] dip, logic [15:0] sp, logic [15:0] dp, logic [7:0] inif, logic [7:0] pr);
    logic [63:0] c;
    c = ref_crc_bits(seed, sip, 32);
    c = ref_crc_bits(c, dip, 32);
    c = ref_crc_bits(c, 32'(sp), 16);
    c = ref_crc_bits(c, 32'(dp), 16);
    c = ref_crc_bits(c, 32'(inif), 8);
    c = ref_crc_bits(c, 32'(pr), 8);
    return c;
  endfunction
endpackage
