// nf_pkg: types, constants and functions shared by the NetFlow probe pipeline.
//
// Every unit of the pipeline talks over the same 64-bit bus that the NetFPGA
// user data path uses: a 64-bit data word, an 8-bit control word, a write strobe
// and a ready signal. A word moves in a cycle in which write and ready are both
// high, and the writer holds the word until it is taken (this design's choice
// of handshake).
//
// Packets (from the input queues and to the output queues) follow the NetFPGA
// framing: one or more leading words with ctrl != 0 (the module header has
// ctrl = 0xff), data words with ctrl = 0, and a last word whose ctrl has one bit
// set marking its last valid byte (0x01 = all 8 bytes, 0x80 = only [63:56]).
// Bytes are big-endian within a word: byte 0 of a word is data[63:56].
//
// Records between the units (packet record, command, flow record) are whole
// words; all words have ctrl = 0 except the last, which carries CTRL_LAST.
//
// The word layouts of the records follow the order of the fields drawn in the
// figures of the original design; the exact bit positions are this design's
// choice (see the pack/unpack functions below).
package nf_pkg;

  typedef struct packed {
    logic [7:0]  ctrl;
    logic [63:0] data;
  } nf_word_t;

  localparam logic [7:0] CTRL_HDR  = 8'hff;  // NetFPGA module header word
  localparam logic [7:0] CTRL_LAST = 8'h01;  // last word, all 8 bytes valid

  // Commands between FlowLookUp and FlowProc.
  typedef enum logic [7:0] {
    CMD_NONE   = 8'd0,
    CMD_INIT   = 8'd1,
    CMD_UPDATE = 8'd2,
    CMD_DELETE = 8'd3
  } cmd_e;

  // Packet record: what the pipeline knows about one accepted packet.
  typedef struct packed {
    logic [63:0] hash;
    logic [31:0] timestamp;
    logic [7:0]  tos;
    logic [15:0] octets;      // PktByteLen from the module header
    logic [7:0]  ttl;
    logic [7:0]  tcp_flags;
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] src_port;
    logic [15:0] dst_port;
    logic [7:0]  in_if;       // input interface
    logic [7:0]  proto;
  } pkt_rec_t;

  // Flow record, 256 bits = 4 words; field order is the word layout of the
  // exported record (word 0 is the most significant 64 bits).
  typedef struct packed {
    logic [31:0] start_ts;
    logic [31:0] end_ts;
    logic [31:0] octets;
    logic [15:0] pkts;
    logic [7:0]  ttl;
    logic [7:0]  tcp_flags;
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] src_port;
    logic [15:0] dst_port;
    logic [7:0]  in_if;
    logic [7:0]  proto;
    logic [7:0]  tos;
    logic [7:0]  pad;
  } flow_rec_t;

  // ---- packet record as produced by L3L4 extract (3 words) ----
  // word0: ToS[63:56] dOctets[55:40] TTL[39:32] TCPflags[15:8]
  // word1: SrcIP[63:32] DstIP[31:0]
  // word2: SrcPort[63:48] DstPort[47:32] input[31:24] Proto[23:16]
  function automatic logic [63:0] pr_word0(pkt_rec_t p);
    return {p.tos, p.octets, p.ttl, 16'h0, p.tcp_flags, 8'h0};
  endfunction
  function automatic logic [63:0] pr_word1(pkt_rec_t p);
    return {p.src_ip, p.dst_ip};
  endfunction
  function automatic logic [63:0] pr_word2(pkt_rec_t p);
    return {p.src_port, p.dst_port, p.in_if, p.proto, 16'h0};
  endfunction

  // Fills the L3/L4 fields of a record from the three parser words.
  function automatic pkt_rec_t pr_unpack3(logic [63:0] w0, logic [63:0] w1, logic [63:0] w2);
    pkt_rec_t p;
    p = '0;
    p.tos       = w0[63:56];
    p.octets    = w0[55:40];
    p.ttl       = w0[39:32];
    p.tcp_flags = w0[15:8];
    p.src_ip    = w1[63:32];
    p.dst_ip    = w1[31:0];
    p.src_port  = w2[63:48];
    p.dst_port  = w2[47:32];
    p.in_if     = w2[31:24];
    p.proto     = w2[23:16];
    return p;
  endfunction

  // ---- command record from FlowLookUp to FlowProc (5 words) ----
  // word0: CMD[39:32] Address[31:0]
  // word1: Timestamp[31:0]
  // word2: TTL[63:56] TCPflags[55:48] PktLength[47:32]
  // word3: SrcIP[63:32] DstIP[31:0]
  // word4: SrcPort[63:48] DstPort[47:32] input[31:24] Proto[23:16] ToS[15:8]
  function automatic logic [63:0] mk_cmd(cmd_e c, logic [31:0] addr);
    return {24'h0, c, addr};
  endfunction
  // Words 1..4 as a packed array: element [0] is word1, [3] is word4.
  function automatic logic [3:0][63:0] lr_words(pkt_rec_t p);
    return {{p.src_port, p.dst_port, p.in_if, p.proto, p.tos, 8'h0},
            {p.src_ip, p.dst_ip},
            {p.ttl, p.tcp_flags, p.octets, 32'h0},
            {32'h0, p.timestamp}};
  endfunction
  function automatic pkt_rec_t lr_unpack(logic [63:0] w1, logic [63:0] w2,
                                         logic [63:0] w3, logic [63:0] w4);
    pkt_rec_t p;
    p = '0;
    p.timestamp = w1[31:0];
    p.ttl       = w2[63:56];
    p.tcp_flags = w2[55:48];
    p.octets    = w2[47:32];
    p.src_ip    = w3[63:32];
    p.dst_ip    = w3[31:0];
    p.src_port  = w4[63:48];
    p.dst_port  = w4[47:32];
    p.in_if     = w4[31:24];
    p.proto     = w4[23:16];
    p.tos       = w4[15:8];
    return p;
  endfunction

  // ---- CRC-64 over the flow key ----
  // Polynomial CRC-64/ECMA-182, MSB first, register preset to the seed,
  // no reflection and no final XOR. Key bits: SrcIP, DstIP, SrcPort, DstPort,
  // input, protocol (112 bits, SrcIP[31] first).
  localparam logic [63:0] CRC64_POLY = 64'h42F0_E1EB_A9EA_3693;

  function automatic logic [63:0] crc64_key(logic [63:0] seed, logic [111:0] key,
                                            logic [63:0] poly);
    logic [63:0] c;
    logic fb;
    c = seed;
    for (int i = 111; i >= 0; i--) begin
      fb = c[63] ^ key[i];
      c  = {c[62:0], 1'b0} ^ (fb ? poly : 64'h0);
    end
    return c;
  endfunction

  function automatic logic [111:0] flow_key(pkt_rec_t p);
    return {p.src_ip, p.dst_ip, p.src_port, p.dst_port, p.in_if, p.proto};
  endfunction

  // NetFPGA last-word control value for a word holding n (1..8) valid bytes.
  function automatic logic [7:0] last_ctrl(logic [3:0] n);
    return 8'h01 << (4'd8 - n);
  endfunction

endpackage
