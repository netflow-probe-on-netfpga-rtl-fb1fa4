// record_wrapper: packs expired flow records into NetFlow v5 export datagrams.
//
// Expired flow records (4 words each, from the flow processing unit) are
// converted to the 48-byte NetFlow v5 record format and kept in a buffer of
// MAX_RECORDS entries. A datagram is sent as soon as MAX_RECORDS records have
// arrived or the first buffered record is more than AGE_MS milliseconds old
// (now_ms - arrival > AGE_MS); it goes to the output queues selected by the
// one-hot output_port register. The two send conditions (15 records, 20 ms) and
// the one-hot output selection are the original design's.
//
// The datagram leaves as a NetFPGA packet: a module header word (ctrl = 0xff:
// [63:48] one-hot destination, [47:32] length in words, [15:0] length in
// bytes), then 14 bytes of Ethernet, 20 of IPv4, 8 of UDP, the 24-byte NetFlow
// v5 header and n * 48 bytes of records, big-endian, with the last word's ctrl
// marking its last valid byte. This design's choices: Ethernet addresses come
// from input ports (src_mac, dst_mac); IPv4 TTL 64, identification 0, no
// fragmentation flags, header checksum computed; UDP checksum 0 (allowed for
// IPv4); srcdst_port holds the UDP source port in [31:16] and the destination
// port in [15:0]; v5 header: SysUptime = now_ms, unix_secs = epoch_seconds,
// unix_nsecs 0, flow_sequence = records sent before this datagram, engine and
// sampling fields 0; v5 record fields the flow record lacks (next hop, output
// interface, AS numbers, masks) are 0.
//
// Timing: one record is taken every few cycles while collecting; no record is
// taken while a datagram is sent (1 + ceil((66 + 48 n) / 8) words, one per
// cycle when out_rdy is high).
module record_wrapper
  import nf_pkg::*;
#(
  parameter int unsigned MAX_RECORDS = 15,
  parameter int unsigned AGE_MS      = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  nf_word_t    in_word,
  input  logic        in_wr,
  output logic        in_rdy,
  output nf_word_t    out_word,
  output logic        out_wr,
  input  logic        out_rdy,
  input  logic [31:0] now_ms,
  input  logic [31:0] src_ip,
  input  logic [31:0] dst_ip,
  input  logic [31:0] srcdst_port,
  input  logic [31:0] epoch_seconds,
  input  logic [7:0]  output_port,
  input  logic [47:0] src_mac,
  input  logic [47:0] dst_mac
);
  localparam int unsigned HDR_B = 66;                       // Eth+IP+UDP+v5 header
  localparam int unsigned FB    = ((HDR_B + 48 * MAX_RECORDS + 7) / 8) * 8;
  localparam int unsigned CW    = $clog2(MAX_RECORDS + 1);

  // ---- input ----
  logic             r_valid, r_take;
  logic [3:0][63:0] r_words;
  logic [2:0]       r_n;
  flow_rec_t        fr;

  rec_deser #(.MAXW(4)) u_in (
    .clk, .rst_n, .in_word, .in_wr, .in_rdy,
    .rec_valid(r_valid), .rec_words(r_words), .rec_n(r_n), .rec_take(r_take)
  );

  assign fr = {r_words[0], r_words[1], r_words[2], r_words[3]};

  // NetFlow v5 flow record, 48 bytes.
  function automatic logic [383:0] v5_record(flow_rec_t f);
    return {f.src_ip, f.dst_ip, 32'h0,            // srcaddr, dstaddr, nexthop
            8'h0, f.in_if, 16'h0,                  // input, output
            16'h0, f.pkts, f.octets,               // dPkts, dOctets
            f.start_ts, f.end_ts,                  // First, Last
            f.src_port, f.dst_port,
            8'h0, f.tcp_flags, f.proto, f.tos,     // pad1, tcp_flags, prot, tos
            16'h0, 16'h0, 8'h0, 8'h0, 16'h0};      // src_as, dst_as, masks, pad2
  endfunction

  // ---- buffer and control ----
  typedef enum logic {S_COLLECT, S_SEND} state_e;
  state_e         state;
  logic [383:0]   rbuf [MAX_RECORDS];
  logic [CW-1:0]  cnt;
  logic [31:0]    first_t;
  logic [31:0]    seq;
  logic [CW-1:0]  n_q;
  logic [31:0]    sysup_q;
  logic [7:0]     widx;
  logic           trigger;

  assign trigger = (state == S_COLLECT) && cnt != '0 &&
                   (cnt == CW'(MAX_RECORDS) || (now_ms - first_t) > 32'(AGE_MS));
  assign r_take  = (state == S_COLLECT) && !trigger && r_valid && cnt != CW'(MAX_RECORDS);

  // ---- datagram image ----
  logic [15:0]     frame_len, ip_len, udp_len, nwords;
  logic [15:0]     ip_csum;
  logic [HDR_B*8-1:0] hdr;
  logic [FB*8-1:0] frame;

  always_comb begin
    automatic logic [31:0] s;
    frame_len = 16'(HDR_B) + 16'd48 * 16'(n_q);
    ip_len    = frame_len - 16'd14;
    udp_len   = ip_len - 16'd20;
    nwords    = (frame_len + 16'd7) >> 3;
    s = 32'h4500 + 32'(ip_len) + 32'h4011 +          // ver/IHL/ToS, len, TTL 64/UDP
        32'(src_ip[31:16]) + 32'(src_ip[15:0]) + 32'(dst_ip[31:16]) + 32'(dst_ip[15:0]);
    s = 32'(s[15:0]) + 32'(s[31:16]);
    s = 32'(s[15:0]) + 32'(s[31:16]);
    ip_csum = ~s[15:0];
    hdr = {dst_mac, src_mac, 16'h0800,
           8'h45, 8'h00, ip_len, 16'h0000, 16'h0000, 8'd64, 8'd17, ip_csum, src_ip, dst_ip,
           srcdst_port[31:16], srcdst_port[15:0], udp_len, 16'h0000,
           16'd5, 16'(n_q), sysup_q, epoch_seconds, 32'h0, seq, 8'h0, 8'h0, 16'h0};
    frame = '0;
    frame[FB*8-1 -: HDR_B*8] = hdr;
    for (int i = 0; i < int'(MAX_RECORDS); i++)
      frame[FB*8-1-HDR_B*8-384*i -: 384] = rbuf[i];
  end

  // ---- output word ----
  logic [15:0] k;       // frame word index
  logic [15:0] rem;     // bytes of the frame from this word on
  always_comb begin
    k   = 16'(widx) - 16'd1;
    rem = frame_len - (k << 3);
    out_wr = (state == S_SEND);
    if (widx == 8'd0) begin
      out_word.ctrl = CTRL_HDR;
      out_word.data = {8'h0, output_port, nwords, 16'h0, frame_len};
    end else begin
      out_word.data = frame[FB*8-1-64*int'(k) -: 64];
      out_word.ctrl = 8'h00;
      if (rem <= 16'd8) begin
        out_word.ctrl = last_ctrl(rem[3:0]);
        for (int b = 0; b < 8; b++)
          if (16'(b) >= rem) out_word.data[63-8*b -: 8] = 8'h00;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_COLLECT;
      cnt     <= '0;
      first_t <= '0;
      seq     <= '0;
      n_q     <= '0;
      sysup_q <= '0;
      widx    <= '0;
      for (int i = 0; i < int'(MAX_RECORDS); i++) rbuf[i] <= '0;
    end else begin
      unique case (state)
        S_COLLECT: begin
          if (trigger) begin
            state   <= S_SEND;
            n_q     <= cnt;
            sysup_q <= now_ms;
            widx    <= '0;
          end else if (r_take) begin
            rbuf[cnt] <= v5_record(fr);
            if (cnt == '0) first_t <= now_ms;
            cnt <= cnt + 1'b1;
          end
        end
        S_SEND: begin
          if (out_rdy) begin
            widx <= widx + 8'd1;
            if (widx != 8'd0 && rem <= 16'd8) begin
              state <= S_COLLECT;
              cnt   <= '0;
              seq   <= seq + 32'(n_q);
            end
          end
        end
        default: state <= S_COLLECT;
      endcase
    end
  end
endmodule
