// record_wrapper_tb: sends flow records to record_wrapper and decodes the
// datagrams it emits byte by byte. Case 1: 15 records are sent and must leave
// at once as one datagram. Case 2: 3 records must wait while they are up to
// 20 ms old and leave once they are older. Each datagram is checked field by
// field: NetFPGA module header (one-hot port, word and byte length), Ethernet
// addresses and type, IPv4 header and its checksum, UDP ports and length,
// NetFlow v5 header (version, count, SysUptime, seconds, flow sequence), and
// every 48-byte v5 record against the flow record it came from.
module record_wrapper_tb;
  import nf_pkg::*;

  logic        clk = 0, rst_n = 0;
  nf_word_t    in_word, out_word;
  logic        in_wr = 0, in_rdy, out_wr, out_rdy = 0;
  logic [31:0] now_ms = 5000;
  logic [31:0] src_ip = 32'hc0a8_0101, dst_ip = 32'hc0a8_0102;
  logic [31:0] srcdst_port = {16'd2055, 16'd9995};
  logic [31:0] epoch_seconds = 32'd1_230_000_000;
  logic [7:0]  output_port = 8'b0000_0100;
  logic [47:0] src_mac = 48'h02_00_00_00_00_01, dst_mac = 48'h02_00_00_00_00_02;
  int          checks = 0, failures = 0;

  record_wrapper dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic send(nf_word_t w);
    @(negedge clk);
    in_word = w; in_wr = 1;
    #1;
    while (!in_rdy) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 in_wr = 0;
  endtask

  flow_rec_t sent [$];
  task automatic send_rec();
    flow_rec_t f = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    sent.push_back(f);
    for (int k = 0; k < 4; k++)
      send('{ctrl: (k == 3) ? CTRL_LAST : 8'h00, data: f[255-64*k -: 64]});
  endtask

  // datagram collector
  logic [7:0]  pb [$];
  logic [63:0] mh;
  int          nwords = 0, ndgrams = 0;
  bit          in_pkt = 0, dgram_done = 0;
  always @(negedge clk) begin
    out_rdy = ($urandom % 4 != 0);
    #1;
    if (rst_n && out_wr && out_rdy) begin
      if (!in_pkt) begin
        check("module header ctrl", 64'(out_word.ctrl), 64'hff);
        mh = out_word.data; in_pkt = 1; nwords = 0; pb.delete();
      end else begin
        automatic int nb = 8;
        nwords++;
        if (out_word.ctrl != 0) begin
          for (int k = 0; k < 8; k++) if (out_word.ctrl[7-k]) nb = k + 1;
        end
        for (int k = 0; k < nb; k++) pb.push_back(out_word.data[63-8*k -: 8]);
        if (out_word.ctrl != 0) begin in_pkt = 0; dgram_done = 1; ndgrams++; end
      end
    end
  end

  function automatic logic [31:0] be(int at, int n);
    logic [31:0] v = 0;
    for (int i = 0; i < n; i++) v = (v << 8) | 32'(pb[at+i]);
    return v;
  endfunction

  task automatic check_dgram(int n, int first, logic [31:0] seq, logic [31:0] uptime);
    logic [31:0] sum;
    int len = 66 + 48 * n;
    check("byte length", 64'(pb.size()), 64'(len));
    check("mh byte len", 64'(mh[15:0]), 64'(len));
    check("mh word len", 64'(mh[47:32]), 64'((len + 7) / 8));
    check("mh dest port", 64'(mh[63:48]), 64'(output_port));
    check("words", 64'(nwords), 64'((len + 7) / 8));
    check("dst mac", 64'({be(0, 4), 16'(be(4, 2))}), 64'(dst_mac));
    check("src mac", 64'({be(6, 4), 16'(be(10, 2))}), 64'(src_mac));
    check("ethertype", 64'(be(12, 2)), 64'h0800);
    check("ip ver/ihl", 64'(be(14, 1)), 64'h45);
    check("ip total length", 64'(be(16, 2)), 64'(len - 14));
    check("ip ttl/proto", 64'(be(22, 2)), 64'h4011);
    sum = 0;
    for (int i = 0; i < 10; i++) sum += be(14 + 2 * i, 2);
    sum = (sum & 32'hffff) + (sum >> 16);
    sum = (sum & 32'hffff) + (sum >> 16);
    check("ip checksum", 64'(sum), 64'hffff);
    check("ip src", 64'(be(26, 4)), 64'(src_ip));
    check("ip dst", 64'(be(30, 4)), 64'(dst_ip));
    check("udp sport", 64'(be(34, 2)), 64'(srcdst_port[31:16]));
    check("udp dport", 64'(be(36, 2)), 64'(srcdst_port[15:0]));
    check("udp length", 64'(be(38, 2)), 64'(len - 34));
    check("v5 version", 64'(be(42, 2)), 5);
    check("v5 count", 64'(be(44, 2)), 64'(n));
    check("v5 sysuptime", 64'(be(46, 4)), 64'(uptime));
    check("v5 unix_secs", 64'(be(50, 4)), 64'(epoch_seconds));
    check("v5 flow_sequence", 64'(be(58, 4)), 64'(seq));
    for (int r = 0; r < n; r++) begin
      flow_rec_t f = sent[first + r];
      int o = 66 + 48 * r;
      check("rec srcaddr", 64'(be(o, 4)), 64'(f.src_ip));
      check("rec dstaddr", 64'(be(o + 4, 4)), 64'(f.dst_ip));
      check("rec nexthop", 64'(be(o + 8, 4)), 0);
      check("rec input", 64'(be(o + 12, 2)), 64'(f.in_if));
      check("rec dPkts", 64'(be(o + 16, 4)), 64'(f.pkts));
      check("rec dOctets", 64'(be(o + 20, 4)), 64'(f.octets));
      check("rec First", 64'(be(o + 24, 4)), 64'(f.start_ts));
      check("rec Last", 64'(be(o + 28, 4)), 64'(f.end_ts));
      check("rec ports", 64'(be(o + 32, 4)), 64'({f.src_port, f.dst_port}));
      check("rec flags/prot/tos", 64'(be(o + 36, 4)), 64'({8'h0, f.tcp_flags, f.proto, f.tos}));
      check("rec tail", 64'(be(o + 40, 4)) | 64'(be(o + 44, 4)), 0);
    end
  endtask

  initial begin
    in_word = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // case 1: 15 records -> immediate datagram
    for (int i = 0; i < 15; i++) send_rec();
    repeat (300) @(posedge clk);
    check("datagram after 15 records", 64'(dgram_done), 1);
    if (dgram_done) check_dgram(15, 0, 0, now_ms);
    dgram_done = 0;
    // case 2: 3 records, age flush
    now_ms = 6000;
    for (int i = 0; i < 3; i++) send_rec();
    repeat (50) @(posedge clk);
    now_ms = 6020;                     // exactly 20 ms: not yet
    repeat (50) @(posedge clk);
    check("no datagram at 20 ms", 64'(dgram_done || in_pkt), 0);
    now_ms = 6021;
    repeat (300) @(posedge clk);
    check("datagram after more than 20 ms", 64'(dgram_done), 1);
    if (dgram_done) check_dgram(3, 15, 15, 6021);
    check("datagram count", 64'(ndgrams), 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
