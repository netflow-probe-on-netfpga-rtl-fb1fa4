// netflow_probe_tb: end-to-end test of the whole probe at its default sizes
// (4096 x 8 fingerprint table, 32768 flow records, 8 inputs, 15-record
// datagrams).
//
// Traffic: flows on inputs 0-3 (TCP, UDP, ICMP with random payloads), ten
// flows on input 4 whose hashes all fall in one table line (found by searching
// with a reference CRC), ARP and IPv6 frames on inputs 5 and 6 that must be
// dropped, and one steady flow on input 7 that is never idle long enough for
// the inactive timeout but outlives the active timeout. A second phase sends
// minimum-size packets back to back on inputs 0-3 and checks the four-port
// Gigabit line rate: 84 bytes per packet on the wire at 1 Gb/s is 672 ns, so
// four ports bring one packet every 168 ns, 21 cycles of the 125 MHz clock.
// Finally the inactive timeout is set to 0 so that every flow is exported.
//
// Every NetFlow v5 datagram leaving the probe is decoded; per flow key the
// exported packet and octet counts must add up to what was sent, and the
// header record counts must match. The test counts, and requires at least
// once: packet drop, TCP/UDP/ICMP records, lookup update, init into a free
// way, replacement in a full line, inactive and active expiry, the delete round
// trip, a full 15-record datagram, an age-flushed datagram, two inputs
// competing in the arbiter, and output back-pressure.
module netflow_probe_tb;
  import nf_pkg::*;
  import tb_pkg::*;

  localparam int INC = 1000;       // clock cycles per millisecond in this test

  logic               clk = 0, rst_n = 0;
  nf_word_t [7:0]     in_word;
  logic     [7:0]     in_wr = '0, in_rdy;
  nf_word_t           out_word;
  logic               out_wr, out_rdy = 1;
  logic [31:0]        reg_total_packets, reg_accepted_packets;
  logic [31:0]        reg_ts_increment = INC, reg_timestamp, reg_frac_timestamp;
  logic [63:0]        reg_hash_seed = 64'h1357_9bdf_0246_8ace;
  logic [31:0]        reg_lookup_debug = 32'h0, reg_lookup_debug_rd;
  logic               lookup_busy_init, proc_busy_init;
  logic [31:0]        reg_active_timeout = 32'd100, reg_inactive_timeout = 32'd30;
  logic [31:0]        reg_cnt_items, reg_cnt_new, reg_cnt_update, reg_cnt_delete;
  logic [31:0]        reg_src_ip = 32'h0a00_00fe, reg_dst_ip = 32'h0a00_0001;
  logic [31:0]        reg_srcdst_port = {16'd3000, 16'd2055};
  logic [31:0]        reg_epoch_seconds = 32'd1_228_000_000;
  logic [7:0]         reg_output_port = 8'h01;
  logic [47:0]        reg_src_mac = 48'h0200_0000_00aa, reg_dst_mac = 48'h0200_0000_00bb;
  int                 checks = 0, failures = 0;

  netflow_probe dut (.*);

  always #4 clk = ~clk;  // one cycle = 8 time units, read as 8 ns of a 125 MHz clock

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  // ---------------- traffic ----------------
  typedef logic [111:0] key_t;  // sip, dip, sport, dport, input, proto
  int exp_pkts [key_t];
  longint exp_oct [key_t];
  int got_pkts [key_t];
  longint got_oct [key_t];
  int n_sent_ok = 0, n_sent_drop = 0, n_tcp = 0, n_udp = 0, n_icmp = 0;

  function automatic key_t key_of(pkt_desc_t d);
    logic [15:0] sp = d.sport, dp = d.dport;
    if (d.proto == 1) begin dp = d.sport; sp = 0; end
    return {d.src_ip, d.dst_ip, sp, dp, d.in_port[7:0], d.proto};
  endfunction

  task automatic send_word(int s, nf_word_t w);
    @(negedge clk);
    in_word[s] = w; in_wr[s] = 1;
    #1;
    while (!in_rdy[s]) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 in_wr[s] = 0;
  endtask

  task automatic send_pkt(int s, pkt_desc_t d, bit gaps);
    nf_word_t w [$];
    logic [7:0] b [$];
    frame_bytes(d, b);
    bytes_to_words(b, d.in_port, w);
    if (d.ethertype == 16'h0800) begin
      key_t k = key_of(d);
      exp_pkts[k] = exp_pkts.exists(k) ? exp_pkts[k] + 1 : 1;
      exp_oct[k]  = exp_oct.exists(k) ? exp_oct[k] + b.size() : b.size();
      n_sent_ok++;
      if (d.proto == 6) n_tcp++; else if (d.proto == 17) n_udp++; else n_icmp++;
    end else n_sent_drop++;
    foreach (w[i]) begin
      if (gaps) while ($urandom % 8 == 0) @(posedge clk);
      send_word(s, w[i]);
    end
  endtask

  function automatic pkt_desc_t rnd_flow(int s);
    pkt_desc_t d = default_desc();
    int r = int'($urandom % 3);
    d.proto = (r == 0) ? 8'd6 : (r == 1) ? 8'd17 : 8'd1;
    d.src_ip = $urandom; d.dst_ip = $urandom;
    d.sport = (d.proto == 1) ? 16'h0800 : 16'($urandom);
    d.dport = 16'($urandom);
    d.in_port = 16'(s);
    return d;
  endfunction

  function automatic logic [11:0] index_of(pkt_desc_t d);
    key_t k = key_of(d);
    logic [63:0] h = ref_crc64(reg_hash_seed, k[111:80], k[79:48], k[47:32], k[31:16],
                               k[15:8], k[7:0]);
    return h[11:0];
  endfunction

  pkt_desc_t flows [8][$];

  task automatic source(int s, int npkts, int spacing);
    for (int i = 0; i < npkts; i++) begin
      pkt_desc_t d = flows[s][$urandom % flows[s].size()];
      d.payload = int'($urandom % 200);
      d.tcp_flags = 8'(1 << ($urandom % 6));
      if (spacing > 0) repeat (spacing) @(posedge clk);
      send_pkt(s, d, 1);
    end
  endtask

  task automatic line_rate_source(int s);
    for (int i = 0; i < 50; i++) begin
      pkt_desc_t q = flows[s][i % flows[s].size()];
      q.payload = 0;
      send_pkt(s, q, 0);
    end
  endtask

  // ---------------- datagram decoder ----------------
  logic [7:0] pb [$];
  bit in_pkt = 0;
  int n_dgram = 0, n_full = 0, n_aged = 0, n_records = 0, n_bp = 0;
  logic [31:0] next_seq = 0;

  function automatic logic [31:0] be(int at, int n);
    logic [31:0] v = 0;
    for (int i = 0; i < n; i++) v = (v << 8) | 32'(pb[at+i]);
    return v;
  endfunction

  task automatic decode();
    int cnt = int'(be(44, 2));
    check("v5 version", 64'(be(42, 2)), 5);
    check("datagram length", 64'(pb.size()), 64'(66 + 48 * cnt));
    check("flow sequence", 64'(be(58, 4)), 64'(next_seq));
    next_seq += cnt;
    n_dgram++;
    if (cnt == 15) n_full++; else n_aged++;
    for (int r = 0; r < cnt; r++) begin
      int o = 66 + 48 * r;
      key_t k = {be(o, 4), be(o + 4, 4), be(o + 32, 4), 8'(be(o + 12, 2)), 8'(be(o + 38, 1))};
      got_pkts[k] = (got_pkts.exists(k) ? got_pkts[k] : 0) + int'(be(o + 16, 4));
      got_oct[k]  = (got_oct.exists(k) ? got_oct[k] : 0) + longint'(be(o + 20, 4));
      n_records++;
    end
  endtask

  bit bp_enable = 1;
  always @(negedge clk) begin
    out_rdy = !bp_enable || ($urandom % 4 != 0);
    #1;
    if (out_wr && !out_rdy) n_bp++;
    if (rst_n && out_wr && out_rdy) begin
      if (!in_pkt) begin
        check("datagram to output port", 64'(out_word.data[63:48]), 64'(reg_output_port));
        in_pkt = 1; pb.delete();
      end else begin
        automatic int nb = 8;
        if (out_word.ctrl != 0) for (int k = 0; k < 8; k++) if (out_word.ctrl[7-k]) nb = k + 1;
        for (int k = 0; k < nb; k++) pb.push_back(out_word.data[63-8*k -: 8]);
        if (out_word.ctrl != 0) begin in_pkt = 0; decode(); end
      end
    end
  end

  // ---------------- mechanism counters (internal probes) ----------------
  int n_update = 0, n_init_free = 0, n_replace = 0, n_inact = 0, n_act = 0, n_compete = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_lookup.pr_take) begin
      if (dut.u_lookup.hit) n_update++;
      else if (dut.u_lookup.has_free) n_init_free++;
      else n_replace++;
    end
    if (dut.u_proc.del_load) begin
      if ((reg_timestamp - dut.u_proc.b_q.rec.end_ts) > reg_inactive_timeout) n_inact++;
      else n_act++;
    end
    if ($countones(in_wr) >= 2) n_compete++;
  end

  // ---------------- sequence ----------------
  int t0, t1;
  initial begin
    pkt_desc_t d, base;
    for (int s = 0; s < 8; s++) in_word[s] = '0;
    // flows
    for (int s = 0; s < 4; s++) for (int i = 0; i < 12; i++) flows[s].push_back(rnd_flow(s));
    base = rnd_flow(4);
    flows[4].push_back(base);
    while (flows[4].size() < 10) begin
      d = rnd_flow(4);
      if (index_of(d) == index_of(base)) flows[4].push_back(d);
    end
    d = default_desc(); d.ethertype = 16'h0806; d.in_port = 5; flows[5].push_back(d);
    d = default_desc(); d.ethertype = 16'h86dd; d.in_port = 6; flows[6].push_back(d);
    flows[7].push_back(rnd_flow(7));

    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (!lookup_busy_init && !proc_busy_init);
    check("debug register", 64'(reg_lookup_debug_rd), 64'(reg_lookup_debug));

    // phase A: mixed traffic
    fork
      source(0, 60, 30); source(1, 60, 40); source(2, 60, 50); source(3, 60, 60);
      source(4, 80, 20); source(5, 10, 300); source(6, 10, 300);
      source(7, 250, 600);
    join

    // phase B: line rate on the four Ethernet inputs, no back-pressure
    bp_enable = 0;
    repeat (200) @(posedge clk);
    t0 = $time;
    fork
      line_rate_source(0); line_rate_source(1); line_rate_source(2); line_rate_source(3);
    join
    t1 = $time;
    $display("line-rate phase: 200 packets in %0d cycles", (t1 - t0) / 8);
    check("four-port line rate (<= 21 cycles per packet)", 64'((t1 - t0) / 8 <= 200 * 21), 1);
    bp_enable = 1;

    // phase C: expire everything
    repeat (2000) @(posedge clk);
    reg_inactive_timeout = 0;
    wait (reg_cnt_items == 0 && !in_pkt);
    repeat (30 * INC) @(posedge clk);      // longer than the 20 ms age limit
    wait (!in_pkt);
    repeat (200) @(posedge clk);

    // results
    check("total packets", 64'(reg_total_packets), 64'(n_sent_ok + n_sent_drop));
    check("accepted packets", 64'(reg_accepted_packets), 64'(n_sent_ok));
    check("records exported = inits", 64'(n_records), 64'(reg_cnt_new));
    check("new + update = accepted", 64'(reg_cnt_new + reg_cnt_update), 64'(n_sent_ok));
    foreach (exp_pkts[k]) begin
      check("flow packets", 64'(got_pkts.exists(k) ? got_pkts[k] : -1), 64'(exp_pkts[k]));
      check("flow octets", 64'(got_oct.exists(k) ? got_oct[k] : -1), 64'(exp_oct[k]));
    end
    check("no unknown flows", 64'(got_pkts.size()), 64'(exp_pkts.size()));
    $display("drops %0d tcp %0d udp %0d icmp %0d", n_sent_drop, n_tcp, n_udp, n_icmp);
    $display("updates %0d inits(free) %0d replaces %0d inactive %0d active %0d deletes %0d",
             n_update, n_init_free, n_replace, n_inact, n_act, reg_cnt_delete);
    $display("datagrams %0d (full %0d, aged %0d) records %0d compete %0d backpressure %0d",
             n_dgram, n_full, n_aged, n_records, n_compete, n_bp);
    check("mechanism: drop", 64'(reg_total_packets > reg_accepted_packets), 1);
    check("mechanism: tcp/udp/icmp", 64'(n_tcp > 0 && n_udp > 0 && n_icmp > 0), 1);
    check("mechanism: update", 64'(n_update > 0), 1);
    check("mechanism: init free way", 64'(n_init_free > 0), 1);
    check("mechanism: replace in full line", 64'(n_replace > 0), 1);
    check("mechanism: inactive expiry", 64'(n_inact > 0), 1);
    check("mechanism: active expiry", 64'(n_act > 0), 1);
    check("mechanism: delete round trip", 64'(reg_cnt_delete > 0), 1);
    check("mechanism: full datagram", 64'(n_full > 0), 1);
    check("mechanism: aged datagram", 64'(n_aged > 0), 1);
    check("mechanism: arbitration", 64'(n_compete > 0), 1);
    check("mechanism: back-pressure", 64'(n_bp > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
