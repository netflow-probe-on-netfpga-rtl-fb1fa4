// netflow_probe_flows_tb: the whole probe, at its default sizes, holding 4000
// concurrent flows.
//
// 4000 distinct flows (random addresses and ports, TCP/UDP/ICMP, 1000 per
// Ethernet input 0-3) each send one packet in a first round and one in a second
// round; the timeouts are long, so no flow expires in between. The test works
// out, with a reference CRC, how the flows spread over the 4096 lines of the
// fingerprint table. If no line gets more than 8 flows, the first round must
// create exactly 4000 records and the second must update all 4000 (no false
// sharing of a fingerprint, no replacement). The second round is sent back to
// back on the four inputs and must keep up with four Gigabit ports of
// minimum-size frames (one packet per 21 cycles of a 125 MHz clock). Finally
// the inactive timeout is set to 0: all 4000 records must be exported in NetFlow
// v5 datagrams, and the packet and octet totals of every flow must match what
// was sent. One millisecond is set to 1000 cycles to keep the run short.
module netflow_probe_flows_tb;
  import nf_pkg::*;
  import tb_pkg::*;

  localparam int INC    = 1000;    // clock cycles per millisecond in this test
  localparam int NFLOWS = 4000;

  logic               clk = 0, rst_n = 0;
  nf_word_t [7:0]     in_word;
  logic     [7:0]     in_wr = '0, in_rdy;
  nf_word_t           out_word;
  logic               out_wr, out_rdy = 1;
  logic [31:0]        reg_total_packets, reg_accepted_packets;
  logic [31:0]        reg_ts_increment = INC, reg_timestamp, reg_frac_timestamp;
  logic [63:0]        reg_hash_seed = 64'h0f1e_2d3c_4b5a_6978;
  logic [31:0]        reg_lookup_debug = 32'h0, reg_lookup_debug_rd;
  logic               lookup_busy_init, proc_busy_init;
  logic [31:0]        reg_active_timeout = 32'd1_000_000, reg_inactive_timeout = 32'd100_000;
  logic [31:0]        reg_cnt_items, reg_cnt_new, reg_cnt_update, reg_cnt_delete;
  logic [31:0]        reg_src_ip = 32'h0a00_00fe, reg_dst_ip = 32'h0a00_0001;
  logic [31:0]        reg_srcdst_port = {16'd3000, 16'd2055};
  logic [31:0]        reg_epoch_seconds = 32'd1_228_000_000;
  logic [7:0]         reg_output_port = 8'h02;
  logic [47:0]        reg_src_mac = 48'h0200_0000_00aa, reg_dst_mac = 48'h0200_0000_00bb;
  int                 checks = 0, failures = 0;

  netflow_probe dut (.*);

  always #4 clk = ~clk;  // one cycle = 8 time units, read as 8 ns of a 125 MHz clock

  initial begin
    repeat (3_000_000) @(posedge clk);
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
  int n_sent = 0;

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

  task automatic send_pkt(int s, pkt_desc_t d);
    nf_word_t w [$];
    logic [7:0] b [$];
    key_t k = key_of(d);
    frame_bytes(d, b);
    bytes_to_words(b, d.in_port, w);
    exp_pkts[k] = exp_pkts.exists(k) ? exp_pkts[k] + 1 : 1;
    exp_oct[k]  = exp_oct.exists(k) ? exp_oct[k] + longint'(b.size()) : longint'(b.size());
    n_sent++;
    foreach (w[i]) send_word(s, w[i]);
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

  function automatic logic [63:0] hash_of(pkt_desc_t d);
    key_t k = key_of(d);
    return ref_crc64(reg_hash_seed, k[111:80], k[79:48], k[47:32], k[31:16], k[15:8], k[7:0]);
  endfunction

  pkt_desc_t flows [4][$];

  task automatic round(int s, bit min_size);
    foreach (flows[s][i]) begin
      pkt_desc_t d = flows[s][i];
      d.payload = min_size ? 0 : int'($urandom % 300);
      d.tcp_flags = 8'(1 << ($urandom % 6));
      send_pkt(s, d);
    end
  endtask

  // ---------------- datagram decoder ----------------
  logic [7:0] pb [$];
  bit in_pkt = 0;
  int n_dgram = 0, n_records = 0;
  logic [31:0] next_seq = 0;

  function automatic logic [31:0] be(int at, int n);
    logic [31:0] v = 0;
    for (int i = 0; i < n; i++) v = (v << 8) | 32'(pb[at+i]);
    return v;
  endfunction

  task automatic decode();
    int cnt = int'(be(44, 2));
    check("datagram length", 64'(pb.size()), 64'(66 + 48 * cnt));
    check("flow sequence", 64'(be(58, 4)), 64'(next_seq));
    next_seq += cnt;
    n_dgram++;
    for (int r = 0; r < cnt; r++) begin
      int o = 66 + 48 * r;
      key_t k = {be(o, 4), be(o + 4, 4), be(o + 32, 4), 8'(be(o + 12, 2)), 8'(be(o + 38, 1))};
      got_pkts[k] = (got_pkts.exists(k) ? got_pkts[k] : 0) + int'(be(o + 16, 4));
      got_oct[k]  = (got_oct.exists(k) ? got_oct[k] : 0) + longint'(be(o + 20, 4));
      n_records++;
    end
  endtask

  always @(negedge clk) begin
    #1;
    if (rst_n && out_wr && out_rdy) begin
      if (!in_pkt) begin
        in_pkt = 1; pb.delete();
      end else begin
        automatic int nb = 8;
        if (out_word.ctrl != 0) for (int k = 0; k < 8; k++) if (out_word.ctrl[7-k]) nb = k + 1;
        for (int k = 0; k < nb; k++) pb.push_back(out_word.data[63-8*k -: 8]);
        if (out_word.ctrl != 0) begin in_pkt = 0; decode(); end
      end
    end
  end

  // ---------------- sequence ----------------
  longint t0, t1;
  int max_line, over_lines, new1, upd2;
  int line_cnt [int];
  key_t seen [key_t];
  initial begin
    for (int s = 0; s < 8; s++) in_word[s] = '0;
    // 4000 distinct flows and their spread over the table lines
    while (seen.size() < NFLOWS) begin
      automatic int s = seen.size() % 4;
      automatic pkt_desc_t d = rnd_flow(s);
      automatic key_t k = key_of(d);
      if (!seen.exists(k)) begin
        automatic int line = int'(hash_of(d) & 64'hfff);
        seen[k] = k;
        flows[s].push_back(d);
        line_cnt[line] = line_cnt.exists(line) ? line_cnt[line] + 1 : 1;
      end
    end
    max_line = 0; over_lines = 0;
    foreach (line_cnt[l]) begin
      if (line_cnt[l] > max_line) max_line = line_cnt[l];
      if (line_cnt[l] > 8) over_lines++;
    end
    $display("%0d flows over %0d lines, fullest line %0d flows, %0d lines over 8",
             NFLOWS, line_cnt.size(), max_line, over_lines);

    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (!lookup_busy_init && !proc_busy_init);

    // round 1: create every flow
    fork round(0, 0); round(1, 0); round(2, 0); round(3, 0); join
    repeat (200) @(posedge clk);
    new1 = int'(reg_cnt_new);
    $display("after round 1: %0d records in memory, %0d created", reg_cnt_items, new1);
    check("round 1 accepted", 64'(reg_accepted_packets), 64'(NFLOWS));
    if (over_lines == 0) begin
      check("4000 records held", 64'(reg_cnt_items), 64'(NFLOWS));
      check("4000 created", 64'(new1), 64'(NFLOWS));
    end

    // round 2: every flow again, back to back on four inputs, minimum-size frames
    t0 = $time;
    fork round(0, 1); round(1, 1); round(2, 1); round(3, 1); join
    t1 = $time;
    repeat (200) @(posedge clk);
    upd2 = int'(reg_cnt_update);
    $display("round 2: %0d packets in %0d cycles, %0d updates", NFLOWS, (t1 - t0) / 8, upd2);
    check("four-port line rate (<= 21 cycles per packet)",
          64'((t1 - t0) / 8 <= NFLOWS * 21), 1);
    if (over_lines == 0) begin
      check("4000 updated", 64'(upd2), 64'(NFLOWS));
      check("still 4000 records", 64'(reg_cnt_items), 64'(NFLOWS));
    end
    check("no expiry yet", 64'(reg_cnt_delete), 0);

    // flush: expire everything
    reg_inactive_timeout = 0;
    wait (reg_cnt_items == 0 && !in_pkt);
    repeat (30 * INC) @(posedge clk);      // longer than the 20 ms age limit
    wait (!in_pkt);
    repeat (200) @(posedge clk);

    check("total packets", 64'(reg_total_packets), 64'(n_sent));
    check("records exported = inits", 64'(n_records), 64'(reg_cnt_new));
    check("new + update = accepted", 64'(reg_cnt_new + reg_cnt_update), 64'(n_sent));
    foreach (exp_pkts[k]) begin
      check("flow packets", 64'(got_pkts.exists(k) ? got_pkts[k] : -1), 64'(exp_pkts[k]));
      check("flow octets", 64'(got_oct.exists(k) ? got_oct[k] : -1), 64'(exp_oct[k]));
    end
    check("no unknown flows", 64'(got_pkts.size()), 64'(exp_pkts.size()));
    $display("datagrams %0d, records %0d, deletes %0d", n_dgram, n_records, reg_cnt_delete);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
