// l3l4_extract_tb: feeds NetFPGA packets of many kinds into the parser and
// checks the packet records against values taken from the packet
// descriptions: TCP, UDP and ICMP over IPv4 (with and without IP options,
// short and long payloads, a non-first fragment), and packets that must be
// dropped (ARP, IPv6, IPv4 GRE, IP version 6 in an IPv4 EtherType). Checks the
// total and accepted packet counters, and that a burst of minimum-size packets
// is taken at one word per cycle when the output does not stall.
module l3l4_extract_tb;
  import nf_pkg::*;
  import tb_pkg::*;

  logic        clk = 0, rst_n = 0;
  nf_word_t    in_word, out_word;
  logic        in_wr = 0, in_rdy, out_wr, out_rdy = 0;
  logic [31:0] total_packets, accepted_packets;
  int          checks = 0, failures = 0;
  logic        stall = 1;

  l3l4_extract dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  logic [63:0] exp_q [$];
  int n_sent = 0, n_acc = 0;

  task automatic send(nf_word_t w);
    @(negedge clk);
    in_word = w; in_wr = 1;
    #1;
    while (!in_rdy) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 in_wr = 0;
  endtask

  task automatic send_pkt(pkt_desc_t d, bit acc, bit gaps);
    nf_word_t w [$];
    logic [7:0] b [$];
    frame_bytes(d, b);
    bytes_to_words(b, d.in_port, w);
    n_sent++;
    if (acc) begin
      logic [15:0] sp, dp;
      logic [7:0] fl;
      sp = d.sport; dp = d.dport; fl = 0;
      if (d.proto == 1) begin dp = d.sport; sp = 0; end   // type/code
      if (d.proto == 6) fl = d.tcp_flags;
      if (d.frag != 0) begin sp = 0; dp = 0; fl = 0; end
      exp_q.push_back({d.tos, 16'(b.size()), d.ttl, 16'h0, fl, 8'h0});
      exp_q.push_back({d.src_ip, d.dst_ip});
      exp_q.push_back({sp, dp, d.in_port[7:0], d.proto, 16'h0});
      n_acc++;
    end
    foreach (w[i]) begin
      if (gaps) while ($urandom % 4 == 0) @(posedge clk);
      send(w[i]);
    end
  endtask

  function automatic pkt_desc_t rnd_desc();
    pkt_desc_t d = default_desc();
    d.src_ip = $urandom; d.dst_ip = $urandom; d.sport = 16'($urandom); d.dport = 16'($urandom);
    d.tos = 8'($urandom); d.ttl = 8'($urandom); d.tcp_flags = 8'($urandom);
    d.in_port = 16'($urandom % 8);
    return d;
  endfunction

  int t0, t1;
  initial begin
    pkt_desc_t d;
    in_word = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      d = rnd_desc();
      d.payload = ($urandom % 3 == 0) ? int'($urandom % 300) : 0;
      unique case (i % 10)
        0, 1: d.proto = 6;
        2:    d.proto = 17;
        3:    begin d.proto = 1; d.sport = 16'h0800; end
        4:    begin d.proto = 6; d.ihl = 4'd7 + 4'(i % 3); end
        5:    begin d.proto = 17; d.frag = 13'd185; end
        6:    d.ethertype = 16'h0806;
        7:    d.ethertype = 16'h86dd;
        8:    d.proto = 47;
        9:    begin d.proto = 6; d.version = 6; end
      endcase
      send_pkt(d, (i % 10) <= 5, 1);
    end
    // back-to-back minimum-size packets, no stalls: 9 words each
    stall = 0;
    repeat (20) @(posedge clk);
    t0 = $time;
    for (int i = 0; i < 20; i++) begin
      d = rnd_desc();
      d.proto = (i % 2) ? 8'd6 : 8'd17;
      send_pkt(d, 1, 0);
    end
    t1 = $time;
    // 20 packets x 9 words at one word per cycle, small slack
    check("input rate", 64'((t1 - t0) / 10 <= 20 * 9 + 4), 1);
    repeat (50) @(posedge clk);
    check("total_packets", 64'(total_packets), 64'(n_sent));
    check("accepted_packets", 64'(accepted_packets), 64'(n_acc));
    check("all records out", 64'(exp_q.size()), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pos = 0;
  always @(negedge clk) begin
    out_rdy = !stall || ($urandom % 3 != 0);
    #1;
    if (rst_n && out_wr && out_rdy) begin
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected record word %h", out_word.data);
      end else
        check($sformatf("record word %0d", pos), out_word.data, exp_q.pop_front());
      check("ctrl", 64'(out_word.ctrl), pos == 2 ? 64'(CTRL_LAST) : 0);
      pos = (pos + 1) % 3;
    end
  end
endmodule
