// hash_gen_tb: sends random 4-word records (timestamp word + 3 packet-record
// words) and checks that each leaves as the same words behind a first word
// equal to a bit-serial CRC-64 of SrcIP, DstIP, SrcPort, DstPort, input and
// protocol, seeded with init_seed. The seed changes half way. Also checks
// that fields outside the key do not change the hash and that the unit keeps
// one word per cycle when neither side stalls.
module hash_gen_tb;
  import nf_pkg::*;
  import tb_pkg::*;

  localparam int NREC = 80;

  logic        clk = 0, rst_n = 0;
  nf_word_t    in_word, out_word;
  logic        in_wr = 0, in_rdy, out_wr, out_rdy = 0;
  logic [63:0] init_seed = 64'h0123_4567_89ab_cdef;
  int          checks = 0, failures = 0;
  logic        stall = 1;

  hash_gen dut (.*);

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

  logic [63:0] exp_q [$];

  task automatic send(nf_word_t w);
    @(negedge clk);
    in_word = w; in_wr = 1;
    #1;
    while (!in_rdy) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 in_wr = 0;
  endtask

  int t_first, t_last;
  initial begin
    in_word = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < NREC; r++) begin
      pkt_rec_t p;
      logic [63:0] w [4];
      p = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      if (r % 2 == 1) begin  // same key as the previous record, other fields differ
        p.src_ip = exp_q[exp_q.size()-5 + 3][63:32];
        p.dst_ip = exp_q[exp_q.size()-5 + 3][31:0];
        {p.src_port, p.dst_port, p.in_if, p.proto} = exp_q[exp_q.size()-1][63:16];
      end
      if (r == NREC / 2) begin
        // let the pipeline drain before changing the seed
        while (exp_q.size() != 0) @(posedge clk);
        init_seed = 64'hfeed_beef_0000_1111;
      end
      w[0] = {32'h0, p.timestamp};
      w[1] = pr_word0(p);
      w[2] = pr_word1(p);
      w[3] = pr_word2(p);
      exp_q.push_back(ref_crc64(init_seed, p.src_ip, p.dst_ip, p.src_port, p.dst_port,
                                p.in_if, p.proto));
      for (int k = 0; k < 4; k++) exp_q.push_back(w[k]);
      if (r % 2 == 1)
        check("hash ignores non-key fields", exp_q[exp_q.size()-5], exp_q[exp_q.size()-10]);
      for (int k = 0; k < 4; k++) begin
        if (stall) while ($urandom % 3 == 0) @(posedge clk);
        send('{ctrl: (k == 3) ? CTRL_LAST : 8'h00, data: w[k]});
      end
      if (r == NREC - 11) stall = 0;
    end
  end

  int got = 0, pos = 0, nwords_fast = 0;
  always @(negedge clk) begin
    out_rdy = !stall || ($urandom % 4 != 0);
    #1;
    if (rst_n && out_wr && out_rdy) begin
      check(pos == 0 ? "hash" : "payload", out_word.data, exp_q.pop_front());
      check("ctrl", 64'(out_word.ctrl), pos == 4 ? 64'(CTRL_LAST) : 0);
      if (!stall) begin
        if (nwords_fast == 0) t_first = $time;
        nwords_fast++;
        t_last = $time;
      end
      if (pos == 4) got++;
      pos = (pos + 1) % 5;
      if (got == NREC) begin
        // last 10 records unstalled: 4 words in, 5 out, at most 6 cycles a record
        check("rate", 64'((t_last - t_first) / 10 <= (nwords_fast / 5) * 6), 1);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
