// input_arbiter_tb: eight sources send packets of random length (module header
// word, data words, marked last word) with random gaps; the sink applies random
// back-pressure. Every word carries its source and packet number, so the sink
// checks that packets leave whole and unmixed, in order per source, and that
// all packets arrive. A second phase with all eight sources loaded checks the
// round-robin order of the grants.
module input_arbiter_tb;
  import nf_pkg::*;

  localparam int N = 8;
  localparam int PKTS = 12;  // per source, phase 1

  logic               clk = 0, rst_n = 0;
  nf_word_t [N-1:0]   in_word;
  logic     [N-1:0]   in_wr = '0, in_rdy;
  nf_word_t           out_word;
  logic               out_wr, out_rdy = 0;
  int                 checks = 0, failures = 0;
  int                 phase = 1;

  input_arbiter #(.NUM_IN(N)) dut (.*);

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

  // word: [63:56] source, [55:40] packet number, [39:32] word index, [31:0] length
  function automatic nf_word_t mk(int src, int pkt, int idx, int len);
    nf_word_t w;
    w.data = {8'(src), 16'(pkt), 8'(idx), 32'(len)};
    w.ctrl = (idx == 0) ? 8'hff : (idx == len - 1) ? 8'h04 : 8'h00;
    return w;
  endfunction

  task automatic send(int s, nf_word_t w);
    @(negedge clk);
    in_word[s] = w; in_wr[s] = 1;
    #1;
    while (!in_rdy[s]) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 in_wr[s] = 0;
  endtask

  task automatic source(int s, int first, int count, bit gaps);
    for (int p = first; p < first + count; p++) begin
      int len = 3 + int'($urandom % 6);
      for (int i = 0; i < len; i++) begin
        if (gaps) while ($urandom % 4 == 0) @(posedge clk);
        send(s, mk(s, p, i, len));
      end
    end
  endtask

  int next_pkt [N];
  int got_pkts = 0;
  int cur_src = -1, cur_pkt, cur_idx, cur_len;
  int order [$];

  initial begin
    for (int s = 0; s < N; s++) in_word[s] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int s = 0; s < N; s++) begin
      automatic int ss = s;
      fork source(ss, 0, PKTS, 1); join_none
    end
    wait (got_pkts == N * PKTS);
    // phase 2: all sources loaded at once, no gaps
    phase = 2;
    order.delete();
    repeat (5) @(posedge clk);
    for (int s = 0; s < N; s++) begin
      automatic int ss = s;
      fork source(ss, PKTS, 3, 0); join_none
    end
    wait (got_pkts == N * (PKTS + 3));
    // after the first grant the sources must follow each other in rotation
    for (int i = 1; i < order.size(); i++)
      check("round robin", 64'(order[i]), 64'((order[i-1] + 1) % N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    out_rdy = (phase == 2) || ($urandom % 3 != 0);
    #1;
    if (rst_n && out_wr && out_rdy) begin
      int src, pkt, idx, len;
      {src, pkt, idx, len} = {24'h0, out_word.data[63:56], 16'h0, out_word.data[55:40],
                              24'h0, out_word.data[39:32], out_word.data[31:0]};
      if (cur_src < 0) begin
        check("packet starts with header", 64'(idx), 0);
        check("packet order per source", 64'(pkt), 64'(next_pkt[src]));
        cur_src = src; cur_pkt = pkt; cur_idx = 0; cur_len = len;
        order.push_back(src);
      end else begin
        check("same source inside packet", 64'(src), 64'(cur_src));
        check("same packet", 64'(pkt), 64'(cur_pkt));
        check("word index", 64'(idx), 64'(cur_idx));
      end
      check("ctrl", 64'(out_word.ctrl), 64'(mk(src, pkt, idx, len).ctrl));
      cur_idx++;
      if (idx == len - 1) begin
        next_pkt[src]++;
        got_pkts++;
        cur_src = -1;
      end
    end
  end
endmodule
