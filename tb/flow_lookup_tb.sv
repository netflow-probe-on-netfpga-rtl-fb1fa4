// flow_lookup_tb: drives flow_lookup (reduced to 8 lines x 4 ways, 8-bit
// fingerprints) with packet records whose hashes are chosen so that lines
// fill up, and with delete commands for addresses that hold a fingerprint.
// A reference table in the testbench predicts each outcome: UPDATE at the way
// holding the fingerprint, INIT at the lowest free way, or, in a full line,
// INIT at some way of that line (the victim choice is free) which then holds
// the new fingerprint. Deletes must come back as a 1-word DELETE and free the
// way. The record words must leave in the FlowProc layout. Also checks the
// length of the clearing phase after reset and counts every outcome.
module flow_lookup_tb;
  import nf_pkg::*;

  localparam int IB = 3, W = 4, FB = 8;
  localparam int LINES = 1 << IB;

  logic        clk = 0, rst_n = 0;
  nf_word_t    pr_word, del_word, out_word;
  logic        pr_wr = 0, pr_rdy, del_wr = 0, del_rdy, out_wr, out_rdy = 0;
  logic [31:0] debug_reg = 32'h5a5a_0001, debug_out;
  logic        busy_init;
  int          checks = 0, failures = 0;

  flow_lookup #(.INDEX_BITS(IB), .WAYS(W), .FP_BITS(FB)) dut (.*);

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

  task automatic send_pr(nf_word_t w);
    @(negedge clk);
    pr_word = w; pr_wr = 1;
    #1;
    while (!pr_rdy) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 pr_wr = 0;
  endtask

  task automatic send_del(nf_word_t w);
    @(negedge clk);
    del_word = w; del_wr = 1;
    #1;
    while (!del_rdy) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 del_wr = 0;
  endtask

  // output collector
  logic [63:0] outq [$];
  logic [7:0]  ctrlq [$];
  always @(negedge clk) begin
    out_rdy = ($urandom % 3 != 0);
    #1;
    if (rst_n && out_wr && out_rdy) begin
      outq.push_back(out_word.data);
      ctrlq.push_back(out_word.ctrl);
    end
  end

  task automatic get_words(int n, ref logic [63:0] w [5]);
    for (int i = 0; i < n; i++) begin
      while (outq.size() == 0) @(posedge clk);
      w[i] = outq.pop_front();
      check("ctrl", 64'(ctrlq.pop_front()), (i == n - 1) ? 64'(CTRL_LAST) : 0);
    end
  endtask

  // reference table
  logic         tv [LINES][W];
  logic [FB-1:0] tf [LINES][W];
  int n_update = 0, n_init_free = 0, n_replace = 0, n_delete = 0;

  task automatic lookup(int line, logic [FB-1:0] fp);
    logic [63:0] hash, w [5];
    logic [31:0] ts;
    logic [7:0] ttl, fl, inif, pro, tos;
    logic [15:0] len, sp, dp;
    logic [31:0] sip, dip;
    int hit, freew;
    hash = {$urandom, $urandom};
    hash[IB+FB-1:0] = {fp, 3'(line)};
    ts = $urandom; ttl = 8'($urandom); fl = 8'($urandom); len = 16'($urandom);
    sip = $urandom; dip = $urandom; sp = 16'($urandom); dp = 16'($urandom);
    inif = 8'($urandom); pro = 8'($urandom); tos = 8'($urandom);
    send_pr('{ctrl: 8'h00, data: hash});
    send_pr('{ctrl: 8'h00, data: {32'h0, ts}});
    send_pr('{ctrl: 8'h00, data: {tos, len, ttl, 16'h0, fl, 8'h0}});
    send_pr('{ctrl: 8'h00, data: {sip, dip}});
    send_pr('{ctrl: CTRL_LAST, data: {sp, dp, inif, pro, 16'h0}});
    get_words(5, w);
    hit = -1; freew = -1;
    for (int k = W - 1; k >= 0; k--) begin
      if (tv[line][k] && tf[line][k] == fp) hit = k;
      if (!tv[line][k]) freew = k;
    end
    check("address line", 64'(w[0][31:2]), 64'(line));
    if (hit >= 0) begin
      check("cmd update", 64'(w[0][39:32]), 64'(CMD_UPDATE));
      check("hit way", 64'(w[0][1:0]), 64'(hit));
      n_update++;
    end else if (freew >= 0) begin
      check("cmd init", 64'(w[0][39:32]), 64'(CMD_INIT));
      check("free way", 64'(w[0][1:0]), 64'(freew));
      tv[line][freew] = 1; tf[line][freew] = fp;
      n_init_free++;
    end else begin
      check("cmd init (replace)", 64'(w[0][39:32]), 64'(CMD_INIT));
      tf[line][w[0][1:0]] = fp;
      n_replace++;
    end
    check("word1 ts", w[1], {32'h0, ts});
    check("word2", w[2], {ttl, fl, len, 32'h0});
    check("word3", w[3], {sip, dip});
    check("word4", w[4], {sp, dp, inif, pro, tos, 8'h0});
  endtask

  task automatic del(int line, int way);
    logic [63:0] w [5];
    send_del('{ctrl: CTRL_LAST, data: {24'h0, CMD_DELETE, 32'({3'(line), 2'(way)})}});
    get_words(1, w);
    check("delete returned", w[0], {24'h0, CMD_DELETE, 32'({3'(line), 2'(way)})});
    tv[line][way] = 0;
    n_delete++;
  endtask

  initial begin
    int init_cycles = 0;
    pr_word = '0; del_word = '0;
    for (int l = 0; l < LINES; l++) for (int k = 0; k < W; k++) tv[l][k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (busy_init) begin @(negedge clk); init_cycles++; end
    check("clear phase length", 64'(init_cycles), 64'(LINES));
    check("debug register", 64'(debug_out), 64'(debug_reg));
    for (int i = 0; i < 300; i++) begin
      automatic int line = int'($urandom % 3);       // three busy lines fill up
      automatic logic [FB-1:0] fp = 8'($urandom % 7);
      if (i % 9 == 8) begin
        automatic int k = int'($urandom % W);
        if (tv[line][k]) del(line, k);
      end else begin
        lookup(line, fp);
      end
    end
    check("saw update", 64'(n_update > 0), 1);
    check("saw init into free way", 64'(n_init_free > 0), 1);
    check("saw replace", 64'(n_replace > 0), 1);
    check("saw delete", 64'(n_delete > 0), 1);
    $display("updates %0d inits %0d replaces %0d deletes %0d", n_update, n_init_free, n_replace, n_delete);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
