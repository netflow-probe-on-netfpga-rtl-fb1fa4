// flow_proc_tb: drives flow_proc (reduced to 16 records) the way the flow
// lookup unit does. Phase 1 sends random INIT, UPDATE and DELETE commands with
// random packet records, with expiry switched off, and checks every exported
// record against a reference model of the flow memory (INIT over a valid
// record exports it first; DELETE exports and frees). Phase 2 lowers the
// inactive timeout and advances the time: each delete request from the
// expiration process is checked, returned as a DELETE command, and the export
// checked, until the memory is empty. Phase 3 keeps one flow busy so only the
// active timeout can expire it. Counters and random back-pressure included.
module flow_proc_tb;
  import nf_pkg::*;

  localparam int AB = 4;
  localparam int N = 1 << AB;

  logic        clk = 0, rst_n = 0;
  nf_word_t    cmd_word, del_word, out_word;
  logic        cmd_wr = 0, cmd_rdy, del_wr, del_rdy = 0, out_wr, out_rdy = 0;
  logic [31:0] now_ms = 1000, active_timeout = '1, inactive_timeout = '1;
  logic [31:0] cnt_items, cnt_new, cnt_update, cnt_delete;
  logic        busy_init;
  int          checks = 0, failures = 0;

  flow_proc #(.ADDR_BITS(AB)) dut (.*);

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

  task automatic send(nf_word_t w);
    @(negedge clk);
    cmd_word = w; cmd_wr = 1;
    #1;
    while (!cmd_rdy) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 cmd_wr = 0;
  endtask

  // reference model
  logic      mv [N];
  flow_rec_t mr [N];
  flow_rec_t exp_q [$];
  int n_new = 0, n_upd = 0, n_del = 0;

  function automatic flow_rec_t model_alu(bit init, flow_rec_t f, pkt_rec_t p);
    flow_rec_t r;
    r.start_ts = init ? p.timestamp : f.start_ts;
    r.end_ts   = p.timestamp;
    r.octets   = init ? {16'h0, p.octets} : f.octets + {16'h0, p.octets};
    r.pkts     = init ? 16'd1 : f.pkts + 16'd1;
    r.ttl = p.ttl; r.tcp_flags = init ? p.tcp_flags : (f.tcp_flags | p.tcp_flags);
    r.src_ip = p.src_ip; r.dst_ip = p.dst_ip; r.src_port = p.src_port;
    r.dst_port = p.dst_port; r.in_if = p.in_if; r.proto = p.proto; r.tos = p.tos;
    r.pad = 0;
    return r;
  endfunction

  task automatic command(cmd_e c, int addr, pkt_rec_t p);
    send('{ctrl: (c == CMD_DELETE) ? CTRL_LAST : 8'h00, data: {24'h0, c, 32'(addr)}});
    if (c != CMD_DELETE) begin
      send('{ctrl: 8'h00, data: {32'h0, p.timestamp}});
      send('{ctrl: 8'h00, data: {p.ttl, p.tcp_flags, p.octets, 32'h0}});
      send('{ctrl: 8'h00, data: {p.src_ip, p.dst_ip}});
      send('{ctrl: CTRL_LAST, data: {p.src_port, p.dst_port, p.in_if, p.proto, p.tos, 8'h0}});
    end
    unique case (c)
      CMD_INIT: begin
        if (mv[addr]) exp_q.push_back(mr[addr]);
        mr[addr] = model_alu(1, mr[addr], p);
        mv[addr] = 1;
        n_new++;
      end
      CMD_UPDATE: begin
        mr[addr] = model_alu(0, mr[addr], p);
        n_upd++;
      end
      CMD_DELETE: begin
        if (mv[addr]) exp_q.push_back(mr[addr]);
        mv[addr] = 0;
        n_del++;
      end
      default: ;
    endcase
  endtask

  function automatic pkt_rec_t rnd_pr();
    pkt_rec_t p = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    p.timestamp = now_ms;
    return p;
  endfunction

  // export sink
  int pos = 0, n_exp = 0;
  logic [63:0] ew [4];
  always @(negedge clk) begin
    out_rdy = ($urandom % 3 != 0);
    #1;
    if (rst_n && out_wr && out_rdy) begin
      ew[pos] = out_word.data;
      check("export ctrl", 64'(out_word.ctrl), pos == 3 ? 64'(CTRL_LAST) : 0);
      if (pos == 3) begin
        flow_rec_t e;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected export");
        end else begin
          e = exp_q.pop_front();
          check("export w0", ew[0], e[255:192]);
          check("export w1", ew[1], e[191:128]);
          check("export w2", ew[2], e[127:64]);
          check("export w3", ew[3], e[63:0]);
        end
        n_exp++;
      end
      pos = (pos + 1) % 4;
    end
  end

  // delete requests from the expiration process
  int del_req [$];
  always @(negedge clk) begin
    del_rdy = ($urandom % 2 == 0);
    #1;
    if (rst_n && del_wr && del_rdy) begin
      check("delete request ctrl", 64'(del_word.ctrl), 64'(CTRL_LAST));
      check("delete request cmd", 64'(del_word.data[39:32]), 64'(CMD_DELETE));
      del_req.push_back(int'(del_word.data[AB-1:0]));
    end
  end

  task automatic serve_deletes(int max_cycles);
    int c = 0;
    while (c < max_cycles) begin
      if (del_req.size() != 0) begin
        int a = del_req.pop_front();
        check("expired address is valid", 64'(mv[a]), 1);
        command(CMD_DELETE, a, rnd_pr());
      end else begin
        @(posedge clk);
        c++;
      end
    end
  endtask

  initial begin
    int init_cycles = 0;
    cmd_word = '0;
    for (int i = 0; i < N; i++) begin mv[i] = 0; mr[i] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (busy_init) begin @(negedge clk); init_cycles++; end
    check("clear phase length", 64'(init_cycles), 64'(N));

    // phase 1: random commands, no expiry
    for (int i = 0; i < 300; i++) begin
      automatic int a = int'($urandom % N);
      automatic int r = int'($urandom % 10);
      if (i % 5 == 0) now_ms = now_ms + 1;
      if (r < 3) command(CMD_INIT, a, rnd_pr());
      else if (r < 8) begin
        if (mv[a]) command(CMD_UPDATE, a, rnd_pr());
        else       command(CMD_INIT, a, rnd_pr());
      end else command(CMD_DELETE, a, rnd_pr());
    end
    repeat (30) @(posedge clk);
    check("no expiry with timeouts off", 64'(del_req.size()), 0);
    check("exports phase 1", 64'(exp_q.size()), 0);
    check("cnt_new", 64'(cnt_new), 64'(n_new));
    check("cnt_update", 64'(cnt_update), 64'(n_upd));
    check("cnt_delete", 64'(cnt_delete), 64'(n_del));
    begin
      automatic int v = 0;
      for (int i = 0; i < N; i++) v += mv[i];
      check("cnt_items", 64'(cnt_items), 64'(v));
      check("memory not empty before expiry", 64'(v > 0), 1);
    end

    // phase 2: inactive timeout expires everything
    inactive_timeout = 32'd50;
    now_ms = now_ms + 100;
    serve_deletes(400);
    check("all expired", 64'(cnt_items), 0);
    check("exports phase 2", 64'(exp_q.size()), 0);

    // phase 3: a busy flow expires only by the active timeout
    inactive_timeout = 32'd50;
    active_timeout   = 32'd200;
    command(CMD_INIT, 5, rnd_pr());
    for (int t = 0; t < 60; t++) begin
      now_ms = now_ms + 10;              // never 50 ms idle
      if (mv[5]) command(CMD_UPDATE, 5, rnd_pr());
      else       command(CMD_INIT, 5, rnd_pr());
      serve_deletes(40);
    end
    check("active timeout expired the busy flow", 64'(n_del > 0 && cnt_delete > 0), 1);
    check("active timeout export count", 64'(n_exp >= 2), 1);
    repeat (50) @(posedge clk);
    check("exports phase 3", 64'(exp_q.size()), 0);
    $display("exports %0d", n_exp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
