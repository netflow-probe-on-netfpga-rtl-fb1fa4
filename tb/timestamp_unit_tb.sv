// timestamp_unit_tb: checks the millisecond counter against a cycle-accurate
// reference (increment cycles per millisecond, with a change of increment on
// the fly), and that each 3-word record leaves unchanged behind a new first
// word carrying the counter value of the moment the record was complete,
// under random gaps on the input and random back-pressure on the output.
// Inputs change on the falling clock edge; a word counts as transferred when
// write and ready are both high just before the rising edge.
module timestamp_unit_tb;
  import nf_pkg::*;

  localparam int NREC = 60;

  logic        clk = 0, rst_n = 0;
  nf_word_t    in_word, out_word;
  logic        in_wr = 0, in_rdy, out_wr, out_rdy = 0;
  logic [31:0] increment = 32'd10, timestamp, frac_timestamp;
  int          checks = 0, failures = 0;

  timestamp_unit dut (.*);

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

  // cycle-accurate reference of the counter
  logic [31:0] ref_ms = 0, ref_frac = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      ref_ms <= 0; ref_frac <= 0;
    end else if (ref_frac >= increment - 1) begin
      ref_frac <= 0; ref_ms <= ref_ms + 1;
    end else ref_frac <= ref_frac + 1;
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (timestamp !== ref_ms || frac_timestamp !== ref_frac) begin
      failures++;
      $display("FAIL counter %0d/%0d vs %0d/%0d", timestamp, frac_timestamp, ref_ms, ref_frac);
    end
  end

  logic [63:0] sent [$];
  logic [31:0] stamp_q [$];

  task automatic send(nf_word_t w);
    @(negedge clk);
    in_word = w; in_wr = 1;
    #1;
    while (!in_rdy) begin @(negedge clk); #1; end
    sent.push_back(w.data);
    if (w.ctrl != 0) stamp_q.push_back(ref_ms);
    @(posedge clk);
    #1 in_wr = 0;
  endtask

  initial begin
    in_word = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (20) @(posedge clk);
    for (int r = 0; r < NREC; r++) begin
      for (int k = 0; k < 3; k++) begin
        nf_word_t w;
        while ($urandom % 3 == 0) @(posedge clk);
        w.data = {$urandom, $urandom};
        w.ctrl = (k == 2) ? CTRL_LAST : 8'h00;
        send(w);
      end
      if (r == NREC / 2) increment = 32'd4;
    end
  end

  // sink
  int got = 0, pos = 0;
  logic [31:0] last_ts = 0, lo;
  always @(negedge clk) begin
    out_rdy = ($urandom % 4 != 0);
    #1;
    if (rst_n && out_wr && out_rdy) begin
      if (pos == 0) begin
        lo = stamp_q.pop_front();
        check("ts word hi", out_word.data[63:32], 0);
        check("ts lower bound", 64'(out_word.data[31:0] >= lo), 1);
        check("ts upper bound", 64'(out_word.data[31:0] <= ref_ms), 1);
        check("ts monotonic", 64'(out_word.data[31:0] >= last_ts), 1);
        last_ts = out_word.data[31:0];
        check("ctrl first", 64'(out_word.ctrl), 0);
      end else begin
        check("payload", out_word.data, sent.pop_front());
        check("ctrl", 64'(out_word.ctrl), pos == 3 ? 64'(CTRL_LAST) : 0);
        if (pos == 3) got++;
      end
      pos = (pos + 1) % 4;
      if (got == NREC) begin
        check("timestamp advanced", 64'(last_ts > 10), 1);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
