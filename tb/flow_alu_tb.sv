// flow_alu_tb: random Init and Update operations on flow_alu, each compared
// with the expected record worked out field by field in the testbench.
module flow_alu_tb;
  import nf_pkg::*;

  logic      init;
  flow_rec_t fr_in, fr_out;
  pkt_rec_t  pr;
  int        checks = 0, failures = 0;

  flow_alu dut (.init, .fr_in, .pr, .fr_out);

  initial begin
    #100000;
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

  initial begin
    for (int t = 0; t < 400; t++) begin
      init  = t[0];
      fr_in = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      pr    = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      if (t % 7 == 3) fr_in.pkts = 16'hffff;  // wrap-around case
      #1;
      check("start", 64'(fr_out.start_ts), 64'(init ? pr.timestamp : fr_in.start_ts));
      check("end",   64'(fr_out.end_ts),   64'(pr.timestamp));
      check("oct",   64'(fr_out.octets),
            init ? 64'(pr.octets) : 64'(32'(fr_in.octets + {16'h0, pr.octets})));
      check("pkts",  64'(fr_out.pkts),     init ? 64'd1 : 64'(16'(fr_in.pkts + 1)));
      check("ttl",   64'(fr_out.ttl),      64'(pr.ttl));
      check("flags", 64'(fr_out.tcp_flags),
            64'(init ? pr.tcp_flags : (fr_in.tcp_flags | pr.tcp_flags)));
      check("key",   {fr_out.src_ip, fr_out.dst_ip}, {pr.src_ip, pr.dst_ip});
      check("l4",    64'({fr_out.src_port, fr_out.dst_port, fr_out.in_if, fr_out.proto, fr_out.tos}),
            64'({pr.src_port, pr.dst_port, pr.in_if, pr.proto, pr.tos}));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
