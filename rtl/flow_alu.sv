// flow_alu: the arithmetic of the flow processing unit.
//
// Combinational. For an Init command the new flow record starts from the
// packet record alone: start and end time are the packet's timestamp, the
// octet count is the packet length, the packet count is 1 and the TCP flags are
// the packet's flags. For an Update the end time is the packet's timestamp,
// octets and packets accumulate, and the TCP flags are ORed into the record's.
// In both cases TTL, addresses, ports, input interface, protocol and ToS are
// taken from the packet. These rules are the original design's.
//
// Counters wrap on overflow (octets 32 bits, packets 16 bits), which is this
// design's choice.
module flow_alu
  import nf_pkg::*;
(
  input  logic      init,
  input  flow_rec_t fr_in,
  input  pkt_rec_t  pr,
  output flow_rec_t fr_out
);
  always_comb begin
    fr_out           = fr_in;
    fr_out.start_ts  = init ? pr.timestamp : fr_in.start_ts;
    fr_out.end_ts    = pr.timestamp;
    fr_out.octets    = init ? 32'(pr.octets) : fr_in.octets + 32'(pr.octets);
    fr_out.pkts      = init ? 16'd1 : fr_in.pkts + 16'd1;
    fr_out.ttl       = pr.ttl;
    fr_out.tcp_flags = init ? pr.tcp_flags : (fr_in.tcp_flags | pr.tcp_flags);
    fr_out.src_ip    = pr.src_ip;
    fr_out.dst_ip    = pr.dst_ip;
    fr_out.src_port  = pr.src_port;
    fr_out.dst_port  = pr.dst_port;
    fr_out.in_if     = pr.in_if;
    fr_out.proto     = pr.proto;
    fr_out.tos       = pr.tos;
    fr_out.pad       = 8'h00;
  end
endmodule
