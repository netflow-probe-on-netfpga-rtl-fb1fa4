// netflow_probe: NetFlow v5 probe data path (top level).
//
// Packets from NUM_IN input queues (four Gigabit Ethernet ports and four host
// queues on the NetFPGA card) are merged and pass a chain of units:
//   input_arbiter  -> l3l4_extract -> timestamp_unit -> hash_gen
//                  -> flow_lookup <-> flow_proc -> record_wrapper -> out
// l3l4_extract reduces each TCP/UDP/ICMP IPv4 packet to a 3-word packet
// record; timestamp_unit and hash_gen prepend the SysUpTime and the CRC-64 of
// the flow key; flow_lookup maps the hash to a flow memory address through a
// 2**INDEX_BITS x WAYS fingerprint table and issues INIT or UPDATE; flow_proc
// keeps the flow records, expires them by timeout through a delete that makes
// a round trip through flow_lookup, and exports them; record_wrapper sends
// them as NetFlow v5 datagrams. The chain and the units' jobs are the
// original design's; the buses are 64-bit data + 8-bit ctrl + write + ready.
//
// The units' software registers are brought out as plain ports: reg_* inputs
// are the read/write registers, reg_* outputs the read-only ones. The current
// SysUpTime is wired from the timestamp unit to flow_proc (timeouts) and
// record_wrapper (record age, v5 header), which is this design's choice.
//
// Timing: after reset the fingerprint table and the flow memory are cleared
// (2**INDEX_BITS and 2**(INDEX_BITS+log2 WAYS) cycles, lookup_busy_init and
// proc_busy_init high); until then records wait in the pipeline. Every unit
// takes one word per cycle; a minimum-size packet (9 words with its module
// header) is reduced to one record in 9 cycles plus one idle cycle in the
// arbiter.
module netflow_probe
  import nf_pkg::*;
#(
  parameter int unsigned NUM_IN      = 8,
  parameter int unsigned INDEX_BITS  = 12,
  parameter int unsigned WAYS        = 8,
  parameter int unsigned FP_BITS     = 36,
  parameter int unsigned MAX_RECORDS = 15,
  parameter int unsigned AGE_MS      = 20
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // input queues
  input  nf_word_t [NUM_IN-1:0] in_word,
  input  logic     [NUM_IN-1:0] in_wr,
  output logic     [NUM_IN-1:0] in_rdy,
  // NetFlow v5 datagrams to the output queues
  output nf_word_t              out_word,
  output logic                  out_wr,
  input  logic                  out_rdy,
  // L3L4 extract registers
  output logic [31:0]           reg_total_packets,
  output logic [31:0]           reg_accepted_packets,
  // timestamp registers
  input  logic [31:0]           reg_ts_increment,
  output logic [31:0]           reg_timestamp,
  output logic [31:0]           reg_frac_timestamp,
  // hash generator registers (INITSEED1:INITSEED0)
  input  logic [63:0]           reg_hash_seed,
  // flow lookup registers
  input  logic [31:0]           reg_lookup_debug,
  output logic [31:0]           reg_lookup_debug_rd,
  output logic                  lookup_busy_init,
  // flow processing registers
  input  logic [31:0]           reg_active_timeout,
  input  logic [31:0]           reg_inactive_timeout,
  output logic [31:0]           reg_cnt_items,
  output logic [31:0]           reg_cnt_new,
  output logic [31:0]           reg_cnt_update,
  output logic [31:0]           reg_cnt_delete,
  output logic                  proc_busy_init,
  // record wrapper registers
  input  logic [31:0]           reg_src_ip,
  input  logic [31:0]           reg_dst_ip,
  input  logic [31:0]           reg_srcdst_port,
  input  logic [31:0]           reg_epoch_seconds,
  input  logic [7:0]            reg_output_port,
  input  logic [47:0]           reg_src_mac,
  input  logic [47:0]           reg_dst_mac
);
  localparam int unsigned WB = (WAYS > 1) ? $clog2(WAYS) : 1;

  nf_word_t arb_w, ext_w, ts_w, hash_w, lk_w, del_w, fp_w;
  logic     arb_wr, ext_wr, ts_wr, hash_wr, lk_wr, del_wr, fp_wr;
  logic     arb_rdy, ext_rdy, ts_rdy, hash_rdy, lk_rdy, del_rdy, fp_rdy;

  input_arbiter #(.NUM_IN(NUM_IN)) u_arb (
    .clk, .rst_n, .in_word, .in_wr, .in_rdy,
    .out_word(arb_w), .out_wr(arb_wr), .out_rdy(arb_rdy)
  );

  l3l4_extract u_ext (
    .clk, .rst_n,
    .in_word(arb_w), .in_wr(arb_wr), .in_rdy(arb_rdy),
    .out_word(ext_w), .out_wr(ext_wr), .out_rdy(ext_rdy),
    .total_packets(reg_total_packets), .accepted_packets(reg_accepted_packets)
  );

  timestamp_unit u_ts (
    .clk, .rst_n,
    .in_word(ext_w), .in_wr(ext_wr), .in_rdy(ext_rdy),
    .out_word(ts_w), .out_wr(ts_wr), .out_rdy(ts_rdy),
    .increment(reg_ts_increment), .timestamp(reg_timestamp),
    .frac_timestamp(reg_frac_timestamp)
  );

  hash_gen u_hash (
    .clk, .rst_n,
    .in_word(ts_w), .in_wr(ts_wr), .in_rdy(ts_rdy),
    .out_word(hash_w), .out_wr(hash_wr), .out_rdy(hash_rdy),
    .init_seed(reg_hash_seed)
  );

  flow_lookup #(.INDEX_BITS(INDEX_BITS), .WAYS(WAYS), .FP_BITS(FP_BITS)) u_lookup (
    .clk, .rst_n,
    .pr_word(hash_w), .pr_wr(hash_wr), .pr_rdy(hash_rdy),
    .del_word(del_w), .del_wr(del_wr), .del_rdy(del_rdy),
    .out_word(lk_w), .out_wr(lk_wr), .out_rdy(lk_rdy),
    .debug_reg(reg_lookup_debug), .debug_out(reg_lookup_debug_rd),
    .busy_init(lookup_busy_init)
  );

  flow_proc #(.ADDR_BITS(INDEX_BITS + WB)) u_proc (
    .clk, .rst_n,
    .cmd_word(lk_w), .cmd_wr(lk_wr), .cmd_rdy(lk_rdy),
    .del_word(del_w), .del_wr(del_wr), .del_rdy(del_rdy),
    .out_word(fp_w), .out_wr(fp_wr), .out_rdy(fp_rdy),
    .now_ms(reg_timestamp),
    .active_timeout(reg_active_timeout), .inactive_timeout(reg_inactive_timeout),
    .cnt_items(reg_cnt_items), .cnt_new(reg_cnt_new),
    .cnt_update(reg_cnt_update), .cnt_delete(reg_cnt_delete),
    .busy_init(proc_busy_init)
  );

  record_wrapper #(.MAX_RECORDS(MAX_RECORDS), .AGE_MS(AGE_MS)) u_wrap (
    .clk, .rst_n,
    .in_word(fp_w), .in_wr(fp_wr), .in_rdy(fp_rdy),
    .out_word, .out_wr, .out_rdy,
    .now_ms(reg_timestamp),
    .src_ip(reg_src_ip), .dst_ip(reg_dst_ip), .srcdst_port(reg_srcdst_port),
    .epoch_seconds(reg_epoch_seconds), .output_port(reg_output_port),
    .src_mac(reg_src_mac), .dst_mac(reg_dst_mac)
  );
endmodule
