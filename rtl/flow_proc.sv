// flow_proc: flow memory, create/update/delete processing and expiration.
//
// The flow memory holds 2**ADDR_BITS flow records (layout: flow_rec_t in
// nf_pkg), each stored with a valid bit. It is a dual-port memory: port A
// serves the command process, port B the expiration process, which run in
// parallel. After reset port A clears the valid bits, one entry per cycle
// (2**ADDR_BITS cycles, busy_init high); commands wait until it is done.
//
// Command process (port A), one command from the flow lookup unit at a time:
//   INIT   - the Flow ALU builds a new record from the packet record. If the
//            address already holds a valid record (the lookup replaced a
//            fingerprint in a full line), that old record is exported first.
//   UPDATE - the Flow ALU folds the packet into the stored record.
//   DELETE - the stored record is read, invalidated and exported.
// Each command reads the record in one cycle and writes it back (or exports
// it) in the next, waiting there while the export buffer is full.
//
// Expiration process (port B) reads one record per cycle, walking the whole
// memory in a loop. A valid record is expired when now_ms - end time exceeds
// the inactive timeout or now_ms - start time exceeds the active timeout. For
// such a record it sends {CMD_DELETE, address} to the lookup unit and pauses;
// the lookup unit removes the fingerprint and passes the delete back in its
// command stream, where the command process exports the record. Because the
// delete travels behind every packet already looked up, no lock between the
// two processes is needed. This three-step protocol is the original design's;
// the expiry comparisons, one outstanding delete at a time and the export of a
// replaced record are this design's choices. A record updated in the very
// cycle the scan reads it can be judged on its previous end time; it is then
// exported early, never lost.
//
// Exported records leave as 4 words (start/end time; octets, packets, TTL,
// TCP flags; addresses; ports, input, protocol, ToS).
// Counters: cnt_items = valid records, cnt_new/cnt_update/cnt_delete = INIT,
// UPDATE and DELETE commands received.
module flow_proc
  import nf_pkg::*;
#(
  parameter int unsigned ADDR_BITS = 15
) (
  input  logic        clk,
  input  logic        rst_n,
  input  nf_word_t    cmd_word,
  input  logic        cmd_wr,
  output logic        cmd_rdy,
  output nf_word_t    del_word,
  output logic        del_wr,
  input  logic        del_rdy,
  output nf_word_t    out_word,
  output logic        out_wr,
  input  logic        out_rdy,
  input  logic [31:0] now_ms,
  input  logic [31:0] active_timeout,
  input  logic [31:0] inactive_timeout,
  output logic [31:0] cnt_items,
  output logic [31:0] cnt_new,
  output logic [31:0] cnt_update,
  output logic [31:0] cnt_delete,
  output logic        busy_init
);
  localparam int unsigned N = 1 << ADDR_BITS;

  // ---- command input ----
  logic             c_valid, c_take;
  logic [4:0][63:0] c_words;
  logic [2:0]       c_n;

  rec_deser #(.MAXW(5)) u_cmd (
    .clk, .rst_n, .in_word(cmd_word), .in_wr(cmd_wr), .in_rdy(cmd_rdy),
    .rec_valid(c_valid), .rec_words(c_words), .rec_n(c_n), .rec_take(c_take)
  );

  // ---- flow memory ----
  typedef struct packed {
    logic      valid;
    flow_rec_t rec;
  } entry_t;

  entry_t               mem [N];
  logic [ADDR_BITS-1:0] a_addr, b_addr, a_waddr, clr_addr;
  entry_t               a_q, b_q;
  logic                 a_we;
  entry_t               a_wd;

  always_ff @(posedge clk) begin
    if (a_we) mem[a_waddr] <= a_wd;
    a_q <= mem[a_addr];
  end
  always_ff @(posedge clk) b_q <= mem[b_addr];

  // ---- command process ----
  logic      a_exec;  // 0: waiting for a command, 1: executing it
  cmd_e      cmd;
  pkt_rec_t  pr;
  logic      v_old;
  logic      init_eff;
  logic      export_old;
  flow_rec_t alu_out;
  logic      out_busy, out_load;
  flow_rec_t out_rec;
  logic [3:0][63:0] out_words;

  assign a_addr   = c_words[0][ADDR_BITS-1:0];
  assign cmd      = cmd_e'(c_words[0][39:32]);
  assign pr       = lr_unpack(c_words[1], c_words[2], c_words[3], c_words[4]);
  assign v_old    = a_q.valid;
  assign init_eff = (cmd == CMD_INIT) || !v_old;

  flow_alu u_alu (.init(init_eff), .fr_in(a_q.rec), .pr(pr), .fr_out(alu_out));

  always_comb begin
    a_we       = 1'b0;
    a_waddr    = a_addr;
    a_wd       = '{valid: 1'b1, rec: alu_out};
    c_take     = 1'b0;
    out_load   = 1'b0;
    out_rec    = a_q.rec;
    export_old = 1'b0;
    if (busy_init) begin
      a_we    = 1'b1;
      a_waddr = clr_addr;
      a_wd    = '0;
    end else if (a_exec) begin
      unique case (cmd)
        CMD_INIT, CMD_UPDATE: begin
          export_old = (cmd == CMD_INIT) && v_old;
          if (!(export_old && out_busy)) begin
            a_we     = 1'b1;
            c_take   = 1'b1;
            out_load = export_old;
          end
        end
        CMD_DELETE: begin
          if (!(v_old && out_busy)) begin
            a_we     = v_old;
            a_wd     = '{valid: 1'b0, rec: a_q.rec};
            c_take   = 1'b1;
            out_load = v_old;
          end
        end
        default: c_take = 1'b1;
      endcase
    end
  end

  always_comb
    for (int i = 0; i < 4; i++) out_words[i] = out_rec[255-64*i -: 64];

  // ---- expiration process ----
  logic                 del_pending;
  logic                 del_busy, del_load;
  logic [ADDR_BITS-1:0] scan_addr, s_addr;
  logic                 s_v;
  logic                 scan_en;
  logic                 expired;

  assign scan_en  = !del_pending && !del_busy;
  assign b_addr   = scan_addr;
  assign expired  = (now_ms - b_q.rec.end_ts)   > inactive_timeout ||
                    (now_ms - b_q.rec.start_ts) > active_timeout;
  assign del_load = scan_en && s_v && b_q.valid && expired;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_exec      <= 1'b0;
      busy_init   <= 1'b1;
      clr_addr    <= '0;
      cnt_items   <= '0;
      cnt_new     <= '0;
      cnt_update  <= '0;
      cnt_delete  <= '0;
      del_pending <= 1'b0;
      scan_addr   <= '0;
      s_addr      <= '0;
      s_v         <= 1'b0;
    end else begin
      // clearing after reset, then command process
      if (busy_init) begin
        clr_addr <= clr_addr + 1'b1;
        if (clr_addr == ADDR_BITS'(N - 1)) busy_init <= 1'b0;
      end else if (!a_exec) begin
        if (c_valid) a_exec <= 1'b1;
      end else if (c_take) begin
        a_exec <= 1'b0;
        unique case (cmd)
          CMD_INIT, CMD_UPDATE: begin
            if (!v_old) cnt_items <= cnt_items + 32'd1;
            if (cmd == CMD_INIT) cnt_new <= cnt_new + 32'd1;
            else                 cnt_update <= cnt_update + 32'd1;
          end
          CMD_DELETE: begin
            if (v_old) cnt_items <= cnt_items - 32'd1;
            cnt_delete  <= cnt_delete + 32'd1;
            del_pending <= 1'b0;
          end
          default: ;
        endcase
      end
      // expiration process
      if (scan_en && !busy_init) begin
        if (del_load) begin
          del_pending <= 1'b1;
          scan_addr   <= s_addr + 1'b1;
          s_v         <= 1'b0;
        end else begin
          scan_addr <= scan_addr + 1'b1;
          s_addr    <= scan_addr;
          s_v       <= 1'b1;
        end
      end else begin
        s_v <= 1'b0;
      end
    end
  end

  rec_ser #(.MAXW(4)) u_out (
    .clk, .rst_n, .load(out_load), .ld_words(out_words), .ld_n(3'd4),
    .busy(out_busy), .out_word, .out_wr, .out_rdy
  );

  rec_ser #(.MAXW(1)) u_del (
    .clk, .rst_n, .load(del_load), .ld_words(mk_cmd(CMD_DELETE, 32'(s_addr))),
    .ld_n(1'b1), .busy(del_busy), .out_word(del_word), .out_wr(del_wr), .out_rdy(del_rdy)
  );
endmodule
