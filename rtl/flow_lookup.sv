// flow_lookup: finds the flow memory address of a packet from its hash.
//
// The table has 2**INDEX_BITS lines of WAYS fingerprints, one memory per way
// (the parallel memory modules of the original design). The hash is split in
// two: hash[INDEX_BITS-1:0] addresses a line, hash[INDEX_BITS+FP_BITS-1:
// INDEX_BITS] is the fingerprint. All WAYS fingerprints of the line are
// compared at once:
//   - match: the flow exists; command UPDATE at address {index, way};
//   - no match, free way: the fingerprint is written to the first free way;
//     command INIT at that address;
//   - no match, line full: an arbitrary way (a free-running counter picks it)
//     is overwritten; command INIT at that address, and the flow processing
//     unit exports the old record it held there.
// A delete command from the flow processing unit invalidates the fingerprint at
// its address and is then sent back to the flow processing unit in the same
// output stream, after every record issued before it.
// The split, the {index, way} address and the three outcomes are the original
// design's; the victim choice, the priority of deletes over packets and the
// clearing of the table after reset are this design's.
//
// Interface: pr_* takes 5-word records from the hash generator, del_* takes
// 1-word delete commands ({CMD_DELETE, address}); out_* carries 5-word
// {cmd, address} + record words (layout in nf_pkg) or 1-word deletes.
// Timing: after reset the table is cleared one line per cycle (busy_init).
// A record takes two cycles in the table (read, compare/write) plus its 5
// output cycles; lookups and sending overlap only through the output buffer.
module flow_lookup
  import nf_pkg::*;
#(
  parameter int unsigned INDEX_BITS = 12,
  parameter int unsigned WAYS       = 8,
  parameter int unsigned FP_BITS    = 36
) (
  input  logic        clk,
  input  logic        rst_n,
  input  nf_word_t    pr_word,
  input  logic        pr_wr,
  output logic        pr_rdy,
  input  nf_word_t    del_word,
  input  logic        del_wr,
  output logic        del_rdy,
  output nf_word_t    out_word,
  output logic        out_wr,
  input  logic        out_rdy,
  input  logic [31:0] debug_reg,
  output logic [31:0] debug_out,
  output logic        busy_init
);
  localparam int unsigned LINES = 1 << INDEX_BITS;
  localparam int unsigned WB    = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned AB    = INDEX_BITS + WB;

  typedef struct packed {
    logic               valid;
    logic [FP_BITS-1:0] fp;
  } entry_t;

  // ---- input buffers ----
  logic             pr_valid, pr_take;
  logic [4:0][63:0] pr_words;
  logic [2:0]       pr_n;
  logic             dl_valid, dl_take;
  logic [0:0][63:0] dl_words;
  logic [0:0]       dl_n;

  rec_deser #(.MAXW(5)) u_pr (
    .clk, .rst_n, .in_word(pr_word), .in_wr(pr_wr), .in_rdy(pr_rdy),
    .rec_valid(pr_valid), .rec_words(pr_words), .rec_n(pr_n), .rec_take(pr_take)
  );
  rec_deser #(.MAXW(1)) u_del (
    .clk, .rst_n, .in_word(del_word), .in_wr(del_wr), .in_rdy(del_rdy),
    .rec_valid(dl_valid), .rec_words(dl_words), .rec_n(dl_n), .rec_take(dl_take)
  );

  // ---- way memories ----
  typedef enum logic [1:0] {S_CLEAR, S_IDLE, S_LOOK} state_e;
  state_e state;

  logic [INDEX_BITS-1:0] rd_idx;
  entry_t                rd_q [WAYS];
  logic [WAYS-1:0]       wr_en;
  logic [INDEX_BITS-1:0] wr_idx;
  entry_t                wr_data;

  for (genvar w = 0; w < int'(WAYS); w++) begin : g_way
    entry_t mem [LINES];
    always_ff @(posedge clk) begin
      if (wr_en[w]) mem[wr_idx] <= wr_data;
      rd_q[w] <= mem[rd_idx];
    end
  end

  // ---- decision ----
  logic [63:0]           hash;
  logic [INDEX_BITS-1:0] idx;
  logic [FP_BITS-1:0]    fp;
  logic                  hit, has_free;
  logic [WB-1:0]         hit_way, free_way, victim, way;
  logic [WB-1:0]         rr;
  cmd_e                  cmd;

  assign hash = pr_words[0];
  assign idx  = hash[INDEX_BITS-1:0];
  assign fp   = hash[INDEX_BITS +: FP_BITS];

  always_comb begin
    hit      = 1'b0;
    hit_way  = '0;
    has_free = 1'b0;
    free_way = '0;
    for (int w = int'(WAYS) - 1; w >= 0; w--) begin
      if (rd_q[w].valid && rd_q[w].fp == fp) begin
        hit     = 1'b1;
        hit_way = WB'(w);
      end
      if (!rd_q[w].valid) begin
        has_free = 1'b1;
        free_way = WB'(w);
      end
    end
    victim = rr;
    if (hit) begin
      cmd = CMD_UPDATE;
      way = hit_way;
    end else if (has_free) begin
      cmd = CMD_INIT;
      way = free_way;
    end else begin
      cmd = CMD_INIT;
      way = victim;
    end
  end

  // ---- control ----
  logic                  ser_busy, ser_load;
  logic [4:0][63:0]      ser_words;
  logic [2:0]            ser_n;
  logic [INDEX_BITS-1:0] clr_idx;
  logic [AB-1:0]         del_addr;
  pkt_rec_t              pr;

  assign del_addr = dl_words[0][AB-1:0];
  assign busy_init = (state == S_CLEAR);
  always_comb begin
    pr           = pr_unpack3(pr_words[2], pr_words[3], pr_words[4]);
    pr.hash      = hash;
    pr.timestamp = pr_words[1][31:0];
  end

  always_comb begin
    wr_en     = '0;
    wr_idx    = idx;
    wr_data   = '{valid: 1'b1, fp: fp};
    rd_idx    = idx;
    ser_load  = 1'b0;
    ser_words = '0;
    ser_n     = 3'd5;
    pr_take   = 1'b0;
    dl_take   = 1'b0;
    unique case (state)
      S_CLEAR: begin
        wr_en   = '1;
        wr_idx  = clr_idx;
        wr_data = '0;
      end
      S_IDLE: begin
        if (dl_valid && !ser_busy) begin
          wr_en[del_addr[WB-1:0]] = 1'b1;
          wr_idx       = del_addr[AB-1:WB];
          wr_data      = '0;
          ser_load     = 1'b1;
          ser_words[0] = mk_cmd(CMD_DELETE, 32'(del_addr));
          ser_n        = 3'd1;
          dl_take      = 1'b1;
        end
      end
      S_LOOK: begin
        if (!ser_busy) begin
          wr_en[way] = 1'b1;  // rewriting a hit entry is harmless
          ser_load   = 1'b1;
          ser_words  = {lr_words(pr), mk_cmd(cmd, 32'({idx, way}))};
          pr_take    = 1'b1;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_CLEAR;
      clr_idx   <= '0;
      rr        <= '0;
      debug_out <= '0;
    end else begin
      rr        <= rr + 1'b1;
      debug_out <= debug_reg;
      unique case (state)
        S_CLEAR: begin
          clr_idx <= clr_idx + 1'b1;
          if (clr_idx == INDEX_BITS'(LINES - 1)) state <= S_IDLE;
        end
        S_IDLE: begin
          // a delete goes out this cycle; otherwise start a lookup
          if (!(dl_valid && !ser_busy) && pr_valid) state <= S_LOOK;
        end
        S_LOOK: if (!ser_busy) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  rec_ser #(.MAXW(5)) u_ser (
    .clk, .rst_n, .load(ser_load), .ld_words(ser_words), .ld_n(ser_n),
    .busy(ser_busy), .out_word, .out_wr, .out_rdy
  );
endmodule
