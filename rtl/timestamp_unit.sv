// timestamp_unit: SysUpTime counter; stamps every packet record.
//
// A fraction counter counts clock cycles from 0 to increment-1; when it wraps,
// the 32-bit millisecond counter (SysUpTime, time since start of monitoring)
// steps by one. Software sets increment, the number of clock cycles in one
// millisecond, to speed the counter up or slow it down so that it keeps in step
// with the host's clock. These rules are the original design's; an increment
// of 0 acting as 1 is this design's.
//
// Each incoming 3-word packet record leaves as a 4-word record with a new
// first word: Timestamp in [31:0], [63:32] zero. The time is taken when the
// whole record has been received.
//
// Interface: stream in/out, increment register input, timestamp and
// frac_timestamp register outputs.
module timestamp_unit
  import nf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  nf_word_t    in_word,
  input  logic        in_wr,
  output logic        in_rdy,
  output nf_word_t    out_word,
  output logic        out_wr,
  input  logic        out_rdy,
  input  logic [31:0] increment,
  output logic [31:0] timestamp,
  output logic [31:0] frac_timestamp
);
  // ---- counters ----
  logic [31:0] inc_m1;
  assign inc_m1 = (increment == 32'd0) ? 32'd0 : increment - 32'd1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      timestamp      <= '0;
      frac_timestamp <= '0;
    end else if (frac_timestamp >= inc_m1) begin
      frac_timestamp <= '0;
      timestamp      <= timestamp + 32'd1;
    end else begin
      frac_timestamp <= frac_timestamp + 32'd1;
    end
  end

  // ---- record path ----
  logic            rec_valid;
  logic [2:0][63:0] rec_words;
  logic [1:0]      rec_n;
  logic            ser_busy;
  logic            move;

  assign move = rec_valid && !ser_busy;

  rec_deser #(.MAXW(3)) u_deser (
    .clk, .rst_n, .in_word, .in_wr, .in_rdy,
    .rec_valid, .rec_words, .rec_n, .rec_take(move)
  );

  rec_ser #(.MAXW(4)) u_ser (
    .clk, .rst_n,
    .load     (move),
    .ld_words ({rec_words, {32'h0, timestamp}}),
    .ld_n     (3'(rec_n) + 3'd1),
    .busy     (ser_busy),
    .out_word, .out_wr, .out_rdy
  );
endmodule
