// cpack_line_packer: gathers the compressed pairs of one cache line into a
// single bit-packed compressed line.
//
// A line of LINE_WORDS 32-bit words (16 words = 64 bytes by default) arrives
// as LINE_WORDS/2 compressed pairs from the compressor, one pair per cycle
// with in_valid high; in_first marks the first pair of a line. Each pair is
// placed directly after the previous one, first bit at the top of the
// buffer, so the line is one continuous stream of compressed words.
//
// One cycle after the last pair of a line has been taken, line_valid is high
// for one cycle; line_bits then holds the packed line (left-aligned, zero
// past line_len) and line_len its length in bits. line_bits and line_len
// stay stable until the next line starts. The worst case, every word raw,
// is LINE_WORDS*34 bits; the line is kept compressed even then.
//
// C-Pack compresses 64-byte lines but its description gives no storage
// layout: this simple bit-serial concatenation is this design's choice.
module cpack_line_packer
  import cpack_pkg::*;
#(
  parameter int unsigned LINE_WORDS = 16,
  localparam int unsigned LINE_PAIRS = LINE_WORDS / 2,
  localparam int unsigned LINE_BITS  = LINE_PAIRS * PAIR_W,
  localparam int unsigned LEN_W      = $clog2(LINE_BITS + 1),
  localparam int unsigned CNT_W      = $clog2(LINE_PAIRS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_first,
  input  logic [PAIR_W-1:0]    in_pair,
  input  logic [6:0]           in_len,
  output logic                 line_valid,
  output logic [LINE_BITS-1:0] line_bits,
  output logic [LEN_W-1:0]     line_len
);

  logic [CNT_W-1:0]     count, count_base;
  logic [LEN_W-1:0]     pos_base;
  logic [LINE_BITS-1:0] buf_base, placed;

  always_comb begin
    // A first pair restarts the line, whatever was left of the previous one.
    count_base = in_first ? '0 : count;
    pos_base   = in_first ? '0 : line_len;
    buf_base   = in_first ? '0 : line_bits;
    placed     = {in_pair, {(LINE_BITS-PAIR_W){1'b0}}} >> pos_base;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count      <= '0;
      line_bits  <= '0;
      line_len   <= '0;
      line_valid <= 1'b0;
    end else begin
      line_valid <= 1'b0;
      if (in_valid) begin
        line_bits <= buf_base | placed;
        line_len  <= pos_base + LEN_W'(in_len);
        if (count_base == CNT_W'(LINE_PAIRS - 1)) begin
          line_valid <= 1'b1;
          count      <= '0;
        end else begin
          count <= count_base + 1'b1;
        end
      end
    end
  end

  // Input contract: a pair is at most 68 bits and zero past its length,
  // since the buffer merges pairs with an OR.
  a_pair_clean: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (in_len <= 7'(PAIR_W) && (in_pair << in_len) == '0))
    else $error("pair of length %0d has bits set past its end", in_len);

  initial assert (LINE_WORDS >= 2 && LINE_WORDS % 2 == 0)
    else $error("LINE_WORDS must be even");

endmodule
