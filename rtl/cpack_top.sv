// cpack_top: C-Pack cache-line compression engine.
//
// Two independent paths share the same line format.
//
// Compression path: a 64-byte line (LINE_WORDS words) enters two words per
// cycle on c_valid/c_words, c_first on its first pair. cpack_compressor
// codes each pair against its FIFO dictionary (one cycle), and
// cpack_line_packer appends the pair to the packed line. c_line_valid pulses
// two cycles after the last pair of the line went in; c_line_bits and
// c_line_len then hold the packed line and its length in bits. c_kinds
// shows the kinds of the pair leaving the compressor (valid with
// c_pair_valid), for statistics.
//
// Decompression path: d_load (one cycle) hands a packed line to
// cpack_line_unpacker, which feeds cpack_decompressor one pair window per
// cycle for LINE_WORDS/2 cycles. The rebuilt words leave two per cycle on
// d_valid/d_words, starting two cycles after d_load; d_busy is high while
// the line is being read, d_bits_used is the read position and d_bad flags
// an unused code in the stream. d_kinds gives the kinds of the rebuilt pair.
//
// The compressor and decompressor follow C-Pack; giving each its own port
// group and the packed-line format are this design's choices.
module cpack_top
  import cpack_pkg::*;
#(
  parameter int unsigned DICT_ENTRIES = 16,
  parameter int unsigned LINE_WORDS   = 16,
  localparam int unsigned LINE_BITS   = (LINE_WORDS / 2) * PAIR_W,
  localparam int unsigned LEN_W       = $clog2(LINE_BITS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // compression path
  input  logic                 c_valid,
  input  logic                 c_first,
  input  word_t                c_words [2],
  output logic                 c_pair_valid,
  output kind_e                c_kinds [2],
  output logic                 c_line_valid,
  output logic [LINE_BITS-1:0] c_line_bits,
  output logic [LEN_W-1:0]     c_line_len,
  // decompression path
  input  logic                 d_load,
  input  logic [LINE_BITS-1:0] d_line_bits,
  output logic                 d_busy,
  output logic [LEN_W-1:0]     d_bits_used,
  output logic                 d_valid,
  output word_t                d_words [2],
  output kind_e                d_kinds [2],
  output logic                 d_bad
);

  // ---------------- compression path ----------------
  logic [PAIR_W-1:0] c_pair;
  logic [6:0]        c_len;
  logic              c_pair_first;

  cpack_compressor #(.DICT_ENTRIES(DICT_ENTRIES)) u_comp (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (c_valid),
    .in_first  (c_first),
    .in_words  (c_words),
    .out_valid (c_pair_valid),
    .out_pair  (c_pair),
    .out_len   (c_len),
    .out_kind  (c_kinds)
  );

  // The first-pair mark travels alongside the compressor's one-cycle latency.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c_pair_first <= 1'b0;
    else        c_pair_first <= c_valid && c_first;
  end

  cpack_line_packer #(.LINE_WORDS(LINE_WORDS)) u_pack (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (c_pair_valid),
    .in_first   (c_pair_first),
    .in_pair    (c_pair),
    .in_len     (c_len),
    .line_valid (c_line_valid),
    .line_bits  (c_line_bits),
    .line_len   (c_line_len)
  );

  // ---------------- decompression path ----------------
  logic              d_win_valid, d_win_first;
  logic [PAIR_W-1:0] d_window;
  logic [6:0]        d_consumed;

  cpack_line_unpacker #(.LINE_WORDS(LINE_WORDS)) u_unpack (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (d_load),
    .load_bits (d_line_bits),
    .consumed  (d_consumed),
    .win_valid (d_win_valid),
    .win_first (d_win_first),
    .window    (d_window),
    .busy      (d_busy),
    .bits_used (d_bits_used)
  );

  cpack_decompressor #(.DICT_ENTRIES(DICT_ENTRIES)) u_decomp (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (d_win_valid),
    .in_first  (d_win_first),
    .in_bits   (d_window),
    .consumed  (d_consumed),
    .out_valid (d_valid),
    .out_words (d_words),
    .out_kind  (d_kinds),
    .out_bad   (d_bad)
  );

endmodule
