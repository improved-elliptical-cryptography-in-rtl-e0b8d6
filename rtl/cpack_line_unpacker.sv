// cpack_line_unpacker: reads a packed compressed line back pair by pair for
// the decompressor.
//
// load (one cycle) takes a packed line, left-aligned as cpack_line_packer
// builds it. From the next cycle on, for LINE_WORDS/2 cycles, win_valid is
// high and window shows the 68 stream bits starting at the current read
// position; win_first marks the first pair of the line. Each of those cycles
// the decompressor returns how many bits the pair at the top of the window
// used (consumed), and the read position advances by that much. busy is
// high while pairs remain; bits_used is the read position, which after the
// line equals the packed line's length. A load while busy restarts.
//
// The reader's structure is this design's choice; C-Pack only requires that
// the decompressor read the compressed words in order.
module cpack_line_unpacker
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
  input  logic                 load,
  input  logic [LINE_BITS-1:0] load_bits,
  input  logic [6:0]           consumed,
  output logic                 win_valid,
  output logic                 win_first,
  output logic [PAIR_W-1:0]    window,
  output logic                 busy,
  output logic [LEN_W-1:0]     bits_used
);

  logic [LINE_BITS-1:0] line;
  logic [LINE_BITS-1:0] shifted;
  logic [CNT_W-1:0]     count;

  always_comb begin
    shifted   = line << bits_used;
    window    = shifted[LINE_BITS-1 -: PAIR_W];
    win_valid = busy;
    win_first = busy && (count == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line      <= '0;
      bits_used <= '0;
      count     <= '0;
      busy      <= 1'b0;
    end else if (load) begin
      line      <= load_bits;
      bits_used <= '0;
      count     <= '0;
      busy      <= 1'b1;
    end else if (busy) begin
      bits_used <= bits_used + LEN_W'(consumed);
      if (count == CNT_W'(LINE_PAIRS - 1)) begin
        busy  <= 1'b0;
      end else begin
        count <= count + 1'b1;
      end
    end
  end

  // Every pair holds two code words of at least 2 bits each, and the reader
  // may not run past the end of the buffer.
  a_consumed_range: assert property (@(posedge clk) disable iff (!rst_n)
    (busy && !load) |-> (consumed >= 7'd4 && consumed <= 7'(PAIR_W) &&
                         32'(bits_used) + 32'(consumed) <= LINE_BITS))
    else $error("consumed length %0d out of range at bit %0d", consumed, bits_used);

endmodule
