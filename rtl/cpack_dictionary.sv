// cpack_dictionary: the FIFO dictionary shared in structure by the C-Pack
// compressor and decompressor.
//
// DICT_ENTRIES words of 32 bits (16 words = 64 bytes by default) kept in a
// circular buffer. wptr points at the oldest entry, the one the next push
// replaces. Up to two words are pushed per cycle: word 0 goes to wptr and
// word 1 to the slot after it when both are pushed, otherwise to wptr.
//
// clear starts a new cache line. It acts in the same cycle: while it is high,
// rd_entries reads as all zeros and rd_wptr as 0, and the pushes of that cycle
// are written into the emptied dictionary. This lets the first pair of a line
// be coded against an empty dictionary with no idle cycle. Entries reset to
// zero; a zero entry takes part in matching like any other, which is harmless
// because the other side of the link holds the same zeros.
//
// Reads are combinational; writes take effect at the clock edge.
//
// The 64-byte size and the FIFO replacement follow C-Pack; the circular-buffer
// structure, the per-line same-cycle clear and the zero reset are this
// design's choices.
module cpack_dictionary
  import cpack_pkg::*;
#(
  parameter int unsigned DICT_ENTRIES = 16,
  localparam int unsigned IDX_W = $clog2(DICT_ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             push0,
  input  word_t            wdata0,
  input  logic             push1,
  input  word_t            wdata1,
  output word_t            rd_entries [DICT_ENTRIES],
  output logic [IDX_W-1:0] rd_wptr
);

  word_t            mem [DICT_ENTRIES];
  logic [IDX_W-1:0] wptr;
  logic [IDX_W-1:0] wptr1;

  always_comb begin
    for (int i = 0; i < DICT_ENTRIES; i++)
      rd_entries[i] = clear ? '0 : mem[i];
    rd_wptr = clear ? '0 : wptr;
    wptr1   = rd_wptr + IDX_W'(push0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DICT_ENTRIES; i++) mem[i] <= '0;
      wptr <= '0;
    end else begin
      if (clear)
        for (int i = 0; i < DICT_ENTRIES; i++) mem[i] <= '0;
      if (push0) mem[rd_wptr] <= wdata0;
      if (push1) mem[wptr1]   <= wdata1;
      wptr <= rd_wptr + IDX_W'(push0) + IDX_W'(push1);
    end
  end

  // The index wraps by plain binary overflow, so the size must be a power of two.
  initial assert (DICT_ENTRIES == (1 << IDX_W) && DICT_ENTRIES >= 2)
    else $error("DICT_ENTRIES must be a power of two, at least 2");

endmodule
