// cpack_ref_pkg: behavioural reference model of the C-Pack format, used by
// the testbenches to work out expected values independently of the RTL.
//
// The model works on plain integers and bit queues: it counts matching
// leading bytes one by one, builds each compressed word bit by bit and keeps
// the compressed stream as a queue of bits. Kinds are numbered as in
// cpack_pkg::kind_e (0 zzzz, 1 xxxx, 2 mmmm, 3 mmxx, 4 zzzx, 5 mmmx).
package cpack_ref_pkg;

  // Circular FIFO dictionary: slot numbers are the indices sent in the stream.
  class RefDict;
    int unsigned n;
    int unsigned wptr;
    logic [31:0] ent [];

    function new(int unsigned entries);
      n   = entries;
      ent = new[entries];
      clear();
    endfunction

    function void clear();
      foreach (ent[i]) ent[i] = 32'h0;
      wptr = 0;
    endfunction

    function void push(logic [31:0] w);
      ent[wptr] = w;
      wptr = (wptr + 1) % n;
    endfunction
  endclass

  function automatic int unsigned clog2(int unsigned v);
    int unsigned r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  // Number of equal bytes counted from the most significant one.
  function automatic int lead_bytes(logic [31:0] a, logic [31:0] b);
    int k = 0;
    for (int i = 3; i >= 0; i--) begin
      if (a[i*8 +: 8] != b[i*8 +: 8]) break;
      k++;
    end
    return k;
  endfunction

  // Append the low nbits of v, most significant first.
  function automatic void put(ref bit q[$], input logic [63:0] v, input int nbits);
    for (int i = nbits - 1; i >= 0; i--) q.push_back(v[i]);
  endfunction

  // Encode one word against the dictionary d. Appends the compressed bits to
  // q and returns the kind; push tells whether the word enters the dictionary.
  function automatic int encode(ref bit q[$], input logic [31:0] w,
                                input RefDict d, output bit push);
    int unsigned iw = clog2(d.n);
    int best = 0;
    int bidx = 0;
    if (w == 0) begin
      put(q, 64'(2'b00), 2); push = 0; return 0;
    end
    if (w[31:8] == 0) begin
      put(q, 64'(4'b1101), 4); put(q, 64'(w[7:0]), 8); push = 0; return 4;
    end
    push = 1;
    for (int i = 0; i < d.n; i++) begin
      int k = lead_bytes(w, d.ent[i]);
      if (k >= 2 && k > best) begin best = k; bidx = i; end
    end
    case (best)
      4: begin put(q, 64'(2'b10), 2);   put(q, 64'(bidx), iw); return 2; end
      3: begin put(q, 64'(4'b1110), 4); put(q, 64'(bidx), iw); put(q, 64'(w[7:0]), 8);  return 5; end
      2: begin put(q, 64'(4'b1100), 4); put(q, 64'(bidx), iw); put(q, 64'(w[15:0]), 16); return 3; end
      default: begin put(q, 64'(2'b01), 2); put(q, 64'(w), 32); return 1; end
    endcase
  endfunction

  // Compress a pair: word 0, then word 1 against the dictionary that word 0
  // left behind. Updates the dictionary.
  function automatic void encode_pair(ref bit q[$], input logic [31:0] w0,
                                      input logic [31:0] w1, input RefDict d,
                                      output int k0, output int k1);
    bit p;
    k0 = encode(q, w0, d, p);
    if (p) d.push(w0);
    k1 = encode(q, w1, d, p);
    if (p) d.push(w1);
  endfunction

  // Length in bits of a word of kind k with an index of iw bits.
  function automatic int kind_bits(int k, int unsigned iw);
    case (k)
      0: return 2;
      1: return 34;
      2: return 2 + iw;
      3: return 4 + iw + 16;
      4: return 12;
      5: return 4 + iw + 8;
      default: return 0;
    endcase
  endfunction

  // Random word drawn so that every kind appears often: zeros, small values,
  // words near earlier ones (pool) and raw random words.
  function automatic logic [31:0] pick_word(ref logic [31:0] pool[$]);
    int r = $urandom_range(0, 9);
    logic [31:0] w;
    if (pool.size() == 0 && r >= 3) r = 9;
    case (r)
      0: w = 32'h0;
      1, 2: w = {24'h0, 8'($urandom_range(1, 255))};
      3, 4: w = pool[$urandom_range(0, pool.size() - 1)];
      5: begin w = pool[$urandom_range(0, pool.size() - 1)]; w[7:0] = w[7:0] ^ 8'($urandom_range(1, 255)); end
      6: begin w = pool[$urandom_range(0, pool.size() - 1)]; w[15:8] = w[15:8] ^ 8'($urandom_range(1, 255)); end
      default: begin w = $urandom; if (w[31:16] == 0) w[31] = 1'b1; end
    endcase
    pool.push_back(w);
    if (pool.size() > 24) void'(pool.pop_front());
    return w;
  endfunction

endpackage
