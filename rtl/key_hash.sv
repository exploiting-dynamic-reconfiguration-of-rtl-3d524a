// 32-bit hash of a variable-length key, for the dynamic area.
//
// The function is the public-domain 32-bit hash for variable-length keys by Bob Jenkins
// (lookup2). Three 32-bit accumulators a, b, c start at the golden ratio constant (a, b) and
// at a caller-given initial value (c). The key is consumed in 12-byte blocks: each block adds
// its three little-endian words into a, b and c and then "mixes" them with nine rounds of
// subtract, subtract, xor-with-shift. The last 0..11 bytes are added the same way, except
// that the tail bytes for c are shifted up one byte, because the low byte of c receives the
// key length. One final mix gives the hash in c. The original accelerator implemented the
// whole function in hardware; which hash it was is inferred by this design (see below).
//
// The data channel carries no address, so a key is sent in-band (this protocol is this
// design's choice): a length word (key length in bytes), an initial-value word, then the key
// as ceil(length/4) words, byte 0 of the key in bits [7:0]. Bytes beyond the length in the
// last word are ignored. The hash is then on dout until the next key ends.
//
// Timing: a full 12-byte block is mixed in the clock edge that takes its third word, so key
// words may arrive on consecutive cycles. In the cycle after the edge that takes the last key
// word (or the initial value, for an empty key) the final mix is on dout combinationally,
// flagged by dout_valid, and the next edge stores it, so a read issued right after the last
// write already sees the hash. Words written in that cycle are ignored. A whole mix in one
// cycle is a long adder chain (18 adds); it was kept so that the CPU never waits.
module key_hash (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] din,
  input  logic        wr,
  output logic [31:0] dout,
  output logic        dout_valid
);
  typedef enum logic [1:0] {S_LEN, S_INIT, S_KEY, S_FIN} state_e;

  localparam logic [31:0] GOLDEN = 32'h9E37_79B9;

  typedef struct packed {
    logic [31:0] a, b, c;
  } abc_t;

  // nine rounds of the lookup2 mix
  function automatic abc_t mix(input abc_t s);
    logic [31:0] a, b, c;
    a = s.a; b = s.b; c = s.c;
    a = a - b - c; a = a ^ (c >> 13);
    b = b - c - a; b = b ^ (a << 8);
    c = c - a - b; c = c ^ (b >> 13);
    a = a - b - c; a = a ^ (c >> 12);
    b = b - c - a; b = b ^ (a << 16);
    c = c - a - b; c = c ^ (b >> 5);
    a = a - b - c; a = a ^ (c >> 3);
    b = b - c - a; b = b ^ (a << 10);
    c = c - a - b; c = c ^ (b >> 15);
    return '{a: a, b: b, c: c};
  endfunction

  state_e      state;
  abc_t        s, s_add, s_mix, s_fin;
  logic [31:0] len_q, left_q;    // key length; bytes still to come
  logic [1:0]  widx;             // word within the 12-byte block
  logic        full_q;           // current block is a whole 12 bytes
  logic        full_now, last_word;
  logic [31:0] mask, m;
  logic [31:0] hash_q;

  // valid bytes of this word and whether the block it belongs to is complete
  assign mask      = (left_q >= 32'd4) ? 32'hFFFF_FFFF : ((32'd1 << (8 * left_q[1:0])) - 32'd1);
  assign m         = din & mask;
  assign full_now  = (widx == 2'd0) ? (left_q >= 32'd12) : full_q;
  assign last_word = (left_q <= 32'd4);

  always_comb begin
    s_add = s;
    unique case (widx)
      2'd0:    s_add.a = s.a + m;
      2'd1:    s_add.b = s.b + m;
      default: s_add.c = full_now ? s.c + m : s.c + {m[23:0], 8'h00};
    endcase
    s_mix = mix(s_add);
    s_fin = mix('{a: s.a, b: s.b, c: s.c + len_q});
  end

  assign dout       = (state == S_FIN) ? s_fin.c : hash_q;
  assign dout_valid = (state == S_FIN);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_LEN;
      s          <= '0;
      len_q      <= '0;
      left_q     <= '0;
      widx       <= '0;
      full_q     <= 1'b0;
      hash_q     <= '0;
    end else begin
      unique case (state)
        S_LEN: if (wr) begin
          len_q  <= din;
          left_q <= din;
          state  <= S_INIT;
        end
        S_INIT: if (wr) begin
          s     <= '{a: GOLDEN, b: GOLDEN, c: din};
          widx  <= '0;
          state <= (len_q == '0) ? S_FIN : S_KEY;
        end
        S_KEY: if (wr) begin
          if (widx == 2'd0) full_q <= full_now;
          left_q <= last_word ? '0 : left_q - 32'd4;
          if (full_now && widx == 2'd2) s <= s_mix;
          else                          s <= s_add;
          widx  <= (widx == 2'd2) ? 2'd0 : widx + 2'd1;
          if (last_word) state <= S_FIN;
        end
        S_FIN: begin
          hash_q <= s_fin.c;
          state  <= S_LEN;
        end
        default: state <= S_LEN;
      endcase
    end
  end
endmodule
