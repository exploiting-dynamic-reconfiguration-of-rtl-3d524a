// SHA-1 engine for the dynamic area (FIPS 180 / RFC 3174 compression function).
//
// The CPU sends a padded message as 512-bit blocks of sixteen 32-bit words over the 32-bit
// data channel. The engine keeps the five chaining words H0..H4 and runs the 80 rounds of
// a block at one round per clock. The message schedule is a 16-word shift register: word
// w[0] feeds the current round and the new word rotl1(w[13]^w[8]^w[2]^w[0]) enters at the
// top, so W(t+16) is formed as W(t) is consumed. Message padding stays in software.
//
// The data channel carries no address, so each block is preceded by a command word
// (this protocol is this design's choice):
//   din[31:28] = 1 : reset H to the initial values, then take 16 message words
//   din[31:28] = 2 : keep H (next block of the same message), then take 16 message words
//   din[31:28] = 3 : select what the read channel shows: din[2:0] = 0..4 -> H0..H4,
//                    5 -> status word {31'b0, busy}
// Words written while the engine is busy are ignored.
//
// Timing: after the 16th word the engine is busy for 80 cycles computing the rounds and
// one more cycle adding the result into H; dout_valid pulses when H is updated. dout is
// combinational from H and the selection.
module sha1_core (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] din,
  input  logic        wr,
  output logic [31:0] dout,
  output logic        dout_valid
);
  typedef enum logic [1:0] {S_CMD, S_LOAD, S_ROUND, S_ADD} state_e;

  localparam logic [31:0] IV [5] = '{32'h67452301, 32'hEFCDAB89, 32'h98BADCFE,
                                     32'h10325476, 32'hC3D2E1F0};

  state_e      state;
  logic [31:0] h [5];
  logic [31:0] a, b, c, d, e;
  logic [31:0] w [16];
  logic [3:0]  nword;
  logic [6:0]  t;
  logic [2:0]  sel;
  logic        busy;

  logic [31:0] f, k, temp, wnew;

  assign busy = (state == S_ROUND) || (state == S_ADD);

  always_comb begin
    if (t < 7'd20) begin
      f = (b & c) | (~b & d);
      k = 32'h5A827999;
    end else if (t < 7'd40) begin
      f = b ^ c ^ d;
      k = 32'h6ED9EBA1;
    end else if (t < 7'd60) begin
      f = (b & c) | (b & d) | (c & d);
      k = 32'h8F1BBCDC;
    end else begin
      f = b ^ c ^ d;
      k = 32'hCA62C1D6;
    end
    temp = {a[26:0], a[31:27]} + f + e + k + w[0];
    wnew = w[13] ^ w[8] ^ w[2] ^ w[0];
    wnew = {wnew[30:0], wnew[31]};
  end

  always_comb begin
    if (sel < 3'd5) dout = h[sel];
    else            dout = {31'b0, busy};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_CMD;
      for (int i = 0; i < 5; i++) h[i] <= IV[i];
      for (int i = 0; i < 16; i++) w[i] <= '0;
      {a, b, c, d, e} <= '0;
      nword      <= '0;
      t          <= '0;
      sel        <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      unique case (state)
        S_CMD: if (wr) begin
          unique case (din[31:28])
            4'd1: begin
              for (int i = 0; i < 5; i++) h[i] <= IV[i];
              nword <= '0;
              state <= S_LOAD;
            end
            4'd2: begin
              nword <= '0;
              state <= S_LOAD;
            end
            4'd3: sel <= din[2:0];
            default: ;
          endcase
        end
        S_LOAD: if (wr) begin
          for (int i = 0; i < 15; i++) w[i] <= w[i+1];
          w[15] <= din;
          nword <= nword + 1'b1;
          if (nword == 4'd15) begin
            {a, b, c, d, e} <= {h[0], h[1], h[2], h[3], h[4]};
            t     <= '0;
            state <= S_ROUND;
          end
        end
        S_ROUND: begin
          e <= d;
          d <= c;
          c <= {b[1:0], b[31:2]};
          b <= a;
          a <= temp;
          for (int i = 0; i < 15; i++) w[i] <= w[i+1];
          w[15] <= wnew;
          t <= t + 1'b1;
          if (t == 7'd79) state <= S_ADD;
        end
        S_ADD: begin
          h[0] <= h[0] + a;
          h[1] <= h[1] + b;
          h[2] <= h[2] + c;
          h[3] <= h[3] + d;
          h[4] <= h[4] + e;
          dout_valid <= 1'b1;
          state <= S_CMD;
        end
        default: state <= S_CMD;
      endcase
    end
  end
endmodule
