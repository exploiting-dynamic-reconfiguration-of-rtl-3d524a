// Binary-image pattern matcher for the dynamic area.
//
// Counts how many pixels of an 8x8 bilevel pattern equal the pixels of an 8x8 window that
// slides along a band of eight image rows. The image is sent one column at a time: bit i
// of a column word is the pixel of window row i. Eight row stages each keep the last eight
// pixels of their row in a shift register and count, in one clock, the positions where
// the row equals the matching pattern row (XNOR and population count). The eight row
// counts are then summed. This follows the published organisation: eight stages, one per
// pattern row, whose results are added; the column-serial feed and the command encoding
// are this design's choice.
//
// Data word (32 bits, from the dock's data channel, acted on when wr is high):
//   din[31] = 1 : load pattern row din[26:24] with din[7:0]
//   din[31] = 0 : shift image column din[7:0] into the window
// Bit 0 of a row (pattern or window) is the most recent column.
// Result: dout[6:0] = matching pixels (0..64) for the window ending at the last column.
// Three registered steps (window shift, row counts, sum): the result and a one-cycle
// dout_valid appear on the third clock edge counted from the edge that takes the column.
// The first seven results after a new band only cover a partly filled window.
module pattern_match (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] din,
  input  logic        wr,
  output logic [31:0] dout,
  output logic        dout_valid
);
  logic [7:0] pat [8];
  logic [7:0] win [8];
  logic [3:0] row_cnt [8];
  logic       col_q, cnt_v;
  logic [6:0] total;

  always_comb begin
    total = '0;
    for (int i = 0; i < 8; i++) total = total + 7'(row_cnt[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 8; i++) begin
        pat[i]     <= '0;
        win[i]     <= '0;
        row_cnt[i] <= '0;
      end
      col_q      <= 1'b0;
      cnt_v      <= 1'b0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      col_q <= wr && !din[31];
      if (wr && din[31]) pat[din[26:24]] <= din[7:0];
      if (wr && !din[31])
        for (int i = 0; i < 8; i++) win[i] <= {win[i][6:0], din[i]};
      // stage 1: one matching count per pattern row
      for (int i = 0; i < 8; i++) row_cnt[i] <= 4'($countones(~(win[i] ^ pat[i])));
      cnt_v <= col_q;
      // stage 2: sum of the eight row counts
      dout       <= {25'b0, total};
      dout_valid <= cnt_v;
    end
  end
endmodule
