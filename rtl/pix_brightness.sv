// Brightness adjustment for the dynamic area.
//
// Adds a signed 8-bit constant to every 8-bit unsigned pixel and saturates the result to
// 0..255. A data word carries W/8 pixels (four on the 32-bit dock, eight on the 64-bit
// one) and one output word of the same layout is produced per input word. The constant is
// taken from bits [7:0] of the first word written after reset (a configuration starts in
// its reset state when it is loaded); later words are pixels. Passing the constant in-band
// is this design's choice.
//
// Timing: the result word is in dout one cycle after the wr strobe, flagged by dout_valid.
module pix_brightness #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] din,
  input  logic         wr,
  output logic [W-1:0] dout,
  output logic         dout_valid
);
  import dock_pkg::*;

  logic              have_k;
  logic signed [7:0] k;

  always_ff @(posedge clk) begin
    if (rst) begin
      have_k     <= 1'b0;
      k          <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      if (wr && !have_k) begin
        k      <= din[7:0];
        have_k <= 1'b1;
      end else if (wr) begin
        for (int p = 0; p < W/8; p++)
          dout[8*p +: 8] <= sat_u8($signed({3'b000, din[8*p +: 8]}) + 11'(k));
        dout_valid <= 1'b1;
      end
    end
  end
endmodule
