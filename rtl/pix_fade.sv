// Fade effect for the dynamic area.
//
// Combines two 8-bit grayscale images as (A - B) * f + B, where f in [0, 1] sets the share
// of image A. Here f is a 9-bit fraction F/256 with F in 0..256, and the product is
// rounded toward minus infinity, so the result always lies between B and A and needs no
// saturation. Sweeping F across frames gives the fade-in/fade-out. F is taken from bits
// [8:0] of the first word written after reset (values above 256 are clamped to 256); later
// words are pixels. The transfer pattern is that of additive blending: lower half of a word
// image A, upper half image B, results of two words packed into one output word. The
// fraction format and the in-band constant are this design's choice.
//
// Timing: dout changes one cycle after the strobe of every second pixel word, flagged by
// a one-cycle dout_valid.
module pix_fade #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] din,
  input  logic         wr,
  output logic [W-1:0] dout,
  output logic         dout_valid
);
  localparam int H = W / 16;

  logic           have_f, phase;
  logic [8:0]     f;
  logic [W/2-1:0] low_q;
  logic [W/2-1:0] res;

  always_comb begin
    for (int p = 0; p < H; p++) begin
      logic signed [9:0]  diff;
      logic signed [19:0] prod;
      logic signed [7:0]  val;  // in 0..255 by construction
      diff = $signed({2'b00, din[8*p +: 8]}) - $signed({2'b00, din[W/2 + 8*p +: 8]});
      prod = diff * $signed({1'b0, f});
      val  = 8'(prod >>> 8) + din[W/2 + 8*p +: 8];
      res[8*p +: 8] = val;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      have_f     <= 1'b0;
      f          <= '0;
      phase      <= 1'b0;
      low_q      <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      if (wr && !have_f) begin
        f      <= (din[8:0] > 9'd256) ? 9'd256 : din[8:0];
        have_f <= 1'b1;
      end else if (wr) begin
        phase <= !phase;
        if (!phase) low_q <= res;
        else begin
          dout       <= {res, low_q};
          dout_valid <= 1'b1;
        end
      end
    end
  end
endmodule
