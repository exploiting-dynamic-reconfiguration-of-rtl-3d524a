// Additive blending for the dynamic area.
//
// Adds, with saturation to 255, the pixels of two 8-bit grayscale images. Each data word
// carries W/8 pixels: the lower half of the word holds W/16 pixels of image A, the upper
// half the W/16 pixels of image B at the same positions, so one word yields W/16 output
// pixels (two on the 32-bit dock). To halve the number of reads, results are packed: the
// first word of a pair fills the lower half of the output word, the second the upper half,
// and only then is the output word updated. The pairing follows the published transfer
// pattern; which bytes hold which image is this design's choice.
//
// Timing: dout changes one cycle after the strobe of every second word, flagged by a
// one-cycle dout_valid. Reset clears the pairing phase.
module pix_blend #(
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

  localparam int H = W / 16;  // output pixels per input word

  logic           phase;
  logic [W/2-1:0] low_q;
  logic [W/2-1:0] sum;

  always_comb begin
    for (int p = 0; p < H; p++)
      sum[8*p +: 8] = sat_u8(11'(din[8*p +: 8]) + 11'(din[W/2 + 8*p +: 8]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase      <= 1'b0;
      low_q      <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      if (wr) begin
        phase <= !phase;
        if (!phase) low_q <= sum;
        else begin
          dout       <= {sum, low_q};
          dout_valid <= 1'b1;
        end
      end
    end
  end
endmodule
