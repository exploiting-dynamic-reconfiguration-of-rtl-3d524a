// Dynamic area: the reconfigurable region behind a dock, holding one accelerator at a time.
//
// In the FPGA only one configuration is present and a new one is written through the
// internal configuration port. Here every accelerator is instantiated and cfg selects the
// one that is "loaded": only it sees write strobes and drives the read channel. A change
// of cfg resets the newly selected accelerator, as loading a partial configuration starts
// its flip-flops from their initial values. Configuration 0 is an empty area that reads
// as zero. The SHA-1 engine is present only when HAS_SHA1 is set, since it does not fit
// the dynamic area of the smaller (32-bit) system.
//
// The pixel accelerators use the full channel width W; the pattern matcher, the key hash
// and the SHA-1 engine are 32-bit designs and use bits [31:0], also on the 64-bit dock.
// Timing is that of the selected accelerator.
module dyn_area #(
  parameter int W        = 32,
  parameter bit HAS_SHA1 = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [2:0]   cfg,
  input  logic [W-1:0] din,
  input  logic         wr,
  output logic [W-1:0] dout,
  output logic         dout_valid
);
  import dock_pkg::*;

  logic [2:0] cfg_q;
  logic       load_rst;
  logic [31:0]  pm_dout, sh_dout, kh_dout;
  logic [W-1:0] br_dout, bl_dout, fd_dout;
  logic         pm_v, br_v, bl_v, fd_v, sh_v, kh_v;

  always_ff @(posedge clk) begin
    if (rst) cfg_q <= CFG_EMPTY;
    else     cfg_q <= cfg;
  end
  assign load_rst = rst || (cfg != cfg_q);

  pattern_match u_pm (.clk, .rst(load_rst), .din(din[31:0]), .wr(wr && cfg == CFG_PATTERN),
                      .dout(pm_dout), .dout_valid(pm_v));
  pix_brightness #(.W(W)) u_br (.clk, .rst(load_rst), .din, .wr(wr && cfg == CFG_BRIGHTNESS),
                                .dout(br_dout), .dout_valid(br_v));
  pix_blend #(.W(W)) u_bl (.clk, .rst(load_rst), .din, .wr(wr && cfg == CFG_BLEND),
                           .dout(bl_dout), .dout_valid(bl_v));
  pix_fade #(.W(W)) u_fd (.clk, .rst(load_rst), .din, .wr(wr && cfg == CFG_FADE),
                          .dout(fd_dout), .dout_valid(fd_v));
  key_hash u_kh (.clk, .rst(load_rst), .din(din[31:0]), .wr(wr && cfg == CFG_HASH),
                 .dout(kh_dout), .dout_valid(kh_v));

  if (HAS_SHA1) begin : g_sha1
    sha1_core u_sha (.clk, .rst(load_rst), .din(din[31:0]), .wr(wr && cfg == CFG_SHA1),
                     .dout(sh_dout), .dout_valid(sh_v));
  end else begin : g_no_sha1
    assign sh_dout = '0;
    assign sh_v    = 1'b0;
  end

  always_comb begin
    unique case (cfg)
      CFG_PATTERN:    begin dout = W'(pm_dout); dout_valid = pm_v; end
      CFG_BRIGHTNESS: begin dout = br_dout;     dout_valid = br_v; end
      CFG_BLEND:      begin dout = bl_dout;     dout_valid = bl_v; end
      CFG_FADE:       begin dout = fd_dout;     dout_valid = fd_v; end
      CFG_SHA1:       begin dout = W'(sh_dout); dout_valid = sh_v; end
      CFG_HASH:       begin dout = W'(kh_dout); dout_valid = kh_v; end
      default:        begin dout = '0;          dout_valid = 1'b0; end
    endcase
  end
endmodule
