// dither_core: one channel of the audio dithering accelerator.
//
// The input register holds a 32-bit fixed-point sample (28 fraction bits, so
// 1.0 = 0x1000_0000). On the next dither-clock enable after a new sample is
// loaded, the core adds noise-shaped error feedback from earlier samples,
// rounds, adds triangular dither from a linear congruential generator, clips
// to the 16-bit range, truncates, and latches the 16-bit result in its output
// register, where it stays until the next sample has been processed.
//
//   s      = x + e0 - e1 + e2                 (error filter of the last samples)
//   y      = s + 2^12 + (r' & M) - (r & M)    M = 2^13 - 1, r' = r*0x0019660D + 0x3C6EF35F
//   y, s   clipped to [-2^28, 2^28 - 1]       (s only when y clips)
//   e2, e1, e0, r <= e1, e0/2 (truncating), s - (y & ~M), r'
//   out    = y >>> 13
//
// The document gives the role (dithering before truncation to 16 bits, state
// kept between samples, 32-bit in, 16-bit out, one computation per 25 MHz
// cycle). The arithmetic is that of the linear dither of the MAD/madplay
// decoder the document accelerates, rebuilt here from that decoder's
// published behaviour rather than from the document.
module dither_core #(
  parameter int unsigned OUT_BITS  = 16,
  parameter int unsigned FRAC_BITS = 28
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,        // dither-clock enable
  input  logic                load,      // bus write of the input register
  input  logic signed [31:0]  din,
  output logic signed [OUT_BITS-1:0] dout,
  output logic                pending    // a loaded sample awaits processing
);
  localparam int unsigned SCALE = FRAC_BITS + 1 - OUT_BITS;
  localparam logic signed [31:0] MASK = (32'sd1 <<< SCALE) - 32'sd1;
  localparam logic signed [31:0] VMAX = (32'sd1 <<< FRAC_BITS) - 32'sd1;
  localparam logic signed [31:0] VMIN = -(32'sd1 <<< FRAC_BITS);

  logic signed [31:0] in_reg, e0, e1, e2;
  logic [31:0]        rnd;

  logic signed [31:0] s, s_clip, y, y_clip, y_q;
  logic [31:0]        rnd_next;

  always_comb begin
    s        = in_reg + e0 - e1 + e2;
    rnd_next = rnd * 32'h0019_660D + 32'h3C6E_F35F;
    y        = s + (32'sd1 <<< (SCALE - 1))
                 + $signed(rnd_next & MASK) - $signed(rnd & MASK);
    y_clip   = y;
    s_clip   = s;
    if (y > VMAX) begin
      y_clip = VMAX;
      if (s > VMAX) s_clip = VMAX;
    end else if (y < VMIN) begin
      y_clip = VMIN;
      if (s < VMIN) s_clip = VMIN;
    end
    y_q = y_clip & ~MASK;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_reg  <= '0;
      e0      <= '0;
      e1      <= '0;
      e2      <= '0;
      rnd     <= '0;
      dout    <= '0;
      pending <= 1'b0;
    end else begin
      if (ce && pending) begin
        e2      <= e1;
        e1      <= (e0 + $signed(32'(e0 < 0))) >>> 1;   // C division by 2
        e0      <= s_clip - y_q;
        rnd     <= rnd_next;
        dout    <= OUT_BITS'(y_q >>> SCALE);
        pending <= 1'b0;
      end
      if (load) begin
        in_reg  <= din;
        pending <= 1'b1;
      end
    end
  end
endmodule
