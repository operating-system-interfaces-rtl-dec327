// sad_unit: one sum-of-absolute-differences unit of the motion estimation
// accelerator. Each cycle with en high it adds |cur - ref| to its sum; clr
// clears the sum (clr wins over en). The sum is registered and available the
// cycle after the last add. 256 pixels of 8 bits give at most 65280, so a
// 16-bit sum cannot overflow for a 16x16 macroblock.
module sad_unit #(
  parameter int unsigned PW = 8,     // pixel width
  parameter int unsigned SW = 16     // sum width
) (
  input  logic          clk,
  input  logic          clr,
  input  logic          en,
  input  logic [PW-1:0] cur,
  input  logic [PW-1:0] ref_px,
  output logic [SW-1:0] sad
);
  logic [PW-1:0] diff;
  assign diff = (cur >= ref_px) ? cur - ref_px : ref_px - cur;

  always_ff @(posedge clk) begin
    if (clr)     sad <= '0;
    else if (en) sad <= sad + SW'(diff);
  end
endmodule
