// RGB to intensity conversion of the edge-detection core.
//
// Converts one 8-bit R, G, B pixel into an 8-bit grey level with the
// ITU-R BT.601 luma weights in 8-bit fixed point:
//   Y = (77*R + 150*G + 29*B + 128) >> 8
// The weights sum to 256, so white maps to 255 and no saturation is needed.
// The block is purely combinational (zero latency): the Sobel stage behind it
// decides in the same cycle whether it accepts a pixel, and keeping this
// stage free of registers keeps that decision exact. The document names the
// conversion only; the weights, rounding and zero latency are this design's
// choices.
module rgb2intensity
  import sobel_pkg::*;
(
  input  rgb_t       pixel_i,
  output logic [7:0] intensity_o
);

  logic [15:0] sum;

  always_comb begin
    sum = 16'(8'd77 * pixel_i.r) + 16'(8'd150 * pixel_i.g) + 16'(8'd29 * pixel_i.b) + 16'd128;
    intensity_o = sum[15:8];
  end

endmodule
