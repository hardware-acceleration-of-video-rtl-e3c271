// Output control of the edge-detection core.
//
// Chooses the grey level shown for each filtered pixel from the Sobel
// results and two user settings:
//   * a non-edge pixel shows the background: black (0), or white (255) when
//     background_color_i is 1;
//   * an edge pixel shows the opposite colour of the background, or, when
//     show_gradient_i is 1, the gradient strength (|Gh| + |Gv|) / 8, which
//     uses the sfix11_En3 scale of the gradients and always lies in 0..255.
// Purely combinational; the caller registers the result. The document names
// this block and its inputs and output; the selection rule is this design's.
module output_control
  import sobel_pkg::*;
(
  input  logic       sobel_edge_i,
  input  grad_t      sobel_gradient_v_i,
  input  grad_t      sobel_gradient_h_i,
  input  logic       background_color_i,
  input  logic       show_gradient_i,
  output logic [7:0] intensity_o
);

  logic [GRAD_W-1:0] abs_v, abs_h;
  logic [GRAD_W:0]   grad_sum;
  logic [7:0]        bg;

  always_comb begin
    abs_v    = sobel_gradient_v_i[GRAD_W-1] ? GRAD_W'(-sobel_gradient_v_i) : GRAD_W'(sobel_gradient_v_i);
    abs_h    = sobel_gradient_h_i[GRAD_W-1] ? GRAD_W'(-sobel_gradient_h_i) : GRAD_W'(sobel_gradient_h_i);
    grad_sum = {1'b0, abs_v} + {1'b0, abs_h};
    bg       = background_color_i ? 8'd255 : 8'd0;
    if (!sobel_edge_i)       intensity_o = bg;
    else if (show_gradient_i) intensity_o = grad_sum[10:3];
    else                      intensity_o = ~bg;
  end

endmodule
