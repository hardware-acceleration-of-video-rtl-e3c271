// SOBEL_CORE: the pixel-streaming edge-detection algorithm.
//
// A 32-bit RGB pixel (R 23:16, G 15:8, B 7:0) with its pixel-control bundle
// enters; it is split into channels, reduced to intensity (rgb2intensity),
// filtered (sobel_filter), turned into an output grey level (output_control)
// and copied back into all three channels of a 32-bit word. Two switches
// controlled by sobel_enable_i choose between this processed stream and the
// unprocessed input stream, for pixel and control alike.
//
// Interface and timing: all state advances only when ce is high (the IP's
// enable and the output back-pressure). A pixel is accepted when ce,
// ctrl_i.valid and in_ready_o are all high; in_ready_o drops while the Sobel
// stage runs its border padding steps. The processed output appears 4
// enabled cycles after the step that completes a pixel's neighbourhood (one
// line and one pixel after the pixel itself); the bypass path is 2 enabled
// cycles. ctrl_o.valid is high for exactly one clock per output pixel, also
// when ce is low in the following cycles. sobel_enable_i should only change
// between frames.
//
// The structure (the blocks, their order and the two switches) follows the
// document. The pixel packing, the bypass delay and the clock-enable scheme
// are this design's.
module sobel_core
  import sobel_pkg::*;
#(
  parameter int unsigned MAX_WIDTH = 1920
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  logic [31:0] pixel_i,
  input  pixelctrl_t  ctrl_i,
  input  logic [7:0]  threshold_i,
  input  logic        sobel_enable_i,
  input  logic        background_color_i,
  input  logic        show_gradient_i,
  output logic        in_ready_o,
  output logic [31:0] pixel_o,
  output pixelctrl_t  ctrl_o
);

  logic [7:0]  intensity_in, intensity_out;
  logic        f_edge;
  grad_t       f_gv, f_gh;
  pixelctrl_t  f_ctrl;

  rgb2intensity u_rgb2intensity (
    .pixel_i     (word_to_rgb(pixel_i)),
    .intensity_o (intensity_in)
  );

  sobel_filter #(.MAX_WIDTH(MAX_WIDTH)) u_sobel (
    .clk         (clk),
    .rst         (rst),
    .ce          (ce),
    .pixel_i     (intensity_in),
    .ctrl_i      (ctrl_i),
    .threshold_i (threshold_i),
    .in_ready_o  (in_ready_o),
    .edge_o      (f_edge),
    .gv_o        (f_gv),
    .gh_o        (f_gh),
    .ctrl_o      (f_ctrl)
  );

  output_control u_output_control (
    .sobel_edge_i       (f_edge),
    .sobel_gradient_v_i (f_gv),
    .sobel_gradient_h_i (f_gh),
    .background_color_i (background_color_i),
    .show_gradient_i    (show_gradient_i),
    .intensity_o        (intensity_out)
  );

  // Bypass stream: accepted input pixels, one register deep.
  logic [31:0] byp_pixel;
  pixelctrl_t  byp_ctrl;
  // Output registers behind the switches.
  logic [31:0] out_pixel;
  pixelctrl_t  out_ctrl;
  logic        ce_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      byp_pixel <= '0;
      byp_ctrl  <= CTRL_IDLE;
      out_pixel <= '0;
      out_ctrl  <= CTRL_IDLE;
      ce_q      <= 1'b0;
    end else begin
      ce_q <= ce;
      if (ce) begin
        byp_pixel      <= pixel_i;
        byp_ctrl       <= ctrl_i;
        byp_ctrl.valid <= ctrl_i.valid && in_ready_o;
        if (sobel_enable_i) begin
          out_pixel <= rgb_to_word('{r: intensity_out, g: intensity_out, b: intensity_out});
          out_ctrl  <= f_ctrl;
        end else begin
          out_pixel <= byp_pixel;
          out_ctrl  <= byp_ctrl;
        end
      end
    end
  end

  always_comb begin
    pixel_o      = out_pixel;
    ctrl_o       = out_ctrl;
    ctrl_o.valid = out_ctrl.valid && ce_q;
  end

endmodule
