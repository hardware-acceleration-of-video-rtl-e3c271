// Shared types and constants of the Sobel edge-detection IP core.
//
// pixelctrl_t is the per-pixel control bundle that travels beside every
// pixel in the streaming datapath: the first and last pixel of a line
// (h_start, h_end), the first and last pixel of a frame (v_start, v_end) and a
// valid flag. rgb_t is an 8-bit-per-channel pixel; on the 32-bit stream words
// red sits in bits 23:16, green in 15:8 and blue in 7:0 (this packing is a
// choice of this design). The register offsets are those of the AXI4-Lite
// register block; IPCore_Reset and IPCore_Enable follow the usual generated-IP
// names, the offsets themselves are this design's choice.
package sobel_pkg;

  typedef struct packed {
    logic h_start;
    logic h_end;
    logic v_start;
    logic v_end;
    logic valid;
  } pixelctrl_t;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // Gradients are sfix11_En3: an 11-bit two's-complement word read as value/8.
  localparam int unsigned GRAD_W = 11;
  typedef logic signed [GRAD_W-1:0] grad_t;

  localparam pixelctrl_t CTRL_IDLE = '0;

  // AXI4-Lite register offsets (byte addresses).
  localparam logic [15:0] ADDR_IPCORE_RESET      = 16'h0000;
  localparam logic [15:0] ADDR_IPCORE_ENABLE     = 16'h0004;
  localparam logic [15:0] ADDR_IPCORE_TIMESTAMP  = 16'h0008;
  localparam logic [15:0] ADDR_THRESHOLD         = 16'h0100;
  localparam logic [15:0] ADDR_SOBEL_ENABLE      = 16'h0104;
  localparam logic [15:0] ADDR_BACKGROUND_COLOR  = 16'h0108;
  localparam logic [15:0] ADDR_SHOW_GRADIENT     = 16'h010C;

  function automatic rgb_t word_to_rgb(input logic [31:0] w);
    return '{r: w[23:16], g: w[15:8], b: w[7:0]};
  endfunction

  function automatic logic [31:0] rgb_to_word(input rgb_t p);
    return {8'h00, p.r, p.g, p.b};
  endfunction

endpackage
