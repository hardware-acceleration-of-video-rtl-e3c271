// Sobel video edge-detection IP core.
//
// A video stream enters on an AXI4-Stream slave port, is converted to grey,
// filtered with the 3x3 Sobel operator, thresholded into an edge map and
// leaves on an AXI4-Stream master port; a processor steers it through an
// AXI4-Lite register block (reset, enable, threshold, bypass, background
// colour, gradient display). One pixel per clock in steady state.
//
//   s_axis --> axis_video_in --> sobel_core --> axis_video_out --> m_axis
//                                    ^
//   s_axi  --> axi_lite_regs --------+  (settings, soft reset, enable)
//
// The core runs (clock enable high) while IPCore_Enable is 1 and the output
// FIFO has room; the input's TREADY follows that enable and the core's own
// readiness, which drops for one cycle after every line and for width+1
// cycles after every frame while the core works off the frame border. Frame
// size: lines up to MAX_WIDTH pixels (learned from TLAST), ACTIVE_LINES
// lines per frame. Latency from a pixel to its filtered output is about one
// line plus 6 clocks. One clock domain (aclk) and an active-low reset
// (aresetn); writing 1 to IPCore_Reset bit 0 resets the datapath, the stream
// adapters and the algorithm registers.
//
// The split into a register interface, stream ports and the algorithm core,
// and the default 1920 x 1080 frame, follow the document; the stream adapters,
// their back-pressure and the FIFO are this design's.
module sobel_ip
  import sobel_pkg::*;
#(
  parameter int unsigned MAX_WIDTH    = 1920,
  parameter int unsigned ACTIVE_LINES = 1080,
  parameter int unsigned FIFO_DEPTH   = 8,
  parameter logic [31:0] TIMESTAMP    = 32'h2019_0001
) (
  input  logic        aclk,
  input  logic        aresetn,
  // AXI4-Lite slave
  input  logic [15:0] s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [15:0] s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  // AXI4-Stream video in
  input  logic [31:0] s_axis_tdata,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  input  logic        s_axis_tuser,
  input  logic        s_axis_tlast,
  // AXI4-Stream video out
  output logic [31:0] m_axis_tdata,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output logic        m_axis_tuser,
  output logic        m_axis_tlast
);

  logic        soft_reset, ip_enable, sobel_enable, background_color, show_gradient;
  logic [7:0]  threshold;
  logic        rst, ce, core_in_ready, out_room;
  logic [31:0] in_pixel, out_pixel;
  pixelctrl_t  in_ctrl, out_ctrl;

  axi_lite_regs #(.ADDR_W(16), .TIMESTAMP(TIMESTAMP)) u_regs (
    .aclk               (aclk),
    .aresetn            (aresetn),
    .s_axi_awaddr       (s_axi_awaddr),
    .s_axi_awvalid      (s_axi_awvalid),
    .s_axi_awready      (s_axi_awready),
    .s_axi_wdata        (s_axi_wdata),
    .s_axi_wstrb        (s_axi_wstrb),
    .s_axi_wvalid       (s_axi_wvalid),
    .s_axi_wready       (s_axi_wready),
    .s_axi_bresp        (s_axi_bresp),
    .s_axi_bvalid       (s_axi_bvalid),
    .s_axi_bready       (s_axi_bready),
    .s_axi_araddr       (s_axi_araddr),
    .s_axi_arvalid      (s_axi_arvalid),
    .s_axi_arready      (s_axi_arready),
    .s_axi_rdata        (s_axi_rdata),
    .s_axi_rresp        (s_axi_rresp),
    .s_axi_rvalid       (s_axi_rvalid),
    .s_axi_rready       (s_axi_rready),
    .soft_reset_o       (soft_reset),
    .ip_enable_o        (ip_enable),
    .threshold_o        (threshold),
    .sobel_enable_o     (sobel_enable),
    .background_color_o (background_color),
    .show_gradient_o    (show_gradient)
  );

  assign rst = !aresetn || soft_reset;
  assign ce  = ip_enable && out_room;

  axis_video_in #(.ACTIVE_LINES(ACTIVE_LINES)) u_in (
    .clk           (aclk),
    .rst           (rst),
    .s_axis_tdata  (s_axis_tdata),
    .s_axis_tvalid (s_axis_tvalid),
    .s_axis_tready (s_axis_tready),
    .s_axis_tuser  (s_axis_tuser),
    .s_axis_tlast  (s_axis_tlast),
    .core_ready_i  (ce && core_in_ready),
    .pixel_o       (in_pixel),
    .ctrl_o        (in_ctrl)
  );

  sobel_core #(.MAX_WIDTH(MAX_WIDTH)) u_core (
    .clk                (aclk),
    .rst                (rst),
    .ce                 (ce),
    .pixel_i            (in_pixel),
    .ctrl_i             (in_ctrl),
    .threshold_i        (threshold),
    .sobel_enable_i     (sobel_enable),
    .background_color_i (background_color),
    .show_gradient_i    (show_gradient),
    .in_ready_o         (core_in_ready),
    .pixel_o            (out_pixel),
    .ctrl_o             (out_ctrl)
  );

  axis_video_out #(.DEPTH(FIFO_DEPTH)) u_out (
    .clk           (aclk),
    .rst           (rst),
    .pixel_i       (out_pixel),
    .ctrl_i        (out_ctrl),
    .room_o        (out_room),
    .m_axis_tdata  (m_axis_tdata),
    .m_axis_tvalid (m_axis_tvalid),
    .m_axis_tready (m_axis_tready),
    .m_axis_tuser  (m_axis_tuser),
    .m_axis_tlast  (m_axis_tlast)
  );

endmodule
