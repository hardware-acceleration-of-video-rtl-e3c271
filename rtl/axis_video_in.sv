// AXI4-Stream video input adapter.
//
// Converts an AXI4-Stream video slave port (TUSER = first pixel of a frame,
// TLAST = last pixel of a line, one 32-bit pixel per beat) into a pixel plus
// pixel-control bundle for the core. h_start marks the beat after a TLAST or
// a TUSER beat, h_end a TLAST beat, v_start a TUSER beat and v_end the TLAST
// beat of line ACTIVE_LINES-1 (lines counted from the TUSER beat).
// TREADY is the core's "accept now" signal (core_ready_i), so the core's
// enable, its output back-pressure and its border padding steps all stall
// the source; ctrl_o.valid is TVALID and the core takes the pixel only when
// it is ready. Purely a framing counter: no storage and no added latency.
// The conventions of the stream are common practice; the document only says
// the core has AXI4-Stream ports.
module axis_video_in
  import sobel_pkg::*;
#(
  parameter int unsigned ACTIVE_LINES = 1080
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] s_axis_tdata,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  input  logic        s_axis_tuser,
  input  logic        s_axis_tlast,
  input  logic        core_ready_i,
  output logic [31:0] pixel_o,
  output pixelctrl_t  ctrl_o
);

  localparam int unsigned LW = $clog2(ACTIVE_LINES + 1);

  logic [LW-1:0] line_cnt;
  logic          sol;        // next beat starts a line
  logic [LW-1:0] line_idx;
  logic          beat;

  assign s_axis_tready = core_ready_i;
  assign beat          = s_axis_tvalid && s_axis_tready;
  assign line_idx      = s_axis_tuser ? '0 : line_cnt;

  always_comb begin
    pixel_o         = s_axis_tdata;
    ctrl_o.valid    = s_axis_tvalid;
    ctrl_o.v_start  = s_axis_tuser;
    ctrl_o.h_start  = s_axis_tuser || sol;
    ctrl_o.h_end    = s_axis_tlast;
    ctrl_o.v_end    = s_axis_tlast && (line_idx == LW'(ACTIVE_LINES - 1));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      line_cnt <= '0;
      sol      <= 1'b1;
    end else if (beat) begin
      sol <= s_axis_tlast;
      if (s_axis_tlast) line_cnt <= (line_idx == LW'(ACTIVE_LINES - 1)) ? '0 : line_idx + 1'b1;
      else              line_cnt <= line_idx;
    end
  end

endmodule
