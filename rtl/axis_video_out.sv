// AXI4-Stream video output adapter.
//
// Collects the core's output pixels (a pixel plus pixel-control bundle whose
// valid flag is high for one clock per pixel) in a DEPTH-entry FIFO and
// offers them on an AXI4-Stream video master port: TUSER = v_start (first
// pixel of a frame), TLAST = h_end (last pixel of a line), TDATA = pixel.
// Because the core cannot be stopped within a cycle, room_o tells it to run
// only while the FIFO holds fewer than DEPTH-1 entries: a pixel produced in
// an enabled cycle arrives one clock later and always finds a free entry.
// Latency: a pushed pixel is offered on TVALID the next clock. The FIFO and
// its depth are this design's choice; the document only says the core has
// AXI4-Stream ports.
module axis_video_out
  import sobel_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] pixel_i,
  input  pixelctrl_t  ctrl_i,
  output logic        room_o,
  output logic [31:0] m_axis_tdata,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output logic        m_axis_tuser,
  output logic        m_axis_tlast
);

  localparam int unsigned AW = $clog2(DEPTH);

  typedef struct packed {
    logic        user;
    logic        last;
    logic [31:0] data;
  } beat_t;

  beat_t         mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [AW:0]   count;
  logic          push, pop;

  assign push   = ctrl_i.valid;
  assign pop    = m_axis_tvalid && m_axis_tready;
  assign room_o = count < (AW+1)'(DEPTH - 1);

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= '{user: ctrl_i.v_start, last: ctrl_i.h_end, data: pixel_i};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_comb begin
    m_axis_tvalid = (count != '0);
    m_axis_tdata  = mem[rd_ptr].data;
    m_axis_tuser  = mem[rd_ptr].user;
    m_axis_tlast  = mem[rd_ptr].last;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
    push |-> (count < (AW+1)'(DEPTH) || pop));
  a_stream_hold: assert property (@(posedge clk) disable iff (rst)
    (m_axis_tvalid && !m_axis_tready) |=> (m_axis_tvalid && $stable(m_axis_tdata)));

endmodule
