// Streaming 3x3 Sobel edge detector.
//
// Takes one 8-bit grey pixel per accepted cycle, in raster order, framed by
// the pixel-control bundle (h_start/h_end mark a line, v_start/v_end a frame).
// A two-line memory (one 16-bit word per column holding the two previous
// lines) and a 3x3 window of registers give the neighbourhood of the pixel one
// line and one column behind the input. On it the horizontal and vertical
// gradients are formed with the masks
//     Gh:  1 0 -1     Gv:  1  2  1
//          2 0 -2          0  0  0
//          1 0 -1         -1 -2 -1
// applied as written (top-left weight on the top-left neighbour). Both are
// emitted as 11-bit signed words read as sfix11_En3, i.e. value/8. A pixel is
// an edge when the gradient magnitude in that scale exceeds the threshold:
// sqrt((Gh/8)^2 + (Gv/8)^2) > Th, evaluated without a root as
// Gh^2 + Gv^2 > 64*Th^2.
//
// Frame geometry: the line length is learned from h_end (at most MAX_WIDTH);
// the frame end from v_end. Pixels outside the frame count as 0. Because the
// output trails the input by one line and one pixel, the filter runs one
// padding step after every line (the column right of the frame) and
// width+1 padding steps after the last line (the row below the frame). These
// steps take cycles with no input: in_ready_o is low during them, which an
// AXI4-Stream source honours as back-pressure and a free-running pixel source
// must cover with blanking (at least 1 idle cycle per line and width+1 per
// frame). A v_start pixel always restarts the frame.
//
// Timing: everything advances only when ce is high. A step registers the
// window (stage 0), stage 1 registers the gradients, stage 2 registers edge,
// gradients and the output control: the output for a pixel appears 3 enabled
// cycles after the step that completes its neighbourhood. Output control:
// h_start/h_end/v_start/v_end regenerated for the output pixel, valid set
// for exactly one enabled cycle per output pixel.
//
// From the document: the masks, the sfix11_En3 gradient type, the edge and
// gradient outputs and the threshold input. This design's own: zero padding,
// the threshold rule, the memory organisation (an asynchronous-read array, as
// LUT RAM) and the pipeline depth.
module sobel_filter
  import sobel_pkg::*;
#(
  parameter int unsigned MAX_WIDTH = 1920
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic [7:0] pixel_i,
  input  pixelctrl_t ctrl_i,
  input  logic [7:0] threshold_i,
  output logic       in_ready_o,
  output logic       edge_o,
  output grad_t      gv_o,
  output grad_t      gh_o,
  output pixelctrl_t ctrl_o
);

  localparam int unsigned CW = $clog2(MAX_WIDTH + 1);

  typedef enum logic [1:0] {S_IDLE, S_ACTIVE, S_PADCOL, S_PADROW} state_t;

  state_t        state;
  logic [CW-1:0] col;       // column of the next step
  logic [CW-1:0] width;     // line length learned from h_end
  logic [1:0]    row_cnt;   // row of the next step, saturating at 2
  logic          last_row;  // the current input line carried v_end

  // Two-line memory: [15:8] = two lines above, [7:0] = one line above.
  logic [15:0]   line_mem [MAX_WIDTH];

  logic [2:0][2:0][7:0] win;  // win[row][col], row 0 = top, col 0 = left

  // ---------------------------------------------------------------- step
  logic          take, restart, step, colpad, rowpad;
  logic [CW-1:0] st_col;
  logic [1:0]    st_row;
  logic [15:0]   mem_rd;
  logic [CW-1:0] rd_idx;
  logic [7:0]    top, mid, bot;

  assign in_ready_o = (state == S_IDLE) || (state == S_ACTIVE);

  always_comb begin
    take    = ce && ctrl_i.valid && in_ready_o;
    restart = take && ctrl_i.v_start;
    step    = 1'b0;
    colpad  = 1'b0;
    rowpad  = 1'b0;
    st_col  = col;
    st_row  = row_cnt;
    unique case (state)
      S_IDLE:   step = restart;
      S_ACTIVE: step = take;
      S_PADCOL: begin step = ce; colpad = 1'b1; st_col = width; end
      S_PADROW: begin step = ce; rowpad = 1'b1; colpad = (col == width); end
      default:  step = 1'b0;
    endcase
    if (restart) begin
      st_col = '0;
      st_row = 2'd0;
    end
    rd_idx = colpad ? '0 : st_col;
    mem_rd = line_mem[rd_idx];
    top = (st_row >= 2'd2 && !colpad) ? mem_rd[15:8] : 8'd0;
    mid = (st_row >= 2'd1 && !colpad) ? mem_rd[7:0]  : 8'd0;
    bot = (!colpad && !rowpad) ? pixel_i : 8'd0;
  end

  always_ff @(posedge clk) begin
    if (step && !colpad) line_mem[rd_idx] <= {mem_rd[7:0], bot};
  end

  // ------------------------------------------------------- sequencing
  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      col      <= '0;
      width    <= '0;
      row_cnt  <= '0;
      last_row <= 1'b0;
    end else if (step) begin
      unique case (state)
        S_IDLE, S_ACTIVE: begin
          col      <= st_col + 1'b1;
          row_cnt  <= st_row;
          if (ctrl_i.h_end) begin
            width    <= st_col + 1'b1;
            last_row <= ctrl_i.v_end;
            state    <= S_PADCOL;
          end else begin
            state    <= S_ACTIVE;
          end
        end
        S_PADCOL: begin
          col     <= '0;
          row_cnt <= (row_cnt == 2'd2) ? 2'd2 : row_cnt + 2'd1;
          state   <= last_row ? S_PADROW : S_ACTIVE;
        end
        S_PADROW: begin
          col <= col + 1'b1;
          if (colpad) begin
            col   <= '0;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------- stage 0: window
  pixelctrl_t s0_ctrl;

  always_ff @(posedge clk) begin
    if (rst) begin
      s0_ctrl <= CTRL_IDLE;
      win     <= '0;
    end else if (ce) begin
      s0_ctrl <= CTRL_IDLE;
      if (step) begin
        for (int r = 0; r < 3; r++) begin
          win[r][0] <= (st_col == '0) ? 8'd0 : win[r][1];
          win[r][1] <= (st_col == '0) ? 8'd0 : win[r][2];
        end
        win[0][2] <= top;
        win[1][2] <= mid;
        win[2][2] <= bot;
        if (st_row != 2'd0 && st_col != '0) begin
          s0_ctrl.valid   <= 1'b1;
          s0_ctrl.h_start <= (st_col == CW'(1));
          s0_ctrl.h_end   <= colpad;
          s0_ctrl.v_start <= (st_row == 2'd1) && (st_col == CW'(1));
          s0_ctrl.v_end   <= rowpad && colpad;
        end
      end
    end
  end

  // ------------------------------------------- stage 1: gradients
  grad_t      s1_gh, s1_gv;
  pixelctrl_t s1_ctrl;
  grad_t      gh_c, gv_c;

  always_comb begin
    gh_c = grad_t'({3'b0, win[0][0]}) + (grad_t'({3'b0, win[1][0]}) <<< 1) + grad_t'({3'b0, win[2][0]})
         - grad_t'({3'b0, win[0][2]}) - (grad_t'({3'b0, win[1][2]}) <<< 1) - grad_t'({3'b0, win[2][2]});
    gv_c = grad_t'({3'b0, win[0][0]}) + (grad_t'({3'b0, win[0][1]}) <<< 1) + grad_t'({3'b0, win[0][2]})
         - grad_t'({3'b0, win[2][0]}) - (grad_t'({3'b0, win[2][1]}) <<< 1) - grad_t'({3'b0, win[2][2]});
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_ctrl <= CTRL_IDLE;
      s1_gh   <= '0;
      s1_gv   <= '0;
    end else if (ce) begin
      s1_ctrl <= s0_ctrl;
      s1_gh   <= gh_c;
      s1_gv   <= gv_c;
    end
  end

  // ------------------------------------------------ stage 2: edge
  logic [21:0] mag2, th2;

  always_comb begin
    mag2 = 22'(s1_gh * s1_gh) + 22'(s1_gv * s1_gv);
    th2  = (22'(threshold_i) * 22'(threshold_i)) << 6;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl_o <= CTRL_IDLE;
      edge_o <= 1'b0;
      gh_o   <= '0;
      gv_o   <= '0;
    end else if (ce) begin
      ctrl_o <= s1_ctrl;
      edge_o <= s1_ctrl.valid && (mag2 > th2);
      gh_o   <= s1_gh;
      gv_o   <= s1_gv;
    end
  end

  // Lines longer than MAX_WIDTH do not fit the line memory.
  a_line_fits: assert property (@(posedge clk) disable iff (rst)
    (take && !restart && state == S_ACTIVE) |-> (col < CW'(MAX_WIDTH)));

endmodule
