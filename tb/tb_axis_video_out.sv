// Testbench of axis_video_out: a producer that, like the core, may only emit
// a pixel one clock after room_o was high, against a consumer with random
// TREADY. Checks order and content of every beat, TUSER = v_start and
// TLAST = h_end, that room_o drops when the FIFO holds DEPTH-1 entries, that
// the FIFO really fills, and that nothing is lost.
module tb_axis_video_out;
  import sobel_pkg::*;

  localparam int DEPTH = 8;

  logic clk = 0, rst = 1;
  logic [31:0] pix = 0;
  pixelctrl_t ctrl = CTRL_IDLE;
  logic room, tvalid, tready = 0, tuser, tlast;
  logic [31:0] tdata;
  int checks = 0, failures = 0;
  logic [33:0] sent [$];
  int n_out = 0, max_fill = 0, fill = 0;
  logic room_q = 0;
  bit pop_prev = 0;

  always #5 clk = ~clk;

  axis_video_out #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst(rst), .pixel_i(pix), .ctrl_i(ctrl), .room_o(room),
    .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tready(tready),
    .m_axis_tuser(tuser), .m_axis_tlast(tlast));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) room_q <= room;

  // Consumer and fill tracking, evaluated just before each rising edge.
  always @(negedge clk) if (!rst) begin
    logic [33:0] exp_b;
    tready = ($urandom_range(0, 9) < (n_out < 300 ? 3 : 8));
    #1;
    // ctrl still holds what was pushed at the last rising edge
    fill = fill + (ctrl.valid ? 1 : 0) - (pop_prev ? 1 : 0);
    check(room == (fill < DEPTH - 1), $sformatf("room with %0d entries", fill));
    if (fill > max_fill) max_fill = fill;
    if (tvalid && tready) begin
      exp_b = sent.pop_front();
      check({tuser, tlast, tdata} == exp_b, $sformatf("beat %0d", n_out));
      n_out++;
    end
    pop_prev = tvalid && tready;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 600; ) begin
      // producer acts on the room seen at the last rising edge
      if (room_q && $urandom_range(0, 3) != 0) begin
        pix = $urandom;
        ctrl = '{h_start: 1'b0, h_end: (i % 5 == 4), v_start: (i % 20 == 0), v_end: 1'b0, valid: 1'b1};
        sent.push_back({ctrl.v_start, ctrl.h_end, pix});
        i++;
      end else begin
        ctrl = CTRL_IDLE;
      end
      @(negedge clk);
      #2;
    end
    ctrl = CTRL_IDLE;
    repeat (200) @(negedge clk);
    check(n_out == 600, $sformatf("all beats delivered (%0d)", n_out));
    check(max_fill >= DEPTH - 1, $sformatf("FIFO filled to %0d", max_fill));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
