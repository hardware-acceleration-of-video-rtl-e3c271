// Testbench of axis_video_in: frames of several sizes with random TVALID
// gaps and random core readiness. For every accepted beat the pixel-control
// bundle is compared with the beat's position in the frame; TREADY must
// follow the core's readiness. A frame cut short by a new TUSER must restart
// the line count.
module tb_axis_video_in;
  import sobel_pkg::*;

  localparam int LINES = 5;

  logic clk = 0, rst = 1;
  logic [31:0] tdata = 0;
  logic tvalid = 0, tuser = 0, tlast = 0, core_ready = 0;
  logic tready;
  logic [31:0] pix;
  pixelctrl_t ctrl;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  axis_video_in #(.ACTIVE_LINES(LINES)) dut (
    .clk(clk), .rst(rst), .s_axis_tdata(tdata), .s_axis_tvalid(tvalid), .s_axis_tready(tready),
    .s_axis_tuser(tuser), .s_axis_tlast(tlast), .core_ready_i(core_ready),
    .pixel_o(pix), .ctrl_o(ctrl));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // Sends lines [0, nlines) of a w-wide frame.
  task automatic send(input int w, input int nlines);
    for (int r = 0; r < nlines; r++)
      for (int c = 0; c < w; c++) begin
        bit done;
        done = 0;
        while ($urandom_range(0, 3) == 0) begin  // source gap
          tvalid = 0; core_ready = $urandom_range(0, 1);
          @(negedge clk);
        end
        while (!done) begin
          tvalid = 1; tdata = $urandom; tuser = (r == 0 && c == 0); tlast = (c == w - 1);
          core_ready = ($urandom_range(0, 2) != 0);
          #1;
          check(tready == core_ready, "tready follows the core");
          if (tready) begin
            check(pix == tdata, "pixel passes");
            check(ctrl.valid && ctrl.h_start == (c == 0) && ctrl.h_end == (c == w - 1) &&
                  ctrl.v_start == (r == 0 && c == 0) && ctrl.v_end == (r == LINES - 1 && c == w - 1),
                  $sformatf("ctrl at (%0d,%0d) = %b", r, c, ctrl));
            done = 1;
          end
          @(negedge clk);
        end
      end
    tvalid = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    send(7, LINES);
    send(3, LINES);
    send(4, 2);        // cut short
    send(9, LINES);    // must start counting again
    send(1, LINES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
