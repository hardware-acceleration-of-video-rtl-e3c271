// Testbench of sobel_filter: streams several grey frames of different sizes
// and thresholds through the filter and compares every output pixel (edge
// flag, both gradients, line/frame markers) with the reference model. Covers
// back-pressure from in_ready, a randomly gated clock enable, a free-running
// source that only provides the minimum blanking, a frame of a single line
// and a frame restarted by v_start. Checks the 3-cycle latency from the
// completing step to the output and the output count per frame.
module tb_sobel_filter;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  localparam int MAXW = 64;

  logic clk = 0, rst = 1, ce = 1;
  logic [7:0] pixel = 0, th = 0;
  pixelctrl_t ctrl = CTRL_IDLE;
  logic in_ready, edge_px;
  grad_t gv, gh;
  pixelctrl_t octrl;

  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  sobel_filter #(.MAX_WIDTH(MAXW)) dut (
    .clk(clk), .rst(rst), .ce(ce), .pixel_i(pixel), .ctrl_i(ctrl), .threshold_i(th),
    .in_ready_o(in_ready), .edge_o(edge_px), .gv_o(gv), .gh_o(gh), .ctrl_o(octrl));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Current frame under test.
  int img[];
  int fw, fh, fth;
  int out_idx;
  bit frame_done;
  int take_11_cyc;     // cycle when pixel (1,1) was taken
  int first_out_cyc;
  logic ce_q = 0;

  // Stimulus changes and checks happen on the falling edge, clear of the
  // rising edge the design uses. ce_q: ce was high at the last rising edge.
  always @(posedge clk) ce_q <= ce;

  // Output checker: outputs are new after an enabled rising edge.
  always @(negedge clk) begin
    if (!rst && ce_q && octrl.valid) begin
      int r, c, egh, egv;
      r = out_idx / fw; c = out_idx % fw;
      if (out_idx == 0) first_out_cyc = cyc;
      sobel_at(img, fw, fh, r, c, egh, egv);
      check(gh == grad_t'(egh) && gv == grad_t'(egv),
            $sformatf("grad (%0d,%0d): got %0d/%0d exp %0d/%0d", r, c, gh, gv, egh, egv));
      check(edge_px == is_edge(egh, egv, fth), $sformatf("edge (%0d,%0d)", r, c));
      check(octrl.h_start == (c == 0) && octrl.h_end == (c == fw - 1) &&
            octrl.v_start == (r == 0 && c == 0) && octrl.v_end == (r == fh - 1 && c == fw - 1),
            $sformatf("ctrl (%0d,%0d) = %b", r, c, octrl));
      out_idx++;
      if (out_idx == fw * fh) frame_done = 1;
    end
  end

  // Sends one frame. hold_ready: wait for in_ready (back-pressure). Otherwise
  // free-running with hblank idle cycles after a line and vblank after a frame.
  task automatic send_frame(input int w, input int h, input int t, input int mode,
                            input bit hold_ready, input int ce_pct, input int hblank);
    fw = w; fh = h; fth = t; th = 8'(t);
    img = new[w * h];
    foreach (img[i]) begin
      case (mode)
        0: img[i] = $urandom_range(0, 255);
        1: img[i] = ((i % w) >= w / 2) ? 200 : 10;        // vertical step
        default: img[i] = ((i / w) % 3 == 0) ? 255 : 0;   // horizontal stripes
      endcase
    end
    out_idx = 0; frame_done = 0; take_11_cyc = -1; first_out_cyc = -1;
    for (int r = 0; r < h; r++) begin
      for (int c = 0; c < w; c++) begin
        pixel = 8'(img[r * w + c]);
        ctrl  = '{h_start: c == 0, h_end: c == w - 1, v_start: r == 0 && c == 0,
                   v_end: r == h - 1 && c == w - 1, valid: 1'b1};
        forever begin
          bit took;
          ce = ($urandom_range(1, 100) <= ce_pct);
          took = ce && in_ready;
          if (!hold_ready && ce && !in_ready) check(0, "free-running pixel refused");
          if (took && r == 1 && c == 1) take_11_cyc = cyc;
          @(negedge clk);
          if (took || (!hold_ready && ce)) break;
        end
      end
      ctrl = CTRL_IDLE;
      if (!hold_ready) repeat (hblank) begin ce = 1; @(negedge clk); end
    end
    ctrl = CTRL_IDLE;
    while (!frame_done) begin
      ce = ($urandom_range(1, 100) <= ce_pct);
      @(negedge clk);
    end
    ce = 1;
    repeat (3) @(negedge clk);
    check(out_idx == w * h, $sformatf("output count %0d of %0d", out_idx, w * h));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // 1: random content, back-pressure honoured, enable always on: latency check
    send_frame(8, 6, 20, 0, 1, 100, 0);
    check(first_out_cyc - take_11_cyc == 3,
          $sformatf("latency %0d, expected 3", first_out_cyc - take_11_cyc));
    // 2: step edge, random enable gating
    send_frame(12, 5, 10, 1, 1, 60, 0);
    // 3: stripes, different width, threshold 0
    send_frame(16, 7, 0, 2, 1, 100, 0);
    // 4: free-running source with minimum blanking (1 cycle per line, w+1 after frame)
    send_frame(10, 4, 40, 0, 0, 100, 1);
    repeat (11) @(negedge clk);
    // 5: single-line frame and full-width line
    send_frame(MAXW, 1, 5, 0, 1, 100, 0);
    // 6: frame interrupted by v_start: send half a frame, then a full one
    for (int c = 0; c < 5; c++) begin
      pixel = 8'($urandom); ctrl = '{h_start: c == 0, h_end: 1'b0, v_start: c == 0, v_end: 1'b0, valid: 1'b1};
      @(negedge clk);
    end
    send_frame(6, 6, 30, 0, 1, 100, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
