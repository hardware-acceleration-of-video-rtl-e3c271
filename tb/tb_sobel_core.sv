// Testbench of sobel_core: RGB frames with pixel control through the whole
// algorithm. Each output word must be the reference grey level, copied to
// R, G and B, with correct line and frame markers. Frames cover the three
// output-control settings (background colour, gradient display), a gated
// clock enable, and the bypass (Sobel_Enable = 0), where the input words and
// markers must come out unchanged. Latencies checked: processed path 4
// enabled clocks after the step that completes the first pixel's
// neighbourhood, bypass path 2 clocks.
module tb_sobel_core;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  localparam int MAXW = 32;

  logic clk = 0, rst = 1, ce = 1;
  logic [31:0] pixel = 0;
  pixelctrl_t ctrl = CTRL_IDLE;
  logic [7:0] th = 0;
  logic sobel_en = 1, bg = 0, sg = 0;
  logic in_ready;
  logic [31:0] opix;
  pixelctrl_t octrl;

  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  sobel_core #(.MAX_WIDTH(MAXW)) dut (
    .clk(clk), .rst(rst), .ce(ce), .pixel_i(pixel), .ctrl_i(ctrl), .threshold_i(th),
    .sobel_enable_i(sobel_en), .background_color_i(bg), .show_gradient_i(sg),
    .in_ready_o(in_ready), .pixel_o(opix), .ctrl_o(octrl));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int rgb[];     // input words
  int grey[];    // reference intensity image
  int fw, fh, out_idx, t_first_take, t_first_out, t_take_11;
  bit frame_done;

  always @(negedge clk) begin
    if (!rst && octrl.valid) begin
      int r, c, egh, egv, lvl;
      r = out_idx / fw; c = out_idx % fw;
      if (out_idx == 0) t_first_out = cyc;
      check(octrl.h_start == (c == 0) && octrl.h_end == (c == fw - 1) &&
            octrl.v_start == (r == 0 && c == 0) && octrl.v_end == (r == fh - 1 && c == fw - 1),
            $sformatf("ctrl (%0d,%0d)", r, c));
      if (sobel_en) begin
        sobel_at(grey, fw, fh, r, c, egh, egv);
        lvl = out_level(is_edge(egh, egv, int'(th)), egh, egv, bg, sg);
        check(opix == {8'h00, 8'(lvl), 8'(lvl), 8'(lvl)},
              $sformatf("pixel (%0d,%0d) of %0dx%0d = %h, expected level %0d", r, c, fw, fh, opix, lvl));
      end else begin
        check(opix == 32'(rgb[out_idx]), $sformatf("bypass pixel (%0d,%0d)", r, c));
      end
      out_idx++;
      if (out_idx == fw * fh) frame_done = 1;
    end
  end

  task automatic send_frame(input int w, input int h, input int ce_pct);
    fw = w; fh = h;
    rgb = new[w * h]; grey = new[w * h];
    foreach (rgb[i]) begin
      int r, g, b;
      r = ((i % w) > w / 2) ? 220 : $urandom_range(0, 60);
      g = $urandom_range(0, 255);
      b = ((i / w) % 2) ? 255 : 0;
      rgb[i] = (r << 16) | (g << 8) | b;
      grey[i] = luma(r, g, b);
    end
    out_idx = 0; frame_done = 0; t_first_take = -1; t_take_11 = -1; t_first_out = -1;
    for (int i = 0; i < w * h; i++) begin
      pixel = 32'(rgb[i]);
      ctrl = '{h_start: i % w == 0, h_end: i % w == w - 1, v_start: i == 0,
               v_end: i == w * h - 1, valid: 1'b1};
      forever begin
        bit took;
        ce = ($urandom_range(1, 100) <= ce_pct);
        took = ce && in_ready;
        if (took && i == 0) t_first_take = cyc;
        if (took && i == w + 1) t_take_11 = cyc;
        @(negedge clk);
        if (took) break;
      end
    end
    ctrl = CTRL_IDLE;
    while (!frame_done) begin
      ce = ($urandom_range(1, 100) <= ce_pct);
      @(negedge clk);
    end
    ce = 1;
    repeat (3) @(negedge clk);
    check(out_idx == w * h, "output count");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    th = 12; bg = 0; sg = 0;
    send_frame(10, 6, 100);
    check(t_first_out - t_take_11 == 4, $sformatf("processed latency %0d", t_first_out - t_take_11));
    th = 6; bg = 1; sg = 0;
    send_frame(12, 5, 70);
    th = 3; bg = 0; sg = 1;
    send_frame(MAXW, 4, 100);
    th = 20; bg = 1; sg = 1;
    send_frame(7, 7, 50);
    sobel_en = 0;
    repeat (20) @(negedge clk);
    send_frame(9, 4, 100);
    check(t_first_out - t_first_take == 2, $sformatf("bypass latency %0d", t_first_out - t_first_take));
    send_frame(5, 3, 60);
    repeat (20) @(negedge clk);   // let the filter finish the bypassed frame
    sobel_en = 1;
    @(negedge clk);
    send_frame(8, 3, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
