// Full-size testbench of sobel_ip with every parameter at its default: one
// 1920 x 1080 frame (a synthetic scene: smooth ramps, a bright rectangle, a
// disc and noise) streamed with an always-valid source into an always-ready
// sink, register settings at their reset values (threshold 5, Sobel on).
// Every one of the 2,073,600 output beats is compared with the reference
// model, and the frame time is checked against the one-pixel-per-clock rate:
// at most (1920+1) * (1080+1) + 16 clocks. The frames per second this gives
// at a 170 MHz clock is printed.
module tb_sobel_ip_full;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  localparam int W = 1920, H = 1080;

  logic clk = 0, aresetn = 0;
  logic [31:0] s_tdata = 0;
  logic s_tvalid = 0, s_tuser = 0, s_tlast = 0, s_tready;
  logic [31:0] m_tdata, rdata;
  logic m_tvalid, m_tuser, m_tlast;
  logic awready, wready, bvalid, arready, rvalid;
  logic [1:0] bresp, rresp;

  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  sobel_ip dut (
    .aclk(clk), .aresetn(aresetn),
    .s_axi_awaddr(16'h0), .s_axi_awvalid(1'b0), .s_axi_awready(awready),
    .s_axi_wdata(32'h0), .s_axi_wstrb(4'h0), .s_axi_wvalid(1'b0), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(1'b1),
    .s_axi_araddr(16'h0), .s_axi_arvalid(1'b0), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(1'b1),
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready),
    .s_axis_tuser(s_tuser), .s_axis_tlast(s_tlast),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tready(1'b1),
    .m_axis_tuser(m_tuser), .m_axis_tlast(m_tlast));

  int rgb[];
  int grey[];
  int n_out = 0, bad = 0, n_edge = 0;

  always @(negedge clk) if (aresetn && m_tvalid) begin
    int gh, gv, lvl, r, c;
    bit e;
    r = n_out / W; c = n_out % W;
    sobel_at(grey, W, H, r, c, gh, gv);
    e = is_edge(gh, gv, 5);
    if (e) n_edge++;
    lvl = out_level(e, gh, gv, 1'b0, 1'b0);
    checks++;
    if (m_tdata != {8'h00, 8'(lvl), 8'(lvl), 8'(lvl)} || m_tuser != (n_out == 0) || m_tlast != (c == W - 1)) begin
      failures++;
      if (failures < 10) $display("FAIL beat (%0d,%0d): %h %b %b", r, c, m_tdata, m_tuser, m_tlast);
    end
    n_out++;
  end

  initial begin
    int t0, t1;
    rgb = new[W * H];
    grey = new[W * H];
    for (int i = 0; i < W * H; i++) begin
      int r, c, R, G, B, dr, dc;
      r = i / W; c = i % W;
      R = (c * 255) / (W - 1);
      G = (r * 255) / (H - 1);
      B = 64 + $urandom_range(0, 15);
      if (r > 200 && r < 500 && c > 300 && c < 900) begin R = 250; G = 240; B = 230; end
      dr = r - 700; dc = c - 1400;
      if (dr * dr + dc * dc < 150 * 150) begin R = 20; G = 30; B = 200; end
      rgb[i] = (R << 16) | (G << 8) | B;
      grey[i] = luma(R, G, B);
    end
    repeat (3) @(negedge clk);
    aresetn = 1;
    repeat (2) @(negedge clk);
    t0 = cyc;
    for (int i = 0; i < W * H; i++) begin
      s_tvalid = 1; s_tdata = 32'(rgb[i]); s_tuser = (i == 0); s_tlast = (i % W == W - 1);
      #1;
      while (!s_tready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    s_tvalid = 0;
    while (n_out < W * H && cyc - t0 < 3 * W * H) @(negedge clk);
    t1 = cyc;
    checks++;
    if (n_out != W * H) begin failures++; $display("FAIL %0d beats of %0d", n_out, W * H); end
    checks++;
    if (t1 - t0 > (W + 1) * (H + 1) + 16) begin
      failures++;
      $display("FAIL frame took %0d clocks", t1 - t0);
    end
    $display("frame: %0d clocks, %0d edge pixels, %0.1f frames/s at 170 MHz",
             t1 - t0, n_edge, 170.0e6 / real'(t1 - t0));
    checks++;
    if (n_edge == 0 || n_edge == W * H) begin failures++; $display("FAIL degenerate edge map"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * W * H + 100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
