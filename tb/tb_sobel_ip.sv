// End-to-end testbench of sobel_ip at a reduced frame size (up to 32 pixels
// per line, 6 lines per frame). A processor model programs the AXI4-Lite
// registers; a video source and sink with random TVALID / TREADY exchange
// frames over AXI4-Stream. Every output beat is compared with the reference
// model (data, TUSER, TLAST). The run makes each mechanism of the design
// happen and counts it: border-padding back-pressure, output-FIFO stall,
// IPCore_Enable off, soft reset through IPCore_Reset, bypass (Sobel_Enable 0),
// white background, gradient display, threshold change and timestamp read;
// a mechanism that never happened counts as a failure. Also checks the
// steady-state rate: a frame with an always-ready sink takes at most
// (width+1)*(lines+1) + 16 clocks, and its first output beat is offered 5
// clocks after pixel (1,1) enters.
module tb_sobel_ip;
  import sobel_pkg::*;
  import sobel_ref_pkg::*;

  localparam int MAXW = 32, LINES = 6, DEPTH = 8;
  localparam logic [31:0] TS = 32'h5A5A_0001;

  logic clk = 0, aresetn = 0;
  logic [15:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [31:0] wdata = 0;
  logic [3:0] wstrb = 4'hF;
  logic awready, wready, bvalid, arready, rvalid;
  logic [1:0] bresp, rresp;
  logic [31:0] rdata;
  logic [31:0] s_tdata = 0;
  logic s_tvalid = 0, s_tuser = 0, s_tlast = 0, s_tready;
  logic [31:0] m_tdata;
  logic m_tvalid, m_tready = 0, m_tuser, m_tlast;

  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  sobel_ip #(.MAX_WIDTH(MAXW), .ACTIVE_LINES(LINES), .FIFO_DEPTH(DEPTH), .TIMESTAMP(TS)) dut (
    .aclk(clk), .aresetn(aresetn),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready),
    .s_axis_tuser(s_tuser), .s_axis_tlast(s_tlast),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready),
    .m_axis_tuser(m_tuser), .m_axis_tlast(m_tlast));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------ mechanism counters
  int n_border_stall = 0, n_fifo_stall = 0, n_disabled = 0, n_soft_reset = 0;
  int n_bypass = 0, n_white_bg = 0, n_gradient = 0, n_threshold = 0, n_timestamp = 0;
  bit disabled_now = 0;

  always @(negedge clk) if (aresetn) begin
    if (s_tvalid && !s_tready && dut.ip_enable && dut.out_room) n_border_stall++;
    if (!dut.out_room) n_fifo_stall++;
    if (!dut.ip_enable) begin
      n_disabled++;
      check(!s_tready, "no input taken while disabled");
    end
  end

  // ------------------------------------------------------------ AXI4-Lite
  task automatic reg_write(input logic [15:0] a, input logic [31:0] d);
    awaddr = a; wdata = d; awvalid = 1; wvalid = 1; bready = 1;
    #1;
    while (!awready) begin @(negedge clk); #1; end
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    @(negedge clk);
    bready = 0;
  endtask

  task automatic reg_read(input logic [15:0] a, output logic [31:0] d);
    araddr = a; arvalid = 1; rready = 1;
    #1;
    while (!arready) begin @(negedge clk); #1; end
    @(negedge clk);
    arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(negedge clk);
    rready = 0;
  endtask

  // ------------------------------------------------------ expected stream
  typedef struct packed { logic user; logic last; logic [31:0] data; } beat_t;
  beat_t exp_q [$];
  bit ignore_out = 0;
  int n_beats_at_sof = -1;
  int sink_ready_pct = 70;
  int n_beats = 0;
  int t_take_11 = 0, t_first_out = 0;

  always @(negedge clk) if (aresetn) begin
    m_tready = ($urandom_range(1, 100) <= sink_ready_pct);
    #1;
    if (m_tvalid && m_tuser && !ignore_out && n_beats_at_sof != n_beats) begin
      t_first_out = cyc;
      n_beats_at_sof = n_beats;
    end
    if (m_tvalid && m_tready && !ignore_out) begin
      beat_t e;
      if (exp_q.size() == 0) check(0, "unexpected output beat");
      else begin
        e = exp_q.pop_front();
        check({m_tuser, m_tlast, m_tdata} == e,
              $sformatf("beat %0d: got %b %b %h exp %b %b %h", n_beats, m_tuser, m_tlast, m_tdata,
                        e.user, e.last, e.data));
      end
      n_beats++;
    end
  end

  // Builds the expected output of a frame for the given settings.
  task automatic expect_frame(ref int rgb[], input int w, input int th, input bit sob,
                              input bit bg, input bit sg);
    int grey[];
    grey = new[w * LINES];
    foreach (grey[i]) grey[i] = luma((rgb[i] >> 16) & 255, (rgb[i] >> 8) & 255, rgb[i] & 255);
    for (int i = 0; i < w * LINES; i++) begin
      int gh, gv, lvl;
      beat_t b;
      b.user = (i == 0);
      b.last = (i % w == w - 1);
      if (sob) begin
        sobel_at(grey, w, LINES, i / w, i % w, gh, gv);
        lvl = out_level(is_edge(gh, gv, th), gh, gv, bg, sg);
        b.data = {8'h00, 8'(lvl), 8'(lvl), 8'(lvl)};
      end else begin
        b.data = 32'(rgb[i]);
      end
      exp_q.push_back(b);
    end
  endtask

  function automatic void make_frame(ref int rgb[], input int w, input int kind);
    rgb = new[w * LINES];
    foreach (rgb[i]) begin
      int r, c;
      r = i / w; c = i % w;
      case (kind)
        0: rgb[i] = $urandom & 32'h00FF_FFFF;
        1: rgb[i] = (c > w / 3 && r > 1) ? 32'h00C0_B0A0 : 32'h0010_2030;
        default: rgb[i] = ((r + c) % 4 < 2) ? 32'h00FF_FFFF : 32'h0000_0000;
      endcase
    end
  endfunction

  // Sends the first n_px pixels of a frame; valid_pct sets the source's duty.
  task automatic send(ref int rgb[], input int w, input int n_px, input int valid_pct);
    for (int i = 0; i < n_px; i++) begin
      bit took;
      took = 0;
      while (!took) begin
        s_tvalid = ($urandom_range(1, 100) <= valid_pct);
        s_tdata = 32'(rgb[i]); s_tuser = (i == 0); s_tlast = (i % w == w - 1);
        #1;
        took = s_tvalid && s_tready;
        if (took && i == w + 1) t_take_11 = cyc;
        @(negedge clk);
      end
    end
    s_tvalid = 0;
  endtask

  task automatic wait_drain();
    int guard;
    guard = 0;
    while (exp_q.size() != 0 && guard < 20000) begin @(negedge clk); guard++; end
    check(exp_q.size() == 0, $sformatf("%0d beats missing", exp_q.size()));
    repeat (MAXW + 10) @(negedge clk);
  endtask

  int img[];
  int th;
  bit bg, sg, sob;

  task automatic run_frame(input int w, input int kind, input int valid_pct);
    make_frame(img, w, kind);
    expect_frame(img, w, th, sob, bg, sg);
    if (!sob) n_bypass++;
    if (sob && bg) n_white_bg++;
    if (sob && sg) n_gradient++;
    send(img, w, w * LINES, valid_pct);
    wait_drain();
  endtask

  task automatic set_mode(input int t, input bit s, input bit b, input bit g);
    if (t != th) n_threshold++;
    th = t; sob = s; bg = b; sg = g;
    reg_write(ADDR_THRESHOLD, 32'(t));
    reg_write(ADDR_SOBEL_ENABLE, 32'(s));
    reg_write(ADDR_BACKGROUND_COLOR, 32'(b));
    reg_write(ADDR_SHOW_GRADIENT, 32'(g));
  endtask

  initial begin
    logic [31:0] d;
    int t0;
    repeat (3) @(negedge clk);
    aresetn = 1;
    @(negedge clk);
    reg_read(ADDR_IPCORE_TIMESTAMP, d);
    check(d == TS, "timestamp");
    n_timestamp++;
    // defaults: threshold 5, Sobel on
    th = 5; sob = 1; bg = 0; sg = 0;
    run_frame(10, 0, 80);
    set_mode(40, 1, 1, 0);
    run_frame(MAXW, 1, 100);
    set_mode(20, 1, 0, 1);
    sink_ready_pct = 20;                    // slow sink: FIFO fills, core stalls
    run_frame(16, 2, 100);
    sink_ready_pct = 70;
    // IPCore_Enable off in the middle of a frame
    set_mode(30, 1, 1, 1);
    make_frame(img, 12, 0);
    expect_frame(img, 12, th, sob, bg, sg);
    fork
      send(img, 12, 12 * LINES, 90);
      begin
        repeat (30) @(negedge clk);
        reg_write(ADDR_IPCORE_ENABLE, 32'd0);
        repeat (40) @(negedge clk);
        check(!m_tvalid || exp_q.size() > 0, "disabled core holds its output");
        reg_write(ADDR_IPCORE_ENABLE, 32'd1);
      end
    join
    wait_drain();
    // bypass
    set_mode(30, 0, 0, 0);
    run_frame(9, 0, 60);
    // soft reset in the middle of a frame, then a clean frame at reset values
    set_mode(25, 1, 0, 0);
    make_frame(img, 8, 1);
    ignore_out = 1;
    send(img, 8, 8 * 3 + 2, 100);
    reg_write(ADDR_IPCORE_RESET, 32'd1);
    n_soft_reset++;
    repeat (DEPTH + 4) @(negedge clk);
    check(!m_tvalid, "soft reset empties the output");
    ignore_out = 0;
    th = 5; sob = 1; bg = 0; sg = 0;       // registers are back at their reset values
    run_frame(11, 0, 100);
    // rate: always-ready sink, always-valid source
    sink_ready_pct = 100;
    make_frame(img, MAXW, 0);
    expect_frame(img, MAXW, th, sob, bg, sg);
    t0 = cyc;
    send(img, MAXW, MAXW * LINES, 100);
    while (exp_q.size() != 0) @(negedge clk);
    check(t_first_out - t_take_11 == 5,
          $sformatf("first output %0d clocks after pixel (1,1), expected 5", t_first_out - t_take_11));
    check(cyc - t0 <= (MAXW + 1) * (LINES + 1) + 16,
          $sformatf("frame took %0d clocks, bound %0d", cyc - t0, (MAXW + 1) * (LINES + 1) + 16));
    wait_drain();

    $display("mechanisms: border_stall=%0d fifo_stall=%0d disabled=%0d soft_reset=%0d bypass=%0d white_bg=%0d gradient=%0d threshold=%0d timestamp=%0d",
             n_border_stall, n_fifo_stall, n_disabled, n_soft_reset, n_bypass, n_white_bg, n_gradient,
             n_threshold, n_timestamp);
    check(n_border_stall > 0, "border padding back-pressure seen");
    check(n_fifo_stall > 0, "output FIFO stall seen");
    check(n_disabled > 0, "IPCore_Enable off seen");
    check(n_soft_reset > 0, "soft reset seen");
    check(n_bypass > 0, "bypass seen");
    check(n_white_bg > 0, "white background seen");
    check(n_gradient > 0, "gradient display seen");
    check(n_threshold > 0, "threshold change seen");
    check(n_timestamp > 0, "timestamp read seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
