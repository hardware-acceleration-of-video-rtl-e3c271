// Testbench of axi_lite_regs: reset values, writes to every register, byte
// strobe handling, read-back of the single readable register (and 0
// elsewhere), the one-clock read delay, a held write response while BREADY
// is low, and the soft reset (one-cycle pulse, algorithm registers back to
// their reset values, IPCore_Enable unchanged).
module tb_axi_lite_regs;
  import sobel_pkg::*;

  localparam logic [31:0] TS = 32'hCAFE_0123;

  logic clk = 0, aresetn = 0;
  logic [15:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [31:0] wdata = 0;
  logic [3:0] wstrb = 0;
  logic awready, wready, bvalid, arready, rvalid;
  logic [1:0] bresp, rresp;
  logic [31:0] rdata;
  logic soft_reset, ip_enable, sobel_enable, bg, sg;
  logic [7:0] th;
  int checks = 0, failures = 0;
  int cyc = 0;
  int soft_pulses = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (aresetn && soft_reset) soft_pulses++;
  end

  axi_lite_regs #(.TIMESTAMP(TS)) dut (
    .aclk(clk), .aresetn(aresetn),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .soft_reset_o(soft_reset), .ip_enable_o(ip_enable), .threshold_o(th),
    .sobel_enable_o(sobel_enable), .background_color_o(bg), .show_gradient_o(sg));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic axi_write(input logic [15:0] a, input logic [31:0] d, input logic [3:0] s,
                           input int bready_delay);
    awaddr = a; wdata = d; wstrb = s; awvalid = 1; wvalid = 1; bready = 0;
    do @(negedge clk); while (!(awready_q));
    awvalid = 0; wvalid = 0;
    repeat (bready_delay) begin
      check(bvalid, "bvalid held while bready low");
      @(negedge clk);
    end
    bready = 1;
    while (!bvalid) @(negedge clk);
    check(bresp == 2'b00, "bresp OKAY");
    @(negedge clk);
    bready = 0;
  endtask

  // awready as seen at the last rising edge
  logic awready_q = 0;
  always @(posedge clk) awready_q <= awready && awvalid;

  task automatic axi_read(input logic [15:0] a, output logic [31:0] d);
    int t0;
    araddr = a; arvalid = 1; rready = 1;
    while (!arready) @(negedge clk);
    t0 = cyc;                 // handshake at the coming rising edge
    @(negedge clk);
    arvalid = 0;
    check(rvalid && cyc - t0 == 1, $sformatf("read data one clock after the address (%0d)", cyc - t0));
    check(rresp == 2'b00, "rresp OKAY");
    d = rdata;
    @(negedge clk);
    rready = 0;
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(negedge clk);
    aresetn = 1;
    @(negedge clk);
    check(ip_enable == 1 && th == 8'd5 && sobel_enable == 1 && bg == 0 && sg == 0 && !soft_reset,
          "reset values");
    axi_read(ADDR_IPCORE_TIMESTAMP, d);
    check(d == TS, $sformatf("timestamp read %h", d));
    axi_read(ADDR_THRESHOLD, d);
    check(d == 0, "unreadable register reads 0");
    axi_write(ADDR_THRESHOLD, 32'd77, 4'hF, 0);
    check(th == 8'd77, "threshold written");
    axi_write(ADDR_THRESHOLD, 32'd99, 4'h0, 0);
    check(th == 8'd77, "write without byte lane 0 ignored");
    axi_write(ADDR_SOBEL_ENABLE, 32'd0, 4'hF, 3);
    check(sobel_enable == 0, "sobel_enable written");
    axi_write(ADDR_BACKGROUND_COLOR, 32'd1, 4'hF, 0);
    check(bg == 1, "background written");
    axi_write(ADDR_SHOW_GRADIENT, 32'd1, 4'hF, 2);
    check(sg == 1, "show_gradient written");
    axi_write(ADDR_IPCORE_ENABLE, 32'd0, 4'hF, 0);
    check(ip_enable == 0, "enable cleared");
    axi_write(16'h0200, 32'hFFFF_FFFF, 4'hF, 0);
    check(th == 8'd77 && sobel_enable == 0 && bg == 1 && sg == 1 && ip_enable == 0,
          "unmapped write changes nothing");
    axi_write(ADDR_IPCORE_RESET, 32'd0, 4'hF, 0);
    check(soft_pulses == 0, "writing 0 to IPCore_Reset does nothing");
    axi_write(ADDR_IPCORE_RESET, 32'd1, 4'hF, 0);
    check(soft_pulses == 1, $sformatf("one soft reset pulse (%0d)", soft_pulses));
    check(th == 8'd5 && sobel_enable == 1 && bg == 0 && sg == 0, "soft reset restores registers");
    check(ip_enable == 0, "soft reset keeps IPCore_Enable");
    axi_write(ADDR_IPCORE_ENABLE, 32'd1, 4'hF, 0);
    check(ip_enable == 1, "enable set");
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
