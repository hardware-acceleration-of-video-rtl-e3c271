// AXI4-Lite register block of the edge-detection IP core.
//
// Lets the processor control the core through memory-mapped registers:
//   0x000 IPCore_Reset      write 1 to bit 0: one-cycle soft reset of the core
//   0x004 IPCore_Enable     bit 0: 1 runs the core, 0 freezes it (reset 1)
//   0x008 IPCore_Timestamp  read-only identification word (TIMESTAMP)
//   0x100 Threshold         bits 7:0, edge threshold (reset THRESHOLD_RST)
//   0x104 Sobel_Enable      bit 0: 1 filtered video, 0 input passed through
//   0x108 Background_Color  bit 0: 0 black, 1 white background
//   0x10C Show_Gradient     bit 0: edges drawn with the gradient strength
// Only IPCore_Timestamp reads back; every other address reads 0. Register
// reads take one clock: RVALID rises the cycle after the AR handshake. A
// write is accepted when address and data are both valid (AWREADY and WREADY
// rise together) and answered with OKAY on the next cycle; byte lane 0 must
// be enabled for a write to take effect. A soft reset returns the four
// algorithm registers to their reset values; IPCore_Enable keeps its value.
//
// From the document: the register names IPCore_Reset and IPCore_Enable and
// their meaning, the four algorithm inputs, a single readable register and
// the one-cycle read delay. The offsets, the reset values (Threshold 5,
// Sobel_Enable 1, the others 0) and the read-back word are this design's.
module axi_lite_regs
  import sobel_pkg::*;
#(
  parameter int unsigned ADDR_W        = 16,
  parameter logic [31:0] TIMESTAMP     = 32'h2019_0001,
  parameter logic [7:0]  THRESHOLD_RST = 8'd5
) (
  input  logic              aclk,
  input  logic              aresetn,
  // write address / data / response
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  // read address / data
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // register outputs
  output logic              soft_reset_o,
  output logic              ip_enable_o,
  output logic [7:0]        threshold_o,
  output logic              sobel_enable_o,
  output logic              background_color_o,
  output logic              show_gradient_o
);

  logic        wr_en, rd_en;
  logic [15:0] wr_addr, rd_addr;

  assign s_axi_awready = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_wready  = s_axi_awready;
  assign s_axi_arready = !s_axi_rvalid;
  assign s_axi_bresp   = 2'b00;
  assign s_axi_rresp   = 2'b00;

  assign wr_en   = s_axi_awvalid && s_axi_awready && s_axi_wstrb[0];
  assign rd_en   = s_axi_arvalid && s_axi_arready;
  assign wr_addr = 16'(s_axi_awaddr) & 16'hFFFC;
  assign rd_addr = 16'(s_axi_araddr) & 16'hFFFC;

  // Handshake state.
  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      s_axi_bvalid <= 1'b0;
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else begin
      if (s_axi_awvalid && s_axi_awready) s_axi_bvalid <= 1'b1;
      else if (s_axi_bready)              s_axi_bvalid <= 1'b0;
      if (rd_en) begin
        s_axi_rvalid <= 1'b1;
        s_axi_rdata  <= (rd_addr == ADDR_IPCORE_TIMESTAMP) ? TIMESTAMP : 32'd0;
      end else if (s_axi_rready) begin
        s_axi_rvalid <= 1'b0;
      end
    end
  end

  // Registers.
  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      soft_reset_o <= 1'b0;
      ip_enable_o  <= 1'b1;
    end else begin
      soft_reset_o <= wr_en && (wr_addr == ADDR_IPCORE_RESET) && s_axi_wdata[0];
      if (wr_en && wr_addr == ADDR_IPCORE_ENABLE) ip_enable_o <= s_axi_wdata[0];
    end
  end

  always_ff @(posedge aclk) begin
    if (!aresetn || soft_reset_o) begin
      threshold_o        <= THRESHOLD_RST;
      sobel_enable_o     <= 1'b1;
      background_color_o <= 1'b0;
      show_gradient_o    <= 1'b0;
    end else if (wr_en) begin
      unique case (wr_addr)
        ADDR_THRESHOLD:        threshold_o        <= s_axi_wdata[7:0];
        ADDR_SOBEL_ENABLE:     sobel_enable_o     <= s_axi_wdata[0];
        ADDR_BACKGROUND_COLOR: background_color_o <= s_axi_wdata[0];
        ADDR_SHOW_GRADIENT:    show_gradient_o    <= s_axi_wdata[0];
        default: ;
      endcase
    end
  end

  // A response, once offered, stays until it is taken.
  a_bvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    (s_axi_bvalid && !s_axi_bready) |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    (s_axi_rvalid && !s_axi_rready) |=> (s_axi_rvalid && $stable(s_axi_rdata)));

endmodule
