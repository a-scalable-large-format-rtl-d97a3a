// VGA controller: shows the image held in the SRAM image buffer on a monitor.
//
// It holds the two parts the original controller is drawn with: a sync
// generator (vga_sync_gen) that produces the raster timing, and a pixel buffer
// DMA (pixel_buffer_dma) that reads the frame from the SRAM and hands one
// pixel to the raster for every visible position. A divider derives the pixel
// rate from the system clock: one pixel every PIX_DIV clocks, 25 MHz from
// 100 MHz. vga_clk is that pixel clock for the DAC, low in the first half of
// each pixel period, so it rises in the middle of
// the period in which the colour outputs are stable.
//
// The outputs (8-bit red, green and blue, active-low syncs, blank_n) are
// registered together once per pixel, so colour and sync stay aligned; they
// lag the sync generator's counters by one clock. Colour is forced to black
// outside the visible area. 24-bit colour and the 640x480 at 60 Hz screen
// follow the prototype; PIX_DIV and the output register are this design's
// choice.
module vga_controller #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33,
  parameter int unsigned PIX_DIV  = 4,
  parameter int unsigned AW       = 20,
  parameter int unsigned FB_BASE  = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  // SRAM read port (to the SRAM controller's priority port)
  output logic          rd_req,
  output logic [AW-1:0] rd_addr,
  input  logic          rd_gnt,
  input  logic          rd_rvalid,
  input  logic [31:0]   rd_rdata,
  // monitor
  output logic          vga_clk,
  output logic [7:0]    vga_r,
  output logic [7:0]    vga_g,
  output logic [7:0]    vga_b,
  output logic          vga_hs,
  output logic          vga_vs,
  output logic          vga_blank_n,
  output logic          underflow     // a visible pixel found the FIFO empty
);

  localparam int unsigned DW = (PIX_DIV > 1) ? $clog2(PIX_DIV) : 1;

  logic [DW-1:0] div, div_next;
  logic          pix_en;
  logic          hsync_n, vsync_n, active, vblank_start;
  logic [11:0]   x, y;
  zc_pkg::rgb_t  pix;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div <= '0;
    else        div <= div_next;
  end

  assign pix_en   = (div == DW'(PIX_DIV - 1));
  assign div_next = pix_en ? '0 : div + 1'b1;

  vga_sync_gen #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)
  ) u_sync (
    .clk, .rst_n, .pix_en,
    .hsync_n, .vsync_n, .active, .x, .y, .vblank_start
  );

  pixel_buffer_dma #(
    .H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .AW(AW), .BASE(FB_BASE)
  ) u_dma (
    .clk, .rst_n,
    .restart  (vblank_start),
    .pop      (pix_en && active),
    .pix,
    .underflow,
    .rd_req, .rd_addr, .rd_gnt, .rd_rvalid, .rd_rdata
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vga_clk     <= 1'b0;
      vga_r       <= '0;
      vga_g       <= '0;
      vga_b       <= '0;
      vga_hs      <= 1'b1;
      vga_vs      <= 1'b1;
      vga_blank_n <= 1'b0;
    end else begin
      vga_clk <= (div_next >= DW'(PIX_DIV / 2));
      if (pix_en) begin
        vga_r       <= active ? pix[23:16] : 8'h00;
        vga_g       <= active ? pix[15:8]  : 8'h00;
        vga_b       <= active ? pix[7:0]   : 8'h00;
        vga_hs      <= hsync_n;
        vga_vs      <= vsync_n;
        vga_blank_n <= active;
      end
    end
  end

  // x and y are used through 'active' only; they stay visible for debug.
  logic unused;
  assign unused = ^{x, y};

endmodule
