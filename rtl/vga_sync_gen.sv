// VGA sync generator: the raster timing half of the VGA controller.
//
// Two counters walk the pixel position through one line (active, front
// porch, sync, back porch) and the lines through one frame. They advance on
// every cycle in which pix_en is high, so the block runs in the system clock
// domain with the pixel rate set by the enable. hsync_n and vsync_n are
// active low. 'active' marks the visible area and (x, y) is the position of
// the pixel being shown in it. vblank_start pulses for one pixel-enable cycle
// when the first line after the visible area begins; the pixel buffer DMA
// uses it to rewind to the top of the frame.
//
// All outputs are combinational decodes of the two counters, so they are
// valid in the same cycle as the counter state. The defaults are the standard
// 640x480 at 60 Hz timing (800 x 525 pixel periods at 25 MHz, 59.5 Hz): the
// resolution and refresh rate come from the prototype, the porch and sync
// lengths are the common industry values.
module vga_sync_gen #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pix_en,       // one pixel period has elapsed
  output logic        hsync_n,
  output logic        vsync_n,
  output logic        active,       // (x, y) is inside the visible area
  output logic [11:0] x,
  output logic [11:0] y,
  output logic        vblank_start  // first pixel of the first blank line
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [11:0] hcnt, vcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcnt <= '0;
      vcnt <= '0;
    end else if (pix_en) begin
      if (hcnt == 12'(H_TOTAL - 1)) begin
        hcnt <= '0;
        vcnt <= (vcnt == 12'(V_TOTAL - 1)) ? '0 : vcnt + 12'd1;
      end else begin
        hcnt <= hcnt + 12'd1;
      end
    end
  end

  always_comb begin
    active       = (hcnt < 12'(H_ACTIVE)) && (vcnt < 12'(V_ACTIVE));
    hsync_n      = !((hcnt >= 12'(H_ACTIVE + H_FP)) && (hcnt < 12'(H_ACTIVE + H_FP + H_SYNC)));
    vsync_n      = !((vcnt >= 12'(V_ACTIVE + V_FP)) && (vcnt < 12'(V_ACTIVE + V_FP + V_SYNC)));
    x            = hcnt;
    y            = vcnt;
    vblank_start = pix_en && (hcnt == '0) && (vcnt == 12'(V_ACTIVE));
  end

endmodule
