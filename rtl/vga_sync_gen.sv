// vga_sync_gen: VGA timing generator of the XD GPU (640x480, 60 Hz).
//
// The GPU runs on the 100 MHz system clock and shows one pixel every CLKS_PER_PIXEL = 4
// cycles (25 MHz pixel rate). A pixel sub-cycle counter, a horizontal pixel counter and a line
// counter give the beam position; sync pulses and blanking are decoded from them.
//   x_cycle   0..CLKS_PER_PIXEL-1, position inside the current pixel
//   screen_x  0..H_TOTAL-1, pixels 0..H_VISIBLE-1 are visible, then horizontal blanking
//   screen_y  0..V_TOTAL-1, lines 0..V_VISIBLE-1 are visible, then vertical blanking
//   fill_y    line the GPU is generating into its spare line buffer: the line after the one
//             on screen, 0 during vertical blanking (the first line of the next frame)
//   frame_start  one-cycle pulse at x = 0, y = 0, x_cycle = 0
//   hsync_n, vsync_n  active-low sync pulses; blank high outside the visible area
// All outputs are registered counters or decoded from them in the same cycle.
//
// The resolution, the 100 MHz clock and the two-bit sub-cycle field follow the
// specification. The porch and sync widths are the usual 640x480 industry timing
// (800 x 525 totals), not given in the specification; fill_y's definition is this design's.
module vga_sync_gen #(
  parameter int unsigned CLKS_PER_PIXEL = 4,
  parameter int unsigned H_VISIBLE      = 640,
  parameter int unsigned H_FRONT        = 16,
  parameter int unsigned H_SYNC         = 96,
  parameter int unsigned H_BACK         = 48,
  parameter int unsigned V_VISIBLE      = 480,
  parameter int unsigned V_FRONT        = 10,
  parameter int unsigned V_SYNC         = 2,
  parameter int unsigned V_BACK         = 33
) (
  input  logic        clk,
  input  logic        rst,
  output logic [1:0]  x_cycle,
  output logic [10:0] screen_x,
  output logic [9:0]  screen_y,
  output logic [8:0]  fill_y,
  output logic        frame_start,
  output logic        hsync_n,
  output logic        vsync_n,
  output logic        blank
);

  localparam int unsigned H_TOTAL = H_VISIBLE + H_FRONT + H_SYNC + H_BACK;
  localparam int unsigned V_TOTAL = V_VISIBLE + V_FRONT + V_SYNC + V_BACK;

  wire last_cycle = 32'(x_cycle) == CLKS_PER_PIXEL - 1;
  wire last_pixel = 32'(screen_x) == H_TOTAL - 1;
  wire last_line  = 32'(screen_y) == V_TOTAL - 1;

  always_ff @(posedge clk) begin
    if (rst) begin
      x_cycle  <= '0;
      screen_x <= '0;
      screen_y <= '0;
    end else begin
      x_cycle <= last_cycle ? '0 : x_cycle + 1'b1;
      if (last_cycle) begin
        screen_x <= last_pixel ? '0 : screen_x + 1'b1;
        if (last_pixel) screen_y <= last_line ? '0 : screen_y + 1'b1;
      end
    end
  end

  always_comb begin
    frame_start = x_cycle == '0 && screen_x == '0 && screen_y == '0;
    hsync_n = !(32'(screen_x) >= H_VISIBLE + H_FRONT && 32'(screen_x) < H_VISIBLE + H_FRONT + H_SYNC);
    vsync_n = !(32'(screen_y) >= V_VISIBLE + V_FRONT && 32'(screen_y) < V_VISIBLE + V_FRONT + V_SYNC);
    blank   = 32'(screen_x) >= H_VISIBLE || 32'(screen_y) >= V_VISIBLE;
    fill_y  = (32'(screen_y) < V_VISIBLE - 1) ? 9'(screen_y + 1'b1) : '0;
  end

endmodule
