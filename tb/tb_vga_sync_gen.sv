// tb_vga_sync_gen: self-checking test of the VGA timing generator.
//
// Two instances run side by side: one with a tiny screen and one with the default 640x480
// timing. For every cycle the expected sub-cycle, x, y, sync, blank, fill line and frame-start
// values are computed here from the cycle count alone (division by the pixel and line
// periods) and compared. The default instance runs for a little over one frame, which also
// checks the frame period of 800 x 525 pixels x 4 cycles.
module tb_vga_sync_gen;

  logic clk = 0, rst = 1;
  int   checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;

  typedef struct packed {
    logic [1:0]  x_cycle;
    logic [10:0] screen_x;
    logic [9:0]  screen_y;
    logic [8:0]  fill_y;
    logic        frame_start, hsync_n, vsync_n, blank;
  } vga_out_t;

  vga_out_t s, d;

  vga_sync_gen #(.CLKS_PER_PIXEL(4), .H_VISIBLE(8), .H_FRONT(2), .H_SYNC(3), .H_BACK(2),
                 .V_VISIBLE(5), .V_FRONT(1), .V_SYNC(2), .V_BACK(1)) u_small (
    .clk, .rst, .x_cycle(s.x_cycle), .screen_x(s.screen_x), .screen_y(s.screen_y),
    .fill_y(s.fill_y), .frame_start(s.frame_start), .hsync_n(s.hsync_n), .vsync_n(s.vsync_n),
    .blank(s.blank));

  vga_sync_gen u_full (
    .clk, .rst, .x_cycle(d.x_cycle), .screen_x(d.screen_x), .screen_y(d.screen_y),
    .fill_y(d.fill_y), .frame_start(d.frame_start), .hsync_n(d.hsync_n), .vsync_n(d.vsync_n),
    .blank(d.blank));

  function automatic vga_out_t model(input longint c, input int hv, input int hf, input int hs,
                                     input int hb, input int vv, input int vf, input int vs,
                                     input int vb);
    vga_out_t m;
    longint ht = hv + hf + hs + hb, vt = vv + vf + vs + vb;
    longint pix = c / 4;
    longint x = pix % ht, y = (pix / ht) % vt;
    m.x_cycle     = 2'(c % 4);
    m.screen_x    = 11'(x);
    m.screen_y    = 10'(y);
    m.fill_y      = (y < vv - 1) ? 9'(y + 1) : 9'd0;
    m.frame_start = (c % (4 * ht * vt)) == 0;
    m.hsync_n     = !(x >= hv + hf && x < hv + hf + hs);
    m.vsync_n     = !(y >= vv + vf && y < vv + vf + vs);
    m.blank       = x >= hv || y >= vv;
    return m;
  endfunction

  int frames_full = 0;
  longint last_start = -1, period = 0;

  always @(posedge clk) if (!rst) begin
    vga_out_t es, ed;
    es = model(cyc, 8, 2, 3, 2, 5, 1, 2, 1);
    ed = model(cyc, 640, 16, 96, 48, 480, 10, 2, 33);
    checks++;
    if (s !== es) begin
      failures++;
      if (failures < 10) $display("FAIL small at %0d: got %h expected %h", cyc, s, es);
    end
    checks++;
    if (d !== ed) begin
      failures++;
      if (failures < 10) $display("FAIL full at %0d: got %h expected %h", cyc, d, ed);
    end
    if (d.frame_start) begin
      if (last_start >= 0) period = cyc - last_start;
      last_start = cyc;
      frames_full++;
    end
    cyc <= cyc + 1;
  end

  initial begin
    repeat (1_800_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    repeat (1_680_000 + 10) @(posedge clk);
    #1;
    checks++;
    if (frames_full != 2 || period != 1_680_000) begin
      failures++;
      $display("FAIL frame period %0d frames %0d", period, frames_full);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
