// tb_iir_xd_gpu: self-checking test of the XD GPU's IIR block and SRAM usage logger.
//
// A small-screen vga_sync_gen supplies the beam position; random processes toggle the CPU and
// GPU activity bits; a log memory model accepts writes with random wait states. A reference
// process here builds, from the same signals, the event words a capture of N frames must
// produce (frame-start words with the frame number, change words with x, sub-cycle and fill
// line). The test checks the general registers, faulty-access counters, the frame counter and
// its reset by the IP reset register, a two-frame capture word by word, a capture cut short
// by a small log memory, and the overrun flag when the log memory stalls.
module tb_iir_xd_gpu;
  import iir_pkg::*;

  localparam int FIFO_DEPTH = 16;

  logic        clk = 0, rst = 1;
  logic [4:0]  av_address = '0;
  logic        av_read = 0, av_write = 0;
  logic [31:0] av_writedata = '0, av_readdata;
  logic        gpu_reset;
  logic        frame_start, hsync_n, vsync_n, blank;
  logic [10:0] screen_x;
  logic [1:0]  x_cycle;
  logic [9:0]  screen_y;
  logic [8:0]  fill_y;
  logic        cpu_active = 0, gpu_active = 0;
  logic [31:0] lm_address, lm_writedata;
  logic        lm_write, lm_waitrequest = 0;
  int          checks = 0, failures = 0;
  int          wait_pct = 30;

  always #5 clk = ~clk;

  vga_sync_gen #(.CLKS_PER_PIXEL(4), .H_VISIBLE(16), .H_FRONT(2), .H_SYNC(3), .H_BACK(3),
                 .V_VISIBLE(6), .V_FRONT(1), .V_SYNC(1), .V_BACK(2)) u_vga (
    .clk, .rst(rst || gpu_reset), .x_cycle, .screen_x, .screen_y, .fill_y, .frame_start,
    .hsync_n, .vsync_n, .blank);

  iir_xd_gpu #(.FIFO_DEPTH(FIFO_DEPTH)) dut (.*);

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic rd(input int o, output logic [31:0] v);
    av_address = 5'(o); av_read = 1;
    @(posedge clk); #1 av_read = 0;
    v = av_readdata;
  endtask

  task automatic wr(input int o, input logic [31:0] d);
    av_address = 5'(o); av_writedata = d; av_write = 1;
    @(posedge clk); #1 av_write = 0;
  endtask

  // ---------------------------------------------------------------- activity stimulus
  always @(posedge clk) begin
    if (($urandom % 9) == 0)  cpu_active <= !cpu_active;
    if (($urandom % 13) == 0) gpu_active <= !gpu_active;
    lm_waitrequest <= int'($urandom % 100) < wait_pct;
  end

  // ---------------------------------------------------------------- log memory model
  logic [31:0] lmem [logic [31:0]];
  int          n_lm_writes = 0;
  always @(posedge clk) if (lm_write && !lm_waitrequest) begin
    lmem[lm_address] = lm_writedata;
    n_lm_writes++;
  end

  // ---------------------------------------------------------------- reference
  bit          ref_armed = 0, ref_capt = 0;
  int          ref_left = 0;
  int          frames = 0;           // frame starts since the GPU left reset
  logic [1:0]  act_prev = '0;
  logic [31:0] exp_words[$];

  always @(posedge clk) if (!rst) begin
    logic [1:0] act;
    act = {cpu_active, gpu_active};
    if (gpu_reset) frames = 0;
    else if (frame_start) begin
      frames++;
      if (ref_armed || (ref_capt && ref_left != 1)) begin
        if (ref_capt) ref_left--;
        ref_armed = 0; ref_capt = 1;
        exp_words.push_back({1'b1, 9'd0, 20'(frames), act});
      end else if (ref_capt) begin
        ref_capt = 0;
      end
    end else if (ref_capt && act != act_prev) begin
      exp_words.push_back({1'b0, 7'd0, screen_x, x_cycle, fill_y, act});
    end
    act_prev <= act;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic start_capture(input int n);
    exp_words.delete();
    lmem.delete();
    av_address = 5'h10; av_writedata = n; av_write = 1;
    @(posedge clk); #1 av_write = 0;
    ref_armed = 1; ref_capt = 0; ref_left = n;
  endtask

  task automatic wait_done(output int polls);
    logic [31:0] v;
    polls = 0;
    do begin rd(5'h13, v); polls++; end while (v[0] && polls < 5000);
  endtask

  initial begin
    logic [31:0] v;
    int polls;
    repeat (3) @(posedge clk); #1 rst = 0;

    rd(0, v); check("header", v, 32'h3152_4949);
    rd(1, v); check("type 110", v, 6);
    rd(2, v); check("ip offset", v, 32'hFFFF_E800);
    rd(5, v);                        // faulty read
    rd(31, v);                       // faulty read
    wr(1, 0);                        // faulty write
    rd(5'h0F, v); check("faulty reads", v, 2);
    rd(5'h0E, v); check("faulty writes", v, 1);
    wr(5'h0F, 0); rd(5'h0F, v); check("faulty reads cleared", v, 0);

    // frames counter and IP reset
    repeat (3000) @(posedge clk); #1;
    polls = frames; rd(5'h0D, v); check("frames from reset", v, 32'(polls));
    check("some frames", 32'(frames >= 3), 1);
    wr(3, 1); check("gpu reset on", {31'd0, gpu_reset}, 1);
    repeat (5) @(posedge clk); #1;
    wr(3, 0);
    polls = frames; rd(5'h0D, v); check("frames restart", v, 32'(polls));
    check("frames restarted from zero", 32'(frames <= 1), 1);

    // two-frame capture into a large log memory
    wr(5'h11, 32'h0000_1000);
    wr(5'h12, 32'h0000_1000 + 4 * 2048);
    start_capture(2);
    rd(5'h13, v); check("active after start", v[0], 1);
    wait_done(polls);
    check("capture ended", 32'(polls < 5000), 1);
    check("word count", 32'(n_lm_writes), 32'(exp_words.size()));
    for (int i = 0; i < exp_words.size(); i++) begin
      v = lmem.exists(32'h1000 + 4*i) ? lmem[32'h1000 + 4*i] : 32'hDEAD_BEEF;
      check($sformatf("log word %0d", i), v, exp_words[i]);
    end
    check("two frame words", 32'(exp_words[0][31]), 1);
    rd(5'h13, v); check("no overrun", v, 0);

    // a log memory of four words stops the capture early
    n_lm_writes = 0;
    wr(5'h12, 32'h0000_1000 + 16);
    start_capture(3);
    wait_done(polls);
    check("short log ends", 32'(polls < 5000), 1);
    check("short log writes", 32'(n_lm_writes), 4);
    for (int i = 0; i < 4; i++) check($sformatf("short word %0d", i), lmem[32'h1000 + 4*i], exp_words[i]);

    // a stalled log memory overruns the FIFO
    wait_pct = 98;
    wr(5'h12, 32'h0000_1000 + 4 * 4096);
    start_capture(1);
    wait_done(polls);
    rd(5'h13, v); check("overrun flagged", v, 32'h2);
    wr(5'h13, 0); rd(5'h13, v); check("overrun cleared", v, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
