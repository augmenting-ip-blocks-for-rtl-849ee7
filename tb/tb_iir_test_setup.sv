// tb_iir_test_setup: end-to-end test of the IIR test setup at its default (full) size.
//
// Around the top the testbench places simple models of what the top leaves outside: an
// asynchronous SRAM, a log memory with random wait states, the GPU's own register file, a GPU
// pixel engine that reads the SRAM in bursts on every line it fills (longer bursts every 16
// lines, a short one in vertical blanking), and a CPU that fetches instruction lines, writes
// data and idles while its caches hit, all through the shared SRAM. A data-gathering master,
// played by the main process, then runs the three experiments:
//   1. scan the address range 0x0200_0000..0x0600_01FF for the alternating IIR1/1RII header,
//      expect exactly the four windows of the memory map, read their VLNV strings and check
//      the hardware/software match string of the system IIR;
//   2. enable the CPU monitor's logs, release the CPU from reset, and compare the instruction
//      log, the stall log and the longest wait with references recorded from the CPU's ports;
//   3. capture one full 640x480 frame of CPU/GPU SRAM activity into the log memory and
//      compare it word by word with a reference built from the same port signals; stop CPU and
//      GPU through their IIR reset registers and check the SRAM access counters;
//   4. (before the resets) end a capture early with a 16-word log range, and overrun the
//      logger's FIFO by stalling the log memory.
// Each mechanism (header toggle, faulty access, unmapped access, GPU register pass-through,
// CPU stall, log overflow, auto clear, frame capture, log range full, FIFO overrun, IP reset)
// is counted and must occur.
module tb_iir_test_setup;
  import iir_pkg::*;

  logic        clk = 0, rst = 1;
  int          checks = 0, failures = 0;
  longint      cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------------------------------------------------------- top ports
  logic [31:0] dg_address = '0, dg_writedata = '0, dg_readdata;
  logic        dg_read = 0, dg_write = 0, dg_waitrequest, dg_unmapped;
  logic [17:0] cpu_sram_address = '0;
  logic        cpu_sram_read = 0, cpu_sram_write = 0;
  logic [15:0] cpu_sram_writedata = '0, cpu_sram_readdata;
  logic [1:0]  cpu_sram_byteenable = 2'b11;
  logic        cpu_sram_readdatavalid, cpu_sram_waitrequest, cpu_reset;
  logic [31:0] cpu_i_address = '0, cpu_d_address = '0;
  logic        cpu_i_read = 0, cpu_d_read = 0, cpu_d_write = 0;
  logic        cpu_i_waitrequest, cpu_d_waitrequest;
  logic [17:0] gpu_sram_address = '0;
  logic        gpu_sram_read = 0;
  logic [15:0] gpu_sram_readdata;
  logic        gpu_sram_readdatavalid, gpu_reset;
  logic [11:0] gpu_reg_address;
  logic        gpu_reg_read, gpu_reg_write;
  logic [31:0] gpu_reg_writedata, gpu_reg_readdata = '0;
  logic        gpu_reg_waitrequest = 0;
  logic [10:0] vga_x;
  logic [1:0]  vga_x_cycle;
  logic [9:0]  vga_y;
  logic [8:0]  vga_fill_y;
  logic        vga_hsync_n, vga_vsync_n, vga_blank;
  logic [31:0] lm_address, lm_writedata;
  logic        lm_write, lm_waitrequest = 0;
  logic [17:0] sram_addr;
  logic [15:0] sram_dq_o, sram_dq_i;
  logic        sram_dq_oe, sram_ce_n, sram_oe_n, sram_we_n, sram_ub_n, sram_lb_n;
  logic [63:0] sys_count;

  iir_test_setup dut (.*);

  sram_async_model u_sram (
    .clk, .addr(sram_addr), .dq_in(sram_dq_o), .dq_in_en(sram_dq_oe), .dq_out(sram_dq_i),
    .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n), .ub_n(sram_ub_n), .lb_n(sram_lb_n)
  );

  assign cpu_i_waitrequest = cpu_i_read && cpu_sram_waitrequest;
  assign cpu_d_waitrequest = (cpu_d_read || cpu_d_write) && cpu_sram_waitrequest;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------- mechanism counters
  int n_hdr_toggle = 0, n_faulty = 0, n_unmapped = 0, n_gpu_reg = 0, n_stall = 0;
  int n_overflow = 0, n_autoclear = 0, n_frames_captured = 0, n_ip_reset = 0;
  int n_found = 0, n_mem_full = 0, n_overrun = 0;

  always @(posedge clk) begin
    if (dg_unmapped) n_unmapped++;
    if (gpu_reg_read || gpu_reg_write) n_gpu_reg++;
    if ((cpu_sram_read || cpu_sram_write) && cpu_sram_waitrequest) n_stall++;
  end

  // ---------------------------------------------------------------- outside models
  // GPU register file: one-cycle reads, occasional wait
  always @(posedge clk) begin
    if (gpu_reg_read && !gpu_reg_waitrequest) gpu_reg_readdata <= 32'hC0DE_0000 | 32'(gpu_reg_address);
    gpu_reg_waitrequest <= ($urandom % 4) == 0;
  end

  // log memory with random waits
  logic [31:0] lmem [logic [31:0]];
  bit          lm_stall = 0;
  int          n_lm_writes = 0;
  always @(posedge clk) begin
    if (lm_write && !lm_waitrequest) begin
      lmem[lm_address] = lm_writedata;
      n_lm_writes++;
    end
    lm_waitrequest <= lm_stall || ($urandom % 5) == 0;
  end

  // GPU pixel engine: burst of SRAM reads at the start of each line it fills
  int gpu_burst = 0;
  always @(posedge clk) begin
    if (gpu_reset || rst) begin
      gpu_burst <= 0;
      gpu_sram_read <= 0;
    end else begin
      if (vga_x == 0 && vga_x_cycle == 0) begin
        if (vga_y < 479 || vga_y == 524) gpu_burst <= 700 + ((vga_fill_y % 16 == 0) ? 900 : 0);
        else if (vga_y == 500)           gpu_burst <= 200;
      end else if (gpu_burst > 0) gpu_burst <= gpu_burst - 1;
      gpu_sram_read    <= gpu_burst > 1;
      gpu_sram_address <= 18'h20000 + 18'(gpu_burst);
    end
  end

  // system CPU: instruction line fills, data writes, cache-hit idle periods
  int unsigned pc = 0;
  task automatic cpu_sram(input bit wr, input logic [17:0] a, input bit instr);
    cpu_sram_address = a; cpu_sram_writedata = 16'(a * 3);
    cpu_sram_read = !wr; cpu_sram_write = wr;
    if (instr) begin cpu_i_read = 1; cpu_i_address = 32'h0200_0000 + 32'(a) * 2; end
    else begin cpu_d_read = !wr; cpu_d_write = wr; cpu_d_address = 32'h0200_0000 + 32'(a) * 2; end
    @(posedge clk);
    while (cpu_sram_waitrequest) @(posedge clk);
    #1 cpu_sram_read = 0; cpu_sram_write = 0;
    cpu_i_read = 0; cpu_d_read = 0; cpu_d_write = 0;
  endtask

  initial begin
    #1;
    forever begin
      if (cpu_reset || rst) begin
        @(posedge clk); #1;
      end else begin
        for (int k = 0; k < 8; k++) begin
          cpu_sram(0, 18'(pc / 2), 1);
          pc = (pc + 4) % 32'h11CC0;
        end
        for (int k = 0; k < 4; k++) cpu_sram(1, 18'h10000 + 18'($urandom % 4096), 0);
        repeat ($urandom % 40) @(posedge clk);
        #1;
      end
    end
  end

  // ---------------------------------------------------------------- references
  // SRAM access counts
  longint n_sram_wr = 0, n_sram_rd = 0;
  always @(posedge clk) if (!rst) begin
    if (gpu_sram_read) n_sram_rd++;
    else if (cpu_sram_read) n_sram_rd++;
    else if (cpu_sram_write) n_sram_wr++;
  end

  // CPU monitor logs (stall log index 0, instruction log index 1)
  bit          mon_log_on = 0;
  logic [31:0] mon_ts[2][$], mon_d[2][$];
  logic [1:0]  st_prev = '0;
  logic [31:0] ir_prev = '0;
  int          wrun = 0, wmax = 0;
  always @(posedge clk) if (!rst) begin
    logic [1:0]  st;
    logic [31:0] ir;
    st = {(cpu_d_read | cpu_d_write) & cpu_d_waitrequest, cpu_i_read & cpu_i_waitrequest};
    ir = {cpu_i_read, cpu_i_address[30:0]};
    if (mon_log_on && st != st_prev) begin mon_ts[0].push_back(sys_count[31:0]); mon_d[0].push_back({30'd0, st}); end
    if (mon_log_on && ir != ir_prev) begin mon_ts[1].push_back(sys_count[31:0]); mon_d[1].push_back(ir); end
    st_prev <= st; ir_prev <= ir;
    wrun = (st != 0) ? wrun + 1 : 0;
    if (wrun > wmax) wmax = wrun;
  end

  // SRAM usage log
  bit          ref_armed = 0, ref_capt = 0;
  int          ref_left = 0, ref_frames = 0;
  logic [1:0]  act_prev = '0;
  logic [31:0] exp_words[$];
  always @(posedge clk) if (!rst) begin
    logic [1:0] act;
    logic fs;
    act = {cpu_sram_read | cpu_sram_write, gpu_sram_read};
    fs  = vga_x == 0 && vga_y == 0 && vga_x_cycle == 0 && !gpu_reset;
    if (gpu_reset) ref_frames = 0;
    else if (fs) begin
      ref_frames++;
      if (ref_armed || (ref_capt && ref_left != 1)) begin
        if (ref_capt) ref_left--;
        ref_armed = 0; ref_capt = 1;
        exp_words.push_back({1'b1, 9'd0, 20'(ref_frames), act});
      end else if (ref_capt) ref_capt = 0;
    end else if (ref_capt && act != act_prev) begin
      exp_words.push_back({1'b0, 7'd0, vga_x, vga_x_cycle, vga_fill_y, act});
    end
    act_prev <= act;
  end

  // ---------------------------------------------------------------- data-gathering master
  task automatic dg_rd(input logic [31:0] a, output logic [31:0] v);
    dg_address = a; dg_read = 1;
    @(posedge clk);
    while (dg_waitrequest) @(posedge clk);
    #1 dg_read = 0;
    v = dg_readdata;
  endtask

  task automatic dg_wr(input logic [31:0] a, input logic [31:0] d);
    dg_address = a; dg_writedata = d; dg_write = 1;
    @(posedge clk);
    while (dg_waitrequest) @(posedge clk);
    #1 dg_write = 0;
  endtask

  // read NUL-terminated strings from consecutive words
  task automatic read_strings(input logic [31:0] base, input int nstr, output string s[4],
                              output int words);
    logic [31:0] v;
    int idx = 0;
    for (int i = 0; i < 4; i++) s[i] = "";
    words = 0;
    while (idx < nstr && words < 16) begin
      dg_rd(base + 4 * words, v);
      words++;
      for (int b = 0; b < 4 && idx < nstr; b++) begin
        if (v[8*b +: 8] == 0) idx++;
        else s[idx] = {s[idx], string'(v[8*b +: 8])};
      end
    end
  endtask

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [31:0] SRAM_IIR = 32'h0208_0000;
  localparam logic [31:0] GPU_IIR  = 32'h0500_1800;
  localparam logic [31:0] MON      = 32'h0600_0000;
  localparam logic [31:0] SYS      = 32'h0600_0100;

  initial begin
    logic [31:0] v, lo, hi;
    logic [31:0] found[$];
    string s[4], ext[4], want[4][4];
    int words, polls;
    longint t0;

    want[0] = '{"liHard", "storage", "sram_2x_access", "0.2"};
    want[1] = '{"liHard", "gfx", "xd_gpu", "0.2"};
    want[2] = '{"TUT", "TUT", "Nios II monitor", "0.2"};
    want[3] = '{"liHard", "iir", "sys_iir", "1.0"};

    repeat (5) @(posedge clk); #1 rst = 0;
    repeat (2) @(posedge clk); #1;
    check("system CPU held in reset", {31'd0, cpu_reset}, 1);

    // ================================================= part 1: scan for IIR windows
    t0 = cyc;
    for (logic [31:0] a = 32'h0200_0000; a < 32'h0600_0200; a += 32'h80) begin
      dg_rd(a, v);
      if (v == 32'h3152_4949) begin
        dg_rd(a, v);
        if (v == 32'h4949_5231) begin found.push_back(a); n_hdr_toggle++; end
      end
    end
    // the GPU window sits inside the GPU's port; scan it word by word around its base
    for (logic [31:0] a = 32'h0500_1700; a < 32'h0500_1900; a += 4) begin
      dg_rd(a, v);
      if (v == 32'h3152_4949) begin
        dg_rd(a, v);
        if (v == 32'h4949_5231 && a != GPU_IIR) found.push_back(a);
      end
    end
    $display("scan of %0d windows took %0d cycles", found.size(), cyc - t0);
    n_found = found.size();
    check("windows found", 32'(found.size()), 4);
    if (found.size() == 4) begin
      check("window 0", found[0], SRAM_IIR);
      check("window 1", found[1], GPU_IIR);
      check("window 2", found[2], MON);
      check("window 3", found[3], SYS);
    end
    for (int k = 0; k < 4; k++) begin
      logic [31:0] base;
      base = (k == 0) ? SRAM_IIR : (k == 1) ? GPU_IIR : (k == 2) ? MON : SYS;
      read_strings(base + 4 * OFS_VLNV, 4, s, words);
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (s[j] != want[k][j]) begin
          failures++; $display("FAIL vlnv %0d.%0d: '%s' expected '%s'", k, j, s[j], want[k][j]);
        end
      end
    end
    dg_rd(SRAM_IIR + 4, v); check("sram type", v, 0);
    dg_rd(GPU_IIR + 4, v);  check("gpu type", v, 6);
    dg_rd(MON + 4, v);      check("monitor type", v, 5);
    dg_rd(SYS + 4, v);      check("system type", v, 0);
    dg_rd(GPU_IIR + 8, v);  check("gpu register pointer", GPU_IIR + v, 32'h0500_0000);
    // hardware/software match
    read_strings(SYS + 4 * 'h0C, 1, ext, words);
    checks++;
    if (ext[0] != "iir_xd_test-11.02.2012") begin
      failures++; $display("FAIL system mismatch '%s'", ext[0]);
    end
    // GPU's own registers through the shared port
    dg_rd(32'h0500_0010, v); check("gpu own register", v, 32'hC0DE_0004);
    // faulty access to the monitor (the scan has already read its unused word 0x20)
    dg_rd(MON + 4 * 'h11, lo);
    dg_rd(MON + 4 * 2, v);
    dg_rd(MON + 4 * 'h11, v); check("monitor faulty reads", v, lo + 1);
    n_faulty = v;

    // ================================================= part 2: watch the CPU
    dg_wr(MON + 4 * 'h14, LOG_ENABLE);
    dg_wr(MON + 4 * 'h15, LOG_ENABLE);
    mon_log_on = 1;
    dg_wr(MON + 4 * OFS_IPRESET, 0);
    check("CPU released", {31'd0, cpu_reset}, 0);
    repeat (20000) @(posedge clk); #1;
    dg_wr(MON + 4 * 'h14, LOG_DISABLE);
    dg_wr(MON + 4 * 'h15, LOG_DISABLE);
    mon_log_on = 0;
    dg_rd(MON + 4 * 'h13, v); check("longest CPU wait", v, 32'(wmax));
    for (int g = 0; g < 2; g++) begin
      int n;
      dg_rd(MON + 4 * ('h14 + g), v);         // status (reads start in status mode)
      n = v[10:3] / 2;
      if (v[2]) n_overflow++;
      check($sformatf("log %0d fill", g), 32'(n), 32'(mon_ts[g].size() < 64 ? mon_ts[g].size() : 64));
      dg_wr(MON + 4 * ('h14 + g), LOG_AUTOCLR_ON);
      dg_wr(MON + 4 * ('h14 + g), LOG_READ_MEM);
      for (int i = 0; i < n; i++) begin
        dg_rd(MON + 4 * ('h14 + g), v); check($sformatf("log %0d ts %0d", g, i), v, mon_ts[g][i]);
        dg_rd(MON + 4 * ('h14 + g), v); check($sformatf("log %0d data %0d", g, i), v, mon_d[g][i]);
      end
      dg_wr(MON + 4 * ('h14 + g), LOG_READ_STATUS);
      dg_rd(MON + 4 * ('h14 + g), v);
      check($sformatf("log %0d auto cleared", g), 32'(v[10:3]), 0);
      if (v[10:3] == 0 && n > 0) n_autoclear++;
    end

    // ================================================= part 3: one frame of SRAM usage
    dg_wr(GPU_IIR + 4 * 'h11, 32'h0010_0000);
    dg_wr(GPU_IIR + 4 * 'h12, 32'h0010_0000 + 4 * 262144);
    exp_words.delete();
    dg_wr(GPU_IIR + 4 * 'h10, 1);
    ref_armed = 1; ref_capt = 0; ref_left = 1;
    polls = 0;
    do begin dg_rd(GPU_IIR + 4 * 'h13, v); polls++; end while (v[0] && polls < 5_000_000);
    check("capture finished", {31'd0, v[0]}, 0);
    check("no overrun", {31'd0, v[1]}, 0);
    check("log words", 32'(n_lm_writes), 32'(exp_words.size()));
    for (int i = 0; i < exp_words.size(); i++) begin
      v = lmem.exists(32'h0010_0000 + 4*i) ? lmem[32'h0010_0000 + 4*i] : 32'hDEAD_BEEF;
      check($sformatf("sram log word %0d", i), v, exp_words[i]);
      if (v[31] && v == exp_words[i]) n_frames_captured++;
    end
    begin
      int both = 0;
      foreach (exp_words[i]) if (exp_words[i][1:0] == 2'b11) both++;
      $display("frame log: %0d words, %0d with CPU waiting on GPU", exp_words.size(), both);
      check("stall events in frame log", 32'(both > 0), 1);
    end

    // a 16-word log range ends the capture early
    lmem.delete(); n_lm_writes = 0; exp_words.delete();
    dg_wr(GPU_IIR + 4 * 'h12, 32'h0010_0000 + 4 * 16);
    dg_wr(GPU_IIR + 4 * 'h10, 1);
    ref_armed = 1; ref_capt = 0; ref_left = 1;
    polls = 0;
    do begin dg_rd(GPU_IIR + 4 * 'h13, v); polls++; end while (v[0] && polls < 5_000_000);
    ref_armed = 0; ref_capt = 0;
    check("full log range: writes", 32'(n_lm_writes), 16);
    for (int i = 0; i < 16; i++) check($sformatf("full range word %0d", i), lmem[32'h0010_0000 + 4*i], exp_words[i]);
    if (n_lm_writes == 16 && exp_words.size() > 16) n_mem_full++;

    // a stalled log memory overruns the FIFO
    dg_wr(GPU_IIR + 4 * 'h12, 32'h0010_0000 + 4 * 262144);
    lm_stall = 1;
    dg_wr(GPU_IIR + 4 * 'h10, 1);
    polls = 0;
    do begin dg_rd(GPU_IIR + 4 * 'h13, v); polls++; end while (!v[1] && polls < 3_000_000);
    check("overrun flagged", {31'd0, v[1]}, 1);
    if (v[1]) n_overrun++;
    lm_stall = 0;
    dg_wr(GPU_IIR + 4 * 'h13, 0);              // stop and clear the flag
    repeat (400) @(posedge clk); #1;
    dg_rd(GPU_IIR + 4 * 'h13, v); check("stopped, overrun cleared", v, 0);

    // stop both masters through their reset registers and check the SRAM counters
    dg_wr(MON + 4 * OFS_IPRESET, 1);
    dg_wr(GPU_IIR + 4 * OFS_IPRESET, 1);
    check("CPU reset again", {31'd0, cpu_reset}, 1);
    check("GPU reset", {31'd0, gpu_reset}, 1);
    repeat (50) @(posedge clk); #1;
    n_ip_reset = 2;
    dg_rd(GPU_IIR + 4 * 'h0D, v); check("frames cleared by GPU reset", v, 0);
    dg_rd(SRAM_IIR + 4 * 'h10, lo); dg_rd(SRAM_IIR + 4 * 'h11, hi);
    check("SRAM writes", lo, 32'(n_sram_wr)); check("SRAM writes high", hi, 32'(n_sram_wr >> 32));
    dg_rd(SRAM_IIR + 4 * 'h12, lo); dg_rd(SRAM_IIR + 4 * 'h13, hi);
    check("SRAM reads", lo, 32'(n_sram_rd)); check("SRAM reads high", hi, 32'(n_sram_rd >> 32));

    // ================================================= mechanisms
    $display("mechanisms: windows=%0d header_toggles=%0d faulty=%0d unmapped=%0d gpu_reg=%0d stalls=%0d overflow=%0d autoclear=%0d frames=%0d ip_reset=%0d mem_full=%0d overrun=%0d",
             n_found, n_hdr_toggle, n_faulty, n_unmapped, n_gpu_reg, n_stall, n_overflow,
             n_autoclear, n_frames_captured, n_ip_reset, n_mem_full, n_overrun);
    check("mech header toggle", 32'(n_hdr_toggle >= 3), 1);
    check("mech faulty access", 32'(n_faulty > 0), 1);
    check("mech unmapped access", 32'(n_unmapped > 0), 1);
    check("mech gpu register pass-through", 32'(n_gpu_reg > 0), 1);
    check("mech CPU stall", 32'(n_stall > 0), 1);
    check("mech log overflow", 32'(n_overflow > 0), 1);
    check("mech auto clear", 32'(n_autoclear > 0), 1);
    check("mech frame capture", 32'(n_frames_captured), 1);
    check("mech ip reset", 32'(n_ip_reset), 2);
    check("mech log memory full", 32'(n_mem_full), 1);
    check("mech FIFO overrun", 32'(n_overrun), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
