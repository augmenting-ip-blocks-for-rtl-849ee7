// tb_nios2_monitor: self-checking test of the external CPU monitor.
//
// A stimulus process plays CPU instruction fetches (an address run like a cache line fill,
// then a jump to a low address as in a crash), data reads and writes and wait states on the
// tapped master ports. Reference processes in the testbench record, from the same port
// signals, the events each log should hold and the longest wait. The test then reads the
// monitor's registers over its slave port and compares: general registers, CPU reset
// release, access and faulty-access counters with clearing, longest wait, and the full
// contents of the three logs.
module tb_nios2_monitor;
  import iir_pkg::*;

  logic        clk = 0, rst = 1;
  logic [5:0]  av_address = '0;
  logic        av_read = 0, av_write = 0;
  logic [31:0] av_writedata = '0, av_readdata;
  logic [31:0] timestamp = '0;
  logic [31:0] i_address = '0, d_address = '0;
  logic        i_read = 0, i_waitrequest = 0, d_read = 0, d_write = 0, d_waitrequest = 0;
  logic        cpu_reset;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) timestamp <= timestamp + 1;

  nios2_monitor #(.LOG_WORDS(128)) dut (.*);

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic rd(input int o, output logic [31:0] v);
    av_address = 6'(o); av_read = 1;
    @(posedge clk); #1 av_read = 0;
    v = av_readdata;
  endtask

  task automatic wr(input int o, input logic [31:0] d);
    av_address = 6'(o); av_writedata = d; av_write = 1;
    @(posedge clk); #1 av_write = 0;
  endtask

  // ---------------------------------------------------------------- reference model
  bit          log_on = 0;
  logic [31:0] exp_ts[3][$], exp_d[3][$];
  logic [1:0]  st_prev = '0;
  logic [31:0] ir_prev = '0, dr_prev = '0;
  int          run = 0, run_max = 0;

  always @(posedge clk) if (!rst) begin
    logic [1:0]  st;
    logic [31:0] ir, dr;
    logic        w;
    st = {(d_read | d_write) & d_waitrequest, i_read & i_waitrequest};
    ir = {i_read, i_address[30:0]};
    dr = {d_read, d_write, d_address[29:0]};
    if (log_on && st != st_prev) begin exp_ts[0].push_back(timestamp); exp_d[0].push_back({30'd0, st}); end
    if (log_on && ir != ir_prev) begin exp_ts[1].push_back(timestamp); exp_d[1].push_back(ir); end
    if (log_on && dr != dr_prev) begin exp_ts[2].push_back(timestamp); exp_d[2].push_back(dr); end
    st_prev <= st; ir_prev <= ir; dr_prev <= dr;
    w = st != 0;
    run = w ? run + 1 : 0;
    if (run > run_max) run_max = run;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned vb[$];
  function automatic void add_str(input string s);
    for (int i = 0; i < s.len(); i++) vb.push_back(s[i]);
    vb.push_back(8'h00);
  endfunction

  initial begin
    logic [31:0] v, e;
    add_str("TUT"); add_str("TUT"); add_str("Nios II monitor"); add_str("0.2");
    repeat (3) @(posedge clk); #1 rst = 0;

    check("cpu held in reset", {31'd0, cpu_reset}, 1);
    rd(0, v); check("header", v, 32'h3152_4949);
    rd(1, v); check("type 101", v, 5);
    rd(4, v); check("instance", v, 0);
    for (int w = 0; w < 7; w++) begin
      e = '0;
      for (int b = 0; b < 4; b++) if (4*w+b < vb.size()) e[8*b +: 8] = vb[4*w+b];
      rd(6 + w, v); check($sformatf("vlnv %0d", w), v, e);
    end
    rd(2, v);  check("0x02 unused", v, 0);      // faulty read 1
    rd(5, v);  check("0x05 unused", v, 0);      // faulty read 2
    rd(40, v); check("0x28 unused", v, 0);      // faulty read 3
    wr(1, 7);                                   // faulty write 1 (read only)
    wr(6, 7);                                   // faulty write 2
    rd(8'h11, v); check("faulty reads", v, 3);
    rd(8'h12, v); check("faulty writes", v, 2);
    // reads so far: 1+1+1+7+3+1+1 = 15, this read is the 16th and returns 15
    rd(8'h0F, v); check("reads", v, 15);
    rd(8'h10, v); check("writes", v, 2);
    wr(8'h11, 0); rd(8'h11, v); check("faulty reads cleared", v, 0);
    wr(8'h0F, 0); rd(8'h0F, v); check("reads cleared", v, 0);

    // enable the three logs, then release the CPU
    wr(8'h14, LOG_ENABLE); wr(8'h15, LOG_ENABLE); wr(8'h16, LOG_ENABLE);
    log_on = 1;
    wr(3, 0);
    check("cpu released", {31'd0, cpu_reset}, 0);

    // instruction fetches: a line fill with wait states, then a jump to low addresses
    for (int k = 0; k < 4; k++) begin
      i_read = 1; i_address = 32'h0201_11B0 + 4*k; i_waitrequest = 1;
      @(posedge clk); #1 i_waitrequest = 0;
      @(posedge clk); #1;
    end
    i_read = 0; i_address = 32'h0201_11A0;
    repeat (3) @(posedge clk); #1;
    for (int k = 1; k < 9; k++) begin
      i_read = 1; i_address = 4*k; @(posedge clk); #1;
    end
    i_read = 0;
    // data accesses: a write with 9 wait cycles, then two reads
    d_write = 1; d_address = 32'h0202_0000; d_waitrequest = 1;
    repeat (9) @(posedge clk); #1 d_waitrequest = 0;
    @(posedge clk); #1 d_write = 0;
    d_read = 1; d_address = 32'h0202_0004; @(posedge clk); #1;
    d_address = 32'h0202_0008; @(posedge clk); #1 d_read = 0;
    @(posedge clk); #1;
    log_on = 0;
    wr(8'h14, LOG_DISABLE); wr(8'h15, LOG_DISABLE); wr(8'h16, LOG_DISABLE);

    rd(8'h13, v); check("longest wait", v, 32'(run_max));
    check("longest wait is 9", v, 9);

    // read the three logs
    for (int g = 0; g < 3; g++) begin
      wr(8'h14 + g, LOG_READ_STATUS);
      rd(8'h14 + g, v);
      check($sformatf("log %0d fill", g), 32'(v[10:3]), 32'(2 * exp_ts[g].size()));
      wr(8'h14 + g, LOG_READ_MEM);
      for (int i = 0; i < exp_ts[g].size(); i++) begin
        rd(8'h14 + g, v); check($sformatf("log %0d ts %0d", g, i), v, exp_ts[g][i]);
        rd(8'h14 + g, v); check($sformatf("log %0d data %0d", g, i), v, exp_d[g][i]);
      end
    end
    // the pointer register rewinds all logs
    wr(8'h0E, 1); rd(8'h0E, v); check("log pointer", v, 1);
    rd(8'h15, v); check("pointer rewinds log", v, exp_d[1][0]);
    check("i-log has events", 32'(exp_ts[1].size() > 10), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
