// tb_system_iir: self-checking test of the system IIR.
//
// Checks the header pattern, type, every VLNV and extra-information word against byte lists
// built here from plain strings, that the system counter is zero in reset and counts one per
// cycle afterwards (value read through the registers matches the cycle count kept here), and
// the low/high capture.
module tb_system_iir;
  import iir_pkg::*;

  logic        clk = 0, rst = 1;
  logic [4:0]  av_address = '0;
  logic        av_read = 0, av_write = 0;
  logic [31:0] av_writedata = '0, av_readdata;
  logic [63:0] sys_count;
  int          checks = 0, failures = 0;
  longint      cycles_since_reset = 0;

  always #5 clk = ~clk;

  system_iir #(.COUNT_W(64)) dut (.*);

  always @(posedge clk) cycles_since_reset <= rst ? 0 : cycles_since_reset + 1;

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
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

  byte unsigned vb[$], eb[$];
  function automatic void add_str(ref byte unsigned q[$], input string s);
    for (int i = 0; i < s.len(); i++) q.push_back(s[i]);
    q.push_back(8'h00);
  endfunction
  function automatic logic [31:0] word_of(ref byte unsigned q[$], input int w);
    logic [31:0] r = '0;
    for (int b = 0; b < 4; b++) if (4*w+b < q.size()) r[8*b +: 8] = q[4*w+b];
    return r;
  endfunction

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v, lo, hi;
    longint at;
    add_str(vb, "liHard"); add_str(vb, "iir"); add_str(vb, "sys_iir"); add_str(vb, "1.0");
    add_str(eb, "iir_xd_test-11.02.2012");
    repeat (4) @(posedge clk); #1;
    check("counter zero in reset", sys_count, 0);
    rst = 0;
    rd(0, v); check("header", v, 32'h3152_4949);
    rd(0, v); check("header swapped", v, 32'h4949_5231);
    rd(1, v); check("type", v, 0);
    rd(3, v); check("no ip reset", v, 0);
    rd(5, v); check("no mutex", v, 0);
    for (int w = 0; w < 6; w++) begin rd(6 + w, v);  check($sformatf("vlnv %0d", w), v, word_of(vb, w)); end
    for (int w = 0; w < 6; w++) begin rd(12 + w, v); check($sformatf("ext %0d", w), v, word_of(eb, w)); end
    // counter: the value sampled at the read edge equals the cycles since reset release - 1
    repeat (17) @(posedge clk);
    #1 av_address = 5'h12; av_read = 1; at = cycles_since_reset;
    @(posedge clk); #1 av_read = 0; lo = av_readdata;
    check("counter low", lo, 32'(at));
    rd(5'h13, hi); check("counter high", hi, 0);
    check("counter runs", sys_count, 64'(cycles_since_reset));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
