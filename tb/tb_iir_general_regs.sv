// tb_iir_general_regs: self-checking test of the general IIR registers.
//
// The block is built as an internal IIR with registers, IP reset (starting at 1) and mutex,
// with the monitor's VLNV and the system build string as extra information. The test checks
// the alternating header against the hex values of "IIR1"/"1RII", type, pointer, reset
// register, instance, the mutex claim/release rule, every VLNV and extra word against a byte
// list built here from plain strings, and that offsets past the window read zero undecoded.
module tb_iir_general_regs;
  import iir_pkg::*;

  logic        clk = 0, rst = 1;
  logic [5:0]  offset = '0;
  logic        rd = 0, wr = 0;
  logic [31:0] wdata = '0, rdata;
  logic        rd_ok, wr_ok, ip_reset;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  iir_general_regs #(
    .OFS_W(6), .IIR_TYPE(3'b110), .IP_PTR(32'hFFFF_E800), .INSTANCE(3), .HAS_MUTEX(1'b1),
    .RESET_INIT(1'b1), .VLNV_BYTES(MON_VLNV_BYTES), .VLNV(512'(MON_VLNV)),
    .EXT_BYTES(SYS_EXT_BYTES), .EXT(512'(SYS_EXT)), .EXT_WORDS(6)
  ) dut (.*);

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // combinational read of an offset, then a clocked read strobe for side effects
  task automatic rd_reg(input int o, output logic [31:0] v, output logic ok);
    offset = 6'(o); rd = 1;
    #1 v = rdata; ok = rd_ok;
    @(posedge clk); #1 rd = 0;
  endtask

  task automatic wr_reg(input int o, input logic [31:0] v);
    offset = 6'(o); wdata = v; wr = 1;
    @(posedge clk); #1 wr = 0;
  endtask

  byte unsigned vlnv_b[$], ext_b[$];

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
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    logic ok;
    add_str(vlnv_b, "TUT"); add_str(vlnv_b, "TUT"); add_str(vlnv_b, "Nios II monitor");
    add_str(vlnv_b, "0.2");
    add_str(ext_b, "iir_xd_test-11.02.2012");

    repeat (2) @(posedge clk); #1 rst = 0;

    // header alternates
    rd_reg(0, v, ok); check("header 1", v, 32'h3152_4949);
    rd_reg(0, v, ok); check("header 2", v, 32'h4949_5231);
    rd_reg(0, v, ok); check("header 3", v, 32'h3152_4949);
    rd_reg(1, v, ok); check("type", v, 32'd6);
    rd_reg(2, v, ok); check("ip ptr", v, 32'hFFFF_E800);
    check("ip reset init", {31'd0, ip_reset}, 32'd1);
    wr_reg(3, 0);     check("ip reset cleared", {31'd0, ip_reset}, 32'd0);
    rd_reg(3, v, ok); check("ip reset reg", v, 32'd0);
    rd_reg(4, v, ok); check("instance", v, 32'd3);
    // mutex
    wr_reg(5, 32'hA);  rd_reg(5, v, ok); check("mutex claim", v, 32'hA);
    wr_reg(5, 32'hB);  rd_reg(5, v, ok); check("mutex held", v, 32'hA);
    wr_reg(5, 32'h0);  rd_reg(5, v, ok); check("mutex release", v, 32'h0);
    wr_reg(5, 32'hB);  rd_reg(5, v, ok); check("mutex claim 2", v, 32'hB);
    // VLNV: 7 words, then extra information: 6 words
    for (int w = 0; w < 7; w++) begin
      rd_reg(6 + w, v, ok); check($sformatf("vlnv %0d", w), v, word_of(vlnv_b, w));
    end
    for (int w = 0; w < 6; w++) begin
      rd_reg(13 + w, v, ok); check($sformatf("ext %0d", w), v, word_of(ext_b, w));
    end
    rd_reg(19, v, ok); check("past window", v, 0); check("past window undecoded", {31'd0, ok}, 0);
    // the header toggles only on reads of offset 0
    rd_reg(0, v, ok); check("header 4", v, 32'h4949_5231);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
