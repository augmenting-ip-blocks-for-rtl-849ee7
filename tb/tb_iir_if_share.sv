// tb_iir_if_share: self-checking test of the interface sharing logic.
//
// Two simple slave models answer reads one cycle after acceptance with a value derived from
// their own address (the IP side also inserts random wait states). Random reads and writes
// across the whole 4096-word port, including both edges of the IIR window, must reach only
// the right side, with the IIR address rebased, and read data must come back from that side.
module tb_iir_if_share;

  logic        clk = 0, rst = 1;
  logic [11:0] s_address = '0;
  logic        s_read = 0, s_write = 0;
  logic [31:0] s_writedata = '0, s_readdata;
  logic        s_waitrequest;
  logic [11:0] ip_address;
  logic        ip_read, ip_write;
  logic [31:0] ip_writedata, ip_readdata = '0;
  logic        ip_waitrequest = 0;
  logic [4:0]  iir_address;
  logic        iir_read, iir_write;
  logic [31:0] iir_writedata, iir_readdata = '0;
  int          checks = 0, failures = 0;
  int          n_ip = 0, n_iir = 0, n_wait = 0;

  always #5 clk = ~clk;

  iir_if_share #(.ADDR_W(12), .IIR_BASE('h600), .IIR_WORDS(32)) dut (.*);

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // slave models
  always @(posedge clk) begin
    if (ip_read && !ip_waitrequest) ip_readdata <= 32'hA000_0000 | 32'(ip_address);
    if (iir_read) iir_readdata <= 32'hB000_0000 | 32'(iir_address);
    ip_waitrequest <= ($urandom % 3) == 0;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] a;
    bit in_iir, wr;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      case (i % 5)
        0: a = 12'h5FF; 1: a = 12'h600; 2: a = 12'h61F; 3: a = 12'h620;
        default: a = 12'($urandom);
      endcase
      if (i % 7 == 0) a = 12'h600 + 12'($urandom % 32);
      in_iir = a >= 12'h600 && a < 12'h620;
      wr = ($urandom % 4) == 0;
      s_address = a; s_writedata = $urandom; s_read = !wr; s_write = wr;
      #1;
      check("route ip", {31'd0, ip_read || ip_write}, {31'd0, !in_iir});
      check("route iir", {31'd0, iir_read || iir_write}, {31'd0, in_iir});
      if (in_iir) check("iir rebased", 32'(iir_address), 32'(a - 12'h600));
      if (wr) check("write data", in_iir ? iir_writedata : ip_writedata, s_writedata);
      @(posedge clk);
      while (s_waitrequest) begin n_wait++; @(posedge clk); end
      #1 s_read = 0; s_write = 0;
      if (!wr) begin
        check("read data", s_readdata, in_iir ? (32'hB000_0000 | 32'(a - 12'h600))
                                              : (32'hA000_0000 | 32'(a)));
        if (in_iir) n_iir++; else n_ip++;
      end
    end
    check("both sides read", 32'(n_ip > 100 && n_iir > 100), 1);
    check("waits seen", 32'(n_wait > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
