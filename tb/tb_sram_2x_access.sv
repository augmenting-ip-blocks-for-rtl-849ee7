// tb_sram_2x_access: self-checking test of the shared SRAM controller.
//
// The controller drives a behavioural SRAM. A CPU master process writes words (some with one
// byte lane), then reads them back while a GPU process issues bursts of reads, so the CPU is
// stalled by GPU priority. A reference array kept here predicts every read; each read's data
// is checked with its latency (two cycles from acceptance). Then the IIR port is read: the
// SRAM write and read counters must match the accesses counted here, the low/high pair must
// be consistent and a write must clear them. Also checked: waitrequest only while the GPU
// reads, cpu_active, and the general registers.
module tb_sram_2x_access;
  import iir_pkg::*;

  logic        clk = 0, rst = 1;
  logic [17:0] cpu_address = '0, gpu_address = '0;
  logic        cpu_read = 0, cpu_write = 0, gpu_read = 0;
  logic [15:0] cpu_writedata = '0;
  logic [1:0]  cpu_byteenable = 2'b11;
  logic [15:0] cpu_readdata, gpu_readdata;
  logic        cpu_readdatavalid, cpu_waitrequest, cpu_active, gpu_readdatavalid;
  logic [4:0]  iir_address = '0;
  logic        iir_read = 0, iir_write = 0;
  logic [31:0] iir_writedata = '0, iir_readdata;
  logic [17:0] sram_addr;
  logic [15:0] sram_dq_o, sram_dq_i;
  logic        sram_dq_oe, sram_ce_n, sram_oe_n, sram_we_n, sram_ub_n, sram_lb_n;
  int          checks = 0, failures = 0;
  longint      cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  sram_2x_access dut (.*);

  sram_async_model u_mem (
    .clk, .addr(sram_addr), .dq_in(sram_dq_o), .dq_in_en(sram_dq_oe), .dq_out(sram_dq_i),
    .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n), .ub_n(sram_ub_n), .lb_n(sram_lb_n)
  );

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------- reference and counters
  logic [15:0] ref_mem [logic [17:0]];
  longint      n_wr = 0, n_rd = 0, n_stall = 0;
  logic [15:0] cpu_exp[$], gpu_exp[$];
  longint      cpu_t[$], gpu_t[$];

  function automatic logic [15:0] ref_rd(input logic [17:0] a);
    return ref_mem.exists(a) ? ref_mem[a] : 16'h0;
  endfunction

  always @(posedge clk) if (!rst) begin
    if (gpu_read) begin
      n_rd++; gpu_exp.push_back(ref_rd(gpu_address)); gpu_t.push_back(cyc);
    end
    checks++;
    if (cpu_waitrequest !== ((cpu_read || cpu_write) && gpu_read)) begin
      failures++; $display("FAIL waitrequest rule at %0d", cyc);
    end
    if ((cpu_read || cpu_write) && gpu_read) n_stall++;
    if ((cpu_read || cpu_write) && !cpu_waitrequest) begin
      if (cpu_read) begin
        n_rd++; cpu_exp.push_back(ref_rd(cpu_address)); cpu_t.push_back(cyc);
      end else begin
        logic [15:0] o;
        o = ref_rd(cpu_address);
        if (cpu_byteenable[0]) o[7:0]  = cpu_writedata[7:0];
        if (cpu_byteenable[1]) o[15:8] = cpu_writedata[15:8];
        ref_mem[cpu_address] = o;
        n_wr++;
      end
    end
    if (cpu_readdatavalid) begin
      check("cpu read data", 32'(cpu_readdata), 32'(cpu_exp.pop_front()));
      check("cpu read latency", 32'(cyc - cpu_t.pop_front()), 2);
    end
    if (gpu_readdatavalid) begin
      check("gpu read data", 32'(gpu_readdata), 32'(gpu_exp.pop_front()));
      check("gpu read latency", 32'(cyc - gpu_t.pop_front()), 2);
    end
    checks++;
    if (cpu_active !== (cpu_read || cpu_write)) begin failures++; $display("FAIL cpu_active"); end
  end

  // ---------------------------------------------------------------- masters
  task automatic cpu_access(input bit wr, input logic [17:0] a, input logic [15:0] d,
                            input logic [1:0] be);
    cpu_address = a; cpu_writedata = d; cpu_byteenable = be;
    cpu_read = !wr; cpu_write = wr;
    @(posedge clk);
    while (cpu_waitrequest) @(posedge clk);
    #1 cpu_read = 0; cpu_write = 0;
  endtask

  task automatic iir_rd(input int o, output logic [31:0] v);
    iir_address = 5'(o); iir_read = 1;
    @(posedge clk); #1 iir_read = 0;
    v = iir_readdata;
  endtask

  bit gpu_go = 0;
  initial begin
    wait (gpu_go);
    for (int b = 0; b < 12; b++) begin
      for (int k = 0; k < 6; k++) begin
        gpu_read = 1; gpu_address = 18'(b * 64 + k); @(posedge clk); #1;
      end
      gpu_read = 0;
      repeat (3 + b % 4) @(posedge clk); #1;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v, lo, hi;
    repeat (3) @(posedge clk); #1 rst = 0;
    // CPU writes: GPU tiles area and random words
    for (int i = 0; i < 800; i++) cpu_access(1, 18'(i), 16'(i * 40503 + 7), 2'b11);
    for (int i = 0; i < 40; i++) cpu_access(1, 18'($urandom), 16'($urandom), 2'b11);
    cpu_access(1, 18'd5, 16'hABCD, 2'b01);   // low byte only
    cpu_access(1, 18'd6, 16'hABCD, 2'b10);   // high byte only
    // CPU reads while the GPU reads
    gpu_go = 1;
    for (int i = 0; i < 300; i++) cpu_access(0, 18'(i), 16'h0, 2'b11);
    repeat (10) @(posedge clk); #1;
    check("cpu stalled by gpu", 32'(n_stall > 0), 1);
    check("queues empty", 32'(cpu_exp.size() + gpu_exp.size()), 0);

    // IIR port
    iir_rd(0, v); check("header", v, 32'h3152_4949);
    iir_rd(1, v); check("type", v, 0);
    iir_rd(2, v); check("no ip pointer", v, 0);
    iir_rd('h10, lo); iir_rd('h11, hi); check("writes lo", lo, 32'(n_wr)); check("writes hi", hi, 0);
    iir_rd('h12, lo); iir_rd('h13, hi); check("reads lo", lo, 32'(n_rd)); check("reads hi", hi, 0);
    iir_address = 5'h10; iir_write = 1; @(posedge clk); #1 iir_write = 0;
    iir_rd('h10, lo); check("writes cleared", lo, 0);
    iir_rd('h12, lo); check("reads kept", lo, 32'(n_rd));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
