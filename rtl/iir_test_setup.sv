// iir_test_setup: the IP-information-register hardware of a 2D graphics test system.
//
// The system under test is a CPU and a 2D GPU sharing one SRAM. Information registers are
// added to it so that a second, data-gathering CPU can find every instrumented block by
// scanning its address space, check the hardware/software match, release and watch the first
// CPU, and record how the two masters share the SRAM. This top holds all of that logic:
//   system_iir      system VLNV, build string and the 64-bit system counter (timestamps)
//   nios2_monitor   external IIR of the system CPU: reset register, wait and access
//                   statistics, three event logs of its memory traffic
//   sram_2x_access  SRAM controller, GPU first, CPU when the GPU is idle, with an IIR port
//                   counting SRAM reads and writes
//   vga_sync_gen    640x480 timing of the GPU; its beam position timestamps the SRAM log
//   iir_xd_gpu      IIR of the GPU: frame counter and the shared-SRAM usage logger, which
//                   writes its event words to an external log memory
//   iir_if_share    splits the GPU's slave port between its own registers and its IIR window
//   iir_addr_decode the data-gathering master's view of the four register windows
// The CPUs, the GPU's pixel engine, the bus fabric's other slaves, the log memory (SDRAM) and
// the memory chips are outside: their connections are ports of this module.
//
// Ports, grouped: the data-gathering master (byte addresses, one-cycle read latency, may wait
// only on the GPU's own registers); the system CPU's SRAM port, its reset and the taps of its
// instruction and data masters; the GPU's SRAM read port, reset, register port and timing
// outputs; the log memory write master; the SRAM pins; the system counter.
// One clock (100 MHz in the reference system) and one active-high synchronous reset.
// gpu_reg_writedata is the data-gathering master's write data, passed through the port
// sharing logic unchanged: the GPU's registers see the same write data as its IIR block.
//
// Follows the reference system: the blocks and how they connect, the register window
// addresses and sizes, the CPU held in reset until the monitor releases it, the GPU's
// activity bit taken from its SRAM reads. This design's own choices: one plain decoder in
// place of the vendor bus fabric (no address mirrors), and the GPU's IP reset also restarting
// its display timing.
module iir_test_setup
  import iir_pkg::*;
#(
  parameter int unsigned LOG_WORDS   = 128,
  parameter int unsigned FIFO_DEPTH  = 128,
  parameter int unsigned H_VISIBLE   = 640,
  parameter int unsigned H_FRONT     = 16,
  parameter int unsigned H_SYNC      = 96,
  parameter int unsigned H_BACK      = 48,
  parameter int unsigned V_VISIBLE   = 480,
  parameter int unsigned V_FRONT     = 10,
  parameter int unsigned V_SYNC      = 2,
  parameter int unsigned V_BACK      = 33
) (
  input  logic        clk,
  input  logic        rst,
  // data-gathering master
  input  logic [31:0] dg_address,
  input  logic        dg_read,
  input  logic        dg_write,
  input  logic [31:0] dg_writedata,
  output logic [31:0] dg_readdata,
  output logic        dg_waitrequest,
  output logic        dg_unmapped,
  // system CPU: SRAM port
  input  logic [17:0] cpu_sram_address,
  input  logic        cpu_sram_read,
  input  logic        cpu_sram_write,
  input  logic [15:0] cpu_sram_writedata,
  input  logic [1:0]  cpu_sram_byteenable,
  output logic [15:0] cpu_sram_readdata,
  output logic        cpu_sram_readdatavalid,
  output logic        cpu_sram_waitrequest,
  // system CPU: reset and master-port taps
  output logic        cpu_reset,
  input  logic [31:0] cpu_i_address,
  input  logic        cpu_i_read,
  input  logic        cpu_i_waitrequest,
  input  logic [31:0] cpu_d_address,
  input  logic        cpu_d_read,
  input  logic        cpu_d_write,
  input  logic        cpu_d_waitrequest,
  // GPU pixel engine: SRAM read port, reset, register port, timing
  input  logic [17:0] gpu_sram_address,
  input  logic        gpu_sram_read,
  output logic [15:0] gpu_sram_readdata,
  output logic        gpu_sram_readdatavalid,
  output logic        gpu_reset,
  output logic [11:0] gpu_reg_address,
  output logic        gpu_reg_read,
  output logic        gpu_reg_write,
  output logic [31:0] gpu_reg_writedata,
  input  logic [31:0] gpu_reg_readdata,
  input  logic        gpu_reg_waitrequest,
  output logic [10:0] vga_x,
  output logic [1:0]  vga_x_cycle,
  output logic [9:0]  vga_y,
  output logic [8:0]  vga_fill_y,
  output logic        vga_hsync_n,
  output logic        vga_vsync_n,
  output logic        vga_blank,
  // log memory write master (SRAM usage log)
  output logic [31:0] lm_address,
  output logic        lm_write,
  output logic [31:0] lm_writedata,
  input  logic        lm_waitrequest,
  // SRAM pins
  output logic [17:0] sram_addr,
  output logic [15:0] sram_dq_o,
  output logic        sram_dq_oe,
  input  logic [15:0] sram_dq_i,
  output logic        sram_ce_n,
  output logic        sram_oe_n,
  output logic        sram_we_n,
  output logic        sram_ub_n,
  output logic        sram_lb_n,
  // system counter
  output logic [63:0] sys_count
);

  // ---------------------------------------------------------------- decoder
  logic [4:0]  sram_iir_address, sys_address;
  logic [11:0] gpu_address;
  logic [5:0]  mon_address;
  logic        sram_iir_read, sram_iir_write, gpu_read, gpu_write;
  logic        mon_read, mon_write, sys_read, sys_write, gpu_waitrequest;
  logic [31:0] writedata, sram_iir_readdata, gpu_readdata, mon_readdata, sys_readdata;

  iir_addr_decode u_dec (
    .clk, .rst,
    .m_address(dg_address), .m_read(dg_read), .m_write(dg_write), .m_writedata(dg_writedata),
    .m_readdata(dg_readdata), .m_waitrequest(dg_waitrequest), .m_unmapped(dg_unmapped),
    .sram_address(sram_iir_address), .sram_read(sram_iir_read), .sram_write(sram_iir_write),
    .sram_readdata(sram_iir_readdata),
    .gpu_address, .gpu_read, .gpu_write, .gpu_readdata, .gpu_waitrequest,
    .mon_address, .mon_read, .mon_write, .mon_readdata,
    .sys_address, .sys_read, .sys_write, .sys_readdata,
    .writedata
  );

  // ---------------------------------------------------------------- system IIR
  system_iir #(.COUNT_W(64)) u_sys (
    .clk, .rst, .av_address(sys_address), .av_read(sys_read), .av_write(sys_write),
    .av_writedata(writedata), .av_readdata(sys_readdata), .sys_count
  );

  // ---------------------------------------------------------------- Nios II monitor
  nios2_monitor #(.LOG_WORDS(LOG_WORDS)) u_mon (
    .clk, .rst, .av_address(mon_address), .av_read(mon_read), .av_write(mon_write),
    .av_writedata(writedata), .av_readdata(mon_readdata),
    .timestamp(sys_count[31:0]),
    .i_address(cpu_i_address), .i_read(cpu_i_read), .i_waitrequest(cpu_i_waitrequest),
    .d_address(cpu_d_address), .d_read(cpu_d_read), .d_write(cpu_d_write),
    .d_waitrequest(cpu_d_waitrequest),
    .cpu_reset
  );

  // ---------------------------------------------------------------- shared SRAM controller
  logic cpu_active;

  sram_2x_access u_sram (
    .clk, .rst,
    .cpu_address(cpu_sram_address), .cpu_read(cpu_sram_read), .cpu_write(cpu_sram_write),
    .cpu_writedata(cpu_sram_writedata), .cpu_byteenable(cpu_sram_byteenable),
    .cpu_readdata(cpu_sram_readdata), .cpu_readdatavalid(cpu_sram_readdatavalid),
    .cpu_waitrequest(cpu_sram_waitrequest), .cpu_active,
    .gpu_address(gpu_sram_address), .gpu_read(gpu_sram_read),
    .gpu_readdata(gpu_sram_readdata), .gpu_readdatavalid(gpu_sram_readdatavalid),
    .iir_address(sram_iir_address), .iir_read(sram_iir_read), .iir_write(sram_iir_write),
    .iir_writedata(writedata), .iir_readdata(sram_iir_readdata),
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i, .sram_ce_n, .sram_oe_n, .sram_we_n,
    .sram_ub_n, .sram_lb_n
  );

  // ---------------------------------------------------------------- XD GPU: port sharing
  logic [4:0]  gpu_iir_address;
  logic        gpu_iir_read, gpu_iir_write;
  logic [31:0] gpu_iir_writedata, gpu_iir_readdata;

  iir_if_share #(.ADDR_W(12), .IIR_BASE('h600), .IIR_WORDS(32)) u_share (
    .clk, .rst,
    .s_address(gpu_address), .s_read(gpu_read), .s_write(gpu_write), .s_writedata(writedata),
    .s_readdata(gpu_readdata), .s_waitrequest(gpu_waitrequest),
    .ip_address(gpu_reg_address), .ip_read(gpu_reg_read), .ip_write(gpu_reg_write),
    .ip_writedata(gpu_reg_writedata), .ip_readdata(gpu_reg_readdata),
    .ip_waitrequest(gpu_reg_waitrequest),
    .iir_address(gpu_iir_address), .iir_read(gpu_iir_read), .iir_write(gpu_iir_write),
    .iir_writedata(gpu_iir_writedata), .iir_readdata(gpu_iir_readdata)
  );

  // ---------------------------------------------------------------- XD GPU: VGA timing
  logic frame_start;

  vga_sync_gen #(
    .CLKS_PER_PIXEL(4),
    .H_VISIBLE(H_VISIBLE), .H_FRONT(H_FRONT), .H_SYNC(H_SYNC), .H_BACK(H_BACK),
    .V_VISIBLE(V_VISIBLE), .V_FRONT(V_FRONT), .V_SYNC(V_SYNC), .V_BACK(V_BACK)
  ) u_vga (
    .clk, .rst(rst || gpu_reset),
    .x_cycle(vga_x_cycle), .screen_x(vga_x), .screen_y(vga_y), .fill_y(vga_fill_y), .frame_start,
    .hsync_n(vga_hsync_n), .vsync_n(vga_vsync_n), .blank(vga_blank)
  );

  // ---------------------------------------------------------------- XD GPU: IIR block
  iir_xd_gpu #(.FIFO_DEPTH(FIFO_DEPTH), .IP_PTR(32'hFFFF_E800)) u_gpu_iir (
    .clk, .rst,
    .av_address(gpu_iir_address), .av_read(gpu_iir_read), .av_write(gpu_iir_write),
    .av_writedata(gpu_iir_writedata), .av_readdata(gpu_iir_readdata),
    .gpu_reset,
    .frame_start(frame_start && !gpu_reset), .screen_x(vga_x), .x_cycle(vga_x_cycle), .fill_y(vga_fill_y),
    .cpu_active, .gpu_active(gpu_sram_read),
    .lm_address, .lm_write, .lm_writedata, .lm_waitrequest
  );

endmodule
