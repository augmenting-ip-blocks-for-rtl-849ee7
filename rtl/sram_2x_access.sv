// sram_2x_access: shared SRAM controller with a second slave port of IP information registers.
//
// One asynchronous 16-bit SRAM (256K x 16 = 512 kB) is shared by a CPU and a GPU. The GPU
// port is read-only and has top priority: a GPU read is granted in every cycle it is asserted.
// The CPU port is granted only in cycles without a GPU read; otherwise cpu_waitrequest holds
// the CPU. One access is launched per clock cycle:
//   cycle n    request granted; address and strobes are registered onto the pins at its end
//   cycle n+1  the SRAM drives (read) or takes (write, we_n low for the whole cycle) the data;
//              read data is captured at the end of the cycle
//   cycle n+2  readdata valid with readdatavalid for the port that asked
// cpu_active is high while the CPU asserts read or write, granted or stalled, and is the
// activity bit logged by the GPU's IIR block; a CPU stall shows as both bits high.
//
// The IIR slave port (32-bit words, 32-word window):
//   0x00..0x05  general registers, type 000 (internal, no accessible registers, no IP reset)
//   0x06..0x0E  VLNV liHard / storage / sram_2x_access / 0.2;  0x0F extra information (zero)
//   0x10/0x11   R/C  SRAM write accesses, low/high word of a 64-bit counter
//   0x12/0x13   R/C  SRAM read accesses (CPU and GPU), low/high word of a 64-bit counter
// Reading a low word captures the matching high word, so a low-then-high read pair is
// consistent. A write to either word clears the whole counter.
//
// The two ports, the GPU priority, the separate IIR port and its register map follow the
// specification. The pin-level timing is this design's: the original generates a 5 ns write
// pulse inside the 10 ns cycle with FPGA-specific timing constraints, whereas this version
// holds we_n low for a full cycle, which a 10 ns SRAM accepts when pins are registered.
// The 16-bit CPU port assumes the interconnect adapts a 32-bit CPU to it.
module sram_2x_access
  import iir_pkg::*;
#(
  parameter int unsigned ADDR_W   = 18,
  parameter int unsigned INSTANCE = 0
) (
  input  logic              clk,
  input  logic              rst,
  // CPU memory port
  input  logic [ADDR_W-1:0] cpu_address,
  input  logic              cpu_read,
  input  logic              cpu_write,
  input  logic [15:0]       cpu_writedata,
  input  logic [1:0]        cpu_byteenable,
  output logic [15:0]       cpu_readdata,
  output logic              cpu_readdatavalid,
  output logic              cpu_waitrequest,
  output logic              cpu_active,
  // GPU read port (top priority)
  input  logic [ADDR_W-1:0] gpu_address,
  input  logic              gpu_read,
  output logic [15:0]       gpu_readdata,
  output logic              gpu_readdatavalid,
  // IIR register port
  input  logic [4:0]        iir_address,
  input  logic              iir_read,
  input  logic              iir_write,
  input  logic [31:0]       iir_writedata,
  output logic [31:0]       iir_readdata,
  // SRAM pins (the bidirectional data bus split into out/enable/in)
  output logic [ADDR_W-1:0] sram_addr,
  output logic [15:0]       sram_dq_o,
  output logic              sram_dq_oe,
  input  logic [15:0]       sram_dq_i,
  output logic              sram_ce_n,
  output logic              sram_oe_n,
  output logic              sram_we_n,
  output logic              sram_ub_n,
  output logic              sram_lb_n
);

  // ---------------------------------------------------------------- arbitration
  logic cpu_go, rd_go, wr_go;

  assign cpu_waitrequest = (cpu_read || cpu_write) && gpu_read;
  assign cpu_go          = (cpu_read || cpu_write) && !gpu_read;
  assign rd_go           = gpu_read || (cpu_go && cpu_read);
  assign wr_go           = cpu_go && cpu_write && !cpu_read;
  assign cpu_active      = cpu_read || cpu_write;

  // ---------------------------------------------------------------- pin stage
  logic rd_cpu_q, rd_gpu_q;   // a read is on the pins for this port

  always_ff @(posedge clk) begin
    if (rst) begin
      sram_addr  <= '0;
      sram_dq_o  <= '0;
      sram_dq_oe <= 1'b0;
      sram_ce_n  <= 1'b1;
      sram_oe_n  <= 1'b1;
      sram_we_n  <= 1'b1;
      sram_ub_n  <= 1'b1;
      sram_lb_n  <= 1'b1;
      rd_cpu_q   <= 1'b0;
      rd_gpu_q   <= 1'b0;
    end else begin
      sram_addr  <= gpu_read ? gpu_address : cpu_address;
      sram_dq_o  <= cpu_writedata;
      sram_dq_oe <= wr_go;
      sram_ce_n  <= !(rd_go || wr_go);
      sram_oe_n  <= !rd_go;
      sram_we_n  <= !wr_go;
      sram_ub_n  <= wr_go ? !cpu_byteenable[1] : !rd_go;
      sram_lb_n  <= wr_go ? !cpu_byteenable[0] : !rd_go;
      rd_gpu_q   <= gpu_read;
      rd_cpu_q   <= cpu_go && cpu_read;
    end
  end

  // ---------------------------------------------------------------- read capture
  always_ff @(posedge clk) begin
    if (rst) begin
      cpu_readdata      <= '0;
      gpu_readdata      <= '0;
      cpu_readdatavalid <= 1'b0;
      gpu_readdatavalid <= 1'b0;
    end else begin
      cpu_readdatavalid <= rd_cpu_q;
      gpu_readdatavalid <= rd_gpu_q;
      if (rd_cpu_q) cpu_readdata <= sram_dq_i;
      if (rd_gpu_q) gpu_readdata <= sram_dq_i;
    end
  end

  // ---------------------------------------------------------------- IIR port
  localparam int unsigned OFS_WR_LO = 'h10;
  localparam int unsigned OFS_WR_HI = 'h11;
  localparam int unsigned OFS_RD_LO = 'h12;
  localparam int unsigned OFS_RD_HI = 'h13;

  logic [31:0] gen_rdata;
  logic        gen_rd_ok, gen_wr_ok, gen_ip_reset;
  logic [63:0] n_wr, n_rd;
  logic [31:0] hi_wr_q, hi_rd_q;
  wire  [31:0] ofs = 32'(iir_address);

  iir_general_regs #(
    .OFS_W(5), .IIR_TYPE(3'b000), .IP_PTR(32'h0), .INSTANCE(INSTANCE), .HAS_MUTEX(1'b0),
    .VLNV_BYTES(SRAM_VLNV_BYTES), .VLNV(512'(SRAM_VLNV)),
    .EXT_BYTES(0), .EXT('0), .EXT_WORDS(1)
  ) u_gen (
    .clk, .rst, .offset(iir_address), .rd(iir_read), .wr(iir_write), .wdata(iir_writedata),
    .rdata(gen_rdata), .rd_ok(gen_rd_ok), .wr_ok(gen_wr_ok), .ip_reset(gen_ip_reset)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      n_wr <= '0;
      n_rd <= '0;
    end else begin
      if (iir_write && (ofs == OFS_WR_LO || ofs == OFS_WR_HI)) n_wr <= '0;
      else if (wr_go)                                          n_wr <= n_wr + 1'b1;
      if (iir_write && (ofs == OFS_RD_LO || ofs == OFS_RD_HI)) n_rd <= '0;
      else if (rd_go)                                          n_rd <= n_rd + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      iir_readdata <= '0;
      hi_wr_q      <= '0;
      hi_rd_q      <= '0;
    end else if (iir_read) begin
      unique case (ofs)
        OFS_WR_LO: begin iir_readdata <= n_wr[31:0]; hi_wr_q <= n_wr[63:32]; end
        OFS_WR_HI: iir_readdata <= hi_wr_q;
        OFS_RD_LO: begin iir_readdata <= n_rd[31:0]; hi_rd_q <= n_rd[63:32]; end
        OFS_RD_HI: iir_readdata <= hi_rd_q;
        default:   iir_readdata <= gen_rdata;
      endcase
    end
  end

  // read and write strobes of one CPU access are exclusive on an Avalon port
  a_cpu_rw_exclusive: assert property (@(posedge clk) disable iff (rst) !(cpu_read && cpu_write));
  // a CPU request must be held while it is stalled
  a_cpu_hold: assert property (@(posedge clk) disable iff (rst)
    cpu_waitrequest |=> (cpu_read || cpu_write));

endmodule
