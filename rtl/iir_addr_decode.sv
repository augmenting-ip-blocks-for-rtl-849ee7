// iir_addr_decode: address decoder of the data-gathering master in the IIR test setup.
//
// It stands in for the bus fabric between the data-gathering CPU and the four register
// windows it scans: the shared SRAM controller's IIR port, the XD GPU (whose port is shared
// between the GPU's registers and its IIR window), the Nios II monitor and the system IIR.
// Byte addresses (default map):
//   0x0208_0000 .. 0x0208_007F  SRAM controller IIR port   (32 words)
//   0x0500_0000 .. 0x0500_3FFF  XD GPU port                (4096 words)
//   0x0600_0000 .. 0x0600_00FF  Nios II monitor            (64 words)
//   0x0600_0100 .. 0x0600_017F  system IIR                 (32 words)
// Each region is decoded in full, so unlike the original fabric no window appears at mirror
// addresses. An access to no region completes at once and reads zero; it is flagged on
// m_unmapped for one cycle. Reads return one cycle after they are accepted; only the GPU port
// can stall the master (m_waitrequest).
//
// The address map follows the specification's memory map of the data-gathering CPU; the
// single-master decoder is this design's simplification of the vendor interconnect.
// writedata is the master's write data, shared unchanged by all four windows.
module iir_addr_decode #(
  parameter logic [31:0] SRAM_IIR_BASE = 32'h0208_0000,
  parameter logic [31:0] GPU_BASE      = 32'h0500_0000,
  parameter logic [31:0] MON_BASE      = 32'h0600_0000,
  parameter logic [31:0] SYS_BASE      = 32'h0600_0100
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] m_address,        // byte address, word aligned
  input  logic        m_read,
  input  logic        m_write,
  input  logic [31:0] m_writedata,
  output logic [31:0] m_readdata,
  output logic        m_waitrequest,
  output logic        m_unmapped,
  // SRAM controller IIR port
  output logic [4:0]  sram_address,
  output logic        sram_read,
  output logic        sram_write,
  input  logic [31:0] sram_readdata,
  // XD GPU port
  output logic [11:0] gpu_address,
  output logic        gpu_read,
  output logic        gpu_write,
  input  logic [31:0] gpu_readdata,
  input  logic        gpu_waitrequest,
  // Nios II monitor
  output logic [5:0]  mon_address,
  output logic        mon_read,
  output logic        mon_write,
  input  logic [31:0] mon_readdata,
  // system IIR
  output logic [4:0]  sys_address,
  output logic        sys_read,
  output logic        sys_write,
  input  logic [31:0] sys_readdata,
  // write data to all
  output logic [31:0] writedata
);

  typedef enum logic [2:0] {SEL_NONE, SEL_SRAM, SEL_GPU, SEL_MON, SEL_SYS} sel_e;

  sel_e        sel, sel_q;
  logic [31:0] ofs;

  always_comb begin
    sel = SEL_NONE;
    ofs = '0;
    if (m_address >= SRAM_IIR_BASE && m_address < SRAM_IIR_BASE + 32'h80) begin
      sel = SEL_SRAM; ofs = m_address - SRAM_IIR_BASE;
    end else if (m_address >= GPU_BASE && m_address < GPU_BASE + 32'h4000) begin
      sel = SEL_GPU;  ofs = m_address - GPU_BASE;
    end else if (m_address >= MON_BASE && m_address < MON_BASE + 32'h100) begin
      sel = SEL_MON;  ofs = m_address - MON_BASE;
    end else if (m_address >= SYS_BASE && m_address < SYS_BASE + 32'h80) begin
      sel = SEL_SYS;  ofs = m_address - SYS_BASE;
    end
  end

  assign sram_address = ofs[6:2];
  assign gpu_address  = ofs[13:2];
  assign mon_address  = ofs[7:2];
  assign sys_address  = ofs[6:2];
  assign writedata    = m_writedata;

  assign sram_read  = m_read  && sel == SEL_SRAM;
  assign sram_write = m_write && sel == SEL_SRAM;
  assign gpu_read   = m_read  && sel == SEL_GPU;
  assign gpu_write  = m_write && sel == SEL_GPU;
  assign mon_read   = m_read  && sel == SEL_MON;
  assign mon_write  = m_write && sel == SEL_MON;
  assign sys_read   = m_read  && sel == SEL_SYS;
  assign sys_write  = m_write && sel == SEL_SYS;

  assign m_waitrequest = sel == SEL_GPU && (m_read || m_write) && gpu_waitrequest;

  always_ff @(posedge clk) begin
    if (rst) begin
      sel_q      <= SEL_NONE;
      m_unmapped <= 1'b0;
    end else begin
      if (m_read && !m_waitrequest) sel_q <= sel;
      m_unmapped <= (m_read || m_write) && sel == SEL_NONE;
    end
  end

  always_comb begin
    unique case (sel_q)
      SEL_SRAM: m_readdata = sram_readdata;
      SEL_GPU:  m_readdata = gpu_readdata;
      SEL_MON:  m_readdata = mon_readdata;
      SEL_SYS:  m_readdata = sys_readdata;
      default:  m_readdata = '0;
    endcase
  end

endmodule
