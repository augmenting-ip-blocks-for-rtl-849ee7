// iir_general_regs: the general information registers that open every IIR register window.
//
// Word offsets (relative to the window):
//   0x00 header    R    reads "IIR1", then "1RII", alternating on every read. Software scans
//                       an address space for this pattern to find IIR windows.
//   0x01 type      R    IIR_TYPE: b0 external block, b1 parent IP has registers, b2 IP reset usable
//   0x02 IP ptr    R    offset (internal block) or address (external block) of the parent's
//                       registers; present only when type b1 is set
//   0x03 IP reset  R/W  active-high reset for the parent IP, present only when type b2 is set;
//                       loads RESET_INIT at system reset
//   0x04 instance  R    INSTANCE
//   0x05 mutex     R/W  present when HAS_MUTEX; see below
//   0x06..         R    VLNV: vendor, library, name, version as NUL-terminated strings
//   then           R    extra information string (EXT_WORDS words, zeros when unused)
// Absent registers read as zero and are reported as not decoded (rd_ok / wr_ok low) so that
// the owning block can count faulty accesses.
//
// The mutex is a single word: a non-zero write claims it only when it holds zero, a zero
// write releases it, other writes are ignored. A master claims with its own tag and reads
// back to see whether it won. The specification asks for a mutex but not for its protocol;
// this claim/release rule is this design's choice, as are the RESET_INIT option and the
// little-endian string packing.
//
// Interface: offset/rd/wr/wdata are the register-bus strobes already decoded to this window.
// rdata is combinational from offset; the owner registers it. Side effects (header toggle,
// register writes) take place at the clock edge that ends the strobe cycle.
// With the default IIR_TYPE (no IP reset) ip_reset is constant zero.
module iir_general_regs
  import iir_pkg::*;
#(
  parameter int unsigned    OFS_W       = 5,
  parameter logic [2:0]     IIR_TYPE    = 3'b000,
  parameter logic [31:0]    IP_PTR      = 32'h0,
  parameter int unsigned    INSTANCE    = 0,
  parameter bit             HAS_MUTEX   = 1'b1,
  parameter bit             RESET_INIT  = 1'b0,
  parameter int unsigned    VLNV_BYTES  = SYS_VLNV_BYTES,
  parameter logic [511:0]   VLNV        = 512'(SYS_VLNV),
  parameter int unsigned    EXT_BYTES   = 0,
  parameter logic [511:0]   EXT         = '0,
  parameter int unsigned    EXT_WORDS   = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [OFS_W-1:0] offset,
  input  logic             rd,
  input  logic             wr,
  input  logic [31:0]      wdata,
  output logic [31:0]      rdata,
  output logic             rd_ok,     // offset is a readable general register
  output logic             wr_ok,     // offset is a writable general register
  output logic             ip_reset
);

  localparam int unsigned VLNV_WORDS = (VLNV_BYTES + 3) / 4;
  localparam int unsigned EXT_OFS    = OFS_VLNV + VLNV_WORDS;
  localparam int unsigned END_OFS    = EXT_OFS + EXT_WORDS;  // first offset after the window

  logic        hdr_swap;   // next header read returns the byte-swapped string
  logic        ip_rst_q;
  logic [31:0] mutex_q;

  wire has_ptr   = IIR_TYPE[TYPE_HAS_REGS];
  wire has_reset = IIR_TYPE[TYPE_RESET];

  always_comb begin
    rdata = '0;
    rd_ok = 1'b0;
    wr_ok = 1'b0;
    if (32'(offset) == OFS_HEADER) begin
      rdata = hdr_swap ? HDR_1RII : HDR_IIR1;
      rd_ok = 1'b1;
    end else if (32'(offset) == OFS_TYPE) begin
      rdata = {29'd0, IIR_TYPE};
      rd_ok = 1'b1;
    end else if (32'(offset) == OFS_IPPTR) begin
      rdata = has_ptr ? IP_PTR : '0;
      rd_ok = has_ptr;
    end else if (32'(offset) == OFS_IPRESET) begin
      rdata = {31'd0, ip_rst_q};
      rd_ok = has_reset;
      wr_ok = has_reset;
    end else if (32'(offset) == OFS_INSTANCE) begin
      rdata = 32'(INSTANCE);
      rd_ok = 1'b1;
    end else if (32'(offset) == OFS_MUTEX) begin
      rdata = HAS_MUTEX ? mutex_q : '0;
      rd_ok = HAS_MUTEX;
      wr_ok = HAS_MUTEX;
    end else if (32'(offset) >= OFS_VLNV && 32'(offset) < EXT_OFS) begin
      rdata = str_word(VLNV, VLNV_BYTES, 32'(offset) - OFS_VLNV);
      rd_ok = 1'b1;
    end else if (32'(offset) >= EXT_OFS && 32'(offset) < END_OFS) begin
      rdata = str_word(EXT, EXT_BYTES, 32'(offset) - EXT_OFS);
      rd_ok = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hdr_swap <= 1'b0;
      ip_rst_q <= RESET_INIT;
      mutex_q  <= '0;
    end else begin
      if (rd && 32'(offset) == OFS_HEADER) hdr_swap <= ~hdr_swap;
      if (wr && has_reset && 32'(offset) == OFS_IPRESET) ip_rst_q <= wdata[0];
      if (wr && HAS_MUTEX && 32'(offset) == OFS_MUTEX) begin
        if (wdata == '0)        mutex_q <= '0;
        else if (mutex_q == '0) mutex_q <= wdata;
      end
    end
  end

  assign ip_reset = has_reset ? ip_rst_q : 1'b0;

endmodule
