// system_iir: the system IIR block.
//
// It describes the system as a whole rather than one IP block, and it provides the system
// counter: a COUNT_W-bit counter that is zero while the system reset is active and counts up
// by one on every clock cycle after it. The counter is an output so that every IIR block with
// log registers can timestamp its events with it.
//
// Register window (32-bit words):
//   0x00..0x05  general registers (type 000: not attached to an IP, no IP reset, no mutex)
//   0x06..0x0B  VLNV  liHard / iir / sys_iir / 1.0
//   0x0C..0x11  extra information "iir_xd_test-11.02.2012": the name and date of the
//               hardware build, which software compares against its own copy to check that
//               it runs on the hardware it was built for
//   0x12        system counter, low word (reading it also captures the high word)
//   0x13        system counter, high word as captured by the last low-word read
// Other offsets read as zero.
//
// The counter, its reset behaviour and the VLNV and extra strings follow the specification;
// the counter's register offsets and the low/high capture are this design's choices.
//
// Timing: readdata is registered, valid in the cycle after av_read; no wait states.
module system_iir
  import iir_pkg::*;
#(
  parameter int unsigned COUNT_W  = 64,
  parameter int unsigned INSTANCE = 0
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [4:0]         av_address,
  input  logic               av_read,
  input  logic               av_write,
  input  logic [31:0]        av_writedata,
  output logic [31:0]        av_readdata,
  output logic [COUNT_W-1:0] sys_count
);

  localparam int unsigned OFS_CNT_LO = 'h12;
  localparam int unsigned OFS_CNT_HI = 'h13;

  logic [31:0] gen_rdata;
  logic        gen_rd_ok, gen_wr_ok, gen_ip_reset;
  logic [63:0] count64;
  logic [31:0] cnt_hi_q;

  iir_general_regs #(
    .OFS_W(5), .IIR_TYPE(3'b000), .IP_PTR(32'h0), .INSTANCE(INSTANCE), .HAS_MUTEX(1'b0),
    .VLNV_BYTES(SYS_VLNV_BYTES), .VLNV(512'(SYS_VLNV)),
    .EXT_BYTES(SYS_EXT_BYTES), .EXT(512'(SYS_EXT)), .EXT_WORDS(6)
  ) u_gen (
    .clk, .rst, .offset(av_address), .rd(av_read), .wr(av_write), .wdata(av_writedata),
    .rdata(gen_rdata), .rd_ok(gen_rd_ok), .wr_ok(gen_wr_ok), .ip_reset(gen_ip_reset)
  );

  always_ff @(posedge clk) begin
    if (rst) sys_count <= '0;
    else     sys_count <= sys_count + 1'b1;
  end

  assign count64 = 64'(sys_count);

  always_ff @(posedge clk) begin
    if (rst) begin
      av_readdata <= '0;
      cnt_hi_q    <= '0;
    end else if (av_read) begin
      if (32'(av_address) == OFS_CNT_LO) begin
        av_readdata <= count64[31:0];
        cnt_hi_q    <= count64[63:32];
      end else if (32'(av_address) == OFS_CNT_HI) begin
        av_readdata <= cnt_hi_q;
      end else begin
        av_readdata <= gen_rdata;
      end
    end
  end

endmodule
