// iir_if_share: interface sharing logic between an IP block's own registers and its IIR block.
//
// An IP block with embedded information registers still has a single slave port on the bus.
// This module splits that port by address: word addresses IIR_BASE .. IIR_BASE+IIR_WORDS-1
// go to the IIR block (with the address rebased to 0), every other address goes to the IP's
// original register port unchanged. Read data returns from whichever side the read went to.
//
// Both sides answer a read in the cycle after it is accepted. The IIR side never waits; the
// IP side may hold the bus with ip_waitrequest, which is passed back only for accesses that
// go to it. The default split puts the XD GPU's IIR window at byte offset 0x1800 of its
// 16 kB register space, so that the IIR block's IP offset register reads -0x1800.
//
// The existence of this sharing logic and the GPU addresses follow the specification; the
// fixed one-cycle read latency on both sides is this design's choice.
// The write data and the address towards the IP side are the bus signals passed through
// unchanged, which is the point of sharing the port.
module iir_if_share #(
  parameter int unsigned ADDR_W    = 12,
  parameter int unsigned IIR_BASE  = 'h600,
  parameter int unsigned IIR_WORDS = 32,
  localparam int unsigned IIR_W    = $clog2(IIR_WORDS)
) (
  input  logic              clk,
  input  logic              rst,
  // shared slave port
  input  logic [ADDR_W-1:0] s_address,
  input  logic              s_read,
  input  logic              s_write,
  input  logic [31:0]       s_writedata,
  output logic [31:0]       s_readdata,
  output logic              s_waitrequest,
  // to the IP block's original registers
  output logic [ADDR_W-1:0] ip_address,
  output logic              ip_read,
  output logic              ip_write,
  output logic [31:0]       ip_writedata,
  input  logic [31:0]       ip_readdata,
  input  logic              ip_waitrequest,
  // to the IIR block
  output logic [IIR_W-1:0]  iir_address,
  output logic              iir_read,
  output logic              iir_write,
  output logic [31:0]       iir_writedata,
  input  logic [31:0]       iir_readdata
);

  logic to_iir, sel_iir_q;

  assign to_iir = 32'(s_address) >= IIR_BASE && 32'(s_address) < IIR_BASE + IIR_WORDS;

  assign ip_address    = s_address;
  assign ip_read       = s_read && !to_iir;
  assign ip_write      = s_write && !to_iir;
  assign ip_writedata  = s_writedata;

  assign iir_address   = IIR_W'(32'(s_address) - IIR_BASE);
  assign iir_read      = s_read && to_iir;
  assign iir_write     = s_write && to_iir;
  assign iir_writedata = s_writedata;

  assign s_waitrequest = !to_iir && (s_read || s_write) && ip_waitrequest;

  always_ff @(posedge clk) begin
    if (rst)                          sel_iir_q <= 1'b0;
    else if (s_read && !s_waitrequest) sel_iir_q <= to_iir;
  end

  assign s_readdata = sel_iir_q ? iir_readdata : ip_readdata;

endmodule
