// sram_async_model: behavioural model of a 256K x 16 asynchronous SRAM for simulation.
//
// Reads are combinational: while ce_n and oe_n are low the addressed word (byte lanes masked
// by ub_n/lb_n) appears on dq_out. A write takes the data at the clock edge that ends a cycle
// in which ce_n and we_n are low, honouring the byte lanes; this stands for the chip latching
// data at the rising edge of we_n. Contents start at zero.
module sram_async_model #(
  parameter int unsigned ADDR_W = 18
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic [15:0]       dq_in,
  input  logic              dq_in_en,
  output logic [15:0]       dq_out,
  input  logic              ce_n,
  input  logic              oe_n,
  input  logic              we_n,
  input  logic              ub_n,
  input  logic              lb_n
);
  logic [15:0] mem [2**ADDR_W];

  initial for (int i = 0; i < 2**ADDR_W; i++) mem[i] = '0;

  always_comb begin
    dq_out = '0;
    if (!ce_n && !oe_n) dq_out = mem[addr] & {{8{!ub_n}}, {8{!lb_n}}};
  end

  always @(posedge clk) begin
    if (!ce_n && !we_n && dq_in_en) begin
      if (!lb_n) mem[addr][7:0]  <= dq_in[7:0];
      if (!ub_n) mem[addr][15:8] <= dq_in[15:8];
    end
  end
endmodule
