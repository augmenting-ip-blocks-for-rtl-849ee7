// nios2_monitor: external IIR block for a CPU whose own HDL cannot be changed.
//
// The monitor watches the CPU's instruction and data master ports passively (address, read,
// write, waitrequest, tapped where they leave the CPU) and keeps the CPU's reset register.
// Register window (32-bit words, 64-word window):
//   0x00..0x05  general registers, type 101: external block, parent has no registers,
//               IP reset usable. 0x02 and 0x05 are not implemented.
//   0x03        CPU reset, R/W, active high. RESET_INIT (default 1) holds the CPU in reset
//               after the system reset until software writes 0.
//   0x06..0x0C  VLNV  TUT / TUT / Nios II monitor / 0.2;  0x0D extra information (zero)
//   0x0E  R/W   log register pointer: a write moves the read pointer of all three logs
//   0x0F  R/C   reads done to the monitor           (any write clears a R/C register)
//   0x10  R/C   writes done to the monitor
//   0x11  R/C   reads to an offset with no readable register
//   0x12  R/C   writes to an offset with no writable register
//   0x13  R/C   longest run of cycles the CPU waited on a memory access
//   0x14        log of memory stalls: event data {d_stall, i_stall} in b1..b0
//   0x15        log of instruction reads: event data {read, address[30:0]}
//   0x16        log of data reads/writes: event data {read, write, address[29:0]}
// Each log is an event_log (two words per event: timestamp, data) driven by the low word of
// the system counter; an event is recorded whenever the sampled signals differ from the
// previous cycle. Writes to 0x14..0x16 are log commands, reads return status or log words.
//
// The register map, the counters and the three logs follow the specification. What exactly a
// "faulty" access, a "wait" and a log event are, the data-word layouts and the meaning of the
// pointer register are this design's choices.
//
// Timing: readdata is valid in the cycle after av_read; no wait states.
module nios2_monitor
  import iir_pkg::*;
#(
  parameter int unsigned LOG_WORDS  = 128,
  parameter int unsigned INSTANCE   = 0,
  parameter bit          RESET_INIT = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  // register slave port
  input  logic [5:0]  av_address,
  input  logic        av_read,
  input  logic        av_write,
  input  logic [31:0] av_writedata,
  output logic [31:0] av_readdata,
  // system counter (timestamp)
  input  logic [31:0] timestamp,
  // tapped CPU instruction master
  input  logic [31:0] i_address,
  input  logic        i_read,
  input  logic        i_waitrequest,
  // tapped CPU data master
  input  logic [31:0] d_address,
  input  logic        d_read,
  input  logic        d_write,
  input  logic        d_waitrequest,
  // reset of the monitored CPU
  output logic        cpu_reset
);

  localparam int unsigned OFS_LOGPTR  = 'h0E;
  localparam int unsigned OFS_READS   = 'h0F;
  localparam int unsigned OFS_WRITES  = 'h10;
  localparam int unsigned OFS_FRD     = 'h11;
  localparam int unsigned OFS_FWR     = 'h12;
  localparam int unsigned OFS_LWAIT   = 'h13;
  localparam int unsigned OFS_LOG0    = 'h14;  // 0x14..0x16: the three logs

  // ---------------------------------------------------------------- general registers
  logic [31:0] gen_rdata;
  logic        gen_rd_ok, gen_wr_ok;

  iir_general_regs #(
    .OFS_W(6), .IIR_TYPE(3'b101), .IP_PTR(32'h0), .INSTANCE(INSTANCE), .HAS_MUTEX(1'b0),
    .RESET_INIT(RESET_INIT), .VLNV_BYTES(MON_VLNV_BYTES), .VLNV(512'(MON_VLNV)),
    .EXT_BYTES(0), .EXT('0), .EXT_WORDS(1)
  ) u_gen (
    .clk, .rst, .offset(av_address), .rd(av_read), .wr(av_write), .wdata(av_writedata),
    .rdata(gen_rdata), .rd_ok(gen_rd_ok), .wr_ok(gen_wr_ok), .ip_reset(cpu_reset)
  );

  // ---------------------------------------------------------------- decode
  wire [31:0] ofs     = 32'(av_address);
  wire        own_reg = ofs >= OFS_LOGPTR && ofs <= OFS_LOG0 + 2;
  wire        rd_ok   = gen_rd_ok || own_reg;
  wire        wr_ok   = gen_wr_ok || own_reg;
  wire        is_log  = ofs >= OFS_LOG0 && ofs <= OFS_LOG0 + 2;
  wire [1:0]  log_sel = 2'(ofs - OFS_LOG0);

  // ---------------------------------------------------------------- access counters
  logic [31:0] n_reads, n_writes, n_frd, n_fwr, logptr_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      n_reads  <= '0;
      n_writes <= '0;
      n_frd    <= '0;
      n_fwr    <= '0;
      logptr_q <= '0;
    end else begin
      if (av_read)            n_reads  <= n_reads + 1'b1;
      if (av_write)           n_writes <= n_writes + 1'b1;
      if (av_read && !rd_ok)  n_frd    <= n_frd + 1'b1;
      if (av_write && !wr_ok) n_fwr    <= n_fwr + 1'b1;
      if (av_write) begin
        if (ofs == OFS_READS)  n_reads  <= '0;
        if (ofs == OFS_WRITES) n_writes <= '0;
        if (ofs == OFS_FRD)    n_frd    <= '0;
        if (ofs == OFS_FWR)    n_fwr    <= '0;
        if (ofs == OFS_LOGPTR) logptr_q <= av_writedata;
      end
    end
  end

  // ---------------------------------------------------------------- CPU memory wait
  logic        waiting;
  logic [31:0] wait_run, wait_max;

  assign waiting = (i_read && i_waitrequest) || ((d_read || d_write) && d_waitrequest);

  always_ff @(posedge clk) begin
    if (rst) begin
      wait_run <= '0;
      wait_max <= '0;
    end else begin
      wait_run <= waiting ? wait_run + 1'b1 : '0;
      if (av_write && ofs == OFS_LWAIT) wait_max <= '0;
      else if (waiting && wait_run + 1'b1 > wait_max) wait_max <= wait_run + 1'b1;
    end
  end

  // ---------------------------------------------------------------- logs
  logic [1:0]  stall_now, stall_prev;
  logic [31:0] irw_now, irw_prev, drw_now, drw_prev;
  logic [2:0]  ev_valid;
  logic [31:0] ev_data [3];
  logic [31:0] log_rdata [3];
  log_status_t log_status [3];   // also readable through the log registers

  assign stall_now = {(d_read || d_write) && d_waitrequest, i_read && i_waitrequest};
  assign irw_now   = {i_read, i_address[30:0]};
  assign drw_now   = {d_read, d_write, d_address[29:0]};

  always_ff @(posedge clk) begin
    if (rst) begin
      stall_prev <= '0;
      irw_prev   <= '0;
      drw_prev   <= '0;
    end else begin
      stall_prev <= stall_now;
      irw_prev   <= irw_now;
      drw_prev   <= drw_now;
    end
  end

  assign ev_valid   = {drw_now != drw_prev, irw_now != irw_prev, stall_now != stall_prev};
  assign ev_data[0] = {30'd0, stall_now};
  assign ev_data[1] = irw_now;
  assign ev_data[2] = drw_now;

  for (genvar g = 0; g < 3; g++) begin : g_log
    event_log #(.LOG_WORDS(LOG_WORDS), .EVENT_WORDS(2)) u_log (
      .clk, .rst, .timestamp,
      .ev_valid (ev_valid[g]),
      .ev_data  (ev_data[g]),
      .reg_rd   (av_read && is_log && log_sel == 2'(g)),
      .reg_wr   (av_write && is_log && log_sel == 2'(g)),
      .reg_wdata(av_writedata),
      .reg_rdata(log_rdata[g]),
      .ptr_load (av_write && ofs == OFS_LOGPTR),
      .ptr_value(av_writedata[7:0]),
      .status   (log_status[g])
    );
  end

  // ---------------------------------------------------------------- read data
  logic [31:0] rdata_q;
  logic        from_log_q;
  logic [1:0]  log_sel_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      rdata_q    <= '0;
      from_log_q <= 1'b0;
      log_sel_q  <= '0;
    end else if (av_read) begin
      from_log_q <= is_log;
      log_sel_q  <= log_sel;
      unique case (ofs)
        OFS_LOGPTR: rdata_q <= logptr_q;
        OFS_READS:  rdata_q <= n_reads;
        OFS_WRITES: rdata_q <= n_writes;
        OFS_FRD:    rdata_q <= n_frd;
        OFS_FWR:    rdata_q <= n_fwr;
        OFS_LWAIT:  rdata_q <= wait_max;
        default:    rdata_q <= gen_rdata;
      endcase
    end
  end

  assign av_readdata = from_log_q ? log_rdata[log_sel_q] : rdata_q;

endmodule
