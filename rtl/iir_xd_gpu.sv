// iir_xd_gpu: IIR block of the XD 2D GPU, with the shared-SRAM usage logger.
//
// Besides the general registers it counts frames and faulty accesses and records how the CPU
// and the GPU use the SRAM they share. The logger watches two activity bits, cpu_active (from
// the SRAM controller: the CPU is reading or writing, granted or stalled) and gpu_active (the
// GPU is reading). While a capture runs it produces 32-bit event words:
//   frame start (every frame_start): b31 = 1, b21..2 frame number, b1 cpu, b0 gpu
//   change of either bit inside a frame:
//                b31 = 0, b23..13 screen x, b12..11 x sub-cycle, b10..2 fill y, b1 cpu, b0 gpu
// so the beam position of the VGA timing generator is the timestamp. Events go into a FIFO
// whose head is written, one word per accepted write, to consecutive words of an external log
// memory from "log begin" up to (not including) "log end", through a simple write master
// (address, write, writedata, waitrequest).
//
// Register window (32-bit words):
//   0x00..0x05  general registers, type 110: internal, parent has registers, IP reset usable;
//               0x02 = IP_PTR (byte offset from this window to the GPU registers, -0x1800);
//               0x03 drives gpu_reset; 0x05 not implemented
//   0x06..0x0B  VLNV liHard / gfx / xd_gpu / 0.2;  0x0C extra information (zero)
//   0x0D  R     frames since the GPU left reset
//   0x0E  R/C   writes to an offset with no writable register   (any write clears)
//   0x0F  R/C   reads from an offset with no readable register
//   0x10  R/W   frames to capture: writing N > 0 empties the FIFO, restarts the log at
//               "log begin" and captures the next N whole frames; reads the frames still to go
//   0x11  R/W   log begin (byte address)
//   0x12  R/W   log end (byte address, exclusive)
//   0x13  R/W   log status: b0 log active (waiting, capturing or draining the FIFO),
//               b1 FIFO overrun. Writing b0 = 0 stops a capture, writing b1 = 0 clears overrun.
// A capture also ends when the log memory is full; events still queued are then dropped.
//
// The register map, the two event formats and the FIFO-to-memory path follow the
// specification. The start at the next frame, the exclusive end address, the FIFO depth, the
// status write behaviour and what the frames register reads back are this design's choices.
//
// Timing: readdata valid the cycle after av_read; an event is queued in the cycle after the
// change that caused it is seen at the inputs.
module iir_xd_gpu
  import iir_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 128,
  parameter logic [31:0] IP_PTR     = 32'hFFFF_E800,   // -0x1800
  parameter int unsigned INSTANCE   = 0
) (
  input  logic        clk,
  input  logic        rst,
  // register slave port
  input  logic [4:0]  av_address,
  input  logic        av_read,
  input  logic        av_write,
  input  logic [31:0] av_writedata,
  output logic [31:0] av_readdata,
  // GPU reset from the IP reset register
  output logic        gpu_reset,
  // from the VGA timing generator
  input  logic        frame_start,
  input  logic [10:0] screen_x,
  input  logic [1:0]  x_cycle,
  input  logic [8:0]  fill_y,
  // activity bits
  input  logic        cpu_active,
  input  logic        gpu_active,
  // log memory write master
  output logic [31:0] lm_address,
  output logic        lm_write,
  output logic [31:0] lm_writedata,
  input  logic        lm_waitrequest
);

  localparam int unsigned OFS_FRAMES = 'h0D;
  localparam int unsigned OFS_FWR    = 'h0E;
  localparam int unsigned OFS_FRD    = 'h0F;
  localparam int unsigned OFS_CAPT   = 'h10;
  localparam int unsigned OFS_BEGIN  = 'h11;
  localparam int unsigned OFS_END    = 'h12;
  localparam int unsigned OFS_STATUS = 'h13;

  // ---------------------------------------------------------------- general registers
  logic [31:0] gen_rdata;
  logic        gen_rd_ok, gen_wr_ok;

  iir_general_regs #(
    .OFS_W(5), .IIR_TYPE(3'b110), .IP_PTR(IP_PTR), .INSTANCE(INSTANCE), .HAS_MUTEX(1'b0),
    .VLNV_BYTES(GPU_VLNV_BYTES), .VLNV(512'(GPU_VLNV)),
    .EXT_BYTES(0), .EXT('0), .EXT_WORDS(1)
  ) u_gen (
    .clk, .rst, .offset(av_address), .rd(av_read), .wr(av_write), .wdata(av_writedata),
    .rdata(gen_rdata), .rd_ok(gen_rd_ok), .wr_ok(gen_wr_ok), .ip_reset(gpu_reset)
  );

  wire [31:0] ofs   = 32'(av_address);
  wire        rd_ok = gen_rd_ok || (ofs >= OFS_FRAMES && ofs <= OFS_STATUS);
  wire        wr_ok = gen_wr_ok || (ofs >= OFS_FWR && ofs <= OFS_STATUS);

  // ---------------------------------------------------------------- counters
  logic [31:0] n_frames, n_fwr, n_frd;

  always_ff @(posedge clk) begin
    if (rst || gpu_reset)  n_frames <= '0;
    else if (frame_start)  n_frames <= n_frames + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      n_fwr <= '0;
      n_frd <= '0;
    end else begin
      if (av_write && ofs == OFS_FWR) n_fwr <= '0;
      else if (av_write && !wr_ok)    n_fwr <= n_fwr + 1'b1;
      if (av_write && ofs == OFS_FRD) n_frd <= '0;
      else if (av_read && !rd_ok)     n_frd <= n_frd + 1'b1;
    end
  end

  // ---------------------------------------------------------------- capture control
  logic        armed_q, capt_q, ovr_q;
  logic [31:0] frames_left, begin_q, end_q, wr_addr;
  logic        push, fifo_full, fifo_empty, pop, flush, mem_full;
  logic [31:0] ev_word, fifo_head;
  logic [1:0]  act_prev;
  localparam int unsigned AWC = (FIFO_DEPTH > 1) ? $clog2(FIFO_DEPTH) : 1;
  logic [AWC:0] fifo_count;

  wire [1:0] act      = {cpu_active, gpu_active};
  wire       start_wr = av_write && ofs == OFS_CAPT && av_writedata != '0;
  wire       stop_wr  = av_write && ofs == OFS_STATUS && !av_writedata[0];
  // the frame_start that begins a captured frame
  wire       cap_frame = frame_start && ((armed_q && !start_wr) || (capt_q && frames_left != 32'd1));
  // the frame_start that ends the last captured frame
  wire       end_frame = frame_start && capt_q && frames_left == 32'd1;

  assign mem_full = wr_addr + 32'd4 > end_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      armed_q     <= 1'b0;
      capt_q      <= 1'b0;
      ovr_q       <= 1'b0;
      frames_left <= '0;
      begin_q     <= '0;
      end_q       <= '0;
      wr_addr     <= '0;
      act_prev    <= '0;
    end else begin
      act_prev <= act;
      if (av_write && ofs == OFS_BEGIN) begin_q <= av_writedata;
      if (av_write && ofs == OFS_END)   end_q   <= av_writedata;
      if (push && fifo_full)            ovr_q   <= 1'b1;
      if (av_write && ofs == OFS_STATUS && !av_writedata[1]) ovr_q <= 1'b0;
      if (pop) wr_addr <= wr_addr + 32'd4;

      if (start_wr) begin
        armed_q     <= 1'b1;
        capt_q      <= 1'b0;
        ovr_q       <= 1'b0;
        frames_left <= av_writedata;
        wr_addr     <= begin_q;
      end else if (stop_wr || (capt_q && mem_full && !fifo_empty)) begin
        armed_q <= 1'b0;
        capt_q  <= 1'b0;
      end else if (cap_frame) begin
        armed_q <= 1'b0;
        capt_q  <= 1'b1;
        if (capt_q) frames_left <= frames_left - 1'b1;
      end else if (end_frame) begin
        capt_q      <= 1'b0;
        frames_left <= '0;
      end
    end
  end

  // ---------------------------------------------------------------- event words
  sram_ev_frame_t ev_f;
  sram_ev_line_t  ev_l;

  always_comb begin
    ev_f             = '0;
    ev_f.frame_begin = 1'b1;
    ev_f.frame       = 20'(n_frames + 1'b1);
    ev_f.cpu_active  = cpu_active;
    ev_f.gpu_active  = gpu_active;
    ev_l             = '0;
    ev_l.screen_x    = screen_x;
    ev_l.x_cycle     = x_cycle;
    ev_l.fill_y      = fill_y;
    ev_l.cpu_active  = cpu_active;
    ev_l.gpu_active  = gpu_active;
    push    = !start_wr && !stop_wr && (cap_frame || (capt_q && !end_frame && act != act_prev));
    ev_word = cap_frame ? 32'(ev_f) : 32'(ev_l);
  end

  // ---------------------------------------------------------------- FIFO and log writer
  assign flush = start_wr || (mem_full && !fifo_empty);

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .flush, .push, .wdata(ev_word), .pop,
    .rdata(fifo_head), .empty(fifo_empty), .full(fifo_full), .count(fifo_count)
  );

  assign lm_write     = !fifo_empty && !mem_full;
  assign lm_address   = wr_addr;
  assign lm_writedata = fifo_head;
  assign pop          = lm_write && !lm_waitrequest;

  // ---------------------------------------------------------------- read data
  always_ff @(posedge clk) begin
    if (rst) begin
      av_readdata <= '0;
    end else if (av_read) begin
      unique case (ofs)
        OFS_FRAMES: av_readdata <= n_frames;
        OFS_FWR:    av_readdata <= n_fwr;
        OFS_FRD:    av_readdata <= n_frd;
        OFS_CAPT:   av_readdata <= frames_left;
        OFS_BEGIN:  av_readdata <= begin_q;
        OFS_END:    av_readdata <= end_q;
        OFS_STATUS: av_readdata <= {30'd0, ovr_q, armed_q || capt_q || !fifo_empty};
        default:    av_readdata <= gen_rdata;
      endcase
    end
  end

  // the writer never runs past the end of the log memory
  a_lm_in_range: assert property (@(posedge clk) disable iff (rst)
    lm_write |-> (lm_address >= begin_q && lm_address + 32'd4 <= end_q));

endmodule
