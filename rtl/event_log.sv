// event_log: event-based log register of an IIR block.
//
// Each event is stored as EVENT_WORDS consecutive 32-bit words: a timestamp (the low word of
// the system counter) followed by EVENT_WORDS-1 data words. The log memory holds LOG_WORDS
// words, i.e. LOG_WORDS/EVENT_WORDS events; it is one memory of whole events so that an event
// can be stored every clock cycle.
//
// Software controls the log by writing command codes to its register:
//   0 disable, 1 enable, 2 clear, 3 auto clear off, 4 auto clear on, 5 linear mode,
//   6 FIFO mode, 7 next reads return log memory, 8 next reads return the status word.
// Status word: b0 enable, b1 auto clear, b2 overflow, b10..b3 fill amount in words.
// Linear mode fills the memory once; when it is full logging stops (enable drops) and a
// further event sets overflow. FIFO mode overwrites the oldest event and sets overflow.
// Reads in memory mode return the log word at the read pointer, oldest first, and advance
// the pointer; past the fill amount they return zero. With auto clear on, the read of the
// last filled word clears the log in the same cycle, and an event arriving in that cycle is
// kept as the first entry of the emptied log, so nothing is lost between reading and clearing.
// The read pointer can be loaded from outside (the owner's "log register pointer").
//
// With PERIOD > 0 the same register is a periodic log instead: no timestamps are stored, and
// at the end of every interval of PERIOD clocks (counted while enabled) one entry is written:
// the number of cycles ev_valid was high during the interval, followed by ev_data as it is in
// the last cycle of the interval. The entry index gives the time. Commands, modes, status and
// read-out are the same. The content of a periodic entry is this design's choice.
//
// Command codes, status layout, the two modes, auto clear and the two log types (event based
// and periodic) follow the specification. The behaviour at a full linear log, the reset state (disabled, linear, status reads) and the
// pointer load are this design's choices.
//
// Timing: commands and reads act at the clock edge ending the strobe; rdata is registered and
// valid the cycle after the read strobe.
// Status bits 31:11 are unused by the status layout and are constant zero.
module event_log
  import iir_pkg::*;
#(
  parameter int unsigned LOG_WORDS   = 128,
  parameter int unsigned EVENT_WORDS = 2,
  parameter int unsigned PERIOD      = 0,
  localparam int unsigned DATA_W     = 32 * (EVENT_WORDS - 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [31:0]       timestamp,
  input  logic              ev_valid,
  input  logic [DATA_W-1:0] ev_data,
  input  logic              reg_rd,
  input  logic              reg_wr,
  input  logic [31:0]       reg_wdata,
  output logic [31:0]       reg_rdata,
  input  logic              ptr_load,
  input  logic [7:0]        ptr_value,
  output log_status_t       status
);

  localparam int unsigned ENTRIES = LOG_WORDS / EVENT_WORDS;
  localparam int unsigned IDX_W   = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  localparam int unsigned CNT_W   = $clog2(ENTRIES + 1);

  logic [32*EVENT_WORDS-1:0] mem [ENTRIES];

  logic             enable_q, autoclr_q, fifo_q, ovf_q, rdmem_q;
  logic [IDX_W-1:0] wr_idx;
  logic [CNT_W-1:0] count;
  logic [7:0]       rd_ptr;

  logic [7:0]  fill_words;
  logic        full;
  logic        cmd_clear, auto_clear, do_clear, mem_rd;
  logic        ev_store;
  logic [IDX_W-1:0] store_idx, rd_entry;
  logic [31:0] rd_word_sel;
  logic        ev_in;
  logic [31:0] first_word;

  // ---- what is stored: events with their timestamp, or one entry per period
  if (PERIOD == 0) begin : g_event
    assign ev_in      = ev_valid;
    assign first_word = timestamp;
  end else begin : g_periodic
    logic [31:0] tick_cnt, busy_cnt;
    logic        tick;
    assign tick       = enable_q && tick_cnt == PERIOD - 1;
    assign ev_in      = tick;
    assign first_word = busy_cnt + 32'(ev_valid);
    always_ff @(posedge clk) begin
      if (rst || !enable_q || tick) begin
        tick_cnt <= '0;
        busy_cnt <= '0;
      end else begin
        tick_cnt <= tick_cnt + 1'b1;
        busy_cnt <= busy_cnt + 32'(ev_valid);
      end
    end
  end

  assign fill_words = 8'(count * EVENT_WORDS);
  assign full       = (32'(count) == ENTRIES);

  assign cmd_clear  = reg_wr && reg_wdata[3:0] == LOG_CLEAR && reg_wdata[31:4] == '0;
  assign mem_rd     = reg_rd && rdmem_q && rd_ptr < fill_words;
  assign auto_clear = mem_rd && autoclr_q && (rd_ptr + 8'd1 == fill_words);
  assign do_clear   = cmd_clear || auto_clear;

  // an event is stored while enabled, unless a linear log is already full
  assign ev_store  = ev_in && enable_q && (do_clear || !full || fifo_q);
  assign store_idx = do_clear ? '0 : wr_idx;

  // word rd_ptr of the log, counted from the oldest entry
  always_comb begin
    logic [IDX_W-1:0] oldest;
    oldest      = (fifo_q && full) ? wr_idx : '0;
    rd_entry    = IDX_W'((32'(oldest) + 32'(rd_ptr) / EVENT_WORDS) % ENTRIES);
    rd_word_sel = 32'(rd_ptr) % EVENT_WORDS;
  end

  always_ff @(posedge clk) begin
    if (ev_store) mem[store_idx] <= {ev_data, first_word};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      enable_q  <= 1'b0;
      autoclr_q <= 1'b0;
      fifo_q    <= 1'b0;
      ovf_q     <= 1'b0;
      rdmem_q   <= 1'b0;
      wr_idx    <= '0;
      count     <= '0;
      rd_ptr    <= '0;
      reg_rdata <= '0;
    end else begin
      // ---- register reads
      if (reg_rd) begin
        if (!rdmem_q)    reg_rdata <= 32'(status);
        else if (mem_rd) reg_rdata <= mem[rd_entry][32*rd_word_sel +: 32];
        else             reg_rdata <= '0;
        if (mem_rd) rd_ptr <= rd_ptr + 8'd1;
      end

      // ---- commands
      if (reg_wr && reg_wdata[31:4] == '0) begin
        unique case (reg_wdata[3:0])
          LOG_DISABLE:     enable_q  <= 1'b0;
          LOG_ENABLE:      enable_q  <= 1'b1;
          LOG_AUTOCLR_OFF: autoclr_q <= 1'b0;
          LOG_AUTOCLR_ON:  autoclr_q <= 1'b1;
          LOG_MODE_LINEAR: fifo_q    <= 1'b0;
          LOG_MODE_FIFO:   fifo_q    <= 1'b1;
          LOG_READ_MEM:    begin rdmem_q <= 1'b1; rd_ptr <= '0; end
          LOG_READ_STATUS: rdmem_q   <= 1'b0;
          default: ;
        endcase
      end
      if (ptr_load) rd_ptr <= ptr_value;

      // ---- event storage
      if (do_clear) begin
        ovf_q  <= 1'b0;
        rd_ptr <= '0;
        wr_idx <= ev_store ? IDX_W'(1 % ENTRIES) : '0;
        count  <= ev_store ? CNT_W'(1) : '0;
      end else if (ev_in && enable_q) begin
        if (!full) begin
          wr_idx <= (32'(wr_idx) == ENTRIES - 1) ? '0 : wr_idx + 1'b1;
          count  <= count + 1'b1;
        end else if (fifo_q) begin
          wr_idx <= (32'(wr_idx) == ENTRIES - 1) ? '0 : wr_idx + 1'b1;
          ovf_q  <= 1'b1;
        end else begin
          ovf_q    <= 1'b1;
          enable_q <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    status           = '0;
    status.enable    = enable_q;
    status.autoclear = autoclr_q;
    status.overflow  = ovf_q;
    status.fill      = fill_words;
  end

endmodule
