// iir_pkg: constants and types shared by the IP information register (IIR) blocks.
//
// An IIR block is a small register window added next to an IP block's own registers. Every
// window starts with the same general registers (offsets below), followed by block-specific
// optional registers. All registers are 32-bit words and offsets count words.
//
// Strings (the IIR1 header, VLNV strings) are packed little-endian: the first character sits
// in bits 7:0 of a word, which is how a little-endian 32-bit CPU sees them in memory. The byte
// order is this design's choice; the register layout, the header text and the VLNV contents
// follow the register tables of the specification.
//
// The register bus is a simple Avalon-style slave: address, read, write, writedata in one
// cycle, readdata one cycle later, no wait states.
package iir_pkg;

  // ---------------------------------------------------------------- general register offsets
  localparam int unsigned OFS_HEADER   = 'h00;  // alternating "IIR1" / "1RII"
  localparam int unsigned OFS_TYPE     = 'h01;  // b0 external, b1 parent has registers, b2 reset usable
  localparam int unsigned OFS_IPPTR    = 'h02;  // offset (internal) or address (external) of IP registers
  localparam int unsigned OFS_IPRESET  = 'h03;  // active-high IP reset, R/W
  localparam int unsigned OFS_INSTANCE = 'h04;  // instance number
  localparam int unsigned OFS_MUTEX    = 'h05;  // multi-master mutex
  localparam int unsigned OFS_VLNV     = 'h06;  // first VLNV word

  // "IIR1" read as a little-endian word, and the same bytes reversed ("1RII")
  localparam logic [31:0] HDR_IIR1 = {"1", "R", "I", "I"};
  localparam logic [31:0] HDR_1RII = {"I", "I", "R", "1"};

  // IIR type bits
  localparam int unsigned TYPE_EXTERNAL = 0;
  localparam int unsigned TYPE_HAS_REGS = 1;
  localparam int unsigned TYPE_RESET    = 2;

  // ---------------------------------------------------------------- log register commands
  typedef enum logic [3:0] {
    LOG_DISABLE     = 4'h0,
    LOG_ENABLE      = 4'h1,
    LOG_CLEAR       = 4'h2,
    LOG_AUTOCLR_OFF = 4'h3,
    LOG_AUTOCLR_ON  = 4'h4,
    LOG_MODE_LINEAR = 4'h5,
    LOG_MODE_FIFO   = 4'h6,
    LOG_READ_MEM    = 4'h7,
    LOG_READ_STATUS = 4'h8
  } log_cmd_e;

  // log status word: b0 enable, b1 auto clear, b2 overflow, b10..b3 fill amount in words
  typedef struct packed {
    logic [20:0] unused;
    logic [7:0]  fill;
    logic        overflow;
    logic        autoclear;
    logic        enable;
  } log_status_t;

  // ---------------------------------------------------------------- register bus
  typedef struct packed {
    logic [31:0] address;    // word address (byte address >> 2 on the decoder's master side)
    logic        read;
    logic        write;
    logic [31:0] writedata;
  } reg_req_t;

  // ---------------------------------------------------------------- shared SRAM log words
  // frame start event: b31 = 1, b21..2 frame number, b1 cpu active, b0 gpu active
  typedef struct packed {
    logic        frame_begin;
    logic [8:0]  unused;
    logic [19:0] frame;
    logic        cpu_active;
    logic        gpu_active;
  } sram_ev_frame_t;

  // intra frame event: b31 = 0, b23..13 screen x, b12..11 x sub-cycle, b10..2 fill y
  typedef struct packed {
    logic        frame_begin;
    logic [6:0]  unused;
    logic [10:0] screen_x;
    logic [1:0]  x_cycle;
    logic [8:0]  fill_y;
    logic        cpu_active;
    logic        gpu_active;
  } sram_ev_line_t;

  // ---------------------------------------------------------------- VLNV strings
  // vendor, library, name and version, each followed by a NUL byte
  localparam int unsigned MON_VLNV_BYTES = 28;
  localparam logic [8*MON_VLNV_BYTES-1:0] MON_VLNV =
      {"TUT", 8'h00, "TUT", 8'h00, "Nios II monitor", 8'h00, "0.2", 8'h00};

  localparam int unsigned SRAM_VLNV_BYTES = 34;
  localparam logic [8*SRAM_VLNV_BYTES-1:0] SRAM_VLNV =
      {"liHard", 8'h00, "storage", 8'h00, "sram_2x_access", 8'h00, "0.2", 8'h00};

  localparam int unsigned GPU_VLNV_BYTES = 22;
  localparam logic [8*GPU_VLNV_BYTES-1:0] GPU_VLNV =
      {"liHard", 8'h00, "gfx", 8'h00, "xd_gpu", 8'h00, "0.2", 8'h00};

  localparam int unsigned SYS_VLNV_BYTES = 23;
  localparam logic [8*SYS_VLNV_BYTES-1:0] SYS_VLNV =
      {"liHard", 8'h00, "iir", 8'h00, "sys_iir", 8'h00, "1.0", 8'h00};

  localparam int unsigned SYS_EXT_BYTES = 23;
  localparam logic [8*SYS_EXT_BYTES-1:0] SYS_EXT = {"iir_xd_test-11.02.2012", 8'h00};

  // byte k (0 = first character) of a packed string of n bytes
  function automatic logic [7:0] str_byte(input logic [8*64-1:0] s, input int unsigned n,
                                          input int unsigned k);
    return (k < n) ? s[8*(n-1-k) +: 8] : 8'h00;
  endfunction

  // 32-bit little-endian word w of a packed string of n bytes
  function automatic logic [31:0] str_word(input logic [8*64-1:0] s, input int unsigned n,
                                           input int unsigned w);
    return {str_byte(s, n, 4*w+3), str_byte(s, n, 4*w+2), str_byte(s, n, 4*w+1), str_byte(s, n, 4*w)};
  endfunction

endpackage
