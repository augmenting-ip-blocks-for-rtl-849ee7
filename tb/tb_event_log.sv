// tb_event_log: self-checking test of the event log register.
//
// A queue in the testbench models the log (timestamp, data per event) and the expected status
// word is built from its size. Covered: commands, status layout, sequential memory read-out,
// auto clear after a full read (also with an event arriving in the clearing cycle), linear
// mode stopping when full, FIFO mode overwriting the oldest entries, overflow, read pointer
// load and manual clear. Uses the full 128-word log with two-word events.
// A second instance with PERIOD = 7 and a 16-word log checks the periodic log: one entry per
// interval with the number of busy cycles and the last data word, linear mode stopping with
// overflow once the log is full.
module tb_event_log;
  import iir_pkg::*;

  localparam int LOG_WORDS = 128;
  localparam int ENTRIES   = LOG_WORDS / 2;

  logic        clk = 0, rst = 1;
  logic [31:0] timestamp = '0;
  logic        ev_valid = 0;
  logic [31:0] ev_data = '0;
  logic        reg_rd = 0, reg_wr = 0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic        ptr_load = 0;
  logic [7:0]  ptr_value = '0;
  log_status_t status;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) timestamp <= timestamp + 1;

  event_log #(.LOG_WORDS(LOG_WORDS), .EVENT_WORDS(2)) dut (.*);

  // periodic log instance
  localparam int PER = 7, P_ENTRIES = 8;
  logic        p_rd = 0, p_wr = 0;
  logic [31:0] p_wdata = '0, p_rdata;
  log_status_t p_status;
  bit          rnd_on = 0, rec = 0;
  logic [31:0] s_busy[$], s_data[$];

  event_log #(.LOG_WORDS(16), .EVENT_WORDS(2), .PERIOD(PER)) u_per (
    .clk, .rst, .timestamp, .ev_valid, .ev_data, .reg_rd(p_rd), .reg_wr(p_wr),
    .reg_wdata(p_wdata), .reg_rdata(p_rdata), .ptr_load(1'b0), .ptr_value(8'd0),
    .status(p_status));

  always @(posedge clk) begin
    if (rec) begin s_busy.push_back({31'd0, ev_valid}); s_data.push_back(ev_data); end
    if (rnd_on) begin
      ev_valid <= ($urandom % 3) == 0;
      ev_data  <= $urandom;
    end
  end

  task automatic p_cmd(input logic [31:0] c);
    p_wdata = c; p_wr = 1;
    @(posedge clk); #1 p_wr = 0;
  endtask

  task automatic p_read(output logic [31:0] v);
    p_rd = 1;
    @(posedge clk); #1 p_rd = 0;
    v = p_rdata;
  endtask

  // reference: stored events, oldest first
  logic [31:0] q_ts[$], q_data[$];

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] exp_status(input bit en, input bit ac, input bit ovf);
    return {21'd0, 8'(2 * q_ts.size()), ovf, ac, en};
  endfunction

  task automatic cmd(input logic [31:0] c);
    reg_wdata = c; reg_wr = 1;
    @(posedge clk); #1 reg_wr = 0;
  endtask

  task automatic rd(output logic [31:0] v);
    reg_rd = 1;
    @(posedge clk); #1 reg_rd = 0;
    v = reg_rdata;
  endtask

  // one event in the next cycle; the reference records it if store is set
  task automatic event_in(input logic [31:0] d, input bit store, input bit fifo);
    logic [31:0] ts;
    ev_valid = 1; ev_data = d; ts = timestamp;
    @(posedge clk);
    if (store) begin
      if (fifo && q_ts.size() == ENTRIES) begin void'(q_ts.pop_front()); void'(q_data.pop_front()); end
      q_ts.push_back(ts);
      q_data.push_back(d);
    end
    #1 ev_valid = 0;
  endtask

  task automatic read_all(input string tag);
    logic [31:0] v;
    int n = q_ts.size();
    for (int i = 0; i < n; i++) begin
      rd(v); check($sformatf("%s ts %0d", tag, i), v, q_ts[i]);
      rd(v); check($sformatf("%s data %0d", tag, i), v, q_data[i]);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    repeat (3) @(posedge clk); #1 rst = 0;

    rd(v); check("status after reset", v, 32'd0);
    // disabled log ignores events
    event_in(32'h1111, 0, 0);
    rd(v); check("disabled ignores", v, 32'd0);

    // enable, three events
    cmd(LOG_ENABLE);
    event_in(32'hA0, 1, 0); event_in(32'hA1, 1, 0);
    @(posedge clk); #1;
    event_in(32'hA2, 1, 0);
    rd(v); check("status 3 events", v, exp_status(1, 0, 0));
    cmd(LOG_READ_MEM);
    read_all("lin");
    rd(v); check("past fill reads zero", v, 0);
    // pointer load: re-read word 2 (timestamp of event 1)
    ptr_value = 8'd2; ptr_load = 1; @(posedge clk); #1 ptr_load = 0;
    rd(v); check("pointer load", v, q_ts[1]);

    // auto clear after a full read
    cmd(LOG_AUTOCLR_ON);
    cmd(LOG_READ_MEM);
    read_all("ac");
    q_ts.delete(); q_data.delete();
    cmd(LOG_READ_STATUS);
    rd(v); check("auto cleared", v, exp_status(1, 1, 0));

    // auto clear with an event arriving in the clearing cycle: the event is kept
    event_in(32'hB0, 1, 0); event_in(32'hB1, 1, 0);
    cmd(LOG_READ_MEM);
    rd(v); rd(v); rd(v);                 // three of four words
    ev_valid = 1; ev_data = 32'hB2; reg_rd = 1; v = timestamp;
    @(posedge clk);
    q_ts.delete(); q_data.delete(); q_ts.push_back(v); q_data.push_back(32'hB2);
    #1 ev_valid = 0; reg_rd = 0;
    check("last word of full read", reg_rdata, 32'hB1);
    cmd(LOG_READ_STATUS);
    rd(v); check("event kept across auto clear", v, exp_status(1, 1, 0));
    cmd(LOG_AUTOCLR_OFF);
    cmd(LOG_CLEAR);
    q_ts.delete(); q_data.delete();
    rd(v); check("manual clear", v, exp_status(1, 0, 0));

    // linear mode: fill completely, one more event stops the log and sets overflow
    for (int i = 0; i < ENTRIES; i++) event_in(32'hC000 + i, 1, 0);
    rd(v); check("linear full", v, exp_status(1, 0, 0));
    event_in(32'hCFFF, 0, 0);
    rd(v); check("linear overflow stops", v, exp_status(0, 0, 1));
    event_in(32'hCFFE, 0, 0);
    cmd(LOG_READ_MEM);
    read_all("full");
    cmd(LOG_READ_STATUS);
    cmd(LOG_CLEAR);
    q_ts.delete(); q_data.delete();
    rd(v); check("clear resets overflow", v, exp_status(0, 0, 0));

    // FIFO mode: 70 events into 64 entries keep the newest 64
    cmd(LOG_MODE_FIFO);
    cmd(LOG_ENABLE);
    for (int i = 0; i < ENTRIES + 6; i++) event_in(32'hD000 + i, 1, 1);
    rd(v); check("fifo overflow", v, exp_status(1, 0, 1));
    cmd(LOG_DISABLE);
    cmd(LOG_READ_MEM);
    read_all("fifo");

    // periodic log: fills 8 entries of 7 cycles each, then stops with overflow
    rnd_on = 1;
    repeat (3) @(posedge clk); #1;
    p_cmd(LOG_ENABLE);
    rec = 1;
    repeat (PER * (P_ENTRIES + 2)) @(posedge clk); #1;
    rec = 0; rnd_on = 0;
    p_read(v); check("periodic status", v, {21'd0, 8'(2 * P_ENTRIES), 1'b1, 1'b0, 1'b0});
    p_cmd(LOG_READ_MEM);
    for (int k = 0; k < P_ENTRIES; k++) begin
      int busy;
      busy = 0;
      for (int c = 0; c < PER; c++) busy += s_busy[PER * k + c];
      p_read(v); check($sformatf("periodic busy %0d", k), v, busy);
      p_read(v); check($sformatf("periodic data %0d", k), v, s_data[PER * k + PER - 1]);
    end
    p_read(v); check("periodic past end", v, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
