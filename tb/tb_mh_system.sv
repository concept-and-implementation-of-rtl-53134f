// tb_mh_system: end-to-end test of the whole Message Handler system at its
// default size (64 buffers, 4096-bit Message RAM, 32-bit words, depth-2
// buffers).
//
// The test plays the host CPU on the FPU's pins and the FlexRay protocol
// controller on the transient-buffer pins, and keeps a model of every
// buffer's payload. Payloads written from one side are read back from the
// other. Each mechanism of the design is made to happen and counted; a
// mechanism that never happened counts as a failure:
//   clamp        buffer count below the minimum (5 -> 32) and above the
//                maximum (100 -> 64), seen through which frame IDs are valid
//   default conf DEFAULT_CONF gives 56 buffers of 72 bits
//   stall        the host is held off because the Input Buffer is full
//   overflow     the host sends more words than the payload length: error
//   pause        PAUSE/CONTINUE; protocol requests wait while paused
//   lock wait    one side waits for a buffer the other side holds
//   null frame   a protocol request for a buffer that does not exist
//   reset        the host's RESET command clears the MH side
module tb_mh_system;
  import mh_pkg::*;

  localparam int unsigned NB   = 64;
  localparam int unsigned W    = 32;
  localparam int unsigned IDXW = 6;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- DUT at default parameters
  logic [IDXW-1:0] index_in;
  host_cmd_e       control_host_in;
  logic [W-1:0]    data_host_in, data_host_out;
  logic            read_en_host_out, write_en_host_out, msg_complete_host_out, error_host_out;
  prt_cmd_e        control_prt_in;
  header_t         header_prt_in;
  logic [W-1:0]    data_prt_in, data_prt_out;
  logic            write_en_prt_in, full_tbf_out, empty_tbf_out, pop_prt_in;
  logic            prt_busy_out, prt_done_out, null_frame_prt_out, configured_out;
  logic [NB-1:0]   message_status_out;

  mh_system dut (
    .clk, .rst_n,
    .index_in, .control_host_in, .data_host_in, .data_host_out,
    .read_en_host_out, .write_en_host_out, .msg_complete_host_out, .error_host_out,
    .control_prt_in, .header_prt_in, .data_prt_in, .write_en_prt_in, .full_tbf_out,
    .data_prt_out, .empty_tbf_out, .pop_prt_in, .prt_busy_out, .prt_done_out,
    .null_frame_prt_out, .configured_out, .message_status_out);

  // ---------------- protocol-side word feeder and collector
  logic [W-1:0] ti_q[$], to_got[$];
  bit           ti_hold = 0;
  always @(negedge clk) begin
    write_en_prt_in = 1'b0;
    #1;
    if (!ti_hold && ti_q.size() > 0 && !full_tbf_out) begin
      data_prt_in = ti_q.pop_front();
      write_en_prt_in = 1'b1;
    end
  end
  always @(negedge clk) pop_prt_in = !empty_tbf_out && ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (pop_prt_in) to_got.push_back(data_prt_out);

  // Watchdog
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- model and counters
  int unsigned  m_len [NB];
  logic [W-1:0] m_data [NB][$];
  int unsigned  m_amount;
  int n_clamp = 0, n_default = 0, n_stall = 0, n_overflow = 0, n_pause = 0;
  int n_lock_wait = 0, n_null = 0, n_reset = 0, n_host_wr = 0, n_host_rd = 0;
  int n_prt_wr = 0, n_prt_rd = 0;

  function automatic int unsigned words_of(int unsigned bits);
    return (bits + W - 1) / W;
  endfunction

  function automatic logic [W-1:0] masked(int b, int w, logic [W-1:0] d);
    int unsigned rest = m_len[b] - w * W;
    if (rest >= W) return d;
    return d & ((W'(1) << rest) - 1);
  endfunction

  task automatic model_layout(int unsigned amount, int unsigned lens[$]);
    m_amount = amount;
    for (int i = 0; i < int'(NB); i++) begin
      m_len[i] = (i < int'(amount)) ? lens[i] : 0;
      m_data[i].delete();
      for (int w = 0; w < int'(words_of(m_len[i])); w++) m_data[i].push_back('0);
    end
  endtask

  task automatic settle();
    repeat (8) @(posedge clk);
    #1;
  endtask

  // ---------------- host side
  task automatic host_conf(int unsigned count, int unsigned n, int unsigned lens[$]);
    int t = 0;
    @(negedge clk) control_host_in = HOST_CONF;
    @(negedge clk) control_host_in = HOST_IDLE; data_host_in = count;
    for (int i = 0; i < int'(n); i++) begin
      @(negedge clk) data_host_in = lens[i];
    end
    @(negedge clk) data_host_in = '0;
    while (!msg_complete_host_out && t < 10) begin @(posedge clk); #1; t++; end
    check(msg_complete_host_out, "configuration complete");
    t = 0;
    while (!configured_out && t < 50) begin @(posedge clk); #1; t++; end
    check(configured_out, "MH configured");
    model_layout(n, lens);
    if (n != count) n_clamp++;
  endtask

  task automatic host_write(int b, bit overflow);
    logic [W-1:0] w[$];
    int hp = 0, cycles = 0;
    int n = words_of(m_len[b]);
    for (int i = 0; i < n; i++) w.push_back($urandom | 1);
    @(negedge clk) control_host_in = HOST_WR; index_in = IDXW'(b); data_host_in = w[0];
    @(negedge clk) control_host_in = HOST_IDLE;
    while (!msg_complete_host_out && cycles < 3000) begin
      @(posedge clk); #1;
      cycles++;
      if (!write_en_host_out && !msg_complete_host_out && cycles > 1) n_stall++;
      @(negedge clk);
      if (write_en_host_out) hp++;
      data_host_in = (hp < n) ? w[hp] : (overflow ? 32'hFFFF_0000 : '0);
    end
    check(msg_complete_host_out, $sformatf("host write %0d complete", b));
    check(hp == n, $sformatf("host write %0d: %0d words taken", b, n));
    check(error_host_out == overflow, overflow ? "overflow error" : "no error");
    if (overflow && error_host_out) n_overflow++;
    data_host_in = '0;
    foreach (w[i]) m_data[b][i] = masked(b, i, w[i]);
    n_host_wr++;
  endtask

  task automatic host_read(int b, output int cycles);
    logic [W-1:0] got[$];
    int n = words_of(m_len[b]);
    cycles = 0;
    @(negedge clk) control_host_in = HOST_RD; index_in = IDXW'(b);
    @(negedge clk) control_host_in = HOST_IDLE;
    while (!msg_complete_host_out && cycles < 3000) begin
      @(posedge clk); #1;
      cycles++;
      if (read_en_host_out) got.push_back(data_host_out);
    end
    check(got.size() == n, $sformatf("host read %0d: %0d of %0d words", b, got.size(), n));
    for (int i = 0; i < n && i < got.size(); i++)
      check(got[i] == m_data[b][i], $sformatf("host read %0d word %0d", b, i));
    n_host_rd++;
  endtask

  // ---------------- protocol side
  task automatic prt_request(prt_cmd_e c, int frame_id, output bit started);
    int t = 0;
    @(negedge clk) control_prt_in = c;
    header_prt_in.frame_id = FRAME_ID_W'(frame_id);
    header_prt_in.cycle_count = CYCLE_W'($urandom);
    started = 0;
    while (t < 3000) begin
      @(posedge clk); #1; t++;
      if (prt_busy_out) begin started = 1; break; end
      if (null_frame_prt_out) begin n_null++; break; end
    end
    @(negedge clk) control_prt_in = PRT_IDLE;
  endtask

  task automatic prt_write(int b);
    bit s;
    int t = 0;
    logic [W-1:0] w[$];
    for (int i = 0; i < int'(words_of(m_len[b])); i++) w.push_back($urandom);
    foreach (w[i]) ti_q.push_back(w[i]);
    prt_request(PRT_WR, b + 1, s);
    check(s, $sformatf("protocol write of frame %0d", b + 1));
    while (prt_busy_out && t < 3000) begin @(posedge clk); #1; t++; end
    foreach (w[i]) m_data[b][i] = masked(b, i, w[i]);
    n_prt_wr++;
  endtask

  task automatic prt_read(int b);
    bit s;
    int t = 0;
    int n = words_of(m_len[b]);
    to_got.delete();
    prt_request(PRT_RD, b + 1, s);
    check(s, $sformatf("protocol read of frame %0d", b + 1));
    while (to_got.size() < n && t < 3000) begin @(posedge clk); #1; t++; end
    check(to_got.size() == n, $sformatf("protocol read %0d: %0d words", b, n));
    for (int i = 0; i < n && i < to_got.size(); i++)
      check(to_got[i] == m_data[b][i], $sformatf("protocol read %0d word %0d", b, i));
    n_prt_rd++;
    settle();
  endtask

  task automatic expect_null(int frame_id);
    bit s;
    int null_before = n_null;
    prt_request(PRT_RD, frame_id, s);
    check(!s && n_null == null_before + 1, $sformatf("frame %0d gives a null frame", frame_id));
  endtask

  task automatic host_reset_cmd();
    @(negedge clk) control_host_in = HOST_RESET;
    @(negedge clk) control_host_in = HOST_IDLE;
    #1;
    check(!configured_out && message_status_out == '0 && !prt_busy_out,
          "RESET command clears the MH side");
    n_reset++;
  endtask

  initial begin
    int unsigned lens[$];
    int cyc;
    bit s;
    index_in = '0; control_host_in = HOST_IDLE; data_host_in = '0;
    control_prt_in = PRT_IDLE; header_prt_in = '0;
    data_prt_in = '0; write_en_prt_in = 1'b0; pop_prt_in = 1'b0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    #1;
    check(!configured_out && message_status_out == '0 && !read_en_host_out &&
          !write_en_host_out && !msg_complete_host_out && !error_host_out &&
          empty_tbf_out && !full_tbf_out, "reset values");

    // Nothing is configured yet: the protocol side gets a null frame.
    expect_null(1);

    // ---- configuration with a count below the minimum: 5 -> 32 buffers
    lens.delete();
    for (int i = 0; i < 32; i++) lens.push_back(32 + 8 * $urandom_range(0, 12));
    lens[6] = 128;   // long enough to fill the Input Buffer
    lens[9] = 96;
    host_conf(5, 32, lens);
    expect_null(33);

    // Host writes, protocol reads; protocol writes, host reads.
    for (int b = 0; b < 32; b += 3) begin host_write(b, 0); settle(); prt_read(b); end
    for (int b = 1; b < 32; b += 3) begin prt_write(b); host_read(b, cyc); settle(); end
    prt_read(31);

    // Overflow: the host keeps driving words after the payload length.
    host_write(4, 1);
    settle();
    prt_read(4);

    // Lock wait: the protocol side holds buffer 6 with no data yet; the host
    // write of buffer 6 fills the Input Buffer and stalls until it is free.
    begin
      int stall_before;
      logic [W-1:0] w[$];
      stall_before = n_stall;
      for (int i = 0; i < int'(words_of(m_len[6])); i++) w.push_back($urandom);
      ti_hold = 1;
      foreach (w[i]) ti_q.push_back(w[i]);
      prt_request(PRT_WR, 7, s);
      check(s, "protocol side holds buffer 6");
      fork
        host_write(6, 0);
        begin
          repeat (12) @(posedge clk);
          #1;
          check(message_status_out[6] && prt_busy_out && !msg_complete_host_out,
                "host write waits for the buffer");
          n_lock_wait++;
          ti_hold = 0;
        end
      join
      check(n_stall > stall_before + 5, "host stalled while the buffer was held");
      settle();
      // The protocol payload went in first, then the host's.
      prt_read(6);
    end

    // Pause in the middle of a host read: the protocol side must wait.
    begin
      @(negedge clk) control_host_in = HOST_RD; index_in = IDXW'(9);
      @(negedge clk) control_host_in = HOST_PAUSE;
      @(negedge clk) control_host_in = HOST_IDLE;
      control_prt_in = PRT_RD; header_prt_in.frame_id = 11'd10;
      repeat (10) @(posedge clk);
      #1 check(!prt_busy_out && message_status_out == '0, "protocol request waits while paused");
      @(negedge clk) control_host_in = HOST_CONTINUE;
      @(negedge clk) control_host_in = HOST_IDLE;
      to_got.delete();
      for (int t = 0; t < 20 && !prt_busy_out; t++) begin @(posedge clk); #1; end
      check(prt_busy_out, "protocol request served after CONTINUE");
      @(negedge clk) control_prt_in = PRT_IDLE;
      for (int t = 0; t < 200 && to_got.size() < words_of(m_len[9]); t++) @(posedge clk);
      #1;
      check(to_got.size() == words_of(m_len[9]), "protocol read after CONTINUE");
      for (int i = 0; i < to_got.size(); i++)
        check(to_got[i] == m_data[9][i], "protocol read after CONTINUE data");
      n_pause++;
      settle();
      // The host side works again after the pause.
      host_read(9, cyc);
      settle();
    end

    // Null frames.
    expect_null(0);
    expect_null(40);

    // ---- RESET command, then default configuration
    host_reset_cmd();
    expect_null(1);
    @(negedge clk) control_host_in = HOST_DEFAULT_CONF;
    @(negedge clk) control_host_in = HOST_IDLE;
    cyc = 0;
    while (!msg_complete_host_out && cyc < 100) begin @(posedge clk); #1; cyc++; end
    check(msg_complete_host_out, "default configuration complete");
    for (int t = 0; t < 20 && !configured_out; t++) begin @(posedge clk); #1; end
    check(configured_out, "MH configured by default configuration");
    lens.delete();
    for (int i = 0; i < 56; i++) lens.push_back(72);
    model_layout(56, lens);
    n_default++;
    check(56 * 72 <= 4096, "default layout fits the RAM");
    host_write(55, 0); settle(); prt_read(55);
    host_write(0, 0); settle(); prt_read(0);
    prt_write(30); host_read(30, cyc); settle();
    expect_null(57);

    // ---- external reset, then a count above the maximum: 100 -> 64
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    lens.delete();
    for (int i = 0; i < 64; i++) lens.push_back(64);
    host_conf(100, 64, lens);
    prt_write(63); host_read(63, cyc); settle();
    host_write(62, 0); settle(); prt_read(62);
    expect_null(65);

    // Every mechanism must have happened.
    check(n_stall > 0,     "mechanism: IB-full stall");
    check(n_overflow > 0,  "mechanism: overflow error");
    check(n_pause > 0,     "mechanism: pause/continue");
    check(n_lock_wait > 0, "mechanism: lock wait");
    check(n_null > 0,      "mechanism: null frame");
    check(n_clamp >= 2,    "mechanism: clamp (minimum and maximum)");
    check(n_default > 0,   "mechanism: default configuration");
    check(n_reset > 0,     "mechanism: RESET command");
    $display("stall=%0d overflow=%0d pause=%0d lock_wait=%0d null=%0d clamp=%0d default=%0d reset=%0d",
             n_stall, n_overflow, n_pause, n_lock_wait, n_null, n_clamp, n_default, n_reset);
    $display("host_wr=%0d host_rd=%0d prt_wr=%0d prt_rd=%0d",
             n_host_wr, n_host_rd, n_prt_wr, n_prt_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
