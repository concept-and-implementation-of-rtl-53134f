// tb_message_handler: self-checking test of the Message Handler (with its
// Message RAM and access engines inside).
//
// The four buffers around the MH are real buffer_fifo instances (IB, OB,
// TBF IN, TBF OUT). The test plays the FPU (one-cycle commands, words pushed
// into the IB, words taken from the OB) and the protocol controller (requests
// with a header held until busy or null frame, words into TBF IN, words out of
// TBF OUT). A model keeps the expected payload of every buffer. Covered:
// requests before configuration, configuration, host and protocol writes and
// reads in both directions, a host request queued behind a running one, the
// host waiting on a buffer the protocol side holds, null frames, pause and
// continue (access aborted, IB drained, protocol requests held back), a
// reconfiguration of all 64 buffers, a read stalled by a full OB and a reset
// in the middle of an access.
module tb_message_handler;
  import mh_pkg::*;

  localparam int unsigned NB   = 64;
  localparam int unsigned RB   = 4096;
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

  // ---------------- DUT and buffers
  mh_cmd_e         fpu_cmd;
  logic [IDXW-1:0] fpu_idx;
  logic [W-1:0]    ib_din, ib_dout, ob_din, ob_dout;
  logic            ib_wr, ib_pop, ib_empty, ib_full;
  logic            ob_wr, ob_pop, ob_empty, ob_full;
  prt_cmd_e        prt_cmd;
  header_t         header;
  logic [W-1:0]    ti_din, ti_dout, to_din, to_dout;
  logic            ti_wr, ti_pop, ti_empty, ti_full;
  logic            to_wr, to_pop, to_empty, to_full;
  logic            prt_busy, prt_done, null_frame, configured;
  logic [NB-1:0]   status;

  buffer_fifo #(.DATA_W(W), .DEPTH(2), .FULL_AHEAD(1'b1)) u_ib (
    .clk, .rst_n, .data_in(ib_din), .read_en(ib_wr), .pop(ib_pop),
    .data_out(ib_dout), .empty(ib_empty), .full(ib_full));
  buffer_fifo #(.DATA_W(W), .DEPTH(2), .FULL_AHEAD(1'b0)) u_ob (
    .clk, .rst_n, .data_in(ob_din), .read_en(ob_wr), .pop(ob_pop),
    .data_out(ob_dout), .empty(ob_empty), .full(ob_full));
  buffer_fifo #(.DATA_W(W), .DEPTH(2), .FULL_AHEAD(1'b1)) u_ti (
    .clk, .rst_n, .data_in(ti_din), .read_en(ti_wr), .pop(ti_pop),
    .data_out(ti_dout), .empty(ti_empty), .full(ti_full));
  buffer_fifo #(.DATA_W(W), .DEPTH(2), .FULL_AHEAD(1'b0)) u_to (
    .clk, .rst_n, .data_in(to_din), .read_en(to_wr), .pop(to_pop),
    .data_out(to_dout), .empty(to_empty), .full(to_full));

  message_handler #(.NUM_BUFFERS(NB), .RAM_BITS(RB), .DATA_W(W)) dut (
    .clk, .rst_n,
    .control_fpu_in(fpu_cmd), .index_fpu_in(fpu_idx),
    .data_ib_in(ib_dout), .empty_ib_in(ib_empty), .pop_ib_out(ib_pop),
    .data_ob_out(ob_din), .enable_read_ob_out(ob_wr), .full_ob_in(ob_full),
    .control_prt_in(prt_cmd), .header_prt_in(header),
    .data_tbf_in(ti_dout), .empty_tbf_in(ti_empty), .pop_tbf_out(ti_pop),
    .data_tbf_out(to_din), .enable_read_tbf_out(to_wr), .full_tbf_in(to_full),
    .prt_busy_out(prt_busy), .prt_done_out(prt_done), .null_frame_prt_out(null_frame),
    .configured_out(configured), .message_status_out(status));

  // ---------------- word feeders and collectors (run in the background)
  logic [W-1:0] ib_q[$], ti_q[$];     // words still to push
  logic [W-1:0] ob_got[$], to_got[$]; // words taken out
  bit           ob_take = 1, to_take = 1;
  bit           ib_hold = 0, ti_hold = 0;
  int           ob_stalls = 0;

  // Producers drive at the falling edge from the flags seen there; the
  // look-ahead full flag covers the word they are writing in this cycle.
  always @(negedge clk) begin
    ib_wr = 1'b0; ti_wr = 1'b0;
    #1;
    if (!ib_hold && ib_q.size() > 0 && !ib_full) begin
      ib_din = ib_q.pop_front(); ib_wr = 1'b1;
    end
    if (!ti_hold && ti_q.size() > 0 && !ti_full) begin
      ti_din = ti_q.pop_front(); ti_wr = 1'b1;
    end
  end
  // Consumers pop at random.
  always @(negedge clk) begin
    ob_pop = ob_take && !ob_empty && ($urandom_range(0, 3) != 0);
    to_pop = to_take && !to_empty && ($urandom_range(0, 3) != 0);
    if (ob_full) ob_stalls++;
  end
  always @(posedge clk) begin
    if (ob_pop) ob_got.push_back(ob_dout);
    if (to_pop) to_got.push_back(to_dout);
  end

  // Watchdog
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- model
  int unsigned m_len [NB];
  logic [W-1:0] m_data [NB][$];
  int unsigned m_amount;

  function automatic int unsigned words_of(int unsigned bits);
    return (bits + W - 1) / W;
  endfunction

  function automatic logic [W-1:0] masked(int b, int w, logic [W-1:0] d);
    int unsigned rest = m_len[b] - w * W;
    if (rest >= W) return d;
    return d & ((W'(1) << rest) - 1);
  endfunction

  int lock_waits = 0, null_frames = 0, pauses = 0, queued = 0;

  task automatic wait_cycles(int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic send_cmd(mh_cmd_e c, int idx);
    @(negedge clk) fpu_cmd = c; fpu_idx = IDXW'(idx);
    @(negedge clk) fpu_cmd = MH_IDLE; fpu_idx = '0;
  endtask

  task automatic wait_free(int b, string what);
    int t = 0;
    // Busy flag first rises (after the lock) and then falls.
    while (status[b] == 1'b0 && t < 50) begin @(posedge clk); #1; t++; end
    while (status[b] == 1'b1 && t < 2000) begin @(posedge clk); #1; t++; end
    check(t < 2000, {what, ": access finished"});
  endtask

  task automatic configure(int unsigned count, int unsigned lens[$]);
    int t = 0;
    send_cmd(MH_CONF, 0);
    ib_q.push_back(count);
    foreach (lens[i]) ib_q.push_back(lens[i]);
    while (!configured && t < 1000) begin @(posedge clk); #1; t++; end
    check(configured, "configured after the length words");
    m_amount = (count > NB) ? NB : count;
    for (int i = 0; i < int'(NB); i++) begin
      m_len[i] = (i < lens.size()) ? lens[i] : 0;
      m_data[i].delete();
      for (int w = 0; w < int'(words_of(m_len[i])); w++) m_data[i].push_back('0);
    end
    check(ib_empty && ib_q.size() == 0, "IB empty after configuration");
  endtask

  task automatic host_write(int b);
    logic [W-1:0] w[$];
    for (int i = 0; i < int'(words_of(m_len[b])); i++) w.push_back($urandom);
    send_cmd(MH_WR, b);
    foreach (w[i]) ib_q.push_back(w[i]);
    wait_free(b, $sformatf("host write %0d", b));
    foreach (w[i]) m_data[b][i] = masked(b, i, w[i]);
  endtask

  task automatic host_read(int b);
    int t = 0;
    int n = words_of(m_len[b]);
    ob_got.delete();
    send_cmd(MH_RD, b);
    while (ob_got.size() < n && t < 2000) begin @(posedge clk); #1; t++; end
    check(ob_got.size() == n, $sformatf("host read %0d: %0d words", b, n));
    for (int i = 0; i < n && i < ob_got.size(); i++)
      check(ob_got[i] == m_data[b][i], $sformatf("host read %0d word %0d", b, i));
    wait_cycles(3);
  endtask

  // Protocol request held until busy or null frame; returns 1 if started.
  task automatic prt_request(prt_cmd_e c, int frame_id, output bit started);
    int t = 0;
    @(negedge clk) prt_cmd = c; header.frame_id = FRAME_ID_W'(frame_id);
    header.cycle_count = CYCLE_W'($urandom);
    started = 0;
    while (t < 200) begin
      @(posedge clk); #1; t++;
      if (prt_busy) begin started = 1; break; end
      if (null_frame) break;
    end
    @(negedge clk) prt_cmd = PRT_IDLE;
  endtask

  task automatic prt_write(int b);
    bit s;
    int t = 0;
    logic [W-1:0] w[$];
    for (int i = 0; i < int'(words_of(m_len[b])); i++) w.push_back($urandom);
    foreach (w[i]) ti_q.push_back(w[i]);
    prt_request(PRT_WR, b + 1, s);
    check(s, $sformatf("protocol write %0d started", b));
    while (prt_busy && t < 2000) begin @(posedge clk); #1; t++; end
    check(!prt_busy, "protocol write finished");
    foreach (w[i]) m_data[b][i] = masked(b, i, w[i]);
  endtask

  task automatic prt_read(int b);
    bit s;
    int t = 0;
    int n = words_of(m_len[b]);
    to_got.delete();
    prt_request(PRT_RD, b + 1, s);
    check(s, $sformatf("protocol read %0d started", b));
    while (to_got.size() < n && t < 2000) begin @(posedge clk); #1; t++; end
    check(to_got.size() == n, $sformatf("protocol read %0d: %0d words", b, n));
    for (int i = 0; i < n && i < to_got.size(); i++)
      check(to_got[i] == m_data[b][i], $sformatf("protocol read %0d word %0d", b, i));
    wait_cycles(3);
  endtask

  initial begin
    int unsigned lens[$];
    bit s;
    fpu_cmd = MH_IDLE; fpu_idx = '0;
    prt_cmd = PRT_IDLE; header = '0;
    ib_din = '0; ib_wr = 0; ti_din = '0; ti_wr = 0; ob_pop = 0; to_pop = 0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    #1;
    check(!configured && status == '0 && !prt_busy && !null_frame, "reset values");

    // Protocol request before configuration: null frame.
    prt_request(PRT_RD, 1, s);
    check(!s && null_frame, "request before configuration gives a null frame");
    null_frames++;

    // Configure 8 buffers of assorted lengths.
    lens = '{72, 32, 100, 64, 8, 72, 40, 96};
    configure(8, lens);

    // Host write then read, every buffer.
    for (int b = 0; b < 8; b++) host_write(b);
    for (int b = 0; b < 8; b++) host_read(b);
    // Protocol write, host read; host write, protocol read.
    for (int b = 0; b < 8; b += 2) begin prt_write(b); host_read(b); end
    for (int b = 1; b < 8; b += 2) begin host_write(b); prt_read(b); end

    // Two host commands back to back: the read waits behind the write.
    begin
      logic [W-1:0] w[$];
      for (int i = 0; i < 4; i++) w.push_back($urandom);
      ob_got.delete();
      send_cmd(MH_WR, 2);
      foreach (w[i]) ib_q.push_back(w[i]);
      send_cmd(MH_RD, 2);
      queued++;
      foreach (w[i]) m_data[2][i] = masked(2, i, w[i]);
      for (int t = 0; t < 200 && ob_got.size() < 4; t++) @(posedge clk);
      #1 check(ob_got.size() == 4, "queued read delivered");
      for (int i = 0; i < 4 && i < ob_got.size(); i++)
        check(ob_got[i] == m_data[2][i], "queued read sees the write");
      wait_cycles(3);
    end

    // Lock contention: the protocol side holds buffer 5 (no data yet), the
    // host read of buffer 5 must wait for it.
    begin
      logic [W-1:0] w[$];
      for (int i = 0; i < 3; i++) w.push_back($urandom);
      ti_hold = 1;
      foreach (w[i]) ti_q.push_back(w[i]);
      prt_request(PRT_WR, 6, s);
      check(s, "protocol write of buffer 5 started");
      ob_got.delete();
      send_cmd(MH_RD, 5);
      wait_cycles(10); #1;
      check(status[5] && ob_got.size() == 0 && ob_empty, "host waits on a buffer the protocol side holds");
      lock_waits++;
      ti_hold = 0;
      foreach (w[i]) m_data[5][i] = masked(5, i, w[i]);
      for (int t = 0; t < 200 && ob_got.size() < 3; t++) @(posedge clk);
      #1 check(ob_got.size() == 3, "host read after the wait");
      for (int i = 0; i < 3 && i < ob_got.size(); i++)
        check(ob_got[i] == m_data[5][i], "host read after the wait returns the protocol data");
      wait_cycles(3);
    end

    // Null frames: frame ID 0 and a frame ID past the configured buffers.
    prt_request(PRT_WR, 0, s);
    check(!s && null_frame, "frame ID 0 gives a null frame");
    null_frames++;
    @(posedge clk); #1 check(!null_frame, "null frame is one cycle");
    prt_request(PRT_RD, 9, s);
    check(!s && null_frame, "frame ID past the buffers gives a null frame");
    null_frames++;
    check(ti_q.size() == 0 && ti_empty, "nothing taken for a null frame");

    // Pause in the middle of a host write: access aborted, buffer released,
    // IB drained, protocol requests held back until CONTINUE.
    begin
      bit started_in_pause;
      ib_q.push_back(32'h1234_5678);
      send_cmd(MH_WR, 7);
      wait_cycles(4); #1;
      check(status[7], "host write of buffer 7 in progress");
      @(negedge clk) fpu_cmd = MH_PAUSE;
      ib_q.push_back(32'hAAAA_0001);
      ib_q.push_back(32'hAAAA_0002);
      wait_cycles(6); #1;
      check(!status[7], "pause releases the buffer");
      check(ib_empty && ib_q.size() == 0, "pause drains the IB");
      prt_cmd = PRT_RD; header.frame_id = 11'd1;
      wait_cycles(5); #1;
      started_in_pause = prt_busy;
      check(!started_in_pause, "protocol request held back while paused");
      @(negedge clk) fpu_cmd = MH_CONTINUE;
      @(negedge clk) fpu_cmd = MH_IDLE;
      to_got.delete();
      for (int t = 0; t < 20 && !prt_busy; t++) begin @(posedge clk); #1; end
      check(prt_busy, "protocol request served after CONTINUE");
      @(negedge clk) prt_cmd = PRT_IDLE;
      for (int t = 0; t < 200 && to_got.size() < 3; t++) @(posedge clk);
      #1;
      for (int i = 0; i < 3 && i < to_got.size(); i++)
        check(to_got[i] == m_data[0][i], "protocol read after CONTINUE");
      pauses++;
      wait_cycles(3);
      // The first word of the aborted write may have reached the RAM.
      m_data[7][0] = masked(7, 0, 32'h1234_5678);
      host_read(7);
      host_write(7);
      host_read(7);
    end

    // Reconfigure all 64 buffers: 60 of 56 bits and 4 of 128 bits (3872 of
    // 4096 bits), then a read with the OB held full.
    lens.delete();
    for (int i = 0; i < 64; i++) lens.push_back(i < 60 ? 56 : 128);
    configure(64, lens);
    host_read(63);
    check(ob_got.size() == 4 && ob_got[0] == '0 && ob_got[3] == '0,
          "never-written RAM bits read as zero");
    for (int b = 60; b < 64; b++) begin host_write(b); prt_read(b); end
    ob_take = 0;
    ob_got.delete();
    send_cmd(MH_RD, 60);
    wait_cycles(8); #1;
    check(ob_full && status[60], "full OB stalls the read");
    ob_take = 1;
    for (int t = 0; t < 100 && ob_got.size() < 4; t++) @(posedge clk);
    #1 check(ob_got.size() == 4, "read resumes after the OB drains");
    for (int i = 0; i < 4 && i < ob_got.size(); i++)
      check(ob_got[i] == m_data[60][i], "read data after the OB stall");
    wait_cycles(3);
    prt_request(PRT_RD, 65, s);
    check(!s && null_frame, "frame ID 65 gives a null frame");
    null_frames++;

    // Reset in the middle of a protocol write.
    ti_hold = 1;
    ti_q.push_back(32'h5);
    prt_request(PRT_WR, 10, s);
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    ti_hold = 0; ti_q.delete();
    #1 check(!configured && status == '0 && !prt_busy, "reset clears the MH");

    check(lock_waits > 0 && null_frames > 0 && pauses > 0 && queued > 0, "mechanisms exercised");
    $display("lock_waits=%0d null_frames=%0d pauses=%0d queued=%0d ob_full_cycles=%0d",
             lock_waits, null_frames, pauses, queued, ob_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
