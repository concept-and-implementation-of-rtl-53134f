// tb_message_ram: self-checking test of the Message RAM.
//
// A bit-level reference model holds the RAM contents, the payload length and
// start bit of every buffer and the busy flags. The test configures the RAM
// (default layout 56 x 72 bits, a random layout, and a layout larger than the
// RAM so that the last buffers are cut off), then runs random traffic on both
// ports: lock requests (sometimes both ports on the same buffer in the same
// cycle), word writes and reads inside the held buffer, and unlocks. Grants,
// busy flags, read data, payload lengths and the buffer count are compared
// with the model every cycle.
module tb_message_ram;
  import mh_pkg::*;

  localparam int unsigned NB    = 64;
  localparam int unsigned RB    = 4096;
  localparam int unsigned W     = 32;
  localparam int unsigned IDXW  = $clog2(NB);
  localparam int unsigned LENW  = $clog2(RB) + 1;
  localparam int unsigned WORDW = $clog2(RB / W) + 1;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  ram_cmd_e          ctrl  [2];
  logic [IDXW-1:0]   idx   [2];
  logic [WORDW-1:0]  word  [2];
  logic [W-1:0]      din   [2];
  logic [W-1:0]      dout  [2];
  logic              lreq  [2];
  logic              unl   [2];
  logic              gnt   [2];
  logic [LENW-1:0]   plen  [2];
  ram_conf_t         conf_bits;
  logic [NB-1:0]     status;
  logic [IDXW:0]     nbuf;

  message_ram #(.NUM_BUFFERS(NB), .RAM_BITS(RB), .DATA_W(W)) dut (
    .clk, .rst_n,
    .control_mh_in(ctrl), .index_mh_in(idx), .word_mh_in(word),
    .message_buffer_in(din), .message_buffer_out(dout),
    .conf_bits_mh_in(conf_bits), .lock_req(lreq), .unlock(unl), .lock_gnt(gnt),
    .payload_len_out(plen), .message_status_out(status), .num_buffers_out(nbuf));

  // ---------------- reference model
  bit          m_mem [RB];
  int unsigned m_len [NB];
  int unsigned m_base[NB];
  int unsigned m_next;
  int unsigned m_amount;
  bit          m_busy[NB];

  function automatic logic [W-1:0] m_read(int b, int w);
    logic [W-1:0] r = '0;
    for (int j = 0; j < int'(W); j++) begin
      int unsigned off = w * W + j;
      int unsigned a   = m_base[b] + off;
      if (off < m_len[b] && a < RB) r[j] = m_mem[a];
    end
    return r;
  endfunction

  task automatic m_write(int b, int w, logic [W-1:0] d);
    for (int j = 0; j < int'(W); j++) begin
      int unsigned off = w * W + j;
      int unsigned a   = m_base[b] + off;
      if (off < m_len[b] && a < RB) m_mem[a] = d[j];
    end
  endtask

  // Watchdog
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle_ports();
    for (int p = 0; p < 2; p++) begin
      ctrl[p] = RAM_NONE; idx[p] = '0; word[p] = '0; din[p] = '0;
      lreq[p] = 1'b0; unl[p] = 1'b0;
    end
    conf_bits = '0;
  endtask

  // Configure amount and lengths through port 0, as the MH does.
  task automatic configure(int unsigned amount, int unsigned lens[$]);
    @(negedge clk);
    idle_ports();
    ctrl[0] = RAM_CONF;
    conf_bits.set_amount = 1'b1;
    conf_bits.value = 31'(amount);
    @(posedge clk);
    m_amount = (amount > NB) ? NB : amount;
    m_next = 0;
    for (int i = 0; i < int'(NB); i++) begin m_len[i] = 0; m_base[i] = 0; m_busy[i] = 0; end
    #1 check(nbuf == (IDXW+1)'(m_amount), $sformatf("buffer count %0d", m_amount));
    for (int i = 0; i < lens.size(); i++) begin
      @(negedge clk);
      ctrl[0] = RAM_CONF;
      idx[0] = IDXW'(i);
      conf_bits.set_amount = 1'b0;
      conf_bits.value = 31'(lens[i]);
      @(posedge clk);
      m_len[i] = lens[i];
      m_base[i] = m_next;
      m_next = (m_next + lens[i] > RB) ? RB : m_next + lens[i];
    end
    @(negedge clk);
    idle_ports();
  endtask

  // Random traffic on both ports for n cycles.
  int held [2];
  int lock_conflicts = 0, lock_waits = 0, reads_done = 0, writes_done = 0;
  task automatic traffic(int n);
    held[0] = -1; held[1] = -1;
    for (int c = 0; c < n; c++) begin
      bit          exp_gnt [2];
      bit          rd      [2];
      logic [W-1:0] exp_rd [2];
      @(negedge clk);
      idle_ports();
      for (int p = 0; p < 2; p++) begin
        int r = $urandom_range(0, 9);
        if (held[p] < 0) begin
          lreq[p] = 1'b1;
          idx[p]  = IDXW'($urandom_range(0, m_amount - 1));
        end else if (r == 0) begin
          unl[p] = 1'b1;
          idx[p] = IDXW'(held[p]);
        end else begin
          int nw = (m_len[held[p]] + W - 1) / W + 1;  // includes one word past the end
          idx[p]  = IDXW'(held[p]);
          word[p] = WORDW'($urandom_range(0, nw - 1));
          if (r < 6) begin
            ctrl[p] = RAM_WR;
            din[p]  = $urandom;
          end else begin
            ctrl[p] = RAM_RD;
          end
        end
      end
      // Sometimes both ports ask for the same buffer in the same cycle.
      if (lreq[0] && lreq[1] && $urandom_range(0, 3) == 0) idx[0] = idx[1];
      #1;
      exp_gnt[1] = lreq[1] && !m_busy[idx[1]];
      exp_gnt[0] = lreq[0] && !m_busy[idx[0]] && !(exp_gnt[1] && idx[0] == idx[1]);
      for (int p = 0; p < 2; p++) begin
        check(gnt[p] == exp_gnt[p], $sformatf("port %0d grant", p));
        check(plen[p] == LENW'(m_len[idx[p]]), $sformatf("port %0d payload length", p));
        if (lreq[p] && !exp_gnt[p]) lock_waits++;
      end
      if (lreq[0] && lreq[1] && idx[0] == idx[1] && exp_gnt[1]) lock_conflicts++;
      for (int p = 0; p < 2; p++) begin
        rd[p] = (ctrl[p] == RAM_RD);
        if (rd[p]) exp_rd[p] = m_read(held[p], int'(word[p]));
      end
      @(posedge clk);
      for (int p = 0; p < 2; p++) begin
        if (ctrl[p] == RAM_WR) begin m_write(held[p], int'(word[p]), din[p]); writes_done++; end
        if (unl[p]) begin m_busy[held[p]] = 0; held[p] = -1; end
      end
      for (int p = 0; p < 2; p++)
        if (exp_gnt[p]) begin m_busy[idx[p]] = 1; held[p] = int'(idx[p]); end
      #1;
      for (int p = 0; p < 2; p++)
        if (rd[p]) begin
          check(dout[p] == exp_rd[p], $sformatf("port %0d read data", p));
          reads_done++;
        end
      for (int i = 0; i < int'(NB); i++)
        check(status[i] == m_busy[i], "busy flags");
    end
    // Release what is still held.
    @(negedge clk);
    idle_ports();
    for (int p = 0; p < 2; p++)
      if (held[p] >= 0) begin unl[p] = 1'b1; idx[p] = IDXW'(held[p]); end
    if (held[0] >= 0 && held[1] >= 0) begin
      // one at a time
      unl[0] = 1'b0;
      @(posedge clk); m_busy[held[1]] = 0; held[1] = -1;
      @(negedge clk); idle_ports(); unl[0] = 1'b1; idx[0] = IDXW'(held[0]);
    end
    @(posedge clk);
    for (int p = 0; p < 2; p++) if (held[p] >= 0) begin m_busy[held[p]] = 0; held[p] = -1; end
    @(negedge clk);
    idle_ports();
    #1 check(status == '0, "all buffers free after traffic");
  endtask

  // Full read-back of every configured buffer through port 1.
  task automatic read_back_all();
    for (int b = 0; b < int'(m_amount); b++) begin
      int nw = (m_len[b] + W - 1) / W;
      @(negedge clk); idle_ports(); lreq[1] = 1'b1; idx[1] = IDXW'(b);
      @(posedge clk); m_busy[b] = 1;
      for (int w = 0; w < nw; w++) begin
        logic [W-1:0] e;
        @(negedge clk); idle_ports(); ctrl[1] = RAM_RD; idx[1] = IDXW'(b); word[1] = WORDW'(w);
        e = m_read(b, w);
        @(posedge clk); #1;
        check(dout[1] == e, $sformatf("read-back buffer %0d word %0d", b, w));
      end
      @(negedge clk); idle_ports(); unl[1] = 1'b1; idx[1] = IDXW'(b);
      @(posedge clk); m_busy[b] = 0;
    end
    @(negedge clk); idle_ports();
  endtask

  initial begin
    int unsigned lens[$];
    foreach (m_mem[i]) m_mem[i] = 0;
    idle_ports();
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    #1;
    check(status == '0 && nbuf == '0 && dout[0] == '0 && dout[1] == '0, "reset values");

    // Default layout: 56 buffers of 72 bits (4032 of 4096 bits).
    lens.delete();
    for (int i = 0; i < 56; i++) lens.push_back(72);
    configure(56, lens);
    check(m_next == 56 * 72 && m_next <= RB, "default layout fits");
    traffic(3000);
    read_back_all();

    // Count above the number of buffers is cut to 64; random lengths.
    lens.delete();
    for (int i = 0; i < 64; i++) lens.push_back($urandom_range(1, 64));
    configure(100, lens);
    traffic(3000);
    read_back_all();

    // Layout larger than the RAM: 40 buffers of 128 bits = 5120 bits.
    lens.delete();
    for (int i = 0; i < 40; i++) lens.push_back(128);
    configure(40, lens);
    traffic(3000);
    read_back_all();

    check(lock_conflicts > 0, "same-buffer lock conflicts exercised");
    check(lock_waits > 0, "lock waits exercised");
    check(reads_done > 100 && writes_done > 100, "reads and writes exercised");
    $display("lock_conflicts=%0d lock_waits=%0d reads=%0d writes=%0d",
             lock_conflicts, lock_waits, reads_done, writes_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
