// tb_fpu: self-checking test of the Frame Processing Unit.
//
// The Input Buffer and Output Buffer are modelled here as queues of depth 2
// (look-ahead full flag on the IB, as the FPU expects). A consumer behind the
// IB drains one word per clock unless the test stops it, and a random
// producer in front of the OB feeds words, so the FPU meets a full IB and an
// empty OB. The test walks through the sequences the
// document shows: reset values, host configuration with the buffer count
// below the minimum, above the maximum and in range, default configuration,
// writes (including an IB-full stall and the overflow error), reads
// (including empty-OB waits), pause/continue and the RESET command. Expected
// values (commands, indices, words, cycle counts) are computed in the test.
module tb_fpu;
  import mh_pkg::*;

  localparam int unsigned NB   = 64;
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
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  logic [IDXW-1:0] index_in;
  host_cmd_e       control_host_in;
  logic [31:0]     data_host_in, data_host_out, data_ib_out, data_ob_in;
  logic            read_en_host_out, write_en_host_out, msg_complete_host_out, error_host_out;
  logic            full_ib_in, read_en_ib_out, empty_ob_in, pop_ob_out, reset_mh_out;
  logic [IDXW-1:0] index_out;
  mh_cmd_e         control_mh_out;

  fpu dut (
    .clk, .rst_n, .index_in, .control_host_in, .data_host_in, .data_host_out,
    .read_en_host_out, .write_en_host_out, .msg_complete_host_out, .error_host_out,
    .full_ib_in, .data_ib_out, .read_en_ib_out, .empty_ob_in, .data_ob_in,
    .pop_ob_out, .index_out, .control_mh_out, .reset_mh_out);

  // ---------------- Input Buffer model (depth 2, look-ahead full)
  logic [31:0] ibq[$];
  logic [31:0] ib_log[$];
  bit          ib_consume;       // consumer enable, changed by the test
  bit          ib_pop_now;
  int          ib_overruns = 0;
  always_comb full_ib_in = (ibq.size() >= 2) ||
                           (ibq.size() == 1 && read_en_ib_out && !ib_pop_now);
  always @(negedge clk) ib_pop_now = ib_consume && ibq.size() > 0;
  // Models sample at the edge and update 1 time unit later, so the DUT always
  // sees the pre-edge buffer state at the edge.
  always @(posedge clk) begin
    bit          do_pop, do_push, in_reset;
    logic [31:0] word;
    in_reset = !rst_n;
    do_pop   = ib_pop_now;
    do_push  = rst_n && read_en_ib_out;
    word     = data_ib_out;
    #1;
    if (in_reset) ibq.delete();
    if (do_pop && ibq.size() > 0) void'(ibq.pop_front());
    if (do_push) begin
      if (ibq.size() >= 2) ib_overruns++;
      else ibq.push_back(word);
      ib_log.push_back(word);
    end
  end

  // ---------------- Output Buffer model (depth 2)
  logic [31:0] obq[$];
  logic [31:0] ob_src[$];        // words the "MH" will deliver
  bit          ob_produce;
  always_comb begin
    empty_ob_in = (obq.size() == 0);
    data_ob_in  = (obq.size() > 0) ? obq[0] : 32'h0;
  end
  always @(posedge clk) begin
    bit do_pop, do_push;
    do_pop  = pop_ob_out;
    do_push = ob_produce && ob_src.size() > 0 && obq.size() < 2 && ($urandom_range(0, 2) != 0);
    #1;
    if (do_pop) begin
      check(obq.size() > 0, "FPU pops only a non-empty OB");
      if (obq.size() > 0) void'(obq.pop_front());
    end
    if (do_push) obq.push_back(ob_src.pop_front());
  end

  // Watchdog
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Payload lengths the host configures (bits).
  int unsigned conf_len [NB];
  int n_conf;

  function automatic int unsigned words_of(int unsigned bits);
    return (bits + 31) / 32;
  endfunction

  task automatic do_reset();
    rst_n = 1'b0;
    control_host_in = HOST_IDLE;
    index_in = '0;
    data_host_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
  endtask

  // Host configuration with count word 'count'; lengths from conf_len[].
  task automatic host_configure(input int unsigned count, input int unsigned expect_n);
    int cyc;
    @(negedge clk) control_host_in = HOST_CONF;
    @(posedge clk); #2;
    check(control_mh_out == MH_CONF, "CONF command to MH");
    @(negedge clk) data_host_in = count;
    @(posedge clk); #2;
    check(control_mh_out == MH_IDLE, "CONF command lasts one cycle");
    check(read_en_ib_out && data_ib_out == expect_n, $sformatf("clamped count %0d -> %0d", count, expect_n));
    for (int i = 0; i < int'(expect_n); i++) begin
      @(negedge clk) data_host_in = conf_len[i];
      @(posedge clk); #2;
      check(read_en_ib_out && data_ib_out == conf_len[i] && index_out == IDXW'(i),
            $sformatf("configuration word of buffer %0d", i));
    end
    @(negedge clk) data_host_in = '0;
    @(posedge clk); #2;
    check(msg_complete_host_out && !read_en_ib_out && !error_host_out, "configuration complete flag");
    @(negedge clk) control_host_in = HOST_IDLE;
    @(posedge clk); #2;
    check(!msg_complete_host_out, "complete flag is one cycle");
  endtask

  // Host write of buffer idx with the given number of words, stall optional.
  task automatic host_write(input int idx, input int nwords, input bit overflow,
                            input bit stall, output int cycles);
    logic [31:0] w [$];
    int hp;
    for (int i = 0; i < nwords; i++) w.push_back($urandom | 32'h1);
    ib_log.delete();
    ib_consume = !stall;
    @(negedge clk) control_host_in = HOST_WR; index_in = IDXW'(idx);
    data_host_in = w[0];
    @(posedge clk); #2;
    check(control_mh_out == MH_WR && index_out == IDXW'(idx), "WR command and index to MH");
    @(negedge clk) control_host_in = HOST_IDLE;
    hp = 0;
    cycles = 0;
    while (!msg_complete_host_out) begin
      @(posedge clk); #2;
      cycles++;
      if (stall && cycles == 6) ib_consume = 1'b1;
      if (stall && cycles == 5) check(full_ib_in && !write_en_host_out, "IB full stalls host");
      if (cycles > 500) break;
      @(negedge clk);
      if (write_en_host_out) hp++;
      data_host_in = (hp < nwords) ? w[hp] : (overflow ? 32'hBAD0_0001 : 32'h0);
    end
    check(hp == nwords, $sformatf("host words taken %0d of %0d", hp, nwords));
    check(ib_log.size() == nwords, "words pushed into IB");
    for (int i = 0; i < nwords && i < ib_log.size(); i++)
      check(ib_log[i] == w[i], "IB word order and value");
    check(error_host_out == overflow, overflow ? "overflow error raised" : "no error");
    check(!write_en_host_out, "write enable low at completion");
    if (!stall) check(cycles == nwords + 1, $sformatf("write takes n+1 cycles (%0d)", cycles));
    @(negedge clk) data_host_in = '0; ib_consume = 1'b1;
    @(posedge clk); #2;
    check(!msg_complete_host_out && !error_host_out && control_mh_out == MH_IDLE,
          "flags cleared in PASSIVE");
  endtask

  task automatic host_read(input int idx, input int nwords, input bit slow);
    logic [31:0] w [$];
    logic [31:0] got [$];
    int cycles;
    for (int i = 0; i < nwords; i++) w.push_back($urandom);
    ob_src.delete();
    foreach (w[i]) ob_src.push_back(w[i]);
    ob_produce = !slow;
    @(negedge clk) control_host_in = HOST_RD; index_in = IDXW'(idx);
    @(posedge clk); #2;
    check(control_mh_out == MH_RD && index_out == IDXW'(idx), "RD command and index to MH");
    @(negedge clk) control_host_in = HOST_IDLE;
    cycles = 0;
    while (!msg_complete_host_out && cycles < 500) begin
      @(posedge clk); #2;
      cycles++;
      if (slow && cycles == 4) begin
        check(!read_en_host_out, "empty OB: no data to host");
        ob_produce = 1'b1;
      end
      if (read_en_host_out) got.push_back(data_host_out);
    end
    check(got.size() == nwords, $sformatf("host got %0d of %0d words", got.size(), nwords));
    for (int i = 0; i < nwords && i < got.size(); i++) check(got[i] == w[i], "read word value");
    check(!read_en_host_out && data_host_out == '0, "read enable low at completion");
  endtask

  initial begin
    int cyc;
    ib_consume = 1'b1;
    ob_produce = 1'b1;
    do_reset();
    #1;
    // Reset values (IDLE is a Moore state with all outputs at reset values).
    check(control_mh_out == MH_IDLE && index_out == '0 && !read_en_ib_out &&
          !read_en_host_out && !write_en_host_out && !msg_complete_host_out &&
          !error_host_out, "reset values");
    // Commands other than configuration are ignored in IDLE.
    @(negedge clk) control_host_in = HOST_WR;
    @(posedge clk); #2;
    check(control_mh_out == MH_IDLE, "WR ignored before configuration");

    // --- configuration below the minimum: 5 -> 32 buffers
    for (int i = 0; i < int'(NB); i++) conf_len[i] = 32 * (1 + (i % 3)) + 8 * (i % 2);
    host_configure(5, 32);
    // --- after reset: above the maximum: 175 -> 64 buffers
    do_reset();
    host_configure(175, 64);
    // --- one length word too many: configuration error
    do_reset();
    @(negedge clk) control_host_in = HOST_CONF;
    @(negedge clk) control_host_in = HOST_IDLE; data_host_in = 32'd32;
    for (int i = 0; i < 32; i++) @(negedge clk) data_host_in = conf_len[i];
    @(negedge clk) data_host_in = 32'd40;
    @(posedge clk); #2;
    check(msg_complete_host_out && error_host_out, "extra configuration word raises the error");
    @(negedge clk) data_host_in = '0;
    @(posedge clk); #2;
    check(!error_host_out, "configuration error is one cycle");
    // --- in range: 33 buffers
    do_reset();
    host_configure(33, 33);

    // --- write buffer 20: conf_len[20] bits
    host_write(20, words_of(conf_len[20]), 1'b0, 1'b0, cyc);
    // --- write with an IB-full stall
    host_write(1, words_of(conf_len[1]), 1'b0, 1'b1, cyc);
    // --- write where the host keeps sending: overflow error
    host_write(2, words_of(conf_len[2]), 1'b1, 1'b0, cyc);
    // --- reads, one fast, one waiting on an empty OB
    host_read(20, words_of(conf_len[20]), 1'b0);
    host_read(5, words_of(conf_len[5]), 1'b1);

    // --- pause during a write, then continue
    ib_consume = 1'b0;
    @(negedge clk) control_host_in = HOST_WR; index_in = 6'd2; data_host_in = 32'h55;
    @(posedge clk);
    @(negedge clk) control_host_in = HOST_IDLE;
    repeat (3) @(posedge clk);
    @(negedge clk) control_host_in = HOST_PAUSE;
    @(posedge clk); #2;
    check(control_mh_out == MH_PAUSE && !write_en_host_out, "PAUSE sent to MH");
    @(negedge clk) control_host_in = HOST_IDLE;
    repeat (3) @(posedge clk); #2;
    check(control_mh_out == MH_PAUSE, "PAUSE held while paused");
    @(negedge clk) control_host_in = HOST_CONTINUE;
    @(posedge clk); #2;
    check(control_mh_out == MH_CONTINUE, "CONTINUE sent to MH");
    @(negedge clk) control_host_in = HOST_IDLE; ib_consume = 1'b1; data_host_in = '0;
    @(posedge clk); #2;
    check(control_mh_out == MH_IDLE, "back in PASSIVE after CONTINUE");
    repeat (3) @(posedge clk);
    host_write(3, words_of(conf_len[3]), 1'b0, 1'b0, cyc);

    // --- default configuration
    do_reset();
    ib_log.delete();
    @(negedge clk) control_host_in = HOST_DEFAULT_CONF;
    @(posedge clk); #2;
    check(control_mh_out == MH_CONF, "DEFAULT_CONF sends CONF to MH");
    @(negedge clk) control_host_in = HOST_IDLE;
    cyc = 1;
    while (!msg_complete_host_out && cyc < 200) begin
      @(posedge clk); #2; cyc++;
    end
    // CONF command, count word, 56 payload lengths, completion.
    check(cyc == 1 + 1 + 56 + 1, $sformatf("default configuration takes 59 cycles (%0d)", cyc));
    check(ib_log.size() == 57 && ib_log[0] == 56, "default count word 56");
    for (int i = 1; i < ib_log.size(); i++) check(ib_log[i] == 72, "default payload length 72");
    repeat (2) @(posedge clk);
    for (int i = 0; i < 56; i++) conf_len[i] = 72;
    host_write(55, 3, 1'b0, 1'b0, cyc);
    host_read(0, 3, 1'b0);

    // --- RESET command: back to IDLE, MH reset pulse, commands ignored
    @(negedge clk) control_host_in = HOST_RESET;
    @(posedge clk); #2;
    check(reset_mh_out && control_mh_out == MH_IDLE, "RESET pulses reset_mh_out");
    @(negedge clk) control_host_in = HOST_RD;
    @(posedge clk); #2;
    check(!reset_mh_out && control_mh_out == MH_IDLE, "RD ignored in IDLE after RESET");

    check(ib_overruns == 0, "IB never overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
