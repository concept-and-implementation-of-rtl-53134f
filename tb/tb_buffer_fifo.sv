// tb_buffer_fifo: self-checking test of buffer_fifo, the depth-2 buffer used
// as Input Buffer, Output Buffer and transient buffers.
//
// Two instances run side by side: one with the plain full flag (a producer
// that decides combinationally) and one with the look-ahead full flag (a
// producer whose write strobe is registered). Random writes and pops are
// compared against a queue model: data order, empty, full, writes ignored
// while full. A directed part checks that a word written at an edge is
// readable right after it, and that the registered producer never overruns
// the buffer when it obeys the look-ahead flag.
module tb_buffer_fifo;
  localparam int unsigned W = 32;

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

  // ---- instance A: plain full flag, combinational producer
  logic [W-1:0] a_din, a_dout;
  logic a_wr, a_pop, a_empty, a_full;
  buffer_fifo #(.DATA_W(W), .DEPTH(2), .FULL_AHEAD(1'b0)) dut_a (
    .clk, .rst_n, .data_in(a_din), .read_en(a_wr), .pop(a_pop),
    .data_out(a_dout), .empty(a_empty), .full(a_full));

  // ---- instance B: look-ahead full flag, registered producer
  logic [W-1:0] b_din, b_dout;
  logic b_wr, b_pop, b_empty, b_full;
  buffer_fifo #(.DATA_W(W), .DEPTH(2), .FULL_AHEAD(1'b1)) dut_b (
    .clk, .rst_n, .data_in(b_din), .read_en(b_wr), .pop(b_pop),
    .data_out(b_dout), .empty(b_empty), .full(b_full));

  logic [W-1:0] qa[$];
  logic [W-1:0] qb[$];
  int b_overruns = 0;
  int a_full_seen = 0, b_full_seen = 0;

  // Watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] next_b;
    rst_n = 1'b0;
    a_din = '0; a_wr = 1'b0; a_pop = 1'b0;
    b_din = '0; b_wr = 1'b0; b_pop = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    #1;
    check(a_empty && !a_full, "A empty after reset");
    check(b_empty && !b_full, "B empty after reset");

    // Directed: fill A to full, extra write ignored, drain in order.
    @(negedge clk); a_din = 32'h1111_0001; a_wr = 1'b1;
    @(negedge clk); a_din = 32'h1111_0002;
    @(negedge clk); check(a_full, "A full after two writes"); a_din = 32'hDEAD_BEEF;
    @(negedge clk); a_wr = 1'b0;
    check(a_dout == 32'h1111_0001 && !a_empty, "A first word out");
    a_pop = 1'b1;
    @(negedge clk); check(a_dout == 32'h1111_0002, "A second word out, overflow word ignored");
    @(negedge clk); a_pop = 1'b0; check(a_empty && !a_full, "A empty after draining");

    // Random traffic. Producer A writes when not full (same-cycle decision);
    // producer B decides at a clock edge from full and its write lands at the
    // next edge (registered strobe). Consumers pop at random.
    next_b = 32'hB000_0000;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // A: combinational producer and random pop
      a_pop = ($urandom_range(0, 2) != 0) && !a_empty;
      a_wr  = ($urandom_range(0, 2) != 0) && !a_full;
      a_din = $urandom;
      b_pop = ($urandom_range(0, 3) != 0) && !b_empty;
      if (a_full) a_full_seen++;
      if (b_full) b_full_seen++;
      @(posedge clk);
      // model A
      if (a_pop) begin
        check(qa.size() > 0 && a_dout == qa[0], "A data order");
        void'(qa.pop_front());
      end
      if (a_wr) qa.push_back(a_din);
      // model B: count the write landing now, then the producer decides
      if (b_pop) begin
        check(qb.size() > 0 && b_dout == qb[0], "B data order");
        void'(qb.pop_front());
      end
      if (b_wr) begin
        if (qb.size() >= 2) b_overruns++;
        else qb.push_back(b_din);
      end
      // registered producer: next write decided from the flag seen now
      if (!b_full && ($urandom_range(0, 3) != 0)) begin
        b_wr  <= 1'b1;
        b_din <= next_b;
        next_b = next_b + 1;
      end else begin
        b_wr <= 1'b0;
      end
      #1;
      check(a_empty == (qa.size() == 0), "A empty flag");
      check(a_full == (qa.size() == 2), "A full flag");
      check(b_empty == (qb.size() == 0), "B empty flag");
    end
    check(b_overruns == 0, "registered producer never overruns with look-ahead full");
    check(a_full_seen > 0 && b_full_seen > 0, "full reached on both buffers");
    $display("a_full_seen=%0d b_full_seen=%0d", a_full_seen, b_full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
