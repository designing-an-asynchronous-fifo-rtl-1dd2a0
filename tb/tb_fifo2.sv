// tb_fifo2: self-checking test of the asynchronous FIFO at its default size
// (64 words of 32 bits).
//
// The write and read clocks run at unrelated periods. A scoreboard queue holds
// every word accepted on the write side; every accepted read must return the
// word at its head. Phases:
//  1. reset: rempty high, wfull low;
//  2. fill with no reads: exactly 64 writes are accepted, wfull rises right
//     after the 64th write edge, later writes are ignored;
//  3. drain with no writes: 64 words come back in order, rempty rises right
//     after the last read edge, later reads are ignored;
//  4. latency: after a write into the empty FIFO, rempty falls on the 2nd or
//     3rd rclk edge; after a read from the full FIFO, wfull falls on the 2nd or
//     3rd wclk edge;
//  5. random traffic with changing rates and clock ratios from 1:14 to 14:1, including a reset
//     while the FIFO holds data;
// and checks throughout that wfull is high whenever 64 words are held and
// rempty whenever none is. Each mechanism (full, empty, direction set and
// clear, ignored write, ignored read, pointer wrap, reset with data) is
// counted and must have happened.
`timescale 1ns/1ps
module tb_fifo2;
  localparam int unsigned DSIZE = 32;
  localparam int unsigned ASIZE = 6;
  localparam int unsigned DEPTH = 1 << ASIZE;

  logic wclk = 1'b0, rclk = 1'b0;
  logic wrst_n, rrst_n, winc, rinc;
  logic [DSIZE-1:0] wdata, rdata;
  logic wfull, rempty;

  realtime whalf = 5.0, rhalf = 7.3;
  logic [DSIZE-1:0] sb[$];
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0;
  int n_full = 0, n_empty = 0, n_dir_set = 0, n_dir_clr = 0;
  int n_wr_ignored = 0, n_rd_ignored = 0, n_reset_with_data = 0;
  logic [DSIZE-1:0] next_word = 32'h1000_0000;

  fifo2 #(.DSIZE(DSIZE), .ASIZE(ASIZE)) dut (.*);

  always #(whalf) wclk = ~wclk;
  always #(rhalf) rclk = ~rclk;

  task automatic fail(string msg);
    failures++;
    if (failures < 30) $display("FAIL %s at %0t", msg, $realtime);
  endtask

  // Write side: sample on the rising edge (pre-edge values), drive on the falling edge.
  always @(posedge wclk) begin
    if (wrst_n) begin
      checks++;
      if (sb.size() == DEPTH && !wfull) fail("wfull low while 64 words are held");
      if (winc && !wfull) begin
        sb.push_back(wdata);
        n_wr++;
      end else if (winc) n_wr_ignored++;
    end
  end

  // Read side: the head word must be on rdata when a read is accepted.
  always @(posedge rclk) begin
    if (rrst_n) begin
      checks++;
      if (sb.size() == 0 && !rempty) fail("rempty low while no word is held");
      if (rinc && !rempty) begin
        checks++;
        if (sb.size() == 0) fail("read accepted from an empty FIFO");
        else begin
          if (rdata !== sb[0]) fail($sformatf("rdata %h expected %h", rdata, sb[0]));
          void'(sb.pop_front());
        end
        n_rd++;
      end else if (rinc) n_rd_ignored++;
    end
  end

  always @(posedge wfull)  n_full++;
  always @(posedge rempty) n_empty++;
  always @(posedge dut.direction) n_dir_set++;
  always @(negedge dut.direction) n_dir_clr++;

  always @(negedge wclk) begin
    wdata <= next_word;
  end
  always @(posedge wclk) if (winc && !wfull) next_word <= next_word * 32'd1103515245 + 32'd12345;

  task automatic do_reset();
    if (sb.size() != 0) n_reset_with_data++;
    #1 wrst_n = 1'b0; rrst_n = 1'b0;
    #1;
    checks++;
    if (wfull) fail("wfull not cleared at once by reset");
    checks++;
    if (!rempty) fail("rempty not set by reset");
    sb.delete();
    repeat (3) @(negedge wclk);
    wrst_n = 1'b1; rrst_n = 1'b1;
    @(negedge rclk);
  endtask

  initial begin
    int edges;
    winc = 1'b0; rinc = 1'b0; wrst_n = 1'b1; rrst_n = 1'b1;
    #3;
    do_reset();
    checks++;
    if (!rempty || wfull) fail("flags after reset");

    // Fill.
    @(negedge wclk);
    winc = 1'b1;
    while (!wfull) begin
      @(posedge wclk); #0.1;
    end
    checks++;
    if (n_wr != DEPTH) fail($sformatf("full after %0d writes, expected %0d", n_wr, DEPTH));
    repeat (5) @(negedge wclk);
    winc = 1'b0;
    checks++;
    if (n_wr != DEPTH || sb.size() != DEPTH) fail("write accepted while full");

    // Latency of the full release: read one word, count wclk edges until wfull falls.
    @(negedge rclk); rinc = 1'b1;
    @(posedge rclk); #0.1 rinc = 1'b0;
    edges = 0;
    while (wfull) begin @(posedge wclk); edges++; #0.1; end
    checks++;
    if (edges < 2 || edges > 3) fail($sformatf("wfull fell after %0d wclk edges", edges));

    // Drain.
    @(negedge rclk); rinc = 1'b1;
    while (!rempty) begin
      @(posedge rclk); #0.1;
    end
    checks++;
    if (n_rd != DEPTH || sb.size() != 0) fail($sformatf("empty after %0d reads", n_rd));
    repeat (5) @(negedge rclk);
    rinc = 1'b0;

    // Latency of the empty release: write one word, count rclk edges until rempty falls.
    @(negedge wclk); winc = 1'b1;
    @(posedge wclk); #0.1 winc = 1'b0;
    edges = 0;
    while (rempty) begin @(posedge rclk); edges++; #0.1; end
    checks++;
    if (edges < 2 || edges > 3) fail($sformatf("rempty fell after %0d rclk edges", edges));

    // Random traffic in several regimes.
    for (int phase = 0; phase < 12; phase++) begin
      int wp, rp;
      case (phase % 6)
        0: begin wp = 90; rp = 40; whalf = 5.0; rhalf = 7.3; end
        1: begin wp = 40; rp = 95; whalf = 6.1; rhalf = 3.7; end
        2: begin wp = 70; rp = 70; whalf = 4.3; rhalf = 11.9; end
        3: begin wp = 60; rp = 60; whalf = 9.7; rhalf = 4.1; end
        4: begin wp = 50; rp = 90; whalf = 2.3; rhalf = 31.7; end  // read clock ~14x slower
        default: begin wp = 90; rp = 50; whalf = 29.9; rhalf = 2.1; end  // write clock ~14x slower
      endcase
      repeat (600) begin
        @(negedge wclk);
        winc = ($urandom_range(0, 99) < wp);
        @(negedge rclk);
        rinc = ($urandom_range(0, 99) < rp);
      end
      if (phase == 6) do_reset();
    end
    winc = 1'b0;
    @(negedge rclk); rinc = 1'b1;
    repeat (4 * DEPTH) @(negedge rclk);
    rinc = 1'b0;
    repeat (4) @(negedge rclk);

    checks++;
    if (sb.size() != 0) fail("words left in the scoreboard");
    checks++; if (n_full < 2)           fail("full state not reached");
    checks++; if (n_empty < 2)          fail("empty state not reached");
    checks++; if (n_dir_set == 0)       fail("direction never set");
    checks++; if (n_dir_clr == 0)       fail("direction never cleared");
    checks++; if (n_wr_ignored == 0)    fail("no write ignored while full");
    checks++; if (n_rd_ignored == 0)    fail("no read ignored while empty");
    checks++; if (n_wr <= DEPTH)        fail("pointers never wrapped");
    checks++; if (n_reset_with_data == 0) fail("no reset with data held");
    $display("writes %0d reads %0d full %0d empty %0d dir_set %0d dir_clr %0d ignored w/r %0d/%0d resets with data %0d",
             n_wr, n_rd, n_full, n_empty, n_dir_set, n_dir_clr, n_wr_ignored, n_rd_ignored,
             n_reset_with_data);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge wclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
