// tb_fifo_shift_top: end-to-end test of the whole design at its default sizes.
//
// Drives the three independent circuits of fifo_shift_top at the same time,
// each from its own clocks:
//  - the asynchronous FIFO (64 x 32 bits) through reset, a complete fill to
//    full, a complete drain to empty, flag release latencies, random traffic at
//    clock ratios from 1:14 to 14:1 and a reset while holding data, with a scoreboard
//    checking every word read;
//  - the 4-bit falling-edge right shifter, first with the DA..DD = 1,0,1,1
//    pattern shifted out through the cascade output with SER grounded, then
//    random load/shift/output-control cycles against a reference;
//  - the 3-bit load and left/right shifter with random load, right and left
//    shifts against a reference.
// Every mechanism (FIFO full, empty, direction set/clear, ignored write and
// read, pointer wrap, reset with data; shifter load, right and left shift,
// cascade output, output disable) is counted and must have happened.
`timescale 1ns/1ps
module tb_fifo_shift_top;
  localparam int unsigned DSIZE = 32;
  localparam int unsigned ASIZE = 6;
  localparam int unsigned DEPTH = 1 << ASIZE;

  logic fifo_wclk = 1'b0, fifo_rclk = 1'b0;
  logic fifo_wrst_n, fifo_rrst_n, fifo_winc, fifo_rinc;
  logic [DSIZE-1:0] fifo_wdata, fifo_rdata;
  logic fifo_wfull, fifo_rempty;

  realtime whalf = 5.0, rhalf = 7.3;
  logic [DSIZE-1:0] sb[$];
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0;
  int n_full = 0, n_empty = 0, n_dir_set = 0, n_dir_clr = 0;
  int n_wr_ignored = 0, n_rd_ignored = 0, n_reset_with_data = 0;
  logic [DSIZE-1:0] next_word = 32'h1000_0000;

  // Shift register signals.
  logic pipo_clk = 1'b1, pipo_ld_shn, pipo_ser, pipo_oc_n;
  logic [3:0] pipo_d, pipo_q, pipo_model;
  logic pipo_q_oe, pipo_qd_cas;
  logic lr_clk = 1'b0, lr_sh_ldn, lr_l_nr, lr_sr, lr_sl;
  logic [2:0] lr_d, lr_q, lr_model;
  logic lr_sr_cas, lr_sl_cas;
  int n_pipo_load = 0, n_pipo_shift = 0, n_pipo_off = 0, n_cascade = 0;
  int n_lr_load = 0, n_lr_right = 0, n_lr_left = 0;
  logic shifters_done = 1'b0;

  fifo_shift_top dut (.*);

  always #4 pipo_clk = ~pipo_clk;
  always #6 lr_clk = ~lr_clk;

  always #(whalf) fifo_wclk = ~fifo_wclk;
  always #(rhalf) fifo_rclk = ~fifo_rclk;

  task automatic fail(string msg);
    failures++;
    if (failures < 30) $display("FAIL %s at %0t", msg, $realtime);
  endtask

  // Write side: sample on the rising edge (pre-edge values), drive on the falling edge.
  always @(posedge fifo_wclk) begin
    if (fifo_wrst_n) begin
      checks++;
      if (sb.size() == DEPTH && !fifo_wfull) fail("fifo_wfull low while 64 words are held");
      if (fifo_winc && !fifo_wfull) begin
        sb.push_back(fifo_wdata);
        n_wr++;
      end else if (fifo_winc) n_wr_ignored++;
    end
  end

  // Read side: the head word must be on fifo_rdata when a read is accepted.
  always @(posedge fifo_rclk) begin
    if (fifo_rrst_n) begin
      checks++;
      if (sb.size() == 0 && !fifo_rempty) fail("fifo_rempty low while no word is held");
      if (fifo_rinc && !fifo_rempty) begin
        checks++;
        if (sb.size() == 0) fail("read accepted from an empty FIFO");
        else begin
          if (fifo_rdata !== sb[0]) fail($sformatf("fifo_rdata %h expected %h", fifo_rdata, sb[0]));
          void'(sb.pop_front());
        end
        n_rd++;
      end else if (fifo_rinc) n_rd_ignored++;
    end
  end

  always @(posedge fifo_wfull)  n_full++;
  always @(posedge fifo_rempty) n_empty++;
  always @(posedge dut.u_fifo.direction) n_dir_set++;
  always @(negedge dut.u_fifo.direction) n_dir_clr++;

  always @(negedge fifo_wclk) begin
    fifo_wdata <= next_word;
  end
  always @(posedge fifo_wclk) if (fifo_winc && !fifo_wfull) next_word <= next_word * 32'd1103515245 + 32'd12345;

  task automatic do_reset();
    if (sb.size() != 0) n_reset_with_data++;
    #1 fifo_wrst_n = 1'b0; fifo_rrst_n = 1'b0;
    #1;
    checks++;
    if (fifo_wfull) fail("fifo_wfull not cleared at once by reset");
    checks++;
    if (!fifo_rempty) fail("fifo_rempty not set by reset");
    sb.delete();
    repeat (3) @(negedge fifo_wclk);
    fifo_wrst_n = 1'b1; fifo_rrst_n = 1'b1;
    @(negedge fifo_rclk);
  endtask

  // 4-bit right shifter: falling-edge load/shift against a bit-level model.
  // The first word loaded is DA..DD = 1,0,1,1; it is shifted out with SER
  // grounded and must appear bit by bit on the cascade output.
  initial begin
    logic [3:0] nxt;
    pipo_oc_n = 1'b0; pipo_ld_shn = 1'b1; pipo_ser = 1'b0; pipo_d = 4'b1101;
    for (int i = 0; i < 400; i++) begin
      if (i > 0) begin
        pipo_ld_shn = (i < 5) ? 1'b0 : 1'($urandom_range(0, 3) == 0);
        pipo_ser = (i < 5) ? 1'b0 : 1'($urandom);
        pipo_d = 4'($urandom);
        pipo_oc_n = (i < 5) ? 1'b0 : 1'($urandom_range(0, 5) == 0);
      end
      @(negedge pipo_clk);
      if (pipo_ld_shn) begin nxt = pipo_d; n_pipo_load++; end
      else begin nxt = {pipo_model[2:0], pipo_ser}; n_pipo_shift++; end
      if (!pipo_ld_shn && pipo_model[3] != pipo_model[2]) n_cascade++;
      pipo_model = nxt;
      if (pipo_oc_n) n_pipo_off++;
      #1;
      checks++;
      if (pipo_q !== pipo_model || pipo_qd_cas !== pipo_model[3] || pipo_q_oe !== !pipo_oc_n)
        fail($sformatf("pipo q %b expected %b", pipo_q, pipo_model));
      if (i == 4) begin
        checks++;
        if (pipo_q !== 4'b0000) fail("loaded word did not leave after four shifts");
      end
    end
  end

  // 3-bit load and left/right shifter against a bit-level model.
  initial begin
    logic [2:0] nxt;
    for (int i = 0; i < 400; i++) begin
      lr_sh_ldn = (i == 0) ? 1'b0 : 1'($urandom_range(0, 4) != 0);
      lr_l_nr = 1'($urandom); lr_sr = 1'($urandom); lr_sl = 1'($urandom);
      lr_d = 3'($urandom);
      @(posedge lr_clk);
      if (!lr_sh_ldn) begin nxt = lr_d; n_lr_load++; end
      else if (lr_l_nr) begin nxt = {lr_model[1:0], lr_sr}; n_lr_right++; end
      else begin nxt = {lr_sl, lr_model[2:1]}; n_lr_left++; end
      lr_model = nxt;
      #1;
      checks++;
      if (lr_q !== lr_model || lr_sr_cas !== lr_model[2] || lr_sl_cas !== lr_model[0])
        fail($sformatf("lr q %b expected %b", lr_q, lr_model));
    end
    shifters_done = 1'b1;
  end

  initial begin
    int edges;
    fifo_winc = 1'b0; fifo_rinc = 1'b0; fifo_wrst_n = 1'b1; fifo_rrst_n = 1'b1;
    #3;
    do_reset();
    checks++;
    if (!fifo_rempty || fifo_wfull) fail("flags after reset");

    // Fill.
    @(negedge fifo_wclk);
    fifo_winc = 1'b1;
    while (!fifo_wfull) begin
      @(posedge fifo_wclk); #0.1;
    end
    checks++;
    if (n_wr != DEPTH) fail($sformatf("full after %0d writes, expected %0d", n_wr, DEPTH));
    repeat (5) @(negedge fifo_wclk);
    fifo_winc = 1'b0;
    checks++;
    if (n_wr != DEPTH || sb.size() != DEPTH) fail("write accepted while full");

    // Latency of the full release: read one word, count fifo_wclk edges until fifo_wfull falls.
    @(negedge fifo_rclk); fifo_rinc = 1'b1;
    @(posedge fifo_rclk); #0.1 fifo_rinc = 1'b0;
    edges = 0;
    while (fifo_wfull) begin @(posedge fifo_wclk); edges++; #0.1; end
    checks++;
    if (edges < 2 || edges > 3) fail($sformatf("fifo_wfull fell after %0d fifo_wclk edges", edges));

    // Drain.
    @(negedge fifo_rclk); fifo_rinc = 1'b1;
    while (!fifo_rempty) begin
      @(posedge fifo_rclk); #0.1;
    end
    checks++;
    if (n_rd != DEPTH || sb.size() != 0) fail($sformatf("empty after %0d reads", n_rd));
    repeat (5) @(negedge fifo_rclk);
    fifo_rinc = 1'b0;

    // Latency of the empty release: write one word, count fifo_rclk edges until fifo_rempty falls.
    @(negedge fifo_wclk); fifo_winc = 1'b1;
    @(posedge fifo_wclk); #0.1 fifo_winc = 1'b0;
    edges = 0;
    while (fifo_rempty) begin @(posedge fifo_rclk); edges++; #0.1; end
    checks++;
    if (edges < 2 || edges > 3) fail($sformatf("fifo_rempty fell after %0d fifo_rclk edges", edges));

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
        @(negedge fifo_wclk);
        fifo_winc = ($urandom_range(0, 99) < wp);
        @(negedge fifo_rclk);
        fifo_rinc = ($urandom_range(0, 99) < rp);
      end
      if (phase == 6) do_reset();
    end
    fifo_winc = 1'b0;
    @(negedge fifo_rclk); fifo_rinc = 1'b1;
    repeat (4 * DEPTH) @(negedge fifo_rclk);
    fifo_rinc = 1'b0;
    repeat (4) @(negedge fifo_rclk);

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
    wait (shifters_done);
    checks++; if (n_pipo_load == 0 || n_pipo_shift == 0) fail("pipo load or shift never ran");
    checks++; if (n_pipo_off == 0)  fail("pipo outputs never disabled");
    checks++; if (n_cascade == 0)   fail("pipo cascade output never toggled");
    checks++; if (n_lr_load == 0)   fail("lr load never ran");
    checks++; if (n_lr_right == 0)  fail("lr right shift never ran");
    checks++; if (n_lr_left == 0)   fail("lr left shift never ran");
    $display("pipo load %0d shift %0d off %0d; lr load %0d right %0d left %0d",
             n_pipo_load, n_pipo_shift, n_pipo_off, n_lr_load, n_lr_right, n_lr_left);
    $display("writes %0d reads %0d full %0d empty %0d dir_set %0d dir_clr %0d ignored w/r %0d/%0d resets with data %0d",
             n_wr, n_rd, n_full, n_empty, n_dir_set, n_dir_clr, n_wr_ignored, n_rd_ignored,
             n_reset_with_data);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge fifo_wclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
