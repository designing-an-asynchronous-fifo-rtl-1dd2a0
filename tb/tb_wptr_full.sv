// tb_wptr_full: self-checking test of the write pointer and full flag.
//
// afull_n is driven directly, as the comparator would. Checked:
//  - reset clears wfull at once, even while afull_n is low, and zeroes the
//    pointer;
//  - wfull rises at once (no clock edge) when afull_n falls;
//  - while wfull is high, write requests are ignored and wclken stays low;
//  - wfull falls exactly on the second wclk edge after afull_n rises;
//  - wclken equals winc and not wfull, and every accepted write advances
//    waddr by one and wptr to the Gray code of the write count.
module tb_wptr_full;
  localparam int unsigned ASIZE = 6;

  logic wclk = 1'b0, wrst_n, winc, afull_n;
  logic wfull, wclken;
  logic [ASIZE-1:0] waddr, wptr, prev_wptr;
  int count = 0;
  int checks = 0, failures = 0;

  wptr_full #(.ASIZE(ASIZE)) dut (.*);

  always #5 wclk = ~wclk;

  task automatic expect_val(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  function automatic logic [ASIZE-1:0] to_gray(int b);
    logic [ASIZE-1:0] v;
    v = ASIZE'(b);
    return v ^ (v >> 1);
  endfunction

  always @(posedge wclk) begin
    if (wrst_n && winc && !wfull) count <= count + 1;
  end

  initial begin
    wrst_n = 1'b0; winc = 1'b0; afull_n = 1'b0;
    #12;
    expect_val("wfull cleared by reset", wfull, 0);
    expect_val("wptr in reset", wptr, 0);
    afull_n = 1'b1;
    @(negedge wclk); wrst_n = 1'b1;
    @(negedge wclk);
    expect_val("not full after reset", wfull, 0);
    for (int round = 0; round < 6; round++) begin
      int burst;
      burst = 4 + round * 9;
      for (int i = 0; i < burst; i++) begin
        winc = 1'($urandom_range(0, 3) != 0);
        #1 expect_val("wclken", wclken, winc && !wfull);
        prev_wptr = wptr;
        @(negedge wclk);
        expect_val("waddr", waddr, count % (1 << ASIZE));
        expect_val("wptr gray", wptr, to_gray(count));
        expect_val("one bit change", $countones(wptr ^ prev_wptr) <= 1, 1);
      end
      // Pointers meet going full: the set is immediate.
      #1 afull_n = 1'b0;
      #1 expect_val("wfull set at once", wfull, 1);
      winc = 1'b1;
      #1 expect_val("wclken low when full", wclken, 0);
      begin
        int count0;
        count0 = count;
        repeat (3) @(negedge wclk);
        expect_val("no write while full", count, count0);
      end
      // Release between edges: two edges until wfull falls.
      winc = 1'b0;
      #2 afull_n = 1'b1;
      @(posedge wclk); #1;
      expect_val("wfull after 1 edge", wfull, 1);
      @(posedge wclk); #1;
      expect_val("wfull after 2 edges", wfull, 0);
      @(negedge wclk);
    end
    // Long run to pass the pointer wrap.
    winc = 1'b1;
    repeat (150) begin
      @(negedge wclk);
      expect_val("waddr wrap", waddr, count % (1 << ASIZE));
      expect_val("wptr wrap", wptr, to_gray(count));
    end
    expect_val("wrapped", count > (1 << ASIZE), 1);
    // Reset while full clears at once.
    afull_n = 1'b0;
    #1 expect_val("full count0 reset", wfull, 1);
    #1 wrst_n = 1'b0;
    #1 expect_val("reset clears wfull", wfull, 0);
    expect_val("reset clears wptr", wptr, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge wclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
