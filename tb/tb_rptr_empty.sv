// tb_rptr_empty: self-checking test of the read pointer and empty flag.
//
// aempty_n is driven directly, as the comparator would. Checked:
//  - reset sets rempty and zeroes the pointer;
//  - while rempty is high, read requests are ignored;
//  - rempty falls exactly on the second rclk edge after aempty_n rises;
//  - rempty rises at once (no clock edge) when aempty_n falls;
//  - every accepted read advances raddr by one and rptr to the Gray code of
//    the read count, which changes in one bit only, wrapping after 2**ASIZE.
module tb_rptr_empty;
  localparam int unsigned ASIZE = 6;

  logic rclk = 1'b0, rrst_n, rinc, aempty_n;
  logic rempty;
  logic [ASIZE-1:0] raddr, rptr, prev_rptr;
  int count = 0;
  int checks = 0, failures = 0;

  rptr_empty #(.ASIZE(ASIZE)) dut (.*);

  always #5 rclk = ~rclk;

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

  // Reference for the pointer: count reads accepted at each rising edge.
  always @(posedge rclk) begin
    if (rrst_n && rinc && !rempty) count <= count + 1;
  end

  initial begin
    rrst_n = 1'b0; rinc = 1'b0; aempty_n = 1'b1;
    #12;
    expect_val("rempty in reset", rempty, 1);
    expect_val("rptr in reset", rptr, 0);
    @(negedge rclk); rrst_n = 1'b1;
    // Empty: requests are ignored.
    rinc = 1'b1; aempty_n = 1'b0;
    repeat (3) @(negedge rclk);
    expect_val("no read while empty", raddr, 0);
    expect_val("rempty held", rempty, 1);
    for (int round = 0; round < 6; round++) begin
      int burst;
      // Release the empty state between edges: two edges until rempty falls.
      rinc = 1'b0;
      #2 aempty_n = 1'b1;
      @(posedge rclk); #1;
      expect_val("rempty after 1 edge", rempty, 1);
      @(posedge rclk); #1;
      expect_val("rempty after 2 edges", rempty, 0);
      // Read a burst, checking pointers on every edge.
      burst = 5 + round * 7;
      @(negedge rclk);
      for (int i = 0; i < burst; i++) begin
        rinc = 1'($urandom_range(0, 3) != 0);
        prev_rptr = rptr;
        @(negedge rclk);
        expect_val("raddr", raddr, count % (1 << ASIZE));
        expect_val("rptr gray", rptr, to_gray(count));
        expect_val("one bit change", $countones(rptr ^ prev_rptr) <= 1, 1);
      end
      // Pointers meet: the set is immediate.
      #1 aempty_n = 1'b0;
      #1 expect_val("rempty set at once", rempty, 1);
      rinc = 1'b1;
      begin
        int count0;
        count0 = count;
        repeat (2) @(negedge rclk);
        expect_val("no read after set", count, count0);
      end
    end
    // Long run to pass the pointer wrap.
    aempty_n = 1'b1; rinc = 1'b1;
    repeat (3) @(negedge rclk);
    repeat (150) begin
      @(negedge rclk);
      expect_val("raddr wrap", raddr, count % (1 << ASIZE));
      expect_val("rptr wrap", rptr, to_gray(count));
    end
    expect_val("wrapped", count > (1 << ASIZE), 1);
    // Reset sets the flag asynchronously.
    #2 rrst_n = 1'b0;
    #1 expect_val("reset sets rempty", rempty, 1);
    expect_val("reset clears rptr", rptr, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge rclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
