// tb_async_cmp: exhaustive self-checking test of the pointer comparator.
//
// Every pair of Gray write/read pointers, with both direction values and both
// reset levels, is applied. The expected quadrant relations are computed from
// the binary addresses the Gray codes stand for (decoded here bit by bit), and
// the expected empty/full indications from pointer equality and direction.
module tb_async_cmp;
  localparam int unsigned ASIZE = 6;
  localparam int unsigned DEPTH = 1 << ASIZE;
  localparam int unsigned QSIZE = DEPTH / 4;

  logic [ASIZE-1:0] wptr, rptr;
  logic wrst_n, direction;
  logic dir_set, dir_clr, aempty_n, afull_n;
  int checks = 0, failures = 0;

  async_cmp #(.ASIZE(ASIZE)) dut (.*);

  function automatic logic [ASIZE-1:0] to_gray(int b);
    logic [ASIZE-1:0] v;
    v = ASIZE'(b);
    return v ^ (v >> 1);
  endfunction

  task automatic expect_bit(string what, logic got, logic exp, int w, int r);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: waddr %0d raddr %0d dir %0b rst_n %0b got %0b", what, w, r,
                 direction, wrst_n, got);
    end
  endtask

  initial begin
    for (int w = 0; w < DEPTH; w++) begin
      for (int r = 0; r < DEPTH; r++) begin
        for (int k = 0; k < 4; k++) begin
          int wquad, rquad;
          logic going_full, going_empty;
          wptr = to_gray(w); rptr = to_gray(r);
          direction = k[0]; wrst_n = k[1];
          #1;
          wquad = w / QSIZE; rquad = r / QSIZE;
          going_full  = (((wquad + 1) % 4) == rquad);
          going_empty = (((rquad + 1) % 4) == wquad);
          expect_bit("dir_set", dir_set, going_full, w, r);
          expect_bit("dir_clr", dir_clr, going_empty || !wrst_n, w, r);
          expect_bit("aempty_n", aempty_n, !((w == r) && !direction), w, r);
          expect_bit("afull_n", afull_n, !((w == r) && direction), w, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
