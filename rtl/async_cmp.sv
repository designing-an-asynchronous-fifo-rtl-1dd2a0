// async_cmp: asynchronous comparison of the FIFO's write and read pointers.
//
// Both pointers are ASIZE-bit Gray codes from different clock domains; they
// are compared directly, without synchronisers, so this block is purely
// combinational. Because each pointer changes one bit at a time, the decode
// below only ever moves from one valid result to the next.
//
// Quadrant decode: the two MSBs of a Gray pointer (00, 01, 11, 10) name the
// quadrant of the address space it is in. Converting them to a 2-bit binary
// quadrant number q, the write pointer being exactly one quadrant behind the
// read pointer (rq - wq == 1 mod 4) means the FIFO is possibly going full and
// raises dir_set; the write pointer being one quadrant ahead (wq - rq == 1 mod
// 4) means it is possibly going empty and raises dir_clr. The write-domain
// reset also raises dir_clr. The direction bit itself is held by a separate
// latch (direction_latch) and comes back in as `direction`.
//
// When the pointers are equal the FIFO is either empty or full; the direction
// bit decides which: aempty_n falls when they are equal and direction is 0,
// afull_n falls when they are equal and direction is 1. Both outputs are
// asynchronous: they are set and released by pointer changes in either clock
// domain and are made safe by the flag logic in rptr_empty and wptr_full.
//
// Pointer comparison and the two-MSB quadrant decode follow the FIFO's design;
// expressing the decode as a modular quadrant difference is this design's own
// formulation.
module async_cmp #(
  parameter int unsigned ASIZE = fifo_pkg::FIFO_ASIZE
) (
  input  logic [ASIZE-1:0] wptr,      // write pointer, Gray code (wclk domain)
  input  logic [ASIZE-1:0] rptr,      // read pointer, Gray code (rclk domain)
  input  logic             wrst_n,    // write-domain reset, active low
  input  logic             direction, // 1: going full, 0: going empty
  output logic             dir_set,   // write pointer one quadrant behind read pointer
  output logic             dir_clr,   // write pointer one quadrant ahead, or reset
  output logic             aempty_n,  // pointers equal while going empty (active low)
  output logic             afull_n    // pointers equal while going full (active low)
);

  // The quadrant decode needs two pointer MSBs.
  if (ASIZE < 2) begin : g_bad_asize
    $error("async_cmp: ASIZE must be at least 2");
  end

  logic [1:0] wq, rq;      // quadrant numbers (binary) of the two pointers
  logic [1:0] w_behind;    // rq - wq (mod 4)
  logic [1:0] w_ahead;     // wq - rq (mod 4)
  logic       ptr_equal;

  always_comb begin
    wq       = {wptr[ASIZE-1], wptr[ASIZE-1] ^ wptr[ASIZE-2]};
    rq       = {rptr[ASIZE-1], rptr[ASIZE-1] ^ rptr[ASIZE-2]};
    w_behind = rq - wq;
    w_ahead  = wq - rq;
    dir_set  = (w_behind == 2'd1);
    dir_clr  = (w_ahead == 2'd1) || !wrst_n;
    ptr_equal = (wptr == rptr);
    aempty_n = !(ptr_equal && !direction);
    afull_n  = !(ptr_equal && direction);
  end

endmodule
