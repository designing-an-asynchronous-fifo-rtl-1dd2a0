// fifo2: asynchronous FIFO using asynchronous pointer comparison.
//
// Words are written in the wclk domain and read in the rclk domain; the two
// clocks are unrelated. Instead of synchronising each pointer into the other
// domain, the Gray-coded write and read pointers are compared directly
// (async_cmp). Equal pointers mean empty or full; a direction latch, set when
// the write pointer comes within one quadrant behind the read pointer and
// cleared when it is one quadrant ahead (or on reset), tells the two apart. The
// resulting asynchronous aempty_n/afull_n are turned into rempty (rclk domain)
// and wfull (wclk domain), each set immediately and released through two
// flip-flops of its own domain. The whole 2**ASIZE-word memory is usable: the
// pointers carry no extra wrap bit.
//
// Interface: a write is accepted on a rising wclk edge with winc high and
// wfull low; a read on a rising rclk edge with rinc high and rempty low. rdata
// shows the oldest word whenever rempty is low (first-word fall-through).
// Requests made while full or empty are ignored. wrst_n and rrst_n are
// asynchronous, active low, and are meant to be asserted together.
//
// Timing: a written word becomes readable 2 to 3 rclk edges after the write
// edge (empty release through two flops); a freed slot becomes writable 2 to 3
// wclk edges after the read edge.
//
// The structure (memory, comparator, direction latch, pointer/flag blocks and
// this wrapper) and the 64 x 32-bit default follow the FIFO's design.
module fifo2 #(
  parameter int unsigned DSIZE = fifo_pkg::FIFO_DSIZE,
  parameter int unsigned ASIZE = fifo_pkg::FIFO_ASIZE
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             winc,
  input  logic [DSIZE-1:0] wdata,
  output logic             wfull,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rinc,
  output logic [DSIZE-1:0] rdata,
  output logic             rempty
);

  logic [ASIZE-1:0] wptr, rptr, waddr, raddr;
  logic             wclken;
  logic             aempty_n, afull_n;
  logic             dir_set, dir_clr, direction;

  fifomem #(.DSIZE(DSIZE), .ASIZE(ASIZE)) u_mem (
    .wclk  (wclk),
    .wclken(wclken),
    .waddr (waddr),
    .wdata (wdata),
    .raddr (raddr),
    .rdata (rdata)
  );

  async_cmp #(.ASIZE(ASIZE)) u_cmp (
    .wptr     (wptr),
    .rptr     (rptr),
    .wrst_n   (wrst_n),
    .direction(direction),
    .dir_set  (dir_set),
    .dir_clr  (dir_clr),
    .aempty_n (aempty_n),
    .afull_n  (afull_n)
  );

  direction_latch u_dir (
    .dir_set  (dir_set),
    .dir_clr  (dir_clr),
    .direction(direction)
  );

  rptr_empty #(.ASIZE(ASIZE)) u_rptr (
    .rclk    (rclk),
    .rrst_n  (rrst_n),
    .rinc    (rinc),
    .aempty_n(aempty_n),
    .rempty  (rempty),
    .raddr   (raddr),
    .rptr    (rptr)
  );

  wptr_full #(.ASIZE(ASIZE)) u_wptr (
    .wclk   (wclk),
    .wrst_n (wrst_n),
    .winc   (winc),
    .afull_n(afull_n),
    .wfull  (wfull),
    .wclken (wclken),
    .waddr  (waddr),
    .wptr   (wptr)
  );

endmodule
