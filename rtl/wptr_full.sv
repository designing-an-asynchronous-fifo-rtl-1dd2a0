// wptr_full: write pointer and full flag of the asynchronous FIFO (wclk domain).
//
// Pointer: a mixed binary/Gray counter. wbin counts writes in binary and
// addresses the memory (waddr); wptr is a register holding the Gray code of the
// same count, compared against the read pointer by async_cmp. A write is
// accepted when winc is high on a rising wclk edge and the FIFO is not full;
// the accepted write is also the memory write enable (wclken).
//
// Full flag: afull_n from async_cmp falls as soon as the pointers become equal
// while the FIFO is going full. That can only happen when the write pointer
// advances, so it is in step with wclk, and it sets wfull and its companion
// stage at once (asynchronous set). afull_n rises when the read pointer
// advances, which is unrelated to wclk, so the release passes a two-stage
// synchroniser: wfull falls on the second rising wclk edge after afull_n has
// gone high. The write-domain reset clears the flag immediately.
//
// Timing: wptr/waddr change one wclk edge after an accepted write; wfull rises
// with no clock after the write that fills the last word and falls 2 wclk edges
// after the read that frees one.
//
// The flag pair is a flip-flop with an asynchronous clear (wrst_n) and an
// asynchronous set (afull_n), clear first, as the real circuit has.
//
// All of this follows the FIFO's design; addressing the memory with the binary
// count is this design's choice.
module wptr_full #(
  parameter int unsigned ASIZE = fifo_pkg::FIFO_ASIZE
) (
  input  logic             wclk,
  input  logic             wrst_n,   // write-domain reset, active low, asynchronous
  input  logic             winc,     // write request
  input  logic             afull_n,  // asynchronous "pointers equal, going full", active low
  output logic             wfull,    // full flag, synchronous release
  output logic             wclken,   // accepted write: memory write enable
  output logic [ASIZE-1:0] waddr,    // memory write address (binary)
  output logic [ASIZE-1:0] wptr      // write pointer, Gray code
);

  import fifo_pkg::*;

  logic [ASIZE-1:0] wbin, wbin_next, wgray_next;
  logic             wfull2;

  always_comb begin
    wclken     = winc && !wfull;
    wbin_next  = wbin + ASIZE'(wclken);
    wgray_next = ASIZE'(bin2gray(32'(wbin_next)));
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0;
      wptr <= '0;
    end else begin
      wbin <= wbin_next;
      wptr <= wgray_next;
      // The Gray write pointer moves by at most one bit per clock.
      assert ($countones(wptr ^ wgray_next) <= 1)
        else $error("Gray write pointer changed by more than one bit");
    end
  end

  assign waddr = wbin;

  // Reset clears the flag; afull_n sets it; release is synchronised to wclk.
  always_ff @(posedge wclk or negedge wrst_n or negedge afull_n) begin
    if (!wrst_n) begin
      wfull  <= 1'b0;
      wfull2 <= 1'b0;
    end else if (!afull_n) begin
      wfull  <= 1'b1;
      wfull2 <= 1'b1;
    end else begin
      wfull2 <= 1'b0;
      wfull  <= wfull2;
    end
  end

endmodule
