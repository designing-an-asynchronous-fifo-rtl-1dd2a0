// rptr_empty: read pointer and empty flag of the asynchronous FIFO (rclk domain).
//
// Pointer: a mixed binary/Gray counter. rbin counts reads in binary and
// addresses the memory (raddr); rptr is a register holding the Gray code of the
// same count, which is what async_cmp compares with the write pointer. A read
// is accepted when rinc is high on a rising rclk edge and the FIFO is not
// empty; both registers then advance together on that edge.
//
// Empty flag: aempty_n from async_cmp falls as soon as the pointers become
// equal while the FIFO is going empty. That can only happen when the read
// pointer advances, so it is already in step with rclk, and it sets rempty and
// its companion stage at once (asynchronous set). aempty_n rises when the write
// pointer advances, which is unrelated to rclk, so its release is passed through
// a two-stage synchroniser: rempty falls on the second rising rclk edge after
// aempty_n has gone high. The read-domain reset also sets the flag, so the FIFO
// reads as empty from reset on.
//
// Timing: rptr/raddr change one rclk edge after an accepted read; rempty rises
// with no clock (after the read that empties the FIFO) and falls 2 rclk edges
// after the write that ends the empty state.
//
// The binary/Gray counter, the immediate set and the two-stage release follow
// the FIFO's design; addressing the memory with the binary count and letting
// rrst_n also set the flag are this design's choices.
module rptr_empty #(
  parameter int unsigned ASIZE = fifo_pkg::FIFO_ASIZE
) (
  input  logic             rclk,
  input  logic             rrst_n,    // read-domain reset, active low, asynchronous
  input  logic             rinc,      // read request
  input  logic             aempty_n,  // asynchronous "pointers equal, going empty", active low
  output logic             rempty,    // empty flag, synchronous release
  output logic [ASIZE-1:0] raddr,     // memory read address (binary)
  output logic [ASIZE-1:0] rptr       // read pointer, Gray code
);

  import fifo_pkg::*;

  logic [ASIZE-1:0] rbin, rbin_next, rgray_next;
  logic             rempty2;
  logic             rset_n;

  always_comb begin
    rbin_next  = rbin + ASIZE'(rinc && !rempty);
    rgray_next = ASIZE'(bin2gray(32'(rbin_next)));
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0;
      rptr <= '0;
    end else begin
      rbin <= rbin_next;
      rptr <= rgray_next;
      // The Gray read pointer moves by at most one bit per clock.
      assert ($countones(rptr ^ rgray_next) <= 1)
        else $error("Gray read pointer changed by more than one bit");
    end
  end

  assign raddr = rbin;

  // Asynchronous set of the empty flag and its synchroniser stage.
  assign rset_n = aempty_n && rrst_n;

  always_ff @(posedge rclk or negedge rset_n) begin
    if (!rset_n) begin
      rempty  <= 1'b1;
      rempty2 <= 1'b1;
    end else begin
      rempty2 <= 1'b0;
      rempty  <= rempty2;
    end
  end

endmodule
