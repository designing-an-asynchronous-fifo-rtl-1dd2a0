// direction_latch: set/reset latch holding the FIFO's fill direction.
//
// direction = 1 means the FIFO is possibly going full (the write pointer was
// last seen one quadrant behind the read pointer), 0 means it is possibly going
// empty. dir_clr (which includes the write-domain reset) has priority over
// dir_set; with neither active the latch holds. There is no clock: the latch
// follows the asynchronous pointer comparison directly, and because the two
// quadrant conditions can never be true at the same time, when it is set or
// cleared does not matter for correctness, only that it is.
//
// The direction latch and its reset clearing follow the FIFO's design. It is
// kept out of the comparator so that async_cmp stays purely combinational.
// This block is an intentional level-sensitive latch; a latch warning from a
// tool describes exactly this storage element.
module direction_latch (
  input  logic dir_set,   // possibly going full
  input  logic dir_clr,   // possibly going empty, or reset
  output logic direction
);

  always_latch begin
    if (dir_clr)      direction = 1'b0;
    else if (dir_set) direction = 1'b1;
  end

endmodule
