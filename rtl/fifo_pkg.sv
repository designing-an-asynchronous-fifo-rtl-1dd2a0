// fifo_pkg: constants and helper functions shared by the asynchronous FIFO.
//
// The default geometry is 64 words of 32 bits, the configuration the FIFO is
// evaluated with. The Gray-code helpers are used by the mixed binary/Gray
// pointer counters: the counter increments in plain binary (so the ordinary
// ripple-carry adder does the work) and the Gray value is derived from the
// binary one, g = b ^ (b >> 1), so that consecutive pointer values differ in a
// single bit.
package fifo_pkg;

  // Default data width (bits per word).
  parameter int unsigned FIFO_DSIZE = 32;
  // Default address width: 2**6 = 64 words.
  parameter int unsigned FIFO_ASIZE = 6;

  // Binary to reflected Gray code for a pointer of width w (w <= 32).
  function automatic logic [31:0] bin2gray(input logic [31:0] b);
    return b ^ (b >> 1);
  endfunction

  // Reflected Gray code to binary: each binary bit is the XOR of all Gray
  // bits at and above it.
  function automatic logic [31:0] gray2bin(input logic [31:0] g, input int unsigned w);
    logic [31:0] b;
    b = '0;
    for (int i = 31; i >= 0; i--) begin
      if (i == 31) b[i] = (i < w) ? g[i] : 1'b0;
      else         b[i] = (i < w) ? (b[i+1] ^ g[i]) : 1'b0;
    end
    return b;
  endfunction

endpackage
