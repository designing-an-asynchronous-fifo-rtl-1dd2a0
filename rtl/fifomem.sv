// fifomem: dual-port storage array of the asynchronous FIFO.
//
// 2**ASIZE words of DSIZE bits. The write port is synchronous to wclk: when
// wclken is high on a rising wclk edge, wdata is stored at waddr. The read port
// is combinational: rdata always shows the word at raddr, so the oldest word is
// already on rdata whenever the FIFO is not empty and a read request only has
// to advance the read pointer.
//
// The FIFO needs a dual-port RAM shared by the two clock domains; a synchronous
// write with an asynchronous read (the shape of FPGA distributed RAM) is this
// design's choice. Storage is not reset: a word is only read after it has been
// written.
module fifomem #(
  parameter int unsigned DSIZE = fifo_pkg::FIFO_DSIZE,
  parameter int unsigned ASIZE = fifo_pkg::FIFO_ASIZE
) (
  input  logic             wclk,
  input  logic             wclken,
  input  logic [ASIZE-1:0] waddr,
  input  logic [DSIZE-1:0] wdata,
  input  logic [ASIZE-1:0] raddr,
  output logic [DSIZE-1:0] rdata
);

  localparam int unsigned DEPTH = 1 << ASIZE;

  logic [DSIZE-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (wclken) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
