// fifo_shift_top: the asynchronous FIFO and the two shift registers side by side.
//
// The three circuits are independent: the asynchronous FIFO (fifo2, 64 x 32
// bits by default, wclk and rclk domains), the 4-bit falling-edge
// parallel-in/parallel-out right shifter (shreg_pipo) and the 3-bit load and
// left/right shifter (shreg_lr). Each keeps its own ports, prefixed fifo_, pipo_
// and lr_; nothing is shared between them but this wrapper. Timing is that of
// each block.
module fifo_shift_top #(
  parameter int unsigned DSIZE      = fifo_pkg::FIFO_DSIZE,
  parameter int unsigned ASIZE      = fifo_pkg::FIFO_ASIZE,
  parameter int unsigned PIPO_WIDTH = 4,
  parameter int unsigned LR_WIDTH   = 3
) (
  // Asynchronous FIFO
  input  logic                  fifo_wclk,
  input  logic                  fifo_wrst_n,
  input  logic                  fifo_winc,
  input  logic [DSIZE-1:0]      fifo_wdata,
  output logic                  fifo_wfull,
  input  logic                  fifo_rclk,
  input  logic                  fifo_rrst_n,
  input  logic                  fifo_rinc,
  output logic [DSIZE-1:0]      fifo_rdata,
  output logic                  fifo_rempty,
  // Parallel-in/parallel-out right shifter
  input  logic                  pipo_clk,
  input  logic                  pipo_ld_shn,
  input  logic                  pipo_ser,
  input  logic [PIPO_WIDTH-1:0] pipo_d,
  input  logic                  pipo_oc_n,
  output logic [PIPO_WIDTH-1:0] pipo_q,
  output logic                  pipo_q_oe,
  output logic                  pipo_qd_cas,
  // Load and left/right shifter
  input  logic                  lr_clk,
  input  logic                  lr_sh_ldn,
  input  logic                  lr_l_nr,
  input  logic                  lr_sr,
  input  logic                  lr_sl,
  input  logic [LR_WIDTH-1:0]   lr_d,
  output logic [LR_WIDTH-1:0]   lr_q,
  output logic                  lr_sr_cas,
  output logic                  lr_sl_cas
);

  fifo2 #(.DSIZE(DSIZE), .ASIZE(ASIZE)) u_fifo (
    .wclk  (fifo_wclk),
    .wrst_n(fifo_wrst_n),
    .winc  (fifo_winc),
    .wdata (fifo_wdata),
    .wfull (fifo_wfull),
    .rclk  (fifo_rclk),
    .rrst_n(fifo_rrst_n),
    .rinc  (fifo_rinc),
    .rdata (fifo_rdata),
    .rempty(fifo_rempty)
  );

  shreg_pipo #(.WIDTH(PIPO_WIDTH)) u_pipo (
    .clk   (pipo_clk),
    .ld_shn(pipo_ld_shn),
    .ser   (pipo_ser),
    .d     (pipo_d),
    .oc_n  (pipo_oc_n),
    .q     (pipo_q),
    .q_oe  (pipo_q_oe),
    .qd_cas(pipo_qd_cas)
  );

  shreg_lr #(.WIDTH(LR_WIDTH)) u_lr (
    .clk   (lr_clk),
    .sh_ldn(lr_sh_ldn),
    .l_nr  (lr_l_nr),
    .sr    (lr_sr),
    .sl    (lr_sl),
    .d     (lr_d),
    .q     (lr_q),
    .sr_cas(lr_sr_cas),
    .sl_cas(lr_sl_cas)
  );

endmodule
