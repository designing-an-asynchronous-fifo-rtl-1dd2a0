// shreg_lr: universal shift register with parallel load and left/right shift.
//
// WIDTH flip-flops QA..QC (q[0] = QA, q[WIDTH-1] = QC) clocked on the rising
// edge of clk. Each flip-flop has a 3-way AND-OR multiplexer in front of it:
//   sh_ldn = 0           parallel load: q <= d (d[0] = DA)
//   sh_ldn = 1, l_nr = 1 shift right: data enters at sr into QA, moves
//                        QA -> QB -> QC and leaves at sr_cas (= QC)
//   sh_ldn = 1, l_nr = 0 shift left: data enters at sl into QC, moves
//                        QC -> QB -> QA and leaves at sl_cas (= QA)
// sr_cas and sl_cas connect to the sr and sl inputs of neighbouring registers
// to build longer shifters. There is no hold mode: every clock edge loads or
// shifts.
//
// The three multiplexer paths, their control encoding and the cascade
// connections follow the shift-register description. The rising clock edge
// and the absence of a clear input are this design's choices.
module shreg_lr #(
  parameter int unsigned WIDTH = 3
) (
  input  logic             clk,
  input  logic             sh_ldn,  // 1: shift, 0: parallel load
  input  logic             l_nr,    // 1: shift right, 0: shift left
  input  logic             sr,      // serial input for right shift (into QA)
  input  logic             sl,      // serial input for left shift (into QC)
  input  logic [WIDTH-1:0] d,       // parallel data, d[0] = DA
  output logic [WIDTH-1:0] q,       // outputs, q[0] = QA
  output logic             sr_cas,  // right-shift cascade output (QC)
  output logic             sl_cas   // left-shift cascade output (QA)
);

  always_ff @(posedge clk) begin
    if (!sh_ldn)   q <= d;
    else if (l_nr) q <= {q[WIDTH-2:0], sr};
    else           q <= {sl, q[WIDTH-1:1]};
  end

  assign sr_cas = q[WIDTH-1];
  assign sl_cas = q[0];

endmodule
