// shreg_pipo: parallel-in/parallel-out right-shift register (74LS395 style).
//
// WIDTH flip-flops QA..QD (q[0] = QA is the input end, q[WIDTH-1] = QD the
// output end), all clocked on the falling edge of clk. A 2-way AND-OR
// multiplexer in front of each flip-flop is steered by ld_shn:
//   ld_shn = 1  parallel load: q <= d (d[0] = DA ... d[WIDTH-1] = DD)
//   ld_shn = 0  shift right:   QA <= ser, QB <= QA, QC <= QB, QD <= QC
// After WIDTH shifts the loaded word has left the register through QD.
// qd_cas is QD straight from the last flip-flop; it feeds the ser input of a
// following register to cascade several of them, and is not affected by the
// output enable.
//
// The parallel outputs of the real part are three-state and enabled when oc_n
// is low. Here q always carries the register contents and q_oe = !oc_n is the
// enable to be applied by the pad or bus driver; q_oe does not affect the
// internal flip-flops.
//
// Load/shift selection, falling-edge clocking, the serial input, the cascade
// output and the output control follow the shift-register description; the
// separate enable output in place of a built-in three-state buffer and the
// absence of a clear input are this design's choices.
module shreg_pipo #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,     // active on the falling edge
  input  logic             ld_shn,  // 1: parallel load, 0: shift right
  input  logic             ser,     // serial data into QA
  input  logic [WIDTH-1:0] d,       // parallel data, d[0] = DA
  input  logic             oc_n,    // output control, active low
  output logic [WIDTH-1:0] q,       // parallel outputs, q[0] = QA
  output logic             q_oe,    // parallel outputs enabled
  output logic             qd_cas   // cascade output (last stage)
);

  logic [WIDTH-1:0] stage;

  always_ff @(negedge clk) begin
    if (ld_shn) stage <= d;
    else        stage <= {stage[WIDTH-2:0], ser};
  end

  assign q      = stage;
  assign q_oe   = !oc_n;
  assign qd_cas = stage[WIDTH-1];

endmodule
