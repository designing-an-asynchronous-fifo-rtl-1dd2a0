// tb_shreg_lr: self-checking test of the 3-stage load and left/right shift
// register.
//
// Loads a pattern, shifts it right (SR -> QA -> QB -> QC -> sr_cas) and left
// (SL -> QC -> QB -> QA -> sl_cas) and then runs random load/shift cycles
// against a bit-level reference that moves each bit to its neighbour. A second
// register is chained to the right of the first through the cascade pins, so
// the pair is checked as one 6-bit shifter in both directions.
module tb_shreg_lr;
  localparam int unsigned WIDTH = 3;

  logic clk = 1'b0, sh_ldn, l_nr, sr;
  logic sl;
  logic [WIDTH-1:0] d, q;
  logic sr_cas, sl_cas;
  logic [WIDTH-1:0] model;
  int checks = 0, failures = 0;
  int n_load = 0, n_right = 0, n_left = 0;

  shreg_lr #(.WIDTH(WIDTH)) dut (.*);

  // A second register to the right of the first, chained both ways: it takes
  // sr from the first one's sr_cas, and its sl_cas feeds the first one's sl
  // giving a 6-bit left/right shifter.
  logic [WIDTH-1:0] d2, q2, model2;
  logic sr2_cas, sl2_cas, sl2_in;
  assign sl = sl2_cas;
  shreg_lr #(.WIDTH(WIDTH)) dut2 (
    .clk(clk), .sh_ldn(sh_ldn), .l_nr(l_nr), .sr(sr_cas), .sl(sl2_in), .d(d2),
    .q(q2), .sr_cas(sr2_cas), .sl_cas(sl2_cas)
  );

  always #5 clk = ~clk;

  task automatic expect_state(string what);
    checks++;
    if (q !== model || sr_cas !== model[WIDTH-1] || sl_cas !== model[0] || q2 !== model2) begin
      failures++;
      $display("FAIL %s: q %b expected %b (sr_cas %b sl_cas %b)", what, q, model, sr_cas, sl_cas);
    end
  endtask

  task automatic clock_once(logic shn, logic dir_r, logic in_r, logic in_l,
                            logic [WIDTH-1:0] data);
    logic [WIDTH-1:0] nxt, nxt2;
    // In the chained pair, the first register's sl comes from the second's sl_cas.
    sh_ldn = shn; l_nr = dir_r; sr = in_r; sl2_in = in_l; d = data; d2 = ~data;
    @(posedge clk);
    if (!shn) begin
      nxt = data; nxt2 = ~data; n_load++;
    end else if (dir_r) begin
      nxt[0] = in_r;
      for (int i = 1; i < WIDTH; i++) nxt[i] = model[i-1];
      nxt2[0] = model[WIDTH-1];
      for (int i = 1; i < WIDTH; i++) nxt2[i] = model2[i-1];
      n_right++;
    end else begin
      nxt2[WIDTH-1] = in_l;
      for (int i = 0; i < WIDTH - 1; i++) nxt2[i] = model2[i+1];
      nxt[WIDTH-1] = model2[0];
      for (int i = 0; i < WIDTH - 1; i++) nxt[i] = model[i+1];
      n_left++;
    end
    model = nxt;
    model2 = nxt2;
    #1;
  endtask

  initial begin
    @(negedge clk);
    clock_once(1'b0, 1'b1, 1'b0, 1'b0, 3'b001);   // load QA=1
    expect_state("load");
    clock_once(1'b1, 1'b1, 1'b0, 1'b0, 3'b000);   // right: QB=1
    expect_state("right 1");
    clock_once(1'b1, 1'b1, 1'b1, 1'b0, 3'b000);   // right: QC=1, QA=SR=1
    expect_state("right 2");
    clock_once(1'b1, 1'b0, 1'b0, 1'b0, 3'b000);   // left
    expect_state("left 1");
    clock_once(1'b1, 1'b0, 1'b0, 1'b1, 3'b000);   // left, SL=1
    expect_state("left 2");
    for (int i = 0; i < 300; i++) begin
      clock_once(1'($urandom_range(0, 4) != 0), 1'($urandom), 1'($urandom), 1'($urandom),
                 WIDTH'($urandom));
      expect_state("random");
    end
    checks++;
    if (n_load == 0 || n_right == 0 || n_left == 0) begin
      failures++; $display("FAIL a mode was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
