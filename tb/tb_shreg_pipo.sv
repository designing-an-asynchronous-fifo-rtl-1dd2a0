// tb_shreg_pipo: self-checking test of the 4-stage parallel-in/parallel-out
// right-shift register.
//
// Loads the data pattern DA..DD = 1,0,1,1, shifts it right with the serial
// input grounded (the loaded bits move QA -> QD and leave through the cascade
// output after four clocks), then runs random load/shift cycles against a
// bit-level reference. Also checks that nothing changes on the rising edge
// and that the output control only affects q_oe. A second register is
// cascaded from the first (its SER driven by QD'), so the shifted-out word must
// arrive in it intact, forming an 8-bit shifter.
module tb_shreg_pipo;
  localparam int unsigned WIDTH = 4;

  logic clk = 1'b1, ld_shn, ser, oc_n;
  logic [WIDTH-1:0] d, q;
  logic q_oe, qd_cas;
  logic [WIDTH-1:0] model;
  int checks = 0, failures = 0;

  shreg_pipo #(.WIDTH(WIDTH)) dut (.*);

  // A second register cascaded from the first: its SER is the first one's QD'.
  logic [WIDTH-1:0] d2, q2, model2;
  logic q2_oe, qd2_cas;
  shreg_pipo #(.WIDTH(WIDTH)) dut2 (
    .clk(clk), .ld_shn(ld_shn), .ser(qd_cas), .d(d2), .oc_n(oc_n),
    .q(q2), .q_oe(q2_oe), .qd_cas(qd2_cas)
  );

  always #5 clk = ~clk;

  task automatic expect_state(string what);
    checks++;
    if (q !== model || qd_cas !== model[WIDTH-1] || q_oe !== !oc_n || q2 !== model2) begin
      failures++;
      $display("FAIL %s: q %b qd_cas %b q_oe %b expected q %b oe %b", what, q, qd_cas,
               q_oe, model, !oc_n);
    end
  endtask

  // One falling edge with the given controls; reference updated bit by bit.
  task automatic clock_once(logic ld, logic s, logic [WIDTH-1:0] data);
    logic [WIDTH-1:0] nxt, nxt2;
    ld_shn = ld; ser = s; d = data; d2 = ~data;
    @(negedge clk);
    if (ld) begin
      nxt = data;
      nxt2 = ~data;
    end else begin
      nxt[0] = s;
      for (int i = 1; i < WIDTH; i++) nxt[i] = model[i-1];
      nxt2[0] = model[WIDTH-1];
      for (int i = 1; i < WIDTH; i++) nxt2[i] = model2[i-1];
    end
    model = nxt;
    model2 = nxt2;
    #1;
  endtask

  initial begin
    oc_n = 1'b0; ld_shn = 1'b1; ser = 1'b0; d = '0; d2 = '0;
    @(posedge clk); #1;
    // Load DA=1, DB=0, DC=1, DD=1 (d[0] is DA).
    clock_once(1'b1, 1'b0, 4'b1101);
    expect_state("load");
    // Nothing happens on a rising edge.
    ld_shn = 1'b0; ser = 1'b1;
    @(posedge clk); #1;
    expect_state("rising edge ignored");
    // Shift right four times with SER grounded: the word leaves through QD.
    for (int i = 0; i < WIDTH; i++) begin
      clock_once(1'b0, 1'b0, 4'b0000);
      expect_state("shift right");
    end
    checks++;
    if (q !== '0) begin failures++; $display("FAIL word did not leave"); end
    checks++;
    if (q2 !== 4'b1101) begin failures++; $display("FAIL word not passed to the cascaded register"); end
    // Output control.
    oc_n = 1'b1; #1 expect_state("outputs disabled");
    clock_once(1'b1, 1'b0, 4'b0110);
    expect_state("load while disabled");
    oc_n = 1'b0; #1 expect_state("outputs enabled");
    // Random operation.
    for (int i = 0; i < 300; i++) begin
      oc_n = 1'($urandom_range(0, 4) == 0);
      clock_once(1'($urandom_range(0, 3) == 0), 1'($urandom), WIDTH'($urandom));
      expect_state("random");
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
