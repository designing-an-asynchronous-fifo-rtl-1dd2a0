// tb_direction_latch: self-checking test of the direction set/reset latch.
//
// Applies a table of set/clear steps and checks after each that the latch
// follows the rule: clear wins, set sets, neither holds the last value.
module tb_direction_latch;
  logic dir_set, dir_clr, direction;
  logic model;
  int checks = 0, failures = 0;

  direction_latch dut (.*);

  task automatic step(logic s, logic c);
    dir_set = s; dir_clr = c;
    #1;
    if (c)      model = 1'b0;
    else if (s) model = 1'b1;
    checks++;
    if (direction !== model) begin
      failures++;
      $display("FAIL set %0b clr %0b: direction %0b expected %0b", s, c, direction, model);
    end
  endtask

  initial begin
    step(1'b0, 1'b1);   // reset clears
    step(1'b0, 1'b0);   // hold 0
    step(1'b1, 1'b0);   // set
    step(1'b0, 1'b0);   // hold 1
    step(1'b0, 1'b0);
    step(1'b1, 1'b1);   // clear has priority
    step(1'b0, 1'b0);   // hold 0
    step(1'b1, 1'b0);
    step(1'b1, 1'b0);
    step(1'b0, 1'b0);
    step(1'b0, 1'b1);
    step(1'b0, 1'b0);
    for (int i = 0; i < 200; i++) step(1'($urandom), 1'($urandom_range(0, 3) == 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
