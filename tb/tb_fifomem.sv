// tb_fifomem: self-checking test of the FIFO storage array.
//
// Writes a generated word to every address (in a scrambled order), checks that
// each reads back combinationally through the read port, then checks that a
// clock edge with wclken low leaves the array unchanged and that a second pass
// of writes overwrites every word.
module tb_fifomem;
  localparam int unsigned DSIZE = 32;
  localparam int unsigned ASIZE = 6;
  localparam int unsigned DEPTH = 1 << ASIZE;

  logic             wclk = 1'b0;
  logic             wclken;
  logic [ASIZE-1:0] waddr, raddr;
  logic [DSIZE-1:0] wdata, rdata;
  logic [DSIZE-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  fifomem #(.DSIZE(DSIZE), .ASIZE(ASIZE)) dut (.*);

  always #5 wclk = ~wclk;

  function automatic logic [DSIZE-1:0] pattern(int pass, int a);
    return DSIZE'(32'h9E37_79B9 * (a + 1) + 32'h0101_0101 * pass);
  endfunction

  task automatic check_all(string what);
    for (int a = 0; a < DEPTH; a++) begin
      raddr = ASIZE'(a);
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL %s: addr %0d read %h expected %h", what, a, rdata, model[a]);
      end
    end
  endtask

  initial begin
    wclken = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < DEPTH; i++) begin
        int a;
        a = (i * 37 + pass * 11) % DEPTH;
        @(negedge wclk);
        wclken = 1'b1; waddr = ASIZE'(a); wdata = pattern(pass, a);
        model[a] = wdata;
      end
      @(negedge wclk);
      wclken = 1'b0;
      check_all("write pass");
      // Edges with the enable low must not write.
      for (int i = 0; i < 4; i++) begin
        @(negedge wclk);
        waddr = ASIZE'(i * 5); wdata = ~pattern(pass, i);
      end
      @(negedge wclk);
      check_all("disabled write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge wclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
