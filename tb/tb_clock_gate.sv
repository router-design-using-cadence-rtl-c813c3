// tb_clock_gate: self-checking test of the FIFO clock gate.
//
// The enable is changed at random times between clock edges, also while
// the clock is high. The
// test counts rising edges of gclk and checks each one against the value the
// enable had just before the matching rising edge of clk, and checks that
// gclk is low whenever clk is low and never has a pulse shorter than the
// clk high phase.
module tb_clock_gate;

  logic clk = 1'b0, en = 1'b0, gclk;

  clock_gate dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_pass = 0, n_block = 0, n_mid_change = 0;
  logic en_at_edge;
  realtime rise_t;
  logic    rose = 1'b0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // random enable changes at any time within the period
  initial begin
    forever begin
      #($urandom_range(1, 9));
      if ($time % 5 == 0) #1;  // never at a clock edge
      if (clk) n_mid_change++;
      en = $urandom_range(0, 1);
    end
  end

  always @(posedge clk) begin
    en_at_edge = en;  // sampled before the gate can react
    #1;
    check(gclk == en_at_edge, $sformatf("gclk=%0b with enable %0b at the edge", gclk, en_at_edge));
    if (en_at_edge) n_pass++; else n_block++;
    #3 check(gclk == en_at_edge, "gclk changed during the high phase");
  end

  always @(negedge clk) begin
    #1 check(gclk == 1'b0, "gclk high while clk low");
  end

  always @(posedge gclk) begin rise_t = $realtime; rose = 1'b1; end
  always @(negedge gclk) if (rose) check($realtime - rise_t >= 5.0, "short gclk pulse");

  initial begin
    repeat (2000) @(posedge clk);
    check(n_pass > 0 && n_block > 0 && n_mid_change > 0, "cases not reached");
    $display("passed=%0d blocked=%0d enable_changes_while_high=%0d", n_pass, n_block, n_mid_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
