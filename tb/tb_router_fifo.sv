// tb_router_fifo: self-checking test of one output FIFO.
//
// Random writes and reads (both, either or none per cycle) are applied to a
// FIFO of the default size, and every output is compared each cycle with a
// queue model: data_out after each read, and full and empty. Writes while
// full and reads while empty must be refused; both cases and a simultaneous
// read and write must occur.
module tb_router_fifo;

  localparam int unsigned DATA_W = router_pkg::DATA_W;
  localparam int unsigned DEPTH  = router_pkg::FIFO_DEPTH;

  logic              clock = 1'b0, resetn = 1'b1;
  logic              write_enb = 1'b0, read_enb = 1'b0;
  logic [DATA_W-1:0] data_in = '0, data_out;
  logic              full, empty;

  router_fifo dut (.*);

  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  int n_wr_full = 0, n_rd_empty = 0, n_both = 0;
  logic [DATA_W-1:0] q[$];
  logic [DATA_W-1:0] last_out = '0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1 resetn = 1'b0;
    repeat (2) @(negedge clock);
    resetn = 1'b1;
    check(empty && !full && data_out == '0, "state after reset");
    for (int t = 0; t < 4000; t++) begin
      int bias;
      @(negedge clock);
      // alternate between filling and draining phases
      bias = ((t / 100) % 2 == 0) ? 3 : 1;
      write_enb = ($urandom_range(0, 3) < bias);
      read_enb  = ($urandom_range(0, 3) >= bias);
      if ($urandom_range(0, 9) == 0) begin write_enb = 1'b1; read_enb = 1'b1; end
      data_in   = $urandom();
      check(full == (q.size() == DEPTH), "full flag");
      check(empty == (q.size() == 0), "empty flag");
      if (write_enb && full) n_wr_full++;
      if (read_enb && empty) n_rd_empty++;
      if (write_enb && read_enb && !full && !empty) n_both++;
      begin
        logic rd_ok, wr_ok;
        rd_ok = read_enb && q.size() != 0;
        wr_ok = write_enb && q.size() != DEPTH;
        if (rd_ok) last_out = q.pop_front();
        if (wr_ok) q.push_back(data_in);
      end
      @(posedge clock);
      #1 check(data_out == last_out, $sformatf("data_out %h expected %h", data_out, last_out));
    end
    check(n_wr_full > 0 && n_rd_empty > 0 && n_both > 0, "corner cases not reached");
    $display("write-when-full=%0d read-when-empty=%0d read+write=%0d", n_wr_full, n_rd_empty, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
