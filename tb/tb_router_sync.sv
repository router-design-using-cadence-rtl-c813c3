// tb_router_sync: self-checking test of the address synchronizer.
//
// Random controller flags, data words and FIFO flags are applied each cycle.
// A model keeps the latched address (loaded when detect_add and
// packet_valid are both high) and the test compares the one-hot write
// enables, the selected full and empty flags (empty taken from the bus
// address during decoding) and vld_out = not empty.
module tb_router_sync;

  localparam int unsigned DATA_W = router_pkg::DATA_W;
  localparam int unsigned NUM_CH = router_pkg::NUM_CH;
  localparam int unsigned ADDR_W = router_pkg::ADDR_W;

  logic              clock = 1'b0, resetn = 1'b1;
  logic              detect_add = 1'b0, packet_valid = 1'b0, write_enb_reg = 1'b0;
  logic [DATA_W-1:0] data = '0;
  logic [NUM_CH-1:0] full = '0, empty = '1;
  logic [NUM_CH-1:0] write_enb, vld_out;
  logic              fifo_full, fifo_empty;

  router_sync dut (.*);

  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  int n_loads = 0;
  int addr_m = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1 resetn = 1'b0;
    repeat (2) @(negedge clock);
    resetn = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      int bus;
      @(negedge clock);
      detect_add    = $urandom_range(0, 2) == 0;
      packet_valid  = $urandom_range(0, 1);
      write_enb_reg = $urandom_range(0, 1);
      data          = $urandom();
      full          = {$urandom(), $urandom()};
      empty         = {$urandom(), $urandom()};
      bus           = int'(data % NUM_CH);
      #1;
      check(write_enb == (write_enb_reg ? (NUM_CH'(1) << addr_m) : '0),
            $sformatf("write_enb %h, address %0d", write_enb, addr_m));
      check(fifo_full == full[addr_m], "fifo_full");
      check(fifo_empty == empty[detect_add ? bus : addr_m], "fifo_empty");
      check(vld_out == ~empty, "vld_out");
      @(posedge clock);
      if (detect_add && packet_valid) begin addr_m = bus; n_loads++; end
    end
    check(n_loads > 0, "address never loaded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
