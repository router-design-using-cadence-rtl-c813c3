// tb_router_fsm: self-checking test of the input controller.
//
// Random inputs are applied each cycle. The expected next state is looked
// up in a transition list written from the state diagram (each entry: from
// state, condition, to state), and the state-decoded outputs are compared
// with the state. Every transition of the list must be taken at least once.
module tb_router_fsm;

  import router_pkg::*;

  localparam int unsigned DATA_W = router_pkg::DATA_W;

  logic              clock = 1'b0, resetn = 1'b1;
  logic              packet_valid = 1'b0, fifo_full = 1'b0, fifo_empty = 1'b0;
  logic              parity_done = 1'b0, low_packet_valid = 1'b0;
  logic [DATA_W-1:0] data = '0;
  logic suspend_data, write_enb_reg, detect_add, lfd_state, ld_state;
  logic laf_state, full_state, lp_state, rst_int_reg;
  fsm_state_t state;

  router_fsm dut (.*);

  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  int hits [16];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Transition list; the first entry whose condition holds is taken, and a
  // state with no entry that holds stays where it is. Returns the entry
  // index through idx (-1: stay).
  function automatic fsm_state_t expect_next(input fsm_state_t s, output int idx);
    idx = -1;
    case (s)
      DECODE_ADDRESS: begin
        if (packet_valid && fifo_empty)  begin idx = 0;  return LOAD_FIRST_DATA; end
        if (packet_valid && !fifo_empty) begin idx = 1;  return WAIT_TILL_EMPTY; end
      end
      WAIT_TILL_EMPTY:
        if (fifo_empty) begin idx = 2; return LOAD_FIRST_DATA; end
      LOAD_FIRST_DATA: begin idx = 3; return LOAD_DATA; end
      LOAD_DATA: begin
        if (fifo_full)                  begin idx = 4; return FIFO_FULL_STATE; end
        if (!fifo_full && !packet_valid) begin idx = 5; return LOAD_PARITY; end
      end
      FIFO_FULL_STATE:
        if (!fifo_full) begin idx = 6; return LOAD_AFTER_FULL; end
      LOAD_AFTER_FULL: begin
        if (parity_done)                       begin idx = 7; return CHECK_PARITY_ERROR; end
        if (!parity_done && low_packet_valid)  begin idx = 8; return LOAD_PARITY; end
        if (!parity_done && !low_packet_valid) begin idx = 9; return LOAD_DATA; end
      end
      LOAD_PARITY: begin
        if (fifo_full)  begin idx = 10; return FIFO_FULL_STATE; end
        if (!fifo_full) begin idx = 11; return CHECK_PARITY_ERROR; end
      end
      CHECK_PARITY_ERROR: begin idx = 12; return DECODE_ADDRESS; end
      default: ;
    endcase
    return s;
  endfunction

  initial begin
    fsm_state_t exp_s;
    int idx;
    #1 resetn = 1'b0;
    repeat (2) @(negedge clock);
    check(state == DECODE_ADDRESS, "reset state");
    resetn = 1'b1;
    exp_s = DECODE_ADDRESS;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clock);
      packet_valid     = $urandom_range(0, 1);
      fifo_full        = $urandom_range(0, 1);
      fifo_empty       = $urandom_range(0, 1);
      parity_done      = $urandom_range(0, 1);
      low_packet_valid = $urandom_range(0, 1);
      data             = $urandom();
      #1;
      check(state == exp_s, $sformatf("state %s expected %s", state.name(), exp_s.name()));
      check(detect_add  == (state == DECODE_ADDRESS)     &&
            lfd_state   == (state == LOAD_FIRST_DATA)    &&
            ld_state    == (state == LOAD_DATA)          &&
            laf_state   == (state == LOAD_AFTER_FULL)    &&
            full_state  == (state == FIFO_FULL_STATE)    &&
            lp_state    == (state == LOAD_PARITY)        &&
            rst_int_reg == (state == CHECK_PARITY_ERROR), "state flags");
      check(write_enb_reg == (state inside {LOAD_DATA, LOAD_PARITY, LOAD_AFTER_FULL}), "write_enb_reg");
      check(suspend_data == !(state inside {DECODE_ADDRESS, LOAD_DATA}), "suspend_data");
      exp_s = expect_next(exp_s, idx);
      if (idx >= 0) hits[idx]++;
    end
    for (int i = 0; i < 13; i++) check(hits[i] > 0, $sformatf("transition %0d never taken", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
