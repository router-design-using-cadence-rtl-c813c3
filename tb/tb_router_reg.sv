// tb_router_reg: self-checking test of the input datapath register.
//
// The controller is replaced by a script that walks through legal state
// sequences for whole packets: header decode, first data, payload words
// with the FIFO full at random moments (each followed by FIFO_FULL_STATE and
// LOAD_AFTER_FULL), the parity word, LOAD_PARITY and CHECK_PARITY_ERROR.
// The test collects the words that would be written into the FIFO (dout in
// a write state with fifo_full low) and compares them, in order, with the
// packet that was sent; it compares err with the parity it sent, and checks
// low_packet_valid and parity_done at the end of each packet.
module tb_router_reg;

  localparam int unsigned DATA_W = router_pkg::DATA_W;

  logic              clock = 1'b0, resetn = 1'b1;
  logic              packet_valid = 1'b0, fifo_full = 1'b0;
  logic [DATA_W-1:0] data = '0, dout;
  logic detect_add = 1'b0, lfd_state = 1'b0, ld_state = 1'b0, laf_state = 1'b0;
  logic full_state = 1'b0, lp_state = 1'b0, rst_int_reg = 1'b0;
  logic err, parity_done, low_packet_valid;

  router_reg dut (.*);

  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  int n_full_data = 0, n_full_parity = 0, n_full_lp = 0, n_bad = 0;
  logic [DATA_W-1:0] written[$];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One cycle in the given state. Records the word the FIFO would take.
  // Bus values are set with bus_d and bus_v and applied at the falling edge.
  logic [DATA_W-1:0] bus_d = '0;
  logic              bus_v = 1'b0;
  task automatic cycle(input string st, input logic full);
    @(negedge clock);
    data         = bus_d;
    packet_valid = bus_v;
    {detect_add, lfd_state, ld_state, laf_state, full_state, lp_state, rst_int_reg} = '0;
    case (st)
      "DA":  detect_add  = 1'b1;
      "LFD": lfd_state   = 1'b1;
      "LD":  ld_state    = 1'b1;
      "LAF": laf_state   = 1'b1;
      "FFS": full_state  = 1'b1;
      "LP":  lp_state    = 1'b1;
      "CPE": rst_int_reg = 1'b1;
      default: ;
    endcase
    fifo_full = full;
    #1 if ((ld_state || lp_state || laf_state) && !full) written.push_back(dout);
    @(posedge clock);
  endtask

  // After a blocked write: wait full, then LOAD_AFTER_FULL.
  // The sender has moved on to its next word, which it holds while stalled.
  task automatic recover();
    bus_d = $urandom();
    repeat ($urandom_range(1, 3)) cycle("FFS", 1'b1);
    cycle("LAF", 1'b0);
  endtask

  task automatic run_packet(input int plen, input logic bad);
    logic [DATA_W-1:0] words[$];
    logic [DATA_W-1:0] par;
    int mode;
    written = {};
    words.push_back($urandom());
    par = words[0];
    for (int k = 0; k < plen; k++) begin
      words.push_back($urandom());
      par ^= words[$];
    end
    if (bad) par ^= 32'h1 << $urandom_range(0, 31);
    words.push_back(par);
    mode = $urandom_range(0, 2);  // 0: no full at parity, 1: full at parity word, 2: full in LOAD_PARITY

    bus_d = words[0]; bus_v = 1'b1;
    cycle("DA", 1'b0);
    bus_d = $urandom();
    cycle("LFD", 1'b0);
    for (int k = 1; k <= plen; k++) begin
      bus_d = words[k]; bus_v = 1'b1;
      if ($urandom_range(0, 3) == 0) begin
        cycle("LD", 1'b1);
        n_full_data++;
        recover();
      end else begin
        cycle("LD", 1'b0);
      end
    end
    bus_d = par; bus_v = 1'b0;
    if (mode == 1) begin
      cycle("LD", 1'b1);
      n_full_parity++;
      recover();
      #1 check(low_packet_valid && parity_done, "flags after parity left the full-state word");
      cycle("LP", 1'b0);
    end else begin
      cycle("LD", 1'b0);
      #1 check(low_packet_valid && parity_done, "flags after parity word");
      if (mode == 2) begin
        cycle("LP", 1'b1);
        n_full_lp++;
        recover();
      end else begin
        cycle("LP", 1'b0);
      end
    end
    cycle("CPE", 1'b0);
    #1 check(err == bad, $sformatf("err=%0b, bad parity=%0b", err, bad));
    if (bad) n_bad++;
    check(written.size() == words.size(),
          $sformatf("%0d words written, %0d sent", written.size(), words.size()));
    for (int i = 0; i < words.size() && i < written.size(); i++)
      check(written[i] == words[i], $sformatf("word %0d: %h expected %h", i, written[i], words[i]));
    // idle a little, err must hold
    bus_d = $urandom(); bus_v = 1'b0;
    cycle("DA", 1'b0);
    #1 check(err == bad, "err held while idle");
  endtask

  initial begin
    #1 resetn = 1'b0;
    repeat (2) @(negedge clock);
    resetn = 1'b1;
    check(!err && dout == '0, "reset values");
    for (int p = 0; p < 300; p++) run_packet($urandom_range(0, 12), $urandom_range(0, 3) == 0);
    check(n_full_data > 0 && n_full_parity > 0 && n_full_lp > 0 && n_bad > 0, "cases not reached");
    $display("full_data=%0d full_parity=%0d full_lp=%0d bad=%0d", n_full_data, n_full_parity, n_full_lp, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
