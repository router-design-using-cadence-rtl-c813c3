// tb_router_top: end-to-end test of the 1x32 router at its default size.
//
// A sender process drives packets (header, 0 to 20 payload words, parity)
// to random channels, obeying suspend_data; one in five packets carries a
// corrupted parity word. A receiver process drains every channel through
// read_enb/vld_out and compares each word with a per-channel queue of what
// was sent. Phase A reads every word as soon as it is valid and checks that
// suspend_data never stays high for more than 100 cycles. Phase B reads
// rarely and aims most packets at four channels, so FIFOs fill up and the
// controller must wait and stall. After each packet the test checks error
// against the parity it sent, and that error is settled 1 to 10 cycles
// after the parity word when the FIFO had room. Each controller path
// (wait for empty, FIFO full, the three exits of LOAD_AFTER_FULL), good and
// bad parity, and clock gating (only the FIFOs that are written or read in
// a cycle receive a clock edge) must occur at least once.
module tb_router_top;

  localparam int unsigned NUM_CH = router_pkg::NUM_CH;
  localparam int unsigned DATA_W = router_pkg::DATA_W;
  localparam int unsigned ADDR_W = router_pkg::ADDR_W;
  localparam int          N_PKT_A = 150;
  localparam int          N_PKT_B = 250;

  logic              clock = 1'b0;
  logic              resetn = 1'b1;
  logic [DATA_W-1:0] data = '0;
  logic              pkt_valid = 1'b0;
  logic [NUM_CH-1:0] read_enb = '0;
  logic [DATA_W-1:0] data_out [NUM_CH];
  logic [NUM_CH-1:0] vld_out;
  logic              suspend_data, error;

  router_top dut (.*);

  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  int cyc = 0;
  logic phase_b = 1'b0;
  logic done_sending = 1'b0;

  logic [DATA_W-1:0] expq [NUM_CH][$];
  logic [NUM_CH-1:0] rd_pending = '0;

  // mechanism counters
  int n_wait_empty = 0, n_full = 0, n_laf_ld = 0, n_laf_lp = 0, n_laf_cpe = 0;
  int n_err_seen = 0, n_good = 0, n_gated = 0, n_max_susp = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  always @(posedge clock) cyc <= cyc + 1;

  // value of suspend_data in the cycle that ends with the next rising edge
  logic susp_q = 1'b1;
  always @(negedge clock) susp_q <= suspend_data;

  // ---------------- controller path coverage ----------------
  router_pkg::fsm_state_t st_q = router_pkg::DECODE_ADDRESS;
  always @(negedge clock) begin
    if (resetn) begin
      if (dut.state != st_q) begin
        if (dut.state == router_pkg::WAIT_TILL_EMPTY) n_wait_empty++;
        if (dut.state == router_pkg::FIFO_FULL_STATE) n_full++;
        if (st_q == router_pkg::LOAD_AFTER_FULL) begin
          if (dut.state == router_pkg::LOAD_DATA)          n_laf_ld++;
          if (dut.state == router_pkg::LOAD_PARITY)        n_laf_lp++;
          if (dut.state == router_pkg::CHECK_PARITY_ERROR) n_laf_cpe++;
        end
      end
      st_q <= dut.state;
    end
  end

  // ---------------- clock gating ----------------
  // The enables are sampled in the middle of the low phase, when both the
  // controller's write enable and the receivers' read enables are settled.
  logic [NUM_CH-1:0] en_q = '0;
  always @(negedge clock) begin
    #2 en_q = dut.write_enb | read_enb;
  end
  always @(posedge clock) begin
    #1;
    if (resetn) begin
      check(dut.fifo_clk == en_q,
            $sformatf("FIFO clocks %h, enables %h", dut.fifo_clk, en_q));
      if ($countones(dut.fifo_clk) < NUM_CH) n_gated++;
    end
  end

  // ---------------- suspend width (phase A) ----------------
  int susp_len = 0;
  always @(negedge clock) begin
    if (resetn && suspend_data) susp_len++;
    else                        susp_len = 0;
    if (!phase_b && susp_len > n_max_susp) n_max_susp = susp_len;
  end

  // ---------------- receivers ----------------
  always @(negedge clock) begin
    if (resetn) begin
      for (int i = 0; i < NUM_CH; i++) begin
        if (rd_pending[i]) begin
          if (expq[i].size() == 0) begin
            check(1'b0, $sformatf("ch%0d: word read but none expected", i));
          end else begin
            logic [DATA_W-1:0] e;
            e = expq[i].pop_front();
            check(data_out[i] == e,
                  $sformatf("ch%0d: got %h expected %h", i, data_out[i], e));
          end
        end
      end
      for (int i = 0; i < NUM_CH; i++) begin
        logic rd;
        if (!phase_b || done_sending) rd = vld_out[i];
        else                          rd = vld_out[i] && ($urandom_range(0, 7) == 0);
        read_enb[i]   <= rd;
        rd_pending[i] <= rd;
      end
    end
  end

  // ---------------- sender ----------------
  task automatic send_word(input logic [DATA_W-1:0] w, input logic pv);
    @(negedge clock);
    data      = w;
    pkt_valid = pv;
    forever begin
      @(posedge clock);
      if (!susp_q) break;
    end
  endtask

  task automatic send_packet(input int addr, input int plen, input logic bad);
    logic [DATA_W-1:0] hdr, w, par;
    int lat;
    int full_seen;
    hdr = {DATA_W'(plen) << ADDR_W} | DATA_W'(addr);
    par = hdr;
    expq[addr].push_back(hdr);
    send_word(hdr, 1'b1);
    for (int k = 0; k < plen; k++) begin
      w = $urandom();
      par ^= w;
      expq[addr].push_back(w);
      send_word(w, 1'b1);
    end
    if (bad) par ^= DATA_W'(1) << $urandom_range(0, DATA_W - 1);
    expq[addr].push_back(par);
    send_word(par, 1'b0);
    // parity word taken at this edge: wait for the controller to finish
    lat = 0;
    full_seen = 0;
    do begin
      @(negedge clock);
      lat++;
      if (dut.state == router_pkg::FIFO_FULL_STATE) full_seen = 1;
      data = $urandom();
    end while (dut.state != router_pkg::DECODE_ADDRESS);
    check(error == bad, $sformatf("error=%0b for packet with bad=%0b", error, bad));
    if (bad && error) n_err_seen++;
    if (!bad && !error) n_good++;
    if (!full_seen) check(lat >= 1 && lat <= 10, $sformatf("error settled after %0d cycles", lat));
  endtask

  initial begin
    #1 resetn = 1'b0;  // a falling edge applies the asynchronous reset
    repeat (3) @(negedge clock);
    resetn = 1'b1;
    for (int p = 0; p < N_PKT_A + N_PKT_B; p++) begin
      int addr;
      if (p == N_PKT_A) begin
        phase_b = 1'b1;
        check(n_max_susp <= 100, $sformatf("suspend_data held %0d cycles", n_max_susp));
      end
      addr = phase_b ? $urandom_range(0, 3) : $urandom_range(0, NUM_CH - 1);
      send_packet(addr, $urandom_range(0, 20), $urandom_range(0, 4) == 0);
    end
    done_sending = 1'b1;
    @(negedge clock);
    pkt_valid = 1'b0;
    repeat (200) @(negedge clock);
    for (int i = 0; i < NUM_CH; i++)
      check(expq[i].size() == 0, $sformatf("ch%0d: %0d words never delivered", i, expq[i].size()));
    check(n_wait_empty > 0, "WAIT_TILL_EMPTY never used");
    check(n_full > 0, "FIFO_FULL_STATE never used");
    check(n_laf_ld > 0, "LOAD_AFTER_FULL -> LOAD_DATA never taken");
    check(n_laf_lp > 0, "LOAD_AFTER_FULL -> LOAD_PARITY never taken");
    check(n_laf_cpe > 0, "LOAD_AFTER_FULL -> CHECK_PARITY_ERROR never taken");
    check(n_err_seen > 0, "no parity error detected");
    check(n_good > 0, "no good packet");
    check(n_gated > 0, "clock gating never active");
    $display("mechanisms: wait_empty=%0d fifo_full=%0d laf->ld=%0d laf->lp=%0d laf->cpe=%0d parity_err=%0d good=%0d gated_cycles=%0d max_suspend_phaseA=%0d",
             n_wait_empty, n_full, n_laf_ld, n_laf_lp, n_laf_cpe, n_err_seen, n_good, n_gated, n_max_susp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
