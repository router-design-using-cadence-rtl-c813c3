// tb_router_workloads: the router run on the packets of its reference
// waveforms, at the default size.
//
//  1. One packet to channel 20: header 20, payload 16, 10, 28, 15 and the
//     parity word 8. The XOR of header and payload is 29, so the router must
//     deliver all six words to channel 20 and raise error 1 to 10 cycles
//     after the parity word.
//  2. Packets to channels 21 and 22 in turn, each with a correct parity:
//     the write enable must select exactly the addressed FIFO, vld_out must
//     rise only on that channel, and error must stay low.
//  3. One packet to channel 0 with three payload words, read back through
//     read_enb0 while vld_out0 is high (output protocol).
//  4. A single FIFO written with 0, 10, 20, ..., 150 and read back while it
//     is being written.
module tb_router_workloads;

  localparam int unsigned NUM_CH = router_pkg::NUM_CH;
  localparam int unsigned DATA_W = router_pkg::DATA_W;

  logic              clock = 1'b0, resetn = 1'b1;
  logic [DATA_W-1:0] data = '0;
  logic              pkt_valid = 1'b0;
  logic [NUM_CH-1:0] read_enb = '0;
  logic [DATA_W-1:0] data_out [NUM_CH];
  logic [NUM_CH-1:0] vld_out;
  logic              suspend_data, error;

  router_top dut (.*);

  // stand-alone FIFO for the FIFO waveform
  logic              f_we = 1'b0, f_re = 1'b0, f_full, f_empty;
  logic [DATA_W-1:0] f_din = '0, f_dout;
  router_fifo u_fifo (.clock, .resetn, .write_enb(f_we), .read_enb(f_re),
                      .data_in(f_din), .data_out(f_dout), .full(f_full), .empty(f_empty));

  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  logic susp_q = 1'b1;
  always @(negedge clock) susp_q <= suspend_data;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_word(input logic [DATA_W-1:0] w, input logic pv);
    @(negedge clock);
    data = w;
    pkt_valid = pv;
    forever begin
      @(posedge clock);
      if (!susp_q) break;
    end
  endtask

  // Sends header, payload and the given parity word; returns the number of
  // cycles from the parity word until error has its final value.
  task automatic send(input logic [DATA_W-1:0] words[$], input logic [DATA_W-1:0] par,
                      output int lat);
    foreach (words[i]) send_word(words[i], 1'b1);
    send_word(par, 1'b0);
    lat = 0;
    do begin
      @(negedge clock);
      lat++;
    end while (dut.state != router_pkg::DECODE_ADDRESS);
  endtask

  // Reads channel ch until vld_out drops and compares with exp.
  task automatic drain(input int ch, input logic [DATA_W-1:0] exp[$]);
    int n = 0;
    while (vld_out[ch]) begin
      @(negedge clock);
      read_enb[ch] = 1'b1;
      @(negedge clock);
      read_enb[ch] = 1'b0;
      check(n < exp.size() && data_out[ch] == exp[n],
            $sformatf("ch%0d word %0d: %h", ch, n, data_out[ch]));
      n++;
    end
    check(n == exp.size(), $sformatf("ch%0d: %0d words read, %0d expected", ch, n, exp.size()));
  endtask

  initial begin
    logic [DATA_W-1:0] w[$];
    logic [DATA_W-1:0] exp[$];
    logic [DATA_W-1:0] par;
    int lat;
    #1 resetn = 1'b0;
    repeat (2) @(negedge clock);
    resetn = 1'b1;

    // 1. the register waveform packet
    w = '{32'd20, 32'd16, 32'd10, 32'd28, 32'd15};
    send(w, 32'd8, lat);
    check(error == 1'b1, "bad parity of the reference packet not flagged");
    check(lat >= 1 && lat <= 10, $sformatf("error after %0d cycles", lat));
    check(vld_out == (NUM_CH'(1) << 20), $sformatf("vld_out %h", vld_out));
    exp = w; exp.push_back(32'd8);
    drain(20, exp);

    // 2. the synchronizer waveform addresses
    for (int a = 21; a <= 22; a++) begin
      w = '{DATA_W'(a) | (DATA_W'(2) << 5), $urandom(), $urandom()};
      par = w[0] ^ w[1] ^ w[2];
      fork
        send(w, par, lat);
        begin
          // every FIFO write during the packet goes to channel a
          repeat (8) begin
            @(negedge clock);
            #1 if (dut.write_enb != '0) check(dut.write_enb == (NUM_CH'(1) << a), "write enable");
          end
        end
      join
      check(error == 1'b0, "good packet flagged");
      check(vld_out == (NUM_CH'(1) << a), $sformatf("vld_out %h", vld_out));
      exp = w; exp.push_back(par);
      drain(a, exp);
    end

    // 3. output protocol on channel 0
    w = '{DATA_W'(3) << 5, $urandom(), $urandom(), $urandom()};
    par = w[0] ^ w[1] ^ w[2] ^ w[3];
    send(w, par, lat);
    check(error == 1'b0, "good packet flagged");
    exp = w; exp.push_back(par);
    drain(0, exp);

    // 4. FIFO waveform: 0, 10, ..., 150, read while written
    begin
      logic [DATA_W-1:0] q[$];
      int got = 0;
      for (int k = 0; k < 40; k++) begin
        @(negedge clock);
        if (f_re && got < 16) begin
          check(f_dout == DATA_W'(10 * got), $sformatf("FIFO word %0d: %0d", got, f_dout));
          got++;
        end
        f_we  = (k < 16);
        f_din = DATA_W'(10 * k);
        f_re  = (k >= 4) && !f_empty;
      end
      check(got == 16, $sformatf("FIFO delivered %0d of 16 words", got));
      check(f_empty, "FIFO not empty at the end");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
