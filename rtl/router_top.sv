// router_top: 1x32 packet router with 32-bit words.
//
// One input port receives packets (header, payload, parity) and delivers
// each to one of NUM_CH output FIFOs, chosen by the address field of its
// header. The input side is a controller (router_fsm), a datapath register
// with parity check (router_reg) and an address synchronizer (router_sync)
// that steers writes to the addressed FIFO. Each output channel is a FIFO
// (router_fifo) that its receiver drains with read_enb[i] while vld_out[i]
// is high. Every FIFO has its own clock gate (clock_gate), enabled only in
// a cycle in which that FIFO is written or read, so at most two FIFOs are
// clocked at a time.
//
// Input protocol: the sender drives the header with pkt_valid high, then one
// payload word per cycle, then drops pkt_valid and drives the parity word
// (XOR of header and payload). A word on the bus is taken at a rising edge
// in whose cycle suspend_data was low; while suspend_data is high the sender
// holds the bus. error rises a few cycles after a packet whose parity word
// does not match and stays high until the next header is taken.
//
// Output protocol: vld_out[i] is high while FIFO i holds words; raising
// read_enb[i] for a cycle puts the next word on data_out[i] after that edge.
//
// The channel count, word width, the four input-side blocks, the port list
// and clock gating of the FIFOs follow the router's description; the FIFO
// depth (16) and the details of each handshake are this design's own.
module router_top #(
  parameter int unsigned NUM_CH     = router_pkg::NUM_CH,
  parameter int unsigned DATA_W     = router_pkg::DATA_W,
  parameter int unsigned FIFO_DEPTH = router_pkg::FIFO_DEPTH
) (
  input  logic              clock,
  input  logic              resetn,
  input  logic [DATA_W-1:0] data,
  input  logic              pkt_valid,
  input  logic [NUM_CH-1:0] read_enb,
  output logic [DATA_W-1:0] data_out [NUM_CH],
  output logic [NUM_CH-1:0] vld_out,
  output logic              suspend_data,
  output logic              error
);

  localparam int unsigned ADDR_W = (NUM_CH > 1) ? $clog2(NUM_CH) : 1;

  logic              write_enb_reg, detect_add, lfd_state, ld_state;
  logic              laf_state, full_state, lp_state, rst_int_reg;
  logic              fifo_full, fifo_empty, parity_done, low_packet_valid;
  logic [DATA_W-1:0] dout;
  logic [NUM_CH-1:0] write_enb, full, empty, fifo_clk;
  router_pkg::fsm_state_t state;

  router_fsm #(.DATA_W(DATA_W), .NUM_CH(NUM_CH), .ADDR_W(ADDR_W)) u_fsm (
    .clock, .resetn,
    .packet_valid     (pkt_valid),
    .data,
    .fifo_full, .fifo_empty, .parity_done, .low_packet_valid,
    .suspend_data, .write_enb_reg, .detect_add, .lfd_state, .ld_state,
    .laf_state, .full_state, .lp_state, .rst_int_reg, .state
  );

  router_reg #(.DATA_W(DATA_W)) u_reg (
    .clock, .resetn,
    .packet_valid     (pkt_valid),
    .data, .fifo_full, .detect_add, .lfd_state, .ld_state, .laf_state,
    .full_state, .lp_state, .rst_int_reg,
    .err              (error),
    .parity_done, .low_packet_valid, .dout
  );

  router_sync #(.DATA_W(DATA_W), .NUM_CH(NUM_CH), .ADDR_W(ADDR_W)) u_sync (
    .clock, .resetn, .detect_add,
    .packet_valid     (pkt_valid),
    .data, .write_enb_reg, .full, .empty,
    .write_enb, .fifo_full, .fifo_empty, .vld_out
  );

  for (genvar i = 0; i < NUM_CH; i++) begin : g_ch
    clock_gate u_cg (
      .clk  (clock),
      .en   (write_enb[i] | read_enb[i]),
      .gclk (fifo_clk[i])
    );

    router_fifo #(.DATA_W(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clock     (fifo_clk[i]),
      .resetn,
      .write_enb (write_enb[i]),
      .read_enb  (read_enb[i]),
      .data_in   (dout),
      .data_out  (data_out[i]),
      .full      (full[i]),
      .empty     (empty[i])
    );
  end

  // With pkt_valid high, suspend_data is low only in DECODE_ADDRESS and
  // LOAD_DATA, so a new header can only be taken while the controller idles.
  a_header_only_when_idle: assert property (@(posedge clock) disable iff (!resetn)
    (pkt_valid && !suspend_data && state != router_pkg::LOAD_DATA) |-> detect_add);

endmodule
