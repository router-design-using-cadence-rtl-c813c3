// router_sync: address latch and FIFO selection of the router.
//
// While the controller decodes a header (detect_add) and packet_valid is
// high, the destination field of the word on the data bus is stored in an
// address register. From then on the synchronizer
//   - turns the controller's write_enb_reg into a one-hot write enable for
//     the addressed FIFO (write_enb),
//   - hands the addressed FIFO's full flag to the controller (fifo_full),
//   - hands the addressed FIFO's empty flag to the controller (fifo_empty).
//     During address decoding the empty flag is taken from the address that
//     is on the data bus at that moment, because the controller decides in
//     that same cycle whether it must wait for the FIFO to drain.
// vld_out[i] tells receiver i that its FIFO holds data (not empty).
//
// Timing: the address register loads on the rising clock edge; every other
// output is combinational. resetn is asynchronous and active low.
//
// The signal set follows the block diagram of the router; the empty-flag
// selection during decoding and vld_out = not empty are this design's own
// reading of how the blocks work together.
module router_sync #(
  parameter int unsigned DATA_W = router_pkg::DATA_W,
  parameter int unsigned NUM_CH = router_pkg::NUM_CH,
  parameter int unsigned ADDR_W = router_pkg::ADDR_W
) (
  input  logic              clock,
  input  logic              resetn,
  input  logic              detect_add,
  input  logic              packet_valid,
  input  logic [DATA_W-1:0] data,
  input  logic              write_enb_reg,
  input  logic [NUM_CH-1:0] full,
  input  logic [NUM_CH-1:0] empty,
  output logic [NUM_CH-1:0] write_enb,
  output logic              fifo_full,
  output logic              fifo_empty,
  output logic [NUM_CH-1:0] vld_out
);

  logic [ADDR_W-1:0] addr_reg;
  logic [ADDR_W-1:0] bus_addr;
  logic [ADDR_W-1:0] sel_empty;

  assign bus_addr = data[ADDR_W-1:0];

  always_ff @(posedge clock or negedge resetn) begin
    if (!resetn)                         addr_reg <= '0;
    else if (detect_add && packet_valid) addr_reg <= bus_addr;
  end

  always_comb begin
    write_enb = '0;
    if (write_enb_reg && (32'(addr_reg) < NUM_CH)) write_enb[addr_reg] = 1'b1;
  end

  assign sel_empty = detect_add ? bus_addr : addr_reg;

  // An address with no FIFO behind it reads as full and never empty.
  assign fifo_full  = (32'(addr_reg)  < NUM_CH) ? full[addr_reg]   : 1'b1;
  assign fifo_empty = (32'(sel_empty) < NUM_CH) ? empty[sel_empty] : 1'b0;
  assign vld_out    = ~empty;

endmodule
