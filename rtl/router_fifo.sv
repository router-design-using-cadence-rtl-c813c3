// router_fifo: one output-channel buffer of the router.
//
// Words written by the input side (write_enb, data_in) are queued and handed
// to the receiver when it raises read_enb. The storage is a circular array
// with a write pointer, a read pointer and a word count; full and empty are
// decoded from the count. A write while full and a read while empty are
// ignored, so the input side may hold write_enb high against a full FIFO
// and retry the same word later. Reads and writes in the same cycle are
// allowed when the FIFO is neither full nor empty.
//
// Timing: everything is on the rising clock edge. data_out is registered:
// a word read at edge n is on data_out after edge n and stays there until
// the next read. resetn is asynchronous and active low, so the FIFO clears
// even when its clock is gated off.
//
// The word width follows the 32-bit data bus of the router; the depth of 16
// words, the registered read port and the reset style are this design's own
// choices. The router clocks each FIFO through its own clock gate, so clock
// may be a gated clock.
module router_fifo #(
  parameter int unsigned DATA_W = router_pkg::DATA_W,
  parameter int unsigned DEPTH  = router_pkg::FIFO_DEPTH
) (
  input  logic              clock,
  input  logic              resetn,
  input  logic              write_enb,
  input  logic              read_enb,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out,
  output logic              full,
  output logic              empty
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [PTR_W-1:0]  wr_ptr, rd_ptr;
  logic [CNT_W-1:0]  count;
  logic              do_wr, do_rd;

  assign full  = (count == CNT_W'(DEPTH));
  assign empty = (count == '0);
  // A write into a full FIFO is refused even if a word leaves in the same
  // cycle: the input side decides from full alone whether its word was taken.
  assign do_rd = read_enb && !empty;
  assign do_wr = write_enb && !full;

  function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clock or negedge resetn) begin
    if (!resetn) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      data_out <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) begin
        rd_ptr   <= next_ptr(rd_ptr);
        data_out <= mem[rd_ptr];
      end
      if (do_wr && !do_rd)      count <= count + 1'b1;
      else if (do_rd && !do_wr) count <= count - 1'b1;
    end
  end

  // Storage has no reset: a word is only read after it has been written.
  always_ff @(posedge clock) begin
    if (do_wr) mem[wr_ptr] <= data_in;
  end

endmodule
