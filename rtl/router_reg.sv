// router_reg: input datapath of the router.
//
// Holds the words on their way from the data bus to the FIFO and checks the
// packet parity. Registers:
//   header    the header word, stored while the controller decodes it;
//   dout      the word offered to the addressed FIFO (written there when the
//             controller raises write_enb_reg and the FIFO has room);
//   fsb       the "full-state" word: a word accepted from the bus in
//             LOAD_DATA while the FIFO was full, moved to dout in
//             LOAD_AFTER_FULL;
//   int_par   running XOR of the header and every payload word;
//   pkt_par   the parity word sent by the source (the word on the bus in
//             LOAD_DATA with packet_valid low).
// low_packet_valid records that the parity word has arrived; parity_done
// records that it has reached dout. In CHECK_PARITY_ERROR (rst_int_reg) err
// is set when int_par differs from pkt_par and the parity registers clear;
// err stays up until the next header is taken.
//
// Timing: all registers change on the rising clock edge, with asynchronous
// active-low reset. err rises on the edge that leaves CHECK_PARITY_ERROR,
// three cycles after the parity word was on the bus when the FIFO has room.
//
// The register names and the handshake signals follow the router's block
// diagram; the parity rule (XOR of header and payload) and the moment err
// is raised and cleared are this design's own choices.
module router_reg #(
  parameter int unsigned DATA_W = router_pkg::DATA_W
) (
  input  logic              clock,
  input  logic              resetn,
  input  logic              packet_valid,
  input  logic [DATA_W-1:0] data,
  input  logic              fifo_full,
  input  logic              detect_add,
  input  logic              lfd_state,
  input  logic              ld_state,
  input  logic              laf_state,
  input  logic              full_state,
  input  logic              lp_state,
  input  logic              rst_int_reg,
  output logic              err,
  output logic              parity_done,
  output logic              low_packet_valid,
  output logic [DATA_W-1:0] dout
);

  logic [DATA_W-1:0] header, fsb, int_par, pkt_par;
  logic              take_header;

  assign take_header = detect_add && packet_valid;

  always_ff @(posedge clock or negedge resetn) begin
    if (!resetn) begin
      header           <= '0;
      dout             <= '0;
      fsb              <= '0;
      int_par          <= '0;
      pkt_par          <= '0;
      low_packet_valid <= 1'b0;
      parity_done      <= 1'b0;
      err              <= 1'b0;
    end else begin
      if (take_header) begin
        header           <= data;
        int_par          <= data;
        low_packet_valid <= 1'b0;
        parity_done      <= 1'b0;
        err              <= 1'b0;
      end

      if (lfd_state) dout <= header;

      if (ld_state) begin
        if (fifo_full) fsb  <= data;   // FIFO blocked: park the new word
        else           dout <= data;
        if (packet_valid) begin
          int_par <= int_par ^ data;
        end else begin
          pkt_par          <= data;
          low_packet_valid <= 1'b1;
          if (!fifo_full) parity_done <= 1'b1;
        end
      end

      if (laf_state && !parity_done) begin
        dout <= fsb;
        if (low_packet_valid) parity_done <= 1'b1;
      end

      if (rst_int_reg) begin
        err     <= (int_par != pkt_par);
        int_par <= '0;
        pkt_par <= '0;
      end
    end
  end

  // In FIFO_FULL_STATE and LOAD_PARITY no register changes: the word waits
  // in dout until the FIFO takes it. The parity word must be in dout by the
  // time it is written.
  a_hold_while_full: assert property (@(posedge clock) disable iff (!resetn)
    full_state |=> $stable(dout));
  a_parity_ready: assert property (@(posedge clock) disable iff (!resetn)
    lp_state |-> parity_done);

endmodule
