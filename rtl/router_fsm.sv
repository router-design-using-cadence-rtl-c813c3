// router_fsm: input-side controller of the router.
//
// Eight states move a packet from the data bus into the addressed FIFO:
//   DECODE_ADDRESS     idle; a word with packet_valid high is a header. If
//                      the addressed FIFO is empty go to LOAD_FIRST_DATA,
//                      otherwise wait in WAIT_TILL_EMPTY.
//   WAIT_TILL_EMPTY    hold the sender until the addressed FIFO is empty.
//   LOAD_FIRST_DATA    move the stored header into the output register.
//   LOAD_DATA          accept one word per cycle and write the previous one
//                      into the FIFO. A full FIFO leads to FIFO_FULL_STATE;
//                      packet_valid low (the parity word) to LOAD_PARITY.
//   FIFO_FULL_STATE    hold the sender until the FIFO has room.
//   LOAD_AFTER_FULL    write the word that was blocked. If the parity word
//                      is already written out of the register (parity_done)
//                      go to CHECK_PARITY_ERROR; if the packet ended while
//                      the FIFO was full (low_packet_valid) go to
//                      LOAD_PARITY; otherwise go back to LOAD_DATA.
//   LOAD_PARITY        write the parity word; a full FIFO leads to
//                      FIFO_FULL_STATE.
//   CHECK_PARITY_ERROR compare parities, then return to DECODE_ADDRESS.
//
// Outputs are decoded from the state: one flag per state for the datapath
// register, write_enb_reg in the three states that write the FIFO, and
// suspend_data (the sender must hold the bus) in every state except
// DECODE_ADDRESS and LOAD_DATA.
//
// Timing: one rising-edge state register, asynchronous active-low reset to
// DECODE_ADDRESS; all outputs are combinational from the state.
//
// The states and their transitions follow the router's state diagram. The
// way LOAD_AFTER_FULL chooses between LOAD_DATA and LOAD_PARITY (by the
// latched low_packet_valid flag) and which states raise suspend_data and
// write_enb_reg are this design's own reading of it.
module router_fsm #(
  parameter int unsigned DATA_W = router_pkg::DATA_W,
  parameter int unsigned NUM_CH = router_pkg::NUM_CH,
  parameter int unsigned ADDR_W = router_pkg::ADDR_W
) (
  input  logic              clock,
  input  logic              resetn,
  input  logic              packet_valid,
  input  logic [DATA_W-1:0] data,
  input  logic              fifo_full,
  input  logic              fifo_empty,
  input  logic              parity_done,
  input  logic              low_packet_valid,
  output logic              suspend_data,
  output logic              write_enb_reg,
  output logic              detect_add,
  output logic              lfd_state,
  output logic              ld_state,
  output logic              laf_state,
  output logic              full_state,
  output logic              lp_state,
  output logic              rst_int_reg,
  output router_pkg::fsm_state_t state
);

  router_pkg::fsm_state_t next;
  logic       addr_ok;

  // The header's address field must name an existing output channel.
  assign addr_ok = (32'(data[ADDR_W-1:0]) < NUM_CH);

  always_ff @(posedge clock or negedge resetn) begin
    if (!resetn) state <= router_pkg::DECODE_ADDRESS;
    else         state <= next;
  end

  always_comb begin
    next = state;
    unique case (state)
      router_pkg::DECODE_ADDRESS:
        if (packet_valid && addr_ok) next = fifo_empty ? router_pkg::LOAD_FIRST_DATA : router_pkg::WAIT_TILL_EMPTY;
      router_pkg::WAIT_TILL_EMPTY:
        if (fifo_empty) next = router_pkg::LOAD_FIRST_DATA;
      router_pkg::LOAD_FIRST_DATA:
        next = router_pkg::LOAD_DATA;
      router_pkg::LOAD_DATA:
        if (fifo_full)          next = router_pkg::FIFO_FULL_STATE;
        else if (!packet_valid) next = router_pkg::LOAD_PARITY;
      router_pkg::FIFO_FULL_STATE:
        if (!fifo_full) next = router_pkg::LOAD_AFTER_FULL;
      router_pkg::LOAD_AFTER_FULL:
        if (parity_done)           next = router_pkg::CHECK_PARITY_ERROR;
        else if (low_packet_valid) next = router_pkg::LOAD_PARITY;
        else                       next = router_pkg::LOAD_DATA;
      router_pkg::LOAD_PARITY:
        next = fifo_full ? router_pkg::FIFO_FULL_STATE : router_pkg::CHECK_PARITY_ERROR;
      router_pkg::CHECK_PARITY_ERROR:
        next = router_pkg::DECODE_ADDRESS;
      default:
        next = router_pkg::DECODE_ADDRESS;
    endcase
  end

  assign detect_add    = (state == router_pkg::DECODE_ADDRESS);
  assign lfd_state     = (state == router_pkg::LOAD_FIRST_DATA);
  assign ld_state      = (state == router_pkg::LOAD_DATA);
  assign laf_state     = (state == router_pkg::LOAD_AFTER_FULL);
  assign full_state    = (state == router_pkg::FIFO_FULL_STATE);
  assign lp_state      = (state == router_pkg::LOAD_PARITY);
  assign rst_int_reg   = (state == router_pkg::CHECK_PARITY_ERROR);
  assign write_enb_reg = ld_state || lp_state || laf_state;
  assign suspend_data  = !(detect_add || ld_state);

endmodule
