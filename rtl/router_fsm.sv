// router_fsm: the input-side controller of the router.
//
// It frames the byte stream of the input port into header, payload and
// parity, and tells the register block which of the three to latch. The
// input protocol is: packet_valid rises with the header byte and stays high
// through the payload; the byte presented in the cycle after packet_valid
// falls is the parity byte. Between packets the controller sits in
// DECODE_ADDRESS; a byte with packet_valid high there is a header (ld_header)
// and moves it to LOAD_DATA. In LOAD_DATA each accepted byte is payload
// (ld_data) while packet_valid is high, and the first byte with packet_valid
// low is the parity byte (ld_parity), after which the controller returns to
// DECODE_ADDRESS. A header can follow a parity byte in the next cycle.
//
// Flow control: suspend_data is high while the register block holds a byte
// whose destination FIFO is full. While it is high no byte is accepted and
// the source must hold data and packet_valid unchanged. suspend_data is
// computed from registers only (held_valid and the FIFO's full flag), so it
// has no combinational path from the input port.
//
// The FSM, the suspend_data output and the packet_valid/parity timing follow
// the router's input protocol; the two-state encoding and the rule for
// suspend_data are this design's own.
module router_fsm
  import router_pkg::*;
(
  input  logic       clock,
  input  logic       resetn,
  input  logic       packet_valid,
  input  logic       held_valid,   // register block holds a byte (status)
  input  logic       dest_full,    // that byte's destination FIFO is full
  output logic       ld_header,
  output logic       ld_data,
  output logic       ld_parity,
  output logic       suspend_data,
  output fsm_state_t state
);

  fsm_state_t state_next;

  assign suspend_data = held_valid && dest_full;

  always_comb begin
    ld_header  = 1'b0;
    ld_data    = 1'b0;
    ld_parity  = 1'b0;
    state_next = state;
    if (!suspend_data) begin
      unique case (state)
        DECODE_ADDRESS: begin
          if (packet_valid) begin
            ld_header  = 1'b1;
            state_next = LOAD_DATA;
          end
        end
        LOAD_DATA: begin
          if (packet_valid) begin
            ld_data = 1'b1;
          end else begin
            ld_parity  = 1'b1;
            state_next = DECODE_ADDRESS;
          end
        end
        default: state_next = DECODE_ADDRESS;
      endcase
    end
  end

  always_ff @(posedge clock) begin
    if (!resetn) state <= DECODE_ADDRESS;
    else         state <= state_next;
  end

endmodule
