// router_top: an eight-port packet router for a network on chip, with one
// input port and seven output ports.
//
// Packets enter one byte per clock on data_in, framed by packet_valid (see
// router_fsm): a header byte whose low three bits give the destination port
// and whose upper five bits give the payload length, the payload bytes, and
// a parity byte equal to the XOR of header and payload. The controller
// (router_fsm) and the register block (router_reg) latch each accepted byte;
// the decoder (router_decoder) steers it, together with the rest of its
// packet, into the 16-byte FIFO (router_fifo) of the addressed output port.
// The parity byte is forwarded as well, so each output sees the complete
// packet. A parity mismatch raises err for one cycle; a full destination
// FIFO raises suspend_data, during which the source must hold its byte.
// Output port i answers to address PORT_ADDR[i], by default i; a packet
// addressed to no port (address 7 by default) is dropped.
//
// Each output port i has data_out[i], vld_out[i] (its FIFO holds data) and
// read_enb[i]; a byte is read at every rising edge with read_enb[i] high
// while vld_out[i] is high, and appears on data_out[i] in the next cycle.
// The reader uses the length field of the header it reads to find the
// packet's end.
//
// Latency: a header latched at edge k is in its FIFO after edge k+1, so
// vld_out rises in the cycle after edge k+1. Throughput is one byte per
// clock while the destination FIFO has room.
//
// The one input, seven outputs, 8-bit bytes, 16-deep FIFOs per output, the
// synchronous active-low resetn and the names of the top-level signals
// follow the router description; the header split, the parity function and
// the flow-control details are this design's choices.
module router_top
  import router_pkg::*;
#(
  parameter int unsigned NUM_OUT    = 7,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter port_addr_t  PORT_ADDR  = DEFAULT_PORT_ADDR
) (
  input  logic               clock,
  input  logic               resetn,
  input  flit_t              data_in,
  input  logic               packet_valid,
  output logic               suspend_data,
  output logic               err,
  input  logic [NUM_OUT-1:0] read_enb,
  output logic [NUM_OUT-1:0] vld_out,
  output flit_t              data_out [NUM_OUT]
);

  logic               ld_header, ld_data, ld_parity;
  logic               held_valid, drain, dest_full;
  flit_t              held_byte;
  logic [NUM_OUT-1:0] write_enb, fifo_full, fifo_empty;

  router_fsm u_fsm (
    .clock        (clock),
    .resetn       (resetn),
    .packet_valid (packet_valid),
    .held_valid   (held_valid),
    .dest_full    (dest_full),
    .ld_header    (ld_header),
    .ld_data      (ld_data),
    .ld_parity    (ld_parity),
    .suspend_data (suspend_data),
    .state        ()
  );

  router_reg u_reg (
    .clock      (clock),
    .resetn     (resetn),
    .data_in    (data_in),
    .ld_header  (ld_header),
    .ld_data    (ld_data),
    .ld_parity  (ld_parity),
    .drain      (drain),
    .dout       (held_byte),
    .dout_valid (held_valid),
    .parity     (),
    .err        (err)
  );

  router_decoder #(.NUM_OUT(NUM_OUT), .PORT_ADDR(PORT_ADDR)) u_dec (
    .clock      (clock),
    .resetn     (resetn),
    .ld_header  (ld_header),
    .data_in    (data_in),
    .held_valid (held_valid),
    .fifo_full  (fifo_full),
    .fifo_empty (fifo_empty),
    .write_enb  (write_enb),
    .dest_full  (dest_full),
    .drain      (drain),
    .vld_out    (vld_out),
    .dest       ()
  );

  for (genvar i = 0; i < NUM_OUT; i++) begin : g_port
    router_fifo #(.WIDTH(FLIT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clock     (clock),
      .resetn    (resetn),
      .write_enb (write_enb[i]),
      .read_enb  (read_enb[i]),
      .data_in   (held_byte),
      .data_out  (data_out[i]),
      .full      (fifo_full[i]),
      .empty     (fifo_empty[i])
    );
  end

  // A FIFO is never asked to take a byte while it is full.
  a_no_write_when_full : assert property (@(posedge clock) disable iff (!resetn)
                                          (write_enb & fifo_full) == '0);

endmodule
