// router_decoder: the address decoding logic between the register block and
// the output FIFOs.
//
// When the controller latches a header (ld_header), the decoder latches the
// header's destination address field alongside it; that address then applies
// to every byte of the packet held in the register block, up to and
// including its parity byte. Output port i answers to address PORT_ADDR[i]
// (by default i); the entries used must differ from each other. While a
// byte is held (held_valid), the decoder raises write_enb of the matching
// port's FIFO if that FIFO is not full, and reports dest_full otherwise so
// the controller can suspend the input. drain tells the register block that
// the held byte has left this cycle. A packet whose address matches no port
// (with the default table, address 7) is drained without being written
// anywhere, i.e. dropped.
//
// On the output side each port's vld_out is high whenever its FIFO is not
// empty: a reader raises read_enb in response and receives the bytes one
// cycle after each read edge.
//
// Steering by the destination address, a per-port vld_out and the output
// protocol (vld_out, then read_enb, then data_out) and a unique address per
// output port follow the router description; the 3-bit width of those
// addresses, their default values and dropping unmatched packets are this
// design's choices. All outputs but the latched address are
// combinational from registers.
module router_decoder
  import router_pkg::*;
#(
  parameter int unsigned NUM_OUT   = 7,
  parameter port_addr_t  PORT_ADDR = DEFAULT_PORT_ADDR
) (
  input  logic               clock,
  input  logic               resetn,
  input  logic               ld_header,
  input  flit_t              data_in,
  input  logic               held_valid,
  input  logic [NUM_OUT-1:0] fifo_full,
  input  logic [NUM_OUT-1:0] fifo_empty,
  output logic [NUM_OUT-1:0] write_enb,
  output logic               dest_full,
  output logic               drain,
  output logic [NUM_OUT-1:0] vld_out,
  output addr_t              dest
);

  logic [NUM_OUT-1:0] hit;

  if (NUM_OUT < 1 || NUM_OUT > MAX_OUT) begin : g_bad_num_out
    $error("router_decoder: NUM_OUT must be 1..%0d", MAX_OUT);
  end

  always_ff @(posedge clock) begin
    if (!resetn)        dest <= '0;
    else if (ld_header) dest <= header_addr(data_in);
  end

  always_comb begin
    for (int i = 0; i < NUM_OUT; i++) begin
      hit[i] = (dest == PORT_ADDR[i]);
    end
  end

  assign dest_full = |(hit & fifo_full);
  assign write_enb = held_valid ? (hit & ~fifo_full) : '0;
  assign drain     = held_valid && !dest_full;
  assign vld_out   = ~fifo_empty;

  a_write_onehot : assert property (@(posedge clock) disable iff (!resetn)
                                    $onehot0(write_enb));

endmodule
