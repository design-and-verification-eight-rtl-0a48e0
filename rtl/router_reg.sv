// router_reg: the router's register block, holding the data, status and
// parity registers of the input port.
//
// Every incoming byte the controller accepts is latched into the data
// register (ld_header, ld_data or ld_parity high at the rising edge) and
// stays there, flagged by dout_valid, until the output side takes it
// (drain high at an edge). A new byte may be loaded at the same edge as the
// held one drains, so bytes pass through at one per clock. The parity
// register restarts at the header byte and XORs in every payload byte, so it
// holds the XOR of the header and payload; when the parity byte is loaded it
// is compared with that value and err is raised for one cycle (the cycle
// after the parity byte is latched) if they differ.
//
// All registers change on the rising edge, and resetn is a synchronous,
// active-low reset. That the block holds data, status and parity registers,
// latches on the rising edge, forwards the data towards the FIFOs and flags
// a parity mismatch with err follows the router description; the byte-wide
// XOR as the parity function, the one-cycle err pulse and the load/drain
// handshake with the controller are this design's choices.
module router_reg
  import router_pkg::*;
(
  input  logic  clock,
  input  logic  resetn,
  input  flit_t data_in,
  input  logic  ld_header,  // latch data_in as a header byte
  input  logic  ld_data,    // latch data_in as a payload byte
  input  logic  ld_parity,  // latch data_in as the packet's parity byte
  input  logic  drain,      // the held byte has been taken this cycle
  output flit_t dout,       // held byte, towards the output FIFOs
  output logic  dout_valid, // status: a byte is held
  output flit_t parity,     // running parity of header and payload
  output logic  err         // parity mismatch, one-cycle pulse
);

  logic ld;
  assign ld = ld_header || ld_data || ld_parity;

  always_ff @(posedge clock) begin
    if (!resetn) begin
      dout       <= '0;
      dout_valid <= 1'b0;
      parity     <= '0;
      err        <= 1'b0;
    end else begin
      if (ld) dout <= data_in;

      if (ld)         dout_valid <= 1'b1;
      else if (drain) dout_valid <= 1'b0;

      if (ld_header)    parity <= data_in;
      else if (ld_data) parity <= parity ^ data_in;

      err <= ld_parity && (parity != data_in);
    end
  end

  // Only one kind of byte is latched per cycle, and a byte is never
  // overwritten before it has been taken.
  a_one_load : assert property (@(posedge clock) disable iff (!resetn)
                                $onehot0({ld_header, ld_data, ld_parity}));
  a_no_overwrite : assert property (@(posedge clock) disable iff (!resetn)
                                    ld |-> (!dout_valid || drain));

endmodule
