// router_pkg: types and constants shared by the blocks of the one-input,
// seven-output packet router.
//
// A packet is a stream of 8-bit flits: one header byte, zero or more payload
// bytes and a closing parity byte. The header carries the destination address
// in its low bits and the payload length above it. The byte width and the
// three-part packet (header, payload, parity) follow the packet format of the
// router; the exact split of the header (3 address bits in [2:0], 5 length
// bits in [7:3]) is this design's choice, made so that one header byte can
// address seven output ports.
package router_pkg;

  localparam int unsigned FLIT_W = 8;  // packet width, bits
  localparam int unsigned ADDR_W = 3;  // destination address field, header[2:0]
  localparam int unsigned LEN_W  = FLIT_W - ADDR_W;  // payload length, header[7:3]

  typedef logic [FLIT_W-1:0] flit_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [LEN_W-1:0]  len_t;

  // Largest number of output ports a header address can select.
  localparam int unsigned MAX_OUT = 1 << ADDR_W;

  // Address of each output port, entry i for port i. The default gives
  // port i the address i.
  typedef addr_t [MAX_OUT-1:0] port_addr_t;
  localparam port_addr_t DEFAULT_PORT_ADDR = {3'd7, 3'd6, 3'd5, 3'd4, 3'd3, 3'd2, 3'd1, 3'd0};

  // Header byte seen as its two fields.
  typedef struct packed {
    len_t  len;
    addr_t addr;
  } header_t;

  // Input-side controller states.
  //   DECODE_ADDRESS : between packets, waiting for packet_valid with a header
  //   LOAD_DATA      : inside a packet; a byte with packet_valid high is
  //                    payload, the byte after packet_valid falls is parity
  typedef enum logic {
    DECODE_ADDRESS = 1'b0,
    LOAD_DATA      = 1'b1
  } fsm_state_t;

  function automatic addr_t header_addr(flit_t h);
    return h[ADDR_W-1:0];
  endfunction

  function automatic len_t header_len(flit_t h);
    return h[FLIT_W-1:ADDR_W];
  endfunction

  function automatic flit_t make_header(addr_t addr, len_t len);
    header_t hd;
    hd.addr = addr;
    hd.len  = len;
    return flit_t'(hd);
  endfunction

endpackage
