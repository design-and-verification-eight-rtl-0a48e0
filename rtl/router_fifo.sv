// router_fifo: output buffer of one router port, WIDTH bits wide and DEPTH
// entries deep (8 x 16 in the router).
//
// A write stores data_in at the rising clock edge when write_enb is high and
// the FIFO is not full; a write attempted while full is ignored. A read loads
// the oldest entry into the data_out register at the rising edge when
// read_enb is high and the FIFO is not empty, so a byte appears on data_out
// in the cycle after the edge that read it, and data_out holds its value
// until the next read. A read and a write may happen at the same edge.
// full and empty come from an occupancy counter and are therefore registered.
//
// Reset is synchronous and active low: resetn low at an edge empties the
// FIFO and gives full = 0, empty = 1, data_out = 0, as the router's FIFO
// description requires. Width, depth, the write/read conditions and the
// reset values follow that description; the counter-based implementation
// is this design's own.
module router_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clock,
  input  logic             resetn,
  input  logic             write_enb,
  input  logic             read_enb,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] data_out,
  output logic             full,
  output logic             empty
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic [CNT_W-1:0] count;

  logic do_write, do_read;
  assign do_write = write_enb && !full;
  assign do_read  = read_enb  && !empty;

  assign full  = (count == CNT_W'(DEPTH));
  assign empty = (count == '0);

  function automatic logic [PTR_W-1:0] ptr_next(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clock) begin
    if (!resetn) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      data_out <= '0;
    end else begin
      if (do_write) wr_ptr <= ptr_next(wr_ptr);
      if (do_read) begin
        rd_ptr   <= ptr_next(rd_ptr);
        data_out <= mem[rd_ptr];
      end
      case ({do_write, do_read})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // Storage array: written only, never reset, so it can map to a RAM.
  always_ff @(posedge clock) begin
    if (do_write) mem[wr_ptr] <= data_in;
  end

  // The occupancy can never leave 0..DEPTH.
  a_count_range : assert property (@(posedge clock) disable iff (!resetn)
                                   count <= CNT_W'(DEPTH));

endmodule
