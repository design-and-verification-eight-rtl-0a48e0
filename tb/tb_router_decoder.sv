// tb_router_decoder: self-checking test of router_decoder with seven
// output ports and a shuffled port address table (ports 0..6 answer to
// addresses 5, 3, 6, 2, 7, 1, 4, so address 0 matches no port).
//
// Each cycle the testbench drives a random header load, held-byte status
// and random full/empty flags for the seven FIFOs, and compares every output
// with values it works out itself: the latched destination address (taken
// from the low three bits of a loaded header, kept otherwise), one write
// enable for the port whose table entry equals that address when a byte is
// held and the FIFO is not full, dest_full, drain (held byte leaves unless
// its FIFO is full; a byte for address 0, which no port has, always
// leaves) and
// vld_out equal to the inverted empty flags. It also counts that every
// address, including the unmatched one, was exercised.
module tb_router_decoder;
  import router_pkg::*;

  localparam int unsigned NUM_OUT = 7;
  localparam port_addr_t  PA = {3'd0, 3'd4, 3'd1, 3'd7, 3'd2, 3'd6, 3'd3, 3'd5};

  logic               clock = 1'b0;
  logic               resetn;
  logic               ld_header, held_valid;
  flit_t              data_in;
  logic [NUM_OUT-1:0] fifo_full, fifo_empty, write_enb, vld_out;
  logic               dest_full, drain;
  addr_t              dest;

  int checks = 0, failures = 0;
  int port_writes [NUM_OUT];
  int drops = 0;

  router_decoder #(.NUM_OUT(NUM_OUT), .PORT_ADDR(PA)) dut (.*);

  always #5 clock = ~clock;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s dest=%0d we=%b full=%b dfull=%b drain=%b",
               $time, what, dest, write_enb, fifo_full, dest_full, drain);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp_dest;
    int exp_port;
    logic [NUM_OUT-1:0] exp_we;
    bit exp_full;
    ld_header = 0; held_valid = 0; data_in = '0;
    fifo_full = '0; fifo_empty = '1;
    resetn = 0;
    repeat (2) @(negedge clock);
    resetn = 1;
    exp_dest = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clock);
      ld_header  = ($urandom % 4 == 0);
      data_in    = flit_t'($urandom);
      held_valid = $urandom % 2;
      fifo_full  = NUM_OUT'($urandom) & NUM_OUT'($urandom);
      fifo_empty = NUM_OUT'($urandom) & ~fifo_full;
      #1;
      // Port whose address is exp_dest, or -1.
      exp_port = -1;
      case (exp_dest)
        5: exp_port = 0;
        3: exp_port = 1;
        6: exp_port = 2;
        2: exp_port = 3;
        7: exp_port = 4;
        1: exp_port = 5;
        4: exp_port = 6;
        default: exp_port = -1;
      endcase
      exp_we   = '0;
      exp_full = (exp_port >= 0) && fifo_full[exp_port];
      if (held_valid && exp_port >= 0 && !fifo_full[exp_port])
        exp_we[exp_port] = 1'b1;
      check(dest == addr_t'(exp_dest), "latched address");
      check(write_enb == exp_we, "write enables");
      check(dest_full == exp_full, "dest_full");
      check(drain == (held_valid && !exp_full), "drain");
      check(vld_out == ~fifo_empty, "vld_out");
      if (held_valid && exp_we != 0) port_writes[exp_port]++;
      if (held_valid && exp_port < 0) drops++;
      @(posedge clock);
      if (ld_header) exp_dest = data_in[2:0];
    end
    for (int a = 0; a < NUM_OUT; a++) check(port_writes[a] > 0, "every port written");
    check(drops > 0, "unmatched address exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
