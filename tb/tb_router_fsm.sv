// tb_router_fsm: self-checking test of router_fsm, the input controller.
//
// Part 1 sends framed packets the way a source does: packet_valid high for
// the header and payload, low for the parity byte, and the inputs held while
// suspend_data is high. The destination FIFO's full flag is driven at random
// and the held byte is assumed to drain whenever that flag is low. The
// testbench counts the loads and checks that each packet gives exactly one
// header load, one load per payload byte and one parity load, in that order.
// Part 2 drives all inputs at random and compares every output, every cycle,
// with a reference model of the framing rules written here.
module tb_router_fsm;
  import router_pkg::*;

  logic       clock = 1'b0;
  logic       resetn;
  logic       packet_valid, held_valid, dest_full;
  logic       ld_header, ld_data, ld_parity, suspend_data;
  fsm_state_t state;

  int checks = 0, failures = 0;
  int suspends = 0;

  router_fsm dut (.*);

  always #5 clock = ~clock;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s (ldh=%b ldd=%b ldp=%b susp=%b state=%0d)",
               $time, what, ld_header, ld_data, ld_parity, suspend_data, state);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Held-byte status as the register block would report it.
  always_ff @(posedge clock) begin
    if (!resetn) held_valid <= 1'b0;
    else if (ld_header || ld_data || ld_parity) held_valid <= 1'b1;
    else if (!dest_full) held_valid <= 1'b0;
  end

  // Present one byte (pv = packet_valid) and wait until it is accepted;
  // returns which load took it.
  task automatic send(bit pv, output int kind);
    @(negedge clock);
    packet_valid = pv;
    forever begin
      dest_full = ($urandom % 4 == 0);
      #1;
      if (suspend_data) suspends++;
      if (ld_header || ld_data || ld_parity) break;
      @(negedge clock);
    end
    kind = ld_header ? 1 : ld_data ? 2 : 3;
    check($onehot({ld_header, ld_data, ld_parity}), "one load per accepted byte");
    check(!suspend_data, "no load while suspended");
    @(posedge clock);
  endtask

  initial begin
    packet_valid = 0; dest_full = 0;
    resetn = 0;
    repeat (2) @(negedge clock);
    resetn = 1;
    #1;
    check(state == DECODE_ADDRESS && !ld_header && !suspend_data, "idle after reset");

    // Part 1: framed packets.
    for (int p = 0; p < 300; p++) begin
      int n, k;
      n = $urandom % 32;
      send(1'b1, k);
      check(k == 1, "header load");
      for (int i = 0; i < n; i++) begin
        send(1'b1, k);
        check(k == 2, "payload load");
      end
      send(1'b0, k);
      check(k == 3, "parity load");
      // Idle gap of 0..2 cycles with packet_valid low.
      repeat ($urandom % 3) begin
        @(negedge clock);
        packet_valid = 0;
        dest_full = 0;
        #1;
        check(!ld_header && !ld_data && !ld_parity, "no load between packets");
      end
    end
    check(suspends > 0, "suspend_data seen in framed traffic");

    // Part 2: random inputs against a reference model.
    begin
      fsm_state_t ms;
      bit s, eh, ed, ep;
      ms = DECODE_ADDRESS;
      @(negedge clock);
      packet_valid = 0; dest_full = 0;
      @(posedge clock);  // finish any open packet: parity accepted
      #1;
      ms = state;
      for (int i = 0; i < 5000; i++) begin
        @(negedge clock);
        packet_valid = $urandom % 2;
        dest_full    = $urandom % 2;
        #1;
        s  = held_valid && dest_full;
        eh = !s && ms == DECODE_ADDRESS && packet_valid;
        ed = !s && ms == LOAD_DATA && packet_valid;
        ep = !s && ms == LOAD_DATA && !packet_valid;
        check(suspend_data == s, "suspend_data model");
        check(ld_header == eh && ld_data == ed && ld_parity == ep, "load model");
        check(state == ms, "state model");
        if (eh) ms = LOAD_DATA;
        if (ep) ms = DECODE_ADDRESS;
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
