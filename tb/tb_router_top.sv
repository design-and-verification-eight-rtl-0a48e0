// tb_router_top: end-to-end test of the router at its default size (one
// input, seven outputs, 16-byte FIFOs).
//
// A source sends random packets (destination 0..7, payload 0..31 bytes,
// about one in six with a wrong parity byte) following the input protocol:
// inputs change on the falling edge, packet_valid is high for the header
// and payload and low for the parity byte, and a byte is held for as long as
// suspend_data is high. Seven readers raise read_enb at random rates that
// change from phase to phase, slow enough in some phases to fill the FIFOs.
//
// Checks:
//  * every byte read from port i is the next byte of the packets sent to
//    address i, header and parity included (per-port scoreboard queues);
//  * each reader re-frames its byte stream by the header's length field and
//    finds the parity byte where it should be;
//  * err pulses in the cycle after each parity byte that does not match
//    the XOR of header and payload, and at no other time;
//  * packets for address 7 come out nowhere;
//  * latency: a header sent into an empty router shows as vld_out two edges
//    after it is taken; throughput: with all readers on, a packet of n bytes
//    is taken in n consecutive cycles;
//  * the mechanisms of the design all happen: suspend_data, a full FIFO on
//    every port, parity errors, dropped packets, back-to-back packets and
//    simultaneous FIFO read and write; a failure is counted for any that
//    never happened.
module tb_router_top;
  import router_pkg::*;

  localparam int unsigned NUM_OUT = 7;
  localparam int          NPKT    = 1500;

  logic               clock = 1'b0;
  logic               resetn;
  flit_t              data_in;
  logic               packet_valid;
  logic               suspend_data, err;
  logic [NUM_OUT-1:0] read_enb, vld_out;
  flit_t              data_out [NUM_OUT];

  router_top dut (.*);

  always #5 clock = ~clock;

  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_suspend = 0, n_err = 0, n_drop = 0, n_b2b = 0, n_rw = 0;
  int n_full [NUM_OUT];
  int n_rx_pkt [NUM_OUT];
  int n_sent_pkt [8];

  flit_t exp_q [NUM_OUT][$];
  int unsigned read_pct [NUM_OUT];
  bit readers_on = 1'b0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- source ----------------
  // Drive one byte and wait for the edge that takes it. Returns the number
  // of cycles it waited because of suspend_data.
  task automatic send_byte(flit_t b, bit pv, output int waited);
    waited = 0;
    @(negedge clock);
    data_in = b;
    packet_valid = pv;
    while (suspend_data) begin
      waited++;
      n_suspend++;
      @(negedge clock);
    end
    @(posedge clock);
  endtask

  bit last_was_parity = 1'b0;

  task automatic send_packet(addr_t a, int n, bit bad, output int cycles);
    flit_t pkt[$];
    flit_t sum;
    int w;
    cycles = 0;
    pkt.push_back(make_header(a, len_t'(n)));
    for (int i = 0; i < n; i++) pkt.push_back(flit_t'($urandom));
    sum = '0;
    foreach (pkt[i]) sum ^= pkt[i];
    pkt.push_back(bad ? sum ^ flit_t'(1 << ($urandom % 8)) : sum);
    if (int'(a) < int'(NUM_OUT)) foreach (pkt[i]) exp_q[a].push_back(pkt[i]);
    else n_drop++;
    n_sent_pkt[a]++;
    for (int i = 0; i < pkt.size(); i++) begin
      send_byte(pkt[i], i < pkt.size() - 1, w);
      cycles += 1 + w;
      if (i == 0 && last_was_parity) n_b2b++;
      last_was_parity = 1'b0;
    end
    last_was_parity = 1'b1;
    // err must follow the parity byte by one cycle.
    #1;
    check(err == bad, $sformatf("err after parity (bad=%0d)", bad));
    if (err) n_err++;
  endtask

  // err must never be high except right after a parity byte (checked in
  // send_packet); count every pulse here and compare the totals at the end.
  int n_err_pulses = 0;
  always @(posedge clock) if (resetn && err) n_err_pulses++;

  // ---------------- readers ----------------
  int rx_left [NUM_OUT];

  for (genvar p = 0; p < NUM_OUT; p++) begin : g_rd
    initial begin
      rx_left[p] = 0;
      forever begin
        bit took;
        @(negedge clock);
        read_enb[p] = readers_on && (($urandom % 100) < read_pct[p]);
        if (dut.g_port[p].u_fifo.full) n_full[p]++;
        @(posedge clock);
        took = resetn && read_enb[p] && vld_out[p];
        if (took && dut.write_enb[p]) n_rw++;
        #1;
        if (took) begin
          flit_t b;
          checks++;
          if (exp_q[p].size() == 0) begin
            failures++;
            $display("FAIL %0t: port %0d read a byte nobody sent", $time, p);
          end else begin
            b = exp_q[p].pop_front();
            if (data_out[p] !== b) begin
              failures++;
              $display("FAIL %0t: port %0d got %h expected %h", $time, p, data_out[p], b);
            end
          end
          // Re-frame by the header's length field.
          if (rx_left[p] == 0) begin
            check(header_addr(data_out[p]) == addr_t'(p), "header address matches port");
            rx_left[p] = int'(header_len(data_out[p])) + 1;
          end else if (rx_left[p] == 1) begin
            rx_left[p] = 0;
            n_rx_pkt[p]++;
          end else begin
            rx_left[p]--;
          end
        end
      end
    end
  end

  // ---------------- sequence ----------------
  initial begin
    int cyc, w;
    int unsigned k;
    packet_valid = 1'b0; data_in = '0; read_enb = '0;
    foreach (read_pct[i]) read_pct[i] = 100;
    resetn = 1'b0;
    repeat (3) @(negedge clock);
    resetn = 1'b1;
    check(!suspend_data && !err && vld_out == '0, "idle after reset");

    // Latency: header taken at edge k shows on vld_out after edge k+1.
    @(negedge clock);
    data_in = make_header(3'd0, 5'd0);
    packet_valid = 1'b1;
    @(posedge clock);  // edge k: header taken
    #1;
    check(vld_out[0] == 1'b0, "vld_out still low one edge after header");
    @(negedge clock);
    data_in = make_header(3'd0, 5'd0);  // parity of a header-only packet
    packet_valid = 1'b0;
    @(posedge clock);  // edge k+1: header written into FIFO 0
    #1;
    check(vld_out[0] == 1'b1, "vld_out high two edges after header");
    check(err == 1'b0, "no err on correct parity");
    exp_q[0].push_back(make_header(3'd0, 5'd0));
    exp_q[0].push_back(make_header(3'd0, 5'd0));
    n_sent_pkt[0]++;
    last_was_parity = 1'b1;

    // Throughput: readers on at full rate, 20-byte payload packets to each
    // port are taken with no wait.
    readers_on = 1'b1;
    for (int p = 0; p < NUM_OUT; p++) begin
      send_packet(addr_t'(p), 20, 1'b0, cyc);
      check(cyc == 22, $sformatf("22-byte packet taken in %0d cycles", cyc));
    end

    // Random traffic in phases of reader speed.
    for (int i = 0; i < NPKT; i++) begin
      if (i % 150 == 0) begin
        k = $urandom % 3;
        foreach (read_pct[p])
          read_pct[p] = (k == 0) ? 100 : (k == 1) ? 5 + $urandom % 30 : 30 + $urandom % 70;
      end
      send_packet(addr_t'($urandom % 8), $urandom % 32, ($urandom % 6) == 0, cyc);
      @(negedge clock);
      packet_valid = 1'b0;
      if (($urandom % 2) != 0) repeat ($urandom % 4) @(negedge clock);
    end

    // Drain.
    foreach (read_pct[p]) read_pct[p] = 100;
    @(negedge clock);
    packet_valid = 1'b0;
    repeat (200) @(posedge clock);

    for (int p = 0; p < NUM_OUT; p++) begin
      check(exp_q[p].size() == 0, $sformatf("port %0d delivered everything", p));
      check(n_rx_pkt[p] == n_sent_pkt[p], $sformatf("port %0d packet count %0d/%0d",
                                                    p, n_rx_pkt[p], n_sent_pkt[p]));
      check(n_full[p] > 0, $sformatf("fifo %0d was full at least once", p));
    end
    check(vld_out == '0, "all outputs idle at the end");
    check(n_err_pulses == n_err, "err pulses only after bad parity bytes");
    check(n_suspend > 0, "suspend_data happened");
    check(n_err > 0, "parity error happened");
    check(n_drop > 0, "packet to unmatched address dropped");
    check(n_b2b > 0, "back-to-back packets happened");
    check(n_rw > 0, "simultaneous FIFO read and write happened");
    $display("mechanisms: suspend_cycles=%0d err=%0d drops=%0d back_to_back=%0d rw=%0d",
             n_suspend, n_err, n_drop, n_b2b, n_rw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
