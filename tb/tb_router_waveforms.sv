// tb_router_waveforms: directed replay of the router's two protocol
// waveforms, at the default size.
//
// Input side: after reset the source sends packet 1 to address 0
// (header, three payload bytes, parity) and, after a short delay, a longer
// packet 2 to address 0 (header, 20 payload bytes, parity). Packet 1 carries
// a wrong parity byte, so err must pulse once after it and never after
// packet 2. Packet 2 is longer than the 16-byte FIFO and the reader of port
// 0 stays idle while it arrives, so suspend_data must rise in the middle of
// packet 2's payload, with the source holding its byte, and fall again once
// the reader starts.
//
// Output side: vld_out[0] must rise while packet 1 arrives; the reader
// raises read_enb[0] after a response delay of a few cycles and must receive
// packet 1 as header, three payload bytes and parity, then all of packet 2.
// No other port may show vld_out.
module tb_router_waveforms;
  import router_pkg::*;

  localparam int unsigned NUM_OUT = 7;

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
  int err_pulses = 0, suspend_cycles = 0, suspend_in_p1 = 0;
  bit in_p1 = 1'b0, in_p2 = 1'b0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clock) begin
    if (resetn && err) err_pulses++;
    if (resetn && suspend_data) begin
      suspend_cycles++;
      if (in_p1) suspend_in_p1++;
    end
    if (resetn) check((vld_out & 7'b1111110) == '0, "only port 0 has data");
  end

  flit_t p1[$], p2[$], expect_q[$];

  task automatic send(flit_t pkt[$]);
    for (int i = 0; i < pkt.size(); i++) begin
      @(negedge clock);
      data_in = pkt[i];
      packet_valid = (i < pkt.size() - 1);
      while (suspend_data) @(negedge clock);
      @(posedge clock);
    end
    @(negedge clock);
    packet_valid = 1'b0;
    data_in = '0;
  endtask

  // Reader of port 0: idle until started, then reads every cycle.
  bit reader_on = 1'b0;
  int received = 0;
  always @(negedge clock) read_enb <= {6'b0, reader_on};
  always @(posedge clock) begin
    if (resetn && read_enb[0] && vld_out[0]) begin
      #1;
      checks++;
      if (expect_q.size() == 0 || data_out[0] != expect_q[0]) begin
        failures++;
        $display("FAIL %0t: port 0 got %h expected %h", $time, data_out[0],
                 (expect_q.size() > 0) ? expect_q[0] : flit_t'(0));
      end
      if (expect_q.size() > 0) void'(expect_q.pop_front());
      received++;
    end
  end

  initial begin
    flit_t sum;
    packet_valid = 1'b0; data_in = '0; read_enb = '0;
    // Reset is held from time 0 so that no register is used before it.
    resetn = 1'b0;
    @(negedge clock); @(negedge clock); resetn = 1'b1;

    // Packet 1: address 0, three payload bytes, wrong parity.
    p1.push_back(make_header(3'd0, 5'd3));
    p1.push_back(8'h11); p1.push_back(8'h22); p1.push_back(8'h33);
    sum = '0;
    foreach (p1[i]) sum ^= p1[i];
    p1.push_back(sum ^ 8'h01);
    foreach (p1[i]) expect_q.push_back(p1[i]);

    // Packet 2: address 0, 20 payload bytes, correct parity.
    p2.push_back(make_header(3'd0, 5'd20));
    for (int i = 0; i < 20; i++) p2.push_back(flit_t'(8'h40 + i));
    sum = '0;
    foreach (p2[i]) sum ^= p2[i];
    p2.push_back(sum);
    foreach (p2[i]) expect_q.push_back(p2[i]);

    in_p1 = 1'b1;
    fork
      send(p1);
      begin
        // vld_out_0 rises while packet 1 is still coming in.
        repeat (3) @(posedge clock);
        #1 check(vld_out[0], "vld_out[0] high while packet 1 arrives");
      end
    join
    in_p1 = 1'b0;
    @(posedge clock); #1;
    check(err_pulses == 1, "err pulsed once after packet 1");

    // Delay between packets, then packet 2 with the reader still idle.
    repeat (3) @(negedge clock);
    in_p2 = 1'b1;
    fork
      send(p2);
      begin
        // Response delay: the reader starts once the FIFO has filled and
        // the source has been suspended for a few cycles.
        wait (suspend_data);
        repeat (4) @(posedge clock);
        reader_on = 1'b1;
      end
    join
    in_p2 = 1'b0;
    repeat (40) @(posedge clock);

    check(err_pulses == 1, "no err after packet 2");
    check(suspend_cycles > 0, "suspend_data raised during packet 2");
    check(suspend_in_p1 == 0, "no suspend during packet 1");
    check(received == p1.size() + p2.size(), $sformatf("received %0d bytes", received));
    check(expect_q.size() == 0, "both packets delivered");
    check(vld_out == '0, "outputs empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
