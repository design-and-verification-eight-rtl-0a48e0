// tb_router_fifo: self-checking test of router_fifo at its router size
// (8 bits x 16 entries).
//
// Inputs change on the falling edge; after each rising edge the outputs are
// compared with a queue model: data_out must be the oldest entry after a
// read of a non-empty FIFO and keep its value otherwise, full and empty must
// match the model's occupancy, writes into a full FIFO and reads from an
// empty one must have no effect, and reset must give full = 0, empty = 1,
// data_out = 0. Phases: fill to full (plus a refused write), drain to empty
// (plus a refused read), a reset in the middle of a fill, simultaneous read
// and write at the full and empty boundaries, and random traffic.
module tb_router_fifo;

  localparam int unsigned WIDTH = 8;
  localparam int unsigned DEPTH = 16;

  logic             clock = 1'b0;
  logic             resetn;
  logic             write_enb, read_enb;
  logic [WIDTH-1:0] data_in, data_out;
  logic             full, empty;

  int checks = 0, failures = 0;

  router_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clock = ~clock;

  logic [WIDTH-1:0] model[$];
  logic [WIDTH-1:0] exp_out;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s (data_out=%h exp=%h full=%b empty=%b n=%0d)",
               $time, what, data_out, exp_out, full, empty, model.size());
    end
  endtask

  // One clock with the given inputs, then compare with the model.
  task automatic step(bit we, bit re, logic [WIDTH-1:0] d);
    bit do_w, do_r;
    @(negedge clock);
    write_enb = we; read_enb = re; data_in = d;
    do_w = we && (model.size() < DEPTH);
    do_r = re && (model.size() > 0);
    @(posedge clock);
    if (!resetn) begin
      model.delete();
      exp_out = '0;
    end else begin
      if (do_r) exp_out = model.pop_front();
      if (do_w) model.push_back(d);
    end
    #1;
    check(data_out == exp_out, "data_out");
    check(full  == (model.size() == DEPTH), "full");
    check(empty == (model.size() == 0), "empty");
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    write_enb = 0; read_enb = 0; data_in = '0; exp_out = '0;
    resetn = 0;
    step(0, 0, '0);
    step(1, 1, 8'h55);          // reset wins over a write
    check(empty && !full && data_out == 0, "reset values");
    resetn = 1;

    // Fill to full, then one refused write.
    for (int i = 0; i < DEPTH; i++) step(1, 0, 8'(i * 17 + 3));
    check(full, "full after DEPTH writes");
    step(1, 0, 8'hEE);
    // Read and write together while full: the read happens, the write not.
    step(1, 1, 8'hDD);
    // Drain to empty, then one refused read.
    while (model.size() > 0) step(0, 1, '0);
    step(0, 1, '0);
    check(empty, "empty after draining");
    // Read and write together while empty: only the write happens.
    step(1, 1, 8'hA7);
    step(0, 1, '0);
    check(data_out == 8'hA7, "byte written while empty read back");

    // Reset in the middle of a fill.
    for (int i = 0; i < 5; i++) step(1, 0, 8'(i));
    resetn = 0;
    step(0, 0, '0);
    resetn = 1;
    check(empty && !full && data_out == 0, "reset clears a part-filled fifo");

    // Random traffic with varying read/write mixes.
    for (int phase = 0; phase < 4; phase++) begin
      for (int i = 0; i < 1000; i++) begin
        int unsigned pw, pr;
        pw = (phase == 1) ? 80 : (phase == 2) ? 30 : 55;
        pr = (phase == 1) ? 30 : (phase == 2) ? 80 : 55;
        step(($urandom % 100) < pw, ($urandom % 100) < pr, 8'($urandom));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
