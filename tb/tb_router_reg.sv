// tb_router_reg: self-checking test of router_reg, the data/status/parity
// register block.
//
// Random packets are pushed through the block the way the controller does:
// a header load, a random number of payload loads and a parity load, with
// the held byte drained at random (a byte is loaded only when the register
// is empty or drains in the same cycle). After every edge the testbench
// checks the held byte and its valid flag, the running parity (XOR of the
// header and payload seen so far, computed here independently) and err,
// which must pulse for exactly the cycle after a parity byte that differs
// from the computed parity. About a third of the packets carry a wrong
// parity byte.
module tb_router_reg;
  import router_pkg::*;

  logic  clock = 1'b0;
  logic  resetn;
  flit_t data_in;
  logic  ld_header, ld_data, ld_parity, drain;
  flit_t dout, parity;
  logic  dout_valid, err;

  int checks = 0, failures = 0;
  int errs_seen = 0;

  router_reg dut (.*);

  always #5 clock = ~clock;

  flit_t exp_dout, exp_par;
  logic  exp_valid, exp_err;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s dout=%h/%h valid=%b/%b parity=%h/%h err=%b/%b",
               $time, what, dout, exp_dout, dout_valid, exp_valid,
               parity, exp_par, err, exp_err);
    end
  endtask

  // One cycle. kind: 0 none, 1 header, 2 data, 3 parity.
  task automatic step(int kind, flit_t d, bit dr);
    @(negedge clock);
    data_in   = d;
    ld_header = (kind == 1);
    ld_data   = (kind == 2);
    ld_parity = (kind == 3);
    drain     = dr && exp_valid;
    @(posedge clock);
    exp_err = (kind == 3) && (exp_par != d);
    if (kind == 3 && exp_err) errs_seen++;
    if (kind != 0) begin
      exp_dout  = d;
      exp_valid = 1'b1;
    end else if (dr) begin
      exp_valid = 1'b0;
    end
    if (kind == 1) exp_par = d;
    if (kind == 2) exp_par = exp_par ^ d;
    #1;
    check(dout_valid == exp_valid, "dout_valid");
    if (exp_valid) check(dout == exp_dout, "dout");
    check(parity == exp_par, "parity");
    check(err == exp_err, "err");
  endtask

  // Load one byte, first waiting (with random drains) until the register
  // can take it.
  task automatic load(int kind, flit_t d);
    while (exp_valid && ($urandom % 3 == 0)) step(0, '0, 1'b0);
    step(kind, d, 1'b1);
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_header = 0; ld_data = 0; ld_parity = 0; drain = 0; data_in = '0;
    exp_valid = 0; exp_par = '0; exp_err = 0; exp_dout = '0;
    resetn = 0;
    @(negedge clock); @(negedge clock);
    resetn = 1;
    #1;
    check(!dout_valid && !err && parity == 0, "reset values");

    for (int p = 0; p < 400; p++) begin
      flit_t hdr, sum;
      int n;
      n   = $urandom % 32;
      hdr = flit_t'($urandom);
      sum = hdr;
      load(1, hdr);
      for (int i = 0; i < n; i++) begin
        flit_t b;
        b = flit_t'($urandom);
        sum ^= b;
        load(2, b);
      end
      load(3, ($urandom % 3 == 0) ? (sum ^ flit_t'(1 << ($urandom % 8))) : sum);
      step(0, '0, 1'b1);  // err is checked in this cycle too
    end
    check(errs_seen > 50, "parity errors exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
