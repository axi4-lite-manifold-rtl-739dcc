// Self-checking testbench of gpio.
//
// Checks DIR and OUT read-back and their drive of gpio_oe / gpio_o (with
// byte strobes), that IN shows the pins two clock edges after they change,
// that a rising edge on an input pin sets its INT_STATUS bit and irq, that
// an output pin sets none, that writing 1 clears a bit and writing 0 keeps
// it, and that offsets past +0x0C read zero.
module tb_gpio;
  import virtus_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t   req;
  axil_rsp_t   rsp;
  logic [15:0] gpio_i = '0, gpio_o, gpio_oe;
  logic        irq;

  gpio dut (.clk, .rst_n, .req, .rsp, .gpio_i, .gpio_o, .gpio_oe, .irq);
  axil_master_bfm bfm (.clk, .req, .rsp);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [15:0] dir, out, pins, ints, prev;
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    dir = 0; out = 0; ints = 0; pins = 0;

    // DIR / OUT
    repeat (30) begin
      logic [31:0] v; logic [3:0] s; logic [11:0] off;
      v = $urandom; s = 4'($urandom_range(1, 15));
      off = $urandom_range(1) != 0 ? 12'h000 : 12'h004;
      bfm.write(32'h8013_0000 | 32'(off), v, s, $urandom_range(2), 0, cyc);
      for (int b = 0; b < 2; b++)
        if (s[b]) begin
          if (off == 0) dir[8*b +: 8] = v[8*b +: 8];
          else          out[8*b +: 8] = v[8*b +: 8];
        end
      bfm.read(32'h8013_0000, 0, d, cyc);
      check(d == {16'd0, dir}, $sformatf("DIR %h expected %h", d, dir));
      bfm.read(32'h8013_0004, 0, d, cyc);
      check(d == {16'd0, out}, $sformatf("OUT %h expected %h", d, out));
      check(gpio_oe == dir && gpio_o == out, "pins follow DIR/OUT");
    end

    // IN latency: change the pins right after an edge, count edges
    @(posedge clk); #1;
    prev = gpio_i;
    gpio_i = 16'hA5C3;
    begin
      int n; n = 0;
      while (dut.in_q != 16'hA5C3 && n < 10) begin @(posedge clk); #1; n++; end
      check(n == 2, $sformatf("IN follows the pins after %0d clocks, expected 2", n));
    end
    bfm.read(32'h8013_0008, 0, d, cyc);
    check(d == 32'h0000_A5C3, $sformatf("IN %h", d));

    // interrupts: clear everything first
    bfm.write(32'h8013_000C, 32'hFFFF, 4'hF, 0, 0, cyc);
    bfm.write(32'h8013_0000, 32'h00FF, 4'hF, 0, 0, cyc);  // low byte outputs
    dir = 16'h00FF;
    gpio_i = 16'h0000;
    repeat (4) @(posedge clk);
    bfm.write(32'h8013_000C, 32'hFFFF, 4'hF, 0, 0, cyc);
    bfm.read(32'h8013_000C, 0, d, cyc);
    check(d == 0 && !irq, "INT_STATUS clear");
    repeat (20) begin
      logic [15:0] nxt;
      prev = gpio_i;
      nxt = 16'($urandom);
      gpio_i = nxt;
      ints |= nxt & ~prev & ~dir;
      repeat (4) @(posedge clk);
      bfm.read(32'h8013_000C, 0, d, cyc);
      check(d == {16'd0, ints}, $sformatf("INT_STATUS %h expected %h", d, ints));
      check(irq == (ints != 0), "irq is the OR of INT_STATUS");
      if ($urandom_range(1) != 0) begin
        logic [15:0] c;
        c = 16'($urandom);
        bfm.write(32'h8013_000C, {16'd0, c}, 4'h3, 0, 0, cyc);
        ints &= ~c;
        bfm.read(32'h8013_000C, 0, d, cyc);
        check(d == {16'd0, ints}, $sformatf("INT_STATUS after W1C %h expected %h", d, ints));
      end
    end

    // out of range
    bfm.write(32'h8013_0020, 32'hFFFF_FFFF, 4'hF, 0, 0, cyc);
    bfm.read(32'h8013_0020, 0, d, cyc);
    check(d == 0, "offset +0x20 reads zero");
    bfm.read(32'h8013_0100, 0, d, cyc);
    check(d == 0, "offset +0x100 reads zero");
    bfm.read(32'h8013_0000, 0, d, cyc);
    check(d == {16'd0, dir}, "out-of-range write left DIR alone");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
