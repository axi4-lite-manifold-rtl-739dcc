// Self-checking testbench of audio_pwm.
//
// Runs with CLK_HZ = 600 * 22 kHz so one sample lasts 600 clocks, more
// than one 256-clock PWM period. Checks: the sample tick period equals
// CLK_HZ / SAMPLE_HZ; BUF reads back with byte strobes; after HEAD is
// advanced, TAIL advances by one per tick and the duty cycle of pwm_out
// over any 256 clocks equals the sample being played; an empty ring holds
// the last sample; HALF and half_empty follow the fill level (< 128); the
// ring wraps past index 255.
module tb_audio_pwm;
  import virtus_pkg::*;

  localparam int unsigned SAMPLE_HZ = 22_000;
  localparam int unsigned CLK_HZ    = SAMPLE_HZ * 600;
  localparam int unsigned DIV       = 600;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic      pwm_out, half_empty, sample_tick;

  audio_pwm #(.CLK_HZ(CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ)) dut (
    .clk, .rst_n, .req, .rsp, .pwm_out, .half_empty, .sample_tick);
  axil_master_bfm bfm (.clk, .req, .rsp);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] ref_buf [256];
  logic [7:0] head, tail;

  task automatic put_sample(input logic [7:0] idx, input logic [7:0] v);
    int cyc;
    bfm.write(32'h8011_0100 + 32'(idx), {4{v}}, 4'(1 << idx[1:0]), 0, 0, cyc);
    ref_buf[idx] = v;
  endtask

  // count PWM highs over 256 clocks, starting two clocks after a tick
  task automatic measure(output int highs);
    @(posedge sample_tick);
    repeat (2) @(posedge clk);
    highs = 0;
    repeat (256) begin @(posedge clk); if (pwm_out) highs++; end
  endtask

  initial begin
    logic [31:0] d;
    int cyc, highs;
    longint t0, t1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    head = 0; tail = 0;

    // idle: mid-scale, ring empty, half empty
    measure(highs);
    check(highs == 128, $sformatf("idle duty %0d/256, expected 128", highs));
    bfm.read(32'h8011_0010, 0, d, cyc);
    check(d == 1 && half_empty, "empty ring is half empty");

    // tick period
    @(posedge sample_tick); t0 = $time;
    @(posedge sample_tick); t1 = $time;
    check((t1 - t0) == DIV * 10, $sformatf("sample period %0d clocks, expected %0d", (t1 - t0) / 10, DIV));

    // buffer read-back with byte strobes
    for (int i = 0; i < 256; i++) ref_buf[i] = 8'h00;
    for (int w = 0; w < 64; w++) begin
      bfm.write(32'h8011_0100 + 32'(4 * w), 32'h0, 4'hF, 0, 0, cyc);
    end
    repeat (16) put_sample(8'($urandom), 8'($urandom));
    for (int w = 0; w < 64; w += 5) begin
      bfm.read(32'h8011_0100 + 32'(4 * w), 0, d, cyc);
      check(d == {ref_buf[4*w+3], ref_buf[4*w+2], ref_buf[4*w+1], ref_buf[4*w]},
            $sformatf("BUF word %0d read %h", w, d));
    end

    // play 12 samples
    for (int i = 0; i < 12; i++) put_sample(8'(i), (i == 0) ? 8'd0 : (i == 1) ? 8'd255 : 8'($urandom));
    @(posedge sample_tick);
    bfm.write(32'h8011_0200, 32'd12, 4'hF, 0, 0, cyc);
    head = 12;
    bfm.read(32'h8011_0200, 0, d, cyc);
    check(d == 12, "HEAD reads back");
    for (int i = 0; i < 12; i++) begin
      measure(highs);
      check(highs == int'(ref_buf[i]), $sformatf("sample %0d duty %0d expected %0d", i, highs, ref_buf[i]));
      bfm.read(32'h8011_0204, 0, d, cyc);
      check(d == i + 1, $sformatf("TAIL %0d expected %0d", d, i + 1));
    end
    // underrun holds the last sample
    measure(highs);
    check(highs == int'(ref_buf[11]), "underrun holds the last sample");
    bfm.read(32'h8011_0204, 0, d, cyc);
    check(d == 12, "TAIL stops at HEAD");

    // half-empty threshold: fill to 130, watch it drain through 128
    for (int i = 12; i < 256; i++) ref_buf[i] = 8'h40;
    for (int w = 3; w < 64; w++) bfm.write(32'h8011_0100 + 32'(4 * w), 32'h4040_4040, 4'hF, 0, 0, cyc);
    @(posedge sample_tick);
    bfm.write(32'h8011_0200, 32'(8'(12 + 130)), 4'hF, 0, 0, cyc);
    bfm.read(32'h8011_0010, 0, d, cyc);
    check(d == 0 && !half_empty, "130 samples: not half empty");
    begin
      int ticks; ticks = 0;
      while (!half_empty && ticks < 10) begin @(posedge sample_tick); @(posedge clk); ticks++; end
      check(ticks == 3, $sformatf("half empty after %0d samples, expected 3", ticks));
    end

    // wrap: let the ring drain, then fill across index 255
    wait (dut.tail_q == dut.head_q);
    bfm.read(32'h8011_0204, 0, d, cyc);
    tail = 8'(d);
    for (int i = 0; i < 10; i++) put_sample(8'(tail + 8'(i) + 8'd100), 8'(20 * i + 7));
    // move the play position to tail+100 by streaming 100 fill samples
    @(posedge sample_tick);
    bfm.write(32'h8011_0200, 32'(8'(tail + 8'd110)), 4'hF, 0, 0, cyc);
    wait (dut.tail_q == 8'(tail + 8'd100));
    for (int i = 0; i < 10; i++) begin
      measure(highs);
      check(highs == 20 * i + 7, $sformatf("wrapped sample %0d duty %0d", i, highs));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
