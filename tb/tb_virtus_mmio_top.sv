// End-to-end testbench of virtus_mmio_top at its default parameters
// (100 MHz clock, 22 kHz audio, 200 us PS/2 timeout).
//
// A CPU-side master walks the whole address map through the manifold:
//   - BRAM, framebuffer, HDMI, DS2 and fpga_pio are behavioural memories
//     that answer with their own ID; writes land in the right one and
//     read back;
//   - misaligned and unmapped accesses (unused slots, window padding)
//     reach no target, lose the write and read zero;
//   - system control: cycle counter, trap vector, halt;
//   - GPIO: outputs drive the pads, inputs read back, a rising edge raises
//     gpio_irq, W1C clears it;
//   - audio: a short tune is written into the ring, HEAD is advanced, every
//     sample is measured on the PWM output at one sample per CLK/22 kHz,
//     half-empty and underrun are seen;
//   - PS/2: a keyboard model types shift + key; the scancodes are read from
//     the FIFO and the shift state is seen.
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_virtus_mmio_top;
  import virtus_pkg::*;

  localparam int CLK_HZ = 100_000_000;
  localparam int DIV    = (CLK_HZ + 11_000) / 22_000;   // clocks per sample
  localparam int PS2_HALF = 3000;                       // 30 us phase: ~16.7 kHz

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t cpu_req;
  axil_rsp_t cpu_rsp;
  axil_req_t x_req [5];
  axil_rsp_t x_rsp [5];
  int        x_wr [5];
  int        x_rd [5];
  logic [31:0] trap_vector;
  logic        halt;
  logic [15:0] gpio_i = '0, gpio_o, gpio_oe;
  logic        gpio_irq, audio_pwm_out, audio_half_empty;
  logic        ps2_clk = 1, ps2_data = 1, ps2_scancode_ready;

  virtus_mmio_top dut (
    .clk, .rst_n,
    .cpu_req, .cpu_rsp,
    .bram_req (x_req[0]), .bram_rsp (x_rsp[0]),
    .fb_req   (x_req[1]), .fb_rsp   (x_rsp[1]),
    .hdmi_req (x_req[2]), .hdmi_rsp (x_rsp[2]),
    .ds2_req  (x_req[3]), .ds2_rsp  (x_rsp[3]),
    .pio_req  (x_req[4]), .pio_rsp  (x_rsp[4]),
    .trap_vector, .halt,
    .gpio_i, .gpio_o, .gpio_oe, .gpio_irq,
    .audio_pwm_out, .audio_half_empty,
    .ps2_clk, .ps2_data, .ps2_scancode_ready
  );

  axil_master_bfm cpu (.clk, .req(cpu_req), .rsp(cpu_rsp));

  for (genvar i = 0; i < 5; i++) begin : g_x
    axil_mem_slave #(.ID(8'(8'hA0 + i)), .MAX_DELAY(2)) u_m (
      .clk, .rst_n, .req(x_req[i]), .rsp(x_rsp[i]), .n_writes(x_wr[i]), .n_reads(x_rd[i]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  typedef enum int {M_EXT, M_MISALIGNED, M_UNMAPPED, M_CYCLE, M_TRAPVEC, M_HALT,
                    M_GPIO_OUT, M_GPIO_IN, M_GPIO_IRQ, M_AUDIO_SAMPLE, M_AUDIO_HALF,
                    M_AUDIO_UNDERRUN, M_PS2_CODE, M_PS2_SHIFT, M_NUM} mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"external target", "misaligned", "unmapped", "cycle counter",
    "trap vector", "halt", "gpio out", "gpio in", "gpio irq", "audio sample",
    "audio half-empty", "audio underrun", "ps2 scancode", "ps2 shift"};

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] d;
  int cyc;

  // every sample period is CLK_HZ / 22 kHz clocks
  longint last_tick = -1;
  int n_tick_checked = 0;
  always @(posedge dut.audio_tick) begin
    if (last_tick >= 0) begin
      check(($time - last_tick) == longint'(10 * DIV),
            $sformatf("sample period %0d clocks, expected %0d", ($time - last_tick) / 10, DIV));
      n_tick_checked++;
    end
    last_tick = $time;
  end

  task automatic wr(input logic [31:0] a, input logic [31:0] v, input logic [3:0] s = 4'hF);
    cpu.write(a, v, s, $urandom_range(1), $urandom_range(1), cyc);
  endtask
  task automatic rd(input logic [31:0] a);
    cpu.read(a, $urandom_range(1), d, cyc);
  endtask

  task automatic ps2_send(input logic [7:0] code);
    logic [10:0] f;
    f = {1'b1, ~^code, code, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = f[i];
      repeat (PS2_HALF) @(posedge clk);
      ps2_clk = 0;
      repeat (PS2_HALF) @(posedge clk);
      ps2_clk = 1;
    end
    ps2_data = 1;
    repeat (2 * PS2_HALF) @(posedge clk);
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ---------------------------------------------- external targets
    begin
      static logic [31:0] base [5] = '{32'h0000_1000, 32'h8000_0000, 32'h8010_0000,
                                       32'h8014_0000, 32'h8015_0000};
      for (int i = 0; i < 5; i++) begin
        int w0, r0;
        w0 = x_wr[i]; r0 = x_rd[i];
        rd(base[i] + 32'h40);
        check(d == {8'(8'hA0 + i), base[i][23:0] + 24'h40}, $sformatf("target %0d answered %h", i, d));
        wr(base[i] + 32'h40, 32'hC0DE_0000 + i);
        rd(base[i] + 32'h40);
        check(d == 32'hC0DE_0000 + i, $sformatf("target %0d read back %h", i, d));
        check(x_wr[i] == w0 + 1 && x_rd[i] == r0 + 2, $sformatf("target %0d traffic", i));
        mech[M_EXT]++;
      end
      // tile-map end of the HDMI window and last framebuffer word
      rd(32'h8010_095C); check(d[31:24] == 8'hA2, "HDMI tile-map end reaches HDMI");
      rd(32'h8000_FFFC); check(d[31:24] == 8'hA1, "framebuffer end reaches framebuffer");
    end

    // ---------------------------------------------- misaligned / unmapped
    begin
      int tw, tr;
      static logic [31:0] bad [6] = '{32'h8013_0001, 32'h8016_0000, 32'h801F_0004,
                               32'h8011_1000, 32'h8003_0010, 32'h8020_0000};
      tw = 0; tr = 0;
      for (int i = 0; i < 5; i++) begin tw += x_wr[i]; tr += x_rd[i]; end
      foreach (bad[i]) begin
        wr(bad[i], 32'hFFFF_FFFF);
        rd(bad[i]);
        check(d == 0, $sformatf("%h reads zero", bad[i]));
        if (i == 0) mech[M_MISALIGNED]++; else mech[M_UNMAPPED]++;
      end
      for (int i = 0; i < 5; i++) begin tw -= x_wr[i]; tr -= x_rd[i]; end
      check(tw == 0 && tr == 0, "no external target saw a bad access");
      rd(32'h8013_0000);
      check(d == 0, "misaligned write did not reach GPIO DIR");
    end

    // ---------------------------------------------- latency through the manifold
    cpu.write(32'h8003_0004, 32'h0, 4'hF, 0, 0, cyc);
    check(cyc == 3, $sformatf("write to a built slave took %0d clocks, expected 3", cyc));
    cpu.read(32'h8003_0004, 0, d, cyc);
    check(cyc == 3, $sformatf("read of a built slave took %0d clocks, expected 3", cyc));

    // ---------------------------------------------- system control
    begin
      logic [31:0] c0;
      rd(32'h8003_0000); c0 = d;
      repeat (100) @(posedge clk);
      rd(32'h8003_0000);
      check(d - c0 >= 100 && d - c0 < 120, $sformatf("cycle counter moved %0d", d - c0));
      mech[M_CYCLE]++;
      wr(32'h8003_0004, 32'h0000_0200);
      rd(32'h8003_0004);
      check(d == 32'h200 && trap_vector == 32'h200, "trap vector");
      mech[M_TRAPVEC]++;
    end

    // ---------------------------------------------- GPIO
    wr(32'h8013_0000, 32'h0000_00FF);     // low byte out, high byte in
    wr(32'h8013_0004, 32'h0000_005A);
    check(gpio_oe == 16'h00FF && gpio_o[7:0] == 8'h5A, "GPIO outputs");
    mech[M_GPIO_OUT]++;
    gpio_i = 16'h8100;
    repeat (4) @(posedge clk);
    rd(32'h8013_0008);
    check(d == 32'h8100, $sformatf("GPIO IN %h", d));
    mech[M_GPIO_IN]++;
    check(gpio_irq, "GPIO rising edge raises irq");
    rd(32'h8013_000C);
    check(d == 32'h8100, $sformatf("GPIO INT_STATUS %h", d));
    wr(32'h8013_000C, 32'h8100);
    check(!gpio_irq, "W1C clears irq");
    if (d == 32'h8100) mech[M_GPIO_IRQ]++;

    // ---------------------------------------------- audio
    begin
      static logic [7:0] tune [8] = '{8'd10, 8'd250, 8'd128, 8'd64, 8'd192, 8'd0, 8'd255, 8'd33};
      for (int w = 0; w < 2; w++)
        wr(32'h8011_0100 + 32'(4 * w), {tune[4*w+3], tune[4*w+2], tune[4*w+1], tune[4*w]});
      check(audio_half_empty, "empty ring is half empty");
      mech[M_AUDIO_HALF]++;
      @(posedge dut.audio_tick);
      wr(32'h8011_0200, 32'd8);
      for (int i = 0; i < 8; i++) begin
        int highs;
        @(posedge dut.audio_tick);
        repeat (2) @(posedge clk);
        highs = 0;
        repeat (256) begin @(posedge clk); if (audio_pwm_out) highs++; end
        check(highs == int'(tune[i]), $sformatf("sample %0d duty %0d expected %0d", i, highs, tune[i]));
        if (highs == int'(tune[i])) mech[M_AUDIO_SAMPLE]++;
      end
      @(posedge dut.audio_tick);
      repeat (2) @(posedge clk);
      rd(32'h8011_0204);
      check(d == 8, "TAIL reached HEAD");
      begin
        int highs; highs = 0;
        repeat (256) begin @(posedge clk); if (audio_pwm_out) highs++; end
        check(highs == 33, "underrun holds the last sample");
        if (highs == 33) mech[M_AUDIO_UNDERRUN]++;
      end
    end

    // ---------------------------------------------- PS/2
    ps2_send(8'h12);          // left shift down
    ps2_send(8'h1C);          // A
    rd(32'h8012_0008);
    check(d == 32'h3, $sformatf("PS/2 READY %h, expected ready + shift", d));
    if (d[1]) mech[M_PS2_SHIFT]++;
    rd(32'h8012_0010); check(d == 32'h12, "first scancode");
    rd(32'h8012_0010); check(d == 32'h1C, "second scancode");
    if (d == 32'h1C) mech[M_PS2_CODE]++;
    rd(32'h8012_0008);
    check(d == 32'h2 && !ps2_scancode_ready, "FIFO empty, shift held");

    // ---------------------------------------------- halt
    wr(32'h8003_000C, 32'h1);
    check(halt, "halt asserted");
    mech[M_HALT]++;

    check(n_tick_checked >= 8, "sample periods were measured");
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-18s happened %0d times", mech_name[m], mech[m]);
      check(mech[m] > 0, $sformatf("mechanism %s never happened", mech_name[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
