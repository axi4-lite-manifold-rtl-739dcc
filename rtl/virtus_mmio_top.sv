// MMIO side of the Virtus console: the AXI4-Lite manifold and its slaves.
//
// The CPU's data port (cpu_req / cpu_rsp) enters the manifold, which routes
// every access by address (see axi_manifold): BRAM below 0x8000_0000, and
// above it the framebuffer, system control and the 0x801N_0000 peripheral
// family. The slaves whose register function is defined here are built in:
//   0x8003_0000  sys_ctrl      cycle counter, trap vector, halt
//   0x8011_0000  audio_pwm     22 kHz 8-bit PWM audio with a sample ring
//   0x8012_0000  ps2_keyboard  PS/2 receiver, scancode FIFO, shift state
//   0x8013_0000  gpio          16-bit tristate-tuple GPIO
// The remaining targets are brought out as AXI4-Lite master ports, to be
// connected to their own IP: BRAM (instr_mem + data_mem), the pixel
// framebuffer, HDMI / console, DS2 gamepad and fpga_pio. Misaligned and
// unmapped accesses never leave the manifold: writes are discarded, reads
// return zero. All ports are synchronous to clk; rst_n is an active-low
// asynchronous reset.
// The address map, the window sizes and the slave register offsets follow
// the canonical console map. Carrying AXI4-Lite as packed structs, the
// 100 MHz default clock and bringing the unbuilt targets out as ports are
// this design's choices.
module virtus_mmio_top
  import virtus_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 100_000_000,
  parameter int unsigned SAMPLE_HZ   = 22_000,
  parameter int unsigned PS2_TIMEOUT = CLK_HZ / 5_000
) (
  input  logic          clk,
  input  logic          rst_n,
  // CPU data port
  input  axil_req_t     cpu_req,
  output axil_rsp_t     cpu_rsp,
  // targets outside this block
  output axil_req_t     bram_req,
  input  axil_rsp_t     bram_rsp,
  output axil_req_t     fb_req,
  input  axil_rsp_t     fb_rsp,
  output axil_req_t     hdmi_req,
  input  axil_rsp_t     hdmi_rsp,
  output axil_req_t     ds2_req,
  input  axil_rsp_t     ds2_rsp,
  output axil_req_t     pio_req,
  input  axil_rsp_t     pio_rsp,
  // system control
  output logic [DW-1:0] trap_vector,
  output logic          halt,
  // GPIO pads (tristate tuple)
  input  logic [15:0]   gpio_i,
  output logic [15:0]   gpio_o,
  output logic [15:0]   gpio_oe,
  output logic          gpio_irq,
  // audio
  output logic          audio_pwm_out,
  output logic          audio_half_empty,
  // PS/2 keyboard
  input  logic          ps2_clk,
  input  logic          ps2_data,
  output logic          ps2_scancode_ready
);

  axil_req_t m_req [NSLAVES];
  axil_rsp_t m_rsp [NSLAVES];

  axi_manifold u_manifold (
    .clk, .rst_n,
    .s_req (cpu_req),
    .s_rsp (cpu_rsp),
    .m_req,
    .m_rsp
  );

  // targets outside
  assign bram_req        = m_req[SL_BRAM];
  assign m_rsp[SL_BRAM]  = bram_rsp;
  assign fb_req          = m_req[SL_FB];
  assign m_rsp[SL_FB]    = fb_rsp;
  assign hdmi_req        = m_req[SL_HDMI];
  assign m_rsp[SL_HDMI]  = hdmi_rsp;
  assign ds2_req         = m_req[SL_DS2];
  assign m_rsp[SL_DS2]   = ds2_rsp;
  assign pio_req         = m_req[SL_PIO];
  assign m_rsp[SL_PIO]   = pio_rsp;

  sys_ctrl u_sys (
    .clk, .rst_n,
    .req (m_req[SL_SYS]),
    .rsp (m_rsp[SL_SYS]),
    .trap_vector,
    .halt
  );

  logic audio_tick;
  audio_pwm #(
    .CLK_HZ    (CLK_HZ),
    .SAMPLE_HZ (SAMPLE_HZ)
  ) u_audio (
    .clk, .rst_n,
    .req         (m_req[SL_AUDIO]),
    .rsp         (m_rsp[SL_AUDIO]),
    .pwm_out     (audio_pwm_out),
    .half_empty  (audio_half_empty),
    .sample_tick (audio_tick)
  );

  logic ps2_frame_error;
  ps2_keyboard #(
    .TIMEOUT (PS2_TIMEOUT)
  ) u_ps2 (
    .clk, .rst_n,
    .req            (m_req[SL_PS2]),
    .rsp            (m_rsp[SL_PS2]),
    .ps2_clk,
    .ps2_data,
    .scancode_ready (ps2_scancode_ready),
    .frame_error    (ps2_frame_error)
  );

  gpio #(
    .WIDTH (16)
  ) u_gpio (
    .clk, .rst_n,
    .req (m_req[SL_GPIO]),
    .rsp (m_rsp[SL_GPIO]),
    .gpio_i,
    .gpio_o,
    .gpio_oe,
    .irq (gpio_irq)
  );

  logic unused;
  assign unused = ^{audio_tick, ps2_frame_error};

endmodule
