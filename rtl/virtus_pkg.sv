// Shared types and constants of the MMIO manifold.
//
// AXI4-Lite is carried as two packed structs per link: axil_req_t travels from
// master to slave (AW, W, B-ready, AR, R-ready) and axil_rsp_t from slave to
// master. Responses are always OKAY: the bus has no error trap, so misaligned
// and unmapped accesses are answered with "write discarded / read zero".
//
// The address map follows the canonical CSA-101 map: addr[31] splits BRAM
// (0) from MMIO (1); inside MMIO, addr[20] splits the low region
// (framebuffer at 0x8000_0000, system control at 0x8003_0000) from the
// peripheral family 0x801N_0000, where N = addr[19:16] is the slot number.
// The slave numbering (slave_e) and the window sizes are this design's own.
package virtus_pkg;

  localparam int unsigned AW = 32;
  localparam int unsigned DW = 32;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  typedef struct packed {
    logic          aw_valid;
    logic [AW-1:0] aw_addr;
    logic          w_valid;
    logic [DW-1:0] w_data;
    logic [DW/8-1:0] w_strb;
    logic          b_ready;
    logic          ar_valid;
    logic [AW-1:0] ar_addr;
    logic          r_ready;
  } axil_req_t;

  typedef struct packed {
    logic          aw_ready;
    logic          w_ready;
    logic          b_valid;
    axi_resp_e     b_resp;
    logic          ar_ready;
    logic          r_valid;
    logic [DW-1:0] r_data;
    axi_resp_e     r_resp;
  } axil_rsp_t;

  // Targets of the manifold, in port order.
  typedef enum logic [3:0] {
    SL_BRAM  = 4'd0,  // addr[31] == 0: instr_mem + data_mem
    SL_FB    = 4'd1,  // 0x8000_0000, 64 KiB: pixel framebuffer
    SL_SYS   = 4'd2,  // 0x8003_0000, 16 B:  system control
    SL_HDMI  = 4'd3,  // 0x8010_0000, 64 KiB: HDMI / console (N = 0)
    SL_AUDIO = 4'd4,  // 0x8011_0000, 4 KiB: audio PWM       (N = 1)
    SL_PS2   = 4'd5,  // 0x8012_0000, 4 KiB: PS/2 keyboard   (N = 2)
    SL_GPIO  = 4'd6,  // 0x8013_0000, 4 KiB: GPIO            (N = 3)
    SL_DS2   = 4'd7,  // 0x8014_0000, 4 KiB: DS2 gamepad     (N = 4)
    SL_PIO   = 4'd8,  // 0x8015_0000, 4 KiB: fpga_pio        (N = 5)
    SL_NONE  = 4'd15  // answered by the manifold itself
  } slave_e;

  localparam int unsigned NSLAVES = 9;

  localparam logic [AW-1:0] FB_BASE     = 32'h8000_0000;
  localparam logic [AW-1:0] SYS_BASE    = 32'h8003_0000;
  localparam logic [AW-1:0] PERIPH_BASE = 32'h8010_0000;
  localparam logic [AW-1:0] SLOT_STRIDE = 32'h0001_0000;

  // Base of peripheral slot N: 0x8010_0000 + N * 0x1_0000.
  function automatic logic [AW-1:0] periph_base(input int unsigned n);
    return PERIPH_BASE + AW'(n) * SLOT_STRIDE;
  endfunction

  // Register offsets inside the windows.
  localparam logic [11:0] SYS_CYCLE   = 12'h000;
  localparam logic [11:0] SYS_TRAPVEC = 12'h004;
  localparam logic [11:0] SYS_HALT    = 12'h00C;

  localparam logic [11:0] GPIO_DIR    = 12'h000;
  localparam logic [11:0] GPIO_OUT    = 12'h004;
  localparam logic [11:0] GPIO_IN     = 12'h008;
  localparam logic [11:0] GPIO_INT    = 12'h00C;

  localparam logic [11:0] AUD_HALF    = 12'h010;
  localparam logic [11:0] AUD_BUF_LO  = 12'h100;
  localparam logic [11:0] AUD_HEAD    = 12'h200;
  localparam logic [11:0] AUD_TAIL    = 12'h204;

  localparam logic [11:0] PS2_READY   = 12'h008;
  localparam logic [11:0] PS2_FIFO_LO = 12'h010;

endpackage
