// 16-bit bidirectional GPIO register file (base 0x8013_0000).
//
//   +0x00  DIR         per-pin direction, 1 = output (read/write)
//   +0x04  OUT         output values (read/write)
//   +0x08  IN          pin values after a two-flop synchroniser (read-only)
//   +0x0C  INT_STATUS  bit i is set when input pin i rises; write 1 to clear
//   other offsets      read zero, writes discarded
// The pins follow the tristate-tuple pattern: gpio_o carries OUT, gpio_oe
// carries DIR, and the pad (outside this module) drives the pin when oe is
// 1; gpio_i is the pad's input. irq is the OR of INT_STATUS.
// Register offsets, the W1C INT_STATUS and zero reads past +0x0C follow
// the canonical map; what sets an INT_STATUS bit (a rising edge on a pin
// configured as input), the synchroniser, zero reset values and irq are
// this design's choices. Timing: a pin change is visible in IN after the
// second rising clock edge, and its INT_STATUS bit is set at that edge.
module gpio
  import virtus_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  axil_req_t        req,
  output axil_rsp_t        rsp,
  input  logic [WIDTH-1:0] gpio_i,
  output logic [WIDTH-1:0] gpio_o,
  output logic [WIDTH-1:0] gpio_oe,
  output logic             irq
);

  logic            wr_en, rd_en;
  logic [AW-1:0]   wr_addr, rd_addr;
  logic [DW-1:0]   wr_data, rd_data;
  logic [DW/8-1:0] wr_strb;

  logic [WIDTH-1:0] dir_q, out_q, sync1_q, in_q, int_q;
  logic [DW-1:0]    wmask;

  axil_slave_port u_port (
    .clk, .rst_n, .req, .rsp,
    .wr_en, .wr_addr, .wr_data, .wr_strb,
    .rd_en, .rd_addr, .rd_data
  );

  always_comb
    for (int b = 0; b < DW/8; b++) wmask[8*b +: 8] = {8{wr_strb[b]}};

  logic in_range_w, in_range_r;
  assign in_range_w = (wr_addr[11:4] == '0);
  assign in_range_r = (rd_addr[11:4] == '0);

  logic [WIDTH-1:0] rise;
  assign rise = sync1_q & ~in_q & ~dir_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dir_q   <= '0;
      out_q   <= '0;
      sync1_q <= '0;
      in_q    <= '0;
      int_q   <= '0;
    end else begin
      sync1_q <= gpio_i;
      in_q    <= sync1_q;
      if (wr_en && in_range_w && wr_addr[3:0] == GPIO_DIR[3:0])
        dir_q <= (dir_q & ~wmask[WIDTH-1:0]) | (wr_data[WIDTH-1:0] & wmask[WIDTH-1:0]);
      if (wr_en && in_range_w && wr_addr[3:0] == GPIO_OUT[3:0])
        out_q <= (out_q & ~wmask[WIDTH-1:0]) | (wr_data[WIDTH-1:0] & wmask[WIDTH-1:0]);
      if (wr_en && in_range_w && wr_addr[3:0] == GPIO_INT[3:0])
        int_q <= (int_q & ~(wr_data[WIDTH-1:0] & wmask[WIDTH-1:0])) | rise;
      else
        int_q <= int_q | rise;
    end
  end

  always_comb begin
    rd_data = '0;
    if (in_range_r) begin
      unique case (rd_addr[3:0])
        GPIO_DIR[3:0]: rd_data[WIDTH-1:0] = dir_q;
        GPIO_OUT[3:0]: rd_data[WIDTH-1:0] = out_q;
        GPIO_IN[3:0]:  rd_data[WIDTH-1:0] = in_q;
        GPIO_INT[3:0]: rd_data[WIDTH-1:0] = int_q;
        default: ;
      endcase
    end
  end

  assign gpio_o  = out_q;
  assign gpio_oe = dir_q;
  assign irq     = |int_q;

  logic unused;
  assign unused = ^{wr_addr[AW-1:12], rd_addr[AW-1:12], rd_en, wr_data, wmask};

endmodule
