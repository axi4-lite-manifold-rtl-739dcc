// System control window (base 0x8003_0000, four 32-bit register slots).
//
//   +0x00  CYCLE    read-only free-running cycle counter, counts every clock
//                   from reset and wraps at 2^32; writes are discarded
//   +0x04  TRAPVEC  read/write trap-vector address, driven on trap_vector
//   +0x08  -        reserved: reads zero, writes discarded
//   +0x0C  HALT     bit 0: writing 1 sets halt (held until reset); writing 0
//                   has no effect; reads return the halt bit
// The register offsets follow the canonical map. Read-only cycle counter,
// reset values of zero, sticky halt and byte strobes on TRAPVEC are this
// design's choices. Accesses use the shared AXI4-Lite front end: a write
// takes effect at the AW/W handshake, a read returns the value at the AR
// handshake one cycle later.
module sys_ctrl
  import virtus_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  axil_req_t     req,
  output axil_rsp_t     rsp,
  output logic [DW-1:0] trap_vector,
  output logic          halt
);

  logic            wr_en, rd_en;
  logic [AW-1:0]   wr_addr, rd_addr;
  logic [DW-1:0]   wr_data, rd_data;
  logic [DW/8-1:0] wr_strb;
  logic [31:0]     cycle_q;

  axil_slave_port u_port (
    .clk, .rst_n, .req, .rsp,
    .wr_en, .wr_addr, .wr_data, .wr_strb,
    .rd_en, .rd_addr, .rd_data
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycle_q     <= '0;
      trap_vector <= '0;
      halt        <= 1'b0;
    end else begin
      cycle_q <= cycle_q + 32'd1;
      if (wr_en) begin
        unique case (wr_addr[3:0])
          SYS_TRAPVEC[3:0]:
            for (int b = 0; b < DW/8; b++)
              if (wr_strb[b]) trap_vector[8*b +: 8] <= wr_data[8*b +: 8];
          SYS_HALT[3:0]:
            if (wr_strb[0] && wr_data[0]) halt <= 1'b1;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (rd_addr[3:0])
      SYS_CYCLE[3:0]:   rd_data = cycle_q;
      SYS_TRAPVEC[3:0]: rd_data = trap_vector;
      SYS_HALT[3:0]:    rd_data = {31'd0, halt};
      default:          rd_data = '0;
    endcase
  end

  logic unused;
  assign unused = ^{wr_addr[AW-1:4], rd_addr[AW-1:4], rd_en};

endmodule
