// AXI4-Lite slave front end shared by the register-file slaves.
//
// Turns the five AXI4-Lite channels into a one-cycle register access:
//   write: AWREADY and WREADY are combinational and rise together, in the
//          same cycle, once AWVALID and WVALID are both high and no write
//          response is pending. That cycle is the wr_en strobe, carrying
//          wr_addr / wr_data / wr_strb straight from the bus. BVALID follows
//          one cycle later and is held until BREADY.
//   read:  ARREADY is high while no read data is pending. The accept cycle is
//          the rd_en strobe; the owner returns rd_data combinationally in that
//          cycle and it is registered onto RDATA, valid one cycle later and
//          held until RREADY.
// Every response is OKAY. Combinational AWREADY follows the convention the
// map gives for new slaves; accepting AW and W only together is this
// design's simplification.
// The concurrent assertions check the master side of the handshake: a valid
// may not drop, and the address may not change, before its ready.
module axil_slave_port
  import virtus_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  axil_req_t       req,
  output axil_rsp_t       rsp,
  // register side
  output logic            wr_en,
  output logic [AW-1:0]   wr_addr,
  output logic [DW-1:0]   wr_data,
  output logic [DW/8-1:0] wr_strb,
  output logic            rd_en,
  output logic [AW-1:0]   rd_addr,
  input  logic [DW-1:0]   rd_data
);

  logic          b_pend;
  logic          r_pend;
  logic [DW-1:0] r_data_q;

  assign wr_en   = req.aw_valid && req.w_valid && !b_pend;
  assign wr_addr = req.aw_addr;
  assign wr_data = req.w_data;
  assign wr_strb = req.w_strb;
  assign rd_en   = req.ar_valid && !r_pend;
  assign rd_addr = req.ar_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_pend   <= 1'b0;
      r_pend   <= 1'b0;
      r_data_q <= '0;
    end else begin
      if (wr_en)                   b_pend <= 1'b1;
      else if (b_pend && req.b_ready) b_pend <= 1'b0;
      if (rd_en) begin
        r_pend   <= 1'b1;
        r_data_q <= rd_data;
      end else if (r_pend && req.r_ready) begin
        r_pend   <= 1'b0;
      end
    end
  end

  always_comb begin
    rsp          = '0;
    rsp.aw_ready = wr_en;
    rsp.w_ready  = wr_en;
    rsp.b_valid  = b_pend;
    rsp.b_resp   = RESP_OKAY;
    rsp.ar_ready = !r_pend;
    rsp.r_valid  = r_pend;
    rsp.r_data   = r_data_q;
    rsp.r_resp   = RESP_OKAY;
  end

  // Master-side handshake rules.
  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n)
    req.aw_valid && !rsp.aw_ready |=> req.aw_valid && $stable(req.aw_addr));
  a_w_hold: assert property (@(posedge clk) disable iff (!rst_n)
    req.w_valid && !rsp.w_ready |=> req.w_valid && $stable(req.w_data));
  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
    req.ar_valid && !rsp.ar_ready |=> req.ar_valid && $stable(req.ar_addr));

endmodule
