// AXI4-Lite master used by the testbenches.
//
// write(addr, data, strb, w_delay, b_delay, cycles): raises AWVALID, then
// WVALID w_delay clocks later (w_delay may be 0), holds each until its
// ready, then waits b_delay clocks before raising BREADY. cycles returns
// the clocks from AWVALID to the B handshake.
// read(addr, r_delay, data, cycles): raises ARVALID, holds it until
// ARREADY, raises RREADY r_delay clocks after ARVALID rose and returns
// RDATA and the clocks from ARVALID to the R handshake.
// Signals change 1 time unit after a rising edge; handshakes are sampled
// on it. Both tasks may run at once from two threads.
module axil_master_bfm
  import virtus_pkg::*;
(
  input  logic      clk,
  output axil_req_t req,
  input  axil_rsp_t rsp
);

  initial req = '0;

  task automatic write(input logic [31:0] addr, input logic [31:0] data,
                       input logic [3:0] strb, input int w_delay, input int b_delay,
                       output int cycles);
    bit aw_done, w_done, b_done;
    int n;
    aw_done = 0; w_done = 0; b_done = 0; n = 0;
    #1;
    req.aw_valid = 1'b1;
    req.aw_addr  = addr;
    req.w_data   = data;
    req.w_strb   = strb;
    req.w_valid  = (w_delay == 0);
    req.b_ready  = (b_delay == 0);
    while (!b_done) begin
      @(posedge clk);
      n++;
      if (req.aw_valid && rsp.aw_ready) aw_done = 1;
      if (req.w_valid  && rsp.w_ready)  w_done  = 1;
      if (req.b_ready  && rsp.b_valid)  b_done  = 1;
      #1;
      req.aw_valid = !aw_done;
      req.w_valid  = !w_done && (n >= w_delay);
      req.b_ready  = !b_done && (n >= b_delay);
      if (n > 1000) begin
        $display("BFM: write to %h never completed", addr);
        b_done = 1;
      end
    end
    req.aw_valid = 1'b0;
    req.w_valid  = 1'b0;
    req.b_ready  = 1'b0;
    cycles = n;
  endtask

  task automatic read(input logic [31:0] addr, input int r_delay,
                      output logic [31:0] data, output int cycles);
    bit ar_done, r_done;
    int n;
    ar_done = 0; r_done = 0; n = 0; data = '0;
    #1;
    req.ar_valid = 1'b1;
    req.ar_addr  = addr;
    req.r_ready  = (r_delay == 0);
    while (!r_done) begin
      @(posedge clk);
      n++;
      if (req.ar_valid && rsp.ar_ready) ar_done = 1;
      if (req.r_ready && rsp.r_valid) begin
        r_done = 1;
        data   = rsp.r_data;
      end
      #1;
      req.ar_valid = !ar_done;
      req.r_ready  = !r_done && (n >= r_delay);
      if (n > 1000) begin
        $display("BFM: read from %h never completed", addr);
        r_done = 1;
      end
    end
    req.ar_valid = 1'b0;
    req.r_ready  = 1'b0;
    cycles = n;
  endtask

endmodule
