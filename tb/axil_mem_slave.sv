// Behavioural AXI4-Lite slave used by the testbenches: a sparse memory.
//
// Each ready and each response comes after a random delay of 0..MAX_DELAY
// clocks, AW and W independently, so masters see every legal ordering.
// A word never written reads as {ID, addr[23:0]}, which names the slave
// that answered. n_writes / n_reads count accepted write / read addresses.
module axil_mem_slave
  import virtus_pkg::*;
#(
  parameter logic [7:0] ID = 8'h00,
  parameter int MAX_DELAY = 3
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t req,
  output axil_rsp_t rsp,
  output int        n_writes,
  output int        n_reads
);

  logic [31:0] mem [logic [31:0]];
  logic [31:0] aw_addr, w_data, ar_addr, r_data;
  logic [3:0]  w_strb;
  bit          have_aw, have_w, b_pend, b_out, r_pend, r_out;
  bit          aw_rdy, w_rdy, ar_rdy;
  int          aw_wait, w_wait, b_wait, ar_wait, r_wait;

  function automatic logic [31:0] rd(input logic [31:0] a);
    logic [31:0] k;
    k = {a[31:2], 2'b00};
    return mem.exists(k) ? mem[k] : {ID, a[23:0]};
  endfunction

  function automatic int dly();
    return int'($urandom_range(MAX_DELAY));
  endfunction

  initial begin
    rsp = '0;
    n_writes = 0; n_reads = 0;
    {have_aw, have_w, b_pend, b_out, r_pend, r_out, aw_rdy, w_rdy, ar_rdy} = '0;
    aw_wait = dly(); w_wait = dly(); ar_wait = dly(); b_wait = 0; r_wait = 0;
  end

  always @(posedge clk) begin
    bit aw_hs, w_hs, b_hs, ar_hs, r_hs;
    aw_hs = aw_rdy && req.aw_valid;
    w_hs  = w_rdy  && req.w_valid;
    b_hs  = b_out  && req.b_ready;
    ar_hs = ar_rdy && req.ar_valid;
    r_hs  = r_out  && req.r_ready;

    // write side
    if (aw_hs) begin have_aw = 1; aw_addr = req.aw_addr; n_writes++; end
    if (w_hs)  begin have_w = 1; w_data = req.w_data; w_strb = req.w_strb; end
    if (b_hs)  begin b_out = 0; b_pend = 0; aw_wait = dly(); w_wait = dly(); end
    if (have_aw && have_w && !b_pend) begin
      logic [31:0] v;
      v = rd(aw_addr);
      for (int b = 0; b < 4; b++) if (w_strb[b]) v[8*b +: 8] = w_data[8*b +: 8];
      mem[{aw_addr[31:2], 2'b00}] = v;
      have_aw = 0; have_w = 0; b_pend = 1; b_wait = dly();
    end else if (b_pend && !b_out) begin
      if (b_wait == 0) b_out = 1; else b_wait--;
    end
    aw_rdy = 0; w_rdy = 0;
    if (!have_aw && !b_pend) begin
      if (aw_wait == 0) aw_rdy = 1; else aw_wait--;
    end
    if (!have_w && !b_pend) begin
      if (w_wait == 0) w_rdy = 1; else w_wait--;
    end

    // read side
    if (ar_hs) begin r_pend = 1; ar_addr = req.ar_addr; n_reads++; r_wait = dly(); end
    if (r_hs)  begin r_out = 0; r_pend = 0; ar_wait = dly(); end
    if (r_pend && !r_out && !ar_hs) begin
      if (r_wait == 0) begin r_out = 1; r_data = rd(ar_addr); end else r_wait--;
    end
    ar_rdy = 0;
    if (!r_pend) begin
      if (ar_wait == 0) ar_rdy = 1; else ar_wait--;
    end

    if (!rst_n) begin
      {have_aw, have_w, b_pend, b_out, r_pend, r_out, aw_rdy, w_rdy, ar_rdy} = '0;
    end

    rsp.aw_ready <= aw_rdy;
    rsp.w_ready  <= w_rdy;
    rsp.b_valid  <= b_out;
    rsp.b_resp   <= RESP_OKAY;
    rsp.ar_ready <= ar_rdy;
    rsp.r_valid  <= r_out;
    rsp.r_data   <= r_data;
    rsp.r_resp   <= RESP_OKAY;
  end

endmodule
