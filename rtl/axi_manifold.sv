// AXI4-Lite manifold: address decoder and router between the CPU and its
// memory-mapped targets.
//
// Decode (function decode below), on the 32-bit byte address:
//   addr[31] == 0                      -> BRAM (instr_mem + data_mem)
//   addr[31] == 1 and addr[1:0] != 0   -> misaligned: answered locally
//   addr[30:21] != 0                   -> unmapped: answered locally
//   addr[20] == 1, N = addr[19:16]     -> peripheral slot N, base 0x801N_0000
//                                         (virtus_pkg::periph_base(N)):
//                                         N=0 HDMI (64 KiB window), N=1 audio,
//                                         N=2 PS/2, N=3 GPIO, N=4 DS2,
//                                         N=5 fpga_pio (4 KiB windows);
//                                         N=6..15 unmapped
//   addr[20] == 0, addr[19:16] == 0    -> framebuffer (64 KiB window)
//   addr[20] == 0, addr[19:16] == 3    -> system control (16 B window)
// An address past the end of its window (the padding of the 64 KiB stride)
// is unmapped. An access that is misaligned or unmapped is answered by the
// manifold itself: a write is accepted and discarded, a read returns zero,
// both with an OKAY response (there is no bus-error trap).
// Using addr[20] next to addr[19:16] is this design's choice: the
// framebuffer and HDMI, and system control and GPIO, share addr[19:16].
// Misaligned means addr[1:0] != 0: the bus is 32 bits wide, and a byte or
// halfword store is expected on a word address with WSTRB. BRAM accesses
// are passed on without the alignment check.
//
// Handshake: one write and one read may be in flight at a time, each with
// its own state machine, so reads and writes proceed independently.
//   write: AW and W are taken (in either order) into holding registers,
//          the target is decoded, AW and W are offered to it, and its B is
//          passed back. A write costs two cycles more than the slave alone.
//   read:  AR is taken, decoded, offered to the target, and R is passed back.
// Against a slave that answers at once, each adds one clock to the access:
// with BREADY / RREADY high, a write or read completes three clocks after
// the master raises its valids.
// Ports m_req/m_rsp are indexed by virtus_pkg::slave_e.
module axi_manifold
  import virtus_pkg::*;
#(
  parameter int unsigned FB_WIN     = 32'h0001_0000,  // framebuffer window, bytes
  parameter int unsigned SYS_WIN    = 32'h0000_0010,  // system control window
  parameter int unsigned HDMI_WIN   = 32'h0001_0000,  // HDMI / console window
  parameter int unsigned PERIPH_WIN = 32'h0000_1000   // every other peripheral
) (
  input  logic      clk,
  input  logic      rst_n,
  // from the CPU
  input  axil_req_t s_req,
  output axil_rsp_t s_rsp,
  // to the targets
  output axil_req_t m_req [NSLAVES],
  input  axil_rsp_t m_rsp [NSLAVES]
);

  function automatic slave_e decode(input logic [AW-1:0] a);
    logic [31:0] off;
    off = 32'(a[15:0]);
    if (!a[31])                             return SL_BRAM;
    if (a[1:0] != 2'b00)                    return SL_NONE;
    if (a[31:16] == FB_BASE[31:16])         return (off < FB_WIN)  ? SL_FB  : SL_NONE;
    if (a[31:16] == SYS_BASE[31:16])        return (off < SYS_WIN) ? SL_SYS : SL_NONE;
    if (a[31:16] == periph_base(0)[31:16])  return (off < HDMI_WIN) ? SL_HDMI : SL_NONE;
    for (int n = 1; n <= 5; n++)
      if (a[31:16] == periph_base(n)[31:16])
        return (off < PERIPH_WIN) ? slave_e'(int'(SL_HDMI) + n) : SL_NONE;
    return SL_NONE;
  endfunction

  // ---------------------------------------------------------------- write
  typedef enum logic [1:0] {W_IDLE, W_FWD, W_WAITB, W_LOCAL} wstate_e;
  wstate_e          wstate;
  slave_e           wsel;
  logic             aw_held, w_held, aw_sent, w_sent;
  logic [AW-1:0]    aw_addr_q;
  logic [DW-1:0]    w_data_q;
  logic [DW/8-1:0]  w_strb_q;

  // ---------------------------------------------------------------- read
  typedef enum logic [1:0] {R_IDLE, R_FWD, R_WAITR, R_LOCAL} rstate_e;
  rstate_e          rstate;
  slave_e           rsel;
  logic [AW-1:0]    ar_addr_q;

  logic aw_hs, w_hs, ar_hs;
  logic aw_held_n, w_held_n;
  logic [AW-1:0] aw_addr_n;

  assign aw_hs     = s_req.aw_valid && s_rsp.aw_ready;
  assign w_hs      = s_req.w_valid  && s_rsp.w_ready;
  assign ar_hs     = s_req.ar_valid && s_rsp.ar_ready;
  assign aw_held_n = aw_held || aw_hs;
  assign w_held_n  = w_held  || w_hs;
  assign aw_addr_n = aw_hs ? s_req.aw_addr : aw_addr_q;

  always_comb begin
    s_rsp = '0;
    for (int i = 0; i < NSLAVES; i++) m_req[i] = '0;

    // write channels
    unique case (wstate)
      W_IDLE: begin
        s_rsp.aw_ready = !aw_held;
        s_rsp.w_ready  = !w_held;
      end
      W_FWD: begin
        for (int i = 0; i < NSLAVES; i++) begin
          if (wsel == slave_e'(i)) begin
            m_req[i].aw_valid = !aw_sent;
            m_req[i].aw_addr  = aw_addr_q;
            m_req[i].w_valid  = !w_sent;
            m_req[i].w_data   = w_data_q;
            m_req[i].w_strb   = w_strb_q;
          end
        end
      end
      W_WAITB: begin
        for (int i = 0; i < NSLAVES; i++) begin
          if (wsel == slave_e'(i)) begin
            m_req[i].b_ready = s_req.b_ready;
            s_rsp.b_valid    = m_rsp[i].b_valid;
            s_rsp.b_resp     = m_rsp[i].b_resp;
          end
        end
      end
      W_LOCAL: begin
        s_rsp.b_valid = 1'b1;
        s_rsp.b_resp  = RESP_OKAY;
      end
      default: ;
    endcase

    // read channels
    unique case (rstate)
      R_IDLE: s_rsp.ar_ready = 1'b1;
      R_FWD: begin
        for (int i = 0; i < NSLAVES; i++) begin
          if (rsel == slave_e'(i)) begin
            m_req[i].ar_valid = 1'b1;
            m_req[i].ar_addr  = ar_addr_q;
          end
        end
      end
      R_WAITR: begin
        for (int i = 0; i < NSLAVES; i++) begin
          if (rsel == slave_e'(i)) begin
            m_req[i].r_ready = s_req.r_ready;
            s_rsp.r_valid    = m_rsp[i].r_valid;
            s_rsp.r_data     = m_rsp[i].r_data;
            s_rsp.r_resp     = m_rsp[i].r_resp;
          end
        end
      end
      R_LOCAL: begin
        s_rsp.r_valid = 1'b1;
        s_rsp.r_data  = '0;
        s_rsp.r_resp  = RESP_OKAY;
      end
      default: ;
    endcase
  end

  // Acceptance of the forwarded AW / W by the selected target.
  logic fwd_aw_acc, fwd_w_acc, fwd_ar_acc;
  always_comb begin
    fwd_aw_acc = 1'b0;
    fwd_w_acc  = 1'b0;
    fwd_ar_acc = 1'b0;
    for (int i = 0; i < NSLAVES; i++) begin
      if (wsel == slave_e'(i)) begin
        fwd_aw_acc = m_req[i].aw_valid && m_rsp[i].aw_ready;
        fwd_w_acc  = m_req[i].w_valid  && m_rsp[i].w_ready;
      end
      if (rsel == slave_e'(i))
        fwd_ar_acc = m_req[i].ar_valid && m_rsp[i].ar_ready;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wstate    <= W_IDLE;
      wsel      <= SL_NONE;
      aw_held   <= 1'b0;
      w_held    <= 1'b0;
      aw_sent   <= 1'b0;
      w_sent    <= 1'b0;
      aw_addr_q <= '0;
      w_data_q  <= '0;
      w_strb_q  <= '0;
    end else begin
      unique case (wstate)
        W_IDLE: begin
          if (aw_hs) aw_addr_q <= s_req.aw_addr;
          if (w_hs) begin
            w_data_q <= s_req.w_data;
            w_strb_q <= s_req.w_strb;
          end
          if (aw_held_n && w_held_n) begin
            aw_held <= 1'b0;
            w_held  <= 1'b0;
            aw_sent <= 1'b0;
            w_sent  <= 1'b0;
            wsel    <= decode(aw_addr_n);
            wstate  <= (decode(aw_addr_n) == SL_NONE) ? W_LOCAL : W_FWD;
          end else begin
            aw_held <= aw_held_n;
            w_held  <= w_held_n;
          end
        end
        W_FWD: begin
          if (fwd_aw_acc) aw_sent <= 1'b1;
          if (fwd_w_acc)  w_sent  <= 1'b1;
          if ((aw_sent || fwd_aw_acc) && (w_sent || fwd_w_acc)) wstate <= W_WAITB;
        end
        W_WAITB: if (s_rsp.b_valid && s_req.b_ready) wstate <= W_IDLE;
        W_LOCAL: if (s_req.b_ready) wstate <= W_IDLE;
        default: wstate <= W_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate    <= R_IDLE;
      rsel      <= SL_NONE;
      ar_addr_q <= '0;
    end else begin
      unique case (rstate)
        R_IDLE: if (ar_hs) begin
          ar_addr_q <= s_req.ar_addr;
          rsel      <= decode(s_req.ar_addr);
          rstate    <= (decode(s_req.ar_addr) == SL_NONE) ? R_LOCAL : R_FWD;
        end
        R_FWD:   if (fwd_ar_acc) rstate <= R_WAITR;
        R_WAITR: if (s_rsp.r_valid && s_req.r_ready) rstate <= R_IDLE;
        R_LOCAL: if (s_req.r_ready) rstate <= R_IDLE;
        default: rstate <= R_IDLE;
      endcase
    end
  end

  // Master-side handshake rules on the CPU port.
  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_req.aw_valid && !s_rsp.aw_ready |=> s_req.aw_valid && $stable(s_req.aw_addr));
  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_req.ar_valid && !s_rsp.ar_ready |=> s_req.ar_valid && $stable(s_req.ar_addr));
  // Slave-side rule: a response, once offered, stays until taken.
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_rsp.b_valid && !s_req.b_ready |=> s_rsp.b_valid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_rsp.r_valid && !s_req.r_ready |=> s_rsp.r_valid && $stable(s_rsp.r_data));

endmodule
