// AT/PS-2 keyboard receiver with a scancode FIFO (base 0x8012_0000).
//
//   +0x08         READY   bit 0: a scancode is waiting (the scancode-ready
//                         doorbell, also driven on scancode_ready);
//                         bit 1: a shift key is held (read-only)
//   +0x10..0x1F   FIFO    a read returns the oldest scancode in bits [7:0]
//                         and removes it; reads zero when the FIFO is empty
//   other offsets         read zero, writes discarded
// Receiver: the keyboard drives ps2_clk and ps2_data; both pass a two-flop
// synchroniser and data is sampled on each falling edge of ps2_clk. A frame
// is 11 bits: start (0), eight data bits LSB first, odd parity, stop (1). A
// frame with a bad start, parity or stop bit is dropped and frame_error
// pulses. If the clock stops for TIMEOUT clocks in mid-frame, the partial
// frame is discarded. A good frame is pushed into a DEPTH-entry FIFO; when
// the FIFO is full the new scancode is dropped.
// Shift-only modifier: the receiver follows scan-code set 2 make/break codes
// of left shift (0x12) and right shift (0x59), a break being the prefix 0xF0
// followed by the code, and reports whether either shift key is down.
// The register offsets, FIFO window and shift-only modifier follow the
// canonical map; the frame format is the standard PS/2 device-to-host
// frame. Receive-only operation (no host-to-device commands), the FIFO
// depth of 16 (one entry per byte of the window), drop-on-full, the timeout
// and where the shift state is read are this design's choices.
module ps2_keyboard
  import virtus_pkg::*;
#(
  parameter int unsigned DEPTH   = 16,
  parameter int unsigned TIMEOUT = 20_000   // 200 us at 100 MHz
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t req,
  output axil_rsp_t rsp,
  input  logic      ps2_clk,
  input  logic      ps2_data,
  output logic      scancode_ready,
  output logic      frame_error
);

  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  logic            wr_en, rd_en;
  logic [AW-1:0]   wr_addr, rd_addr;
  logic [DW-1:0]   wr_data, rd_data;
  logic [DW/8-1:0] wr_strb;

  axil_slave_port u_port (
    .clk, .rst_n, .req, .rsp,
    .wr_en, .wr_addr, .wr_data, .wr_strb,
    .rd_en, .rd_addr, .rd_data
  );

  // ------------------------------------------------------------ receiver
  logic [2:0]  clk_sync_q;    // [0],[1] synchroniser, [2] previous value
  logic [1:0]  dat_sync_q;
  logic [3:0]  bit_cnt_q;
  logic [9:0]  shift_q;       // bits received so far, newest at [9]
  logic [TW-1:0] idle_q;
  logic        fall;
  logic        frame_done, frame_ok;
  logic [7:0]  code;

  assign fall       = clk_sync_q[2] && !clk_sync_q[1];
  assign frame_done = fall && (bit_cnt_q == 4'd10);
  // shift_q holds start..parity; the stop bit is the bit sampled now.
  assign code       = shift_q[8:1];
  assign frame_ok   = !shift_q[0] && dat_sync_q[1] && ^shift_q[9:1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_sync_q  <= '1;
      dat_sync_q  <= '1;
      bit_cnt_q   <= '0;
      shift_q     <= '0;
      idle_q      <= '0;
      frame_error <= 1'b0;
    end else begin
      clk_sync_q  <= {clk_sync_q[1:0], ps2_clk};
      dat_sync_q  <= {dat_sync_q[0], ps2_data};
      frame_error <= frame_done && !frame_ok;
      if (fall) begin
        idle_q <= '0;
        if (bit_cnt_q == 4'd10) begin
          bit_cnt_q <= '0;
        end else begin
          shift_q   <= {dat_sync_q[1], shift_q[9:1]};
          bit_cnt_q <= bit_cnt_q + 4'd1;
        end
      end else if (bit_cnt_q != '0) begin
        if (idle_q == TW'(TIMEOUT - 1)) begin
          bit_cnt_q <= '0;
          idle_q    <= '0;
        end else begin
          idle_q <= idle_q + TW'(1);
        end
      end
    end
  end

  // ------------------------------------------------------------ shift state
  logic brk_q, lshift_q, rshift_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      brk_q    <= 1'b0;
      lshift_q <= 1'b0;
      rshift_q <= 1'b0;
    end else if (frame_done && frame_ok) begin
      if (code == 8'hF0)      brk_q <= 1'b1;
      else if (code != 8'hE0) brk_q <= 1'b0;
      if (code == 8'h12) lshift_q <= !brk_q;
      if (code == 8'h59) rshift_q <= !brk_q;
    end
  end

  // ------------------------------------------------------------ FIFO
  logic [7:0]  fifo_q [DEPTH];
  logic [PW:0] wptr_q, rptr_q;
  logic        empty, full, push, pop, in_fifo_win;

  assign empty       = (wptr_q == rptr_q);
  assign full        = (wptr_q[PW-1:0] == rptr_q[PW-1:0]) && (wptr_q[PW] != rptr_q[PW]);
  assign push        = frame_done && frame_ok && !full;
  assign in_fifo_win = (rd_addr[11:4] == PS2_FIFO_LO[11:4]);
  assign pop         = rd_en && in_fifo_win && !empty;

  always_ff @(posedge clk)
    if (push) fifo_q[wptr_q[PW-1:0]] <= code;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr_q <= '0;
      rptr_q <= '0;
    end else begin
      if (push) wptr_q <= wptr_q + 1'b1;
      if (pop)  rptr_q <= rptr_q + 1'b1;
    end
  end

  assign scancode_ready = !empty;

  always_comb begin
    rd_data = '0;
    if (in_fifo_win) begin
      if (!empty) rd_data[7:0] = fifo_q[rptr_q[PW-1:0]];
    end else if (rd_addr[11:0] == PS2_READY) begin
      rd_data[1:0] = {lshift_q || rshift_q, !empty};
    end
  end

  logic unused;
  assign unused = ^{wr_en, wr_addr, wr_data, wr_strb, rd_addr[AW-1:12], rd_addr[3:0]};

endmodule
