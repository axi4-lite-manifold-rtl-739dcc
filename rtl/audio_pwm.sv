// 8-bit mono PWM audio output fed from a sample ring (base 0x8011_0000).
//
//   +0x010        HALF    bit 0: the ring is at least half empty (read-only)
//   +0x100..1FF   BUF     256 one-byte samples, unsigned, four per word,
//                         little-endian; CPU read/write with byte strobes
//   +0x200        HEAD    ring index the CPU writes next (read/write, 8 bits)
//   +0x204        TAIL    ring index the player reads next (read-only)
//   other offsets         read zero, writes discarded
// The CPU fills BUF and then advances HEAD; the player advances TAIL. The
// ring is empty when HEAD == TAIL and holds at most 255 samples. Every
// CLK_HZ / SAMPLE_HZ clocks (the 22 kHz sample tick) the player takes
// BUF[TAIL] into the PWM register and advances TAIL, unless the ring is
// empty, in which case the last sample is held. The PWM counter is 8 bits
// and runs every clock, so the carrier is CLK_HZ / 256 and the duty cycle
// of pwm_out is sample / 256; an off-board RC low-pass turns it into audio.
// half_empty (level < 128) is the doorbell to the CPU, also readable at HALF.
// Sample rate, sample width, the buffer range, HEAD/TAIL offsets and the
// HALF offset follow the canonical map. The clock frequency, the byte
// packing, the ring semantics, holding the last sample on underrun and the
// mid-scale (0x80) reset level are this design's choices.
module audio_pwm
  import virtus_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 100_000_000,
  parameter int unsigned SAMPLE_HZ = 22_000
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t req,
  output axil_rsp_t rsp,
  output logic      pwm_out,
  output logic      half_empty,
  output logic      sample_tick   // one-cycle pulse at every sample period
);

  localparam int unsigned DIV = (CLK_HZ + SAMPLE_HZ / 2) / SAMPLE_HZ;
  localparam int unsigned DIVW = $clog2(DIV + 1);

  logic            wr_en, rd_en;
  logic [AW-1:0]   wr_addr, rd_addr;
  logic [DW-1:0]   wr_data, rd_data;
  logic [DW/8-1:0] wr_strb;

  logic [31:0]     ring_q [64];
  logic [7:0]      head_q, tail_q, sample_q, pwm_cnt_q;
  logic [DIVW-1:0] div_q;
  logic [7:0]      level;
  logic [31:0]     play_word;

  axil_slave_port u_port (
    .clk, .rst_n, .req, .rsp,
    .wr_en, .wr_addr, .wr_data, .wr_strb,
    .rd_en, .rd_addr, .rd_data
  );

  assign level      = head_q - tail_q;
  assign half_empty = (level < 8'd128);
  assign play_word  = ring_q[tail_q[7:2]];

  // Sample buffer: a plain memory with byte-lane writes.
  always_ff @(posedge clk)
    if (wr_en && wr_addr[11:8] == AUD_BUF_LO[11:8])
      for (int b = 0; b < 4; b++)
        if (wr_strb[b]) ring_q[wr_addr[7:2]][8*b +: 8] <= wr_data[8*b +: 8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q      <= '0;
      tail_q      <= '0;
      sample_q    <= 8'h80;
      pwm_cnt_q   <= '0;
      div_q       <= '0;
      sample_tick <= 1'b0;
    end else begin
      pwm_cnt_q   <= pwm_cnt_q + 8'd1;
      sample_tick <= 1'b0;
      if (div_q == DIVW'(DIV - 1)) begin
        div_q       <= '0;
        sample_tick <= 1'b1;
        if (head_q != tail_q) begin
          sample_q <= play_word[8*tail_q[1:0] +: 8];
          tail_q   <= tail_q + 8'd1;
        end
      end else begin
        div_q <= div_q + DIVW'(1);
      end
      if (wr_en && wr_addr[11:0] == AUD_HEAD && wr_strb[0])
        head_q <= wr_data[7:0];
    end
  end

  always_comb begin
    rd_data = '0;
    if (rd_addr[11:8] == AUD_BUF_LO[11:8])
      rd_data = ring_q[rd_addr[7:2]];
    else begin
      unique case (rd_addr[11:0])
        AUD_HALF: rd_data = {31'd0, half_empty};
        AUD_HEAD: rd_data = {24'd0, head_q};
        AUD_TAIL: rd_data = {24'd0, tail_q};
        default:  ;
      endcase
    end
  end

  assign pwm_out = (pwm_cnt_q < sample_q);

  logic unused;
  assign unused = ^{wr_addr[AW-1:12], wr_addr[1:0], rd_addr[AW-1:12], rd_addr[1:0], rd_en, wr_data[31:8]};

endmodule
