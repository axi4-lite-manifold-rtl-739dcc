// Self-checking testbench of axi_manifold.
//
// Nine behavioural memory slaves, each answering with its own ID, sit on
// the manifold's target ports. A reference address map, written here as a
// table of (base, size, target) windows, predicts the target of each
// access. The test drives writes and read-backs to random addresses in
// every window, to the first and last word of each window, to the padding
// past each window, to the unused slots 6..15, to addresses with
// addr[30:21] != 0 and to misaligned addresses, and checks: the right slave
// (and only it) sees the access; read data matches a reference memory; an
// access the map does not cover reaches no slave, its write is lost and its
// read returns zero with an OKAY response. A final phase overlaps reads and
// writes to check the two paths are independent, and the cycle count of a
// locally answered access is checked.
module tb_axi_manifold;
  import virtus_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t s_req;
  axil_rsp_t s_rsp;
  axil_req_t m_req [NSLAVES];
  axil_rsp_t m_rsp [NSLAVES];
  int        n_wr [NSLAVES];
  int        n_rd [NSLAVES];

  axi_manifold dut (.clk, .rst_n, .s_req, .s_rsp, .m_req, .m_rsp);
  axil_master_bfm bfm (.clk, .req(s_req), .rsp(s_rsp));

  for (genvar i = 0; i < NSLAVES; i++) begin : g_s
    axil_mem_slave #(.ID(8'(i + 8'h10)), .MAX_DELAY(3)) u_s (
      .clk, .rst_n, .req(m_req[i]), .rsp(m_rsp[i]),
      .n_writes(n_wr[i]), .n_reads(n_rd[i]));
  end

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- model
  typedef struct { logic [31:0] base; logic [31:0] size; int tgt; } win_t;
  win_t map [8] = '{
    '{32'h8000_0000, 32'h1_0000, 1},   // framebuffer
    '{32'h8003_0000, 32'h10,     2},   // system control
    '{32'h8010_0000, 32'h1_0000, 3},   // HDMI
    '{32'h8011_0000, 32'h1000,   4},   // audio
    '{32'h8012_0000, 32'h1000,   5},   // PS/2
    '{32'h8013_0000, 32'h1000,   6},   // GPIO
    '{32'h8014_0000, 32'h1000,   7},   // DS2
    '{32'h8015_0000, 32'h1000,   8}    // fpga_pio
  };

  function automatic int expect_tgt(input logic [31:0] a);
    if (a < 32'h8000_0000) return 0;
    if (a[1:0] != 0) return -1;
    foreach (map[i])
      if (a >= map[i].base && a < map[i].base + map[i].size) return map[i].tgt;
    return -1;
  endfunction

  logic [31:0] ref_mem [logic [31:0]];
  function automatic logic [31:0] ref_rd(input logic [31:0] a, input int t);
    logic [31:0] k;
    k = {a[31:2], 2'b00};
    return ref_mem.exists(k) ? ref_mem[k] : {8'(t + 8'h10), a[23:0]};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int mech_local = 0, mech_fwd = 0, mech_bram = 0;

  task automatic do_write(input logic [31:0] a, input logic [31:0] d, input logic [3:0] s);
    int t, cyc;
    int before_w [NSLAVES];
    t = expect_tgt(a);
    before_w = n_wr;
    bfm.write(a, d, s, $urandom_range(2), $urandom_range(2), cyc);
    repeat (2) @(posedge clk);
    for (int i = 0; i < NSLAVES; i++)
      check(n_wr[i] == before_w[i] + ((i == t) ? 1 : 0),
            $sformatf("write %h: slave %0d saw %0d writes, expected %0d", a, i,
                      n_wr[i] - before_w[i], (i == t)));
    if (t >= 0) begin
      logic [31:0] v;
      v = ref_rd(a, t);
      for (int b = 0; b < 4; b++) if (s[b]) v[8*b +: 8] = d[8*b +: 8];
      ref_mem[{a[31:2], 2'b00}] = v;
      mech_fwd++;
      if (t == 0) mech_bram++;
    end else begin
      mech_local++;
    end
  endtask

  task automatic do_read(input logic [31:0] a);
    int t, cyc;
    logic [31:0] d;
    int before_r [NSLAVES];
    t = expect_tgt(a);
    before_r = n_rd;
    bfm.read(a, $urandom_range(2), d, cyc);
    check(d == ((t >= 0) ? ref_rd(a, t) : 32'h0),
          $sformatf("read %h: got %h expected %h", a, d, (t >= 0) ? ref_rd(a, t) : 32'h0));
    for (int i = 0; i < NSLAVES; i++)
      check(n_rd[i] == before_r[i] + ((i == t) ? 1 : 0),
            $sformatf("read %h: slave %0d saw %0d reads", a, i, n_rd[i] - before_r[i]));
    if (t < 0) begin
      mech_local++;
      // locally answered read: AR accepted at once, R one cycle later
      check(cyc <= 3, $sformatf("local read of %h took %0d cycles", a, cyc));
    end
  endtask

  function automatic logic [31:0] pick_addr();
    int k;
    win_t w;
    k = $urandom_range(9);
    w = map[$urandom_range(7)];
    case (k)
      0, 1, 2, 3: return w.base + ($urandom_range(w.size / 4 - 1) * 4);  // inside
      4: return w.base;                                                   // first word
      5: return w.base + w.size - 4;                                      // last word
      6: return (w.size < 32'h1_0000) ? w.base + w.size + ($urandom_range(15) * 4)
                                      : w.base + 32'h1_0000;              // padding / next
      7: return w.base + ($urandom_range(w.size / 4 - 1) * 4) + $urandom_range(1, 3); // misaligned
      8: return 32'h8016_0000 + ($urandom_range(9) << 16) + ($urandom_range(255) * 4); // slot 6..15
      default:
        if ($urandom_range(1) != 0) return {1'b1, 10'($urandom_range(1, 1023)), 21'($urandom) & ~21'h3};
        else                   return {1'b0, 31'($urandom)};                // BRAM
    endcase
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // the map's own examples
    do_write(32'h8013_0001, 32'hDEAD_BEEF, 4'hF);   // misaligned
    do_read (32'h8013_0001);
    do_write(32'h8016_0000, 32'h1234_5678, 4'hF);   // unmapped slot
    do_read (32'h8016_0000);
    do_write(32'h8003_0010, 32'h1, 4'hF);           // past the 16-byte window
    do_read (32'h8003_0010);
    do_write(32'h8013_0020, 32'h5A5A_5A5A, 4'hF);   // inside GPIO window
    do_read (32'h8013_0020);
    do_read (32'h8010_0000);                         // HDMI base
    do_read (32'h8010_FFFC);                         // last word of HDMI
    do_read (32'h8011_1000);                         // audio padding
    do_read (32'h0000_0004);                         // BRAM

    // random traffic
    repeat (600) begin
      a = pick_addr();
      if ($urandom_range(2) != 0) do_write(a, $urandom, 4'($urandom_range(1, 15)));
      do_read(a);
    end

    // reads and writes at the same time, to different targets
    repeat (40) begin
      logic [31:0] wa, ra, d, rd_exp;
      int cyc1, cyc2, tw, tr;
      wa = map[$urandom_range(7)].base + 32'h8;
      ra = map[$urandom_range(7)].base + 32'hC;
      tw = expect_tgt(wa); tr = expect_tgt(ra);
      d  = $urandom;
      rd_exp = ref_rd(ra, tr);
      fork
        bfm.write(wa, d, 4'hF, 0, 0, cyc1);
        begin
          logic [31:0] q;
          // a separate master thread on the read channels
          bfm.read(ra, 0, q, cyc2);
          check(q == rd_exp || wa[31:2] == ra[31:2],
                $sformatf("overlapped read %h got %h expected %h", ra, q, rd_exp));
        end
      join
      ref_mem[{wa[31:2], 2'b00}] = d;
    end

    $display("mechanisms: forwarded=%0d bram=%0d local=%0d", mech_fwd, mech_bram, mech_local);
    check(mech_local > 0 && mech_fwd > 0 && mech_bram > 0, "every path was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
