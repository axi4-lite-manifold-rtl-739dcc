// Self-checking testbench of sys_ctrl.
//
// Checks that the cycle counter advances by exactly the number of clocks
// between two reads and ignores writes, that TRAPVEC reads back what was
// written (byte strobes included) and drives trap_vector, that HALT is set
// by writing 1, ignores 0 and stays set, and that the reserved slot +0x08
// reads zero. Checks the single-cycle read latency of the slave port.
module tb_sys_ctrl;
  import virtus_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic [31:0] trap_vector;
  logic        halt;

  sys_ctrl dut (.clk, .rst_n, .req, .rsp, .trap_vector, .halt);
  axil_master_bfm bfm (.clk, .req, .rsp);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d0, d1, tv;
    int cyc, gap;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // cycle counter: difference between two reads = clocks between them
    bfm.read(32'h8003_0000, 0, d0, cyc);
    check(cyc == 2, $sformatf("read latency %0d cycles, expected 2", cyc));
    gap = $urandom_range(5, 50);
    repeat (gap) @(posedge clk);
    bfm.read(32'h8003_0000, 0, d1, cyc);
    check(d1 - d0 == 32'(gap + 2), $sformatf("cycle counter moved %0d, expected %0d", d1 - d0, gap + 2));
    bfm.write(32'h8003_0000, 32'h0, 4'hF, 0, 0, cyc);
    bfm.read(32'h8003_0000, 0, d0, cyc);
    check(d0 > d1, "cycle counter is not cleared by a write");

    // trap vector
    check(trap_vector == 0, "trap vector resets to zero");
    repeat (20) begin
      logic [31:0] v;
      logic [3:0]  s;
      v = $urandom; s = 4'($urandom_range(1, 15));
      tv = trap_vector;
      for (int b = 0; b < 4; b++) if (s[b]) tv[8*b +: 8] = v[8*b +: 8];
      bfm.write(32'h8003_0004, v, s, $urandom_range(2), 0, cyc);
      bfm.read(32'h8003_0004, $urandom_range(2), d0, cyc);
      check(d0 == tv, $sformatf("trap vector read %h expected %h", d0, tv));
      check(trap_vector == tv, "trap_vector output follows the register");
    end

    // reserved slot
    bfm.write(32'h8003_0008, 32'hFFFF_FFFF, 4'hF, 0, 0, cyc);
    bfm.read(32'h8003_0008, 0, d0, cyc);
    check(d0 == 0, "reserved slot reads zero");

    // halt
    check(!halt, "halt low after reset");
    bfm.write(32'h8003_000C, 32'h0, 4'hF, 0, 0, cyc);
    check(!halt, "writing 0 does not halt");
    bfm.read(32'h8003_000C, 0, d0, cyc);
    check(d0 == 0, "halt reads 0");
    bfm.write(32'h8003_000C, 32'h1, 4'hF, 0, 1, cyc);
    check(halt, "writing 1 halts");
    bfm.write(32'h8003_000C, 32'h0, 4'hF, 0, 0, cyc);
    check(halt, "halt is sticky");
    bfm.read(32'h8003_000C, 0, d0, cyc);
    check(d0 == 1, "halt reads 1");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
