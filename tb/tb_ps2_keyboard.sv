// Self-checking testbench of ps2_keyboard.
//
// A keyboard model sends device-to-host frames (start, 8 data bits LSB
// first, odd parity, stop) with a PS/2 clock of 40 system clocks per bit,
// changing data while the clock is high. Checks: scancodes come out of the
// FIFO in order and READY bit 0 / scancode_ready follow the FIFO; reading
// an empty FIFO returns zero; a frame with bad parity or a bad stop bit is
// dropped and flags frame_error; a frame cut short and left idle longer
// than TIMEOUT is discarded and the next frame still decodes; a full FIFO
// keeps the first 16 codes; the shift state follows make and break codes
// of both shift keys and ignores other keys.
module tb_ps2_keyboard;
  import virtus_pkg::*;

  localparam int TIMEOUT = 400;
  localparam int HALF    = 20;    // system clocks per PS/2 clock phase

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic      ps2_clk = 1, ps2_data = 1;
  logic      scancode_ready, frame_error;

  ps2_keyboard #(.DEPTH(16), .TIMEOUT(TIMEOUT)) dut (
    .clk, .rst_n, .req, .rsp, .ps2_clk, .ps2_data, .scancode_ready, .frame_error);
  axil_master_bfm bfm (.clk, .req, .rsp);

  int checks = 0, failures = 0, n_frame_err = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (frame_error) n_frame_err++;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // nbits: how many of the 11 bits to send (for cut-short frames)
  task automatic send(input logic [7:0] code, input bit bad_parity = 0,
                      input bit bad_stop = 0, input int nbits = 11);
    logic [10:0] f;
    f = {~bad_stop, ~^code ^ bad_parity, code, 1'b0};
    for (int i = 0; i < nbits; i++) begin
      ps2_data = f[i];
      repeat (HALF) @(posedge clk);
      ps2_clk = 0;
      repeat (HALF) @(posedge clk);
      ps2_clk = 1;
    end
    ps2_data = 1;
    repeat (2 * HALF) @(posedge clk);
  endtask

  task automatic expect_code(input logic [7:0] code);
    logic [31:0] d;
    int cyc;
    bfm.read(32'h8012_0008, 0, d, cyc);
    check(d[0] == 1'b1, $sformatf("READY set before reading %h", code));
    bfm.read(32'h8012_0010 + 32'(4 * $urandom_range(3)), 0, d, cyc);
    check(d == {24'd0, code}, $sformatf("scancode %h expected %h", d, code));
  endtask

  task automatic expect_empty();
    logic [31:0] d;
    int cyc;
    bfm.read(32'h8012_0008, 0, d, cyc);
    check(d[0] == 1'b0 && !scancode_ready, "FIFO empty");
    bfm.read(32'h8012_0010, 0, d, cyc);
    check(d == 0, "empty FIFO reads zero");
  endtask

  function automatic bit shift_bit();
    return dut.lshift_q || dut.rshift_q;
  endfunction

  task automatic expect_shift(input bit s);
    logic [31:0] d;
    int cyc;
    bfm.read(32'h8012_0008, 0, d, cyc);
    check(d[1] == s, $sformatf("shift state %0d expected %0d", d[1], s));
  endtask

  initial begin
    logic [7:0] codes [20];
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    expect_empty();

    // a key press and release
    send(8'h1C); expect_code(8'h1C);
    send(8'hF0); send(8'h1C);
    expect_code(8'hF0); expect_code(8'h1C);
    expect_empty();

    // random codes in order
    for (int i = 0; i < 10; i++) begin codes[i] = 8'($urandom); send(codes[i]); end
    check(scancode_ready, "scancode_ready with data waiting");
    for (int i = 0; i < 10; i++) expect_code(codes[i]);
    expect_empty();

    // bad frames
    send(8'h2A, 1, 0);
    check(n_frame_err == 1, "bad parity flagged");
    send(8'h2B, 0, 1);
    check(n_frame_err == 2, "bad stop bit flagged");
    expect_empty();

    // cut-short frame, then idle past the timeout
    send(8'h33, 0, 0, 5);
    repeat (TIMEOUT + 10) @(posedge clk);
    send(8'h34);
    expect_code(8'h34);
    expect_empty();

    // overflow: 18 codes into a 16-entry FIFO
    for (int i = 0; i < 18; i++) begin codes[i] = 8'(8'h40 + i); send(codes[i]); end
    for (int i = 0; i < 16; i++) expect_code(codes[i]);
    expect_empty();

    // shift state
    expect_shift(0);
    send(8'h12); expect_shift(1);           // left shift down
    send(8'h1C); expect_shift(1);           // other key
    send(8'hF0); send(8'h1C); expect_shift(1);
    send(8'h59); expect_shift(1);           // right shift down as well
    send(8'hF0); send(8'h12); expect_shift(1);   // left up, right still down
    send(8'hF0); send(8'h59); expect_shift(0);   // both up
    send(8'hE0); send(8'hF0); send(8'h12); expect_shift(0);
    send(8'h59); expect_shift(1);
    send(8'hF0); send(8'h59); expect_shift(0);
    check(shift_bit() == 0, "shift state internal");
    // drain: the last 16 of the 20 codes sent
    while (scancode_ready) begin
      logic [31:0] d; int cyc;
      bfm.read(32'h8012_0010, 0, d, cyc);
    end
    expect_empty();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
