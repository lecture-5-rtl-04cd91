// tb_jtag_engine: self-checking test of the JTAG sequencer against a TAP model.
//
// Runs a JTAG reset, an instruction shift, the two halves of a 32-bit
// USERCODE read (header only, then tailer only), an instruction shift that
// ends in Select-DR-Scan followed by a data shift with the shortened header,
// and random writes/read-backs of a 16-bit user register.  It checks the TAP
// state after each operation, the TDO word, the register contents and the
// number of clock cycles each operation takes (2 per TCK period, the slow
// clock enable being high on every cycle here).
module tb_jtag_engine;
  import odmb_vme_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        start = 1'b0;
  jtag_op_e    op = JOP_DATA;
  logic        header = 1'b0;
  jtag_tail_e  tail = JTAIL_NONE;
  logic [3:0]  nbits_m1 = '0;
  logic [15:0] tdi_word = '0;
  logic        tck, tms, tdi, tdo, busy, done, at_seldr;
  logic [15:0] tdo_reg;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  jtag_engine dut (
    .clk(clk), .rst(rst), .tick(1'b1), .start(start), .op(op), .header(header),
    .tail(tail), .nbits_m1(nbits_m1), .tdi_word(tdi_word), .tdo(tdo),
    .tck(tck), .tms(tms), .tdi(tdi), .busy(busy), .done(done),
    .tdo_reg(tdo_reg), .at_seldr(at_seldr)
  );

  localparam logic [31:0] UCODE = 32'hDBDB_5A17;
  localparam logic [3:0] tap_RTI = 4'd1, tap_SEL_DR = 4'd2, tap_SH_DR = 4'd4;
  jtag_tap_model #(.USERCODE(UCODE)) tap (.tck(tck), .tms(tms), .tdi(tdi), .tdo(tdo));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Run one operation; return the clock cycles from start to done.
  task automatic run(input jtag_op_e o, input logic h, input jtag_tail_e t,
                     input int nbits, input logic [15:0] w, output int cycles);
    int unsigned t0;
    @(negedge clk);
    op = o; header = h; tail = t; nbits_m1 = 4'(nbits - 1); tdi_word = w;
    start = 1'b1;
    @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    cycles = int'(cyc - t0) - 1;  // t0 was read before the edge that took start
  endtask

  int cy;
  logic [15:0] prev, val;

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;

    // JTAG reset: 6 TMS bits
    run(JOP_RESET, 1'b0, JTAIL_NONE, 1, 16'h0, cy);
    check(tap.state == tap_RTI, "reset ends in Run-Test/Idle");
    check(cy == 2 * 6, $sformatf("reset takes 12 cycles, got %0d", cy));

    // instruction USERCODE, header and tailer
    run(JOP_INST, 1'b1, JTAIL_IDLE, 10, 16'h3C8, cy);
    check(tap.ir == 10'h3C8, $sformatf("IR loaded with 3C8, got %h", tap.ir));
    check(tap.state == tap_RTI, "instruction shift ends in Run-Test/Idle");
    check(cy == 2 * (6 + 10 + 2), $sformatf("instruction shift takes 36 cycles, got %0d", cy));

    // lower 16 bits, header only
    run(JOP_DATA, 1'b1, JTAIL_NONE, 16, 16'h0, cy);
    check(tdo_reg == UCODE[15:0], $sformatf("USERCODE low %h, got %h", UCODE[15:0], tdo_reg));
    check(tap.state == tap_SH_DR, "header-only shift stays in Shift-DR");
    check(cy == 2 * (5 + 16), $sformatf("header-only shift takes 42 cycles, got %0d", cy));

    // upper 16 bits, tailer only
    run(JOP_DATA, 1'b0, JTAIL_IDLE, 16, 16'h0, cy);
    check(tdo_reg == UCODE[31:16], $sformatf("USERCODE high %h, got %h", UCODE[31:16], tdo_reg));
    check(tap.state == tap_RTI, "tailer-only shift ends in Run-Test/Idle");
    check(cy == 2 * (16 + 2), $sformatf("tailer-only shift takes 36 cycles, got %0d", cy));

    // instruction USER1 ending in Select-DR-Scan
    run(JOP_INST, 1'b1, JTAIL_SELDR, 10, 16'h3C2, cy);
    check(tap.state == tap_SEL_DR, "special tailer ends in Select-DR-Scan");
    check(at_seldr == 1'b1, "engine remembers Select-DR-Scan");
    check(tap.ir == 10'h3C2, "IR loaded with 3C2");

    // data shift straight from Select-DR-Scan (2-bit header)
    prev = tap.user_reg;
    run(JOP_DATA, 1'b1, JTAIL_IDLE, 16, 16'hA5C3, cy);
    check(tap.user_reg == 16'hA5C3, $sformatf("user register written, got %h", tap.user_reg));
    check(tdo_reg == prev, "previous user register shifted out");
    check(tap.state == tap_RTI, "shift after Select-DR ends in Run-Test/Idle");
    check(cy == 2 * (2 + 16 + 2), $sformatf("short-header shift takes 40 cycles, got %0d", cy));
    check(at_seldr == 1'b0, "Select-DR flag cleared");

    // random writes of 1..16 bits with full header and tailer
    for (int k = 0; k < 20; k++) begin
      int n;
      n = 1 + ($urandom % 16);
      val = 16'($urandom);
      prev = tap.user_reg;
      run(JOP_DATA, 1'b1, JTAIL_IDLE, n, val, cy);
      check(cy == 2 * (5 + n + 2), "data shift cycle count");
      check(tap.state == tap_RTI, "random shift ends in Run-Test/Idle");
      // a shorter shift moves the old contents down by n bits
      if (n == 16) check(tap.user_reg == val, "16-bit write");
      else check(tap.user_reg == ((prev >> n) | (val << (16 - n))),
                 $sformatf("%0d-bit write %h over %h gave %h", n, val, prev, tap.user_reg));
      check(tdo_reg[15 -: 1] == prev[n-1], "last TDO bit is the last bit shifted out");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
