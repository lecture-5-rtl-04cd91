// tb_odmbjtag: self-checking test of VME device 2 (ODMB FPGA JTAG).
//
// One TAP model stands for the ODMB FPGA.  The test runs the UserCode
// read-out of device 2 (W 291C 3C8, W 2F04, R 2014, W 2F08, R 2014), a JTAG
// reset, a 16-bit write/read-back of a user register, a write split over
// three commands, random writes of 1-16 bits and the V6_JTAG_SEL
// polarity toggle (W 2020), and checks the data, the TAP state and the
// number of clock edges to each dtack (2 per TMS bit + 2 for a shift, 1 for
// a register command).  The slow-clock enable is high every other cycle
// here, which doubles the shift times.
module tb_odmbjtag;
  import odmb_vme_pkg::*;

  localparam logic [3:0] RTI = 4'd1;

  logic     clk = 1'b0;
  logic     rst = 1'b1;
  logic     device = 1'b0;
  vme_cmd_t bus = '0;
  vme_rsp_t rsp;
  logic     tck, tms, tdi, tdo, sel, busy;
  logic     tick = 1'b0;

  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) tick <= !tick;

  odmbjtag dut (
    .clk(clk), .rst(rst), .tick(tick), .device(device), .bus(bus), .rsp(rsp),
    .v6_tck(tck), .v6_tms(tms), .v6_tdi(tdi), .v6_tdo(tdo),
    .v6_jtag_sel(sel), .busy(busy)
  );

  jtag_tap_model #(.USERCODE(32'h6A5B_0C1D)) tap (.tck(tck), .tms(tms), .tdi(tdi), .tdo(tdo));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic vme(input logic wr, input logic [15:0] addr, input logic [15:0] data,
                     output logic [15:0] rdata, output int cycles);
    int n;
    @(negedge clk);
    device = 1'b1;
    bus = '{strobe: 1'b1, write: wr, cmd: addr[11:2], data: data};
    @(negedge clk);
    bus.strobe = 1'b0;
    n = 1;
    while (!rsp.dtack) begin
      @(negedge clk);
      n++;
    end
    rdata  = rsp.data;
    cycles = n;
    device = 1'b0;
  endtask

  logic [15:0] rd;
  int cy;

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    check(sel == 1'b0, "V6_JTAG_SEL is 0 after reset");

    vme(1'b1, 16'h2018, 16'h0, rd, cy);
    check(tap.state == RTI, "JTAG reset ends in Run-Test/Idle");
    vme(1'b1, 16'h291C, 16'h03C8, rd, cy);
    check(tap.ir == 10'h3C8, "instruction 3C8 loaded");
    // every other cycle is a tick: 2 ticks per TMS bit take about 4 cycles
    check(cy >= 4 * (6 + 10 + 2) && cy <= 4 * (6 + 10 + 2) + 3,
          $sformatf("instruction shift at half rate: %0d cycles", cy));
    vme(1'b1, 16'h2F04, 16'h0, rd, cy);
    vme(1'b0, 16'h2014, 16'h0, rd, cy);
    check(rd == 16'h0C1D, $sformatf("UserCode low 0C1D, got %h", rd));
    vme(1'b1, 16'h2F08, 16'h0, rd, cy);
    vme(1'b0, 16'h2014, 16'h0, rd, cy);
    check(rd == 16'h6A5B, $sformatf("UserCode high 6A5B, got %h", rd));
    check(tap.state == RTI, "back in Run-Test/Idle");

    vme(1'b1, 16'h291C, 16'h03C2, rd, cy);
    vme(1'b1, 16'h2F0C, 16'hC3A5, rd, cy);
    check(tap.user_reg == 16'hC3A5, $sformatf("user register written, got %h", tap.user_reg));
    vme(1'b1, 16'h2F0C, 16'h0000, rd, cy);
    vme(1'b0, 16'h2014, 16'h0, rd, cy);
    check(rd == 16'hC3A5, "user register read back");

    // one 16-bit write in three pieces: 8 bits with header (2704), 4 bits
    // with neither (2300), 4 bits with tailer (2308)
    vme(1'b1, 16'h2704, 16'h0034, rd, cy);
    check(tap.state == 4'd4, "header-only shift stays in Shift-DR");
    vme(1'b1, 16'h2300, 16'h0002, rd, cy);
    check(tap.state == 4'd4, "bare shift stays in Shift-DR");
    vme(1'b1, 16'h2308, 16'h0001, rd, cy);
    check(tap.state == RTI && tap.user_reg == 16'h1234,
          $sformatf("pieces assemble to 1234, got %h", tap.user_reg));

    // random widths: a Y+1-bit write moves the old contents down by Y+1
    for (int k = 0; k < 24; k++) begin
      int n;
      logic [15:0] prev, val;
      n    = 1 + ($urandom % 16);
      val  = 16'($urandom);
      prev = tap.user_reg;
      vme(1'b1, {4'h2, 4'(n - 1), 8'h0C}, val, rd, cy);
      if (n == 16) check(tap.user_reg == val, "16-bit write");
      else check(tap.user_reg == ((prev >> n) | (val << (16 - n))),
                 $sformatf("%0d-bit write %h over %h gave %h", n, val, prev, tap.user_reg));
      check(cy >= 4 * (5 + n + 2) && cy <= 4 * (5 + n + 2) + 3,
            $sformatf("%0d-bit shift at half rate: %0d cycles", n, cy));
      vme(1'b0, 16'h2014, 16'h0, rd, cy);
      check(rd >> (16 - n) == 16'(prev & ((32'd1 << n) - 1)),
            $sformatf("%0d bits shifted out read back at the top: %h", n, rd));
    end

    vme(1'b0, 16'h2040, 16'h0, rd, cy);
    check(rd == 16'h0 && cy == 1, "unused command reads 0");

    vme(1'b1, 16'h2020, 16'h0, rd, cy);
    check(sel == 1'b1 && cy == 1, "W 2020 toggles V6_JTAG_SEL to 1");
    vme(1'b1, 16'h2020, 16'h0, rd, cy);
    check(sel == 1'b0, "W 2020 toggles V6_JTAG_SEL back to 0");

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
