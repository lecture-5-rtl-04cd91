// tb_cfebjtag: self-checking test of VME device 1 (DCFEB JTAG).
//
// Seven TAP models stand for the DCFEBs, each with its own USERCODE and TCK
// line and a shared TMS/TDI.  The test runs the UserCode read-out procedure
// of device 1 (select DCFEB 3, load instruction 3C8, shift 16 bits with
// header, read TDO, shift 16 bits with tailer, read TDO), a 12-bit data
// shift (W 1B0C), the instruction shifts with selectable header/tailer
// (1Y30-1Y3C) and with the tailer to Select-DR-Scan (1Y48/1Y4C), a JTAG
// reset and a two-DCFEB selection.  It checks the TAP states and registers,
// that unselected DCFEBs see no TCK edge, the read-back data and the number
// of clock cycles until each dtack.
module tb_cfebjtag;
  import odmb_vme_pkg::*;

  localparam int NF = 7;
  localparam logic [3:0] RTI = 4'd1, SEL_DR = 4'd2, SH_IR = 4'd11;

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic          device = 1'b0;
  vme_cmd_t      bus = '0;
  vme_rsp_t      rsp;
  logic [NF-1:0] tck, tdo;
  logic          tms, tdi, busy;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  cfebjtag dut (
    .clk(clk), .rst(rst), .tick(1'b1), .device(device), .bus(bus), .rsp(rsp),
    .dl_jtag_tck(tck), .dl_jtag_tms(tms), .dl_jtag_tdi(tdi),
    .dl_jtag_tdo(tdo), .busy(busy)
  );

  int unsigned edges [NF];
  logic [3:0]  st    [NF];
  logic [9:0]  irs   [NF];
  logic [15:0] ureg  [NF];
  for (genvar i = 0; i < NF; i++) begin : g_tap
    jtag_tap_model #(.USERCODE({16'(i + 1) * 16'h1111, 16'hDBDB})) tap (
      .tck(tck[i]), .tms(tms), .tdi(tdi), .tdo(tdo[i]));
    assign edges[i] = tap.tck_edges;
    assign st[i]    = tap.state;
    assign irs[i]   = tap.ir;
    assign ureg[i]  = tap.user_reg;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One VME command; returns the read data and the clock edges from the one
  // that takes the strobe to the one that raises dtack, both included: 1 for
  // a register access, 2*TMS bits + 2 for a shift (the engine finishes 2
  // edges per TCK period after its start, dtack follows one edge later).
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

  logic [15:0] rd, prev;
  int cy;
  int unsigned e0 [NF];

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;

    vme(1'b0, 16'h1024, 16'h0, rd, cy);
    check(rd == 16'h007F, $sformatf("all DCFEBs selected after reset, got %h", rd));

    vme(1'b1, 16'h1018, 16'hFFFF, rd, cy);
    for (int i = 0; i < NF; i++) check(st[i] == RTI, "JTAG reset reaches every DCFEB");
    check(cy == 2 * 6 + 2, $sformatf("JTAG reset acknowledged after 14 cycles, got %0d", cy));

    // UserCode of DCFEB 3
    vme(1'b1, 16'h1020, 16'h0004, rd, cy);
    vme(1'b0, 16'h1024, 16'h0, rd, cy);
    check(rd == 16'h0004, "DCFEB 3 selected");
    for (int i = 0; i < NF; i++) e0[i] = edges[i];
    vme(1'b1, 16'h191C, 16'h03C8, rd, cy);
    check(irs[2] == 10'h3C8, "instruction 3C8 loaded in DCFEB 3");
    check(cy == 2 * (6 + 10 + 2) + 2, $sformatf("10-bit instruction shift: %0d cycles", cy));
    vme(1'b1, 16'h1F04, 16'h0, rd, cy);
    check(cy == 2 * (5 + 16) + 2, $sformatf("16-bit shift with header: %0d cycles", cy));
    vme(1'b0, 16'h1014, 16'h0, rd, cy);
    check(rd == 16'hDBDB, $sformatf("UserCode low DBDB, got %h", rd));
    check(cy == 1, "register read acknowledged after 1 cycle");
    vme(1'b1, 16'h1F08, 16'h0, rd, cy);
    vme(1'b0, 16'h1014, 16'h0, rd, cy);
    check(rd == 16'h3333, $sformatf("UserCode high 3333, got %h", rd));
    check(st[2] == RTI, "DCFEB 3 back in Run-Test/Idle");
    for (int i = 0; i < NF; i++)
      if (i != 2) check(edges[i] == e0[i], $sformatf("DCFEB %0d saw no TCK", i + 1));

    // 12-bit data shift with header and tailer into the user register
    vme(1'b1, 16'h191C, 16'h03C2, rd, cy);
    prev = ureg[2];
    vme(1'b1, 16'h1B0C, 16'h0ABC, rd, cy);
    check(ureg[2] == ((prev >> 12) | 16'hABC0), $sformatf("12-bit write gave %h", ureg[2]));
    check(cy == 2 * (5 + 12 + 2) + 2, $sformatf("12-bit shift: %0d cycles", cy));
    vme(1'b0, 16'h1014, 16'h0, rd, cy);
    check(rd[15:4] == prev[11:0], "12 bits read back at the top of the TDO register");

    // instruction in pieces: header only, no header/tailer, tailer only
    vme(1'b1, 16'h1234, 16'h0002, rd, cy);   // 3 bits 010
    check(st[2] == SH_IR, "1Y34 leaves DCFEB 3 in Shift-IR");
    vme(1'b1, 16'h1130, 16'h0000, rd, cy);   // 2 bits 00
    check(st[2] == SH_IR, "1Y30 stays in Shift-IR");
    check(cy == 2 * 2 + 2, "1Y30: no header, no tailer");
    vme(1'b1, 16'h1438, 16'h001E, rd, cy);   // 5 bits 11110
    check(st[2] == RTI && irs[2] == 10'h3C2, $sformatf("1Y38 completes IR 3C2, got %h", irs[2]));
    vme(1'b1, 16'h193C, 16'h03C8, rd, cy);
    check(st[2] == RTI && irs[2] == 10'h3C8, "1Y3C loads IR 3C8");
    check(cy == 2 * (6 + 10 + 2) + 2, "1Y3C cycle count");

    // instruction with tailer straight to Select-DR-Scan, then data
    vme(1'b1, 16'h194C, 16'h03C8, rd, cy);
    check(st[2] == SEL_DR, "1Y4C ends in Select-DR-Scan");
    check(cy == 2 * (6 + 10 + 2) + 2, "1Y4C cycle count");
    vme(1'b1, 16'h1F0C, 16'h0, rd, cy);
    check(cy == 2 * (2 + 16 + 2) + 2, $sformatf("data after Select-DR uses a 2-bit header: %0d", cy));
    vme(1'b0, 16'h1014, 16'h0, rd, cy);
    check(rd == 16'hDBDB, "UserCode low read through the short header");
    vme(1'b1, 16'h1434, 16'h0002, rd, cy);   // Shift-IR, 5 bits
    vme(1'b1, 16'h1448, 16'h001E, rd, cy);   // 5 bits, no header, to Select-DR
    check(st[2] == SEL_DR && irs[2] == 10'h3C2, "1Y48 loads IR and ends in Select-DR-Scan");
    vme(1'b1, 16'h1F0C, 16'h5AA5, rd, cy);
    check(ureg[2] == 16'h5AA5, $sformatf("user register written after 1Y48, got %h", ureg[2]));
    check(st[2] == RTI, "back in Run-Test/Idle");

    // two DCFEBs at once
    vme(1'b1, 16'h1020, 16'h0041, rd, cy);
    for (int i = 0; i < NF; i++) e0[i] = edges[i];
    vme(1'b1, 16'h191C, 16'h03C2, rd, cy);
    check(irs[0] == 10'h3C2 && irs[6] == 10'h3C2, "DCFEBs 1 and 7 loaded together");
    check(irs[2] == 10'h3C2 && edges[2] == e0[2], "DCFEB 3 untouched");

    // an unused command is acknowledged and reads 0
    vme(1'b0, 16'h1040, 16'h0, rd, cy);
    check(rd == 16'h0 && cy == 1, "unused command reads 0");

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
