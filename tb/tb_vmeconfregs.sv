// tb_vmeconfregs: self-checking test of VME device 4 (configuration registers).
//
// Checks the reset values, a VME write and read-back of every register with
// random data and the field outputs that follow from it, that the reserved
// firmware-version register (4024) cannot be written, the read-only words
// 4100-4500, the priority of the three write sources (internal change, PROM
// upload, VME), and the triple voting: one copy of a register is forced to
// a wrong value, the output must not change, and after the force is released
// the copy must be repaired from the vote.  Every command is acknowledged one
// cycle after its strobe.
module tb_vmeconfregs;
  import odmb_vme_pkg::*;

  localparam int NR = 12;

  logic           clk = 1'b0;
  logic           rst = 1'b1;
  logic           device = 1'b0;
  vme_cmd_t       bus = '0;
  vme_rsp_t       rsp;
  logic [3:0]     chg_idx = 4'hF;
  logic [15:0]    chg_data = '0;
  logic           bpi_ul = 1'b0;
  logic [3:0]     bpi_we = 4'hF;
  logic [15:0]    bpi_in = '0;
  logic [NR-1:0][15:0] regs;
  logic [5:0]     lct_l1a_dly, otmb_dly, alct_dly;
  logic           cable_dly;
  logic [4:0]     inj_dly, ext_dly;
  logic [3:0]     callct_dly;
  logic [8:0]     kill;
  logic [7:0]     crateid;
  logic [15:0]    nwords;
  logic [11:0]    bx_dly;

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  vmeconfregs dut (
    .clk(clk), .rst(rst), .device(device), .bus(bus), .rsp(rsp),
    .change_reg_index(chg_idx), .change_reg_data(chg_data),
    .bpi_cfg_ul_pulse(bpi_ul), .bpi_cfg_reg_we(bpi_we), .bpi_cfg_reg_in(bpi_in),
    .odmb_id(16'hB00C), .cfg_regs(regs), .lct_l1a_dly(lct_l1a_dly),
    .otmb_push_dly(otmb_dly), .cable_dly(cable_dly), .alct_push_dly(alct_dly),
    .inj_dly(inj_dly), .ext_dly(ext_dly), .callct_dly(callct_dly), .kill(kill),
    .crateid(crateid), .nwords_dummy(nwords), .bx_dly(bx_dly)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic vme(input logic wr, input logic [15:0] addr, input logic [15:0] data,
                     output logic [15:0] rdata);
    int n;
    @(negedge clk);
    device = 1'b1;
    bus = '{strobe: 1'b1, write: wr, cmd: addr[11:2], data: data};
    @(negedge clk);
    bus.strobe = 1'b0;
    n = 1;
    while (!rsp.dtack && n < 10) begin
      @(negedge clk);
      n++;
    end
    check(n == 1, $sformatf("dtack one cycle after the strobe for %h", addr));
    rdata  = rsp.data;
    device = 1'b0;
  endtask

  logic [15:0] rd, shadow [NR];

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;

    for (int i = 0; i < NR; i++) begin
      shadow[i] = (i == 9) ? 16'h0400 : (i == 10) ? 16'h0008 : 16'h0000;
      vme(1'b0, 16'h4000 + 16'(4 * i), 16'h0, rd);
      check(rd == shadow[i], $sformatf("reset value of register %0d: %h", i, rd));
    end

    for (int r = 0; r < 4; r++) begin
      for (int i = 0; i < NR; i++) begin
        logic [15:0] v;
        v = 16'($urandom);
        vme(1'b1, 16'h4000 + 16'(4 * i), v, rd);
        if (i != 9) shadow[i] = v;
      end
      for (int i = 0; i < NR; i++) begin
        vme(1'b0, 16'h4000 + 16'(4 * i), 16'h0, rd);
        check(rd == shadow[i], $sformatf("register %0d reads %h, expected %h", i, rd, shadow[i]));
        check(regs[i] == shadow[i], "cfg_regs output");
      end
      check(lct_l1a_dly == shadow[0][5:0], "LCT_L1A_DLY field");
      check(otmb_dly    == shadow[1][5:0], "OTMB_DLY field");
      check(cable_dly   == shadow[2][0],   "CABLE_DLY field");
      check(alct_dly    == shadow[3][5:0], "ALCT_DLY field");
      check(inj_dly     == shadow[4][4:0], "INJ_DLY field");
      check(ext_dly     == shadow[5][4:0], "EXT_DLY field");
      check(callct_dly  == shadow[6][3:0], "CALLCT_DLY field");
      check(kill        == shadow[7][8:0], "KILL field");
      check(crateid     == shadow[8][7:0], "CRATEID field");
      check(nwords      == shadow[10],     "NWORDS_DUMMY field");
      check(bx_dly      == shadow[11][11:0], "BX_DLY field");
    end
    check(shadow[9] == 16'h0400, "firmware-version register unchanged");

    vme(1'b0, 16'h4100, 16'h0, rd); check(rd == 16'hB00C, "unique ID");
    vme(1'b0, 16'h4200, 16'h0, rd); check(rd == 16'h0400, "firmware version");
    vme(1'b0, 16'h4300, 16'h0, rd); check(rd == 16'h0001, "firmware build");
    vme(1'b0, 16'h4400, 16'h0, rd); check(rd == 16'h0619, "firmware month/day");
    vme(1'b0, 16'h4500, 16'h0, rd); check(rd == 16'h2018, "firmware year");

    // PROM upload of register 4
    @(negedge clk); bpi_ul = 1'b1; bpi_we = 4'd4; bpi_in = 16'h0013;
    @(negedge clk); bpi_ul = 1'b0; bpi_we = 4'hF;
    check(inj_dly == 5'h13, "PROM upload writes INJ_DLY");

    // internal change of KILL beats a simultaneous PROM upload and VME write
    @(negedge clk);
    chg_idx = 4'd7; chg_data = 16'h0004;
    bpi_ul = 1'b1; bpi_we = 4'd5; bpi_in = 16'h001F;
    device = 1'b1; bus = '{strobe: 1'b1, write: 1'b1, cmd: 10'h006, data: 16'h000A};
    @(negedge clk);
    chg_idx = 4'hF; bpi_ul = 1'b0; bus.strobe = 1'b0;
    @(negedge clk); device = 1'b0;
    check(kill == 9'h004, "internal change writes KILL");
    check(ext_dly == shadow[5][4:0], "PROM upload lost to the internal change");
    check(callct_dly == shadow[6][3:0], "VME write lost to the internal change");
    // PROM upload beats a VME write
    @(negedge clk);
    bpi_ul = 1'b1; bpi_we = 4'd5; bpi_in = 16'h0011;
    device = 1'b1; bus = '{strobe: 1'b1, write: 1'b1, cmd: 10'h006, data: 16'h000A};
    @(negedge clk);
    bpi_ul = 1'b0; bus.strobe = 1'b0;
    @(negedge clk); device = 1'b0;
    check(ext_dly == 5'h11, "PROM upload writes EXT_DLY");
    check(callct_dly == shadow[6][3:0], "VME write lost to the PROM upload");
    shadow[6] = regs[6];

    // triple voting: corrupt one copy of register 3
    @(negedge clk);
    force dut.g_reg[3].u_tmr.copy_b = ~shadow[3];
    repeat (3) @(negedge clk);
    check(regs[3] == shadow[3], "one corrupted copy is outvoted");
    vme(1'b0, 16'h400C, 16'h0, rd);
    check(rd == shadow[3], "VME read returns the voted value");
    release dut.g_reg[3].u_tmr.copy_b;
    @(negedge clk);
    @(negedge clk);
    check(dut.g_reg[3].u_tmr.copy_b == shadow[3], "corrupted copy repaired from the vote");
    // a corrupted copy of register 8 too
    @(negedge clk);
    force dut.g_reg[8].u_tmr.copy_c = 16'h5A5A;
    @(negedge clk);
    check(crateid == shadow[8][7:0], "CRATEID kept by the vote");
    release dut.g_reg[8].u_tmr.copy_c;

    // reset restores the initial values
    @(negedge clk); rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    check(regs[0] == 16'h0 && regs[10] == 16'h0008, "reset reloads the initial values");

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
