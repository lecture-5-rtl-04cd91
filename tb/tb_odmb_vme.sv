// tb_odmb_vme: end-to-end test of the ODMB VME command side, at the default
// parameters (7 DCFEBs, slow clock = clk/16).
//
// A VME master task sends 16-bit commands through the top-level port.  The
// test exercises every mechanism of the design and counts how often each
// happened; a mechanism that never happened counts as a failure:
//   jtag_shift      device 1 data/instruction shifts (UserCode procedure,
//                   then a 12-bit write), checked against DCFEB TAP models
//   jtag_seldr      instruction shift ending in Select-DR-Scan + data shift
//   jtag_reset      W 1018 / W 2018
//   tck_gating      unselected DCFEBs receive no TCK edge
//   odmb_jtag       device 2 UserCode read and V6_JTAG_SEL toggle
//   ctrl_reg        device 3 register write/read-back
//   ctrl_pulse      device 3 pulses (soft reset, L1A reset, DCFEB pulses)
//   mask_pls        INJPLS/EXTPLS suppressed by MASK_PLS
//   counter_read    R 3YZC returns the counters fed by the event inputs
//   counter_resync  W 3014 clears the counters except 5F
//   cfg_reg         device 4 register write/read-back and field outputs
//   cfg_upload      PROM upload and internal change of a register
//   tmr_vote        a corrupted register copy is outvoted
//   ext_device      device 5 command reaches the outside and its reply returns
//   unmapped        command for device 0 is acknowledged with 0
//   push_delay      OTMB_DLY set to the gap read with R 338C lines the
//                   OTMB push up with OTMBDAV
//   test_l1a        a W 3200 test L1A reaches the DCFEBs with L1A_MATCHes
//                   for those not killed in the KILL register
//   cal_l1a         in calibration mode a W 3200 pulse gives an L1A and
//                   L1A_MATCHes CALLCT_DLY BX after the delayed INJPLS
// It also checks the time a 16-bit shift takes at the slow-clock rate.
module tb_odmb_vme;
  import odmb_vme_pkg::*;

  localparam int NF  = 7;
  localparam int DIV = 16;
  localparam logic [3:0] RTI = 4'd1, SEL_DR = 4'd2;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  // VME port
  logic        vme_strobe = 0, vme_write = 0, vme_dtack;
  logic [15:0] vme_addr = '0, vme_wdata = '0, vme_rdata;
  // devices 5-9
  vme_cmd_t       ext_bus;
  logic [9:5]     ext_device;
  vme_rsp_t [9:5] ext_rsp;
  // JTAG
  logic [NF-1:0] dl_tck, dl_tdo;
  logic          dl_tms, dl_tdi, v6_tck, v6_tms, v6_tdi, v6_tdo, v6_sel;
  // control
  logic        cal_mode, srst, orst, reprog, l1arst, data_mux, trg_mux, lvmb_mux;
  logic        ped, otmbreq, mask_pls;
  logic [15:0] tp_sel, max_words;
  logic [2:0]  loopback;
  logic [3:0]  diffctrl;
  logic [5:0]  dcfeb_pulse;
  logic [7:0]  kill_l1a;
  // events
  logic          ccb_resync = 0, l1a = 0, otmbdav = 0, alctdav = 0, pkt_ddu = 0, pkt_pc = 0;
  logic [NF-1:0] lct = '0, good_crc = '0;
  logic [NF+1:0] l1a_match = '0, pkt_rcv = '0, pkt_shipped = '0;
  // configuration
  logic [3:0]  chg_idx = 4'hF, bpi_we = 4'hF;
  logic [15:0] chg_data = '0, bpi_in = '0;
  logic        bpi_ul = 1'b0;
  logic [11:0][15:0] cfg_regs;
  logic [5:0]  lct_l1a_dly, otmb_dly, alct_dly;
  logic        cable_dly;
  logic [4:0]  inj_dly, ext_dly;
  logic [3:0]  callct_dly;
  logic [8:0]  kill;
  logic [7:0]  crateid;
  logic [15:0] nwords_dummy;
  logic [11:0] bx_dly;
  logic        ccb_bc0 = 0, ccb_injpls = 0, ccb_extpls = 0;
  logic        dcfeb_l1a, dcfeb_resync, dcfeb_bc0, dcfeb_injpls, dcfeb_extpls;
  logic        otmb_push, alct_push;
  logic [NF-1:0] dcfeb_l1a_match;

  odmb_vme dut (
    .clk(clk), .rst(rst),
    .vme_strobe(vme_strobe), .vme_write(vme_write), .vme_addr(vme_addr),
    .vme_wdata(vme_wdata), .vme_dtack(vme_dtack), .vme_rdata(vme_rdata),
    .ext_bus(ext_bus), .ext_device(ext_device), .ext_rsp(ext_rsp),
    .dl_jtag_tck(dl_tck), .dl_jtag_tms(dl_tms), .dl_jtag_tdi(dl_tdi), .dl_jtag_tdo(dl_tdo),
    .v6_tck(v6_tck), .v6_tms(v6_tms), .v6_tdi(v6_tdi), .v6_tdo(v6_tdo), .v6_jtag_sel(v6_sel),
    .cal_mode(cal_mode), .odmb_soft_rst(srst), .odmb_opt_rst(orst),
    .reprogram_dcfeb(reprog), .l1a_reset(l1arst), .tp_sel(tp_sel),
    .max_words_dcfeb(max_words), .loopback(loopback), .diffctrl(diffctrl),
    .dcfeb_pulse(dcfeb_pulse), .data_mux(data_mux), .trg_mux(trg_mux),
    .lvmb_mux(lvmb_mux), .ped_mode(ped), .otmb_data_req(otmbreq),
    .kill_l1a(kill_l1a), .mask_pls(mask_pls), .dcfeb_done(7'h7F), .qpll_locked(1'b1),
    .ccb_resync(ccb_resync), .l1a(l1a), .lct(lct), .otmbdav(otmbdav), .alctdav(alctdav),
    .l1a_match(l1a_match), .pkt_rcv(pkt_rcv), .pkt_ddu(pkt_ddu), .pkt_pc(pkt_pc),
    .pkt_shipped(pkt_shipped), .good_crc(good_crc),
    .ccb_bc0(ccb_bc0), .ccb_injpls(ccb_injpls), .ccb_extpls(ccb_extpls),
    .dcfeb_l1a(dcfeb_l1a), .dcfeb_l1a_match(dcfeb_l1a_match), .dcfeb_resync(dcfeb_resync),
    .dcfeb_bc0(dcfeb_bc0), .dcfeb_injpls(dcfeb_injpls), .dcfeb_extpls(dcfeb_extpls),
    .otmb_push(otmb_push), .alct_push(alct_push),
    .change_reg_index(chg_idx), .change_reg_data(chg_data),
    .bpi_cfg_ul_pulse(bpi_ul), .bpi_cfg_reg_we(bpi_we), .bpi_cfg_reg_in(bpi_in),
    .odmb_id(16'h0123), .cfg_regs(cfg_regs), .lct_l1a_dly(lct_l1a_dly),
    .otmb_push_dly(otmb_dly), .cable_dly(cable_dly), .alct_push_dly(alct_dly),
    .inj_dly(inj_dly), .ext_dly(ext_dly), .callct_dly(callct_dly), .kill(kill),
    .crateid(crateid), .nwords_dummy(nwords_dummy), .bx_dly(bx_dly)
  );

  // DCFEB and ODMB FPGA TAP models
  int unsigned edges [NF];
  logic [3:0]  st    [NF];
  logic [9:0]  irs   [NF];
  logic [15:0] ureg  [NF];
  for (genvar i = 0; i < NF; i++) begin : g_tap
    jtag_tap_model #(.USERCODE({16'(i + 1) * 16'h1111, 16'hDBDB})) tap (
      .tck(dl_tck[i]), .tms(dl_tms), .tdi(dl_tdi), .tdo(dl_tdo[i]));
    assign edges[i] = tap.tck_edges;
    assign st[i]    = tap.state;
    assign irs[i]   = tap.ir;
    assign ureg[i]  = tap.user_reg;
  end
  jtag_tap_model #(.USERCODE(32'h8424_A093)) v6_tap (
    .tck(v6_tck), .tms(v6_tms), .tdi(v6_tdi), .tdo(v6_tdo));

  // device 5 stand-in: answers two cycles later with the inverted write data
  logic [1:0]  ext_cnt = '0;
  logic [15:0] ext_q = '0;
  always @(posedge clk) begin
    ext_rsp <= '0;
    if (ext_device[5] && ext_bus.strobe) begin
      ext_cnt <= 2'd2;
      ext_q   <= ~ext_bus.data ^ {ext_bus.cmd, 6'h0};
    end else if (ext_cnt != 0) begin
      ext_cnt <= ext_cnt - 1;
      if (ext_cnt == 1) ext_rsp[5] <= '{dtack: 1'b1, data: ext_q};
    end
  end

  int checks = 0, failures = 0;
  typedef enum int {
    M_JTAG_SHIFT, M_JTAG_SELDR, M_JTAG_RESET, M_TCK_GATING, M_ODMB_JTAG,
    M_CTRL_REG, M_CTRL_PULSE, M_MASK_PLS, M_COUNTER_READ, M_COUNTER_RESYNC,
    M_CFG_REG, M_CFG_UPLOAD, M_TMR_VOTE, M_EXT_DEVICE, M_UNMAPPED,
    M_PUSH_DELAY, M_TEST_L1A, M_CAL_L1A, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic hit(input mech_e m, input bit ok, input string what);
    check(ok, what);
    if (ok) mech[m]++;
  endtask

  // one VME command; returns read data and cycles to dtack
  task automatic vme(input logic wr, input logic [15:0] addr, input logic [15:0] data,
                     output logic [15:0] rdata, output int cycles);
    int n;
    @(negedge clk);
    vme_strobe = 1'b1; vme_write = wr; vme_addr = addr; vme_wdata = data;
    @(negedge clk);
    vme_strobe = 1'b0;
    n = 1;
    while (!vme_dtack && n < 100000) begin
      @(negedge clk);
      n++;
    end
    check(vme_dtack, $sformatf("dtack for %h", addr));
    rdata  = vme_rdata;
    cycles = n;
  endtask

  // pulses seen on the control outputs
  logic [5:0] pulse_seen = '0;
  logic       srst_seen = 0, l1arst_seen = 0;
  always @(posedge clk) begin
    pulse_seen  <= pulse_seen | dcfeb_pulse;
    srst_seen   <= srst_seen | srst;
    l1arst_seen <= l1arst_seen | l1arst;
  end

  // clock edge of the last rise of some timing outputs
  int unsigned ncyc = 0, t_push = 0, t_dav = 0, t_inj = 0, t_l1a = 0;
  logic [NF-1:0] match_at_l1a = '0;
  always @(posedge clk) begin
    ncyc <= ncyc + 1;
    if (otmb_push)    t_push <= ncyc;
    if (otmbdav)      t_dav  <= ncyc;
    if (dcfeb_injpls) t_inj  <= ncyc;
    if (dcfeb_l1a) begin
      t_l1a        <= ncyc;
      match_at_l1a <= dcfeb_l1a_match;
    end
  end

  logic [15:0] rd, prev;
  int cy, nl1a;
  int unsigned e0 [NF];

  initial begin
    for (int m = 0; m < M_COUNT; m++) mech[m] = 0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    pulse_seen = '0; srst_seen = 1'b0; l1arst_seen = 1'b0;  // forget power-up values

    // ---- device 1: UserCode of DCFEB 3
    vme(1'b1, 16'h1018, 16'h0, rd, cy);
    for (int i = 0; i < NF; i++) hit(M_JTAG_RESET, st[i] == RTI, "DCFEB TAP reset");
    vme(1'b1, 16'h1020, 16'h0004, rd, cy);
    for (int i = 0; i < NF; i++) e0[i] = edges[i];
    vme(1'b1, 16'h191C, 16'h03C8, rd, cy);
    hit(M_JTAG_SHIFT, irs[2] == 10'h3C8, "DCFEB 3 instruction 3C8");
    vme(1'b1, 16'h1F04, 16'h0, rd, cy);
    // 21 TMS bits of 2 slow ticks of DIV cycles each, +/- one tick of phase
    check(cy >= 2 * 21 * DIV - DIV && cy <= 2 * 21 * DIV + DIV + 2,
          $sformatf("16-bit shift with header takes %0d cycles, about %0d", cy, 2 * 21 * DIV));
    vme(1'b0, 16'h1014, 16'h0, rd, cy);
    hit(M_JTAG_SHIFT, rd == 16'hDBDB, $sformatf("UserCode low of DCFEB 3: %h", rd));
    vme(1'b1, 16'h1F08, 16'h0, rd, cy);
    vme(1'b0, 16'h1014, 16'h0, rd, cy);
    hit(M_JTAG_SHIFT, rd == 16'h3333, $sformatf("UserCode high of DCFEB 3: %h", rd));
    for (int i = 0; i < NF; i++)
      if (i != 2) hit(M_TCK_GATING, edges[i] == e0[i], "unselected DCFEB saw no TCK");
    // 12-bit write into the user register of DCFEB 3
    vme(1'b1, 16'h191C, 16'h03C2, rd, cy);
    prev = ureg[2];
    vme(1'b1, 16'h1B0C, 16'h0ABC, rd, cy);
    hit(M_JTAG_SHIFT, ureg[2] == ((prev >> 12) | 16'hABC0), "12-bit write W 1B0C");
    // instruction to Select-DR, then data
    vme(1'b1, 16'h194C, 16'h03C2, rd, cy);
    hit(M_JTAG_SELDR, st[2] == SEL_DR, "W 194C ends in Select-DR-Scan");
    vme(1'b1, 16'h1F0C, 16'h7E81, rd, cy);
    hit(M_JTAG_SELDR, ureg[2] == 16'h7E81 && st[2] == RTI, "data shift after Select-DR-Scan");

    // ---- device 2
    vme(1'b1, 16'h2018, 16'h0, rd, cy);
    hit(M_JTAG_RESET, v6_tap.state == RTI, "ODMB FPGA TAP reset");
    vme(1'b1, 16'h291C, 16'h03C8, rd, cy);
    vme(1'b1, 16'h2F04, 16'h0, rd, cy);
    vme(1'b0, 16'h2014, 16'h0, rd, cy);
    hit(M_ODMB_JTAG, rd == 16'hA093, "ODMB UserCode low");
    vme(1'b1, 16'h2F08, 16'h0, rd, cy);
    vme(1'b0, 16'h2014, 16'h0, rd, cy);
    hit(M_ODMB_JTAG, rd == 16'h8424, "ODMB UserCode high");
    vme(1'b1, 16'h2020, 16'h0, rd, cy);
    hit(M_ODMB_JTAG, v6_sel == 1'b1, "V6_JTAG_SEL toggled");

    // ---- device 3: registers and pulses
    vme(1'b1, 16'h3300, 16'h1, rd, cy);
    vme(1'b0, 16'h3300, 16'h0, rd, cy);
    hit(M_CTRL_REG, rd == 16'h1 && data_mux, "dummy data selected");
    vme(1'b1, 16'h3024, 16'd512, rd, cy);
    hit(M_CTRL_REG, max_words == 16'd512, "autokill limit 512");
    vme(1'b1, 16'h3004, 16'h0, rd, cy);
    @(negedge clk);  // pulse flags are updated one edge after the dtack
    hit(M_CTRL_PULSE, srst_seen && max_words == 16'd1024, "soft reset pulse, limit back to 1024");
    vme(1'b1, 16'h3200, 16'h0023, rd, cy);
    @(negedge clk);
    hit(M_CTRL_PULSE, pulse_seen == 6'h23, $sformatf("INJPLS, EXTPLS and BC0 pulses: %h", pulse_seen));
    vme(1'b1, 16'h340C, 16'h1, rd, cy);
    pulse_seen = '0;
    vme(1'b1, 16'h3200, 16'h0023, rd, cy);
    @(negedge clk);
    hit(M_MASK_PLS, pulse_seen == 6'h20, "MASK_PLS keeps only BC0");

    // ---- counters through R 3YZC
    nl1a = 0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      l1a = (t % 3) == 0;
      lct = (t % 5) == 0 ? 7'h08 : 7'h00;
      nl1a += l1a;
    end
    @(negedge clk); l1a = 0; lct = '0;
    vme(1'b0, 16'h33FC, 16'h0, rd, cy);
    hit(M_COUNTER_READ, rd == 16'(nl1a), $sformatf("L1A counter %0d, got %0d", nl1a, rd));
    vme(1'b0, 16'h374C, 16'h0, rd, cy);
    hit(M_COUNTER_READ, rd == 16'd40, $sformatf("LCTs of DCFEB 4: 40, got %0d", rd));
    vme(1'b1, 16'h3014, 16'h0, rd, cy);
    @(negedge clk);
    check(l1arst_seen, "L1A reset pulse");
    vme(1'b0, 16'h33FC, 16'h0, rd, cy);
    hit(M_COUNTER_RESYNC, rd == 16'h0, "L1A counter cleared by W 3014");
    vme(1'b0, 16'h35FC, 16'h0, rd, cy);
    hit(M_COUNTER_RESYNC, rd == 16'(nl1a), "hard-reset L1A counter kept");

    // ---- device 4
    vme(1'b1, 16'h4010, 16'h0017, rd, cy);
    vme(1'b0, 16'h4010, 16'h0, rd, cy);
    hit(M_CFG_REG, rd == 16'h0017 && inj_dly == 5'h17, "INJ_DLY written");
    vme(1'b1, 16'h4020, 16'h0045, rd, cy);
    hit(M_CFG_REG, crateid == 8'h45 && cfg_regs[8] == 16'h0045, "CRATEID written");
    @(negedge clk); bpi_ul = 1'b1; bpi_we = 4'd11; bpi_in = 16'h0ABC;
    @(negedge clk); bpi_ul = 1'b0; bpi_we = 4'hF;
    hit(M_CFG_UPLOAD, bx_dly == 12'hABC, "BX_DLY uploaded from the PROM");
    @(negedge clk); chg_idx = 4'd7; chg_data = 16'h0010;
    @(negedge clk); chg_idx = 4'hF;
    vme(1'b0, 16'h401C, 16'h0, rd, cy);
    hit(M_CFG_UPLOAD, rd == 16'h0010 && kill == 9'h010, "DCFEB 5 killed internally");
    force dut.u_confregs.g_reg[4].u_tmr.copy_a = 16'h0000;
    repeat (2) @(negedge clk);
    vme(1'b0, 16'h4010, 16'h0, rd, cy);
    hit(M_TMR_VOTE, rd == 16'h0017 && inj_dly == 5'h17, "INJ_DLY survives a corrupted copy");
    release dut.u_confregs.g_reg[4].u_tmr.copy_a;
    vme(1'b0, 16'h4200, 16'h0, rd, cy);
    check(rd == 16'h0400, "firmware version");

    // ---- OTMB push delay from the measured L1A/OTMBDAV gap
    @(negedge clk); l1a = 1'b1;
    @(negedge clk); l1a = 1'b0;
    repeat (22) @(negedge clk);
    otmbdav = 1'b1;
    @(negedge clk); otmbdav = 1'b0;
    vme(1'b0, 16'h338C, 16'h0, rd, cy);
    check(rd == 16'd23, $sformatf("L1A/OTMBDAV gap 23, got %0d", rd));
    vme(1'b1, 16'h4004, rd, rd, cy);
    @(negedge clk); l1a = 1'b1;
    @(negedge clk); l1a = 1'b0;
    repeat (22) @(negedge clk);
    otmbdav = 1'b1;
    @(negedge clk); otmbdav = 1'b0;
    @(negedge clk);
    hit(M_PUSH_DELAY, otmb_dly == 6'd23 && t_push == t_dav,
        $sformatf("OTMB push at edge %0d, OTMBDAV at %0d", t_push, t_dav));

    // ---- test L1A; DCFEB 5 was killed above
    vme(1'b1, 16'h3200, 16'h0004, rd, cy);
    repeat (2) @(negedge clk);
    hit(M_TEST_L1A, t_l1a > t_push && match_at_l1a == 7'b1101111,
        $sformatf("test L1A matches %b", match_at_l1a));

    // ---- calibration mode: INJPLS 2 BX after W 3200, L1A 5 BX after INJPLS
    vme(1'b1, 16'h340C, 16'h0, rd, cy);   // MASK_PLS off
    vme(1'b1, 16'h4010, 16'h0004, rd, cy);
    vme(1'b1, 16'h4018, 16'h0005, rd, cy);
    vme(1'b1, 16'h3000, 16'h0001, rd, cy);
    vme(1'b1, 16'h3200, 16'h0001, rd, cy);
    repeat (12) @(negedge clk);
    hit(M_CAL_L1A, cal_mode && t_l1a == t_inj + 5 && match_at_l1a == '1,
        $sformatf("calibration L1A %0d BX after INJPLS, matches %b", t_l1a - t_inj, match_at_l1a));
    vme(1'b1, 16'h3000, 16'h0000, rd, cy);

    // ---- devices 5-9 and unused device numbers
    vme(1'b1, 16'h5008, 16'h1234, rd, cy);
    hit(M_EXT_DEVICE, rd == (~16'h1234 ^ {10'h002, 6'h0}) && cy == 3, "device 5 reply returned");
    vme(1'b0, 16'h0010, 16'h0, rd, cy);
    hit(M_UNMAPPED, rd == 16'h0 && cy == 1, "device 0 acknowledged with 0");
    vme(1'b0, 16'hE000, 16'h0, rd, cy);
    hit(M_UNMAPPED, rd == 16'h0 && cy == 1, "device 14 acknowledged with 0");

    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %s: %0d", mech_e'(m), mech[m]);
      check(mech[m] > 0, $sformatf("mechanism %s happened", mech_e'(m)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
