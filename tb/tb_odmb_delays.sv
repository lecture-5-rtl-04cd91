// tb_odmb_delays: self-checking test of the trigger and calibration delays.
//
// Part 1 drives random sparse CCB signals, test L1As and preLCTs, changes
// the seven delay settings, the calibration and pedestal modes and the kill
// masks every few hundred cycles, and
// compares every output on every cycle with a reference model that keeps the
// whole input history: a delay of D cycles returns the input of D cycles ago.
// Part 2 measures the time of the rising edge of the DCFEB injection and
// external pulses for every INJ_DLY/EXT_DLY value and checks that each step
// adds half a clock period.  Part 3 is the documented use of LCT_L1A_DLY: a
// preLCT 130 BX before the L1A, with LCT_L1A_DLY = 30, gives an L1A_MATCH to
// that DCFEB only.
module tb_odmb_delays;
  import odmb_vme_pkg::*;

  localparam int NF  = 7;
  localparam int OFS = 100;
  localparam int NCYC = 6000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [5:0] lct_l1a_dly = '0, otmb_push_dly = '0, alct_push_dly = '0;
  logic       cable_dly = 1'b0, cal_mode = 1'b0, ped_mode = 1'b0, test_l1a = 1'b0;
  logic [NF:0]   kill_l1a = '0;
  logic [NF-1:0] kill_feb = '0;
  logic [4:0] inj_dly = '0, ext_dly = '0;
  logic [3:0] callct_dly = '0;
  logic       ccb_l1a = 1'b0, ccb_resync = 1'b0, ccb_bc0 = 1'b0;
  logic       ccb_injpls = 1'b0, ccb_extpls = 1'b0;
  logic [NF-1:0] prelct = '0;
  logic       dcfeb_l1a, dcfeb_resync, dcfeb_bc0, dcfeb_injpls, dcfeb_extpls;
  logic       otmb_push, alct_push;
  logic [NF-1:0] dcfeb_l1a_match;

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  odmb_delays dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // input history, index = cycle number (cycle k = inputs sampled at the
  // k-th rising edge after reset)
  logic          h_l1a [NCYC], h_res [NCYC], h_bc0 [NCYC], h_inj [NCYC], h_ext [NCYC];
  logic [NF-1:0] h_lct [NCYC];
  logic          h_injbx [NCYC], h_extbx [NCYC], h_l1ai [NCYC];
  logic [NF-1:0] h_mi [NCYC];

  function automatic logic past(ref logic h [NCYC], input int k, input int d);
    return (k - d >= 0) ? h[k - d] : 1'b0;
  endfunction

  // random sparse pulse, about one cycle in `n`
  function automatic logic sparse(input int n);
    return ($urandom % n) == 0;
  endfunction

  initial begin
    // ---------------- part 1: random stimulus against the model
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < NCYC; k++) begin
      logic          e_l1a, e_res, e_bc0, e_cal;
      logic [NF-1:0] lctd, e_match;
      // new settings every 300 cycles
      if (k % 300 == 0) begin
        lct_l1a_dly   = 6'($urandom);
        otmb_push_dly = 6'($urandom);
        alct_push_dly = 6'($urandom);
        cable_dly     = 1'($urandom);
        inj_dly       = 5'($urandom);
        ext_dly       = 5'($urandom);
        callct_dly    = 4'($urandom);
        cal_mode      = ($urandom % 3) == 0;
        ped_mode      = ($urandom % 4) == 0;
        kill_l1a      = ($urandom % 3) == 0 ? 8'($urandom) : 8'h00;
        kill_feb      = ($urandom % 2) == 0 ? 7'($urandom) : 7'h00;
        if (k == 0) begin
          otmb_push_dly = 6'd0; alct_push_dly = 6'd63; lct_l1a_dly = 6'd63;
        end
      end
      ccb_l1a    = sparse(6);
      ccb_resync = sparse(40);
      ccb_bc0    = sparse(20);
      test_l1a   = sparse(25);
      ccb_injpls = sparse(12);
      ccb_extpls = sparse(12);
      for (int i = 0; i < NF; i++) prelct[i] = sparse(5);
      h_l1a[k] = ccb_l1a; h_res[k] = ccb_resync; h_bc0[k] = ccb_bc0;
      h_inj[k] = ccb_injpls; h_ext[k] = ccb_extpls; h_lct[k] = prelct;

      // reference model
      for (int i = 0; i < NF; i++)
        lctd[i] = (k - (OFS + int'(lct_l1a_dly)) >= 0) ? h_lct[k - OFS - int'(lct_l1a_dly)][i] : 1'b0;
      h_injbx[k] = past(h_inj, k, int'(inj_dly[4:1]));
      h_extbx[k] = past(h_ext, k, int'(ext_dly[4:1]));
      e_cal = (k - int'(callct_dly) >= 0) ?
              (h_injbx[k - int'(callct_dly)] | h_extbx[k - int'(callct_dly)]) : 1'b0;
      h_l1ai[k] = ((cal_mode ? e_cal : ccb_l1a) | test_l1a) & ~kill_l1a[0];
      h_mi[k]   = cal_mode ? {NF{e_cal}} : ({NF{ccb_l1a}} & (ped_mode ? '1 : lctd));
      for (int i = 0; i < NF; i++)
        h_mi[k][i] = (h_mi[k][i] | (test_l1a & ~kill_feb[i])) & ~kill_l1a[i + 1];
      if (cable_dly) begin
        e_l1a   = past(h_l1ai, k, 1);
        e_match = (k >= 1) ? h_mi[k-1] : '0;
        e_res   = past(h_res, k, 1);
        e_bc0   = past(h_bc0, k, 1);
      end else begin
        e_l1a = h_l1ai[k]; e_match = h_mi[k]; e_res = ccb_resync; e_bc0 = ccb_bc0;
      end

      // sample just before the rising edge of cycle k
      #8;
      check(dcfeb_l1a == e_l1a, $sformatf("cycle %0d: L1A %b, expected %b", k, dcfeb_l1a, e_l1a));
      check(dcfeb_l1a_match == e_match,
            $sformatf("cycle %0d: L1A_MATCH %b, expected %b", k, dcfeb_l1a_match, e_match));
      check(dcfeb_resync == e_res && dcfeb_bc0 == e_bc0, $sformatf("cycle %0d: RESYNC/BC0", k));
      check(otmb_push == past(h_l1a, k, int'(otmb_push_dly)),
            $sformatf("cycle %0d: OTMB push (delay %0d)", k, otmb_push_dly));
      check(alct_push == past(h_l1a, k, int'(alct_push_dly)),
            $sformatf("cycle %0d: ALCT push (delay %0d)", k, alct_push_dly));
      check(dcfeb_injpls == h_injbx[k] && dcfeb_extpls == h_extbx[k],
            $sformatf("cycle %0d: INJPLS/EXTPLS", k));
      @(posedge clk);
      #1;
    end

    // ---------------- part 2: half-BX steps of INJ_DLY / EXT_DLY
    // The request is set 1 time unit after a rising edge and taken by the
    // next one (t_req).  With D >= 1 the DCFEB pulse rises 12.5*(D-2) ns,
    // i.e. 5*(D-2) time units, after t_req; D = 0 passes straight through.
    ccb_l1a = 0; ccb_resync = 0; ccb_bc0 = 0; prelct = '0;
    ccb_injpls = 0; ccb_extpls = 0; cal_mode = 0; cable_dly = 0;
    ped_mode = 0; test_l1a = 0; kill_l1a = '0; kill_feb = '0;
    for (int d = 0; d < 32; d++) begin
      int t_req, t_inj, t_ext;
      inj_dly = 5'(d);
      ext_dly = 5'(31 - d);
      repeat (20) @(posedge clk);
      #1;
      ccb_injpls = 1'b1;
      ccb_extpls = 1'b1;
      t_req = int'($time) + 9;
      fork
        begin
          if (!dcfeb_injpls) @(posedge dcfeb_injpls);
          t_inj = int'($time);
        end
        begin
          if (!dcfeb_extpls) @(posedge dcfeb_extpls);
          t_ext = int'($time);
        end
        begin
          @(posedge clk);
          #1;
          ccb_injpls = 1'b0;
          ccb_extpls = 1'b0;
        end
      join
      if (d == 0) check(t_inj < t_req, "INJ_DLY 0: pulse passes straight through");
      else check(t_inj - t_req == 5 * (d - 2),
                 $sformatf("INJ_DLY %0d: rise %0d after the request edge", d, t_inj - t_req));
      if (d == 31) check(t_ext < t_req, "EXT_DLY 0: pulse passes straight through");
      else check(t_ext - t_req == 5 * (29 - d),
                 $sformatf("EXT_DLY %0d: rise %0d after the request edge", 31 - d, t_ext - t_req));
    end

    // ---------------- part 3: LCT/L1A gap of 130 BX, LCT_L1A_DLY = 30
    lct_l1a_dly = 6'd30;
    repeat (200) @(posedge clk);
    #1 prelct = 7'b0000100;
    @(posedge clk);
    #1 prelct = '0;
    repeat (129) @(posedge clk);
    #1 ccb_l1a = 1'b1;
    #1 check(dcfeb_l1a_match == 7'b0000100, $sformatf("L1A_MATCH to DCFEB 3 only, got %b", dcfeb_l1a_match));
    @(posedge clk);
    #1 check(dcfeb_l1a_match == '0, "no L1A_MATCH one BX later");
    ccb_l1a = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
