// tb_vmemon: self-checking test of VME device 3 (ODMB/DCFEB control).
//
// Reads the reset values, writes and reads back every W/R register with
// random data (checking the output port and the field width), checks that
// each W-only command gives a one-cycle pulse on its own output, that
// MASK_PLS removes INJPLS/EXTPLS from the DCFEB pulses, that the 1024-word
// autokill limit returns after a soft reset, that the DONE and QPLL status
// inputs read back, and that any other read ending in C returns the ODMB data
// chosen by YZ.  Every command must be acknowledged one cycle after its
// strobe.
module tb_vmemon;
  import odmb_vme_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        device = 1'b0;
  vme_cmd_t    bus = '0;
  vme_rsp_t    rsp;
  logic        cal_mode, srst, orst, reprog, l1arst, data_mux, trg_mux, lvmb_mux;
  logic        ped, otmbreq, mask_pls;
  logic [15:0] tp_sel, nwords;
  logic [2:0]  loopback;
  logic [3:0]  diffctrl;
  logic [5:0]  pulse;
  logic [7:0]  kill_l1a, sel;
  logic [6:0]  done_in = 7'h55;
  logic        qpll = 1'b1;
  logic [15:0] odmb_data;

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // stand-in for the counter bank: data derived from the selection
  assign odmb_data = {8'hC0, sel} ^ 16'h0F0F;

  vmemon dut (
    .clk(clk), .rst(rst), .device(device), .bus(bus), .rsp(rsp),
    .cal_mode(cal_mode), .odmb_soft_rst(srst), .odmb_opt_rst(orst),
    .reprogram_dcfeb(reprog), .l1a_reset(l1arst), .tp_sel(tp_sel),
    .max_words_dcfeb(nwords), .loopback(loopback), .diffctrl(diffctrl),
    .dcfeb_pulse(pulse), .data_mux(data_mux), .trg_mux(trg_mux),
    .lvmb_mux(lvmb_mux), .ped_mode(ped), .otmb_data_req(otmbreq),
    .kill_l1a(kill_l1a), .mask_pls(mask_pls), .dcfeb_done(done_in),
    .qpll_locked(qpll), .odmb_data_sel(sel), .odmb_data(odmb_data)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // pulse outputs seen during a command, as a bit set
  logic [10:0] seen;
  always @(posedge clk) seen <= seen | {pulse, l1arst, reprog, orst, srst, 1'b0};

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
    @(negedge clk);
    check(!rsp.dtack, "single dtack");
  endtask

  // current value of the output behind a W/R register
  function automatic logic [15:0] port_of(input logic [15:0] a);
    unique case (a)
      16'h3000: return 16'(cal_mode);
      16'h3020: return tp_sel;
      16'h3024: return nwords;
      16'h3100: return 16'(loopback);
      16'h3110: return 16'(diffctrl);
      16'h3300: return 16'(data_mux);
      16'h3304: return 16'(trg_mux);
      16'h3308: return 16'(lvmb_mux);
      16'h3400: return 16'(ped);
      16'h3404: return 16'(otmbreq);
      16'h3408: return 16'(kill_l1a);
      16'h340C: return 16'(mask_pls);
      default:  return 16'hDEAD;
    endcase
  endfunction

  localparam logic [15:0] RW_ADDR [12] = '{16'h3000, 16'h3020, 16'h3024, 16'h3100,
    16'h3110, 16'h3300, 16'h3304, 16'h3308, 16'h3400, 16'h3404, 16'h3408, 16'h340C};
  localparam logic [15:0] RW_MASK [12] = '{16'h0001, 16'hFFFF, 16'hFFFF, 16'h0007,
    16'h000F, 16'h0001, 16'h0001, 16'h0001, 16'h0001, 16'h0001, 16'h00FF, 16'h0001};

  logic [15:0] rd, v;

  initial begin
    seen = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;

    vme(1'b0, 16'h3024, 16'h0, rd);
    check(rd == 16'd1024, $sformatf("1024 words before autokill by default, got %0d", rd));
    vme(1'b0, 16'h3110, 16'h0, rd);
    check(rd == 16'h000F, "DIFFCTRL reset value");
    vme(1'b0, 16'h3300, 16'h0, rd);
    check(rd == 16'h0000, "real data selected after reset");

    for (int r = 0; r < 3; r++)
      for (int i = 0; i < 12; i++) begin
        v = 16'($urandom);
        vme(1'b1, RW_ADDR[i], v, rd);
        check(port_of(RW_ADDR[i]) == (v & RW_MASK[i]),
              $sformatf("output behind %h holds %h", RW_ADDR[i], v & RW_MASK[i]));
        vme(1'b0, RW_ADDR[i], 16'h0, rd);
        check(rd == (v & RW_MASK[i]), $sformatf("read back %h: %h", RW_ADDR[i], rd));
      end

    vme(1'b0, 16'h3120, 16'h0, rd);
    check(rd == 16'h0055, "DCFEB DONE bits read");
    vme(1'b0, 16'h3124, 16'h0, rd);
    check(rd == 16'h0001, "QPLL lock read");

    // W-only pulses
    vme(1'b1, 16'h340C, 16'h0000, rd);
    seen = '0; vme(1'b1, 16'h3004, 16'h0, rd);
    check(seen == 11'b000_0000_0010, "soft reset pulse alone");
    check(nwords == 16'd1024, "soft reset restores 1024 words");
    seen = '0; vme(1'b1, 16'h3008, 16'h0, rd);
    check(seen == 11'b000_0000_0100, "optical reset pulse alone");
    seen = '0; vme(1'b1, 16'h3010, 16'h0, rd);
    check(seen == 11'b000_0000_1000, "reprogram pulse alone");
    seen = '0; vme(1'b1, 16'h3014, 16'h0, rd);
    check(seen == 11'b000_0001_0000, "L1A reset pulse alone");
    for (int b = 0; b < 6; b++) begin
      seen = '0; vme(1'b1, 16'h3200, 16'(1 << b), rd);
      check(seen == 11'(1 << (b + 5)), $sformatf("DCFEB pulse bit %0d", b));
    end
    vme(1'b1, 16'h340C, 16'h0001, rd);
    seen = '0; vme(1'b1, 16'h3200, 16'h003F, rd);
    check(seen == 11'b111_1000_0000, "MASK_PLS blocks INJPLS and EXTPLS");
    // pulses are one cycle wide
    @(negedge clk);
    device = 1'b1; bus = '{strobe: 1'b1, write: 1'b1, cmd: 10'h080, data: 16'h0020};
    @(negedge clk); bus.strobe = 1'b0;
    check(pulse == 6'h20, "BC0 pulse high");
    @(negedge clk); device = 1'b0;
    check(pulse == 6'h00, "BC0 pulse one cycle wide");

    // ODMB data read-back through YZ
    vme(1'b0, 16'h33FC, 16'h0, rd);
    check(rd == ({8'hC0, 8'h3F} ^ 16'h0F0F), $sformatf("R 33FC returns data of 3F, got %h", rd));
    vme(1'b0, 16'h371C, 16'h0, rd);
    check(rd == ({8'hC0, 8'h71} ^ 16'h0F0F), "R 371C returns data of 71");
    vme(1'b0, 16'h340C, 16'h0, rd);
    check(rd == 16'h0001, "340C is MASK_PLS, not ODMB data");
    vme(1'b0, 16'h3500, 16'h0, rd);
    check(rd == 16'h0000, "unused address reads 0");

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
