// tb_vme_dev_decoder: self-checking test of the VME device decoder.
//
// For random addresses it checks that exactly the device named by address
// bits 15:12 is selected (none for 0 and 10-15), that the command word is
// address bits 11:2 and that write flag and data pass unchanged.  Simple
// device stand-ins answer one or several cycles later with their own data;
// the test checks that the merged dtack and read data come from the device
// that answered, and that a command for an unused device number is
// acknowledged by the decoder one cycle after its strobe with data 0.
module tb_vme_dev_decoder;
  import odmb_vme_pkg::*;

  logic                  clk = 1'b0;
  logic                  rst = 1'b1;
  logic                  strobe = 1'b0, write = 1'b0;
  logic [15:0]           addr = '0, wdata = '0;
  logic                  dtack;
  logic [15:0]           rdata;
  vme_cmd_t              bus;
  logic [NDEV-1:0]       device;
  vme_rsp_t [NDEV-1:0]   dev_rsp;

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  vme_dev_decoder dut (
    .clk(clk), .rst(rst), .strobe(strobe), .write(write), .addr(addr),
    .wdata(wdata), .dtack(dtack), .rdata(rdata), .bus(bus), .device(device),
    .dev_rsp(dev_rsp)
  );

  // device n answers n cycles after the strobe with data {n, cmd[11:0]}
  for (genvar n = 0; n < NDEV; n++) begin : g_dev
    int unsigned cnt = 0;
    logic        busy = 1'b0;
    logic [9:0]  cmd_q;
    always @(posedge clk) begin
      dev_rsp[n] <= VME_RSP_IDLE;
      if (device[n] && bus.strobe) begin
        busy  <= 1'b1;
        cnt   <= (n == 0) ? 1 : n;
        cmd_q <= bus.cmd;
      end else if (busy) begin
        cnt <= cnt - 1;
        if (cnt == 1) begin
          busy <= 1'b0;
          dev_rsp[n] <= '{dtack: 1'b1, data: {4'(n), cmd_q, 2'b00}};
        end
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int k = 0; k < 300; k++) begin
      int n, dn;
      logic [15:0] a;
      a  = 16'($urandom);
      dn = int'(a[15:12]);
      @(negedge clk);
      strobe = 1'b1; write = 1'($urandom); addr = a; wdata = 16'($urandom);
      #1;
      check(bus.cmd == a[11:2] && bus.write == write && bus.data == wdata && bus.strobe,
            "command fields passed on");
      if (dn >= 1 && dn <= 9) check(device == NDEV'(1 << dn), $sformatf("device %0d selected", dn));
      else                    check(device == '0, $sformatf("no device for %0d", dn));
      @(negedge clk);
      strobe = 1'b0;
      n = 1;
      while (!dtack && n < 20) begin
        @(negedge clk);
        n++;
      end
      if (dn >= 1 && dn <= 9) begin
        check(n == dn + 1, $sformatf("device %0d answers after %0d cycles, got %0d", dn, dn + 1, n));
        check(rdata == {4'(dn), a[11:2], 2'b00}, "read data from the answering device");
      end else begin
        check(n == 1, "unused device number acknowledged after one cycle");
        check(rdata == 16'h0, "unused device number reads 0");
      end
      @(negedge clk);
      check(!dtack, "one dtack per command");
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
