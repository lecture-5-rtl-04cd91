// tb_delay_line: self-checking test of the programmable delay line.
//
// Two instances (DEPTH 1 and DEPTH 20, 3 bits wide) get random input words
// on every cycle while the delay setting changes at random, including
// values above DEPTH.  Each output is compared, just before every rising
// edge, with a model that keeps the input history: a setting of D returns the
// input of min(D, DEPTH) cycles ago, and 0 passes the input through.
module tb_delay_line;

  localparam int NCYC = 4000;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic [7:0] dly1 = '0, dly20 = '0;
  logic [2:0] din = '0, dout1, dout20;

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  delay_line #(.W(3), .DEPTH(1))  dut1  (.clk(clk), .rst(rst), .dly(dly1),  .din(din), .dout(dout1));
  delay_line #(.W(3), .DEPTH(20)) dut20 (.clk(clk), .rst(rst), .dly(dly20), .din(din), .dout(dout20));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  logic [2:0] hist [NCYC];

  function automatic logic [2:0] expect_out(input int k, input int d, input int depth);
    int e;
    e = (d > depth) ? depth : d;
    return (k - e >= 0) ? hist[k - e] : 3'b000;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < NCYC; k++) begin
      if ($urandom % 50 == 0) dly1  = ($urandom % 4 == 0) ? 8'($urandom) : 8'($urandom % 3);
      if ($urandom % 50 == 0) dly20 = ($urandom % 4 == 0) ? 8'($urandom) : 8'($urandom % 22);
      din = 3'($urandom);
      hist[k] = din;
      #8;
      check(dout1 == expect_out(k, int'(dly1), 1),
            $sformatf("cycle %0d DEPTH 1 delay %0d: %h", k, dly1, dout1));
      check(dout20 == expect_out(k, int'(dly20), 20),
            $sformatf("cycle %0d DEPTH 20 delay %0d: %h, expected %h", k, dly20, dout20,
                      expect_out(k, int'(dly20), 20)));
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
