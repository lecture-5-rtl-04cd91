// tb_odmb_counters: self-checking test of the trigger and packet counters.
//
// Drives random event strobes for a few thousand cycles while a reference
// model in the testbench counts them, then reads every code 21-29, 38-3F,
// 41-4B, 51-5F, 61-67 and 71-79 and compares.  Then checks that a resync
// clears everything but the hard-reset L1A counter (5F), that the L1A to
// OTMBDAV/ALCTDAV gaps are measured in clock cycles, and that a 16-bit
// counter saturates (with CW reduced to 4 bits in a second instance).
module tb_odmb_counters;
  import odmb_vme_pkg::*;

  localparam int NF = 7, NS = 9;

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic          resync = 1'b0;
  logic          l1a = 0, otmbdav = 0, alctdav = 0, pkt_ddu = 0, pkt_pc = 0;
  logic [NF-1:0] lct = '0, good_crc = '0;
  logic [NS-1:0] l1a_match = '0, pkt_rcv = '0, pkt_shipped = '0;
  logic [7:0]    sel = '0;
  logic [15:0]   data, data_small;

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  odmb_counters dut (
    .clk(clk), .rst(rst), .resync(resync), .l1a(l1a), .lct(lct),
    .otmbdav(otmbdav), .alctdav(alctdav), .l1a_match(l1a_match),
    .pkt_rcv(pkt_rcv), .pkt_ddu(pkt_ddu), .pkt_pc(pkt_pc),
    .pkt_shipped(pkt_shipped), .good_crc(good_crc), .sel(sel), .data(data)
  );

  odmb_counters #(.CW(4)) dut_small (
    .clk(clk), .rst(rst), .resync(resync), .l1a(l1a), .lct(lct),
    .otmbdav(otmbdav), .alctdav(alctdav), .l1a_match(l1a_match),
    .pkt_rcv(pkt_rcv), .pkt_ddu(pkt_ddu), .pkt_pc(pkt_pc),
    .pkt_shipped(pkt_shipped), .good_crc(good_crc), .sel(sel), .data(data_small)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // reference counts, indexed by code YZ
  int ref_cnt [256];

  task automatic expect_code(input logic [7:0] code, input int exp);
    @(negedge clk);
    sel = code;
    #1;
    check(data == 16'(exp), $sformatf("code %h: expected %0d, got %0d", code, exp, data));
  endtask

  initial begin
    for (int i = 0; i < 256; i++) ref_cnt[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;

    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      l1a       = ($urandom % 4) == 0;
      lct       = NF'($urandom) & NF'($urandom);
      otmbdav   = ($urandom % 5) == 0;
      alctdav   = ($urandom % 6) == 0;
      l1a_match = NS'($urandom) & NS'($urandom);
      pkt_rcv   = NS'($urandom) & NS'($urandom);
      pkt_shipped = NS'($urandom) & NS'($urandom);
      good_crc  = NF'($urandom);
      pkt_ddu   = $urandom % 2;
      pkt_pc    = ($urandom % 3) == 0;
      ref_cnt[8'h3F] += l1a;
      ref_cnt[8'h5F] += l1a;
      ref_cnt[8'h78] += otmbdav;
      ref_cnt[8'h79] += alctdav;
      ref_cnt[8'h4A] += pkt_ddu;
      ref_cnt[8'h4B] += pkt_pc;
      for (int i = 0; i < NF; i++) begin
        ref_cnt[8'h71 + i] += lct[i];
        ref_cnt[8'h61 + i] += good_crc[i];
      end
      for (int i = 0; i < NS; i++) begin
        ref_cnt[8'h21 + i] += l1a_match[i];
        ref_cnt[8'h41 + i] += pkt_rcv[i];
        ref_cnt[8'h51 + i] += pkt_shipped[i];
      end
    end
    @(negedge clk);
    {l1a, otmbdav, alctdav, pkt_ddu, pkt_pc} = '0;
    lct = '0; good_crc = '0; l1a_match = '0; pkt_rcv = '0; pkt_shipped = '0;
    @(negedge clk);

    expect_code(8'h3F, ref_cnt[8'h3F]);
    expect_code(8'h3B, ref_cnt[8'h3F]);
    expect_code(8'h3A, 0);
    expect_code(8'h5F, ref_cnt[8'h5F]);
    for (int c = 8'h21; c <= 8'h29; c++) expect_code(8'(c), ref_cnt[c]);
    for (int c = 8'h41; c <= 8'h4B; c++) expect_code(8'(c), ref_cnt[c]);
    for (int c = 8'h51; c <= 8'h59; c++) expect_code(8'(c), ref_cnt[c]);
    for (int c = 8'h61; c <= 8'h67; c++) expect_code(8'(c), ref_cnt[c]);
    for (int c = 8'h71; c <= 8'h79; c++) expect_code(8'(c), ref_cnt[c]);
    expect_code(8'h68, 0);
    expect_code(8'h20, 0);

    // the small instance has saturated at 15
    @(negedge clk); sel = 8'h4A; #1;
    check(data_small == 16'd15, $sformatf("4-bit counter saturates at 15, got %0d", data_small));

    // resync clears all but 5F
    @(negedge clk); resync = 1'b1;
    @(negedge clk); resync = 1'b0;
    expect_code(8'h3F, 0);
    expect_code(8'h4A, 0);
    expect_code(8'h25, 0);
    expect_code(8'h5F, ref_cnt[8'h5F]);

    // gaps: L1A, then OTMBDAV 7 cycles later and ALCTDAV 12 cycles later
    @(negedge clk); l1a = 1'b1;
    @(negedge clk); l1a = 1'b0;
    repeat (6) @(negedge clk);
    otmbdav = 1'b1;
    @(negedge clk); otmbdav = 1'b0;
    repeat (4) @(negedge clk);
    alctdav = 1'b1;
    @(negedge clk); alctdav = 1'b0;
    expect_code(8'h38, 7);
    expect_code(8'h39, 12);
    expect_code(8'h3F, 1);

    // 24-bit L1A counter: upper part after 65536 + 3 L1As
    @(negedge clk); l1a = 1'b1;
    repeat (65536 + 2) @(negedge clk);
    l1a = 1'b0;
    expect_code(8'h3A, 1);
    expect_code(8'h3B, 3);

    // hard reset clears 5F
    @(negedge clk); rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    expect_code(8'h5F, 0);

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
