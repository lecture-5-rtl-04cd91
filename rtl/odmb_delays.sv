// odmb_delays: the trigger and calibration timing set by configuration
// registers 0-6 (device 4, W/R 4000-4018).
//
// All delays are in bunch crossings (BX, one period of the 40 MHz clock,
// 25 ns) except INJ_DLY and EXT_DLY, which are in half-BX steps (12.5 ns).
// A delay of D means that an input high at clock edge t gives an output high
// at edge t+D; D = 0 passes the input straight through.
//   - preLCT per DCFEB is delayed by LCT_L1A_DLY + LCT_OFFSET (100) BX, so
//     that with LCT_L1A_DLY = LCT/L1A gap - 100 it arrives with the L1A.  An
//     L1A that finds a DCFEB's delayed preLCT is an L1A_MATCH for that DCFEB.
//   - The L1A is delayed by OTMB_DLY and by ALCT_DLY BX into otmb_push and
//     alct_push: with each delay set to the L1A/DAV gap read back from the
//     counters (R 338C, R 339C), the push lines up with OTMBDAV and ALCTDAV.
//   - INJPLS and EXTPLS to the DCFEBs follow the CCB's INJPLS/EXTPLS signals
//     after 12.5*INJ_DLY and 12.5*EXT_DLY ns.  The half-BX step is made with
//     a flop on the falling clock edge.
//   - In calibration mode the ODMB makes its own L1A, and an L1A_MATCH to
//     every DCFEB, CALLCT_DLY BX after each pulse; the CCB's L1A is then not
//     passed on.  The count starts at the BX of the pulse's whole-BX part,
//     so an odd INJ_DLY/EXT_DLY does not shift the L1A by the extra half BX.
//   - In pedestal mode every L1A is sent with an L1A_MATCH to every DCFEB.
//   - A test L1A (W 3200 bit 2) is sent at once with an L1A_MATCH to each
//     DCFEB whose bit in the KILL register is clear.
//   - kill_l1a (W 3408) bit 0 stops every L1A, bits 1-7 stop the L1A_MATCHes
//     of DCFEBs 1-7.
//   - CABLE_DLY (0 or 1) delays the L1A, L1A_MATCHes, RESYNC and BC0 sent to
//     the DCFEBs by one more BX.
// The register meanings and modes are the original design's; how each delay
// is built, the L1A_MATCH rule, the calibration-mode details and the order
// in which the modes and kills combine are this design's.
module odmb_delays
  import odmb_vme_pkg::*;
#(
  parameter int unsigned N_FEB      = NFEB,
  parameter int unsigned LCT_OFFSET = 100
) (
  input  logic             clk,
  input  logic             rst,
  // register values
  input  logic [5:0]       lct_l1a_dly,
  input  logic [5:0]       otmb_push_dly,
  input  logic [5:0]       alct_push_dly,
  input  logic             cable_dly,
  input  logic [4:0]       inj_dly,
  input  logic [4:0]       ext_dly,
  input  logic [3:0]       callct_dly,
  input  logic             cal_mode,
  input  logic             ped_mode,
  input  logic [N_FEB:0]   kill_l1a,     // bit 0 L1A, bits 1-7 L1A_MATCHes
  input  logic [N_FEB-1:0] kill_feb,     // KILL register, DCFEB bits
  input  logic             test_l1a,     // W 3200 bit 2
  // from the CCB and the DCFEBs
  input  logic             ccb_l1a,
  input  logic             ccb_resync,
  input  logic             ccb_bc0,
  input  logic             ccb_injpls,
  input  logic             ccb_extpls,
  input  logic [N_FEB-1:0] prelct,
  // to the DCFEBs
  output logic             dcfeb_l1a,
  output logic [N_FEB-1:0] dcfeb_l1a_match,
  output logic             dcfeb_resync,
  output logic             dcfeb_bc0,
  output logic             dcfeb_injpls,
  output logic             dcfeb_extpls,
  // data-path timing
  output logic             otmb_push,
  output logic             alct_push
);

  localparam int unsigned LCT_DEPTH = LCT_OFFSET + 63;

  // preLCT -> L1A
  logic [N_FEB-1:0] lct_dlyd;
  delay_line #(.W(N_FEB), .DEPTH(LCT_DEPTH)) u_lct (
    .clk(clk), .rst(rst), .dly(8'(LCT_OFFSET) + 8'(lct_l1a_dly)),
    .din(prelct), .dout(lct_dlyd));

  // L1A -> OTMBDAV / ALCTDAV
  delay_line #(.W(1), .DEPTH(63)) u_otmb (
    .clk(clk), .rst(rst), .dly(8'(otmb_push_dly)), .din(ccb_l1a), .dout(otmb_push));
  delay_line #(.W(1), .DEPTH(63)) u_alct (
    .clk(clk), .rst(rst), .dly(8'(alct_push_dly)), .din(ccb_l1a), .dout(alct_push));

  // CCB pulse -> DCFEB pulse, whole BX first, then an optional half BX
  logic inj_bx, ext_bx, inj_half, ext_half;
  delay_line #(.W(1), .DEPTH(15)) u_inj (
    .clk(clk), .rst(rst), .dly(8'(inj_dly[4:1])), .din(ccb_injpls), .dout(inj_bx));
  delay_line #(.W(1), .DEPTH(15)) u_ext (
    .clk(clk), .rst(rst), .dly(8'(ext_dly[4:1])), .din(ccb_extpls), .dout(ext_bx));

  always_ff @(negedge clk) begin
    if (rst) {inj_half, ext_half} <= '0;
    else     {inj_half, ext_half} <= {inj_bx, ext_bx};
  end
  assign dcfeb_injpls = inj_dly[0] ? inj_half : inj_bx;
  assign dcfeb_extpls = ext_dly[0] ? ext_half : ext_bx;

  // calibration L1A
  logic cal_l1a;
  delay_line #(.W(1), .DEPTH(15)) u_cal (
    .clk(clk), .rst(rst), .dly(8'(callct_dly)), .din(inj_bx || ext_bx), .dout(cal_l1a));

  logic             l1a_int;
  logic [N_FEB-1:0] match_int;
  logic             l1a_src;
  logic [N_FEB-1:0] match_src;
  always_comb begin
    if (cal_mode) begin
      l1a_src   = cal_l1a;
      match_src = {N_FEB{cal_l1a}};
    end else begin
      l1a_src   = ccb_l1a;
      match_src = {N_FEB{ccb_l1a}} & (ped_mode ? {N_FEB{1'b1}} : lct_dlyd);
    end
    l1a_int   = (l1a_src || test_l1a) && !kill_l1a[0];
    match_int = (match_src | ({N_FEB{test_l1a}} & ~kill_feb)) & ~kill_l1a[N_FEB:1];
  end

  // cable delay
  logic [N_FEB+2:0] to_feb;
  delay_line #(.W(N_FEB + 3), .DEPTH(1)) u_cable (
    .clk(clk), .rst(rst), .dly(8'(cable_dly)),
    .din({ccb_bc0, ccb_resync, l1a_int, match_int}), .dout(to_feb));
  assign {dcfeb_bc0, dcfeb_resync, dcfeb_l1a, dcfeb_l1a_match} = to_feb;

endmodule
