// vmemon: VME device 3, ODMB and DCFEB control.
//
// A bank of control registers, command pulses and read-only status for
// experts.  Offsets inside the device (address bits 11:0):
//   W/R 000 calibration mode (1: the ODMB generates an L1A with every pulse)
//   W   004 ODMB soft reset pulse      W 008 ODMB optical reset pulse
//   W   010 reprogram all DCFEBs pulse W 014 L1A reset and DCFEB RESYNC pulse
//   W/R 020 TP_SEL, test-point selection (16 bits)
//   W/R 024 words in a DCFEB packet before autokill, 1024 after a reset
//   W/R 100 LOOPBACK (0 none, 1 or 2 internal loopback)
//   W/R 110 DIFFCTRL, transmitter swing, 0 minimum .. F maximum
//   R   120 DONE bits of the 7 DCFEBs    R 124 QPLL locked
//   W   200 DCFEB pulses, one bit each: 0 INJPLS, 1 EXTPLS, 2 test L1A and
//           L1A_MATCH, 3 LCT request to OTMB, 4 external trigger request to
//           OTMB, 5 BC0
//   W/R 300 data mux (1 dummy data)  304 trigger mux (1 internal triggers)
//   W/R 308 LVMB mux (1 dummy LVMB)
//   W/R 400 pedestal mode   404 OTMB data request for each L1A
//   W/R 408 kill L1A (bit 0) and L1A_MATCHes (bits 1-7)
//   W/R 40C MASK_PLS (1: no INJPLS/EXTPLS)
//   R   YZC any other read ending in C: ODMB data selected by YZ; the
//           selection goes out on odmb_data_sel and odmb_data comes back
//           combinationally in the same cycle (see odmb_counters)
// Pulse outputs are one clock cycle wide, issued with the dtack.  INJPLS and
// EXTPLS are suppressed while MASK_PLS is set.  Every command is acknowledged
// one clock cycle after its strobe; unused offsets read 0.
//
// The register map is the original device's.  Field widths the map leaves
// open (TP_SEL 16 bits, LOOPBACK 3 bits), reset values other than the 1024
// word limit, the reset of that limit on a soft reset as well as on a hard
// one, and DIFFCTRL being writable are this design's choices.
module vmemon
  import odmb_vme_pkg::*;
#(
  parameter int unsigned N_FEB          = NFEB,
  parameter logic [15:0] NWORDS_DEFAULT = 16'd1024,
  parameter logic [3:0]  DIFFCTRL_INIT  = 4'hF
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             device,
  input  vme_cmd_t         bus,
  output vme_rsp_t         rsp,
  // control outputs
  output logic             cal_mode,
  output logic             odmb_soft_rst,
  output logic             odmb_opt_rst,
  output logic             reprogram_dcfeb,
  output logic             l1a_reset,
  output logic [15:0]      tp_sel,
  output logic [15:0]      max_words_dcfeb,
  output logic [2:0]       loopback,
  output logic [3:0]       diffctrl,
  output logic [5:0]       dcfeb_pulse,
  output logic             data_mux,
  output logic             trg_mux,
  output logic             lvmb_mux,
  output logic             ped_mode,
  output logic             otmb_data_req,
  output logic [N_FEB:0]   kill_l1a,
  output logic             mask_pls,
  // status inputs
  input  logic [N_FEB-1:0] dcfeb_done,
  input  logic             qpll_locked,
  // ODMB data read-back
  output logic [7:0]       odmb_data_sel,
  input  logic [15:0]      odmb_data
);

  localparam logic [11:0] A_CAL = 12'h000, A_SRST = 12'h004, A_ORST = 12'h008,
                          A_REPROG = 12'h010, A_L1ARST = 12'h014,
                          A_TPSEL = 12'h020, A_NWORDS = 12'h024,
                          A_LOOP = 12'h100, A_DIFF = 12'h110,
                          A_DONE = 12'h120, A_QPLL = 12'h124,
                          A_PULSE = 12'h200, A_DMUX = 12'h300,
                          A_TMUX = 12'h304, A_LMUX = 12'h308,
                          A_PED = 12'h400, A_OTMBREQ = 12'h404,
                          A_KILL = 12'h408, A_MASK = 12'h40C;

  logic        req, wr, rd;
  logic [11:0] off;
  logic [15:0] d;
  assign req = device && bus.strobe;
  assign wr  = req && bus.write;
  assign rd  = req && !bus.write;
  assign off = cmd_offset(bus.cmd);
  assign d   = bus.data;

  assign odmb_data_sel = off[11:4];

  // read multiplexer
  logic [15:0] rdata;
  always_comb begin
    unique case (off)
      A_CAL:     rdata = 16'(cal_mode);
      A_TPSEL:   rdata = tp_sel;
      A_NWORDS:  rdata = max_words_dcfeb;
      A_LOOP:    rdata = 16'(loopback);
      A_DIFF:    rdata = 16'(diffctrl);
      A_DONE:    rdata = 16'(dcfeb_done);
      A_QPLL:    rdata = 16'(qpll_locked);
      A_DMUX:    rdata = 16'(data_mux);
      A_TMUX:    rdata = 16'(trg_mux);
      A_LMUX:    rdata = 16'(lvmb_mux);
      A_PED:     rdata = 16'(ped_mode);
      A_OTMBREQ: rdata = 16'(otmb_data_req);
      A_KILL:    rdata = 16'(kill_l1a);
      A_MASK:    rdata = 16'(mask_pls);
      default:   rdata = (off[3:0] == 4'hC) ? odmb_data : 16'h0000;
    endcase
  end

  always_ff @(posedge clk) begin
    rsp             <= VME_RSP_IDLE;
    odmb_soft_rst   <= 1'b0;
    odmb_opt_rst    <= 1'b0;
    reprogram_dcfeb <= 1'b0;
    l1a_reset       <= 1'b0;
    dcfeb_pulse     <= '0;
    if (rst) begin
      cal_mode        <= 1'b0;
      tp_sel          <= '0;
      max_words_dcfeb <= NWORDS_DEFAULT;
      loopback        <= '0;
      diffctrl        <= DIFFCTRL_INIT;
      data_mux        <= 1'b0;
      trg_mux         <= 1'b0;
      lvmb_mux        <= 1'b0;
      ped_mode        <= 1'b0;
      otmb_data_req   <= 1'b0;
      kill_l1a        <= '0;
      mask_pls        <= 1'b0;
    end else begin
      if (req) rsp.dtack <= 1'b1;
      if (rd)  rsp.data  <= rdata;
      if (wr) begin
        unique case (off)
          A_CAL:     cal_mode <= d[0];
          A_SRST:    begin
                       odmb_soft_rst   <= 1'b1;
                       max_words_dcfeb <= NWORDS_DEFAULT;
                     end
          A_ORST:    odmb_opt_rst    <= 1'b1;
          A_REPROG:  reprogram_dcfeb <= 1'b1;
          A_L1ARST:  l1a_reset       <= 1'b1;
          A_TPSEL:   tp_sel          <= d;
          A_NWORDS:  max_words_dcfeb <= d;
          A_LOOP:    loopback        <= d[2:0];
          A_DIFF:    diffctrl        <= d[3:0];
          A_PULSE:   dcfeb_pulse     <= d[5:0] & {4'b1111, {2{!mask_pls}}};
          A_DMUX:    data_mux        <= d[0];
          A_TMUX:    trg_mux         <= d[0];
          A_LMUX:    lvmb_mux        <= d[0];
          A_PED:     ped_mode        <= d[0];
          A_OTMBREQ: otmb_data_req   <= d[0];
          A_KILL:    kill_l1a        <= d[N_FEB:0];
          A_MASK:    mask_pls        <= d[0];
          default: ;
        endcase
      end
    end
  end

endmodule
