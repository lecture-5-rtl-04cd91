// odmb_vme: the VME command side of the ODMB (optical DAQ motherboard).
//
// A VME master (crate controller or PC) reaches the board through 16-bit
// commands: the first hex digit of the address picks one of the devices, the
// other three digits the command inside it.  This module decodes the command
// (vme_dev_decoder) and holds the four devices built here:
//   1 cfebjtag     JTAG to the 7 DCFEBs, with header/tailer options and the
//                  instruction shifts that can end in Select-DR-Scan
//   2 odmbjtag     JTAG to the ODMB's own FPGA
//   3 vmemon       control registers, pulses and counter read-back, with the
//                  trigger and packet counters (odmb_counters)
//   4 vmeconfregs  triple-voted configuration registers, whose delay
//                  settings drive the trigger and calibration timing
//                  (odmb_delays)
// Devices 5-9 (test FIFOs, PROM/BPI interface, system monitor, low-voltage
// monitor, system tests) are outside this module: they get the decoded
// command on ext_bus/ext_device and answer on ext_rsp.
//
// Clocking: one clock `clk` (40 MHz in the ODMB, assumed here).  The JTAG
// devices run on a slow-clock enable made by dividing clk by SLOW_DIV
// (16, giving 2.5 MHz; TCK then runs at 1.25 MHz).  Handshake on the VME
// side: vme_strobe for one cycle with vme_write, vme_addr and vme_wdata; the
// module answers with a one-cycle vme_dtack (vme_rdata valid with it) when
// the command has finished; no new strobe before that dtack.  The clock
// frequency, the divider and the handshake are this design's choices.
module odmb_vme
  import odmb_vme_pkg::*;
#(
  parameter int unsigned N_FEB    = NFEB,
  parameter int unsigned SLOW_DIV = 16
) (
  input  logic                   clk,
  input  logic                   rst,
  // VME command port
  input  logic                   vme_strobe,
  input  logic                   vme_write,
  input  logic [15:0]            vme_addr,
  input  logic [15:0]            vme_wdata,
  output logic                   vme_dtack,
  output logic [15:0]            vme_rdata,
  // devices 5-9, outside this module
  output vme_cmd_t               ext_bus,
  output logic [9:5]             ext_device,
  input  vme_rsp_t [9:5]         ext_rsp,
  // DCFEB JTAG
  output logic [N_FEB-1:0]       dl_jtag_tck,
  output logic                   dl_jtag_tms,
  output logic                   dl_jtag_tdi,
  input  logic [N_FEB-1:0]       dl_jtag_tdo,
  // ODMB FPGA JTAG
  output logic                   v6_tck,
  output logic                   v6_tms,
  output logic                   v6_tdi,
  input  logic                   v6_tdo,
  output logic                   v6_jtag_sel,
  // ODMB/DCFEB control
  output logic                   cal_mode,
  output logic                   odmb_soft_rst,
  output logic                   odmb_opt_rst,
  output logic                   reprogram_dcfeb,
  output logic                   l1a_reset,
  output logic [15:0]            tp_sel,
  output logic [15:0]            max_words_dcfeb,
  output logic [2:0]             loopback,
  output logic [3:0]             diffctrl,
  output logic [5:0]             dcfeb_pulse,
  output logic                   data_mux,
  output logic                   trg_mux,
  output logic                   lvmb_mux,
  output logic                   ped_mode,
  output logic                   otmb_data_req,
  output logic [N_FEB:0]         kill_l1a,
  output logic                   mask_pls,
  input  logic [N_FEB-1:0]       dcfeb_done,
  input  logic                   qpll_locked,
  // events counted for the read-back
  input  logic                   ccb_resync,
  input  logic                   l1a,
  input  logic [N_FEB-1:0]       lct,
  input  logic                   otmbdav,
  input  logic                   alctdav,
  input  logic [N_FEB+1:0]       l1a_match,
  input  logic [N_FEB+1:0]       pkt_rcv,
  input  logic                   pkt_ddu,
  input  logic                   pkt_pc,
  input  logic [N_FEB+1:0]       pkt_shipped,
  input  logic [N_FEB-1:0]       good_crc,
  // trigger and calibration signals from the CCB, timed for the DCFEBs
  input  logic                   ccb_bc0,
  input  logic                   ccb_injpls,
  input  logic                   ccb_extpls,
  output logic                   dcfeb_l1a,
  output logic [N_FEB-1:0]       dcfeb_l1a_match,
  output logic                   dcfeb_resync,
  output logic                   dcfeb_bc0,
  output logic                   dcfeb_injpls,
  output logic                   dcfeb_extpls,
  output logic                   otmb_push,
  output logic                   alct_push,
  // configuration registers
  input  logic [3:0]             change_reg_index,
  input  logic [15:0]            change_reg_data,
  input  logic                   bpi_cfg_ul_pulse,
  input  logic [3:0]             bpi_cfg_reg_we,
  input  logic [15:0]            bpi_cfg_reg_in,
  input  logic [15:0]            odmb_id,
  output logic [11:0][15:0]      cfg_regs,
  output logic [5:0]             lct_l1a_dly,
  output logic [5:0]             otmb_push_dly,
  output logic                   cable_dly,
  output logic [5:0]             alct_push_dly,
  output logic [4:0]             inj_dly,
  output logic [4:0]             ext_dly,
  output logic [3:0]             callct_dly,
  output logic [N_FEB+1:0]       kill,
  output logic [7:0]             crateid,
  output logic [15:0]            nwords_dummy,
  output logic [11:0]            bx_dly
);

  // slow-clock enable for the JTAG devices
  logic [$clog2(SLOW_DIV+1)-1:0] div_cnt;
  logic                          tick;
  always_ff @(posedge clk) begin
    if (rst || 32'(div_cnt) == SLOW_DIV - 1) div_cnt <= '0;
    else                                     div_cnt <= div_cnt + 1'b1;
  end
  assign tick = (32'(div_cnt) == SLOW_DIV - 1);

  vme_cmd_t                bus;
  logic     [NDEV-1:0]     device;
  vme_rsp_t [NDEV-1:0]     dev_rsp;

  vme_dev_decoder u_dec (
    .clk     (clk),
    .rst     (rst),
    .strobe  (vme_strobe),
    .write   (vme_write),
    .addr    (vme_addr),
    .wdata   (vme_wdata),
    .dtack   (vme_dtack),
    .rdata   (vme_rdata),
    .bus     (bus),
    .device  (device),
    .dev_rsp (dev_rsp)
  );

  assign dev_rsp[0] = VME_RSP_IDLE;
  assign ext_bus    = bus;
  assign ext_device = device[9:5];
  assign dev_rsp[9:5] = ext_rsp;

  cfebjtag #(.N_FEB(N_FEB)) u_cfebjtag (
    .clk         (clk),
    .rst         (rst),
    .tick        (tick),
    .device      (device[1]),
    .bus         (bus),
    .rsp         (dev_rsp[1]),
    .dl_jtag_tck (dl_jtag_tck),
    .dl_jtag_tms (dl_jtag_tms),
    .dl_jtag_tdi (dl_jtag_tdi),
    .dl_jtag_tdo (dl_jtag_tdo),
    .busy        ()
  );

  odmbjtag u_odmbjtag (
    .clk         (clk),
    .rst         (rst),
    .tick        (tick),
    .device      (device[2]),
    .bus         (bus),
    .rsp         (dev_rsp[2]),
    .v6_tck      (v6_tck),
    .v6_tms      (v6_tms),
    .v6_tdi      (v6_tdi),
    .v6_tdo      (v6_tdo),
    .v6_jtag_sel (v6_jtag_sel),
    .busy        ()
  );

  logic [7:0]  odmb_data_sel;
  logic [15:0] odmb_data;

  vmemon #(.N_FEB(N_FEB)) u_vmemon (
    .clk             (clk),
    .rst             (rst),
    .device          (device[3]),
    .bus             (bus),
    .rsp             (dev_rsp[3]),
    .cal_mode        (cal_mode),
    .odmb_soft_rst   (odmb_soft_rst),
    .odmb_opt_rst    (odmb_opt_rst),
    .reprogram_dcfeb (reprogram_dcfeb),
    .l1a_reset       (l1a_reset),
    .tp_sel          (tp_sel),
    .max_words_dcfeb (max_words_dcfeb),
    .loopback        (loopback),
    .diffctrl        (diffctrl),
    .dcfeb_pulse     (dcfeb_pulse),
    .data_mux        (data_mux),
    .trg_mux         (trg_mux),
    .lvmb_mux        (lvmb_mux),
    .ped_mode        (ped_mode),
    .otmb_data_req   (otmb_data_req),
    .kill_l1a        (kill_l1a),
    .mask_pls        (mask_pls),
    .dcfeb_done      (dcfeb_done),
    .qpll_locked     (qpll_locked),
    .odmb_data_sel   (odmb_data_sel),
    .odmb_data       (odmb_data)
  );

  odmb_counters #(.N_FEB(N_FEB)) u_counters (
    .clk         (clk),
    .rst         (rst),
    .resync      (ccb_resync || l1a_reset),
    .l1a         (l1a),
    .lct         (lct),
    .otmbdav     (otmbdav),
    .alctdav     (alctdav),
    .l1a_match   (l1a_match),
    .pkt_rcv     (pkt_rcv),
    .pkt_ddu     (pkt_ddu),
    .pkt_pc      (pkt_pc),
    .pkt_shipped (pkt_shipped),
    .good_crc    (good_crc),
    .sel         (odmb_data_sel),
    .data        (odmb_data)
  );

  vmeconfregs #(.N_FEB(N_FEB), .NREGS(12)) u_confregs (
    .clk              (clk),
    .rst              (rst),
    .device           (device[4]),
    .bus              (bus),
    .rsp              (dev_rsp[4]),
    .change_reg_index (change_reg_index),
    .change_reg_data  (change_reg_data),
    .bpi_cfg_ul_pulse (bpi_cfg_ul_pulse),
    .bpi_cfg_reg_we   (bpi_cfg_reg_we),
    .bpi_cfg_reg_in   (bpi_cfg_reg_in),
    .odmb_id          (odmb_id),
    .cfg_regs         (cfg_regs),
    .lct_l1a_dly      (lct_l1a_dly),
    .otmb_push_dly    (otmb_push_dly),
    .cable_dly        (cable_dly),
    .alct_push_dly    (alct_push_dly),
    .inj_dly          (inj_dly),
    .ext_dly          (ext_dly),
    .callct_dly       (callct_dly),
    .kill             (kill),
    .crateid          (crateid),
    .nwords_dummy     (nwords_dummy),
    .bx_dly           (bx_dly)
  );

  // Trigger and calibration timing.  The DCFEB pulses of W 3200 (INJPLS,
  // EXTPLS, BC0) join the CCB's and its test L1A goes to the DCFEBs not
  // killed in the KILL register; MASK_PLS also stops the CCB's INJPLS and
  // EXTPLS, and the L1A reset of W 3014 goes out as a RESYNC.
  odmb_delays #(.N_FEB(N_FEB)) u_delays (
    .clk             (clk),
    .rst             (rst),
    .lct_l1a_dly     (lct_l1a_dly),
    .otmb_push_dly   (otmb_push_dly),
    .alct_push_dly   (alct_push_dly),
    .cable_dly       (cable_dly),
    .inj_dly         (inj_dly),
    .ext_dly         (ext_dly),
    .callct_dly      (callct_dly),
    .cal_mode        (cal_mode),
    .ped_mode        (ped_mode),
    .kill_l1a        (kill_l1a),
    .kill_feb        (kill[N_FEB-1:0]),
    .test_l1a        (dcfeb_pulse[2]),
    .ccb_l1a         (l1a),
    .ccb_resync      (ccb_resync || l1a_reset),
    .ccb_bc0         (ccb_bc0 || dcfeb_pulse[5]),
    .ccb_injpls      ((ccb_injpls && !mask_pls) || dcfeb_pulse[0]),
    .ccb_extpls      ((ccb_extpls && !mask_pls) || dcfeb_pulse[1]),
    .prelct          (lct),
    .dcfeb_l1a       (dcfeb_l1a),
    .dcfeb_l1a_match (dcfeb_l1a_match),
    .dcfeb_resync    (dcfeb_resync),
    .dcfeb_bc0       (dcfeb_bc0),
    .dcfeb_injpls    (dcfeb_injpls),
    .dcfeb_extpls    (dcfeb_extpls),
    .otmb_push       (otmb_push),
    .alct_push       (alct_push)
  );

  // Handshake rule on the VME side: one command at a time.
  logic outstanding;
  always_ff @(posedge clk) begin
    if (rst)             outstanding <= 1'b0;
    else if (vme_strobe) outstanding <= 1'b1;
    else if (vme_dtack)  outstanding <= 1'b0;
  end
  assert property (@(posedge clk) disable iff (rst) vme_strobe |-> !outstanding)
    else $error("odmb_vme: new command before the previous dtack");

endmodule
