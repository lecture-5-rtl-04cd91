// vmeconfregs: VME device 4, configuration registers.
//
// NREGS 16-bit registers, each held in a triple-voted register (tmr_reg), set
// the ODMB delays and settings.  Offsets inside the device:
//   W/R 000 LCT_L1A_DLY[5:0]   004 OTMB_DLY[5:0]   008 CABLE_DLY[0]
//   W/R 00C ALCT_DLY[5:0]      010 INJ_DLY[4:0]    014 EXT_DLY[4:0]
//   W/R 018 CALLCT_DLY[3:0]    01C KILL[8:0] (7 DCFEBs, OTMB, ALCT)
//   W/R 020 CRATEID            024 reserved, holds the firmware version
//   W/R 028 NWORDS_DUMMY       02C BX_DLY[11:0]
//   R   100 ODMB unique ID (input odmb_id)
//   R   200 firmware version   300 firmware build
//   R   400 month/day of the firmware   500 year of the firmware
// A register can be written from three sources, in this priority:
//   1. an internal change request (change_reg_index < NREGS), e.g. the
//      automatic kill of a DCFEB;
//   2. an upload from the PROM (bpi_cfg_ul_pulse with bpi_cfg_reg_we/in);
//   3. a VME write.
// Only registers whose bit in REG_WE_MASK is set can be written at all (the
// reserved firmware-version register cannot).  The full 16 bits are stored;
// the named outputs carry the field widths above.  All voted registers are
// also brought out on cfg_regs (for a download to the PROM).
//
// VME commands are acknowledged one clock cycle after their strobe; the
// write takes effect at that same edge.  A VME write that coincides with a
// write from a higher-priority source is lost (as in the original, where the
// sources share one write port).  Register contents, priorities, triple
// voting and field positions follow the original device; the reset values
// (REG_INIT), the firmware-date constants and the synchronous reset are this
// design's choices.
module vmeconfregs
  import odmb_vme_pkg::*;
#(
  parameter int unsigned N_FEB      = NFEB,
  parameter int unsigned NREGS      = 12,
  parameter logic [15:0] FW_VERSION = 16'h0400,
  parameter logic [15:0] FW_BUILD   = 16'h0001,
  parameter logic [15:0] FW_MMDD    = 16'h0619,
  parameter logic [15:0] FW_YEAR    = 16'h2018,
  parameter logic [NREGS-1:0][15:0] REG_INIT = {16'h0000, 16'h0008, FW_VERSION,
                                                {(NREGS-3){16'h0000}}},
  parameter logic [NREGS-1:0] REG_WE_MASK = ~(NREGS'(1) << 9)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   device,
  input  vme_cmd_t               bus,
  output vme_rsp_t               rsp,
  // internal change request
  input  logic [3:0]             change_reg_index,
  input  logic [15:0]            change_reg_data,
  // upload from the PROM
  input  logic                   bpi_cfg_ul_pulse,
  input  logic [3:0]             bpi_cfg_reg_we,
  input  logic [15:0]            bpi_cfg_reg_in,
  input  logic [15:0]            odmb_id,
  // register contents
  output logic [NREGS-1:0][15:0] cfg_regs,
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

  logic        req, wr;
  logic [11:0] off;
  assign req = device && bus.strobe;
  assign wr  = req && bus.write;
  assign off = cmd_offset(bus.cmd);

  // VME write index, NREGS when no register is addressed
  logic [3:0] vme_cfg_reg_we;
  always_comb begin
    vme_cfg_reg_we = 4'(NREGS);
    if (wr && off[11:6] == '0 && 32'(off[5:2]) < NREGS) vme_cfg_reg_we = off[5:2];
  end

  // write source selection
  logic [3:0]  cfg_reg_we;
  logic [15:0] cfg_reg_in;
  always_comb begin
    if (32'(change_reg_index) < NREGS) begin
      cfg_reg_we = change_reg_index;
      cfg_reg_in = change_reg_data;
    end else if (bpi_cfg_ul_pulse) begin
      cfg_reg_we = bpi_cfg_reg_we;
      cfg_reg_in = bpi_cfg_reg_in;
    end else begin
      cfg_reg_we = vme_cfg_reg_we;
      cfg_reg_in = bus.data;
    end
  end

  for (genvar i = 0; i < NREGS; i++) begin : g_reg
    tmr_reg #(.W(16), .INIT(REG_INIT[i])) u_tmr (
      .clk (clk),
      .rst (rst),
      .we  (32'(cfg_reg_we) == i && REG_WE_MASK[i]),
      .d   (cfg_reg_in),
      .q   (cfg_regs[i])
    );
  end

  assign lct_l1a_dly   = cfg_regs[0][5:0];
  assign otmb_push_dly = cfg_regs[1][5:0];
  assign cable_dly     = cfg_regs[2][0];
  assign alct_push_dly = cfg_regs[3][5:0];
  assign inj_dly       = cfg_regs[4][4:0];
  assign ext_dly       = cfg_regs[5][4:0];
  assign callct_dly    = cfg_regs[6][3:0];
  assign kill          = cfg_regs[7][N_FEB+1:0];
  assign crateid       = cfg_regs[8][7:0];
  assign nwords_dummy  = cfg_regs[10];
  assign bx_dly        = cfg_regs[11][11:0];

  logic [15:0] rdata;
  always_comb begin
    rdata = 16'h0000;
    if (off[11:6] == '0 && 32'(off[5:2]) < NREGS && off[1:0] == 2'b00)
      rdata = cfg_regs[off[5:2]];
    else unique case (off)
      12'h100: rdata = odmb_id;
      12'h200: rdata = FW_VERSION;
      12'h300: rdata = FW_BUILD;
      12'h400: rdata = FW_MMDD;
      12'h500: rdata = FW_YEAR;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    rsp <= VME_RSP_IDLE;
    if (!rst && req) begin
      rsp.dtack <= 1'b1;
      if (!bus.write) rsp.data <= rdata;
    end
  end

endmodule
