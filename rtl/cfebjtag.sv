// cfebjtag: VME device 1, JTAG access to the DCFEBs.
//
// The VME command word (address bits 11:0 = Y C C, Y = bits to shift minus 1)
// is decoded into one JTAG operation for the jtag_engine sequencer:
//   W 1Y00/1Y04/1Y08/1Y0C  shift data, bit 2 of the address = TMS header,
//                          bit 3 = TMS tailer
//   R 1014                 read the last 16 shifted TDO bits
//   W 1018                 reset the JTAG state machines to Run-Test/Idle
//   W 1Y1C                 shift instruction with header and tailer
//   W 1020 / R 1024        write / read the DCFEB selection, one bit per DCFEB
//   W 1Y30/1Y34/1Y38/1Y3C  shift instruction, header and tailer chosen by the
//                          same two address bits as for data
//   W 1Y48/1Y4C            shift instruction, without/with header, with the
//                          tailer that ends in Select-DR-Scan, so that a data
//                          shift can follow directly
// The shift data is the 16-bit write word, sent LSB first.  TCK goes only to
// the selected DCFEBs (TCK(i) = SELFEB(i) and ENABLE); TMS and TDI are common;
// TDO is taken from the selected DCFEBs (or of their TDO lines, only one
// should be selected when reading).  The selection resets to all DCFEBs.
//
// The command set and the TCK gating follow the original device including the
// two instruction-shift extensions it proposes; the handshake (dtack when the
// operation has ended), the TDO combination and the read value of unused
// commands (0) are this design's choices.  Timing: a shift command is
// acknowledged 2*(header+bits+tailer) slow-clock ticks after its strobe,
// register commands one clock cycle after it.
module cfebjtag
  import odmb_vme_pkg::*;
#(
  parameter int unsigned N_FEB = NFEB
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             tick,       // slow-clock enable (SLOWCLK)
  input  logic             device,     // this device is addressed
  input  vme_cmd_t         bus,
  output vme_rsp_t         rsp,
  output logic [N_FEB-1:0] dl_jtag_tck,
  output logic             dl_jtag_tms,
  output logic             dl_jtag_tdi,
  input  logic [N_FEB-1:0] dl_jtag_tdo,
  output logic             busy
);

  logic [N_FEB-1:0] selfeb;
  logic             req;
  logic [5:0]       sub;        // address bits 7:2
  logic [3:0]       yfield;     // address bits 11:8

  assign req    = device && bus.strobe;
  assign sub    = bus.cmd[5:0];
  assign yfield = bus.cmd[9:6];

  // Command decoder
  logic     is_shift, is_readtdo, is_selcfeb, is_readcfeb;
  jtag_op_e jop;
  logic     jheader;
  jtag_tail_e jtail;

  always_comb begin
    is_shift    = 1'b0;
    is_readtdo  = 1'b0;
    is_selcfeb  = 1'b0;
    is_readcfeb = 1'b0;
    jop         = JOP_DATA;
    jheader     = 1'b0;
    jtail       = JTAIL_NONE;
    casez (sub)
      6'b0000??: begin  // 0x00..0x0C data shift
        is_shift = 1'b1; jop = JOP_DATA;
        jheader  = sub[0];
        jtail    = sub[1] ? JTAIL_IDLE : JTAIL_NONE;
      end
      6'b000101: is_readtdo = 1'b1;                          // 0x14
      6'b000110: begin is_shift = 1'b1; jop = JOP_RESET; end // 0x18
      6'b000111: begin is_shift = 1'b1; jop = JOP_INST;      // 0x1C
                   jheader = 1'b1; jtail = JTAIL_IDLE; end
      6'b001000: is_selcfeb  = 1'b1;                         // 0x20
      6'b001001: is_readcfeb = 1'b1;                         // 0x24
      6'b0011??: begin  // 0x30..0x3C instruction shift
        is_shift = 1'b1; jop = JOP_INST;
        jheader  = sub[0];
        jtail    = sub[1] ? JTAIL_IDLE : JTAIL_NONE;
      end
      6'b01001?: begin  // 0x48, 0x4C instruction shift ending in Select-DR
        is_shift = 1'b1; jop = JOP_INST;
        jheader  = sub[0];
        jtail    = JTAIL_SELDR;
      end
      default: ;
    endcase
  end

  logic        eng_done;
  logic [15:0] tdo_reg;
  logic        eng_tck;
  logic        pending;    // shift accepted, dtack when the engine is done

  jtag_engine u_engine (
    .clk      (clk),
    .rst      (rst),
    .tick     (tick),
    .start    (req && bus.write && is_shift),
    .op       (jop),
    .header   (jheader),
    .tail     (jtail),
    .nbits_m1 (yfield),
    .tdi_word (bus.data),
    .tdo      (|(dl_jtag_tdo & selfeb)),
    .tck      (eng_tck),
    .tms      (dl_jtag_tms),
    .tdi      (dl_jtag_tdi),
    .busy     (busy),
    .done     (eng_done),
    .tdo_reg  (tdo_reg),
    .at_seldr ()
  );

  assign dl_jtag_tck = selfeb & {N_FEB{eng_tck}};

  always_ff @(posedge clk) begin
    rsp <= VME_RSP_IDLE;
    if (rst) begin
      selfeb  <= '1;
      pending <= 1'b0;
    end else begin
      if (pending && eng_done) begin
        pending   <= 1'b0;
        rsp.dtack <= 1'b1;
      end
      if (req) begin
        if (bus.write && is_shift) begin
          pending <= 1'b1;
        end else begin
          rsp.dtack <= 1'b1;
          if (bus.write && is_selcfeb) selfeb <= bus.data[N_FEB-1:0];
          if (!bus.write && is_readtdo)  rsp.data <= tdo_reg;
          if (!bus.write && is_readcfeb) rsp.data <= 16'(selfeb);
        end
      end
    end
  end

  // Handshake rule: no new command while one is still being executed.
  assert property (@(posedge clk) disable iff (rst) req |-> !pending)
    else $error("cfebjtag: command while a shift is pending");

endmodule
