// odmbjtag: VME device 2, JTAG access to the ODMB's own FPGA.
//
// Same sequencer as the DCFEB JTAG device (jtag_engine) with the original
// command set and a single target:
//   W 2Y00/2Y04/2Y08/2Y0C  shift data, address bit 2 = TMS header,
//                          address bit 3 = TMS tailer (Y = bits minus 1)
//   R 2014                 read the last 16 shifted TDO bits
//   W 2018                 reset the JTAG state machine to Run-Test/Idle
//   W 2Y1C                 shift instruction with header and tailer
//   W 2020                 change the polarity of V6_JTAG_SEL
// V6_JTAG_SEL selects whether the FPGA's JTAG chain listens to this device;
// it toggles on every W 2020 and resets to 0 (the reset value and the
// toggling are this design's reading of "change polarity").  The handshake
// is the same as for device 1: shifts are acknowledged when done, the other
// commands one clock cycle after their strobe; unused reads return 0.
module odmbjtag
  import odmb_vme_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     tick,        // slow-clock enable (SLOWCLK)
  input  logic     device,
  input  vme_cmd_t bus,
  output vme_rsp_t rsp,
  output logic     v6_tck,
  output logic     v6_tms,
  output logic     v6_tdi,
  input  logic     v6_tdo,
  output logic     v6_jtag_sel,
  output logic     busy
);

  logic       req;
  logic [5:0] sub;
  assign req = device && bus.strobe;
  assign sub = bus.cmd[5:0];

  logic       is_shift, is_readtdo, is_polarity;
  jtag_op_e   jop;
  logic       jheader;
  jtag_tail_e jtail;

  always_comb begin
    is_shift    = 1'b0;
    is_readtdo  = 1'b0;
    is_polarity = 1'b0;
    jop         = JOP_DATA;
    jheader     = 1'b0;
    jtail       = JTAIL_NONE;
    casez (sub)
      6'b0000??: begin
        is_shift = 1'b1;
        jheader  = sub[0];
        jtail    = sub[1] ? JTAIL_IDLE : JTAIL_NONE;
      end
      6'b000101: is_readtdo = 1'b1;
      6'b000110: begin is_shift = 1'b1; jop = JOP_RESET; end
      6'b000111: begin is_shift = 1'b1; jop = JOP_INST;
                   jheader = 1'b1; jtail = JTAIL_IDLE; end
      6'b001000: is_polarity = 1'b1;
      default: ;
    endcase
  end

  logic        eng_done;
  logic [15:0] tdo_reg;
  logic        pending;

  jtag_engine u_engine (
    .clk      (clk),
    .rst      (rst),
    .tick     (tick),
    .start    (req && bus.write && is_shift),
    .op       (jop),
    .header   (jheader),
    .tail     (jtail),
    .nbits_m1 (bus.cmd[9:6]),
    .tdi_word (bus.data),
    .tdo      (v6_tdo),
    .tck      (v6_tck),
    .tms      (v6_tms),
    .tdi      (v6_tdi),
    .busy     (busy),
    .done     (eng_done),
    .tdo_reg  (tdo_reg),
    .at_seldr ()
  );

  always_ff @(posedge clk) begin
    rsp <= VME_RSP_IDLE;
    if (rst) begin
      v6_jtag_sel <= 1'b0;
      pending     <= 1'b0;
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
          if (bus.write && is_polarity) v6_jtag_sel <= !v6_jtag_sel;
          if (!bus.write && is_readtdo) rsp.data <= tdo_reg;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) req |-> !pending)
    else $error("odmbjtag: command while a shift is pending");

endmodule
