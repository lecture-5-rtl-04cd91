// odmb_vme_pkg: types and constants shared by the ODMB VME devices.
//
// A VME command reaches a device as a vme_cmd_t: a one-cycle strobe, the
// direction, the 10-bit device command (VME address bits 11:2) and the 16-bit
// write data.  The device answers with a vme_rsp_t: a one-cycle dtack, with the
// read data valid in the same cycle.  A command is acknowledged only when it
// has finished (for a JTAG shift, when the last TMS bit has been sent), and the
// master issues no new command before the dtack of the previous one.  This
// point-to-point handshake is this design's choice; the crate-side VME
// protocol (AS/DS/DTACK timing) sits in front of it and is not modelled.
//
// The address map follows the ODMB convention: address bits 15:12 select the
// device (1 = DCFEB JTAG, 2 = ODMB JTAG, 3 = ODMB/DCFEB control, 4 =
// configuration registers, 5..9 = further devices), bits 11:0 select the
// command inside the device.
package odmb_vme_pkg;

  // Number of DCFEBs served by one ODMB.
  parameter int unsigned NFEB = 7;
  // Number of devices addressed by address bits 15:12 (devices 1..9 exist).
  parameter int unsigned NDEV = 10;

  typedef struct packed {
    logic        strobe;  // one-cycle command request
    logic        write;   // 1 = W command, 0 = R command
    logic [9:0]  cmd;     // VME address bits 11:2 (COMMAND in the ODMB firmware)
    logic [15:0] data;    // write data (INDATA)
  } vme_cmd_t;

  typedef struct packed {
    logic        dtack;   // one-cycle acknowledge, command finished
    logic [15:0] data;    // read data (OUTDATA), valid with dtack
  } vme_rsp_t;

  localparam vme_rsp_t VME_RSP_IDLE = '{dtack: 1'b0, data: 16'h0000};

  // Byte offset of a command inside its device (address bits 11:0).
  function automatic logic [11:0] cmd_offset(input logic [9:0] cmd);
    return {cmd, 2'b00};
  endfunction

  // Operations of the JTAG sequencer.
  typedef enum logic [1:0] {
    JOP_DATA  = 2'd0,  // shift the data register
    JOP_INST  = 2'd1,  // shift the instruction register
    JOP_RESET = 2'd2   // drive the TAP to Run-Test/Idle through Test-Logic-Reset
  } jtag_op_e;

  // Tailer after the last shifted bit.
  typedef enum logic [1:0] {
    JTAIL_NONE  = 2'd0,  // stay in Shift-xR
    JTAIL_IDLE  = 2'd1,  // Exit1 -> Update -> Run-Test/Idle
    JTAIL_SELDR = 2'd2   // Exit1 -> Update -> Select-DR-Scan
  } jtag_tail_e;

endpackage
