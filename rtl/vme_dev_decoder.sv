// vme_dev_decoder: routes VME commands to the ODMB devices.
//
// The first hex digit of the 16-bit VME address (bits 15:12) names the
// device, the rest is the device's command: bits 11:2 go to every device as
// `cmd`, together with the write flag and data, and `device[n]` tells device
// n that the command is its own.  The replies of all devices are merged: at
// most one device answers at a time, so their dtacks are ORed and the read
// data is taken from the device that acknowledges.  Commands for a device
// number that no device uses (0 and 10-15) are acknowledged by the decoder
// itself one cycle after the strobe, reading 0, so that the master is never
// left waiting.  Address bits 1:0 are ignored.
//
// The address split follows the ODMB command format (device digit, then
// command); merging the replies and answering unused device numbers are this
// design's choices.
module vme_dev_decoder
  import odmb_vme_pkg::*;
#(
  parameter int unsigned N_DEV = NDEV
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  strobe,
  input  logic                  write,
  input  logic [15:0]           addr,
  input  logic [15:0]           wdata,
  output logic                  dtack,
  output logic [15:0]           rdata,
  output vme_cmd_t              bus,
  output logic [N_DEV-1:0]      device,
  input  vme_rsp_t [N_DEV-1:0]  dev_rsp
);

  logic [3:0] devnum;
  assign devnum = addr[15:12];

  assign bus = '{strobe: strobe, write: write, cmd: addr[11:2], data: wdata};

  always_comb begin
    device = '0;
    for (int n = 1; n < N_DEV; n++) device[n] = (32'(devnum) == n);
  end

  logic unmapped_ack;
  always_ff @(posedge clk) begin
    if (rst) unmapped_ack <= 1'b0;
    else     unmapped_ack <= strobe && (devnum == 4'd0 || 32'(devnum) >= N_DEV);
  end

  always_comb begin
    dtack = unmapped_ack;
    rdata = '0;
    for (int n = 1; n < N_DEV; n++) begin
      dtack = dtack | dev_rsp[n].dtack;
      rdata = rdata | (dev_rsp[n].dtack ? dev_rsp[n].data : 16'h0000);
    end
  end

endmodule
