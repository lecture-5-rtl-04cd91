// odmb_counters: trigger and packet counters read through "R 3YZC".
//
// Counts single-cycle event strobes from the ODMB data path and returns the
// counter selected by the 8-bit code YZ on `data`, combinationally, so that
// the control device can register it with its dtack.  Codes:
//   3F  L1A_COUNTER bits 15:0        3A  L1A_COUNTER bits 23:16
//   3B  L1A_COUNTER bits 15:0        5F  L1As since the last hard reset
//   38  L1A to OTMBDAV gap            39  L1A to ALCTDAV gap
//   71-77 LCTs per DCFEB              78  OTMBDAVs       79  ALCTDAVs
//   21-29 L1A_MATCHes per DCFEB 1-7, OTMB, ALCT
//   41-49 packets received per DCFEB 1-7, OTMB, ALCT
//   4A  packets sent to the DDU       4B  packets sent to the PC
//   51-59 packets shipped to DDU and PC per DCFEB 1-7, OTMB, ALCT
//   61-67 packets received with good CRC per DCFEB
// Other codes read 0.  All counters clear on the hard reset `rst`; all except
// the one at 5F also clear on `resync` (L1A reset).  The L1A counter is 24
// bits wide, the others 16 bits and saturate at their maximum.  A gap is the
// number of clock cycles from the last L1A to the DAV, latched when the DAV
// arrives.
//
// The list of codes is the original device's; the widths, saturation,
// the gap measurement in clock cycles and which counters the resync clears
// are this design's choices.
module odmb_counters
  import odmb_vme_pkg::*;
#(
  parameter int unsigned N_FEB = NFEB,
  parameter int unsigned CW    = 16    // width of the event counters
) (
  input  logic             clk,
  input  logic             rst,          // hard reset
  input  logic             resync,       // L1A reset / RESYNC
  input  logic             l1a,
  input  logic [N_FEB-1:0] lct,
  input  logic             otmbdav,
  input  logic             alctdav,
  input  logic [N_FEB+1:0] l1a_match,    // DCFEB 1-7, OTMB, ALCT
  input  logic [N_FEB+1:0] pkt_rcv,
  input  logic             pkt_ddu,
  input  logic             pkt_pc,
  input  logic [N_FEB+1:0] pkt_shipped,
  input  logic [N_FEB-1:0] good_crc,
  input  logic [7:0]       sel,
  output logic [15:0]      data
);

  localparam int unsigned NSRC = N_FEB + 2;   // DCFEBs + OTMB + ALCT

  logic [23:0]   l1a_cnt;
  logic [CW-1:0] l1a_hard_cnt;
  logic [CW-1:0] gap_run, otmb_gap, alct_gap;
  logic [CW-1:0] lct_cnt   [N_FEB];
  logic [CW-1:0] crc_cnt   [N_FEB];
  logic [CW-1:0] match_cnt [NSRC];
  logic [CW-1:0] rcv_cnt   [NSRC];
  logic [CW-1:0] ship_cnt  [NSRC];
  logic [CW-1:0] otmbdav_cnt, alctdav_cnt, ddu_cnt, pc_cnt;

  function automatic logic [CW-1:0] sat_inc(input logic [CW-1:0] v, input logic ev);
    return (ev && !(&v)) ? v + 1'b1 : v;
  endfunction

  // L1A counter cleared only by the hard reset
  always_ff @(posedge clk) begin
    if (rst) l1a_hard_cnt <= '0;
    else     l1a_hard_cnt <= sat_inc(l1a_hard_cnt, l1a);
  end

  always_ff @(posedge clk) begin
    if (rst || resync) begin
      l1a_cnt     <= '0;
      gap_run     <= '1;
      otmb_gap    <= '0;
      alct_gap    <= '0;
      otmbdav_cnt <= '0;
      alctdav_cnt <= '0;
      ddu_cnt     <= '0;
      pc_cnt      <= '0;
      for (int i = 0; i < N_FEB; i++) begin
        lct_cnt[i] <= '0;
        crc_cnt[i] <= '0;
      end
      for (int i = 0; i < NSRC; i++) begin
        match_cnt[i] <= '0;
        rcv_cnt[i]   <= '0;
        ship_cnt[i]  <= '0;
      end
    end else begin
      if (l1a) l1a_cnt <= l1a_cnt + 24'd1;
      gap_run     <= l1a ? '0 : sat_inc(gap_run, 1'b1);
      if (otmbdav) otmb_gap <= sat_inc(gap_run, 1'b1);
      if (alctdav) alct_gap <= sat_inc(gap_run, 1'b1);
      otmbdav_cnt <= sat_inc(otmbdav_cnt, otmbdav);
      alctdav_cnt <= sat_inc(alctdav_cnt, alctdav);
      ddu_cnt     <= sat_inc(ddu_cnt, pkt_ddu);
      pc_cnt      <= sat_inc(pc_cnt, pkt_pc);
      for (int i = 0; i < N_FEB; i++) begin
        lct_cnt[i] <= sat_inc(lct_cnt[i], lct[i]);
        crc_cnt[i] <= sat_inc(crc_cnt[i], good_crc[i]);
      end
      for (int i = 0; i < NSRC; i++) begin
        match_cnt[i] <= sat_inc(match_cnt[i], l1a_match[i]);
        rcv_cnt[i]   <= sat_inc(rcv_cnt[i], pkt_rcv[i]);
        ship_cnt[i]  <= sat_inc(ship_cnt[i], pkt_shipped[i]);
      end
    end
  end

  // Read multiplexer, indexed by the two hex digits Y and Z
  logic [3:0] y, z;
  assign y = sel[7:4];
  assign z = sel[3:0];

  always_comb begin
    data = 16'h0000;
    unique case (y)
      4'h2: if (z >= 4'd1 && 32'(z) <= NSRC) data = 16'(match_cnt[z - 4'd1]);
      4'h3: unique case (z)
              4'h8: data = 16'(otmb_gap);
              4'h9: data = 16'(alct_gap);
              4'hA: data = {8'h00, l1a_cnt[23:16]};
              4'hB: data = l1a_cnt[15:0];
              4'hF: data = l1a_cnt[15:0];
              default: ;
            endcase
      4'h4: if (z >= 4'd1 && 32'(z) <= NSRC) data = 16'(rcv_cnt[z - 4'd1]);
            else if (z == 4'hA)           data = 16'(ddu_cnt);
            else if (z == 4'hB)           data = 16'(pc_cnt);
      4'h5: if (z >= 4'd1 && 32'(z) <= NSRC) data = 16'(ship_cnt[z - 4'd1]);
            else if (z == 4'hF)           data = 16'(l1a_hard_cnt);
      4'h6: if (z >= 4'd1 && 32'(z) <= N_FEB) data = 16'(crc_cnt[3'(z - 4'd1)]);
      4'h7: if (z >= 4'd1 && 32'(z) <= N_FEB) data = 16'(lct_cnt[3'(z - 4'd1)]);
            else if (z == 4'd8)             data = 16'(otmbdav_cnt);
            else if (z == 4'd9)             data = 16'(alctdav_cnt);
      default: ;
    endcase
  end

endmodule
