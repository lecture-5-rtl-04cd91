// jtag_engine: JTAG sequencer shared by the DCFEB and ODMB JTAG devices.
//
// One operation is a TMS header, a shift of 1 to 16 bits and a TMS tailer,
// clocked out at half the rate of the slow clock: every `tick` (one-cycle
// enable at the slow-clock rate) toggles the internal ENABLE phase, and TCK is
// high during the second half of each bit.  TMS and TDI change together with
// the falling edge of TCK and are stable at its rising edge; TDO is sampled
// at the rising edge and shifted into tdo_reg from the top, so after a
// 16-bit shift tdo_reg holds the shifted-out bits with the first one in bit 0.
// TDI sends tdi_word least significant bit first.
//
// Sequences (TMS, first bit first):
//   data header          0 0 1 0 0   Run-Test/Idle -> Shift-DR (as in the
//                                    original design, 5 bits)
//   instruction header   0 0 1 1 0 0 Run-Test/Idle -> Shift-IR
//   shift                0 ... 0 x   x = 1 on the last bit when a tailer follows
//   tailer               1 0         Exit1 -> Update -> Run-Test/Idle
//   tailer to Select-DR  1 1         Exit1 -> Update -> Select-DR-Scan
//   JTAG reset           1 1 1 1 1 0 any state -> Test-Logic-Reset -> Run-Test/Idle
// After an instruction shift ending in Select-DR-Scan the engine remembers
// that state (at_seldr) and shortens the next header: a data header becomes
// 0 0 and an instruction header 1 0 0.  The data header, the tailer and the
// "last bit carries TMS=1" rule follow the original design; the instruction
// header, the reset sequence and the shortened headers are this design's
// reading of the JTAG state diagram.
//
// Interface: start (one cycle, ignored while busy) with op, header, tail,
// nbits_m1 (bits to shift minus 1) and tdi_word.  done pulses for one cycle
// when the last TMS bit has been sent.  Timing: a shift of N bits with header
// H bits and tailer T bits takes 2*(H+N+T) ticks from start to done.
module jtag_engine
  import odmb_vme_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        tick,       // slow-clock enable
  input  logic        start,
  input  jtag_op_e    op,
  input  logic        header,
  input  jtag_tail_e  tail,
  input  logic [3:0]  nbits_m1,
  input  logic [15:0] tdi_word,
  input  logic        tdo,
  output logic        tck,
  output logic        tms,
  output logic        tdi,
  output logic        busy,
  output logic        done,
  output logic [15:0] tdo_reg,
  output logic        at_seldr
);

  typedef enum logic [1:0] {S_IDLE, S_HEAD, S_SHIFT, S_TAIL} state_e;

  state_e     state;
  logic [2:0] idx;        // bit index inside header or tailer
  logic [3:0] sidx;       // bit index inside the shift
  logic [2:0] hlen;       // header length
  logic [5:0] hpat;       // header TMS pattern, bit 0 first
  logic [1:0] tpat;       // tailer TMS pattern, bit 0 first
  logic [3:0] nlast;      // last shift index
  logic [15:0] dreg;      // latched TDI word
  jtag_op_e   op_q;
  jtag_tail_e tail_q;
  logic       phase;      // 0: TCK low, 1: TCK high

  // Header for the requested operation, from the present TAP state.
  logic [5:0] hpat_d;
  logic [2:0] hlen_d;
  always_comb begin
    hpat_d = '0;
    hlen_d = '0;
    unique case (op)
      JOP_RESET: begin hpat_d = 6'b011111; hlen_d = 3'd6; end
      JOP_DATA:  if (header) begin
                   if (at_seldr) begin hpat_d = 6'b000000; hlen_d = 3'd2; end
                   else          begin hpat_d = 6'b000100; hlen_d = 3'd5; end
                 end
      JOP_INST:  if (header) begin
                   if (at_seldr) begin hpat_d = 6'b000001; hlen_d = 3'd3; end
                   else          begin hpat_d = 6'b001100; hlen_d = 3'd6; end
                 end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      state    <= S_IDLE;
      idx      <= '0;
      sidx     <= '0;
      hlen     <= '0;
      hpat     <= '0;
      tpat     <= '0;
      nlast    <= '0;
      dreg     <= '0;
      op_q     <= JOP_DATA;
      tail_q   <= JTAIL_NONE;
      phase    <= 1'b0;
      tck      <= 1'b0;
      tdo_reg  <= '0;
      at_seldr <= 1'b0;
    end else if (state == S_IDLE) begin
      phase <= 1'b0;
      tck   <= 1'b0;
      if (start) begin
        op_q   <= op;
        tail_q <= (op == JOP_RESET) ? JTAIL_NONE : tail;
        hlen   <= hlen_d;
        hpat   <= hpat_d;
        tpat   <= (tail == JTAIL_SELDR) ? 2'b11 : 2'b01;
        nlast  <= nbits_m1;
        dreg   <= tdi_word;
        idx    <= '0;
        sidx   <= '0;
        state  <= (hlen_d != 0) ? S_HEAD : S_SHIFT;
      end
    end else if (tick) begin
      if (!phase) begin
        // rising edge of TCK: the target samples TMS/TDI, we sample TDO
        phase <= 1'b1;
        tck   <= 1'b1;
        if (state == S_SHIFT) tdo_reg <= {tdo, tdo_reg[15:1]};
      end else begin
        // falling edge of TCK: move to the next bit
        phase <= 1'b0;
        tck   <= 1'b0;
        unique case (state)
          S_HEAD:
            if (idx == hlen - 3'd1) begin
              idx <= '0;
              if (op_q == JOP_RESET) begin
                state    <= S_IDLE;
                done     <= 1'b1;
                at_seldr <= 1'b0;
              end else begin
                state <= S_SHIFT;
              end
            end else begin
              idx <= idx + 3'd1;
            end
          S_SHIFT:
            if (sidx == nlast) begin
              if (tail_q != JTAIL_NONE) begin
                state <= S_TAIL;
                idx   <= '0;
              end else begin
                state    <= S_IDLE;
                done     <= 1'b1;
                at_seldr <= 1'b0;
              end
            end else begin
              sidx <= sidx + 4'd1;
            end
          S_TAIL:
            if (idx == 3'd1) begin
              state    <= S_IDLE;
              done     <= 1'b1;
              at_seldr <= (op_q == JOP_INST) && (tail_q == JTAIL_SELDR);
            end else begin
              idx <= idx + 3'd1;
            end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // TMS and TDI follow the registered state, so they change together with
  // the falling edge of TCK.
  always_comb begin
    tms = 1'b0;
    tdi = 1'b0;
    unique case (state)
      S_HEAD:  tms = hpat[idx];
      S_SHIFT: begin
                 tms = (sidx == nlast) && (tail_q != JTAIL_NONE);
                 tdi = dreg[sidx];
               end
      S_TAIL:  tms = tpat[idx[0]];
      default: ;
    endcase
  end

  // A new operation is only started from idle.
  assert property (@(posedge clk) disable iff (rst) start |-> !busy)
    else $error("jtag_engine: start while busy");

endmodule
