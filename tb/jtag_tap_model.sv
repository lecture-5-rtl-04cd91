// jtag_tap_model: behavioural model of an FPGA's JTAG test access port, for
// testbenches only (the DCFEB and ODMB FPGAs are not part of this design).
//
// The 16-state TAP controller of IEEE 1149.1 with an IRLEN-bit instruction
// register and three data registers: USERCODE (32 bits, selected by
// USERCODE_OP), a 16-bit user register (selected by USER1_OP) that captures
// its held value and loads the shifted value on Update-DR, and BYPASS for any
// other instruction.  TMS and TDI are sampled on the rising edge of TCK; TDO
// changes on the falling edge and is 0 outside the shift states.  The model
// counts TCK rising edges so that a testbench can check that a JTAG port
// without TCK is left alone.
module jtag_tap_model #(
  parameter int unsigned IRLEN       = 10,
  parameter logic [IRLEN-1:0] USERCODE_OP = 10'h3C8,
  parameter logic [IRLEN-1:0] USER1_OP    = 10'h3C2,
  parameter logic [31:0] USERCODE    = 32'hDBDB_0001
) (
  input  logic tck,
  input  logic tms,
  input  logic tdi,
  output logic tdo
);

  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PAU_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PAU_IR, EX2_IR, UPD_IR
  } tap_state_e;

  tap_state_e       state = TLR;
  logic [IRLEN-1:0] ir    = USERCODE_OP;
  logic [IRLEN-1:0] ir_sh = '0;
  logic [31:0]      dr_sh = '0;
  logic [15:0]      user_reg = 16'h1234;
  int unsigned      tck_edges = 0;
  initial tdo = 1'b0;

  function automatic tap_state_e next_state(tap_state_e s, logic m);
    unique case (s)
      TLR:    return m ? TLR    : RTI;
      RTI:    return m ? SEL_DR : RTI;
      SEL_DR: return m ? SEL_IR : CAP_DR;
      CAP_DR: return m ? EX1_DR : SH_DR;
      SH_DR:  return m ? EX1_DR : SH_DR;
      EX1_DR: return m ? UPD_DR : PAU_DR;
      PAU_DR: return m ? EX2_DR : PAU_DR;
      EX2_DR: return m ? UPD_DR : SH_DR;
      UPD_DR: return m ? SEL_DR : RTI;
      SEL_IR: return m ? TLR    : CAP_IR;
      CAP_IR: return m ? EX1_IR : SH_IR;
      SH_IR:  return m ? EX1_IR : SH_IR;
      EX1_IR: return m ? UPD_IR : PAU_IR;
      PAU_IR: return m ? EX2_IR : PAU_IR;
      EX2_IR: return m ? UPD_IR : SH_IR;
      UPD_IR: return m ? SEL_DR : RTI;
      default: return TLR;
    endcase
  endfunction

  function automatic int unsigned dr_len();
    if (ir == USERCODE_OP) return 32;
    if (ir == USER1_OP)    return 16;
    return 1;
  endfunction

  always @(posedge tck) begin
    tck_edges <= tck_edges + 1;
    unique case (state)
      TLR:    ir <= USERCODE_OP;
      CAP_IR: ir_sh <= IRLEN'(1);
      SH_IR:  ir_sh <= {tdi, ir_sh[IRLEN-1:1]};
      UPD_IR: ir <= ir_sh;
      CAP_DR: dr_sh <= (ir == USERCODE_OP) ? USERCODE :
                       (ir == USER1_OP)    ? 32'(user_reg) : 32'h0;
      SH_DR:  dr_sh <= (dr_sh >> 1) | (32'(tdi) << (dr_len() - 1));
      UPD_DR: if (ir == USER1_OP) user_reg <= dr_sh[15:0];
      default: ;
    endcase
    state <= next_state(state, tms);
  end

  always @(negedge tck) begin
    unique case (state)
      SH_DR:   tdo <= dr_sh[0];
      SH_IR:   tdo <= ir_sh[0];
      default: tdo <= 1'b0;
    endcase
  end

endmodule
