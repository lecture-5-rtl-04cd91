// tmr_reg: triple-voted register with scrubbing.
//
// Three copies of a W-bit register hold the same value; the output is their
// bit-wise majority, so one corrupted copy (a radiation upset) is outvoted.
// Each copy reloads, on every clock cycle without a write, the voted value,
// so an upset copy is repaired one cycle later.  A write (we) loads d into
// all three copies; reset loads INIT.  The output is combinational from the
// three copies.  Triplication, voting and the reload of the voted value
// follow the original configuration registers; the reset is synchronous here.
module tmr_reg #(
  parameter int unsigned W    = 16,
  parameter logic [W-1:0] INIT = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] copy_a, copy_b, copy_c;
  logic [W-1:0] next;

  assign q    = (copy_a & copy_b) | (copy_b & copy_c) | (copy_c & copy_a);
  assign next = rst ? INIT : (we ? d : q);

  always_ff @(posedge clk) copy_a <= next;
  always_ff @(posedge clk) copy_b <= next;
  always_ff @(posedge clk) copy_c <= next;

endmodule
