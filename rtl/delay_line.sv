// delay_line: a W-bit signal delayed by a programmable number of clock
// cycles, 0 to DEPTH.  An input at clock edge t appears at the output at edge
// t+dly; dly = 0 passes the input straight through, and a dly above DEPTH is
// taken as DEPTH.  Built as a DEPTH-stage shift register with a tap chosen by
// dly.
module delay_line #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 63
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [7:0]   dly,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  sr [DEPTH];
  logic [AW-1:0] tap;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < DEPTH; k++) sr[k] <= '0;
    end else begin
      sr[0] <= din;
      for (int k = 1; k < DEPTH; k++) sr[k] <= sr[k-1];
    end
  end

  always_comb begin
    tap = (32'(dly) >= DEPTH) ? AW'(DEPTH - 1) : AW'(dly - 8'd1);
    dout = (dly == 8'd0) ? din : sr[tap];
  end

  initial assert (DEPTH >= 1 && DEPTH <= 255) else $error("delay_line: DEPTH out of range");

endmodule
