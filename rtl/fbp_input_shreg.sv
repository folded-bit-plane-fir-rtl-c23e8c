// fbp_input_shreg: the input shift register shared by all taps.
//
// A new n-bit sample is loaded when load is high; on every other clock the
// register shifts left by one place, so during phase j of a sample period it
// holds 2^j * x. This one register serves as the shift sections of all k taps:
// its output is broadcast to every row of the array. The register is
// n + m1 - 1 bits wide, enough for m1 - 1 shifts of an n-bit sample without
// losing bits; its output is zero-extended to the row width W. Reset clears
// it (this design's choice).
module fbp_input_shreg #(
  parameter int unsigned N  = 5,   // sample width
  parameter int unsigned M1 = 8,   // maximum coefficient length
  parameter int unsigned W  = 15   // row width (output width), >= N + M1 - 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,   // take x_in this clock
  input  logic [N-1:0] x_in,
  output logic [W-1:0] x_vec   // 2^j * x, broadcast to the rows
);

  localparam int unsigned XW = N + M1 - 1;

  logic [XW-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sr <= '0;
    else if (load) sr <= XW'(x_in);
    else           sr <= {sr[XW-2:0], 1'b0};
  end

  assign x_vec = W'(sr);

endmodule
