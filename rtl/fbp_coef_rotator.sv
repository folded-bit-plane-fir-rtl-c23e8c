// fbp_coef_rotator: shift/rotate register that supplies one row with its
// coefficient bits.
//
// The register holds one coefficient of up to m1 bits. Its least significant
// bit drives the row. On every clock without load it rotates the low m bits by
// one place towards bit 0 (bit 0 moves to bit m-1), so the row sees c^0,
// c^1, ..., c^(m-1) and then c^0 again: the m-bit cyclic repetition that lets
// the same row serve any coefficient length 1 <= m <= m1. Bits at and above m
// hold their value and are never presented. load writes a new coefficient;
// bit c^0 is presented in the clock after the load.
module fbp_coef_rotator #(
  parameter int unsigned M1 = 8,                  // maximum coefficient length
  parameter int unsigned MW = $clog2(M1 + 1)      // width of m
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [M1-1:0] coef_in,
  input  logic [MW-1:0] m,       // active coefficient length, 1..M1
  output logic          c_bit    // coefficient bit for the current phase
);

  logic [M1-1:0] cr, cr_rot;

  always_comb begin
    cr_rot = cr;
    for (int i = 0; i < int'(M1); i++) begin
      if (i == int'(m) - 1)    cr_rot[i] = cr[0];
      else if (i < int'(m) - 1) cr_rot[i] = cr[i+1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cr <= '0;
    else if (load) cr <= coef_in;
    else           cr <= cr_rot;
  end

  assign c_bit = cr[0];

endmodule
