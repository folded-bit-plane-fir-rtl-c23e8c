// fbp_cell_row: one bit-serial tap of the folded filter, a row of W basic
// cells.
//
// A row carries out one folding set: it multiplies the current input sample by
// one coefficient, one coefficient bit per clock, least significant bit first.
// In phase j of a sample period the input shift register presents 2^j * x and
// the coefficient register presents bit c^j, so the row adds the partial
// product c^j * 2^j * x to its carry-save accumulator. In the first phase of a
// period (sel_prev = 1) the row does not add to its own contents but to the
// completed result of the previous row, which is how the taps are chained:
// after m clocks the row holds x_i * c + (previous row's result for x_{i-1}).
//
// The accumulator is kept in carry-save form: value = s_q + 2 * c_q. The carry
// out of the top cell is dropped, so the row computes modulo 2^W; W is chosen
// large enough that no true result reaches 2^W. Timing: one partial product
// per clock, registered in the cells.
module fbp_cell_row #(
  parameter int unsigned W = 15  // cells per row (m1 + n + ceil(log2 k))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,       // synchronous clear of the row
  input  logic [W-1:0] x_vec,     // shifted input sample 2^j * x
  input  logic         c_bit,     // coefficient bit c^j
  input  logic         sel_prev,  // first phase: start from previous row
  input  logic [W-1:0] prev_s,    // previous row's sum vector (0 for row 0)
  input  logic [W-1:0] prev_c,    // previous row's carry vector (0 for row 0)
  output logic [W-1:0] s_q,       // this row's sum vector
  output logic [W-1:0] c_q        // this row's carry vector (weight 2^(b+1))
);

  // Carry entering each cell from one weight below; zero into the LSB cell.
  logic [W-1:0] own_cin, prev_cin;

  always_comb begin
    own_cin  = {c_q[W-2:0], 1'b0};
    prev_cin = {prev_c[W-2:0], 1'b0};
  end

  for (genvar b = 0; b < W; b++) begin : g_cell
    fbp_basic_cell u_cell (
      .clk       (clk),
      .rst_n     (rst_n),
      .clr       (clr),
      .x_bit     (x_vec[b]),
      .c_bit     (c_bit),
      .sel_prev  (sel_prev),
      .prev_s_in (prev_s[b]),
      .prev_c_in (prev_cin[b]),
      .own_c_in  (own_cin[b]),
      .s_q       (s_q[b]),
      .c_q       (c_q[b])
    );
  end

endmodule
