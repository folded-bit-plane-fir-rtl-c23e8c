// fbp_basic_cell: one basic cell of the folded bit-plane array.
//
// The cell forms a one-bit partial product (AND of an input-data bit and a
// coefficient bit) and adds it with a full adder to a sum bit and a carry bit.
// Two multiplexers, L for the sum and R for the carry, choose where those two
// bits come from: either the cell's own registered outputs (the internal
// folded path, used while a row keeps accumulating one product) or the outputs
// of the corresponding cells of the previous row (used in the first cycle of a
// new sample; zeros for the first row). The full adder's sum and carry are
// registered in the cell, so every cell is one pipeline stage.
//
// Interface: own_c_in / prev_c_in are carries coming from the cell one weight
// below (own row or previous row). s_q is this cell's sum bit, c_q its carry
// bit, which has twice the weight of s_q and goes to the cell one weight above.
// Timing: s_q / c_q change one clock after the inputs are applied. clr is a
// synchronous clear; rst_n an asynchronous active-low reset (both this
// design's choice; the cell structure and the L/R multiplexers follow the
// architecture description).
module fbp_basic_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,        // synchronous clear of both flip-flops
  input  logic x_bit,      // input-data bit for this weight
  input  logic c_bit,      // coefficient bit broadcast to the row
  input  logic sel_prev,   // 1: take sum/carry from the previous row
  input  logic prev_s_in,  // sum bit of the previous row, same weight
  input  logic prev_c_in,  // carry bit of the previous row, one weight below
  input  logic own_c_in,   // carry bit of this row, one weight below
  output logic s_q,        // registered sum bit
  output logic c_q         // registered carry bit (weight of the next cell)
);

  logic pp;      // partial product
  logic s_sel;   // L multiplexer output
  logic c_sel;   // R multiplexer output
  logic fa_s, fa_c;

  always_comb begin
    pp    = x_bit & c_bit;
    s_sel = sel_prev ? prev_s_in : s_q;
    c_sel = sel_prev ? prev_c_in : own_c_in;
    fa_s  = pp ^ s_sel ^ c_sel;
    fa_c  = (pp & s_sel) | (pp & c_sel) | (s_sel & c_sel);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= 1'b0;
      c_q <= 1'b0;
    end else if (clr) begin
      s_q <= 1'b0;
      c_q <= 1'b0;
    end else begin
      s_q <= fa_s;
      c_q <= fa_c;
    end
  end

endmodule
