// fbp_vma: vector merging adder attached to the last row of the array.
//
// The rows keep their accumulated products in carry-save form, a sum vector
// and a carry vector whose bit b has weight 2^(b+1). The vector merging adder
// adds the two into one binary word, y = s + 2*c modulo 2^W. It is
// combinational, so the output word is available in the same clock in which
// the last row holds the finished carry-save result.
module fbp_vma #(
  parameter int unsigned W = 15
) (
  input  logic [W-1:0] s_in,
  input  logic [W-1:0] c_in,
  output logic [W-1:0] y
);

  always_comb y = s_in + {c_in[W-2:0], 1'b0};

endmodule
