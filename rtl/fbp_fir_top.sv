// fbp_fir_top: folded bit-plane FIR filter with changeable folding factor.
//
// Computes y_i = c_0*x_i + c_1*x_(i-1) + ... + c_(K-1)*x_(i-K+1) for unsigned
// n-bit samples and unsigned m-bit coefficients, where the coefficient length
// m can be set to any value 1..M1 at run time.
//
// Structure: K rows (taps) of W = M1 + N + ceil(log2 K) basic cells. Row r is
// one folding set and multiplies by coefficient c_(K-1-r): row 0 uses the
// highest-index coefficient and the last row uses c_0, so the last row's
// result is the finished output word. All rows work at once, bit-serially over
// the coefficient bits, on the same sample from one shared input shift
// register. Every row has its own coefficient rotate register. In phase 0 of
// each sample period every row starts from the previous row's completed
// result (zeros for row 0); in the other phases it accumulates into itself.
// A vector merging adder turns the last row's carry-save result into y.
//
// Timing: one sample is taken every m clocks (ck1 high marks the clock at
// whose end x_in is taken). A sample taken at the end of clock t is processed
// in clocks t+1..t+m and its output word appears on y with y_valid in clock
// t+m+1, the same clock in which the next sample starts: latency m clocks,
// throughput one word per m clocks. Setting a shorter m raises the throughput
// by M1/m.
//
// Configuration: cfg_load for one clock loads the coefficients, the length m,
// clears the rows and takes x_in as the first sample of the new run. Signed
// numbers, the configuration handshake and the reset behaviour are not part of
// the architecture as described and are this design's choices; K = 3 and N = 5
// follow the reference block diagram, M1 = 8 is chosen here.
module fbp_fir_top
  import fbp_pkg::*;
#(
  parameter int unsigned K  = DEF_K,
  parameter int unsigned N  = DEF_N,
  parameter int unsigned M1 = DEF_M1,
  parameter int unsigned W  = row_width(N, M1, K),
  parameter int unsigned MW = mlen_width(M1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_load,        // load coefficients and length
  input  logic [MW-1:0] cfg_m,           // coefficient length 1..M1
  input  logic [M1-1:0] cfg_coef [K],    // cfg_coef[i] = c_i
  input  logic [N-1:0]  x_in,            // input sample
  output logic          ck1,             // x_in is taken at the end of this clock
  output logic [W-1:0]  y,               // output word
  output logic          y_valid,         // y holds a new output word
  output logic [MW-1:0] m_active         // coefficient length in use
);


  logic          sel_prev, clr;
  logic [W-1:0]  x_vec;
  logic [K-1:0]  c_bit;
  logic [W-1:0]  row_s [K+1];   // row_s[0] / row_c[0]: zeros into row 0
  logic [W-1:0]  row_c [K+1];

  fbp_ctrl #(.M1(M1), .MW(MW)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_load (cfg_load),
    .cfg_m    (cfg_m),
    .m        (m_active),
    .ph       (),
    .ck1      (ck1),
    .sel_prev (sel_prev),
    .y_valid  (y_valid),
    .clr      (clr)
  );

  fbp_input_shreg #(.N(N), .M1(M1), .W(W)) u_shreg (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (ck1),
    .x_in  (x_in),
    .x_vec (x_vec)
  );

  assign row_s[0] = '0;
  assign row_c[0] = '0;

  for (genvar r = 0; r < K; r++) begin : g_row
    fbp_coef_rotator #(.M1(M1), .MW(MW)) u_coef (
      .clk     (clk),
      .rst_n   (rst_n),
      .load    (cfg_load),
      .coef_in (cfg_coef[K-1-r]),
      .m       (m_active),
      .c_bit   (c_bit[r])
    );

    fbp_cell_row #(.W(W)) u_row (
      .clk      (clk),
      .rst_n    (rst_n),
      .clr      (clr),
      .x_vec    (x_vec),
      .c_bit    (c_bit[r]),
      .sel_prev (sel_prev),
      .prev_s   (row_s[r]),
      .prev_c   (row_c[r]),
      .s_q      (row_s[r+1]),
      .c_q      (row_c[r+1])
    );
  end

  fbp_vma #(.W(W)) u_vma (
    .s_in (row_s[K]),
    .c_in (row_c[K]),
    .y    (y)
  );

  // The row width must hold the largest possible output word.
  initial begin
    assert (W >= M1 + N + ((K > 1) ? $clog2(K) : 0))
      else $error("row width W too small for K, N, M1");
    assert (W >= N + M1 - 1) else $error("row width W below shift register width");
  end

  // A loaded coefficient length must lie in 1..M1.
  a_cfg_m_range: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_load |-> (cfg_m >= MW'(1) && cfg_m <= MW'(M1)));

endmodule
