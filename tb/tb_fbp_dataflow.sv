// tb_fbp_dataflow: clock-by-clock check of the contents of every row of the
// filter for the 3-tap, 4-bit-coefficient case.
//
// With F_r(i) = sum_{j=0..r} c_(K-1-r+j) * x_(i-j) (row r's finished result for
// sample i) and p the phase in which sample x_i is being processed, the value
// s + 2*c held by row r must be
//   phase 0:       F_r(i-1)                                  (previous result)
//   phase p >= 1:  x_i * (c_(K-1-r) mod 2^p) + F_(r-1)(i-1)  (p partial products
//                  added to the previous row's result; F_(-1) = 0)
// so row 0 holds x*c_2 built up bit by bit, row 1 adds x*c_1 to row 0's
// result for the previous sample, and the last row ends with y. The test
// reads the rows' registers through the hierarchy and also checks the
// shared shift register output (x, 2x, 4x, 8x) and the coefficient bit of
// each row (c^0..c^3) in every phase.
module tb_fbp_dataflow;
  import fbp_pkg::*;
  localparam int unsigned K = 3, N = 5, M1 = 8, M = 4;
  localparam int unsigned W  = row_width(N, M1, K);
  localparam int unsigned MW = mlen_width(M1);

  logic clk = 1'b0;
  logic rst_n, cfg_load, ck1, y_valid;
  logic [MW-1:0] cfg_m, m_active;
  logic [M1-1:0] cfg_coef [K];
  logic [N-1:0]  x_in;
  logic [W-1:0]  y;

  fbp_fir_top #(.K(K), .N(N), .M1(M1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned c[K];
  int unsigned xs[$];
  logic [W-1:0] rv [K];

  always_comb begin
    rv[0] = dut.g_row[0].u_row.s_q + {dut.g_row[0].u_row.c_q[W-2:0], 1'b0};
    rv[1] = dut.g_row[1].u_row.s_q + {dut.g_row[1].u_row.c_q[W-2:0], 1'b0};
    rv[2] = dut.g_row[2].u_row.s_q + {dut.g_row[2].u_row.c_q[W-2:0], 1'b0};
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned xat(int i);
    return (i >= 0 && i < xs.size()) ? xs[i] : 0;
  endfunction

  function automatic int unsigned fin(int r, int i);
    int unsigned acc = 0;
    if (r < 0) return 0;
    for (int j = 0; j <= r; j++) acc += c[K-1-r+j] * xat(i - j);
    return acc;
  endfunction

  task automatic chk(string what, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 0; cfg_load = 0; cfg_m = MW'(M); x_in = '0;
    for (int j = 0; j < int'(K); j++) begin
      c[j] = $urandom_range(1, 15);
      cfg_coef[j] = M1'(c[j]);
    end
    for (int i = 0; i < 12; i++) xs.push_back($urandom_range(0, 31));
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    cfg_load = 1; x_in = N'(xs[0]);
    for (int i = 0; i < xs.size(); i++) begin
      for (int p = 0; p < int'(M); p++) begin
        @(negedge clk);
        cfg_load = 0;
        x_in = N'(xat(i + 1));
        chk("shift register", int'(dut.u_shreg.x_vec), xs[i] << p);
        for (int r = 0; r < int'(K); r++) begin
          chk($sformatf("row %0d coefficient bit", r), int'(dut.c_bit[r]), (c[K-1-r] >> p) & 1);
          if (p == 0)
            chk($sformatf("row %0d, sample %0d, phase 0", r, i), int'(rv[r]), fin(r, i - 1));
          else
            chk($sformatf("row %0d, sample %0d, phase %0d", r, i, p), int'(rv[r]),
                xs[i] * (c[K-1-r] & ((1 << p) - 1)) + fin(r - 1, i - 1));
        end
        if (p == 0 && i > 0) begin
          chk("y_valid", int'(y_valid), 1);
          chk("y", int'(y), fin(K - 1, i - 1));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
