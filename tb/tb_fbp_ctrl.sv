// tb_fbp_ctrl: self-checking test of the phase controller. After each load of
// a coefficient length m (including out-of-range values, which must act as
// M1) the test counts clocks and checks that ck1 comes every m clocks, that
// sel_prev is high exactly in the clock after each ck1 (phase 0), that the
// phase output counts 0..m-1, that clr follows cfg_load and that y_valid first
// appears m+1 clocks after the load and then every m clocks.
module tb_fbp_ctrl;
  localparam int unsigned M1 = 8, MW = 4;
  logic clk = 1'b0;
  logic rst_n, cfg_load, ck1, sel_prev, y_valid, clr;
  logic [MW-1:0] cfg_m, m, ph;
  int checks = 0, failures = 0;

  fbp_ctrl #(.M1(M1), .MW(MW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int unsigned mreq, meff, ncyc;
    rst_n = 0; cfg_load = 0; cfg_m = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // after reset: m = M1, first clock takes a sample
    expect_eq("reset m", int'(m), M1);
    expect_eq("reset ck1", int'(ck1), 1);
    for (int t = 0; t < 200; t++) begin
      mreq = (t % 10 == 9) ? ((t % 20 == 9) ? 0 : M1 + 1 + $urandom_range(0, 5))
                           : $urandom_range(1, M1);
      meff = (mreq == 0 || mreq > M1) ? M1 : mreq;
      @(negedge clk);
      cfg_m = MW'(mreq); cfg_load = 1;
      #1;
      expect_eq("ck1 with load", int'(ck1), 1);
      expect_eq("clr with load", int'(clr), 1);
      @(negedge clk);
      cfg_load = 0;
      #1;
      expect_eq("m", int'(m), meff);
      ncyc = 4 * meff + 1 + $urandom_range(0, 3);
      for (int c = 1; c <= int'(ncyc); c++) begin
        // clock c after the load: phase (c-1) mod m
        expect_eq("phase", int'(ph), (c - 1) % meff);
        expect_eq("ck1", int'(ck1), ((c % meff) == 0) ? 1 : 0);
        expect_eq("sel_prev", int'(sel_prev), (((c - 1) % meff) == 0) ? 1 : 0);
        expect_eq("y_valid", int'(y_valid),
                  (c >= int'(meff) + 1 && ((c - 1) % meff) == 0) ? 1 : 0);
        expect_eq("clr", int'(clr), 0);
        if (c != int'(ncyc)) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
