// tb_fbp_input_shreg: self-checking test of the shared input shift register.
// Samples are loaded at random intervals; between loads the output must be the
// last sample shifted left by the number of clocks since its load, truncated to
// the register width n + m1 - 1.
module tb_fbp_input_shreg;
  localparam int unsigned N = 5, M1 = 8, W = 15, XW = N + M1 - 1;
  logic clk = 1'b0;
  logic rst_n, load;
  logic [N-1:0] x_in;
  logic [W-1:0] x_vec;
  logic [W-1:0] expv;
  int unsigned last_x, shifts;
  int checks = 0, failures = 0;

  fbp_input_shreg #(.N(N), .M1(M1), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; load = 0; x_in = '0; last_x = 0; shifts = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      expv = W'((64'(last_x) << shifts) & ((64'd1 << XW) - 1));
      checks++;
      if (x_vec !== expv) begin
        failures++;
        $display("cycle %0d: x_vec %h expected %h", i, x_vec, expv);
      end
      load = ($urandom_range(0, 9) == 0);
      x_in = N'($urandom);
      if (load) begin last_x = x_in; shifts = 0; end
      else if (shifts < 40) shifts++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
