// tb_fbp_coef_rotator: self-checking test of the coefficient rotate register.
// A random coefficient and length m are loaded; for many clocks afterwards the
// presented bit must be c^(j mod m), j counting clocks since the load.
module tb_fbp_coef_rotator;
  localparam int unsigned M1 = 8, MW = 4;
  logic clk = 1'b0;
  logic rst_n, load, c_bit;
  logic [M1-1:0] coef_in, cur;
  logic [MW-1:0] m;
  int unsigned j, mm;
  int checks = 0, failures = 0;

  fbp_coef_rotator #(.M1(M1), .MW(MW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; load = 0; coef_in = '0; m = MW'(M1);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      cur = M1'($urandom); mm = $urandom_range(1, M1);
      coef_in = cur; m = MW'(mm); load = 1;
      @(negedge clk);
      load = 0; coef_in = M1'($urandom);
      j = 0;
      repeat (3 * mm + 2) begin
        checks++;
        if (c_bit !== cur[j % mm]) begin
          failures++;
          $display("m=%0d coef=%b step %0d: bit %b expected %b", mm, cur, j, c_bit, cur[j % mm]);
        end
        @(negedge clk);
        j++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
