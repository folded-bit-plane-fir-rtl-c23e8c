// tb_fbp_vma: self-checking test of the vector merging adder: random and
// corner sum/carry vectors, result compared with s + 2*c modulo 2^W.
module tb_fbp_vma;
  localparam int unsigned W = 15;
  logic [W-1:0] s_in, c_in, y;
  int checks = 0, failures = 0;

  fbp_vma #(.W(W)) dut (.*);

  initial begin
    for (int i = 0; i < 5000; i++) begin
      s_in = W'($urandom); c_in = W'($urandom);
      if (i == 0) begin s_in = '1; c_in = '1; end
      if (i == 1) begin s_in = '0; c_in = '0; end
      #1;
      checks++;
      if (y !== W'((32'(s_in) + 2 * 32'(c_in)) % (32'd1 << W))) begin
        failures++;
        $display("s=%h c=%h y=%h", s_in, c_in, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
