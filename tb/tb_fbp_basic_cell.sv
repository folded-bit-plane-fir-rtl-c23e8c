// tb_fbp_basic_cell: self-checking test of one basic cell. Random inputs are
// applied for many clocks; a reference model of the AND gate, the L/R
// multiplexers and the full adder predicts the registered sum and carry, and
// the synchronous clear is exercised. Every input combination is covered with
// high probability by the random stream; the count of distinct combinations
// seen is checked too.
module tb_fbp_basic_cell;
  logic clk = 1'b0;
  logic rst_n, clr, x_bit, c_bit, sel_prev, prev_s_in, prev_c_in, own_c_in;
  logic s_q, c_q;
  int   checks = 0, failures = 0;
  logic exp_s, exp_c;
  logic [127:0] seen;

  fbp_basic_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic pp, ss, cc;
    seen = '0;
    rst_n = 1'b0; clr = 0; x_bit = 0; c_bit = 0; sel_prev = 0;
    prev_s_in = 0; prev_c_in = 0; own_c_in = 0;
    exp_s = 0; exp_c = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (s_q !== exp_s || c_q !== exp_c) begin
        failures++;
        $display("cycle %0d: s/c = %b%b, expected %b%b", i, s_q, c_q, exp_s, exp_c);
      end
      {x_bit, c_bit, sel_prev, prev_s_in, prev_c_in, own_c_in} = 6'($urandom);
      clr = ($urandom_range(0, 31) == 0);
      seen[{s_q, x_bit, c_bit, sel_prev, prev_s_in, prev_c_in, own_c_in}] = 1'b1;
      pp = x_bit & c_bit;
      ss = sel_prev ? prev_s_in : exp_s;
      cc = sel_prev ? prev_c_in : own_c_in;
      if (clr) begin
        exp_s = 0; exp_c = 0;
      end else begin
        {exp_c, exp_s} = 2'(pp) + 2'(ss) + 2'(cc);
      end
    end
    checks++;
    if ($countones(seen) != 128) begin
      // all 7-bit combinations (own sum state and six inputs) must occur
      failures++;
      $display("only %0d of 128 input combinations seen", $countones(seen));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
