// tb_fbp_cell_row: self-checking test of one row of basic cells. Random
// shifted samples, coefficient bits, previous-row carry-save vectors, phase-0
// selects and clears are applied; a reference model keeps the row's value as a
// plain integer modulo 2^W and compares it with s_q + 2*c_q every clock.
// A second part runs whole m-clock multiplications and checks the product.
module tb_fbp_cell_row;
  localparam int unsigned W = 15;
  logic clk = 1'b0;
  logic rst_n, clr, c_bit, sel_prev;
  logic [W-1:0] x_vec, prev_s, prev_c, s_q, c_q;
  logic [W-1:0] model, got;
  int checks = 0, failures = 0;

  fbp_cell_row #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    got = s_q + {c_q[W-2:0], 1'b0};
    checks++;
    if (got !== model) begin
      failures++;
      $display("%s: row value %0d, expected %0d", what, got, model);
    end
  endtask

  initial begin
    rst_n = 0; clr = 0; c_bit = 0; sel_prev = 0; x_vec = '0; prev_s = '0; prev_c = '0;
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // random stimulus
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check("random");
      x_vec = W'($urandom); c_bit = 1'($urandom); sel_prev = ($urandom_range(0, 3) == 0);
      prev_s = W'($urandom); prev_c = W'($urandom); clr = ($urandom_range(0, 63) == 0);
      if (clr) model = '0;
      else model = (sel_prev ? prev_s + {prev_c[W-2:0], 1'b0} : model)
                   + (c_bit ? x_vec : '0);
    end
    // whole multiplications: a 5-bit x by an m-bit c over m clocks, plus a start value
    for (int t = 0; t < 200; t++) begin
      int unsigned m, x, c, start;
      m = $urandom_range(1, 8); x = $urandom_range(0, 31); c = $urandom_range(0, (1 << m) - 1);
      start = $urandom_range(0, 2000);
      for (int j = 0; j < int'(m); j++) begin
        @(negedge clk);
        clr = 0;
        sel_prev = (j == 0);
        prev_s = W'(start); prev_c = '0;
        x_vec = W'(x << j);
        c_bit = c[j];
      end
      @(negedge clk);
      model = W'(start + x * c);
      check("product");
      sel_prev = 0; c_bit = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
