// tb_fbp_fir_top: end-to-end test of the folded bit-plane FIR filter at its
// default size (K = 3 taps, N = 5-bit samples, M1 = 8).
//
// The test keeps its own record of every sample the filter takes (ck1) and
// computes each expected output word directly from the FIR sum
// y_i = sum_j c_j * x_(i-j), with coefficients cut to the active length m.
// It checks every output word, the spacing of output words (m clocks) and the
// latency from a configuration load to the first word (m + 1 clocks: m clocks
// of processing, the word appears in the next one).
//
// Runs: outputs straight after reset with no configuration (all-zero
// coefficients); the 3-tap, m = 4 example data flow; every coefficient length
// 1..M1 in turn (each load is a change of folding factor); full-scale
// operands (largest possible output word); and coefficients with bits above
// m set, which must be ignored. Each of these is counted and a run that never
// happened counts as a failure.
module tb_fbp_fir_top;
  import fbp_pkg::*;
  localparam int unsigned K  = DEF_K;
  localparam int unsigned N  = DEF_N;
  localparam int unsigned M1 = DEF_M1;
  localparam int unsigned W  = row_width(N, M1, K);
  localparam int unsigned MW = mlen_width(M1);

  logic clk = 1'b0;
  logic rst_n, cfg_load, ck1, y_valid;
  logic [MW-1:0] cfg_m, m_active;
  logic [M1-1:0] cfg_coef [K];
  logic [N-1:0]  x_in;
  logic [W-1:0]  y;

  fbp_fir_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned hist[$];            // samples taken since the last load / reset
  int unsigned mcoef[K];           // model coefficients, cut to m bits
  int unsigned mlen;               // model coefficient length
  int unsigned out_idx;            // output words since the last load / reset
  longint cyc = 0, load_cyc = -1, last_y_cyc = -1;
  // mechanism counters
  int n_reset_out = 0, n_fig6_out = 0, n_switch = 0, n_full_scale = 0;
  int n_high_bits = 0, n_chain = 0, n_latency = 0, n_spacing = 0;
  int n_per_m[M1+1];
  bit in_fig6 = 0, in_high = 0;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("[%0d] %s: got %0d expected %0d", cyc, what, got, exp);
    end
  endtask

  function automatic longint unsigned expected_y(int unsigned i);
    longint unsigned acc = 0;
    int idx;
    longint unsigned xv, cv;
    for (int j = 0; j < int'(K); j++) begin
      idx = int'(i) - j;
      if (idx >= 0) begin
        xv = 64'(hist[idx]);
        cv = 64'(mcoef[j]);
        acc += xv * cv;
      end
    end
    return acc;
  endfunction

  // One clock: check outputs, then apply the inputs for the next edge.
  task automatic step(bit load, int unsigned m, int unsigned coef[K], int unsigned x);
    @(negedge clk);
    cyc++;
    if (y_valid) begin
      longint unsigned e = expected_y(out_idx);
      check("y", longint'(y), longint'(e));
      if (out_idx == 0 && load_cyc >= 0) begin
        check("latency", cyc - load_cyc, longint'(mlen) + 1);
        n_latency++;
      end
      if (out_idx > 0) begin
        check("output spacing", cyc - last_y_cyc, longint'(mlen));
        n_spacing++;
      end
      if (load_cyc < 0) n_reset_out++;
      if (in_fig6) n_fig6_out++;
      if (in_high) n_high_bits++;
      n_per_m[mlen]++;
      if (out_idx >= K - 1) begin
        bit all = 1;
        for (int j = 0; j < int'(K); j++) if (mcoef[j] == 0 || hist[out_idx - j] == 0) all = 0;
        if (all) n_chain++;
      end
      if (e == longint'(K) * ((1 << N) - 1) * ((1 << M1) - 1)) n_full_scale++;
      last_y_cyc = cyc;
      out_idx++;
    end
    cfg_load = load;
    cfg_m    = MW'(m);
    for (int j = 0; j < int'(K); j++) cfg_coef[j] = M1'(coef[j]);
    x_in = N'(x);
    #1;
    if (load) begin
      if (m_active != MW'(m)) n_switch++;
      hist.delete();
      mlen = m;
      for (int j = 0; j < int'(K); j++) mcoef[j] = coef[j] & ((1 << m) - 1);
      out_idx = 0;
      load_cyc = cyc;
    end
    if (ck1) hist.push_back(x);
  endtask

  // Load a configuration, then feed nsamp samples from the generator.
  task automatic run(int unsigned m, int unsigned coef[K], int unsigned nsamp, int mode);
    int unsigned taken = 0;
    int unsigned x;
    x = (mode == 1) ? (1 << N) - 1 : $urandom_range(0, (1 << N) - 1);
    step(1, m, coef, x);
    taken = 1;
    while (taken < nsamp + K) begin
      if (ck1 && !cfg_load) taken++;
      // present a new sample value every clock; the filter takes it on ck1
      x = (mode == 1) ? (1 << N) - 1 : $urandom_range(0, (1 << N) - 1);
      step(0, m, coef, x);
    end
    // let the last output word come out
    repeat (m + 1) step(0, m, coef, x);
  endtask

  initial begin
    int unsigned c[K];
    rst_n = 0; cfg_load = 0; cfg_m = MW'(M1); x_in = '0;
    for (int j = 0; j < int'(K); j++) begin cfg_coef[j] = '0; mcoef[j] = 0; end
    mlen = M1; out_idx = 0;
    for (int i = 0; i <= int'(M1); i++) n_per_m[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Samples taken straight after reset, no configuration: coefficients are 0.
    begin
      int unsigned z[K];
      for (int j = 0; j < int'(K); j++) z[j] = 0;
      #1; if (ck1) hist.push_back(0);
      repeat (5 * M1) step(0, M1, z, $urandom_range(0, 31));
    end

    // The 3-tap, m = 4 data-flow example.
    in_fig6 = 1;
    for (int j = 0; j < int'(K); j++) c[j] = $urandom_range(1, 15);
    run(4, c, 12, 0);
    in_fig6 = 0;

    // Every coefficient length, random operands, each load a folding-factor change.
    for (int m = 1; m <= int'(M1); m++) begin
      for (int j = 0; j < int'(K); j++) c[j] = $urandom_range(1, (1 << m) - 1);
      run(m, c, 20, 0);
    end
    for (int t = 0; t < 20; t++) begin
      automatic int unsigned m = $urandom_range(1, M1);
      for (int j = 0; j < int'(K); j++) c[j] = $urandom_range(0, (1 << m) - 1);
      run(m, c, $urandom_range(1, 10), 0);
    end

    // Full-scale operands: largest output word.
    for (int j = 0; j < int'(K); j++) c[j] = (1 << M1) - 1;
    run(M1, c, 6, 1);

    // Coefficient bits above the active length must be ignored.
    in_high = 1;
    for (int j = 0; j < int'(K); j++) c[j] = $urandom_range(0, (1 << M1) - 1) | (1 << (M1 - 1));
    run(3, c, 10, 0);
    in_high = 0;

    // mechanism coverage
    checks++; if (n_reset_out == 0) begin failures++; $display("no output after reset"); end
    checks++; if (n_fig6_out == 0) begin failures++; $display("no m=4 example output"); end
    checks++; if (n_switch < int'(M1)) begin failures++; $display("too few folding-factor changes: %0d", n_switch); end
    checks++; if (n_full_scale == 0) begin failures++; $display("full-scale word never produced"); end
    checks++; if (n_high_bits == 0) begin failures++; $display("high-bit run produced no output"); end
    checks++; if (n_chain == 0) begin failures++; $display("no word used all taps"); end
    checks++; if (n_latency == 0) begin failures++; $display("latency never measured"); end
    checks++; if (n_spacing == 0) begin failures++; $display("spacing never measured"); end
    for (int m = 1; m <= int'(M1); m++) begin
      checks++;
      if (n_per_m[m] == 0) begin failures++; $display("no output with m=%0d", m); end
    end
    $display("outputs after reset=%0d m4-example=%0d folding-factor changes=%0d full-scale=%0d",
             n_reset_out, n_fig6_out, n_switch, n_full_scale);
    $display("all-taps words=%0d latency checks=%0d spacing checks=%0d high-bit words=%0d",
             n_chain, n_latency, n_spacing, n_high_bits);
    for (int m = 1; m <= int'(M1); m++) $display("  m=%0d: %0d output words", m, n_per_m[m]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
