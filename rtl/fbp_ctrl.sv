// fbp_ctrl: control unit of the folded filter with changeable folding factor.
//
// It holds the active coefficient length m (the folding factor) and counts the
// phase j = 0..m-1 of the current sample period with the basic clock. From the
// phase it derives:
//   ck1      - high in the last phase of a period (and with cfg_load): the
//              input shift register takes a new sample at the end of that
//              clock, so ck1 repeats every m basic clocks;
//   sel_prev - high in phase 0: the L/R multiplexers of every cell take the
//              previous row's result instead of the row's own contents;
//   y_valid  - high in phase 0 once a whole period has been processed: the
//              last row then holds a finished output word;
//   clr      - clears the rows when a new configuration is loaded.
// Changing the folding factor is just loading another m: the counter then
// wraps after m clocks. A length of 0 or above M1 is taken as M1 (this
// design's choice). Reset starts with m = M1 in the last phase, so the first
// sample is taken at the first clock.
module fbp_ctrl #(
  parameter int unsigned M1 = 8,
  parameter int unsigned MW = $clog2(M1 + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_load,  // load a new coefficient length (and coefficients)
  input  logic [MW-1:0] cfg_m,     // new coefficient length, 1..M1
  output logic [MW-1:0] m,         // active coefficient length
  output logic [MW-1:0] ph,        // current phase 0..m-1
  output logic          ck1,       // sample-period strobe: take a new sample
  output logic          sel_prev,  // phase 0: rows start from previous row
  output logic          y_valid,   // output word valid this clock
  output logic          clr        // clear the rows
);

  logic [MW-1:0] m_new;
  logic          last;
  logic          have_x;   // a sample has been taken since reset / load
  logic          primed;   // a full period on a real sample has finished

  always_comb begin
    m_new    = (cfg_m == '0 || cfg_m > MW'(M1)) ? MW'(M1) : cfg_m;
    last     = (ph == m - MW'(1));
    ck1      = cfg_load | last;
    sel_prev = (ph == '0);
    y_valid  = primed & (ph == '0);
    clr      = cfg_load;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m      <= MW'(M1);
      ph     <= MW'(M1 - 1);
      have_x <= 1'b0;
      primed <= 1'b0;
    end else if (cfg_load) begin
      m      <= m_new;
      ph     <= '0;
      have_x <= 1'b1;
      primed <= 1'b0;
    end else if (last) begin
      ph     <= '0;
      have_x <= 1'b1;
      primed <= primed | have_x;
    end else begin
      ph     <= ph + MW'(1);
    end
  end

endmodule
