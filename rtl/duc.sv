// Digital up-conversion for one transmit antenna.
// Complex baseband samples arrive at 20 MS/s (x_valid every fourth
// clock of the 80 MHz system clock). Each sample is held for four
// clocks and mixed onto the 20 MHz IF, a quarter of the clock, with
// exp(+j*pi*n/2): the real output is re, -im, -re, +im in turn, so no
// multiplier is needed. The output goes to one DAC at 80 MHz and is
// registered (one clock latency after a sample is taken).
// The 20 MHz IF and the digital I/Q modulation are the design's; the
// hold interpolation (no image filter) is this implementation's choice.
module duc
  import mimo_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  cplx_t          x_in,
  input  logic           x_valid,
  output logic signed [W-1:0] y_out
);
  cplx_t      hold;
  logic [1:0] ph;
  cplx_t      cur;

  assign cur = x_valid ? x_in : hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold <= '0; ph <= '0; y_out <= '0;
    end else begin
      if (x_valid) hold <= x_in;
      ph <= x_valid ? 2'd1 : ph + 1'b1;
      unique case (x_valid ? 2'd0 : ph)
        2'd0: y_out <= cur.re;
        2'd1: y_out <= W'(-cur.im);
        2'd2: y_out <= W'(-cur.re);
        default: y_out <= cur.im;
      endcase
    end
  end
endmodule
