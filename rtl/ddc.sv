// Digital down-conversion for one antenna.
// The ADC delivers real samples at the 80 MHz system clock with the
// signal on a 20 MHz IF, a quarter of the clock. Mixing with
// exp(-j*pi*n/2) is therefore the sequence 1, -j, -1, +j and needs no
// multiplier. I and Q are low-pass filtered by the 7-tap FIR
// h = [-1 0 9 16 9 0 -1]/16 (a null at 40 MHz removes the mixing image;
// the factor 2 restores the amplitude lost in mixing) and decimated by
// four to complex baseband at 20 MS/s: y_valid pulses every fourth clock.
// Latency: the output that first contains a sample follows it by 4..7
// clocks. The 20 MHz IF and the digital I/Q demodulation are the
// design's; the filter and the word widths are this implementation's.
module ddc
  import mimo_pkg::*;
#(
  parameter int IN_W = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [IN_W-1:0] x_in,
  output cplx_t                  y_out,
  output logic                   y_valid
);
  logic [1:0] ph;
  logic signed [IN_W-1:0] mi, mq;
  logic signed [IN_W-1:0] ti [7];
  logic signed [IN_W-1:0] tq [7];

  // quarter-rate mixer
  always_comb begin
    unique case (ph)
      2'd0: begin mi = x_in;             mq = '0;           end
      2'd1: begin mi = '0;               mq = IN_W'(-x_in); end
      2'd2: begin mi = IN_W'(-x_in);     mq = '0;           end
      default: begin mi = '0;            mq = x_in;         end
    endcase
  end

  function automatic logic signed [IN_W+5:0] fir(input logic signed [IN_W-1:0] t [7]);
    return -(IN_W+6)'(t[0]) + 9*(IN_W+6)'(t[2]) + 16*(IN_W+6)'(t[3])
           + 9*(IN_W+6)'(t[4]) - (IN_W+6)'(t[6]);
  endfunction

  logic signed [IN_W+5:0] fi, fq;
  assign fi = fir(ti);
  assign fq = fir(tq);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= '0; y_valid <= 1'b0; y_out <= '0;
      for (int k = 0; k < 7; k++) begin ti[k] <= '0; tq[k] <= '0; end
    end else begin
      ph <= ph + 1'b1;
      ti[0] <= mi; tq[0] <= mq;
      for (int k = 1; k < 7; k++) begin ti[k] <= ti[k-1]; tq[k] <= tq[k-1]; end
      y_valid <= (ph == 2'd3);
      if (ph == 2'd3) begin
        y_out.re <= sat16(40'(fi >>> 4));
        y_out.im <= sat16(40'(fq >>> 4));
      end
    end
  end
endmodule
