// Frequency offset estimation after Schmidl and Cox, weighted across
// the receive antennas.
// Input is the time-multiplexed baseband stream of the four antennas
// (one sample per clock, antenna index in `ant`, all antennas in turn).
// For every sample the unit forms the lag-LAG correlation term
// conj(x[n-LAG]) * x[n] and the energy |x[n]|^2 with six real
// multipliers shared by all antennas. Each antenna's terms are shifted
// right by 2*dshift[a], undoing the digital AGC gain of that antenna,
// and summed over WIN samples of every antenna (integrate and dump).
// At the end of a window a CORDIC turns the summed correlation P into
// magnitude and angle: `periodic` is set when |P| > thr/256 * R (the
// preamble repeats every LAG samples) and dphi = angle(P)/LAG is the
// phase advance per sample, 2^16 units per turn. Results are valid
// from `est_valid` (one pulse, ~18 clocks after the window closes).
// The algorithm, the antenna weighting and the six multipliers are the
// design's; LAG = 16 (the 802.11a short-preamble period), WIN and the
// integrate-and-dump window are this implementation's choices.
module foe
  import mimo_pkg::*;
#(
  parameter int LAG   = 16,
  parameter int WIN   = 16,
  parameter int NA    = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  cplx_t          x_in,
  input  logic           x_valid,
  input  logic [1:0]     ant,
  input  logic [2:0]     dshift [NA],
  input  logic [7:0]     thr,
  output logic           periodic,
  output logic [15:0]    dphi,
  output logic           est_valid
);
  localparam int AW = 40;
  cplx_t dl [NA][LAG];
  cplx_t old;
  logic signed [AW-1:0] pre, pim, r;
  logic signed [AW-1:0] c_re, c_im, e;
  logic [$clog2(WIN*NA)-1:0] cnt;
  logic win_end;

  assign old = dl[ant][LAG-1];
  // six real multipliers: conj(old) * x and |x|^2
  logic signed [31:0] m1, m2, m3, m4, m5, m6;
  assign m1 = old.re * x_in.re;
  assign m2 = old.im * x_in.im;
  assign m3 = old.re * x_in.im;
  assign m4 = old.im * x_in.re;
  assign m5 = x_in.re * x_in.re;
  assign m6 = x_in.im * x_in.im;
  logic [4:0] wsh;
  assign wsh  = {1'b0, dshift[ant], 1'b0};
  assign c_re = (AW'(m1) + AW'(m2)) >>> wsh;
  assign c_im = (AW'(m3) - AW'(m4)) >>> wsh;
  assign e    = (AW'(m5) + AW'(m6)) >>> wsh;
  assign win_end = x_valid && (cnt == '1);

  logic cstart, cdone;
  logic [33:0] cmag;
  logic [15:0] cang;
  logic signed [AW-1:0] r_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre <= '0; pim <= '0; r <= '0; cnt <= '0; cstart <= 1'b0; r_hold <= '0;
      for (int a = 0; a < NA; a++) for (int k = 0; k < LAG; k++) dl[a][k] <= '0;
    end else begin
      cstart <= 1'b0;
      if (x_valid) begin
        dl[ant][0] <= x_in;
        for (int k = 1; k < LAG; k++) dl[ant][k] <= dl[ant][k-1];
        cnt <= cnt + 1'b1;
        if (win_end) begin
          pre <= '0; pim <= '0; r <= '0;
          r_hold <= r + e;
          cstart <= 1'b1;
        end else begin
          pre <= pre + c_re; pim <= pim + c_im; r <= r + e;
        end
      end
    end
  end

  // the CORDIC reads the window sums held from the window end
  logic signed [33:0] cx, cy;
  logic signed [AW-1:0] p_re_h, p_im_h;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin p_re_h <= '0; p_im_h <= '0; end
    else if (win_end) begin p_re_h <= pre + c_re; p_im_h <= pim + c_im; end
  end
  assign cx = 34'(p_re_h >>> 6);
  assign cy = 34'(p_im_h >>> 6);

  cordic_vec #(.XW(34), .ITER(16)) u_cordic (
    .clk, .rst_n, .start(cstart), .x_in(cx), .y_in(cy),
    .busy(), .done(cdone), .mag(cmag), .ang(cang));

  // |P| > thr/256 * R, with the CORDIC gain K ~ 1.640625 = 1+1/2+1/8+1/64
  logic [AW+9:0] lhs, rhs, rk;
  assign rk  = (AW+10)'(r_hold >>> 6);
  assign lhs = (AW+10)'(cmag) << 8;
  assign rhs = (rk + (rk >> 1) + (rk >> 3) + (rk >> 6)) * thr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      periodic <= 1'b0; dphi <= '0; est_valid <= 1'b0;
    end else begin
      est_valid <= cdone;
      if (cdone) begin
        periodic <= (lhs > rhs) && (r_hold > 0);
        dphi     <= 16'($signed(cang) >>> $clog2(LAG));
      end
    end
  end
endmodule
