// Zero-forcing preprocessing: inverse of a 2x2 complex channel matrix,
//   G = 1/(h11*h22 - h12*h21) * [ h22 -h12 ; -h21 h11 ],
// in an 8-stage pipeline that accepts one matrix per clock.
//   1: input register
//   2: products h11*h22 and h12*h21
//   3: determinant d and adjugate
//   4: |d|^2 and adj*conj(d)
//   5: complex divide, adj*conj(d) / |d|^2, by real division of both parts
//   6: rounding and saturation to the G format
//   7-8: output registers
// h is Q1.15; G is signed GW bits with GF fractional bits (default
// Q11.12, range +/-2048), enough for tones that are 60 dB down. A
// singular matrix (d = 0) gives G = 0. in_tag travels with the data.
// The formula and the 8-stage pipeline with a complex divide are the
// design's; the number formats are this implementation's.
module zf_inverse
  import mimo_pkg::*;
#(
  parameter int GW     = 24,
  parameter int GF     = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [5:0]  in_tag,
  input  cplx_t       h [2][2],
  output logic        out_valid,
  output logic [5:0]  out_tag,
  output logic signed [GW-1:0] g_re [2][2],
  output logic signed [GW-1:0] g_im [2][2]
);
  localparam int DW = 96;
  localparam int STAGES = 8;
  logic [STAGES-1:0] v;
  logic [5:0] tg [STAGES];

  // stage 1
  cplx_t h1 [2][2];
  // stage 2
  logic signed [33:0] pa_re, pa_im, pb_re, pb_im;
  cplx_t h2 [2][2];
  // stage 3
  logic signed [34:0] d_re, d_im;
  cplx_t adj [2][2];
  // stage 4
  logic signed [DW-1:0] dd;
  logic signed [DW-1:0] n_re [2][2];
  logic signed [DW-1:0] n_im [2][2];
  // stage 5
  logic signed [DW-1:0] q_re [2][2];
  logic signed [DW-1:0] q_im [2][2];
  // stage 6..8
  logic signed [GW-1:0] r_re [3][2][2];
  logic signed [GW-1:0] r_im [3][2][2];

  function automatic logic signed [GW-1:0] satg(input logic signed [DW-1:0] x);
    if (x > DW'(2**(GW-1)-1))       return GW'(2**(GW-1)-1);
    else if (x < -DW'(2**(GW-1)))   return GW'(-(2**(GW-1)));
    else                            return x[GW-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[STAGES-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    tg[0] <= in_tag;
    for (int s = 1; s < STAGES; s++) tg[s] <= tg[s-1];
    // 1
    h1 <= h;
    // 2
    pa_re <= 34'(h1[0][0].re * h1[1][1].re) - 34'(h1[0][0].im * h1[1][1].im);
    pa_im <= 34'(h1[0][0].re * h1[1][1].im) + 34'(h1[0][0].im * h1[1][1].re);
    pb_re <= 34'(h1[0][1].re * h1[1][0].re) - 34'(h1[0][1].im * h1[1][0].im);
    pb_im <= 34'(h1[0][1].re * h1[1][0].im) + 34'(h1[0][1].im * h1[1][0].re);
    h2 <= h1;
    // 3
    d_re <= 35'(pa_re) - 35'(pb_re);
    d_im <= 35'(pa_im) - 35'(pb_im);
    adj[0][0] <= h2[1][1];
    adj[1][1] <= h2[0][0];
    adj[0][1] <= '{re: 16'(-h2[0][1].re), im: 16'(-h2[0][1].im)};
    adj[1][0] <= '{re: 16'(-h2[1][0].re), im: 16'(-h2[1][0].im)};
    // 4: |d|^2 and adj * conj(d)
    dd <= DW'(d_re * d_re) + DW'(d_im * d_im);
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        n_re[i][j] <= DW'(adj[i][j].re * d_re) + DW'(adj[i][j].im * d_im);
        n_im[i][j] <= DW'(adj[i][j].im * d_re) - DW'(adj[i][j].re * d_im);
      end
    // 5: divide. G = n * 2^15 / dd in real units; scale to GF bits
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        q_re[i][j] <= (dd == 0) ? 96'sd0 : (n_re[i][j] <<< (15 + GF)) / dd;
        q_im[i][j] <= (dd == 0) ? 96'sd0 : (n_im[i][j] <<< (15 + GF)) / dd;
      end
    // 6
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        r_re[0][i][j] <= satg(q_re[i][j]);
        r_im[0][i][j] <= satg(q_im[i][j]);
      end
    // 7, 8
    r_re[1] <= r_re[0]; r_im[1] <= r_im[0];
    r_re[2] <= r_re[1]; r_im[2] <= r_im[1];
  end

  assign out_valid = v[STAGES-1];
  assign out_tag   = tg[STAGES-1];
  assign g_re      = r_re[2];
  assign g_im      = r_im[2];
endmodule
