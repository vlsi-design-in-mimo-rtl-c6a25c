// MIMO detection unit (MDU), MMSE V-BLAST, 2x2 spatial multiplexing.
// The recursive V-BLAST procedure is unrolled for two streams: both
// detection orders are prepared per tone during preprocessing, and at
// detection time both candidates are computed side by side and the one
// of the better order is output.
// Preprocessing (per tone k, channel H with columns h1, h2, noise
// variance sigma2 in the units of |h|^2):
//   A   = H^H H + sigma2 I
//   G1  = A^-1 H^H            MMSE filter of both streams
//   G2a = h2^H / (|h2|^2 + sigma2)   MMSE filter of stream 2 alone
//   G2b = h1^H / (|h1|^2 + sigma2)   MMSE filter of stream 1 alone
//   k   = index of the row of G1 with the smaller norm
// `pre_start` makes the unit read the channel memory (one tone per
// clock, h_idx/h port), run the 10-stage pipeline below and store G1,
// G2a, G2b, H and k per tone. From pre_start to the first tone written
// takes 13 clocks: 1 (address) + 1 (memory read register) + 10
// (pipeline) + 1 (write); `g_ready` rises when all 64 tones are done.
//   1 input register        2 products of H      3 A = H^H H + sigma2 I
//   4 products for det and numerators            5 det(A), numerators
//   6 divides               7 saturation to Q.GF 8 squares of G1
//   9 row norms, k          10 output register
// Detection: the data FIFO is drained like in the ZF detector (antenna-0
// sample parked per tone, antenna-1 sample completes y = r), then in a
// 3-stage pipeline:
//   d1: ya = (G1)_1 r, yb = (G1)_2 r
//   d2: alpha_a = Q[ya], alpha_b = Q[yb] (slicer of `mode`),
//       ra = r - alpha_a h1, rb = r - alpha_b h2
//   d3: ya' = G2a ra (stream 2 after cancelling stream 1),
//       yb' = G2b rb (stream 1 after cancelling stream 2);
//       output (ya, ya') if k selects stream 1 first, else (yb', yb).
// det_s is Q3.12 like the QAM mapper; det_valid follows the FIFO read
// of the antenna-1 sample by 3 clocks. `frame_start` clears g_ready.
// The modified, pre-computed procedure (Eqs. of the G1/G2a/G2b/k form)
// and the 13-cycle preprocessing latency are the design's; number
// formats, the stage split and the per-tone buffering are this
// implementation's choices.
module mmse_vblast
  import mimo_pkg::*;
#(
  parameter int GW = 24,
  parameter int GF = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_start,
  input  logic        pre_start,
  input  logic [31:0] sigma2,
  input  mod_t        mode,
  output logic [5:0]  h_idx,
  input  cplx_t       h [2][2],
  output logic        g_ready,
  output logic        pre_wr,
  // data FIFO side
  input  logic        fifo_empty,
  input  logic [39:0] fifo_data,
  output logic        fifo_rd,
  // detected symbols
  output logic        det_valid,
  output logic [5:0]  det_idx,
  output cplx_t       det_s [2]
);
  localparam int PIPE = 10;
  typedef logic signed [GW-1:0] g_t;

  // ---------------- preprocessing control ----------------
  logic       pre_run, rd_v;
  logic [6:0] pcnt, gcnt;
  logic [5:0] rd_idx;
  cplx_t      hq [2][2], hin [2][2];
  logic [PIPE-1:0] pv;
  logic [5:0]      ptag [PIPE];
  cplx_t           ph [PIPE][2][2];   // H travels with its tone

  assign h_idx = pcnt[5:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre_run <= 1'b0; pcnt <= '0; rd_v <= 1'b0; rd_idx <= '0;
      g_ready <= 1'b0; gcnt <= '0; pre_wr <= 1'b0; pv <= '0;
    end else begin
      rd_v   <= pre_run;
      rd_idx <= pcnt[5:0];
      pv     <= {pv[PIPE-2:0], rd_v};
      pre_wr <= pv[PIPE-1];
      if (pre_start) begin
        pre_run <= 1'b1; pcnt <= '0; gcnt <= '0; g_ready <= 1'b0;
      end else if (pre_run) begin
        pcnt <= pcnt + 1'b1;
        if (pcnt == 7'd63) pre_run <= 1'b0;
      end
      if (frame_start) g_ready <= 1'b0;
      if (pv[PIPE-1]) begin
        gcnt <= gcnt + 1'b1;
        if (gcnt == 7'd63) g_ready <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    hq      <= h;                 // channel memory read register
    hin     <= hq;                // stage 1: input register
    ptag[0] <= rd_idx;
    ph[0]   <= hq;
    for (int s = 1; s < PIPE; s++) begin
      ptag[s] <= ptag[s-1];
      ph[s]   <= ph[s-1];
    end
  end

  // ---------------- preprocessing datapath ----------------
  // stage 2: products of H (Q2.30)
  logic signed [39:0] p_n1, p_n2, p_cre, p_cim;
  // stage 3: A
  logic signed [39:0] a11, a22, a12r, a12i;
  // stage 4: products
  logic signed [79:0] q_p1, q_p2;
  logic signed [63:0] q_n1r [2], q_n1i [2], q_n2r [2], q_n2i [2];
  logic signed [39:0] q_a11, q_a22;
  // stage 5: det and numerators
  logic signed [95:0] r_det, r_a11, r_a22;
  logic signed [95:0] r_n1r [2], r_n1i [2], r_n2r [2], r_n2i [2];
  // stage 6: quotients
  logic signed [95:0] d_g1r [2][2], d_g1i [2][2], d_g2ar [2], d_g2ai [2], d_g2br [2], d_g2bi [2];
  // stage 7..10
  g_t e_g1r [2][2], e_g1i [2][2], e_g2ar [2], e_g2ai [2], e_g2br [2], e_g2bi [2];
  g_t f_g1r [2][2], f_g1i [2][2], f_g2ar [2], f_g2ai [2], f_g2br [2], f_g2bi [2];
  logic [47:0] f_sq [2][4];
  g_t n_g1r [2][2], n_g1i [2][2], n_g2ar [2], n_g2ai [2], n_g2br [2], n_g2bi [2];
  logic [49:0] n_row [2];
  g_t o_g1r [2][2], o_g1i [2][2], o_g2ar [2], o_g2ai [2], o_g2br [2], o_g2bi [2];
  logic        o_k;

  function automatic g_t satg(input logic signed [95:0] x);
    if (x > 96'sd8388607)       return g_t'(24'sh7fffff);
    else if (x < -96'sd8388608) return g_t'(24'sh800000);
    else                        return x[GW-1:0];
  endfunction

  // quotient a * 2^(15+GF) / b, zero for b = 0
  function automatic logic signed [95:0] qdiv(input logic signed [95:0] a,
                                              input logic signed [95:0] b);
    return (b == 96'sd0) ? 96'sd0 : (a <<< (15 + GF)) / b;
  endfunction

  always_ff @(posedge clk) begin
    // 2: |h1|^2, |h2|^2 and h1^H h2 (columns: h[c][0] = h1, h[c][1] = h2)
    p_n1  <= 40'(hin[0][0].re * hin[0][0].re) + 40'(hin[0][0].im * hin[0][0].im)
           + 40'(hin[1][0].re * hin[1][0].re) + 40'(hin[1][0].im * hin[1][0].im);
    p_n2  <= 40'(hin[0][1].re * hin[0][1].re) + 40'(hin[0][1].im * hin[0][1].im)
           + 40'(hin[1][1].re * hin[1][1].re) + 40'(hin[1][1].im * hin[1][1].im);
    p_cre <= 40'(hin[0][0].re * hin[0][1].re) + 40'(hin[0][0].im * hin[0][1].im)
           + 40'(hin[1][0].re * hin[1][1].re) + 40'(hin[1][0].im * hin[1][1].im);
    p_cim <= 40'(hin[0][0].re * hin[0][1].im) - 40'(hin[0][0].im * hin[0][1].re)
           + 40'(hin[1][0].re * hin[1][1].im) - 40'(hin[1][0].im * hin[1][1].re);
    // 3: A = H^H H + sigma2 I
    a11  <= p_n1 + 40'(sigma2);
    a22  <= p_n2 + 40'(sigma2);
    a12r <= p_cre;
    a12i <= p_cim;
    // 4: a11*a22, |a12|^2 and numerator products, with H of this stage
    q_p1  <= 80'(a11) * 80'(a22);
    q_p2  <= 80'(a12r) * 80'(a12r) + 80'(a12i) * 80'(a12i);
    q_a11 <= a11;
    q_a22 <= a22;
    for (int c = 0; c < 2; c++) begin
      // conj(h1[c]) = (h1r, -h1i), conj(h2[c]) = (h2r, -h2i)
      // row 1: a22*conj(h1[c]) - a12*conj(h2[c])
      q_n1r[c] <= 64'(a22 * ph[2][c][0].re) - (64'(a12r * ph[2][c][1].re) + 64'(a12i * ph[2][c][1].im));
      q_n1i[c] <= -64'(a22 * ph[2][c][0].im) - (64'(a12i * ph[2][c][1].re) - 64'(a12r * ph[2][c][1].im));
      // row 2: a11*conj(h2[c]) - conj(a12)*conj(h1[c])
      q_n2r[c] <= 64'(a11 * ph[2][c][1].re) - (64'(a12r * ph[2][c][0].re) - 64'(a12i * ph[2][c][0].im));
      q_n2i[c] <= -64'(a11 * ph[2][c][1].im) - (-64'(a12r * ph[2][c][0].im) - 64'(a12i * ph[2][c][0].re));
    end
    // 5: det(A) (real, positive for sigma2 > 0) and numerators
    r_det <= 96'(q_p1) - 96'(q_p2);
    r_a11 <= 96'(q_a11);
    r_a22 <= 96'(q_a22);
    for (int c = 0; c < 2; c++) begin
      r_n1r[c] <= 96'(q_n1r[c]); r_n1i[c] <= 96'(q_n1i[c]);
      r_n2r[c] <= 96'(q_n2r[c]); r_n2i[c] <= 96'(q_n2i[c]);
    end
    // 6: divides; G2 numerators are conj(h) of this stage
    for (int c = 0; c < 2; c++) begin
      d_g1r[0][c] <= qdiv(r_n1r[c], r_det);
      d_g1i[0][c] <= qdiv(r_n1i[c], r_det);
      d_g1r[1][c] <= qdiv(r_n2r[c], r_det);
      d_g1i[1][c] <= qdiv(r_n2i[c], r_det);
      d_g2ar[c]   <= qdiv(96'(ph[4][c][1].re),  r_a22);
      d_g2ai[c]   <= qdiv(-96'(ph[4][c][1].im), r_a22);
      d_g2br[c]   <= qdiv(96'(ph[4][c][0].re),  r_a11);
      d_g2bi[c]   <= qdiv(-96'(ph[4][c][0].im), r_a11);
    end
    // 7: saturation to Q.GF
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 2; c++) begin
        e_g1r[r][c] <= satg(d_g1r[r][c]);
        e_g1i[r][c] <= satg(d_g1i[r][c]);
      end
    for (int c = 0; c < 2; c++) begin
      e_g2ar[c] <= satg(d_g2ar[c]); e_g2ai[c] <= satg(d_g2ai[c]);
      e_g2br[c] <= satg(d_g2br[c]); e_g2bi[c] <= satg(d_g2bi[c]);
    end
    // 8: squares of the G1 entries
    f_g1r <= e_g1r; f_g1i <= e_g1i;
    f_g2ar <= e_g2ar; f_g2ai <= e_g2ai; f_g2br <= e_g2br; f_g2bi <= e_g2bi;
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 2; c++) begin
        f_sq[r][2*c]   <= 48'(e_g1r[r][c] * e_g1r[r][c]);
        f_sq[r][2*c+1] <= 48'(e_g1i[r][c] * e_g1i[r][c]);
      end
    // 9: row norms
    n_g1r <= f_g1r; n_g1i <= f_g1i;
    n_g2ar <= f_g2ar; n_g2ai <= f_g2ai; n_g2br <= f_g2br; n_g2bi <= f_g2bi;
    for (int r = 0; r < 2; r++)
      n_row[r] <= 50'(f_sq[r][0]) + 50'(f_sq[r][1]) + 50'(f_sq[r][2]) + 50'(f_sq[r][3]);
    // 10: order decision and output register
    o_g1r <= n_g1r; o_g1i <= n_g1i;
    o_g2ar <= n_g2ar; o_g2ai <= n_g2ai; o_g2br <= n_g2br; o_g2bi <= n_g2bi;
    o_k   <= (n_row[1] < n_row[0]);   // 0: stream 1 first, 1: stream 2 first
  end

  // ---------------- per-tone memories ----------------
  g_t    m_g1r [64][2][2], m_g1i [64][2][2];
  g_t    m_g2ar [64][2], m_g2ai [64][2], m_g2br [64][2], m_g2bi [64][2];
  cplx_t m_h [64][2][2];
  logic  m_k [64];

  always_ff @(posedge clk) begin
    if (pv[PIPE-1]) begin
      m_g1r[ptag[PIPE-1]]  <= o_g1r;  m_g1i[ptag[PIPE-1]]  <= o_g1i;
      m_g2ar[ptag[PIPE-1]] <= o_g2ar; m_g2ai[ptag[PIPE-1]] <= o_g2ai;
      m_g2br[ptag[PIPE-1]] <= o_g2br; m_g2bi[ptag[PIPE-1]] <= o_g2bi;
      m_h[ptag[PIPE-1]]    <= ph[PIPE-1];
      m_k[ptag[PIPE-1]]    <= o_k;
    end
  end

  // ---------------- detection ----------------
  cplx_t      ybuf [64];
  logic [1:0] f_tag;
  logic [5:0] f_idx;
  cplx_t      f_y;
  assign f_tag   = fifo_data[39:38];
  assign f_idx   = fifo_data[37:32];
  assign f_y     = fifo_data[31:0];
  assign fifo_rd = g_ready && !fifo_empty;

  function automatic logic signed [15:0] satq(input logic signed [63:0] x);
    if (x > 64'sd32767)       return 16'sh7fff;
    else if (x < -64'sd32768) return 16'sh8000;
    else                      return x[15:0];
  endfunction

  // slicer: nearest level of the constellation of `m` per dimension,
  // levels (2i+1)*K with the mapper's Q3.12 scale K
  function automatic logic signed [15:0] slice(input logic signed [15:0] x, input mod_t m);
    int k, lv, n;
    unique case (m)
      MOD_BPSK:  begin k = 4096; n = 2; end
      MOD_QPSK:  begin k = 2896; n = 2; end
      MOD_QAM16: begin k = 1295; n = 4; end
      default:   begin k = 632;  n = 8; end
    endcase
    lv = -(n - 1);
    for (int t = 1; t < 8; t++)
      if (t < n && int'(x) > (2 * t - n) * k) lv = 2 * t - n + 1;
    return 16'(lv * k);
  endfunction

  // complex Q.GF x Q1.15 products summed over two receive antennas, >> 15
  function automatic cplx_t gdot(input g_t gr0, input g_t gi0, input g_t gr1, input g_t gi1,
                                 input logic signed [19:0] y0r, input logic signed [19:0] y0i,
                                 input logic signed [19:0] y1r, input logic signed [19:0] y1i);
    logic signed [63:0] sr, si;
    cplx_t o;
    sr = 64'(gr0 * y0r) - 64'(gi0 * y0i) + 64'(gr1 * y1r) - 64'(gi1 * y1i);
    si = 64'(gr0 * y0i) + 64'(gi0 * y0r) + 64'(gr1 * y1i) + 64'(gi1 * y1r);
    o.re = satq(sr >>> 15);
    o.im = satq(si >>> 15);
    return o;
  endfunction

  // d1
  logic       v1, v2;
  logic [5:0] i1, i2;
  cplx_t      r1 [2];
  cplx_t      ya1, yb1, ya2, yb2;
  cplx_t      y0;
  assign y0 = ybuf[f_idx];
  // d2
  logic signed [19:0] ra2r [2], ra2i [2], rb2r [2], rb2i [2];
  cplx_t al_a, al_b;
  assign al_a = '{re: slice(ya1.re, mode), im: (mode == MOD_BPSK) ? 16'sd0 : slice(ya1.im, mode)};
  assign al_b = '{re: slice(yb1.re, mode), im: (mode == MOD_BPSK) ? 16'sd0 : slice(yb1.im, mode)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; det_valid <= 1'b0; det_idx <= '0;
      i1 <= '0; i2 <= '0;
      det_s[0] <= '0; det_s[1] <= '0;
    end else begin
      // d1: linear MMSE estimates of both streams
      v1 <= fifo_rd && f_tag == 2'd1;
      if (fifo_rd && f_tag == 2'd1) begin
        i1    <= f_idx;
        r1[0] <= y0;
        r1[1] <= f_y;
        ya1 <= gdot(m_g1r[f_idx][0][0], m_g1i[f_idx][0][0], m_g1r[f_idx][0][1], m_g1i[f_idx][0][1],
                    20'(y0.re), 20'(y0.im), 20'(f_y.re), 20'(f_y.im));
        yb1 <= gdot(m_g1r[f_idx][1][0], m_g1i[f_idx][1][0], m_g1r[f_idx][1][1], m_g1i[f_idx][1][1],
                    20'(y0.re), 20'(y0.im), 20'(f_y.re), 20'(f_y.im));
      end
      // d2: slice and cancel, r - alpha*h (Q3.12 x Q1.15 >> 12 -> Q1.15)
      v2 <= v1;
      if (v1) begin
        i2  <= i1;
        ya2 <= ya1;
        yb2 <= yb1;
        for (int c = 0; c < 2; c++) begin
          ra2r[c] <= 20'(r1[c].re) - 20'((32'(al_a.re * m_h[i1][c][0].re) - 32'(al_a.im * m_h[i1][c][0].im)) >>> 12);
          ra2i[c] <= 20'(r1[c].im) - 20'((32'(al_a.re * m_h[i1][c][0].im) + 32'(al_a.im * m_h[i1][c][0].re)) >>> 12);
          rb2r[c] <= 20'(r1[c].re) - 20'((32'(al_b.re * m_h[i1][c][1].re) - 32'(al_b.im * m_h[i1][c][1].im)) >>> 12);
          rb2i[c] <= 20'(r1[c].im) - 20'((32'(al_b.re * m_h[i1][c][1].im) + 32'(al_b.im * m_h[i1][c][1].re)) >>> 12);
        end
      end
      // d3: second stream from the cleaned vector, order select
      det_valid <= v2;
      if (v2) begin
        det_idx <= i2;
        if (!m_k[i2]) begin
          det_s[0] <= ya2;
          det_s[1] <= gdot(m_g2ar[i2][0], m_g2ai[i2][0], m_g2ar[i2][1], m_g2ai[i2][1],
                           ra2r[0], ra2i[0], ra2r[1], ra2i[1]);
        end else begin
          det_s[0] <= gdot(m_g2br[i2][0], m_g2bi[i2][0], m_g2br[i2][1], m_g2bi[i2][1],
                           rb2r[0], rb2i[0], rb2r[1], rb2i[1]);
          det_s[1] <= yb2;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fifo_rd && f_tag == 2'd0) ybuf[f_idx] <= f_y;
  end
endmodule
