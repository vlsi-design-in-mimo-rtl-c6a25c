// MIMO detection unit (MDU), zero-forcing, 2x2 spatial multiplexing.
// Preprocessing: `pre_start` (after channel estimation) makes the unit
// read the channel matrix of every tone (k = 0..63, one per clock,
// through the h_idx/h read port of the channel memory), invert it in
// the zf_inverse pipeline and store G[k]. From pre_start to the first
// G written takes 11 clocks: 1 (address counter) + 1 (channel memory
// read register) + 8 (pipeline) + 1 (G memory write);
// `g_ready` rises when all 64 tones are done (74 clocks after
// pre_start).
// Detection: the received FFT outputs wait in the data FIFO (first
// word fall through: valid = !empty, pop = rd_en; word = {tag, tone,
// sample}). Once g_ready is set, the unit drains it: a sample of
// receive antenna 0 is parked in a per-tone buffer, a sample of
// antenna 1 completes y = (y0, y1) for its tone and s = G[k] * y is
// output one clock later (det_valid, det_idx, det_s[0..1], Q3.12).
// Samples of further receive antennas are not used by this detector.
// `frame_start` clears g_ready for the next frame.
// Zero forcing with the 2x2 inverse formula and the 11-clock latency
// are the design's; the buffering scheme is this implementation's.
module mimo_detector
  import mimo_pkg::*;
#(
  parameter int GW = 24,
  parameter int GF = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_start,
  input  logic        pre_start,
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
  // ---------------- preprocessing ----------------
  logic       pre_run, rd_v;
  logic [6:0] pcnt;
  logic [5:0] rd_idx;
  cplx_t      hq [2][2];
  logic       zv;
  logic [5:0] ztag;
  logic signed [GW-1:0] zg_re [2][2];
  logic signed [GW-1:0] zg_im [2][2];
  logic signed [GW-1:0] gm_re [64][2][2];
  logic signed [GW-1:0] gm_im [64][2][2];
  logic [6:0] gcnt;

  assign h_idx = pcnt[5:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre_run <= 1'b0; pcnt <= '0; rd_v <= 1'b0; rd_idx <= '0;
      g_ready <= 1'b0; gcnt <= '0; pre_wr <= 1'b0;
    end else begin
      rd_v   <= pre_run;
      rd_idx <= pcnt[5:0];
      pre_wr <= zv;
      if (pre_start) begin
        pre_run <= 1'b1; pcnt <= '0; gcnt <= '0; g_ready <= 1'b0;
      end else if (pre_run) begin
        pcnt <= pcnt + 1'b1;
        if (pcnt == 7'd63) pre_run <= 1'b0;
      end
      if (frame_start) g_ready <= 1'b0;
      if (zv) begin
        gcnt <= gcnt + 1'b1;
        if (gcnt == 7'd63) g_ready <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    hq <= h;   // channel memory read register
    if (zv) begin
      gm_re[ztag] <= zg_re;
      gm_im[ztag] <= zg_im;
    end
  end

  zf_inverse #(.GW(GW), .GF(GF)) u_inv (
    .clk, .rst_n, .in_valid(rd_v), .in_tag(rd_idx), .h(hq),
    .out_valid(zv), .out_tag(ztag), .g_re(zg_re), .g_im(zg_im));

  // ---------------- detection ----------------
  cplx_t       ybuf [64];
  logic [1:0]  f_tag;
  logic [5:0]  f_idx;
  cplx_t       f_y;
  assign f_tag = fifo_data[39:38];
  assign f_idx = fifo_data[37:32];
  assign f_y   = fifo_data[31:0];
  assign fifo_rd = g_ready && !fifo_empty;

  // s_i = sum_j G[i][j] * y_j ; G is Q.GF, y is Q15 -> s in Q.GF
  function automatic logic signed [15:0] satq(input logic signed [63:0] x);
    if (x > 64'sd32767)       return 16'sh7fff;
    else if (x < -64'sd32768) return 16'sh8000;
    else                      return x[15:0];
  endfunction

  cplx_t y0;
  logic signed [63:0] acc_re [2];
  logic signed [63:0] acc_im [2];
  assign y0 = ybuf[f_idx];
  always_comb begin
    for (int i = 0; i < 2; i++) begin
      acc_re[i] = 64'(gm_re[f_idx][i][0] * y0.re) - 64'(gm_im[f_idx][i][0] * y0.im)
                + 64'(gm_re[f_idx][i][1] * f_y.re) - 64'(gm_im[f_idx][i][1] * f_y.im);
      acc_im[i] = 64'(gm_re[f_idx][i][0] * y0.im) + 64'(gm_im[f_idx][i][0] * y0.re)
                + 64'(gm_re[f_idx][i][1] * f_y.im) + 64'(gm_im[f_idx][i][1] * f_y.re);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      det_valid <= 1'b0; det_idx <= '0; det_s[0] <= '0; det_s[1] <= '0;
    end else begin
      det_valid <= 1'b0;
      if (fifo_rd) begin
        if (f_tag == 2'd0) ybuf[f_idx] <= f_y;
        else if (f_tag == 2'd1) begin
          det_valid <= 1'b1;
          det_idx   <= f_idx;
          for (int i = 0; i < 2; i++) begin
            det_s[i].re <= satq(acc_re[i] >>> 15);
            det_s[i].im <= satq(acc_im[i] >>> 15);
          end
        end
      end
    end
  end
endmodule
