// Testbench of the MMSE V-BLAST detection unit. A channel memory and the
// data FIFO are modelled here. Random 2x2 channels per tone, random
// 16-QAM symbol pairs s, received as y = H s + n (rounded to Q15).
// An independent floating-point model of the unrolled V-BLAST procedure
// (MMSE filter from A = H^H H + sigma2 I, slicing, cancellation,
// single-stream MMSE filter, order from the row norms) gives the
// expected soft outputs; every detected pair must match within 0.015.
// Also checks the 13-clock preprocessing latency, g_ready after all 64
// tones, that both detection orders occur, and that the hard decisions
// equal the sent symbols.
module tb_mmse_vblast;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic frame_start, pre_start, g_ready, pre_wr, fifo_empty, fifo_rd, det_valid;
  logic [5:0] h_idx, det_idx;
  logic [31:0] sigma2;
  mod_t mode;
  cplx_t h [2][2];
  cplx_t det_s [2];
  logic [39:0] fifo_data;
  mmse_vblast dut (.*);

  localparam real SIG2 = 0.004;
  localparam int  K16  = 1295;
  int hq_re [64][2][2], hq_im [64][2][2];   // quantised channel, Q15
  int yq_re [64][2], yq_im [64][2];         // quantised received vector
  int sr [64][2], si [64][2];               // sent symbols, Q3.12
  real er [64][2], ei [64][2];              // expected outputs, Q3.12
  int  ek [64];
  logic [39:0] q [$];
  longint cyc = 0, t_wr = -1, t_pre = 0, t_ready = -1;
  int ndet = 0, nk0 = 0, nk1 = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always_comb for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++)
    h[i][j] = '{re: 16'(hq_re[h_idx][i][j]), im: 16'(hq_im[h_idx][i][j])};

  assign fifo_empty = (q.size() == 0);
  assign fifo_data  = fifo_empty ? 40'd0 : q[0];
  always @(posedge clk) if (fifo_rd && q.size() > 0) void'(q.pop_front());

  function automatic int slice16(real x);
    int lv = -3;
    for (int t = 1; t < 4; t++) if (x > real'((2 * t - 4) * K16)) lv = 2 * t - 3;
    return lv * K16;
  endfunction

  // floating-point model of one tone (values in natural units)
  task automatic model(int k);
    real Hr [2][2], Hi [2][2], yr [2], yi [2];
    real a11, a22, cr, ci, det;
    real g1r [2][2], g1i [2][2], n0, n1;
    real yar, yai, ybr, ybi, alr, ali, blr, bli;
    real rar [2], rai [2], rbr [2], rbi [2], o1r, o1i, o2r, o2i;
    for (int i = 0; i < 2; i++) begin
      for (int j = 0; j < 2; j++) begin Hr[i][j] = hq_re[k][i][j] / 32768.0; Hi[i][j] = hq_im[k][i][j] / 32768.0; end
      yr[i] = yq_re[k][i] / 32768.0; yi[i] = yq_im[k][i] / 32768.0;
    end
    a11 = 0; a22 = 0; cr = 0; ci = 0;
    for (int i = 0; i < 2; i++) begin
      a11 += Hr[i][0] ** 2 + Hi[i][0] ** 2;
      a22 += Hr[i][1] ** 2 + Hi[i][1] ** 2;
      cr  += Hr[i][0] * Hr[i][1] + Hi[i][0] * Hi[i][1];   // h1^H h2
      ci  += Hr[i][0] * Hi[i][1] - Hi[i][0] * Hr[i][1];
    end
    a11 += SIG2; a22 += SIG2;
    det = a11 * a22 - cr * cr - ci * ci;
    for (int c = 0; c < 2; c++) begin
      // row 1: (a22 conj(h1c) - a12 conj(h2c)) / det
      g1r[0][c] = (a22 * Hr[c][0] - (cr * Hr[c][1] + ci * Hi[c][1])) / det;
      g1i[0][c] = (-a22 * Hi[c][0] - (ci * Hr[c][1] - cr * Hi[c][1])) / det;
      // row 2: (a11 conj(h2c) - conj(a12) conj(h1c)) / det
      g1r[1][c] = (a11 * Hr[c][1] - (cr * Hr[c][0] - ci * Hi[c][0])) / det;
      g1i[1][c] = (-a11 * Hi[c][1] - (-cr * Hi[c][0] - ci * Hr[c][0])) / det;
    end
    n0 = 0; n1 = 0;
    for (int c = 0; c < 2; c++) begin
      n0 += g1r[0][c] ** 2 + g1i[0][c] ** 2;
      n1 += g1r[1][c] ** 2 + g1i[1][c] ** 2;
    end
    yar = 0; yai = 0; ybr = 0; ybi = 0;
    for (int c = 0; c < 2; c++) begin
      yar += g1r[0][c] * yr[c] - g1i[0][c] * yi[c]; yai += g1r[0][c] * yi[c] + g1i[0][c] * yr[c];
      ybr += g1r[1][c] * yr[c] - g1i[1][c] * yi[c]; ybi += g1r[1][c] * yi[c] + g1i[1][c] * yr[c];
    end
    alr = slice16(yar * 4096.0) / 4096.0; ali = slice16(yai * 4096.0) / 4096.0;
    blr = slice16(ybr * 4096.0) / 4096.0; bli = slice16(ybi * 4096.0) / 4096.0;
    for (int c = 0; c < 2; c++) begin
      rar[c] = yr[c] - (alr * Hr[c][0] - ali * Hi[c][0]); rai[c] = yi[c] - (alr * Hi[c][0] + ali * Hr[c][0]);
      rbr[c] = yr[c] - (blr * Hr[c][1] - bli * Hi[c][1]); rbi[c] = yi[c] - (blr * Hi[c][1] + bli * Hr[c][1]);
    end
    // single-stream MMSE filters conj(h)/(|h|^2 + sigma2)
    o1r = 0; o1i = 0; o2r = 0; o2i = 0;
    for (int c = 0; c < 2; c++) begin
      o1r += (Hr[c][1] * rar[c] + Hi[c][1] * rai[c]) / a22; o1i += (Hr[c][1] * rai[c] - Hi[c][1] * rar[c]) / a22;
      o2r += (Hr[c][0] * rbr[c] + Hi[c][0] * rbi[c]) / a11; o2i += (Hr[c][0] * rbi[c] - Hi[c][0] * rbr[c]) / a11;
    end
    if (n1 < n0) begin
      ek[k] = 1; er[k][0] = o2r * 4096.0; ei[k][0] = o2i * 4096.0; er[k][1] = ybr * 4096.0; ei[k][1] = ybi * 4096.0;
    end else begin
      ek[k] = 0; er[k][0] = yar * 4096.0; ei[k][0] = yai * 4096.0; er[k][1] = o1r * 4096.0; ei[k][1] = o1i * 4096.0;
    end
  endtask

  function automatic bit near(real a, int b);
    return (a - real'(b) < 60.0) && (real'(b) - a < 60.0);
  endfunction

  always @(posedge clk) begin
    if (rst_n && pre_start) t_pre = cyc;
    if (rst_n && pre_wr && t_wr < 0) t_wr = cyc;
    if (rst_n && g_ready && t_ready < 0) t_ready = cyc;
    if (det_valid && rst_n) begin
      ndet++;
      if (ek[det_idx] == 1) nk1++; else nk0++;
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (!near(er[det_idx][i], det_s[i].re) || !near(ei[det_idx][i], det_s[i].im)) begin
          failures++;
          if (failures < 8) $display("tone %0d s%0d got %0d,%0d want %0.1f,%0.1f", det_idx, i,
                                     int'(det_s[i].re), int'(det_s[i].im), er[det_idx][i], ei[det_idx][i]);
        end
        checks++;
        if (slice16(real'(det_s[i].re)) != sr[det_idx][i] || slice16(real'(det_s[i].im)) != si[det_idx][i]) begin
          failures++;
          if (failures < 8) $display("tone %0d s%0d decision wrong", det_idx, i);
        end
      end
    end
  end

  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real nz();   // roughly uniform noise, std ~0.0012
    return (real'($urandom_range(0, 400)) - 200.0) / 100000.0;
  endfunction

  initial begin
    frame_start = 0; pre_start = 0; mode = MOD_QAM16;
    sigma2 = 32'($rtoi(SIG2 * 1073741824.0));
    for (int k = 0; k < 64; k++) begin
      for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) begin
        hq_re[k][i][j] = $rtoi((real'($urandom_range(0, 360)) - 180.0) / 1000.0 * 32768.0);
        hq_im[k][i][j] = $rtoi((real'($urandom_range(0, 360)) - 180.0) / 1000.0 * 32768.0);
      end
      hq_re[k][0][0] += 12000; hq_re[k][1][1] += 12000;   // |y| stays below 1
      if (k % 2 == 1) for (int i = 0; i < 2; i++) begin   // weaker second stream
        hq_re[k][i][1] = hq_re[k][i][1] * 6 / 10; hq_im[k][i][1] = hq_im[k][i][1] * 6 / 10;
      end
      for (int i = 0; i < 2; i++) begin
        sr[k][i] = (2 * $urandom_range(0, 3) - 3) * K16;
        si[k][i] = (2 * $urandom_range(0, 3) - 3) * K16;
      end
      for (int a = 0; a < 2; a++) begin
        automatic real yr = nz(), yi = nz();
        for (int j = 0; j < 2; j++) begin
          yr += (hq_re[k][a][j] * sr[k][j] - hq_im[k][a][j] * si[k][j]) / 32768.0 / 4096.0;
          yi += (hq_re[k][a][j] * si[k][j] + hq_im[k][a][j] * sr[k][j]) / 32768.0 / 4096.0;
        end
        yq_re[k][a] = $rtoi(yr * 32768.0); yq_im[k][a] = $rtoi(yi * 32768.0);
      end
      model(k);
    end
    repeat (3) @(posedge clk); rst_n = 1;
    @(posedge clk); frame_start <= 1; @(posedge clk); frame_start <= 0;
    for (int a = 0; a < 2; a++)
      for (int k = 0; k < 64; k++)
        q.push_back({2'(a), 6'(k), 16'(yq_re[k][a]), 16'(yq_im[k][a])});
    repeat (5) @(posedge clk);
    checks++;
    if (ndet != 0 || q.size() != 128) begin failures++; $display("detector ran before G was ready"); end
    pre_start <= 1; @(posedge clk); pre_start <= 0;
    wait (ndet == 64);
    repeat (3) @(posedge clk);
    checks++;
    if (t_wr - t_pre != 13) begin failures++; $display("request-to-G latency %0d", t_wr - t_pre); end
    checks++;
    if (t_ready - t_pre != 76) begin failures++; $display("g_ready after %0d", t_ready - t_pre); end
    checks++;
    if (nk0 == 0 || nk1 == 0) begin failures++; $display("orders used: %0d / %0d", nk0, nk1); end
    checks++;
    if (q.size() != 0) begin failures++; $display("FIFO not drained"); end
    $display("orders: stream 1 first %0d, stream 2 first %0d", nk0, nk1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
