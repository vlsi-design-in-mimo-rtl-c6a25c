// Testbench of the MIMO detection unit: a channel memory and the data
// FIFO are modelled here. Random 2x2 channels per tone, random QPSK
// symbol pairs s sent as y = H s (computed here in real arithmetic and
// rounded to Q15). Checks the 11-clock preprocessing latency (from the
// preprocessing request to the first G written), g_ready after all 64 tones, and that every
// detected pair matches s, tone by tone.
module tb_mimo_detector;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic frame_start, pre_start, g_ready, pre_wr, fifo_empty, fifo_rd, det_valid;
  logic [5:0] h_idx, det_idx;
  cplx_t h [2][2];
  cplx_t det_s [2];
  logic [39:0] fifo_data;
  mimo_detector dut (.*);

  real hr [64][2][2], hi [64][2][2];
  int sr [64][2], si [64][2];
  logic [39:0] q [$];
  longint cyc = 0, t_wr = -1, t_pre = 0, t_ready = -1;
  int ndet = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // channel memory model: combinational read
  always_comb for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++)
    h[i][j] = '{re: 16'($rtoi(hr[h_idx][i][j] * 32768.0)), im: 16'($rtoi(hi[h_idx][i][j] * 32768.0))};

  // FIFO model (first word fall through)
  assign fifo_empty = (q.size() == 0);
  assign fifo_data  = fifo_empty ? 40'd0 : q[0];
  always @(posedge clk) if (fifo_rd && q.size() > 0) void'(q.pop_front());

  always @(posedge clk) begin
    if (pre_start) t_pre = cyc;
    if (pre_wr && t_wr < 0) t_wr = cyc;
    if (g_ready && t_ready < 0) t_ready = cyc;
    if (det_valid && rst_n) begin
      ndet++;
      for (int i = 0; i < 2; i++) begin
        checks++;
        if (det_s[i].re - sr[det_idx][i] > 40 || sr[det_idx][i] - det_s[i].re > 40 ||
            det_s[i].im - si[det_idx][i] > 40 || si[det_idx][i] - det_s[i].im > 40) begin
          failures++;
          if (failures < 8) $display("tone %0d s%0d got %0d,%0d want %0d,%0d", det_idx, i,
                                     det_s[i].re, det_s[i].im, sr[det_idx][i], si[det_idx][i]);
        end
      end
    end
  end

  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [39:0] word(int tag, int k, real re, real im);
    return {2'(tag), 6'(k), 16'($rtoi(re * 32768.0)), 16'($rtoi(im * 32768.0))};
  endfunction

  initial begin
    frame_start = 0; pre_start = 0;
    for (int k = 0; k < 64; k++) begin
      for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) begin
        hr[k][i][j] = (real'($urandom_range(0, 400)) - 200.0) / 1000.0;
        hi[k][i][j] = (real'($urandom_range(0, 400)) - 200.0) / 1000.0;
      end
      hr[k][0][0] += 0.5; hr[k][1][1] += 0.5;   // keep the matrices well conditioned
      for (int i = 0; i < 2; i++) begin
        sr[k][i] = $urandom_range(0, 1) ? 2896 : -2896;
        si[k][i] = $urandom_range(0, 1) ? 2896 : -2896;
      end
    end
    repeat (3) @(posedge clk); rst_n = 1;
    @(posedge clk); frame_start <= 1; @(posedge clk); frame_start <= 0;
    // data for all tones, receive antenna 0 first, then 1; it waits in the FIFO
    for (int a = 0; a < 2; a++)
      for (int k = 0; k < 64; k++) begin
        automatic real yr = 0, yi = 0;
        for (int j = 0; j < 2; j++) begin
          yr += hr[k][a][j] * sr[k][j] / 4096.0 - hi[k][a][j] * si[k][j] / 4096.0;
          yi += hr[k][a][j] * si[k][j] / 4096.0 + hi[k][a][j] * sr[k][j] / 4096.0;
        end
        q.push_back(word(a, k, yr, yi));
      end
    repeat (5) @(posedge clk);
    checks++;
    if (ndet != 0 || q.size() != 128) begin failures++; $display("detector ran before G was ready"); end
    pre_start <= 1; @(posedge clk); pre_start <= 0;
    wait (ndet == 64);
    repeat (3) @(posedge clk);
    checks++;
    if (t_wr - t_pre != 11) begin failures++; $display("request-to-G latency %0d", t_wr - t_pre); end
    checks++;
    if (t_ready - t_pre != 74) begin failures++; $display("g_ready after %0d", t_ready - t_pre); end
    checks++;
    if (q.size() != 0) begin failures++; $display("FIFO not drained"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
