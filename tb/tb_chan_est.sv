// Testbench of channel estimation: two training symbols (transmit
// antenna 0, then 1) arrive as FFT outputs of receive antennas 0..3 in
// digit-reversed tone order. Each received value is Y = H * L_k with a
// random H; the stored matrix must equal H on used tones and 0 on the
// 12 unused ones. L_k is the IEEE 802.11a long training sequence,
// written out here independently of the block, for tones -26..26.
module tb_chan_est;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic train_en, train_tx, fft_valid;
  cplx_t fft_data;
  logic [5:0] fft_idx, h_idx;
  logic [1:0] fft_tag;
  cplx_t h [2][2];
  chan_est dut (.*);

  int L [53] = '{1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,0,
                 1,-1,-1,1,1,-1,1,-1,1,-1,-1,-1,-1,-1,1,1,-1,-1,1,-1,1,-1,1,1,1,1};
  int hr [64][2][2], hi [64][2][2];

  function automatic int lk(int k);   // FFT bin -> L value
    int f = (k < 32) ? k : k - 64;
    if (f < -26 || f > 26) return 0;
    return L[f + 26];
  endfunction

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    train_en = 0; train_tx = 0; fft_valid = 0; fft_data = '0; fft_idx = 0; fft_tag = 0; h_idx = 0;
    for (int k = 0; k < 64; k++) for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) begin
      hr[k][i][j] = $signed($urandom_range(0, 20000)) - 10000;
      hi[k][i][j] = $signed($urandom_range(0, 20000)) - 10000;
    end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 2; t++)
      for (int a = 0; a < 4; a++)
        for (int u = 0; u < 64; u++) begin
          automatic int k = {u[1:0], u[3:2], u[5:4]};
          automatic int l = lk(k);
          train_en <= 1; train_tx <= t[0]; fft_valid <= 1; fft_idx <= 6'(k); fft_tag <= 2'(a);
          // antennas 2, 3 carry data the 2x2 estimator must ignore
          fft_data <= (a < 2) ? '{re: 16'(l == 0 ? 1234 : hr[k][a][t] * l), im: 16'(l == 0 ? -99 : hi[k][a][t] * l)}
                              : '{re: 16'(777), im: 16'(555)};
          @(posedge clk);
        end
    // data after training must not disturb the memory
    train_en <= 0; fft_data <= '{re: 16'(1), im: 16'(1)}; fft_tag <= 0; fft_idx <= 6'd5;
    @(posedge clk);
    fft_valid <= 0;
    for (int k = 0; k < 64; k++) begin
      h_idx <= 6'(k); @(posedge clk); #1;
      for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) begin
        checks++;
        if (lk(k) == 0) begin
          if (h[i][j] != '0) begin failures++; $display("unused tone %0d not zero", k); end
        end else if (h[i][j].re != 16'(hr[k][i][j]) || h[i][j].im != 16'(hi[k][i][j])) begin
          failures++;
          if (failures < 8) $display("tone %0d h%0d%0d got %0d,%0d want %0d,%0d", k, i, j,
                                     h[i][j].re, h[i][j].im, hr[k][i][j], hi[k][i][j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
