// Testbench of the 2x2 zero-forcing inverse pipeline: random channel
// matrices, one per clock, each result compared with the inverse
// computed here in real arithmetic; checks the 8-clock latency, the
// tag, and that a singular matrix gives G = 0.
module tb_zf_inverse;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, out_valid;
  logic [5:0] in_tag, out_tag;
  cplx_t h [2][2];
  logic signed [23:0] g_re [2][2];
  logic signed [23:0] g_im [2][2];
  zf_inverse dut (.*);

  localparam int N = 40;
  real hr [N][2][2], hi [N][2][2];
  longint t_in [N], cyc = 0;
  int got = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (in_valid) t_in[in_tag] = cyc;

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (out_valid) begin
    automatic int k = int'(out_tag);
    automatic real dr, di, dd, er, ei, ar, ai;
    checks++;
    if (cyc - t_in[k] != 8) begin failures++; $display("latency %0d", cyc - t_in[k]); end
    dr = hr[k][0][0]*hr[k][1][1] - hi[k][0][0]*hi[k][1][1] - hr[k][0][1]*hr[k][1][0] + hi[k][0][1]*hi[k][1][0];
    di = hr[k][0][0]*hi[k][1][1] + hi[k][0][0]*hr[k][1][1] - hr[k][0][1]*hi[k][1][0] - hi[k][0][1]*hr[k][1][0];
    dd = dr*dr + di*di;
    for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) begin
      // adjugate entry
      if (i == j) begin ar = hr[k][1-i][1-i]; ai = hi[k][1-i][1-i]; end
      else begin ar = -hr[k][i][j]; ai = -hi[k][i][j]; end
      if (dd == 0) begin er = 0; ei = 0; end
      else begin
        er = (ar*dr + ai*di) / dd * 4096.0 * 32768.0;
        ei = (ai*dr - ar*di) / dd * 4096.0 * 32768.0;
      end
      checks++;
      if ((er - g_re[i][j]) > 2.0 + 0.01*(er < 0 ? -er : er) || (g_re[i][j] - er) > 2.0 + 0.01*(er < 0 ? -er : er) ||
          (ei - g_im[i][j]) > 2.0 + 0.01*(ei < 0 ? -ei : ei) || (g_im[i][j] - ei) > 2.0 + 0.01*(ei < 0 ? -ei : ei)) begin
        failures++;
        if (failures < 8) $display("m%0d g%0d%0d got %0d,%0d want %f,%f", k, i, j, g_re[i][j], g_im[i][j], er, ei);
      end
    end
    got++;
  end

  initial begin
    in_valid = 0; in_tag = 0;
    for (int k = 0; k < N; k++)
      for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) begin
        // matrix 5 is singular (rows equal)
        hr[k][i][j] = real'($signed($urandom_range(0, 24000)) - 12000) / 32768.0;
        hi[k][i][j] = real'($signed($urandom_range(0, 24000)) - 12000) / 32768.0;
      end
    for (int j = 0; j < 2; j++) begin hr[5][1][j] = hr[5][0][j]; hi[5][1][j] = hi[5][0][j]; end
    for (int k = 0; k < N; k++) for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) begin
      hr[k][i][j] = real'($rtoi(hr[k][i][j] * 32768.0)); hi[k][i][j] = real'($rtoi(hi[k][i][j] * 32768.0));
    end
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int k = 0; k < N; k++) begin
      in_valid <= 1; in_tag <= 6'(k);
      for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++)
        h[i][j] <= '{re: 16'($rtoi(hr[k][i][j])), im: 16'($rtoi(hi[k][i][j]))};
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (12) @(posedge clk);
    checks++;
    if (got != N) begin failures++; $display("got %0d results", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
