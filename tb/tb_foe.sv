// Testbench of frequency offset estimation. Phase 1: all four antennas
// receive a signal that repeats every 16 samples (random pattern) with
// a frequency offset f = 0.004 cycles/sample; the estimate must be
// dphi = f * 65536 = 262 +/- 4 and `periodic` must be set. Phase 2:
// antenna 1 carries 8x the amplitude of antenna 0 and reports digital
// AGC shift 3 (gain 8), with offsets 0.003 and 0.006: after the
// weighting both count equally, so dphi must be the mean, 295 +/- 6.
// Phase 3: random noise must clear `periodic`.
module tb_foe;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cplx_t x_in;
  logic x_valid, periodic, est_valid;
  logic [1:0] ant;
  logic [2:0] dshift [4];
  logic [7:0] thr;
  logic [15:0] dphi;
  foe dut (.*);

  real pi = 3.14159265358979;
  real pr [16], pim [16];
  int nest = 0;
  always @(posedge clk) if (rst_n && est_valid) nest++;

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(int periods, real amp [4], real f [4], bit noise);
    for (int n = 0; n < periods; n++)
      for (int a = 0; a < 4; a++) begin
        automatic real ph = 2.0 * pi * f[a] * n;
        automatic real r = pr[n % 16], i = pim[n % 16];
        if (noise) begin
          r = real'($urandom_range(0, 2000)) / 1000.0 - 1.0;
          i = real'($urandom_range(0, 2000)) / 1000.0 - 1.0;
        end
        x_valid <= 1; ant <= 2'(a);
        x_in <= '{re: 16'($rtoi(amp[a] * (r * $cos(ph) - i * $sin(ph)))),
                  im: 16'($rtoi(amp[a] * (r * $sin(ph) + i * $cos(ph))))};
        @(posedge clk);
      end
    x_valid <= 0;
    repeat (25) @(posedge clk);
  endtask

  task automatic expect_dphi(int want, int tol, bit per, string what);
    checks++;
    if ($signed(dphi) - want > tol || want - $signed(dphi) > tol || periodic != per) begin
      failures++; $display("%s: dphi %0d (want %0d) periodic %0d", what, $signed(dphi), want, periodic);
    end
  endtask

  initial begin
    real amp [4], f [4];
    x_valid = 0; ant = 0; x_in = '0; thr = 8'd128;
    for (int a = 0; a < 4; a++) dshift[a] = 0;
    for (int k = 0; k < 16; k++) begin
      pr[k]  = real'($urandom_range(0, 2000)) / 1000.0 - 1.0;
      pim[k] = real'($urandom_range(0, 2000)) / 1000.0 - 1.0;
    end
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    amp = '{2000.0, 2000.0, 2000.0, 2000.0}; f = '{0.004, 0.004, 0.004, 0.004};
    run(160, amp, f, 0);
    expect_dphi(262, 4, 1, "common offset");
    amp = '{1000.0, 8000.0, 0.0, 0.0}; f = '{0.003, 0.006, 0.0, 0.0};
    dshift[1] = 3'd3;
    run(160, amp, f, 0);
    expect_dphi(295, 6, 1, "weighted antennas");
    dshift[1] = 3'd0;
    amp = '{2000.0, 2000.0, 2000.0, 2000.0};
    run(160, amp, f, 1);
    checks++;
    if (periodic) begin failures++; $display("noise declared periodic"); end
    checks++;
    if (nest != 30) begin failures++; $display("%0d estimates, want 30", nest); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
