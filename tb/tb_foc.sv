// Testbench of frequency offset compensation: a time-multiplexed stream
// of four antennas, each a constant phasor, is rotated by the block;
// every output must equal x * exp(-j*n*dphi) (n = sample period since
// `clear`), computed here with $cos/$sin, within the error of the
// 256-entry table (2*pi/256 of the amplitude). Antenna order, the one-
// clock latency and the restart on `clear` are checked too.
module tb_foc;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, x_valid, y_valid;
  logic [1:0] ant, y_ant;
  logic [15:0] dphi;
  cplx_t x_in, y_out;
  foc dut (.*);

  real pi = 3.14159265358979;
  real xr [4] = '{10000.0, 0.0, -7071.0, 3000.0};
  real xi [4] = '{0.0, 10000.0, 7071.0, -9000.0};
  int period = 0, nsamp = 0;
  logic prev_v = 0; logic [1:0] prev_a = 0; int prev_p = 0;

  always @(posedge clk) if (rst_n) begin
    if (y_valid) begin
      automatic real ph = 2.0 * pi * real'(prev_p) * real'(dphi) / 65536.0;
      automatic real er = xr[y_ant] * $cos(ph) + xi[y_ant] * $sin(ph);
      automatic real ei = xi[y_ant] * $cos(ph) - xr[y_ant] * $sin(ph);
      checks++;
      if (er - y_out.re > 300 || y_out.re - er > 300 || ei - y_out.im > 300 || y_out.im - ei > 300
          || !prev_v || y_ant != prev_a) begin
        failures++;
        if (failures < 8) $display("period %0d ant %0d got %0d,%0d want %f,%f", prev_p, y_ant,
                                   y_out.re, y_out.im, er, ei);
      end
    end
    prev_v <= x_valid; prev_a <= ant; prev_p <= nsamp / 4;
    if (clear) nsamp <= 0; else if (x_valid) nsamp <= nsamp + 1;
  end

  initial begin
    #400000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    clear = 0; x_valid = 0; ant = 0; dphi = 16'd1234; x_in = '0;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int r = 0; r < 2; r++) begin
      clear <= 1; period = 0; @(posedge clk); clear <= 0;
      for (int n = 0; n < 200; n++) begin
        for (int a = 0; a < 4; a++) begin
          x_valid <= 1; ant <= 2'(a);
          x_in <= '{re: 16'($rtoi(xr[a])), im: 16'($rtoi(xi[a]))};
          @(posedge clk);
        end
        period = n + 1;
      end
      x_valid <= 0; @(posedge clk); @(posedge clk);
      dphi = 16'hF100;   // negative offset for the second run
    end
    checks++;
    if (checks != 1601) begin failures++; $display("checks %0d", checks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
