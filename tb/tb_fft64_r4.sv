// Testbench of the shared radix-4 I/FFT: six blocks streamed back to
// back at one sample per clock (four forward, two inverse), every
// output compared with a direct DFT computed here in real arithmetic
// (forward: DFT/64, inverse: IDFT/64 * 64 / 64 = normalised IDFT).
// Also checks that the engine never stalls the input stream (the rate
// that lets four antennas share it) and the latency of the last block.
module tb_fft64_r4;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cplx_t in_data, out_data;
  logic in_valid, in_ready, inv, out_valid, out_last, busy;
  logic [1:0] in_tag, out_tag;
  logic [5:0] out_idx;

  fft64_r4 dut (.*);

  localparam int NB = 6;
  int xr [NB][64], xi [NB][64];
  bit binv [NB];
  real pi = 3.14159265358979;
  int nout = 0, stalls = 0, blocks_out = 0;
  longint t_first_in, t_last_out, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    #2000000; failures++; $display("watchdog"); 
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reference check of each output
  always @(posedge clk) if (out_valid) begin
    automatic real er = 0, ei = 0, ang;
    automatic int b = blocks_out;
    for (int n = 0; n < 64; n++) begin
      ang = (binv[b] ? 2.0 : -2.0) * pi * n * out_idx / 64.0;
      er += (xr[b][n] * $cos(ang) - xi[b][n] * $sin(ang)) / 64.0;
      ei += (xr[b][n] * $sin(ang) + xi[b][n] * $cos(ang)) / 64.0;
    end
    checks++;
    if ((er - out_data.re) > 12.0 || (out_data.re - er) > 12.0 ||
        (ei - out_data.im) > 12.0 || (out_data.im - ei) > 12.0 || out_tag != 2'(b % 4)) begin
      failures++;
      if (failures < 10) $display("block %0d tone %0d: got %0d,%0d want %f,%f", b, out_idx,
                                  out_data.re, out_data.im, er, ei);
    end
    nout++;
    if (out_last) begin blocks_out++; t_last_out = cyc; end
  end

  initial begin
    in_valid = 0; in_data = '0; in_tag = 0; inv = 0;
    for (int b = 0; b < NB; b++) begin
      binv[b] = (b >= 4);
      for (int n = 0; n < 64; n++) begin
        xr[b][n] = (b == 0) ? ((n == 3) ? 16000 : 0) : $signed($urandom_range(0, 16000)) - 8000;
        xi[b][n] = (b == 0) ? 0 : $signed($urandom_range(0, 16000)) - 8000;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    t_first_in = cyc;
    for (int b = 0; b < NB; b++)
      for (int n = 0; n < 64; n++) begin
        in_valid <= 1; in_data <= '{re: 16'(xr[b][n]), im: 16'(xi[b][n])};
        in_tag <= 2'(b % 4); inv <= binv[b];
        @(posedge clk);
        while (!in_ready) begin stalls++; @(posedge clk); end
      end
    in_valid <= 0;
    wait (blocks_out == NB);
    repeat (3) @(posedge clk);
    checks++;
    if (nout != NB * 64) begin failures++; $display("outputs %0d", nout); end
    checks++;
    if (stalls != 0) begin failures++; $display("input stalled %0d clocks", stalls); end
    // last block: loaded by 6*64, 48 compute, then 64 unload clocks
    checks++;
    if (t_last_out - t_first_in > NB * 64 + 48 + 64 + 6) begin
      failures++; $display("latency %0d", t_last_out - t_first_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
