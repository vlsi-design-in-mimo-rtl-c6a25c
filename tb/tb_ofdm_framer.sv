// Testbench of the framer: after `sync`, three symbols of 80 sample
// periods (4 antennas each, one sample per clock) are fed; every
// output must be sample 16+n of the right symbol and antenna, in
// antenna-then-sample order, with out_last every 64. Random back-
// pressure is applied to the first symbols; each symbol must be fully
// read within one symbol period (320 clocks). Holding the output back
// for a whole symbol must raise the overflow flag.
module tb_ofdm_framer;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic sync, stop, x_valid, out_valid, out_ready, out_last, ovf;
  logic [1:0] x_ant, out_ant;
  cplx_t x_in, out_data;
  logic [7:0] sym_cnt;
  ofdm_framer dut (.*);

  int nout = 0, hold_off = 0;
  longint cyc = 0, t_done [4];
  always @(posedge clk) cyc <= cyc + 1;

  function automatic cplx_t val(int s, int a, int n);
    return '{re: 16'(s * 1000 + n), im: 16'(a)};
  endfunction

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    automatic int s = nout / 256, a = (nout / 64) % 4, n = nout % 64;
    checks++;
    if (out_data != val(s, a, n + 16) || out_ant != 2'(a) || out_last != (n == 63)) begin
      failures++;
      if (failures < 8) $display("out %0d: got %0d/%0d want %0d/%0d", nout, out_data.re, out_data.im,
                                 val(s, a, n + 16).re, a);
    end
    nout++;
    if (nout % 256 == 0) t_done[s] = cyc;
  end

  initial begin
    #400000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) out_ready <= hold_off ? 1'b0 : ($urandom_range(0, 7) != 0);

  longint t_sym_end [4];
  initial begin
    sync = 0; stop = 0; x_valid = 0; x_ant = 0; x_in = '0;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    sync <= 1; @(posedge clk); sync <= 0;
    for (int s = 0; s < 4; s++) begin
      if (s == 3) hold_off = 1;
      for (int n = 0; n < 80; n++)
        for (int a = 0; a < 4; a++) begin
          x_valid <= 1; x_ant <= 2'(a); x_in <= val(s, a, n);
          @(posedge clk);
        end
      t_sym_end[s] = cyc;
      if (s == 2) hold_off = 1;
    end
    x_valid <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (sym_cnt != 8'd4) begin failures++; $display("sym_cnt %0d", sym_cnt); end
    checks++;
    if (!ovf) begin failures++; $display("no overflow flagged"); end
    for (int s = 0; s < 2; s++) begin
      checks++;
      if (t_done[s] - t_sym_end[s] > 320) begin failures++; $display("symbol %0d read too slowly", s); end
    end
    checks++;
    if (nout < 512) begin failures++; $display("only %0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
