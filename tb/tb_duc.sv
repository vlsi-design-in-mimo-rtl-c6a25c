// Testbench of the digital up-converter: complex baseband samples, one
// every fourth clock, must appear on the 20 MHz IF as
// Re{x * exp(j*pi*n/2)}: re, -im, -re, +im on the four clocks that
// follow each sample. Checked for random samples.
module tb_duc;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cplx_t x_in;
  logic x_valid;
  logic signed [15:0] y_out;
  duc dut (.*);

  initial begin
    #400000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  cplx_t smp [101];
  initial begin
    int want [4];
    x_valid = 0; x_in = '0;
    for (int i = 0; i < 101; i++)
      smp[i] = '{re: 16'($urandom_range(0, 20000) - 10000), im: 16'($urandom_range(0, 20000) - 10000)};
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    x_valid <= 1; x_in <= smp[0];
    for (int i = 0; i < 100; i++) begin
      want = '{smp[i].re, -smp[i].im, -smp[i].re, smp[i].im};
      for (int k = 0; k < 4; k++) begin
        @(posedge clk); #1;
        x_valid <= (k == 3); x_in <= (k == 3) ? smp[i+1] : '0;
        checks++;
        if (y_out != 16'(want[k])) begin
          failures++; if (failures < 6) $display("sample %0d phase %0d got %0d want %0d", i, k, y_out, want[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
