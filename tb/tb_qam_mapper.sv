// Testbench of the QAM mapper: every bit pattern of every mode is
// mapped and compared with the IEEE 802.11a Gray levels, written here
// as tables, times the normalisation factor round(4096/sqrt(E)).
module tb_qam_mapper;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [5:0] bits;
  mod_t mode;
  logic in_valid, out_valid;
  cplx_t sym;
  qam_mapper dut (.*);

  int g2 [4] = '{-3, -1, 3, 1};                    // index = b0*2 + b1
  int g3 [8] = '{-7, -5, -1, -3, 7, 5, 1, 3};      // index = b0*4 + b1*2 + b2

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int wi, wq, k;
    bits = 0; mode = MOD_BPSK; in_valid = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int m = 0; m < 4; m++)
      for (int b = 0; b < 64; b++) begin
        bits <= 6'(b); mode <= mod_t'(m); in_valid <= 1;
        @(posedge clk); #1;
        unique case (m)
          0: begin k = $rtoi(4096.0 + 0.5); wi = b[0] ? 1 : -1; wq = 0; end
          1: begin k = $rtoi(4096.0 / $sqrt(2.0) + 0.5); wi = b[0] ? 1 : -1; wq = b[1] ? 1 : -1; end
          2: begin k = $rtoi(4096.0 / $sqrt(10.0) + 0.5); wi = g2[b[0]*2 + b[1]]; wq = g2[b[2]*2 + b[3]]; end
          default: begin k = $rtoi(4096.0 / $sqrt(42.0) + 0.5);
                   wi = g3[b[0]*4 + b[1]*2 + b[2]]; wq = g3[b[3]*4 + b[4]*2 + b[5]]; end
        endcase
        checks++;
        if (sym.re != 16'(wi * k) || sym.im != 16'(wq * k) || !out_valid) begin
          failures++;
          if (failures < 8) $display("mode %0d bits %b: got %0d,%0d want %0d,%0d", m, 6'(b),
                                     sym.re, sym.im, wi * k, wq * k);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
