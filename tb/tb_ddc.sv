// Testbench of the digital down-converter. A real tone at the 20 MHz IF
// plus 1 MHz (0.2625 cycles per 80 MHz clock) with amplitude 8000 must
// come out as a complex baseband phasor of amplitude 8000 (within 2 %,
// the filter droop at 1 MHz is 0.4 %) that advances by 18 degrees per
// output sample (1 MHz at 20 MS/s), and a tone 1 MHz below the IF must
// turn the other way. Outputs must come exactly every fourth clock.
module tb_ddc;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [15:0] x_in;
  cplx_t y_out;
  logic y_valid;
  ddc dut (.*);

  real pi = 3.14159265358979;
  real f = 0.2625;
  longint n = 0, last_v = -1;
  int nv = 0;
  real prev_ang = 0, want_step;
  always @(posedge clk) if (rst_n) n <= n + 1;
  assign x_in = 16'($rtoi(8000.0 * $cos(2.0 * pi * f * n + 0.3)));

  always @(posedge clk) if (rst_n && y_valid) begin
    automatic real mag = $sqrt(real'(y_out.re) * y_out.re + real'(y_out.im) * y_out.im);
    automatic real ang = $atan2(real'(y_out.im), real'(y_out.re));
    automatic real d = ang - prev_ang;
    if (d > pi) d -= 2 * pi;
    if (d < -pi) d += 2 * pi;
    nv++;
    if (nv > 4) begin   // after the filter has filled
      checks++;
      if (mag < 7840 || mag > 8160) begin failures++; if (failures < 6) $display("magnitude %f", mag); end
      checks++;
      if (d - want_step > 0.02 || want_step - d > 0.02) begin
        failures++; if (failures < 6) $display("phase step %f want %f", d, want_step);
      end
      checks++;
      if (n - last_v != 4) begin failures++; $display("output spacing %0d", n - last_v); end
    end
    prev_ang = ang;
    last_v = n;
  end

  initial begin
    #400000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    want_step = 2.0 * pi * 4.0 / 80.0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (400) @(posedge clk);
    f = 0.2375; want_step = -want_step; nv = 0;
    repeat (400) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
