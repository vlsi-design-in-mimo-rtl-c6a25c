// Testbench of the two-stage AGC with a model of the analog gain stage
// (gain 2^((again-16)/4), i.e. 1.5 dB per code) and the ADC (12 bits,
// clipping). An idle noise floor is followed by a 20 MHz IF burst,
// once weak (amplitude 100) and once strong (amplitude 1500). Checks:
// one power-rise pulse per burst within two 32-sample windows, analog
// gain moved in the right direction, `locked` exactly 256 clocks
// (3.2 us at 80 MHz) after the rise, the mean output magnitude then
// between ref/4 and 2*ref, and a return to idle on release.
module tb_agc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [11:0] x_in;
  logic [11:0] ref_level;
  logic start_i, release_i, pwr_rise, locked;
  logic signed [15:0] x_out;
  logic [4:0] again;
  logic [2:0] dshift;
  agc dut (.*);

  real pi = 3.14159265358979;
  real amp = 0;
  longint n = 0, t_rise = -1, t_lock = -1, t_burst = 0;
  int nrise = 0;
  always @(posedge clk) n <= n + 1;

  // analog front end and ADC model
  always_comb begin
    automatic real v = (amp * $cos(pi / 2.0 * n + 0.4) + 4.0 * $sin(0.37 * n * n))
                       * $pow(2.0, (real'(again) - 16.0) / 4.0);
    if (v > 2047.0) v = 2047.0;
    if (v < -2048.0) v = -2048.0;
    x_in = 12'($rtoi(v));
  end

  always @(posedge clk) if (rst_n) begin
    if (pwr_rise) begin nrise++; t_rise = n; end
    if (locked && t_lock < 0) t_lock = n;
  end

  initial begin
    #400000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic burst(real a, bit up);
    real acc;
    logic [4:0] g0;
    g0 = again; t_rise = -1; t_lock = -1; nrise = 0;
    amp = a; t_burst = n;
    repeat (400) @(posedge clk);
    checks++;
    if (nrise != 1 || t_rise - t_burst > 66) begin failures++; $display("rise pulses %0d at %0d", nrise, t_rise - t_burst); end
    checks++;
    if (up ? (again <= g0) : (again >= g0)) begin failures++; $display("analog gain %0d -> %0d", g0, again); end
    checks++;
    if (t_lock - t_rise != 256) begin failures++; $display("locked %0d clocks after rise", t_lock - t_rise); end
    acc = 0;
    for (int i = 0; i < 256; i++) begin
      @(posedge clk); acc += (x_out < 0) ? -real'(x_out) : real'(x_out);
    end
    acc /= 256.0;
    checks++;
    if (acc < ref_level / 4.0 || acc > 2.0 * ref_level) begin failures++; $display("level %f", acc); end
    release_i <= 1; amp = 0; @(posedge clk); release_i <= 0;
    repeat (2) @(posedge clk);
    checks++;
    if (locked || dshift != 0) begin failures++; $display("no return to idle"); end
    repeat (200) @(posedge clk);
  endtask

  initial begin
    ref_level = 12'd512; release_i = 0; start_i = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (200) @(posedge clk);
    burst(100.0, 1);
    burst(1500.0, 0);
    // a slow ramp must still be seen as a rise (floor does not follow it)
    t_rise = -1; nrise = 0;
    for (int i = 1; i <= 8; i++) begin amp = 20.0 * i; repeat (8) @(posedge clk); end
    repeat (300) @(posedge clk);
    checks++;
    if (nrise != 1) begin failures++; $display("ramp: %0d rise pulses", nrise); end
    release_i <= 1; amp = 0; @(posedge clk); release_i <= 0;
    repeat (300) @(posedge clk);
    // frame start forces acquisition without a rise of its own
    t_lock = -1; nrise = 0; t_burst = n;
    start_i <= 1; @(posedge clk); start_i <= 0;
    repeat (300) @(posedge clk);
    checks++;
    if (nrise != 0 || t_lock - t_burst < 255 || t_lock - t_burst > 258) begin
      failures++; $display("forced start: rises %0d, locked after %0d", nrise, t_lock - t_burst);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
