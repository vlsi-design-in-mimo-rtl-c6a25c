// Testbench of frame start detection: two antennas reporting a power
// rise, or periodicity alone, must not start a frame; three of four
// within the window plus periodicity must, exactly once, and only
// after frame_end may a new frame start. Reports too old (outside the
// window) must not count.
module tb_fsd;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] pwr_rise;
  logic periodic, frame_end, frame_start, in_frame;
  fsd #(.WINDOW(64)) dut (.*);

  int nstart = 0;
  always @(posedge clk) if (rst_n && frame_start) nstart++;

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic pulse(logic [3:0] p);
    pwr_rise <= p; @(posedge clk); pwr_rise <= '0;
  endtask
  task automatic expect_starts(int n, string what);
    repeat (3) @(posedge clk);
    checks++;
    if (nstart != n) begin failures++; $display("%s: %0d starts, want %0d", what, nstart, n); end
  endtask

  initial begin
    pwr_rise = 0; periodic = 0; frame_end = 0;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    pulse(4'b0011); periodic <= 1; repeat (5) @(posedge clk);
    expect_starts(0, "two antennas");
    periodic <= 0; repeat (70) @(posedge clk);       // reports expire
    pulse(4'b0100); periodic <= 1; repeat (5) @(posedge clk);
    expect_starts(0, "expired reports");
    periodic <= 0;
    pulse(4'b1000); pulse(4'b0001); repeat (5) @(posedge clk);
    expect_starts(0, "three antennas, no periodicity");
    periodic <= 1; repeat (2) @(posedge clk);
    expect_starts(1, "three antennas and periodicity");
    checks++; if (!in_frame) begin failures++; $display("in_frame low"); end
    pulse(4'b1111); repeat (5) @(posedge clk);
    expect_starts(1, "inside a frame");
    frame_end <= 1; @(posedge clk); frame_end <= 0; periodic <= 0;
    repeat (2) @(posedge clk);
    checks++; if (in_frame) begin failures++; $display("in_frame stuck"); end
    pulse(4'b0111); periodic <= 1; repeat (3) @(posedge clk);
    expect_starts(2, "second frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
