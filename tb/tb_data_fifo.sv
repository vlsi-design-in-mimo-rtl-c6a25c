// Testbench of the data FIFO: random pushes and pops compared with a
// queue model, filling to full to see the overflow flag and the
// dropped word, then draining to empty.
module tb_data_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int DEPTH = 16;
  logic clr, wr_en, rd_en, full, empty, overflow;
  logic [39:0] wr_data, rd_data;
  logic [4:0] level;
  data_fifo #(.DW(40), .DEPTH(DEPTH)) dut (.*);

  logic [39:0] m [$];

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic step(bit w, bit r);
    wr_en <= w; rd_en <= r && !empty; wr_data <= {$urandom, 8'($urandom)};
    @(posedge clk); #1;
  endtask

  always @(posedge clk) if (rst_n) begin
    automatic bit room = (m.size() < DEPTH);
    if (rd_en) begin
      checks++;
      if (m.size() == 0 || rd_data != m[0]) begin failures++; $display("read mismatch"); end
      else void'(m.pop_front());
    end
    if (wr_en && room) m.push_back(wr_data);
  end

  initial begin
    clr = 0; wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int i = 0; i < 300; i++) step($urandom_range(0, 1), $urandom_range(0, 1));
    clr <= 1; step(0, 0); clr <= 0;
    // fill
    while (!full) step(1, 0);
    checks++; if (overflow) begin failures++; $display("overflow too early"); end
    checks++; if (level != 5'(DEPTH)) begin failures++; $display("level %0d", level); end
    step(1, 0);
    checks++; if (!overflow) begin failures++; $display("no overflow flag"); end
    clr <= 1; step(0, 0); clr <= 0;
    checks++; if (overflow) begin failures++; $display("overflow not cleared"); end
    while (!empty) step(0, 1);
    step(0, 0);
    checks++; if (m.size() != 0) begin failures++; $display("model not empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
