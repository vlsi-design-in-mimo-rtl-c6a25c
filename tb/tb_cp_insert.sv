// Testbench of cyclic-prefix insertion: a symbol written in digit-
// reversed order must come out as its last 16 samples followed by all
// 64, one per strobe (every fourth clock), twice in a row; `full`
// must block until the previous symbol has left.
module tb_cp_insert;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cplx_t in_data, out_data;
  logic [5:0] in_idx;
  logic in_valid, in_last, full, out_en, out_valid;
  cp_insert dut (.*);

  int nout = 0, sym = 0;
  logic [1:0] ph = 0;
  always @(posedge clk) ph <= ph + 1;
  assign out_en = (ph == 0);

  function automatic cplx_t val(int s, int n);
    return '{re: 16'(1000 * s + n), im: 16'(-n)};
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int n = (nout % 80 < 16) ? 48 + nout % 80 : nout % 80 - 16;
    checks++;
    if (out_data != val(nout / 80, n)) begin
      failures++; if (failures < 8) $display("out %0d got %0d want %0d", nout, out_data.re, val(nout/80, n).re);
    end
    nout++;
  end

  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; in_last = 0; in_idx = 0; in_data = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 2; s++) begin
      while (full) @(posedge clk);
      for (int u = 0; u < 64; u++) begin
        automatic int n = {u[1:0], u[3:2], u[5:4]};
        in_valid <= 1; in_idx <= 6'(n); in_data <= val(s, n); in_last <= (u == 63);
        @(posedge clk);
      end
      in_valid <= 0; in_last <= 0;
      @(posedge clk);
      checks++;
      if (!full) begin failures++; $display("not full after a symbol"); end
    end
    wait (nout == 160);
    repeat (8) @(posedge clk);
    checks++;
    if (full || nout != 160) begin failures++; $display("end state wrong"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
