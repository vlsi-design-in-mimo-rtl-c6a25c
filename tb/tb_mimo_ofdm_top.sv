// End-to-end testbench of the MIMO-OFDM baseband at its default size.
// Receive: a two-stream transmitter, a flat 4x2 channel with a carrier
// frequency offset, the analog gain stage (1.5 dB per gain code) and
// four 12-bit ADCs on the 20 MHz IF are modelled here. The frame is:
// idle noise, a preamble repeating every 16 samples (tones at multiples
// of 4) until the receiver signals symbol timing (sym_sync), one long
// training symbol from each transmit antenna, then NDATA symbols of
// QPSK on both streams and the 52 used tones. Two frames are received,
// the first with the zero-forcing detector, the second with MMSE
// V-BLAST (detector switched over APB). Every detected symbol is
// compared with what was sent (sign decisions, and the magnitude within
// 35 %). Transmit: one QPSK symbol per stream is pushed through the
// mapper, shared IFFT, CP insertion and DUC; each DAC sample is
// compared with the IDFT computed here. Each mechanism of the design
// (power rise, analog and digital gain, frame start, offset estimate,
// symbol timing, FFT and IFFT blocks, training, ZF and MMSE V-BLAST
// preprocessing, FIFO bridging, detection, frame end, CP insertion) is counted and must
// occur. Time-domain signals are the exact band-limited OFDM waveform
// evaluated at 80 MHz.
module tb_mimo_ofdm_top;
  import mimo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic psel, penable, pwrite, pready, pslverr;
  logic [7:0] paddr;
  logic [31:0] pwdata, prdata;
  logic signed [11:0] adc [4];
  logic [4:0] again [4];
  logic signed [15:0] dac [2];
  logic [5:0] tx_bits;
  logic tx_valid, tx_ready, frame_start, sym_sync, det_valid;
  logic [5:0] det_idx;
  cplx_t det_s [2];

  mimo_ofdm_top dut (.*);

  localparam int NDATA = 2;
  real pi = 3.14159265358979;
  real FOFF = 0.002;          // carrier offset, cycles per 20 MS/s sample
  real SCALE = 250.0;         // ADC LSBs per unit of baseband amplitude
  real cre [4][2] = '{'{1.0, 0.0}, '{-0.4, 0.8}, '{0.5, -0.3}, '{0.2, 0.6}};
  real cim [4][2] = '{'{0.1, 0.3}, '{0.2, 0.2}, '{-0.4, 0.1}, '{0.5, -0.2}};

  // transmitted frequency-domain symbols: [symbol][stream][bin]
  real xr [2+NDATA][2][64], xi [2+NDATA][2][64];
  real sts_r [64], sts_i [64];
  // time samples of the current 80-sample symbol at 80 MHz: [stream][clock]
  real tr [2][320], ti [2][320];
  real L [53] = '{1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,0,
                  1,-1,-1,1,1,-1,1,-1,1,-1,-1,-1,-1,-1,1,1,-1,-1,1,-1,1,-1,1,1,1,1};

  function automatic bit used(int k);
    int f = (k < 32) ? k : k - 64;
    return f != 0 && f >= -26 && f <= 26;
  endfunction

  // band-limited waveform of a symbol (cyclic prefix included), clock c of 320
  task automatic make_symbol(int s);
    for (int j = 0; j < 2; j++)
      for (int c = 0; c < 320; c++) begin
        automatic real t = c / 4.0 - 16.0, ar = 0, ai = 0;
        for (int k = 0; k < 64; k++) if (xr[s][j][k] != 0 || xi[s][j][k] != 0) begin
          automatic int f = (k < 32) ? k : k - 64;
          automatic real ph = 2.0 * pi * f * t / 64.0;
          ar += xr[s][j][k] * $cos(ph) - xi[s][j][k] * $sin(ph);
          ai += xr[s][j][k] * $sin(ph) + xi[s][j][k] * $cos(ph);
        end
        tr[j][c] = ar / 8.0; ti[j][c] = ai / 8.0;
      end
  endtask

  // ---------------- channel, analog gain and ADC model ----------------
  longint cyc = 0;
  int mode = 0;                // 0 idle, 1 preamble, 2 frame symbols
  int pos = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always_comb begin
    for (int a = 0; a < 4; a++) begin
      automatic real br = 0, bi = 0, v, ph;
      for (int j = 0; j < 2; j++) begin
        automatic real sr = 0, si = 0;
        if (mode == 1) begin sr = sts_r[pos % 64]; si = sts_i[pos % 64]; end
        else if (mode == 2) begin sr = tr[j][pos]; si = ti[j][pos]; end
        br += cre[a][j] * sr - cim[a][j] * si;
        bi += cre[a][j] * si + cim[a][j] * sr;
      end
      // carrier offset, then up to the 20 MHz IF (a quarter of the clock)
      ph = 2.0 * pi * (FOFF * cyc / 4.0 + cyc / 4.0);
      v = (br * $cos(ph) - bi * $sin(ph)) * SCALE * $pow(2.0, (real'(again[a]) - 16.0) / 4.0)
          + real'($urandom_range(0, 4)) - 2.0;
      if (v > 2047.0) v = 2047.0;
      if (v < -2048.0) v = -2048.0;
      adc[a] = 12'($rtoi(v));
    end
  end

  // ---------------- APB ----------------
  task automatic apb_write(logic [7:0] a, logic [31:0] d);
    psel <= 1; penable <= 0; pwrite <= 1; paddr <= a; pwdata <= d; @(posedge clk);
    penable <= 1; @(posedge clk);
    psel <= 0; penable <= 0; pwrite <= 0; @(posedge clk);
  endtask
  task automatic apb_read(logic [7:0] a, output logic [31:0] d);
    psel <= 1; penable <= 0; pwrite <= 0; paddr <= a; @(posedge clk);
    penable <= 1; #1 d = prdata; @(posedge clk);
    psel <= 0; penable <= 0; @(posedge clk);
  endtask

  // ---------------- mechanism counters ----------------
  int n_rise = 0, n_again = 0, n_dgain = 0, n_fstart = 0, n_sync = 0, n_fft = 0, n_ifft = 0,
      n_train = 0, n_pre = 0, n_bridge = 0, n_det = 0, n_fend = 0, n_cp = 0, n_foc = 0, n_mmse = 0;
  always @(posedge clk) if (rst_n) begin
    if (|dut.pwr_rise) n_rise++;
    if (again[0] != 5'd16) n_again++;
    if (dut.dshift[0] != 0) n_dgain++;
    if (frame_start) n_fstart++;
    if (sym_sync) n_sync++;
    if (dut.f_out_v && dut.f_last) begin if (dut.tx_mode) n_ifft++; else n_fft++; end
    if (dut.f_out_v && !dut.tx_mode && dut.fsym < 2) n_train++;
    if (dut.pre_start && !dut.det_mmse) n_pre++;
    if (!dut.q_empty && !(dut.det_mmse ? dut.mm_ready : dut.zf_ready)) n_bridge++;
    if (dut.pre_start && dut.det_mmse) n_mmse++;
    if (det_valid) n_det++;
    if (dut.frame_end) n_fend++;
    if (dut.g_tx[0].cp_v) n_cp++;
    if (dut.c_v && dut.dphi_hold != 0) n_foc++;
  end

  // ---------------- detection check ----------------
  int nd = 0, nerr = 0;
  always @(posedge clk) if (rst_n && det_valid) begin
    automatic int s = 2 + nd / 64;
    automatic int k = det_idx;
    if (used(k) && s < 2 + NDATA)
      for (int j = 0; j < 2; j++) begin
        automatic real wr = xr[s][j][k] * 4096.0, wi = xi[s][j][k] * 4096.0;
        automatic bit bad = (det_s[j].re < 0) != (wr < 0) || (det_s[j].im < 0) != (wi < 0);
        automatic real er = det_s[j].re - wr, ei = det_s[j].im - wi;
        bad |= (er * er + ei * ei) > 0.35 * 0.35 * (wr * wr + wi * wi);
        checks++;
        if (bad) begin
          failures++; nerr++;
          if (nerr < 8) $display("symbol %0d tone %0d stream %0d: got %0d,%0d want %0d,%0d", s, k, j,
                                 det_s[j].re, det_s[j].im, $rtoi(wr), $rtoi(wi));
        end
      end
    nd++;
  end

  // ---------------- transmit check ----------------
  int tx_m [2] = '{-1, -1}, tx_ph [2] = '{0, 0}, ntx = 0;
  real txr [2][64], txi [2][64];
  bit tx_check = 0;
  for (genvar g = 0; g < 2; g++) begin : g_txchk
    always @(posedge clk) if (rst_n && tx_check) begin
      if (tx_m[g] >= 0 && tx_m[g] < 80 && tx_ph[g] < 4) begin
        automatic int t = (tx_m[g] < 16) ? tx_m[g] + 48 : tx_m[g] - 16;
        automatic real ar = 0, ai = 0, w;
        for (int k = 0; k < 64; k++) begin
          automatic real p = 2.0 * pi * k * t / 64.0;
          ar += txr[g][k] * $cos(p) - txi[g][k] * $sin(p);
          ai += txr[g][k] * $sin(p) + txi[g][k] * $cos(p);
        end
        ar = ar * 4096.0 / 64.0 * 16.0; ai = ai * 4096.0 / 64.0 * 16.0;
        w = (tx_ph[g] == 0) ? ar : (tx_ph[g] == 1) ? -ai : (tx_ph[g] == 2) ? -ar : ai;
        checks++;
        if (w - dac[g] > 150 || dac[g] - w > 150) begin
          failures++;
          if (failures < 12) $display("tx stream %0d sample %0d phase %0d: got %0d want %f", g, tx_m[g], tx_ph[g], dac[g], w);
        end
        if (g == 0) ntx++;
      end
      tx_ph[g] = tx_ph[g] + 1;
      if (dut.g_tx[g].cp_v) begin tx_m[g] = tx_m[g] + 1; tx_ph[g] = 0; end
    end
  end

  initial begin
    #20000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // one received frame: idle, preamble until symbol timing, two training
  // symbols and NDATA data symbols; then status and offset checks
  task automatic receive_frame(int fr);
    logic [31:0] d;
    nd = 0;
    repeat (400) @(posedge clk);
    // preamble until symbol timing
    mode = 1; pos = 0;
    while (!sym_sync) begin @(posedge clk); pos = pos + 1; end
    $display("frame start after %0d clocks of preamble", pos);
    // training and data symbols
    for (int s = 0; s < 2 + NDATA; s++) begin
      make_symbol(s);
      mode = 2;
      for (int c = 0; c < 320; c++) begin pos = c; @(posedge clk); end
    end
    mode = 0;
    wait (nd >= 64 * NDATA);
    wait (n_fend > fr);
    repeat (10) @(posedge clk);
    apb_read(8'h10, d);
    checks++; if (d[15:8] != 8'(2 + NDATA) || d[0] || d[1]) begin failures++; $display("STATUS %h", d); end
    apb_read(8'h14, d);
    checks++;
    if ($signed(d[15:0]) < 100 || $signed(d[15:0]) > 162) begin
      failures++; $display("offset estimate %0d, want %0d", $signed(d[15:0]), $rtoi(FOFF * 65536.0));
    end
    checks++; if (nd != 64 * NDATA) begin failures++; $display("%0d detections", nd); end

  endtask

  task automatic expect_n(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never seen: %s", what); end
  endtask

  initial begin
    logic [31:0] d;
    logic [5:0] bw [$];
    psel = 0; penable = 0; pwrite = 0; paddr = 0; pwdata = 0; tx_bits = 0; tx_valid = 0;
    // symbols: preamble, training, data
    for (int k = 0; k < 64; k++) begin
      automatic int f = (k < 32) ? k : k - 64;
      sts_r[k] = 0; sts_i[k] = 0;
      for (int s = 0; s < 2 + NDATA; s++) for (int j = 0; j < 2; j++) begin
        xr[s][j][k] = 0; xi[s][j][k] = 0;
      end
      if (used(k)) begin
        xr[0][0][k] = L[f + 26];
        xr[1][1][k] = L[f + 26];
        for (int s = 2; s < 2 + NDATA; s++) for (int j = 0; j < 2; j++) begin
          xr[s][j][k] = $urandom_range(0, 1) ? 0.7071 : -0.7071;
          xi[s][j][k] = $urandom_range(0, 1) ? 0.7071 : -0.7071;
        end
      end
    end
    // preamble: tones at multiples of 4, sampled over one 16-sample period
    for (int c = 0; c < 64; c++) begin
      automatic real t = c / 4.0;
      for (int f = -24; f <= 24; f += 4) if (f != 0) begin
        automatic real ph = 2.0 * pi * f * t / 64.0;
        automatic real sg = ((f / 4) % 3 == 0) ? -1.0 : 1.0;
        sts_r[c] += 1.4 * sg * ($cos(ph) - $sin(ph)) / 8.0;
        sts_i[c] += 1.4 * sg * ($sin(ph) + $cos(ph)) / 8.0;
      end
    end
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    apb_write(8'h18, NDATA);
    apb_write(8'h08, 32'd128);
    apb_write(8'h00, 32'h2);          // enable, receive
    apb_read(8'h00, d);
    checks++; if (d != 32'h2) begin failures++; $display("CTRL readback %h", d); end
    receive_frame(0);
    // second frame with the MMSE V-BLAST detector
    apb_write(8'h1C, 32'd2048);      // noise variance
    apb_write(8'h00, 32'ha);          // enable, receive, MMSE V-BLAST
    receive_frame(1);

    // ---------------- transmit one symbol per stream ----------------
    apb_write(8'h0C, 32'd1);          // QPSK
    apb_write(8'h00, 32'h3);          // enable, transmit
    for (int j = 0; j < 2; j++) for (int k = 0; k < 64; k++) begin
      txr[j][k] = 0; txi[j][k] = 0;
      if (used(k)) begin
        automatic logic [5:0] b = 6'($urandom_range(0, 3));
        bw.push_back(b);
        txr[j][k] = (b[0] ? 2896.0 : -2896.0) / 4096.0;
        txi[j][k] = (b[1] ? 2896.0 : -2896.0) / 4096.0;
      end
    end
    tx_check = 1;
    while (bw.size() > 0) begin
      tx_valid <= 1; tx_bits <= bw[0];
      @(posedge clk);
      if (tx_ready) void'(bw.pop_front());
    end
    tx_valid <= 0;
    wait (tx_m[0] >= 79 && tx_m[1] >= 79 && tx_ph[0] >= 4);
    repeat (10) @(posedge clk);
    checks++; if (ntx != 320) begin failures++; $display("%0d transmit samples checked", ntx); end

    expect_n("power rise", n_rise);        expect_n("analog gain step", n_again);
    expect_n("digital gain", n_dgain);     expect_n("frame start", n_fstart);
    expect_n("symbol timing", n_sync);     expect_n("forward FFT", n_fft);
    expect_n("inverse FFT", n_ifft);       expect_n("channel training", n_train);
    expect_n("ZF preprocessing", n_pre);   expect_n("FIFO bridging", n_bridge);
    expect_n("detection", n_det);          expect_n("frame end", n_fend);
    expect_n("CP insertion", n_cp);        expect_n("offset compensation", n_foc);
    expect_n("MMSE V-BLAST preprocessing", n_mmse);
    $display("counts: rise %0d again %0d dgain %0d fstart %0d sync %0d fft %0d ifft %0d train %0d pre %0d bridge %0d det %0d fend %0d cp %0d foc %0d mmse %0d",
             n_rise, n_again, n_dgain, n_fstart, n_sync, n_fft, n_ifft, n_train, n_pre, n_bridge, n_det, n_fend, n_cp, n_foc, n_mmse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
