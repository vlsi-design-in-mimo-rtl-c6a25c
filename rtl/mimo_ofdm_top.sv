// Baseband transceiver for MIMO-OFDM wireless LAN after IEEE 802.11a:
// four-antenna OFDM processing, a MIMO detection unit, a data FIFO and
// an APB configuration port, all on one 80 MHz clock.
//
// Receive (CTRL.tx_mode = 0):
//   adc[a] -> agc[a] (analog gain code out, digital gain in) -> ddc[a]
//   (20 MHz IF to 20 MS/s baseband). The four DDC outputs are
//   serialised into one stream of one sample per clock (antenna index
//   with each sample), which feeds the FOE and, through the FOC, the
//   framer. FSD raises frame_start when three AGCs saw a power rise and
//   the FOE sees the periodic preamble; the FOE phase increment is then
//   frozen for the FOC. Symbol framing starts with the first sample
//   period after all four AGCs have locked (the transmitter aligns its
//   first training symbol to that point, see the README): symbols 0
//   and 1 are the training symbols of transmit antennas 0 and 1, the
//   NDATA symbols after them carry data. The framer removes the cyclic
//   prefix and hands each antenna's 64 samples to the shared FFT.
//   Training outputs go to the channel memory (chan_est); when the
//   second has passed, the MDU computes the ZF matrices of all tones
//   while data FFT outputs wait in the data FIFO; then the MDU drains
//   the FIFO and outputs the two detected streams per tone (det_*).
//   The framer stops after 2 + NDATA symbols and the frame ends when
//   the FFT has delivered the last of them. Frame start also starts
//   the AGC of an antenna that saw no power rise of its own.
// Transmit (CTRL.tx_mode = 1, TDD: the FFT is shared with receive):
//   tx_bits (6-bit groups, valid/ready) -> qam_mapper on the 52 used
//   tones (zeros elsewhere) -> the FFT in inverse mode, one block per
//   transmit stream -> cp_insert per stream -> duc -> dac. Both streams
//   leave together, one sample per 4 clocks.
// There are two MDUs for two spatial streams, selected by CTRL.det_mmse:
// the 2x2 zero-forcing detector (mimo_detector) and the 2x2 MMSE V-BLAST
// detector (mmse_vblast, noise variance from the NOISE register, slicer
// from TX_MOD). Both use receive antennas 0 and 1; antennas 2 and 3 take
// part in gain control, frame detection and offset estimation.
// The block partition, four antennas, one shared FFT, 80 MHz clock,
// 20 MHz IF and the two detectors follow the design; the training
// format, the symbol timing rule and the sequencing are this
// implementation's choices.
module mimo_ofdm_top
  import mimo_pkg::*;
#(
  parameter int NA        = 4,
  parameter int NS        = 2,
  parameter int FIFO_DEPTH = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // APB
  input  logic                    psel,
  input  logic                    penable,
  input  logic                    pwrite,
  input  logic [7:0]              paddr,
  input  logic [31:0]             pwdata,
  output logic [31:0]             prdata,
  output logic                    pready,
  output logic                    pslverr,
  // analog front end (off chip)
  input  logic signed [ADC_W-1:0] adc [NA],
  output logic [4:0]              again [NA],
  output logic signed [W-1:0]     dac [NS],
  // transmit bits
  input  logic [5:0]              tx_bits,
  input  logic                    tx_valid,
  output logic                    tx_ready,
  // receive results
  output logic                    frame_start,
  output logic                    sym_sync,
  output logic                    det_valid,
  output logic [5:0]              det_idx,
  output cplx_t                   det_s [NS]
);
  localparam logic [63:0] USED = 64'hffffffc007fffffe;

  // ---------------- configuration ----------------
  logic        tx_mode, enable, clr_status;
  logic [11:0] agc_ref;
  logic [7:0]  fsd_thr, ndata, nsym;
  logic [1:0]  tx_mod;
  logic        det_mmse;
  logic [31:0] noise;
  logic        fifo_ovf, in_frame, framer_ovf;
  logic [15:0] dphi, dphi_hold;

  apb_regs u_apb (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .tx_mode, .enable, .agc_ref, .fsd_thr, .tx_mod, .clr_status, .ndata, .det_mmse, .noise,
    .st_frame(in_frame), .st_ovf(fifo_ovf | framer_ovf), .st_nsym(nsym), .st_dphi(dphi_hold));

  logic rx_on;
  assign rx_on = enable && !tx_mode;

  // ---------------- per-antenna AGC and DDC ----------------
  logic signed [W-1:0] agc_out [NA];
  logic [2:0]  dshift [NA];
  logic [NA-1:0] pwr_rise, locked;
  cplx_t       bb [NA];
  logic [NA-1:0] bb_v;
  logic        frame_end;

  for (genvar a = 0; a < NA; a++) begin : g_ant
    agc u_agc (
      .clk, .rst_n, .x_in(rx_on ? adc[a] : '0), .ref_level(agc_ref), .start_i(frame_start),
      .release_i(frame_end),
      .x_out(agc_out[a]), .again(again[a]), .dshift(dshift[a]),
      .pwr_rise(pwr_rise[a]), .locked(locked[a]));
    ddc u_ddc (.clk, .rst_n, .x_in(agc_out[a]), .y_out(bb[a]), .y_valid(bb_v[a]));
  end

  // ---------------- serialiser: 4 x 20 MS/s -> 1 sample/clock ----------------
  // antenna 0 leaves on the clock the DDCs deliver, antennas 1..3 on
  // the three clocks after it, before the next DDC output
  cplx_t      hold [NA];
  logic [1:0] s_cnt;
  logic       s_run;
  cplx_t      s_x;
  logic       s_v;
  logic [1:0] s_ant_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_cnt <= '0; s_run <= 1'b0; s_v <= 1'b0; s_x <= '0; s_ant_q <= '0;
      for (int a = 0; a < NA; a++) hold[a] <= '0;
    end else begin
      s_v <= 1'b0;
      if (bb_v[0]) begin
        for (int a = 0; a < NA; a++) hold[a] <= bb[a];
        s_v <= 1'b1; s_x <= bb[0]; s_ant_q <= '0;
        s_run <= 1'b1; s_cnt <= 2'd1;
      end else if (s_run) begin
        s_v     <= 1'b1;
        s_x     <= hold[s_cnt];
        s_ant_q <= s_cnt;
        s_cnt   <= s_cnt + 1'b1;
        if (s_cnt == 2'(NA-1)) s_run <= 1'b0;
      end
    end
  end

  // ---------------- FOE, FSD, FOC ----------------
  logic periodic, foe_v;
  foe u_foe (.clk, .rst_n, .x_in(s_x), .x_valid(s_v), .ant(s_ant_q), .dshift(dshift),
             .thr(fsd_thr), .periodic, .dphi, .est_valid(foe_v));

  fsd u_fsd (.clk, .rst_n, .pwr_rise, .periodic(periodic && foe_v), .frame_end,
             .frame_start, .in_frame);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dphi_hold <= '0;
    else if (frame_start) dphi_hold <= dphi;
  end

  cplx_t      c_x;
  logic       c_v;
  logic [1:0] c_ant;
  foc u_foc (.clk, .rst_n, .clear(sym_sync), .x_in(s_x), .x_valid(s_v), .ant(s_ant_q),
             .dphi(dphi_hold), .y_out(c_x), .y_valid(c_v), .y_ant(c_ant));

  // symbol timing: first sample period after all AGCs locked in a frame
  logic armed;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin armed <= 1'b0; sym_sync <= 1'b0; end
    else begin
      sym_sync <= 1'b0;
      if (frame_start) armed <= 1'b1;
      else if (armed && &locked && c_v && c_ant == 2'(NA-1)) begin
        armed <= 1'b0; sym_sync <= 1'b1;
      end
      if (frame_end) armed <= 1'b0;
    end
  end

  // ---------------- framer ----------------
  // the framer stops collecting after 2 training + NDATA symbols; the
  // frame ends when the FFT has delivered the last of them
  logic       fr_stop, sym_run;
  logic [7:0] fsym;
  assign fr_stop   = sym_run && (nsym == ndata + 8'd2);
  assign frame_end = sym_run && (fsym == ndata + 8'd2);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       sym_run <= 1'b0;
    else if (sym_sync)                sym_run <= 1'b1;
    else if (frame_end || !in_frame) sym_run <= 1'b0;
  end
  cplx_t      fr_x;
  logic       fr_v, fr_rdy, fr_last;
  logic [1:0] fr_ant;
  ofdm_framer #(.NA(NA)) u_framer (
    .clk, .rst_n, .sync(sym_sync), .stop(fr_stop), .x_in(c_x), .x_valid(c_v), .x_ant(c_ant),
    .out_data(fr_x), .out_valid(fr_v), .out_ready(fr_rdy), .out_ant(fr_ant), .out_last(fr_last),
    .sym_cnt(nsym), .ovf(framer_ovf));

  // ---------------- transmit control ----------------
  cplx_t      f_in, f_out;
  logic       f_in_v, f_out_v, f_last, f_busy;
  logic [1:0] f_tag_in, f_tag;
  logic [5:0] f_idx;
  logic       tx_blk, tx_go, map_v;
  logic [5:0] tx_k;
  logic [1:0] tx_a;
  logic       fft_rdy;
  logic [NS-1:0] cp_full;
  cplx_t      map_s;
  logic       map_use, use_q;
  logic [NS-1:0] tx_pend;   // a block of this stream is inside the FFT
  logic [1:0] tx_a_q;
  assign map_use  = USED[tx_k];
  assign tx_ready = tx_blk && map_use;
  assign tx_go    = tx_blk && (!map_use || tx_valid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin tx_blk <= 1'b0; tx_k <= '0; tx_a <= '0; tx_pend <= '0; end
    else if (!(enable && tx_mode)) begin tx_blk <= 1'b0; tx_k <= '0; tx_a <= '0; tx_pend <= '0; end
    else begin
      for (int s = 0; s < NS; s++)
        if (f_out_v && f_last && f_tag == 2'(s)) tx_pend[s] <= 1'b0;
      if (!tx_blk) begin
        // start a block when the FFT (after the last mapped sample) and
        // the stream's CP buffer are free
        if (fft_rdy && !map_v && !tx_pend[tx_a[0]] && !cp_full[tx_a[0]]) begin
          tx_blk <= 1'b1;
          tx_pend[tx_a[0]] <= 1'b1;
        end
      end else if (tx_go) begin
      tx_k <= tx_k + 1'b1;
      if (tx_k == 6'd63) begin
        tx_blk <= 1'b0;
        tx_a   <= (tx_a == 2'(NS-1)) ? 2'd0 : tx_a + 1'b1;
      end
    end
    end
  end

  qam_mapper u_map (.clk, .rst_n, .bits(tx_bits), .mode(mod_t'(tx_mod)), .in_valid(tx_go),
                    .sym(map_s), .out_valid(map_v));
  always_ff @(posedge clk) begin use_q <= map_use; tx_a_q <= tx_a; end

  // ---------------- shared I/FFT ----------------
  always_comb begin
    if (tx_mode) begin
      f_in     = use_q ? map_s : '0;
      f_in_v   = map_v;
      f_tag_in = tx_a_q;
    end else begin
      f_in     = fr_x;
      f_in_v   = fr_v;
      f_tag_in = fr_ant;
    end
  end
  assign fr_rdy = fft_rdy && !tx_mode;

  fft64_r4 u_fft (.clk, .rst_n, .in_data(f_in), .in_valid(f_in_v), .in_ready(fft_rdy),
                  .in_tag(f_tag_in), .inv(tx_mode), .out_data(f_out), .out_valid(f_out_v),
                  .out_idx(f_idx), .out_tag(f_tag), .out_last(f_last), .busy(f_busy));

  // ---------------- transmit back end ----------------
  logic [1:0] strobe_cnt;
  logic       strobe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) strobe_cnt <= '0;
    else        strobe_cnt <= strobe_cnt + 1'b1;
  end
  assign strobe = (strobe_cnt == 2'd0);

  for (genvar s = 0; s < NS; s++) begin : g_tx
    cplx_t cp_x;
    logic  cp_v;
    // IFFT output is scaled by 1/64: restore a usable DAC level (x16)
    cplx_t f_scaled;
    assign f_scaled = '{re: sat16(40'(f_out.re) <<< 4), im: sat16(40'(f_out.im) <<< 4)};
    cp_insert u_cp (.clk, .rst_n, .in_data(f_scaled), .in_idx(f_idx),
                    .in_valid(tx_mode && f_out_v && f_tag == 2'(s)),
                    .in_last(f_last), .full(cp_full[s]), .out_en(strobe && &cp_full),
                    .out_data(cp_x), .out_valid(cp_v));
    duc u_duc (.clk, .rst_n, .x_in(cp_x), .x_valid(cp_v), .y_out(dac[s]));
  end

  // ---------------- receive back end ----------------
  logic       pre_start;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin fsym <= '0; pre_start <= 1'b0; end
    else begin
      pre_start <= 1'b0;
      if (sym_sync) fsym <= '0;
      else if (!tx_mode && f_out_v && f_last && f_tag == 2'(NA-1)) begin
        fsym <= fsym + 1'b1;
        if (fsym == 8'd1) pre_start <= 1'b1;
      end
    end
  end

  cplx_t      hmat [2][2];
  logic [5:0] h_idx;
  chan_est u_ce (.clk, .rst_n, .train_en(!tx_mode && fsym < 8'd2), .train_tx(fsym[0]),
                 .fft_data(f_out), .fft_valid(f_out_v), .fft_idx(f_idx), .fft_tag(f_tag),
                 .h_idx, .h(hmat));

  logic        q_empty, q_rd, q_full;
  logic [39:0] q_data;
  logic [$clog2(FIFO_DEPTH):0] q_level;
  data_fifo #(.DW(40), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clr(clr_status),
    .wr_data({f_tag, f_idx, f_out}), .wr_en(!tx_mode && f_out_v && fsym >= 8'd2 && int'(f_tag) < NS),
    .full(q_full), .rd_en(q_rd), .rd_data(q_data), .empty(q_empty), .level(q_level),
    .overflow(fifo_ovf));

  // two detection units; CTRL.det_mmse selects the one that reads the
  // channel memory and the FIFO and drives det_*
  logic       zf_pre_wr, zf_rd, zf_ready, zf_v, mm_pre_wr, mm_rd, mm_ready, mm_v;
  logic [5:0] zf_hidx, zf_didx, mm_hidx, mm_didx;
  cplx_t      zf_s [NS];
  cplx_t      mm_s [NS];
  mimo_detector u_mdu (
    .clk, .rst_n, .frame_start, .pre_start(pre_start && !det_mmse), .h_idx(zf_hidx), .h(hmat),
    .g_ready(zf_ready), .pre_wr(zf_pre_wr),
    .fifo_empty(q_empty || det_mmse), .fifo_data(q_data), .fifo_rd(zf_rd),
    .det_valid(zf_v), .det_idx(zf_didx), .det_s(zf_s));
  mmse_vblast u_vblast (
    .clk, .rst_n, .frame_start, .pre_start(pre_start && det_mmse), .sigma2(noise),
    .mode(mod_t'(tx_mod)), .h_idx(mm_hidx), .h(hmat),
    .g_ready(mm_ready), .pre_wr(mm_pre_wr),
    .fifo_empty(q_empty || !det_mmse), .fifo_data(q_data), .fifo_rd(mm_rd),
    .det_valid(mm_v), .det_idx(mm_didx), .det_s(mm_s));
  assign h_idx     = det_mmse ? mm_hidx : zf_hidx;
  assign q_rd      = det_mmse ? mm_rd : zf_rd;
  assign det_valid = det_mmse ? mm_v : zf_v;
  assign det_idx   = det_mmse ? mm_didx : zf_didx;
  assign det_s     = det_mmse ? mm_s : zf_s;
endmodule
