// Cyclic-prefix removal and pre-FFT symbol buffer for all antennas.
// Input: the time-multiplexed baseband stream (one sample per clock,
// antennas 0..NA-1 in turn). `sync` marks that the next sample period
// starts an OFDM symbol (first sample of its cyclic prefix). Each
// symbol is NCP+NFFT samples per antenna; the first NCP are dropped and
// the NFFT others are written to one half of a ping-pong buffer. When a
// symbol is complete the halves swap and the finished one is streamed
// to the shared FFT, antenna after antenna, NFFT samples each, with a
// valid/ready handshake (out_last on the last sample of an antenna).
// NA*NFFT = 256 output clocks fit in the NA*(NCP+NFFT) = 320 clocks of
// one symbol, so the stream keeps up when the FFT accepts one sample
// per clock. `stop` ends framing (end of frame). `sym_cnt` counts (from sync)
// completed symbols; `ovf` flags a symbol completed while the previous
// was still being read (that symbol is then lost).
// The 16-sample prefix and 64-point symbols are the design's; the
// buffer organisation is this implementation's choice.
module ofdm_framer
  import mimo_pkg::*;
#(
  parameter int NA    = 4,
  parameter int NFFT_P = 64,
  parameter int NCP_P  = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sync,
  input  logic        stop,
  input  cplx_t       x_in,
  input  logic        x_valid,
  input  logic [1:0]  x_ant,
  output cplx_t       out_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [1:0]  out_ant,
  output logic        out_last,
  output logic [7:0]  sym_cnt,
  output logic        ovf
);
  localparam int SL = NFFT_P + NCP_P;
  localparam int IW = $clog2(SL);
  localparam int AW = $clog2(NFFT_P);

  cplx_t mem [2][NA][NFFT_P];
  logic        run, wb, rb, rd_busy;
  logic [IW-1:0] sidx;
  logic [AW-1:0] ridx;
  logic [1:0]    rant;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; wb <= 1'b0; rb <= 1'b0; rd_busy <= 1'b0; sidx <= '0;
      ridx <= '0; rant <= '0; sym_cnt <= '0; ovf <= 1'b0;
    end else begin
      if (sync) begin run <= 1'b1; sidx <= '0; sym_cnt <= '0; end
      else if (stop) run <= 1'b0;
      else if (run && x_valid) begin
        if (sidx >= IW'(NCP_P))
          mem[wb][x_ant][AW'(sidx - IW'(NCP_P))] <= x_in;
        if (x_ant == 2'(NA-1)) begin
          if (sidx == IW'(SL-1)) begin
            sidx <= '0;
            wb   <= ~wb;
            sym_cnt <= sym_cnt + 1'b1;
            if (rd_busy) ovf <= 1'b1;
            else begin rd_busy <= 1'b1; rb <= wb; ridx <= '0; rant <= '0; end
          end else sidx <= sidx + 1'b1;
        end
      end
      if (rd_busy && out_ready) begin
        ridx <= ridx + 1'b1;
        if (ridx == AW'(NFFT_P-1)) begin
          rant <= rant + 1'b1;
          if (rant == 2'(NA-1)) rd_busy <= 1'b0;
        end
      end
    end
  end

  assign out_valid = rd_busy;
  assign out_data  = mem[rb][rant][ridx];
  assign out_ant   = rant;
  assign out_last  = (ridx == AW'(NFFT_P-1));
endmodule
