// Channel estimation and channel memory for a 2x2 spatial-multiplexing
// link.
// Training: during training symbol j (train_tx = j, train_en = 1) only
// transmit antenna j sends the IEEE 802.11a long training sequence L,
// whose values are +1 or -1 on the 52 used tones and 0 elsewhere. For
// each FFT output of receive antenna a (tag a < NRX) on tone k the unit
// stores H[k][a][j] = Y * L_k, i.e. Y or -Y; unused tones get 0.
// USED/NEG below are the 64-bit masks of the used and of the -1 tones
// in FFT bin order (bin k = tone k for k < 32, tone k-64 above).
// Read port: h_idx selects a tone, h is the 2x2 matrix of that tone
// (combinational read, h[a][j] = row a, column j).
// The document names channel estimation and its memory; the training
// format and the estimator are this implementation's choices.
module chan_est
  import mimo_pkg::*;
#(
  parameter int NRX = 2,
  parameter int NTX = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       train_en,
  input  logic       train_tx,
  input  cplx_t      fft_data,
  input  logic       fft_valid,
  input  logic [5:0] fft_idx,
  input  logic [1:0] fft_tag,
  input  logic [5:0] h_idx,
  output cplx_t      h [NRX][NTX]
);
  localparam logic [63:0] USED = 64'hffffffc007fffffe;
  localparam logic [63:0] NEG  = 64'h0a60530000567d4c;

  cplx_t hm [64][NRX][NTX];

  always_ff @(posedge clk) begin
    if (train_en && fft_valid && int'(fft_tag) < NRX) begin
      if (!USED[fft_idx])
        hm[fft_idx][fft_tag[0]][train_tx] <= '0;
      else if (NEG[fft_idx])
        hm[fft_idx][fft_tag[0]][train_tx] <= '{re: 16'(-fft_data.re), im: 16'(-fft_data.im)};
      else
        hm[fft_idx][fft_tag[0]][train_tx] <= fft_data;
    end
  end

  always_comb begin
    for (int a = 0; a < NRX; a++)
      for (int j = 0; j < NTX; j++)
        h[a][j] = hm[h_idx][a][j];
  end
endmodule
