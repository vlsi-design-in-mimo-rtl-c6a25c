// Cyclic-prefix insertion on the transmit side.
// The IFFT output of one antenna, NFFT samples in any order, each with
// its time index `in_idx`, is written into a buffer; `in_last` marks
// the last one and makes the buffer `full`. The symbol then leaves as
// NCP+NFFT samples: the last NCP samples first (the cyclic prefix),
// then all NFFT, one per clock on which `out_en` is high (the 20 MS/s
// sample strobe; the transmitter raises it for all antennas together
// so their symbols stay aligned), registered. `full` drops with the
// last output sample; the buffer must not be written while full.
// The prefix length of 16 on 64-point symbols is the design's.
module cp_insert
  import mimo_pkg::*;
#(
  parameter int NFFT_P = 64,
  parameter int NCP_P  = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cplx_t in_data,
  input  logic [$clog2(NFFT_P)-1:0] in_idx,
  input  logic  in_valid,
  input  logic  in_last,
  output logic  full,
  input  logic  out_en,
  output cplx_t out_data,
  output logic  out_valid
);
  localparam int AW = $clog2(NFFT_P);
  localparam int CW = $clog2(NFFT_P + NCP_P);
  cplx_t mem [NFFT_P];
  logic [CW-1:0] ri;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ri <= '0; full <= 1'b0; out_valid <= 1'b0; out_data <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!full && in_valid) begin
        mem[in_idx] <= in_data;
        if (in_last) begin full <= 1'b1; ri <= '0; end
      end
      if (full && out_en) begin
        out_valid <= 1'b1;
        out_data  <= (ri < CW'(NCP_P)) ? mem[AW'(ri + CW'(NFFT_P - NCP_P))]
                                       : mem[AW'(ri - CW'(NCP_P))];
        if (ri == CW'(NFFT_P + NCP_P - 1)) full <= 1'b0;
        ri <= ri + 1'b1;
      end
    end
  end
endmodule
