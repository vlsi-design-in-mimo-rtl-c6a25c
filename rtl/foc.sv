// Frequency offset compensation with one complex multiplier shared by
// the four antennas.
// The input is the time-multiplexed baseband stream (one sample per
// clock, antennas in turn, `ant` = index). A phase accumulator advances
// by `dphi` (2^16 units per turn, from the FOE) once per sample period,
// after the last antenna's sample; every sample of that period is
// multiplied by exp(-j*phase) taken from a 2^LUT_BITS-entry cosine and
// sine table (table(k) = round(32767*cos(2*pi*k/2^LUT_BITS)), built at
// elaboration). `clear` restarts the phase at zero (frame start).
// Output is registered: one clock latency, same antenna order.
// One shared complex multiplier is the design's; the table resolution
// and accumulator width are this implementation's choices.
module foc
  import mimo_pkg::*;
#(
  parameter int LUT_BITS = 8,
  parameter int NA       = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  cplx_t       x_in,
  input  logic        x_valid,
  input  logic [1:0]  ant,
  input  logic [15:0] dphi,
  output cplx_t       y_out,
  output logic        y_valid,
  output logic [1:0]  y_ant
);
  localparam int N = 2**LUT_BITS;
  typedef logic signed [15:0] tab_t [N];

  function automatic tab_t mk_cos();
    tab_t t;
    for (int k = 0; k < N; k++)
      t[k] = 16'($rtoi($floor(32767.0 * $cos(2.0 * 3.14159265358979 * k / N) + 0.5)));
    return t;
  endfunction
  function automatic tab_t mk_sin();
    tab_t t;
    for (int k = 0; k < N; k++)
      t[k] = 16'($rtoi($floor(32767.0 * $sin(2.0 * 3.14159265358979 * k / N) + 0.5)));
    return t;
  endfunction
  localparam tab_t COS_T = mk_cos();
  localparam tab_t SIN_T = mk_sin();

  logic [15:0] phase;
  logic [LUT_BITS-1:0] idx;
  cplx_t rot;
  assign idx    = phase[15 -: LUT_BITS];
  assign rot.re = COS_T[idx];
  assign rot.im = 16'(-SIN_T[idx]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0; y_out <= '0; y_valid <= 1'b0; y_ant <= '0;
    end else begin
      y_valid <= x_valid;
      y_ant   <= ant;
      if (x_valid) y_out <= cmul(x_in, rot);
      if (clear) phase <= '0;
      else if (x_valid && ant == 2'(NA-1)) phase <= phase + dphi;
    end
  end
endmodule
