// Two-stage automatic gain control for one receive antenna.
// Stage 1 (analog): after a power rise the mean magnitude of the ADC
// samples is measured over 32-sample windows and the analog gain code
// `again` is stepped up or down towards the reference level, once per
// window, for four windows. Stage 2 (digital): the last window picks a
// power-of-two gain `dshift` that is applied to the samples at the DDC
// input. Both are frozen (`locked`) 256 clocks = 3.2 us at 80 MHz after
// the power rise, the settling time of the design; `release_i` returns
// the AGC to idle tracking at the end of a frame, with the analog gain
// back at its idle value 16 and the floor re-learnt from the next
// window. `start_i` (frame start, from the frame detector) starts the
// same acquisition on an antenna that saw no power rise of its own.
// A power rise (`pwr_rise`, one-clock pulse) is a window mean above four
// times the idle floor and above MIN_LEVEL; these pulses of the four
// antennas feed frame start detection. The idle floor follows a falling
// level at once and a rising one by 1/8 per window, so the leading edge
// of a frame does not raise it.
// The two-stage split, the per-antenna use and the 3.2 us settling are
// the design's; window length, step sizes, thresholds and the
// power-of-two digital gain are this implementation's choices.
module agc #(
  parameter int ADC_W      = 12,
  parameter int OUT_W      = 16,
  parameter int WIN_LOG2   = 5,
  parameter int CYC_SETTLE = 256,
  parameter int MIN_LEVEL  = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ADC_W-1:0] x_in,
  input  logic [11:0]             ref_level,
  input  logic                    start_i,
  input  logic                    release_i,
  output logic signed [OUT_W-1:0] x_out,
  output logic [4:0]              again,
  output logic [2:0]              dshift,
  output logic                    pwr_rise,
  output logic                    locked
);
  typedef enum logic [1:0] {S_IDLE, S_ANALOG, S_HOLD} st_t;
  st_t st;

  logic [ADC_W+WIN_LOG2-1:0] acc;
  logic [WIN_LOG2-1:0]       wcnt;
  logic [ADC_W-1:0]          mag, mean, floor_lvl;
  logic [2:0]                nwin;
  logic [8:0]                settle;
  logic                      win_end;

  assign mag     = x_in[ADC_W-1] ? ADC_W'(-x_in) : ADC_W'(x_in);
  assign win_end = (wcnt == '1);
  assign mean    = ADC_W'((acc + (ADC_W+WIN_LOG2)'(mag)) >> WIN_LOG2);

  // power-of-two digital gain: largest shift with mean<<s <= 1.5*ref
  function automatic logic [2:0] pick_shift(input logic [ADC_W-1:0] m, input logic [11:0] r);
    logic [2:0] s;
    s = 3'd0;
    for (int i = 1; i < 8; i++)
      if ((24'(m) << i) <= 24'(r) + 24'(r >> 1)) s = 3'(i);
    return s;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; acc <= '0; wcnt <= '0; floor_lvl <= '1;
      nwin <= '0; settle <= '0; again <= 5'd16; dshift <= '0;
      pwr_rise <= 1'b0; locked <= 1'b0;
    end else begin
      pwr_rise <= 1'b0;
      wcnt <= wcnt + 1'b1;
      acc  <= win_end ? '0 : acc + (ADC_W+WIN_LOG2)'(mag);
      if (st != S_IDLE && settle != 9'(CYC_SETTLE)) settle <= settle + 1'b1;
      unique case (st)
        S_IDLE: if (start_i) begin
          st <= S_ANALOG; nwin <= '0; settle <= '0;
        end else if (win_end) begin
          if (mean > (floor_lvl << 2) && mean > ADC_W'(MIN_LEVEL)) begin
            pwr_rise <= 1'b1; st <= S_ANALOG; nwin <= '0; settle <= '0;
          end else if (mean < floor_lvl) floor_lvl <= mean;
          else floor_lvl <= floor_lvl + (floor_lvl >> 3) + 1'b1;
        end
        S_ANALOG: if (win_end) begin
          nwin <= nwin + 1'b1;
          if (nwin == 3'd4) begin
            dshift <= pick_shift(mean, ref_level);
            st     <= S_HOLD;
          end else if (12'(mean) > ref_level + (ref_level >> 1)) begin
            again <= (again >= 5'd2) ? again - 5'd2 : 5'd0;
          end else if (12'(mean) < (ref_level >> 2) && again <= 5'd29) begin
            again <= again + 5'd2;
          end
        end
        S_HOLD: begin
          if (settle == 9'(CYC_SETTLE - 1)) locked <= 1'b1;
          if (release_i) begin
            st <= S_IDLE; locked <= 1'b0; dshift <= '0; floor_lvl <= '1;
            again <= 5'd16;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // stage 2: digital gain at the DDC input, saturating
  logic signed [OUT_W+7:0] scaled;
  assign scaled = (OUT_W+8)'(x_in) <<< dshift;
  assign x_out  = (scaled > (OUT_W+8)'(2**(OUT_W-1)-1)) ? OUT_W'(2**(OUT_W-1)-1) :
                  (scaled < -(OUT_W+8)'(2**(OUT_W-1)))  ? OUT_W'(-(2**(OUT_W-1))) :
                  OUT_W'(scaled);
endmodule
