// Frame start detection.
// The AGCs of the receive antennas report a substantial power increase
// with one-clock pulses `pwr_rise[a]`. Each pulse is remembered for
// WINDOW clocks. When at least MIN_ANT antennas have reported within
// that window and the FOE reports a periodic signal (the repeating
// preamble), `frame_start` pulses for one clock and the detector stays
// quiet (`in_frame`) until `frame_end`.
// The three-of-four rule and the use of the FOE periodicity metric are
// the design's; the window length is this implementation's choice.
module fsd #(
  parameter int NA      = 4,
  parameter int MIN_ANT = 3,
  parameter int WINDOW  = 512
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NA-1:0] pwr_rise,
  input  logic          periodic,
  input  logic          frame_end,
  output logic          frame_start,
  output logic          in_frame
);
  logic [NA-1:0] seen;
  logic [$clog2(WINDOW+1)-1:0] age [NA];
  logic [$clog2(NA+1)-1:0] nseen;

  always_comb begin
    nseen = '0;
    for (int a = 0; a < NA; a++) nseen += $bits(nseen)'(seen[a]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen <= '0; frame_start <= 1'b0; in_frame <= 1'b0;
      for (int a = 0; a < NA; a++) age[a] <= '0;
    end else begin
      frame_start <= 1'b0;
      for (int a = 0; a < NA; a++) begin
        if (pwr_rise[a]) begin seen[a] <= 1'b1; age[a] <= '0; end
        else if (seen[a]) begin
          age[a] <= age[a] + 1'b1;
          if (age[a] == $bits(age[a])'(WINDOW - 1)) seen[a] <= 1'b0;
        end
      end
      if (in_frame) begin
        if (frame_end) begin in_frame <= 1'b0; seen <= '0; end
      end else if (nseen >= $bits(nseen)'(MIN_ANT) && periodic) begin
        frame_start <= 1'b1; in_frame <= 1'b1;
      end
    end
  end
endmodule
