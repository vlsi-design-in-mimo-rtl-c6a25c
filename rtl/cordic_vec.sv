// Iterative CORDIC in vectoring mode: magnitude and angle of (x, y).
// A start pulse loads the vector; a first step folds it into the right
// half-plane (+/-90 degrees), then ITER micro-rotations follow, one per
// clock, driving y to zero. After ITER+1 clocks `done` pulses with
// mag = K*|(x,y)|, K ~ 1.647 (the CORDIC gain, not removed), and
// ang = atan2(y, x) with 2^16 units per turn (0x8000 = pi).
// The table holds round(atan(2^-i) * 2^16 / (2*pi)), i = 0..15.
// Used by frequency offset estimation to turn the correlation into a
// phase; the algorithm choice is this implementation's.
module cordic_vec #(
  parameter int XW   = 34,
  parameter int ITER = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [XW-1:0] x_in,
  input  logic signed [XW-1:0] y_in,
  output logic                 busy,
  output logic                 done,
  output logic [XW-1:0]        mag,
  output logic [15:0]          ang
);
  localparam logic [15:0] ATAN [16] = '{16'd8192, 16'd4836, 16'd2555, 16'd1297,
    16'd651, 16'd326, 16'd163, 16'd81, 16'd41, 16'd20, 16'd10, 16'd5,
    16'd3, 16'd1, 16'd1, 16'd0};

  logic signed [XW+1:0] x, y;
  logic [15:0] z;
  logic [4:0]  it;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; z <= '0; it <= '0; busy <= 1'b0; done <= 1'b0;
      mag <= '0; ang <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        // fold into right half-plane
        if (x_in < 0) begin
          if (y_in >= 0) begin x <= (XW+2)'(y_in);  y <= -(XW+2)'(x_in); z <= 16'h4000; end
          else           begin x <= -(XW+2)'(y_in); y <= (XW+2)'(x_in);  z <= 16'hC000; end
        end else begin
          x <= (XW+2)'(x_in); y <= (XW+2)'(y_in); z <= 16'h0000;
        end
        it <= '0; busy <= 1'b1;
      end else if (busy) begin
        if (y < 0) begin
          x <= x - (y >>> it); y <= y + (x >>> it); z <= z - ATAN[it[3:0]];
        end else begin
          x <= x + (y >>> it); y <= y - (x >>> it); z <= z + ATAN[it[3:0]];
        end
        if (it == 5'(ITER-1)) begin
          busy <= 1'b0; done <= 1'b1;
        end
        it <= it + 1'b1;
      end
      if (busy && it == 5'(ITER-1)) begin
        mag <= XW'(y < 0 ? x - (y >>> it) : x + (y >>> it));
        ang <= y < 0 ? z - ATAN[it[3:0]] : z + ATAN[it[3:0]];
      end
    end
  end
endmodule
