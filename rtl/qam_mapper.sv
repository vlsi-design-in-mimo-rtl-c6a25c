// QAM mapper of the transmitter (IEEE 802.11a constellations).
// Maps 1, 2, 4 or 6 bits (BPSK, QPSK, 16-QAM, 64-QAM, selected by
// `mode`) to one constellation point with the Gray mapping of 802.11a:
// bits[0] (and bits[1], bits[2] for higher orders) choose the I level,
// the next group the Q level (BPSK: Q = 0). Levels are scaled by the
// standard normalisation 1, 1/sqrt(2), 1/sqrt(10), 1/sqrt(42) and given
// in Q3.12 (4096 = 1.0): KMOD = 4096, 2896, 1295, 632.
// Combinational with an output register: one clock latency.
// QAM mapping ahead of the IFFT is the design's; the number format is
// this implementation's choice.
module qam_mapper
  import mimo_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] bits,
  input  mod_t       mode,
  input  logic       in_valid,
  output cplx_t      sym,
  output logic       out_valid
);
  // Gray level of a 1..3 bit group, odd integers -7..7
  function automatic logic signed [3:0] lvl(input logic [2:0] b, input int nb);
    unique case (nb)
      1: return b[0] ? 4'sd1 : -4'sd1;
      2: unique case (b[1:0])
           2'b00: return -4'sd3; 2'b01: return -4'sd1;
           2'b11: return 4'sd1;  default: return 4'sd3;
         endcase
      default: unique case (b)
           3'b000: return -4'sd7; 3'b001: return -4'sd5;
           3'b011: return -4'sd3; 3'b010: return -4'sd1;
           3'b110: return 4'sd1;  3'b111: return 4'sd3;
           3'b101: return 4'sd5;  default: return 4'sd7;
         endcase
    endcase
  endfunction

  logic signed [3:0]  li, lq;
  logic signed [15:0] k;
  always_comb begin
    unique case (mode)
      MOD_BPSK:  begin li = lvl({2'b0, bits[0]}, 1); lq = '0; k = 16'sd4096; end
      MOD_QPSK:  begin li = lvl({2'b0, bits[0]}, 1); lq = lvl({2'b0, bits[1]}, 1); k = 16'sd2896; end
      MOD_QAM16: begin li = lvl({1'b0, bits[0], bits[1]}, 2); lq = lvl({1'b0, bits[2], bits[3]}, 2); k = 16'sd1295; end
      default:   begin li = lvl({bits[0], bits[1], bits[2]}, 3); lq = lvl({bits[3], bits[4], bits[5]}, 3); k = 16'sd632; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin sym <= '0; out_valid <= 1'b0; end
    else begin
      out_valid <= in_valid;
      sym.re <= 16'(li * k);
      sym.im <= 16'(lq * k);
    end
  end
endmodule
