// 64-point forward/inverse FFT with a single radix-4 butterfly, shared
// by all antennas (and by transmit and receive, which never overlap).
// Algorithm: radix-4 decimation in frequency, in place, 3 stages of 16
// butterflies. The butterfly reads four points, forms the 4-point DFT,
// scales by 1/4 and multiplies outputs 1..3 by twiddles W64^e, one
// butterfly per clock, so a block takes 48 compute clocks. With the
// 1/4 per stage the forward result is DFT/64; the inverse (inv = 1)
// conjugates input and output and so gives the normalised IDFT.
// Three working banks rotate through load (64 clocks), compute (48)
// and unload (64), so blocks can be streamed at one sample per clock:
// four antennas' symbols take 256 clocks of the 320-clock symbol.
// Input: in_valid/in_ready handshake, 64 samples per block in natural
// order; in_tag (antenna) and inv are taken with the first sample.
// Output: 64 samples per block at one per clock without back-pressure,
// in digit-reversed order, each with its tone index out_idx, the
// block's tag, and out_last on the 64th. Twiddles:
// W64^e = round(32767*(cos(2*pi*e/64) - j*sin(2*pi*e/64))), built at
// elaboration. A single radix-4 butterfly shared by the four antennas
// is the design's; the bank scheme and number formats are this
// implementation's choices.
module fft64_r4
  import mimo_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  cplx_t      in_data,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [1:0] in_tag,
  input  logic       inv,
  output cplx_t      out_data,
  output logic       out_valid,
  output logic [5:0] out_idx,
  output logic [1:0] out_tag,
  output logic       out_last,
  output logic       busy
);
  typedef enum logic [1:0] {B_FREE, B_COMP, B_DONE, B_UNLD} bst_t;
  typedef logic signed [15:0] tw_t [64];

  function automatic tw_t mk_tw(input bit imag);
    tw_t t;
    for (int e = 0; e < 64; e++)
      t[e] = imag ? 16'($rtoi($floor(-32767.0 * $sin(2.0 * 3.14159265358979 * e / 64.0) + 0.5)))
                  : 16'($rtoi($floor(32767.0 * $cos(2.0 * 3.14159265358979 * e / 64.0) + 0.5)));
    return t;
  endfunction
  localparam tw_t TWR = mk_tw(1'b0);
  localparam tw_t TWI = mk_tw(1'b1);

  function automatic cplx_t tw(input logic [5:0] e);
    return '{re: TWR[e], im: TWI[e]};
  endfunction

  function automatic cplx_t conj(input cplx_t a);
    return '{re: a.re, im: 16'(-a.im)};
  endfunction

  cplx_t mem [3][64];
  bst_t  st [3];
  logic [1:0] tag [3];
  logic       binv [3];
  logic [1:0] ld, cp, ul;
  logic [5:0] lcnt, ucnt, bcnt;

  function automatic logic [1:0] nxt(input logic [1:0] p);
    return (p == 2'd2) ? 2'd0 : p + 2'd1;
  endfunction

  // butterfly addressing
  logic [1:0] stg;
  logic [3:0] b;
  logic [5:0] base, dd;
  logic [5:0] e1;
  assign stg = bcnt[5:4];
  assign b   = bcnt[3:0];
  always_comb begin
    unique case (stg)
      2'd0:    begin dd = 6'd16; base = {2'b00, b};         e1 = {2'b00, b};       end
      2'd1:    begin dd = 6'd4;  base = {b[3:2], 2'b00, b[1:0]}; e1 = {2'b00, b[1:0], 2'b00}; end
      default: begin dd = 6'd1;  base = {b, 2'b00};          e1 = 6'd0;             end
    endcase
  end

  cplx_t x0, x1, x2, x3, y0, y1, y2, y3;
  logic signed [17:0] sr [4];
  logic signed [17:0] si [4];
  assign x0 = mem[cp][base];
  assign x1 = mem[cp][base + dd];
  assign x2 = mem[cp][base + 2*dd];
  assign x3 = mem[cp][base + 3*dd];
  always_comb begin
    // y0 = x0+x1+x2+x3, y1 = x0-jx1-x2+jx3, y2 = x0-x1+x2-x3, y3 = x0+jx1-x2-jx3
    sr[0] = 18'(x0.re) + 18'(x1.re) + 18'(x2.re) + 18'(x3.re);
    si[0] = 18'(x0.im) + 18'(x1.im) + 18'(x2.im) + 18'(x3.im);
    sr[1] = 18'(x0.re) + 18'(x1.im) - 18'(x2.re) - 18'(x3.im);
    si[1] = 18'(x0.im) - 18'(x1.re) - 18'(x2.im) + 18'(x3.re);
    sr[2] = 18'(x0.re) - 18'(x1.re) + 18'(x2.re) - 18'(x3.re);
    si[2] = 18'(x0.im) - 18'(x1.im) + 18'(x2.im) - 18'(x3.im);
    sr[3] = 18'(x0.re) - 18'(x1.im) - 18'(x2.re) + 18'(x3.im);
    si[3] = 18'(x0.im) + 18'(x1.re) - 18'(x2.im) - 18'(x3.re);
    y0 = '{re: 16'(sr[0] >>> 2), im: 16'(si[0] >>> 2)};
    y1 = cmul('{re: 16'(sr[1] >>> 2), im: 16'(si[1] >>> 2)}, tw(e1));
    y2 = cmul('{re: 16'(sr[2] >>> 2), im: 16'(si[2] >>> 2)}, tw(6'(2*e1)));
    y3 = cmul('{re: 16'(sr[3] >>> 2), im: 16'(si[3] >>> 2)}, tw(6'(3*e1)));
  end

  assign in_ready = (st[ld] == B_FREE);
  assign busy     = (st[0] != B_FREE) || (st[1] != B_FREE) || (st[2] != B_FREE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld <= 2'd0; cp <= 2'd0; ul <= 2'd0; lcnt <= '0; ucnt <= '0; bcnt <= '0;
      for (int k = 0; k < 3; k++) begin st[k] <= B_FREE; tag[k] <= '0; binv[k] <= 1'b0; end
      out_valid <= 1'b0; out_data <= '0; out_idx <= '0; out_tag <= '0; out_last <= 1'b0;
    end else begin
      // load
      if (in_valid && st[ld] == B_FREE) begin
        if (lcnt == 6'd0) begin tag[ld] <= in_tag; binv[ld] <= inv; end
        mem[ld][lcnt] <= ((lcnt == 6'd0) ? inv : binv[ld]) ? conj(in_data) : in_data;
        lcnt <= lcnt + 1'b1;
        if (lcnt == 6'd63) begin st[ld] <= B_COMP; ld <= nxt(ld); end
      end
      // compute: one butterfly per clock
      if (st[cp] == B_COMP) begin
        mem[cp][base]        <= y0;
        mem[cp][base + dd]   <= y1;
        mem[cp][base + 2*dd] <= y2;
        mem[cp][base + 3*dd] <= y3;
        if (bcnt == 6'd47) begin bcnt <= '0; st[cp] <= B_DONE; cp <= nxt(cp); end
        else bcnt <= bcnt + 1'b1;
      end
      // unload in address order = digit-reversed tone order
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (st[ul] == B_DONE || st[ul] == B_UNLD) begin
        st[ul]    <= B_UNLD;
        out_valid <= 1'b1;
        out_data  <= binv[ul] ? conj(mem[ul][ucnt]) : mem[ul][ucnt];
        out_idx   <= {ucnt[1:0], ucnt[3:2], ucnt[5:4]};
        out_tag   <= tag[ul];
        out_last  <= (ucnt == 6'd63);
        ucnt      <= ucnt + 1'b1;
        if (ucnt == 6'd63) begin st[ul] <= B_FREE; ul <= nxt(ul); end
      end
    end
  end
endmodule
