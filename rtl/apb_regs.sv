// APB configuration and status registers of the MIMO-OFDM baseband.
// The chip is configured from outside over an AMBA APB (APB3 subset).
// The bus itself follows the AMBA protocol; the register map below is
// this design's own:
//   0x00 CTRL     rw  [0] tx_mode (1 = transmit, 0 = receive, TDD)
//                     [1] enable, [2] clear status (one-clock pulse)
//                     [3] detector: 0 = zero forcing, 1 = MMSE V-BLAST
//   0x04 AGC_REF  rw  [11:0] target mean magnitude for the AGC
//   0x08 FSD_THR  rw  [7:0] periodicity threshold, |P|^2 > thr/256 * R^2
//   0x0C TX_MOD   rw  [1:0] QAM order (mod_t) of the transmit mapper and
//                     of the MMSE V-BLAST slicer
//   0x10 STATUS   ro  [0] frame detected, [1] FIFO overflow (sticky),
//                     [15:8] received OFDM symbols (wraps)
//   0x14 FOE      ro  [15:0] estimated phase increment per sample
//   0x18 NDATA    rw  [7:0] data OFDM symbols per received frame
//   0x1C NOISE    rw  [31:0] noise variance for the MMSE filters, in units
//                     of 2^-30 of the channel-estimate power |h|^2
// Zero-wait-state slave: a write takes effect at the access phase
// (psel & penable & pwrite), reads are combinational from the registers.
module apb_regs (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [7:0]  paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr,
  // configuration outputs
  output logic        tx_mode,
  output logic        enable,
  output logic [11:0] agc_ref,
  output logic [7:0]  fsd_thr,
  output logic [1:0]  tx_mod,
  output logic        clr_status,
  output logic [7:0]  ndata,
  output logic        det_mmse,
  output logic [31:0] noise,
  // status inputs
  input  logic        st_frame,
  input  logic        st_ovf,
  input  logic [7:0]  st_nsym,
  input  logic [15:0] st_dphi
);
  logic wr;
  assign wr      = psel & penable & pwrite;
  assign pready  = 1'b1;
  assign pslverr = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_mode    <= 1'b0;
      enable     <= 1'b0;
      agc_ref    <= 12'd512;
      fsd_thr    <= 8'd128;
      tx_mod     <= 2'd1;
      clr_status <= 1'b0;
      ndata      <= 8'd4;
      det_mmse   <= 1'b0;
      noise      <= 32'd1024;
    end else begin
      clr_status <= 1'b0;
      if (wr) begin
        unique case (paddr)
          8'h00: begin
            tx_mode    <= pwdata[0];
            enable     <= pwdata[1];
            clr_status <= pwdata[2];
            det_mmse   <= pwdata[3];
          end
          8'h04: agc_ref <= pwdata[11:0];
          8'h08: fsd_thr <= pwdata[7:0];
          8'h0C: tx_mod  <= pwdata[1:0];
          8'h18: ndata   <= pwdata[7:0];
          8'h1C: noise   <= pwdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (paddr)
      8'h00:   prdata = {28'd0, det_mmse, 1'b0, enable, tx_mode};
      8'h04:   prdata = {20'd0, agc_ref};
      8'h08:   prdata = {24'd0, fsd_thr};
      8'h0C:   prdata = {30'd0, tx_mod};
      8'h10:   prdata = {16'd0, st_nsym, 6'd0, st_ovf, st_frame};
      8'h14:   prdata = {16'd0, st_dphi};
      8'h18:   prdata = {24'd0, ndata};
      8'h1C:   prdata = noise;
      default: prdata = 32'd0;
    endcase
  end

  // APB rule: the access phase is always preceded by a setup phase
  property p_setup;
    @(posedge clk) disable iff (!rst_n) (psel && penable) |-> $past(psel);
  endproperty
  assert property (p_setup);
endmodule
