// Synchronous FIFO that holds received data while the MIMO detection
// unit is busy with the channel preprocessing of the frame.
// First-word-fall-through: rd_data shows the oldest entry whenever
// `empty` is low; `rd_en` removes it. A write when full is dropped and
// sets the sticky `overflow` flag (cleared by `clr`). DEPTH must be a
// power of two. The FIFO's role is the design's; depth, width and the
// overflow policy are this implementation's choices.
module data_fifo #(
  parameter int DW    = 40,
  parameter int DEPTH = 256
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic [DW-1:0] wr_data,
  input  logic          wr_en,
  output logic          full,
  input  logic          rd_en,
  output logic [DW-1:0] rd_data,
  output logic          empty,
  output logic [$clog2(DEPTH):0] level,
  output logic          overflow
);
  localparam int AW = $clog2(DEPTH);
  logic [DW-1:0] mem [DEPTH];
  logic [AW:0] wp, rp;

  assign level   = wp - rp;
  assign full    = (level == (AW+1)'(DEPTH));
  assign empty   = (wp == rp);
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; overflow <= 1'b0;
    end else begin
      if (clr) overflow <= 1'b0;
      if (wr_en) begin
        if (!full) wp <= wp + 1'b1;
        else overflow <= 1'b1;
      end
      if (rd_en && !empty) rp <= rp + 1'b1;
    end
  end

  // reading an empty FIFO is a protocol error of the reader
  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty);
endmodule
