// mem_cell_array: the SRAM cell array inside one memory block, ROWS word
// lines by COLS columns of K-bit words (16 x 4 x 4 b = 256 b by default).
//
// A cell is selected by a one-hot word line (wl, already gated by the
// block's control logic) and a one-hot column select (csel). On the rising
// clock edge a write stores wdata in the selected word when we is high.
// Reading is combinational from the selected word: the block's pipeline
// register captures it at the end of the same cycle, standing in for the
// sense amplifier that senses in the high clock phase and drives the
// propagation multiplexer. The transistor-level column (6-T cells,
// precharge to VDD, single-ended sense amplifier, falling-edge input latch)
// is replaced by this single-edge register array; that is this design's
// modelling choice. rdata is zero when no word line is active.
module mem_cell_array
  import ssm_pkg::*;
#(
  parameter int unsigned ROWS = DEF_ROWS,
  parameter int unsigned COLS = DEF_COLS,
  parameter int unsigned K    = DEF_K
) (
  input  logic            clk,
  input  logic [ROWS-1:0] wl,
  input  logic [COLS-1:0] csel,
  input  logic            we,
  input  logic [K-1:0]    wdata,
  output logic [K-1:0]    rdata
);

  localparam int unsigned RB = bits_for(ROWS);
  localparam int unsigned CB = bits_for(COLS);

  logic [K-1:0] cells [ROWS][COLS];

  // One-hot to index encoders (an OR of the indices of the set bits).
  logic [RB-1:0] row;
  logic [CB-1:0] col;
  always_comb begin
    row = '0;
    col = '0;
    for (int r = 0; r < ROWS; r++)
      if (wl[r]) row |= RB'(r);
    for (int c = 0; c < COLS; c++)
      if (csel[c]) col |= CB'(c);
  end

  logic sel;
  assign sel = (wl != '0) && (csel != '0);

  always_ff @(posedge clk) begin
    if (we && sel)
      cells[row][col] <= wdata;
  end

  assign rdata = sel ? cells[row][col] : '0;

endmodule
