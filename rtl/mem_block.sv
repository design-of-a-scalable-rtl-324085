// mem_block: one element of the N x N systolic memory array.
//
// Each block receives two bundles of signals, one pipeline stage apart from
// its neighbours:
//   row bundle    (RBT, WL, PD, CE)         from the left or from the
//                                            upper-left block;
//   column bundle (CBT, CSEL, WEB, Data)    from above or from the
//                                            upper-left block.
// Control logic: the block accesses its cell array when CE, RBT and CBT
// are high and PD is zero; a low WEB writes Data into the word chosen by
// WL and CSEL, a high WEB reads it. The read word replaces Data in the
// column bundle (the multiplexer of the block); otherwise Data passes on.
// The decrementer lowers PD by one before it is passed on.
// Propagation direction: RBT alone continues to the right (horizontal),
// CBT alone continues downward (vertical), and RBT with CBT continues to
// the lower-right block (diagonal). The top level uses the horizontal
// outputs only in the first array row and the vertical outputs only in the
// first array column, as in the document; all other blocks pass along the
// diagonal. The access rule and the propagation directions follow the
// document; gating the triggers per direction and placing the pipeline
// register at the block outputs are this design's choices.
//
// Timing: all outputs are registered, one cycle per block. An assertion
// checks that an access sees a one-hot word line and column select.
module mem_block
  import ssm_pkg::*;
#(
  parameter int unsigned N    = DEF_N,
  parameter int unsigned ROWS = DEF_ROWS,
  parameter int unsigned COLS = DEF_COLS,
  parameter int unsigned K    = DEF_K,
  localparam int unsigned NB  = bits_for(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  // row bundle in
  input  logic            rbt_i,
  input  logic [ROWS-1:0] wl_i,
  input  logic [NB-1:0]   pd_i,
  input  logic            ce_i,
  // column bundle in
  input  logic            cbt_i,
  input  logic [COLS-1:0] csel_i,
  input  logic            web_i,
  input  logic [K-1:0]    data_i,
  // triggers out, one per direction
  output logic            rbt_h,    // horizontal, to the right
  output logic            cbt_v,    // vertical, downward
  output logic            rbt_d,    // diagonal
  output logic            cbt_d,    // diagonal
  // shared registered bundle contents
  output logic [ROWS-1:0] wl_o,
  output logic [NB-1:0]   pd_o,
  output logic            ce_o,
  output logic [COLS-1:0] csel_o,
  output logic            web_o,
  output logic [K-1:0]    data_o,
  // memory enable (validmem), for observation
  output logic            validmem
);

  logic [K-1:0] rdata;

  // Control logic.
  assign validmem = ce_i && rbt_i && cbt_i && (pd_i == '0);

  mem_cell_array #(.ROWS(ROWS), .COLS(COLS), .K(K)) u_cells (
    .clk   (clk),
    .wl    (validmem ? wl_i : '0),
    .csel  (csel_i),
    .we    (validmem && !web_i),
    .wdata (data_i),
    .rdata (rdata)
  );

  // An access must select exactly one word line and one column.
  a_onehot_select: assert property (@(posedge clk) disable iff (!rst_n)
      validmem |-> ($onehot(wl_i) && $onehot(csel_i)))
    else $error("mem_block: access without a one-hot word line and column select");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rbt_h  <= 1'b0;
      cbt_v  <= 1'b0;
      rbt_d  <= 1'b0;
      cbt_d  <= 1'b0;
      wl_o   <= '0;
      pd_o   <= '0;
      ce_o   <= 1'b0;
      csel_o <= '0;
      web_o  <= 1'b1;
      data_o <= '0;
    end else begin
      rbt_h  <= rbt_i && !cbt_i;
      cbt_v  <= cbt_i && !rbt_i;
      rbt_d  <= rbt_i && cbt_i;
      cbt_d  <= rbt_i && cbt_i;
      wl_o   <= wl_i;
      pd_o   <= pd_i - 1'b1;
      ce_o   <= ce_i;
      csel_o <= csel_i;
      web_o  <= web_i;
      data_o <= (validmem && web_i) ? rdata : data_i;
    end
  end

endmodule
