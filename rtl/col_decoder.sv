// col_decoder: one stage of the column-decoder chain along the top edge of
// the array (one instance per array column).
//
// It takes CBA, the partially decoded column address PCA, WEB and the write
// data from the primary decoder (first column) or from the column decoder
// to its left, and registers:
//   towards its column of memory blocks (vertical): CBT = (CBA == 0),
//     CSEL = PCA (with four block columns PCA is already the one-hot column
//     select), WEB and the write data;
//   towards the next column decoder (horizontal): CBA - 1, PCA, WEB, data.
// Column c sees an access c cycles after column 0, matching the skew of the
// row-decoder chain. CBA wraps modulo N, so CBT is raised in exactly one
// column. Reset values are a choice of this design (CBT low, WEB high).
module col_decoder
  import ssm_pkg::*;
#(
  parameter int unsigned N    = DEF_N,
  parameter int unsigned COLS = DEF_COLS,
  parameter int unsigned K    = DEF_K,
  localparam int unsigned NB  = bits_for(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NB-1:0]   cba_i,
  input  logic [COLS-1:0] pca_i,
  input  logic            web_i,
  input  logic [K-1:0]    data_i,
  // to the memory block of this column
  output logic            cbt,
  output logic [COLS-1:0] csel,
  output logic            web,
  output logic [K-1:0]    data,
  // to the next column decoder
  output logic [NB-1:0]   cba_o,
  output logic [COLS-1:0] pca_o,
  output logic            web_o,
  output logic [K-1:0]    data_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cbt    <= 1'b0;
      csel   <= '0;
      web    <= 1'b1;
      data   <= '0;
      cba_o  <= '0;
      pca_o  <= '0;
      web_o  <= 1'b1;
      data_o <= '0;
    end else begin
      cbt    <= (cba_i == '0);
      csel   <= pca_i;
      web    <= web_i;
      data   <= data_i;
      cba_o  <= cba_i - 1'b1;
      pca_o  <= pca_i;
      web_o  <= web_i;
      data_o <= data_i;
    end
  end

endmodule
