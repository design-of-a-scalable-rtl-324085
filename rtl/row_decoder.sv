// row_decoder: one stage of the row-decoder chain on the left edge of the
// array (one instance per array row).
//
// It takes RBA, PD, the partially decoded row address (PRA A and B) and CE
// from the primary decoder (first row) or from the row decoder above, and
// registers:
//   towards its row of memory blocks (horizontal): RBT = (RBA == 0), the
//     full one-hot word line WL = PRA B x PRA A, PD unchanged, and CE;
//   towards the next row decoder (vertical): RBA - 1, PD - 1, PRA and CE.
// Because each row decoder adds one register, row r sees an access r cycles
// after row 0; that skew is what makes every access take the same number
// of cycles through the array. RBA and PD wrap modulo N; after the row
// where RBA reached zero at most N-1 further rows follow, so RBT is raised
// in exactly one row.
//
// Word-line ordering WL[b * 2^|A| + a] = B[b] & A[a] is a choice of this
// design; the document only says the decoder has logic to form the word
// line from PRA. Reset clears CE and RBT.
module row_decoder
  import ssm_pkg::*;
#(
  parameter int unsigned N    = DEF_N,
  parameter int unsigned ROWS = DEF_ROWS,
  localparam int unsigned NB  = bits_for(N),
  localparam int unsigned RAA = ra_a_bits(ROWS),
  localparam int unsigned RAB = ra_b_bits(ROWS),
  localparam int unsigned WLW = (1 << RAA) * (1 << RAB)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NB-1:0]       rba_i,
  input  logic [NB-1:0]       pd_i,
  input  logic [(1<<RAA)-1:0] pra_a_i,
  input  logic [(1<<RAB)-1:0] pra_b_i,
  input  logic                ce_i,
  // to the memory block of this row
  output logic                rbt,
  output logic [WLW-1:0]      wl,
  output logic [NB-1:0]       pd,
  output logic                ce,
  // to the next row decoder
  output logic [NB-1:0]       rba_o,
  output logic [NB-1:0]       pd_o,
  output logic [(1<<RAA)-1:0] pra_a_o,
  output logic [(1<<RAB)-1:0] pra_b_o,
  output logic                ce_o
);

  logic [WLW-1:0] wl_d;

  always_comb begin
    for (int b = 0; b < (1 << RAB); b++)
      for (int a = 0; a < (1 << RAA); a++)
        wl_d[b * (1 << RAA) + a] = pra_b_i[b] & pra_a_i[a];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rbt     <= 1'b0;
      wl      <= '0;
      pd      <= '0;
      ce      <= 1'b0;
      rba_o   <= '0;
      pd_o    <= '0;
      pra_a_o <= '0;
      pra_b_o <= '0;
      ce_o    <= 1'b0;
    end else begin
      rbt     <= (rba_i == '0);
      wl      <= wl_d;
      pd      <= pd_i;
      ce      <= ce_i;
      rba_o   <= rba_i - 1'b1;
      pd_o    <= pd_i - 1'b1;
      pra_a_o <= pra_a_i;
      pra_b_o <= pra_b_i;
      ce_o    <= ce_i;
    end
  end

endmodule
