// primary_decoder: first pipeline stage of the systolic synchronous memory.
//
// The external inputs (CE, address, write data, WEB) are captured in
// flip-flops on the rising clock edge. From the registered address the
// stage derives, combinationally, the three pipeline-control values that
// steer an access through the array:
//   Temp = x - y (x = array row, y = array column of the target block)
//   Temp >= 0 : RBA = Temp, CBA = 0,     PD = x
//   Temp <  0 : RBA = 0,    CBA = -Temp, PD = y
// RBA (row branch address) tells the row-decoder chain at which row the
// access enters the array, CBA does the same for the column-decoder chain,
// and PD (pipeline depth) counts the diagonal steps left to the target.
// A subtractor with borrow, a two's complementer for CBA and selection gates
// produce these, as in the document's primary decoder. The remaining
// address bits are partially decoded: two one-hot decoders for the in-block
// row address (PRA A and B) and one for the in-block column (PCA).
//
// Timing: outputs are valid one cycle after the inputs are sampled.
// Reset (an assumption of this design) clears CE so that no access is
// launched while the pipeline fills.
module primary_decoder
  import ssm_pkg::*;
#(
  parameter int unsigned N    = DEF_N,
  parameter int unsigned ROWS = DEF_ROWS,
  parameter int unsigned COLS = DEF_COLS,
  parameter int unsigned K    = DEF_K,
  localparam int unsigned NB  = bits_for(N),
  localparam int unsigned CB  = bits_for(COLS),
  localparam int unsigned RAA = ra_a_bits(ROWS),
  localparam int unsigned RAB = ra_b_bits(ROWS),
  localparam int unsigned AW  = addr_bits(N, ROWS, COLS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ce,       // chip enable
  input  logic                 web,      // 1 = read, 0 = write
  input  logic [AW-1:0]        addr,
  input  logic [K-1:0]         data,     // write data
  output logic                 ce_o,
  output logic                 web_o,
  output logic [K-1:0]         data_o,
  output logic [NB-1:0]        rba,      // row branch address
  output logic [NB-1:0]        cba,      // column branch address
  output logic [NB-1:0]        pd,       // pipeline depth
  output logic [(1<<RAA)-1:0]  pra_a,    // partially decoded row address, low part
  output logic [(1<<RAB)-1:0]  pra_b,    // partially decoded row address, high part
  output logic [COLS-1:0]      pca       // partially decoded column address
);

  logic [AW-1:0] addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ce_o   <= 1'b0;
      web_o  <= 1'b1;
      addr_q <= '0;
      data_o <= '0;
    end else begin
      ce_o   <= ce;
      web_o  <= web;
      addr_q <= addr;
      data_o <= data;
    end
  end

  // Address fields.
  logic [NB-1:0]  x, y;
  logic [RAB-1:0] ra_b;
  logic [RAA-1:0] ra_a;
  logic [CB-1:0]  ca;
  assign {x, y, ra_b, ra_a, ca} = addr_q;

  // Subtractor with borrow and two's complementer.
  logic [NB-1:0] temp;
  logic          borrow;
  assign {borrow, temp} = {1'b0, x} - {1'b0, y};

  always_comb begin
    if (!borrow) begin
      rba = temp;
      cba = '0;
      pd  = x;
    end else begin
      rba = '0;
      cba = ~temp + 1'b1;
      pd  = y;
    end
  end

  // One-hot partial decoders.
  always_comb begin
    pra_a = '0;
    pra_b = '0;
    pca   = '0;
    pra_a[ra_a] = 1'b1;
    pra_b[ra_b] = 1'b1;
    pca[ca]     = 1'b1;
  end

endmodule
