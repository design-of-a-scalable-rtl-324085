// output_buffer: read-data output stage at a boundary memory block (last
// array column or last array row).
//
// It registers the Data of the diagonal bundle leaving its block together
// with an output enable that is high when RBT, CBT and WEB (read) are all
// high, and CE is set. The registered enable stands for the control of the
// document's tri-state driver: only one buffer drives the output data bus
// per cycle. Including CE in the enable is this design's choice.
//
// Timing: one cycle, the last stage of the N+3 cycle pipeline.
module output_buffer
  import ssm_pkg::*;
#(
  parameter int unsigned K = DEF_K
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rbt,
  input  logic         cbt,
  input  logic         web,
  input  logic         ce,
  input  logic [K-1:0] data,
  output logic         oe,       // tri-state enable
  output logic [K-1:0] odat
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oe   <= 1'b0;
      odat <= '0;
    end else begin
      oe   <= rbt && cbt && web && ce;
      odat <= data;
    end
  end

endmodule
