// output_data_bus: the shared read-data bus that runs along the right and
// bottom edges of the array and collects the boundary output buffers.
//
// In silicon the buffers are tri-state drivers on one wire bundle. Here the
// bus is resolved as an AND-OR of the enabled drivers, with odat_valid high
// while a driver is enabled (low corresponds to the floating bus). A
// clocked assertion checks, outside reset, that at most one driver is
// enabled in any cycle; clk and rst_n serve only that check.
module output_data_bus
  import ssm_pkg::*;
#(
  parameter int unsigned NDRV = 2 * DEF_N - 1,
  parameter int unsigned K    = DEF_K
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NDRV-1:0] oe,
  input  logic [K-1:0]    dat [NDRV],
  output logic            odat_valid,
  output logic [K-1:0]    odat
);

  always_comb begin
    odat = '0;
    for (int i = 0; i < NDRV; i++)
      if (oe[i]) odat |= dat[i];
    odat_valid = (oe != '0);
  end

  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(oe))
    else $error("output_data_bus: %0d drivers enabled", $countones(oe));

endmodule
