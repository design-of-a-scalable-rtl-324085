// tb_output_data_bus: enables each of the 2N-1 drivers alone (and none) with
// random data on every driver, and checks that the bus carries exactly the
// enabled driver's data and that odat_valid follows the enables.
module tb_output_data_bus;
  import ssm_pkg::*;

  localparam int unsigned NDRV = 2 * DEF_N - 1, K = DEF_K;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NDRV-1:0] oe = '0;
  logic [K-1:0] dat [NDRV];
  logic odat_valid;
  logic [K-1:0] odat;

  output_data_bus dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    for (int i = 0; i < NDRV; i++) dat[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int i = 0; i < NDRV; i++) dat[i] = K'($urandom);
      s = $urandom % (NDRV + 1);
      oe = (s == NDRV) ? '0 : NDRV'(1) << s;
      #1;
      checks += 2;
      if (odat_valid !== (s != NDRV)) begin failures++; $display("FAIL valid"); end
      if (odat !== ((s == NDRV) ? K'(0) : dat[s])) begin
        failures++; $display("FAIL odat %h driver %0d", odat, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
