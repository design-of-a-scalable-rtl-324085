// tb_output_buffer: drives random RBT, CBT, WEB, CE and data into a boundary
// output buffer and checks one cycle later that the enable is high exactly
// for a read (WEB high) with both triggers and CE high, and that the data
// is the input of the previous cycle.
module tb_output_buffer;
  import ssm_pkg::*;

  localparam int unsigned K = DEF_K;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rbt = 1'b0, cbt = 1'b0, web = 1'b1, ce = 1'b0;
  logic [K-1:0] data = '0;
  logic oe;
  logic [K-1:0] odat;

  output_buffer dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0, n_on = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e;
    logic [K-1:0] d;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      rbt = $urandom % 2; cbt = $urandom % 2; web = $urandom % 2; ce = $urandom % 2;
      d = K'($urandom); data = d;
      e = rbt & cbt & web & ce;
      if (e) n_on++;
      @(negedge clk);
      checks += 2;
      if (oe !== e) begin failures++; $display("FAIL oe %0b expected %0b", oe, e); end
      if (odat !== d) begin failures++; $display("FAIL odat %h expected %h", odat, d); end
    end
    checks++;
    if (n_on == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
