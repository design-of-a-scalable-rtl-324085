// tb_col_decoder: drives random CBA, one-hot PCA, WEB and data into one
// column-decoder stage and checks, one cycle later, CBT (CBA == 0), CSEL,
// WEB and data towards the block, and CBA-1 (modulo N), PCA, WEB and data
// towards the next stage.
module tb_col_decoder;
  import ssm_pkg::*;

  localparam int unsigned N = DEF_N, COLS = DEF_COLS, K = DEF_K;
  localparam int unsigned NB = bits_for(N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NB-1:0] cba_i = '0;
  logic [COLS-1:0] pca_i = '0;
  logic web_i = 1'b1;
  logic [K-1:0] data_i = '0;
  logic cbt, web, web_o;
  logic [COLS-1:0] csel, pca_o;
  logic [K-1:0] data, data_o;
  logic [NB-1:0] cba_o;

  col_decoder dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, s, d;
    logic w;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      c = $urandom % N; s = $urandom % COLS; d = $urandom % (1 << K); w = $urandom % 2;
      cba_i = NB'(c); pca_i = COLS'(1 << s); data_i = K'(d); web_i = w;
      @(negedge clk);
      chk("cbt", cbt, c == 0);
      chk("csel", csel, 1 << s);
      chk("web", web, w);
      chk("data", data, d);
      chk("cba_o", cba_o, (c + N - 1) % N);
      chk("pca_o", pca_o, 1 << s);
      chk("web_o", web_o, w);
      chk("data_o", data_o, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
