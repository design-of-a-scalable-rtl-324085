// tb_primary_decoder: applies every address of the default 4 x 4 memory with
// random data, WEB and CE, and checks one cycle later the registered
// pass-through signals, RBA, CBA and PD (worked out from the block row x
// and block column y as integers) and the three one-hot partial decodes.
module tb_primary_decoder;
  import ssm_pkg::*;

  localparam int unsigned N = DEF_N, ROWS = DEF_ROWS, COLS = DEF_COLS, K = DEF_K;
  localparam int unsigned NB = bits_for(N), CB = bits_for(COLS);
  localparam int unsigned RAA = ra_a_bits(ROWS), RAB = ra_b_bits(ROWS);
  localparam int unsigned AW = addr_bits(N, ROWS, COLS);

  logic clk = 1'b0, rst_n = 1'b0;
  logic ce = 1'b0, web = 1'b1;
  logic [AW-1:0] addr = '0;
  logic [K-1:0]  data = '0;
  logic ce_o, web_o;
  logic [K-1:0] data_o;
  logic [NB-1:0] rba, cba, pd;
  logic [(1<<RAA)-1:0] pra_a;
  logic [(1<<RAB)-1:0] pra_b;
  logic [COLS-1:0] pca;

  primary_decoder dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (addr %h)", what, got, exp, addr);
    end
  endtask

  initial begin
    repeat (200 * (1 << AW)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < (1 << AW); a++) begin
      @(negedge clk);
      addr = AW'(a); data = K'($urandom); web = $urandom % 2; ce = $urandom % 2;
      @(negedge clk);
      x = int'(a) >> (AW - NB);
      y = (int'(a) >> (AW - 2 * NB)) % N;
      chk("ce", ce_o, ce);
      chk("web", web_o, web);
      chk("data", data_o, data);
      chk("rba", rba, (x >= y) ? x - y : 0);
      chk("cba", cba, (x >= y) ? 0 : y - x);
      chk("pd",  pd,  (x >= y) ? x : y);
      chk("pca", pca, 1 << (a % COLS));
      chk("pra_a", pra_a, 1 << ((a / COLS) % (1 << RAA)));
      chk("pra_b", pra_b, 1 << ((a / (COLS << RAA)) % (1 << RAB)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
