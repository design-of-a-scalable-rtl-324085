// tb_row_decoder: drives random RBA, PD, one-hot PRA fields and CE into one
// row-decoder stage and checks, one cycle later, RBT (RBA == 0), the
// one-hot word line at index b*4+a, the unchanged PD and CE towards the
// block, and RBA-1, PD-1 (modulo N) and PRA towards the next stage.
module tb_row_decoder;
  import ssm_pkg::*;

  localparam int unsigned N = DEF_N, ROWS = DEF_ROWS;
  localparam int unsigned NB = bits_for(N);
  localparam int unsigned RAA = ra_a_bits(ROWS), RAB = ra_b_bits(ROWS);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NB-1:0] rba_i = '0, pd_i = '0;
  logic [(1<<RAA)-1:0] pra_a_i = '0;
  logic [(1<<RAB)-1:0] pra_b_i = '0;
  logic ce_i = 1'b0;
  logic rbt, ce, ce_o;
  logic [ROWS-1:0] wl;
  logic [NB-1:0] pd, rba_o, pd_o;
  logic [(1<<RAA)-1:0] pra_a_o;
  logic [(1<<RAB)-1:0] pra_b_o;

  row_decoder dut (.*);

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
    int ia, ib, r, p;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      ia = $urandom % (1 << RAA); ib = $urandom % (1 << RAB);
      r = $urandom % N; p = $urandom % N;
      rba_i = NB'(r); pd_i = NB'(p); ce_i = $urandom % 2;
      pra_a_i = 1 << ia; pra_b_i = 1 << ib;
      @(negedge clk);
      chk("rbt", rbt, r == 0);
      chk("wl", wl, 64'd1 << (ib * (1 << RAA) + ia));
      chk("pd", pd, p);
      chk("ce", ce, ce_i);
      chk("rba_o", rba_o, (r + N - 1) % N);
      chk("pd_o", pd_o, (p + N - 1) % N);
      chk("pra_a_o", pra_a_o, 1 << ia);
      chk("pra_b_o", pra_b_o, 1 << ib);
      chk("ce_o", ce_o, ce_i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
