// tb_mem_block: drives one memory block with random row and column bundles
// (triggers, PD biased towards zero, one-hot WL and CSEL, CE, WEB, data) and
// checks every registered output one cycle later against a reference model
// of the block's 256 cells: the direction of the triggers (RBT alone to the
// right, CBT alone downward, both diagonally), PD - 1, the pass-through
// signals, and Data, which carries the stored word after a read access and
// the input data otherwise. Writes happen only when CE, RBT and CBT are high
// and PD is zero. It counts reads, writes and each trigger combination.
module tb_mem_block;
  import ssm_pkg::*;

  localparam int unsigned N = DEF_N, ROWS = DEF_ROWS, COLS = DEF_COLS, K = DEF_K;
  localparam int unsigned NB = bits_for(N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic rbt_i = 1'b0, ce_i = 1'b0, cbt_i = 1'b0, web_i = 1'b1;
  logic [ROWS-1:0] wl_i = '0;
  logic [NB-1:0] pd_i = '0;
  logic [COLS-1:0] csel_i = '0;
  logic [K-1:0] data_i = '0;
  logic rbt_h, cbt_v, rbt_d, cbt_d, ce_o, web_o, validmem;
  logic [ROWS-1:0] wl_o;
  logic [NB-1:0] pd_o;
  logic [COLS-1:0] csel_o;
  logic [K-1:0] data_o;

  mem_block dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  int unsigned n_rd = 0, n_wr = 0, n_h = 0, n_v = 0, n_d = 0;
  logic [K-1:0] model [ROWS][COLS];

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, c, p;
    logic rb, cb, ce, we;
    logic [K-1:0] d, exp_d;
    for (int i = 0; i < ROWS; i++) for (int j = 0; j < COLS; j++) model[i][j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Clear the cells through the block itself.
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++) begin
        @(negedge clk);
        rbt_i = 1; cbt_i = 1; ce_i = 1; pd_i = '0; web_i = 0; data_i = '0;
        wl_i = ROWS'(1) << i; csel_i = COLS'(1) << j;
      end
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      r = $urandom % ROWS; c = $urandom % COLS;
      p = ($urandom % 2) ? 0 : $urandom % N;
      rb = ($urandom % 4) != 0; cb = ($urandom % 4) != 0; ce = ($urandom % 8) != 0;
      we = $urandom % 2; d = K'($urandom);
      rbt_i = rb; cbt_i = cb; ce_i = ce; pd_i = NB'(p); web_i = !we; data_i = d;
      wl_i = ROWS'(1) << r; csel_i = COLS'(1) << c;
      exp_d = d;
      if (ce && rb && cb && p == 0) begin
        if (we) begin model[r][c] = d; n_wr++; end
        else begin exp_d = model[r][c]; n_rd++; end
      end
      if (rb && !cb) n_h++;
      if (cb && !rb) n_v++;
      if (rb && cb) n_d++;
      @(negedge clk);
      chk("rbt_h", rbt_h, rb && !cb);
      chk("cbt_v", cbt_v, cb && !rb);
      chk("rbt_d", rbt_d, rb && cb);
      chk("cbt_d", cbt_d, rb && cb);
      chk("wl_o", wl_o, 64'd1 << r);
      chk("pd_o", pd_o, (p + N - 1) % N);
      chk("ce_o", ce_o, ce);
      chk("csel_o", csel_o, 1 << c);
      chk("web_o", web_o, !we);
      chk("data_o", data_o, exp_d);
    end
    checks++;
    if (n_rd == 0 || n_wr == 0 || n_h == 0 || n_v == 0 || n_d == 0) begin
      failures++;
      $display("FAIL: a case never occurred");
    end
    $display("reads %0d writes %0d horizontal %0d vertical %0d diagonal %0d", n_rd, n_wr, n_h, n_v, n_d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
