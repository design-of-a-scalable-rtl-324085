// tb_mem_cell_array: fills every word of a 16 x 4 x 4 b cell array through
// one-hot word line and column select, reads every word back, then runs
// random reads and writes against a reference array. Also checks that a
// write with no word line active changes nothing and reads as zero.
module tb_mem_cell_array;
  import ssm_pkg::*;

  localparam int unsigned ROWS = DEF_ROWS, COLS = DEF_COLS, K = DEF_K;

  logic clk = 1'b0;
  logic [ROWS-1:0] wl = '0;
  logic [COLS-1:0] csel = '0;
  logic we = 1'b0;
  logic [K-1:0] wdata = '0;
  logic [K-1:0] rdata;

  mem_cell_array dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  logic [K-1:0] model [ROWS][COLS];

  task automatic wr(input int r, input int c, input logic [K-1:0] d);
    @(negedge clk);
    wl = ROWS'(1) << r; csel = COLS'(1) << c; we = 1'b1; wdata = d;
    @(negedge clk);
    we = 1'b0;
    model[r][c] = d;
  endtask

  task automatic rd(input int r, input int c);
    @(negedge clk);
    wl = ROWS'(1) << r; csel = COLS'(1) << c; we = 1'b0;
    #1;
    checks++;
    if (rdata !== model[r][c]) begin
      failures++;
      if (failures < 20) $display("FAIL read (%0d,%0d): %h expected %h", r, c, rdata, model[r][c]);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) wr(r, c, K'((r * 7 + c * 3) ^ 5));
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) rd(r, c);
    for (int n = 0; n < 2000; n++) begin
      if ($urandom % 2) wr($urandom % ROWS, $urandom % COLS, K'($urandom));
      else rd($urandom % ROWS, $urandom % COLS);
    end
    // Write with no word line active: nothing changes, read is zero.
    @(negedge clk);
    wl = '0; csel = COLS'(1); we = 1'b1; wdata = '1;
    #1;
    checks++;
    if (rdata !== '0) begin
      failures++;
      $display("FAIL idle read %h", rdata);
    end
    @(negedge clk);
    we = 1'b0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) rd(r, c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
