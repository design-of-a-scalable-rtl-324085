// tb_ssm_top: end-to-end test of the systolic synchronous memory at its
// default size (4 x 4 blocks of 16 x 4 x 4 b, 10-bit address).
//
// A reference memory, updated when an operation is issued, predicts every
// cycle of the output bus: a read issued in cycle c must appear on odat with
// odat_valid in cycle c+N+3 (7 for N = 4) and the bus must be idle
// otherwise. The test runs
//   1. the write/write/read/read sequence of the chip's timing diagram
//      (addresses 1 and 2, data 0 and 1) and measures its latency;
//   2. a write then a read of every address, all back to back;
//   3. a long random mix of reads, writes and idle (CE low) cycles.
// It counts how often each mechanism of the design occurs and fails a
// mechanism that never occurred: entry through the row-decoder chain
// (vertical travel in the first column), entry through the column-decoder
// chain (horizontal travel in the first row), direct entry at block (0,0),
// accesses of every block, use of every output buffer, reads and writes on
// consecutive cycles, read-after-write within the pipeline, and CE low.
// It also checks that the number of block accesses equals the number of
// issued operations: each operation touches the cells exactly once.
module tb_ssm_top;
  import ssm_pkg::*;

  localparam int unsigned N    = DEF_N;
  localparam int unsigned ROWS = DEF_ROWS;
  localparam int unsigned COLS = DEF_COLS;
  localparam int unsigned K    = DEF_K;
  localparam int unsigned NB   = bits_for(N);
  localparam int unsigned AW   = addr_bits(N, ROWS, COLS);
  localparam int unsigned LAT  = N + 3;
  localparam int unsigned NRAND = 6000;
  localparam int unsigned MAXCYC = 2 * (1 << AW) + NRAND + 200;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ce = 1'b0, web = 1'b1;
  logic [AW-1:0] addr = '0;
  logic [K-1:0]  idat = '0;
  logic          odat_valid;
  logic [K-1:0]  odat;

  ssm_top dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  int unsigned cyc = 0;

  logic [K-1:0] ref_mem [1 << AW];
  logic         ref_init [1 << AW];
  logic         exp_valid [MAXCYC + LAT + 4];
  logic [K-1:0] exp_data  [MAXCYC + LAT + 4];
  int unsigned  last_wr_cyc [1 << AW];
  int unsigned  last_issue_cyc = 0;

  // Mechanism counters.
  int unsigned n_vert = 0, n_horiz = 0, n_diag00 = 0, n_reads = 0,
               n_writes = 0, n_idle = 0, n_b2b_read = 0, n_raw = 0;
  int unsigned n_blk_acc [N][N];
  int unsigned n_buf [2 * N - 1];
  int unsigned n_rbt_h = 0, n_cbt_v = 0, n_access = 0;
  logic        prev_valid = 1'b0;

  always @(posedge clk) cyc <= cyc + 1;

  // Count uses of the horizontal and vertical propagation paths, the block
  // accesses and the output buffers from inside the design.
  always @(negedge clk) if (rst_n) begin
    for (int j = 0; j < N; j++) if (dut.b_rbt_h[0][j]) n_rbt_h++;
    for (int i = 0; i < N; i++) if (dut.b_cbt_v[i][0]) n_cbt_v++;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        if (dut.b_validmem[i][j]) begin
          n_blk_acc[i][j]++;
          n_access++;
        end
    for (int b = 0; b < 2 * N - 1; b++) if (dut.ob_oe[b]) n_buf[b]++;
  end

  task automatic check_outputs();
    checks++;
    if (odat_valid !== exp_valid[cyc]) begin
      failures++;
      if (failures < 10)
        $display("FAIL cycle %0d: odat_valid=%0b expected %0b", cyc, odat_valid, exp_valid[cyc]);
    end else if (exp_valid[cyc]) begin
      checks++;
      if (odat !== exp_data[cyc]) begin
        failures++;
        if (failures < 10)
          $display("FAIL cycle %0d: odat=%h expected %h", cyc, odat, exp_data[cyc]);
      end
    end
    if (odat_valid && prev_valid) n_b2b_read++;
    prev_valid = odat_valid;
  endtask

  // One cycle: check this cycle's outputs, present one operation, wait.
  task automatic op(input logic ce_i, input logic web_i,
                    input logic [AW-1:0] a, input logic [K-1:0] d);
    logic [NB-1:0] x, y;
    @(negedge clk);
    check_outputs();
    ce = ce_i; web = web_i; addr = a; idat = d;
    last_issue_cyc = cyc;
    x = a[AW-1 -: NB];
    y = a[AW-NB-1 -: NB];
    if (!ce_i) n_idle++;
    else begin
      if (x > y) n_vert++;
      else if (x < y) n_horiz++;
      else n_diag00++;
      if (!web_i) begin
        n_writes++;
        ref_mem[a] = d;
        ref_init[a] = 1'b1;
        last_wr_cyc[a] = cyc;
      end else begin
        n_reads++;
        if (ref_init[a] && cyc - last_wr_cyc[a] < LAT) n_raw++;
        exp_valid[cyc + LAT] = 1'b1;
        exp_data[cyc + LAT]  = ref_mem[a];
      end
    end
  endtask

  task automatic fail_if_zero(input string what, input int unsigned n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never happened: %s", what);
    end else $display("  %-34s %0d", what, n);
  endtask

  // Watchdog.
  initial begin
    repeat (MAXCYC + 500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned t_issue, t_seen;
    for (int a = 0; a < (1 << AW); a++) begin
      ref_mem[a] = '0; ref_init[a] = 1'b0; last_wr_cyc[a] = 0;
    end
    for (int c = 0; c < MAXCYC + LAT + 4; c++) begin
      exp_valid[c] = 1'b0; exp_data[c] = '0;
    end
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) n_blk_acc[i][j] = 0;
    for (int b = 0; b < 2 * N - 1; b++) n_buf[b] = 0;

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. Timing-diagram sequence.
    op(1'b1, 1'b0, AW'(1), K'(0));
    op(1'b1, 1'b0, AW'(2), K'(1));
    op(1'b1, 1'b1, AW'(1), 'x);
    t_issue = last_issue_cyc;
    op(1'b1, 1'b1, AW'(2), 'x);
    t_seen = 0;
    for (int c = 0; c < 12 && t_seen == 0; c++) begin
      op(1'b0, 1'b1, '0, '0);
      if (odat_valid) t_seen = cyc;
    end
    checks++;
    if (t_seen - t_issue != LAT) begin
      failures++;
      $display("FAIL: initial latency %0d cycles, expected %0d", t_seen - t_issue, LAT);
    end else $display("initial latency %0d cycles", t_seen - t_issue);

    // 2. Write then read every address, back to back.
    for (int a = 0; a < (1 << AW); a++) op(1'b1, 1'b0, AW'(a), K'($urandom));
    for (int a = 0; a < (1 << AW); a++) op(1'b1, 1'b1, AW'(a), '0);

    // 3. Random traffic, biased to one address range to produce
    //    read-after-write hazards.
    for (int n = 0; n < NRAND; n++) begin
      logic [AW-1:0] a;
      a = ($urandom % 4 == 0) ? AW'($urandom % 8) : AW'($urandom);
      op(($urandom % 8) != 0, 1'($urandom % 2), a, K'($urandom));
    end
    repeat (LAT + 2) op(1'b0, 1'b1, '0, '0);

    // Each issued operation accesses the cells of exactly one block once.
    checks++;
    if (n_access != n_reads + n_writes) begin
      failures++;
      $display("FAIL: %0d block accesses for %0d operations", n_access, n_reads + n_writes);
    end
    $display("mechanism counts:");
    fail_if_zero("entries via first column (x>y)", n_vert);
    fail_if_zero("entries via first row (x<y)", n_horiz);
    fail_if_zero("entries at block (0,0) (x==y)", n_diag00);
    fail_if_zero("vertical propagation cycles", n_cbt_v);
    fail_if_zero("horizontal propagation cycles", n_rbt_h);
    fail_if_zero("writes", n_writes);
    fail_if_zero("reads", n_reads);
    fail_if_zero("idle cycles (CE low)", n_idle);
    fail_if_zero("reads returned back to back", n_b2b_read);
    fail_if_zero("read-after-write in pipeline", n_raw);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        fail_if_zero($sformatf("accesses of block (%0d,%0d)", i, j), n_blk_acc[i][j]);
    for (int b = 0; b < 2 * N - 1; b++)
      fail_if_zero($sformatf("reads through output buffer %0d", b), n_buf[b]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
