// tb_ssm_workloads: runs the memory sizes of the access-time comparison
// (4 Kb to 4 Mb, built as 4 x 4 and as 8 x 8 arrays) through ssm_harness:
// up to 4096 distinct addresses written and read back (all of them for
// the 4 Kb and 16 Kb sizes), then random traffic, with the
// N+3 cycle latency checked for each array size. Block geometry for the
// larger sizes is this design's choice: each block holds
// size / (N*N) bits as 2^r rows by 2^c columns of 4-bit words, with
// c = max(2, (log2(words) - 2) / 2) and r the rest (16 x 4 for 64 words).
module tb_ssm_workloads;

  localparam int NCFG = 11;
  logic        done [NCFG];
  int unsigned chk  [NCFG];
  int unsigned fail [NCFG];

  // 4 x 4 arrays
  ssm_harness #(.N(4), .ROWS(16),  .COLS(4))   h0  (.done(done[0]),  .checks(chk[0]),  .failures(fail[0]));   //   4 Kb
  ssm_harness #(.N(4), .ROWS(32),  .COLS(8))   h1  (.done(done[1]),  .checks(chk[1]),  .failures(fail[1]));   //  16 Kb
  ssm_harness #(.N(4), .ROWS(64),  .COLS(16))  h2  (.done(done[2]),  .checks(chk[2]),  .failures(fail[2]));   //  64 Kb
  ssm_harness #(.N(4), .ROWS(128), .COLS(32))  h3  (.done(done[3]),  .checks(chk[3]),  .failures(fail[3]));   // 256 Kb
  ssm_harness #(.N(4), .ROWS(256), .COLS(64))  h4  (.done(done[4]),  .checks(chk[4]),  .failures(fail[4]));   //   1 Mb
  ssm_harness #(.N(4), .ROWS(512), .COLS(128)) h5  (.done(done[5]),  .checks(chk[5]),  .failures(fail[5]));   //   4 Mb
  // 8 x 8 arrays
  ssm_harness #(.N(8), .ROWS(16),  .COLS(4))   h6  (.done(done[6]),  .checks(chk[6]),  .failures(fail[6]));   //  16 Kb
  ssm_harness #(.N(8), .ROWS(32),  .COLS(8))   h7  (.done(done[7]),  .checks(chk[7]),  .failures(fail[7]));   //  64 Kb
  ssm_harness #(.N(8), .ROWS(64),  .COLS(16))  h8  (.done(done[8]),  .checks(chk[8]),  .failures(fail[8]));   // 256 Kb
  ssm_harness #(.N(8), .ROWS(128), .COLS(32))  h9  (.done(done[9]),  .checks(chk[9]),  .failures(fail[9]));   //   1 Mb
  ssm_harness #(.N(8), .ROWS(256), .COLS(64))  h10 (.done(done[10]), .checks(chk[10]), .failures(fail[10]));  //   4 Mb

  int unsigned checks = 0, failures = 0;

  function automatic logic all_done();
    for (int i = 0; i < NCFG; i++) if (!done[i]) return 1'b0;
    return 1'b1;
  endfunction

  // Watchdog: each configuration needs about 10,300 cycles.
  initial begin
    #(10 * 64'd40_000);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    do #100; while (!all_done());
    for (int i = 0; i < NCFG; i++) begin
      checks += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
