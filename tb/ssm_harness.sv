// ssm_harness: self-checking driver for one ssm_top configuration, used by
// the workload test to run several array and block sizes side by side.
//
// With its own clock it resets the memory, writes SWEEP distinct addresses
// (every address when the memory has no more than MAXSWEEP words; otherwise
// a spread-out sample given by an odd multiplier modulo the address space)
// with pseudo-random data, reads them back (all back to back), then
// runs NRAND random operations on swept addresses, concentrated on a few
// to create read-after-write hazards inside the pipeline. A reference array predicts
// the output bus for every cycle: a read presented in cycle c must appear
// in cycle c+N+3 and the bus must be idle otherwise. The measured latency
// of the first read is checked against N+3. When finished it raises done
// with its check and failure counts.
module ssm_harness
  import ssm_pkg::*;
#(
  parameter int unsigned N     = 4,
  parameter int unsigned ROWS  = 16,
  parameter int unsigned COLS  = 4,
  parameter int unsigned K     = 4,
  parameter int unsigned NRAND = 2000,
  parameter int unsigned MAXSWEEP = 4096
) (
  output logic        done,
  output int unsigned checks,
  output int unsigned failures
);

  localparam int unsigned NB   = bits_for(N);
  localparam int unsigned AW   = addr_bits(N, ROWS, COLS);
  localparam int unsigned LAT  = N + 3;
  localparam int unsigned RING = 64;
  localparam longint unsigned WORDS = longint'(1) << AW;
  localparam longint unsigned SWEEP = (WORDS < MAXSWEEP) ? WORDS : MAXSWEEP;
  // Odd multiplier: i -> i * MUL is a permutation of the address space.
  localparam longint unsigned MUL = (WORDS <= MAXSWEEP) ? 1 : 64'h9E37_79B1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ce = 1'b0, web = 1'b1;
  logic [AW-1:0] addr = '0;
  logic [K-1:0]  idat = '0;
  logic          odat_valid;
  logic [K-1:0]  odat;

  ssm_top #(.N(N), .ROWS(ROWS), .COLS(COLS), .K(K)) dut (.*);

  always #5 clk = ~clk;

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [K-1:0] ref_mem [1 << AW];
  logic         exp_valid [RING];
  logic [K-1:0] exp_data  [RING];
  int unsigned  first_read_cyc = 0, first_seen_cyc = 0;
  logic         seen_first = 1'b0;

  task automatic op(input logic ce_i, input logic web_i,
                    input logic [AW-1:0] a, input logic [K-1:0] d);
    @(negedge clk);
    // Check the current cycle, then free its slot.
    checks++;
    if (odat_valid !== exp_valid[cyc % RING]) begin
      failures++;
      if (failures < 5)
        $display("FAIL N=%0d ROWS=%0d COLS=%0d cycle %0d: valid %0b expected %0b",
                 N, ROWS, COLS, cyc, odat_valid, exp_valid[cyc % RING]);
    end else if (odat_valid && odat !== exp_data[cyc % RING]) begin
      failures++;
      if (failures < 5)
        $display("FAIL N=%0d ROWS=%0d COLS=%0d cycle %0d: data %h expected %h",
                 N, ROWS, COLS, cyc, odat, exp_data[cyc % RING]);
    end
    if (odat_valid && !seen_first) begin
      seen_first = 1'b1;
      first_seen_cyc = cyc;
    end
    exp_valid[cyc % RING] = 1'b0;
    ce = ce_i; web = web_i; addr = a; idat = d;
    if (ce_i && !web_i) ref_mem[a] = d;
    if (ce_i && web_i) begin
      if (first_read_cyc == 0) first_read_cyc = cyc;
      exp_valid[(cyc + LAT) % RING] = 1'b1;
      exp_data[(cyc + LAT) % RING]  = ref_mem[a];
    end
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    for (int r = 0; r < RING; r++) begin exp_valid[r] = 1'b0; exp_data[r] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (longint unsigned i = 0; i < SWEEP; i++)
      op(1'b1, 1'b0, AW'(i * MUL), K'(i ^ (i >> 5) ^ (i >> 11)));
    for (longint unsigned i = 0; i < SWEEP; i++)
      op(1'b1, 1'b1, AW'(i * MUL), '0);
    for (int n = 0; n < NRAND; n++) begin
      logic [AW-1:0] a;
      // Only addresses of the sweep, which hold known data.
      a = ($urandom % 4 == 0) ? AW'(longint'($urandom % 8) * MUL)
                              : AW'(longint'($urandom % SWEEP) * MUL);
      op(($urandom % 8) != 0, 1'($urandom % 2), a, K'($urandom));
    end
    repeat (LAT + 2) op(1'b0, 1'b1, '0, '0);
    checks++;
    if (first_seen_cyc - first_read_cyc != LAT) begin
      failures++;
      $display("FAIL N=%0d: first read latency %0d, expected %0d", N,
               first_seen_cyc - first_read_cyc, LAT);
    end
    $display("  %0dx%0d array, blocks %0d x %0d x %0db, %0d Kb, %0d words swept: latency %0d cycles, checks %0d failures %0d",
             N, N, ROWS, COLS, K, (WORDS * K) / 1024, SWEEP,
             first_seen_cyc - first_read_cyc, checks, failures);
    done = 1'b1;
  end

endmodule
