// ssm_top: scalable systolic synchronous memory (SSM), an N x N array of
// small SRAM blocks that accepts one read or one write every clock cycle and
// returns read data after a fixed N+3 cycles, whatever the array size.
//
// Structure (default: 4 x 4 blocks of 16 x 4 x 4 b, 4 Kb, 10-bit address):
//   primary_decoder   stage 1: registers the inputs, computes RBA, CBA and
//                     PD from the block row x and block column y
//   row_decoder[i]    chain down the left edge, one register per row
//   col_decoder[j]    chain along the top edge, one register per column
//   mem_block[i][j]   array; first row passes row signals to the right,
//                     first column passes column signals down, every
//                     block passes both diagonally
//   output_buffer     one per boundary block (last column, then last row)
//   output_data_bus   collects the 2N-1 output buffers
// An access for block (x, y) enters the array at (x-y, 0) when x >= y and
// at (0, y-x) otherwise, and then runs along one diagonal. PD counts down
// one per block; the block where PD is zero (always (x, y)) reads or writes
// its cells. Read data rides the rest of the diagonal to the boundary block
// and its output buffer.
// Timing: inputs sampled at clock edge 0 appear on odat/odat_valid after
// edge N+2, that is N+3 cycles counted from the cycle the address is
// presented in (7 cycles for N = 4). Writes and reads may be issued
// back to back; a read after a write to the same address sees the new data.
// odat_valid low stands for the undriven (tri-state) output bus.
module ssm_top
  import ssm_pkg::*;
#(
  parameter int unsigned N    = DEF_N,     // array is N x N blocks (power of 2, >= 2)
  parameter int unsigned ROWS = DEF_ROWS,  // word lines per block (power of 2, >= 4)
  parameter int unsigned COLS = DEF_COLS,  // columns per block (power of 2, >= 2)
  parameter int unsigned K    = DEF_K,     // bits per word
  localparam int unsigned NB  = bits_for(N),
  localparam int unsigned RAA = ra_a_bits(ROWS),
  localparam int unsigned RAB = ra_b_bits(ROWS),
  localparam int unsigned AW  = addr_bits(N, ROWS, COLS),
  localparam int unsigned NBUF = 2 * N - 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,          // chip enable
  input  logic          web,         // 1 = read, 0 = write
  input  logic [AW-1:0] addr,
  input  logic [K-1:0]  idat,        // write data
  output logic          odat_valid,  // output bus driven
  output logic [K-1:0]  odat         // read data
);

  // Row-decoder chain; index 0 is the primary decoder's output.
  logic [NB-1:0]       rc_rba   [N+1];
  logic [NB-1:0]       rc_pd    [N+1];
  logic [(1<<RAA)-1:0] rc_pra_a [N+1];
  logic [(1<<RAB)-1:0] rc_pra_b [N+1];
  logic                rc_ce    [N+1];
  // Row decoder to block.
  logic                rd_rbt [N];
  logic [ROWS-1:0]     rd_wl  [N];
  logic [NB-1:0]       rd_pd  [N];
  logic                rd_ce  [N];

  // Column-decoder chain; index 0 is the primary decoder's output.
  logic [NB-1:0]       cc_cba  [N+1];
  logic [COLS-1:0]     cc_pca  [N+1];
  logic                cc_web  [N+1];
  logic [K-1:0]        cc_data [N+1];
  // Column decoder to block.
  logic                cd_cbt  [N];
  logic [COLS-1:0]     cd_csel [N];
  logic                cd_web  [N];
  logic [K-1:0]        cd_data [N];

  // Block outputs.
  logic                b_rbt_h [N][N];
  logic                b_cbt_v [N][N];
  logic                b_rbt_d [N][N];
  logic                b_cbt_d [N][N];
  logic [ROWS-1:0]     b_wl    [N][N];
  logic [NB-1:0]       b_pd    [N][N];
  logic                b_ce    [N][N];
  logic [COLS-1:0]     b_csel  [N][N];
  logic                b_web   [N][N];
  logic [K-1:0]        b_data  [N][N];
  logic                b_validmem [N][N];

  primary_decoder #(.N(N), .ROWS(ROWS), .COLS(COLS), .K(K)) u_pdec (
    .clk    (clk),
    .rst_n  (rst_n),
    .ce     (ce),
    .web    (web),
    .addr   (addr),
    .data   (idat),
    .ce_o   (rc_ce[0]),
    .web_o  (cc_web[0]),
    .data_o (cc_data[0]),
    .rba    (rc_rba[0]),
    .cba    (cc_cba[0]),
    .pd     (rc_pd[0]),
    .pra_a  (rc_pra_a[0]),
    .pra_b  (rc_pra_b[0]),
    .pca    (cc_pca[0])
  );

  for (genvar i = 0; i < N; i++) begin : g_rdec
    row_decoder #(.N(N), .ROWS(ROWS)) u_rdec (
      .clk     (clk),
      .rst_n   (rst_n),
      .rba_i   (rc_rba[i]),
      .pd_i    (rc_pd[i]),
      .pra_a_i (rc_pra_a[i]),
      .pra_b_i (rc_pra_b[i]),
      .ce_i    (rc_ce[i]),
      .rbt     (rd_rbt[i]),
      .wl      (rd_wl[i]),
      .pd      (rd_pd[i]),
      .ce      (rd_ce[i]),
      .rba_o   (rc_rba[i+1]),
      .pd_o    (rc_pd[i+1]),
      .pra_a_o (rc_pra_a[i+1]),
      .pra_b_o (rc_pra_b[i+1]),
      .ce_o    (rc_ce[i+1])
    );
  end

  for (genvar j = 0; j < N; j++) begin : g_cdec
    col_decoder #(.N(N), .COLS(COLS), .K(K)) u_cdec (
      .clk    (clk),
      .rst_n  (rst_n),
      .cba_i  (cc_cba[j]),
      .pca_i  (cc_pca[j]),
      .web_i  (cc_web[j]),
      .data_i (cc_data[j]),
      .cbt    (cd_cbt[j]),
      .csel   (cd_csel[j]),
      .web    (cd_web[j]),
      .data   (cd_data[j]),
      .cba_o  (cc_cba[j+1]),
      .pca_o  (cc_pca[j+1]),
      .web_o  (cc_web[j+1]),
      .data_o (cc_data[j+1])
    );
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      logic            rbt_in, ce_in, cbt_in, web_in;
      logic [ROWS-1:0] wl_in;
      logic [NB-1:0]   pd_in;
      logic [COLS-1:0] csel_in;
      logic [K-1:0]    data_in;

      // Row bundle: from the row decoder, from the left (first row) or
      // from the upper-left block.
      if (j == 0) begin : g_rsrc
        assign rbt_in = rd_rbt[i];
        assign wl_in  = rd_wl[i];
        assign pd_in  = rd_pd[i];
        assign ce_in  = rd_ce[i];
      end else if (i == 0) begin : g_rsrc
        assign rbt_in = b_rbt_h[0][j-1];
        assign wl_in  = b_wl[0][j-1];
        assign pd_in  = b_pd[0][j-1];
        assign ce_in  = b_ce[0][j-1];
      end else begin : g_rsrc
        assign rbt_in = b_rbt_d[i-1][j-1];
        assign wl_in  = b_wl[i-1][j-1];
        assign pd_in  = b_pd[i-1][j-1];
        assign ce_in  = b_ce[i-1][j-1];
      end

      // Column bundle: from the column decoder, from above (first column)
      // or from the upper-left block.
      if (i == 0) begin : g_csrc
        assign cbt_in  = cd_cbt[j];
        assign csel_in = cd_csel[j];
        assign web_in  = cd_web[j];
        assign data_in = cd_data[j];
      end else if (j == 0) begin : g_csrc
        assign cbt_in  = b_cbt_v[i-1][0];
        assign csel_in = b_csel[i-1][0];
        assign web_in  = b_web[i-1][0];
        assign data_in = b_data[i-1][0];
      end else begin : g_csrc
        assign cbt_in  = b_cbt_d[i-1][j-1];
        assign csel_in = b_csel[i-1][j-1];
        assign web_in  = b_web[i-1][j-1];
        assign data_in = b_data[i-1][j-1];
      end

      mem_block #(.N(N), .ROWS(ROWS), .COLS(COLS), .K(K)) u_blk (
        .clk      (clk),
        .rst_n    (rst_n),
        .rbt_i    (rbt_in),
        .wl_i     (wl_in),
        .pd_i     (pd_in),
        .ce_i     (ce_in),
        .cbt_i    (cbt_in),
        .csel_i   (csel_in),
        .web_i    (web_in),
        .data_i   (data_in),
        .rbt_h    (b_rbt_h[i][j]),
        .cbt_v    (b_cbt_v[i][j]),
        .rbt_d    (b_rbt_d[i][j]),
        .cbt_d    (b_cbt_d[i][j]),
        .wl_o     (b_wl[i][j]),
        .pd_o     (b_pd[i][j]),
        .ce_o     (b_ce[i][j]),
        .csel_o   (b_csel[i][j]),
        .web_o    (b_web[i][j]),
        .data_o   (b_data[i][j]),
        .validmem (b_validmem[i][j])
      );
    end
  end

  // Output buffers: buffer k < N sits at block (k, N-1), buffer N+k at
  // block (N-1, k).
  logic [NBUF-1:0] ob_oe;
  logic [K-1:0]    ob_dat [NBUF];

  for (genvar k = 0; k < NBUF; k++) begin : g_obuf
    localparam int unsigned BI = (k < N) ? k : N - 1;
    localparam int unsigned BJ = (k < N) ? N - 1 : k - N;
    output_buffer #(.K(K)) u_obuf (
      .clk   (clk),
      .rst_n (rst_n),
      .rbt   (b_rbt_d[BI][BJ]),
      .cbt   (b_cbt_d[BI][BJ]),
      .web   (b_web[BI][BJ]),
      .ce    (b_ce[BI][BJ]),
      .data  (b_data[BI][BJ]),
      .oe    (ob_oe[k]),
      .odat  (ob_dat[k])
    );
  end

  output_data_bus #(.NDRV(NBUF), .K(K)) u_bus (
    .clk        (clk),
    .rst_n      (rst_n),
    .oe         (ob_oe),
    .dat        (ob_dat),
    .odat_valid (odat_valid),
    .odat       (odat)
  );

endmodule
