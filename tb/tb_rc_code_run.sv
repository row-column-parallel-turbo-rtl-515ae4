// tb_rc_code_run: decodes NBLK random blocks of the product code of length N
// with an rc_turbo_decoder of that size, for tb_rc_workloads.
//
// Each block is encoded, sent over a BPSK channel with noise (amplitude 7,
// noise in [-9, 9]), quantised to 5 bits and streamed in. Checked: every
// decision of every half-iteration against the bit-exact schedule model, the
// decisions of the last iteration against the sent bits, and the decoding time
// NUM_ITER * N * (2N + 2^P + 3) + 1 cycles per block.
module tb_rc_code_run
  import tb_ref_pkg::*;
#(
  parameter int N    = 64,
  parameter int NBLK = 1
) (
  input  logic clk,
  input  logic rst_n,
  output bit   finished,
  output int   checks,
  output int   failures,
  output int   n_fixed
);

  localparam int P        = 4;
  localparam int NUM_ITER = 8;
  localparam int Q        = 5;
  localparam int M        = $clog2(N);
  localparam int IW       = $clog2(NUM_ITER + 1);
  localparam int BLK_CYC  = NUM_ITER * N * (2 * N + (1 << P) + 3) + 1;

  logic                in_valid = 0;
  logic                in_ready;
  logic signed [Q-1:0] in_r = '0;
  logic [4:0]          alpha_tab [2*NUM_ITER];
  logic [Q-1:0]        beta_tab  [2*NUM_ITER];
  logic                row_d_valid, row_d, col_d_valid, col_d;
  logic [M-1:0]        row_d_row, row_d_col, col_d_row, col_d_col;
  logic [IW-1:0]       d_iter;
  logic                d_last;
  logic                blk_start, blk_done;

  rc_turbo_decoder #(.N(N), .P(P), .NUM_ITER(NUM_ITER)) dut (.*);

  bit tx      [NBLK][N][N];
  int rx      [NBLK][N][N];
  bit exp_row [NBLK][NUM_ITER][N][N];
  bit exp_col [NBLK][NUM_ITER][N][N];

  initial begin
    int al [8];
    al = '{0, 3, 5, 8, 11, 14, 16, 16};
    for (int h = 0; h < 2 * NUM_ITER; h++) begin
      alpha_tab[h] = 5'((h < 8) ? al[h] : 16);
      beta_tab[h]  = Q'((2 + h > 15) ? 15 : 2 + h);
    end
    checks = 0; failures = 0; n_fixed = 0; finished = 0;
  end

  task automatic make_and_model(input int b);
    bvec_t info, c;
    int    w [N][N];
    ivec_t rr_r, ww_r, ar_r, rr_c, ww_c, ar_c, wn_r, wn_c;
    bvec_t d_r, d_c, cp_r, cp_c;
    for (int r = 0; r < N; r++) for (int col = 0; col < N; col++) tx[b][r][col] = 0;
    for (int r = M; r < N - 1; r++) begin
      info = new[N];
      for (int col = 0; col < N; col++) info[col] = 1'($urandom_range(0, 1));
      c = encode_row(N, info);
      for (int col = 0; col < N; col++) tx[b][r][col] = c[col];
    end
    for (int col = 0; col < N; col++) begin
      info = new[N];
      for (int r = 0; r < N; r++) info[r] = tx[b][r][col];
      c = encode_row(N, info);
      for (int r = 0; r < N; r++) tx[b][r][col] = c[r];
    end
    for (int r = 0; r < N; r++)
      for (int col = 0; col < N; col++) begin
        rx[b][r][col] = clip((tx[b][r][col] ? -7 : 7) + int'($urandom_range(0, 6)) +
                             int'($urandom_range(0, 6)) + int'($urandom_range(0, 6)) - 9, Q);
        w[r][col] = 0;
      end
    for (int it = 0; it < NUM_ITER; it++)
      for (int t = 0; t < N; t++) begin
        rr_r = new[N]; ww_r = new[N]; ar_r = new[N];
        rr_c = new[N]; ww_c = new[N]; ar_c = new[N];
        for (int p = 0; p < N; p++) begin
          rr_r[p] = rx[b][t][p]; ww_r[p] = w[t][p]; ar_r[p] = p;
          rr_c[p] = rx[b][p][t]; ww_c[p] = w[p][t]; ar_c[p] = N - 1 - p;
        end
        elem_ref(N, P, Q, rr_r, ww_r, ar_r, int'(alpha_tab[2*it]), int'(beta_tab[2*it]),
                 d_r, wn_r, cp_r);
        elem_ref(N, P, Q, rr_c, ww_c, ar_c, int'(alpha_tab[2*it+1]), int'(beta_tab[2*it+1]),
                 d_c, wn_c, cp_c);
        for (int p = 0; p < N; p++) begin
          exp_row[b][it][t][p] = d_r[p];
          exp_col[b][it][p][t] = d_c[p];
        end
        for (int i = 0; i < N; i++) begin
          w[t][i] = wn_r[i];
          w[N-1-i][t] = wn_c[N-1-i];
        end
      end
  endtask

  task automatic fail(input string what);
    failures++;
    if (failures < 8) $display("FAIL (N=%0d): %s", N, what);
  endtask

  initial begin : feeder
    for (int b = 0; b < NBLK; b++) make_and_model(b);
    @(posedge rst_n);
    for (int b = 0; b < NBLK; b++)
      for (int a = 0; a < N * N; a++) begin
        @(negedge clk);
        in_valid = 1;
        in_r = Q'(rx[b][a / N][a % N]);
        while (!in_ready) @(negedge clk);
      end
    @(negedge clk);
    in_valid = 0;
  end

  int blk_out = 0, t_start = 0, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && blk_start) t_start <= cyc;
    if (rst_n && blk_done) begin
      checks++;
      if (cyc - t_start != BLK_CYC) fail($sformatf("block took %0d cycles", cyc - t_start));
      blk_out <= blk_out + 1;
      if (blk_out == NBLK - 1) finished <= 1;
    end
    if (rst_n && row_d_valid && blk_out < NBLK) begin
      checks += 2;
      if (row_d != exp_row[blk_out][int'(d_iter)][row_d_row][row_d_col])
        fail($sformatf("it %0d row decision (%0d,%0d)", d_iter, row_d_row, row_d_col));
      if (col_d != exp_col[blk_out][int'(d_iter)][col_d_row][col_d_col])
        fail($sformatf("it %0d col decision (%0d,%0d)", d_iter, col_d_row, col_d_col));
      if (d_last) begin
        checks += 2;
        if (row_d != tx[blk_out][row_d_row][row_d_col]) fail("row decision is not the sent bit");
        if (col_d != tx[blk_out][col_d_row][col_d_col]) fail("col decision is not the sent bit");
        if ((rx[blk_out][col_d_row][col_d_col] < 0) != tx[blk_out][col_d_row][col_d_col] &&
            col_d == tx[blk_out][col_d_row][col_d_col])
          n_fixed++;
      end
    end
  end

endmodule
