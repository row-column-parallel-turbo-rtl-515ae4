// tb_rc_turbo_decoder: end-to-end testbench of the row-column parallel decoder,
// at the decoder's default parameters (N = 32, P = 4, NUM_ITER = 8).
//
// NBLK random product-code blocks are encoded, sent over a BPSK channel with
// noise and a few forced strong errors, quantised to 5 bits and streamed in
// back to back, so that the next block is loaded while the current one is
// decoded. A bit-exact model of the whole schedule (both decoders on row t and
// column t, reading the shared extrinsic matrix before the codeword and writing
// it back in step order) predicts every decision of every half-iteration; the
// decisions of the last iteration must also equal the transmitted block.
// Checked and counted: decoding time per block, time to the first decision, decisions of both decoders,
// corrected channel errors, input back-pressure while both R matrices are full,
// loading during decoding, R matrix swaps, column decoding that used extrinsic
// values written by the row decoder in the same iteration, and both kinds of
// soft output (competitor and beta).
module tb_rc_turbo_decoder;
  import tb_ref_pkg::*;

  localparam int N        = 32;
  localparam int P        = 4;
  localparam int NUM_ITER = 8;
  localparam int Q        = 5;
  localparam int NBLK     = 3;
  localparam int M        = $clog2(N);
  localparam int IW       = $clog2(NUM_ITER + 1);
  localparam int BLK_CYC  = NUM_ITER * N * (2 * N + (1 << P) + 3);

  logic                clk = 0;
  logic                rst_n = 0;
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

  rc_turbo_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (NBLK * BLK_CYC + 20 * N * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per block: transmitted bits, channel samples, expected decisions
  bit  tx      [NBLK][N][N];
  int  rx      [NBLK][N][N];
  bit  exp_row [NBLK][NUM_ITER][N][N];   // [iter][row][col]
  bit  exp_col [NBLK][NUM_ITER][N][N];   // [iter][row][col]
  int  n_fresh = 0, n_comp = 0, n_beta = 0, n_chan_err = 0;

  function automatic int noise();
    // sum of three uniforms, roughly bell shaped, in [-9, 9]
    return int'($urandom_range(0, 6)) + int'($urandom_range(0, 6)) +
           int'($urandom_range(0, 6)) - 9;
  endfunction

  task automatic make_block(input int b);
    bvec_t info, c;
    bit    m [N][N];
    for (int r = 0; r < N; r++) for (int col = 0; col < N; col++) m[r][col] = 0;
    // information rows M..N-2, encoded as rows
    for (int r = M; r < N - 1; r++) begin
      info = new[N];
      for (int col = 0; col < N; col++) info[col] = 1'($urandom_range(0, 1));
      c = encode_row(N, info);
      for (int col = 0; col < N; col++) m[r][col] = c[col];
    end
    // then every column
    for (int col = 0; col < N; col++) begin
      info = new[N];
      for (int r = 0; r < N; r++) info[r] = m[r][col];
      c = encode_row(N, info);
      for (int r = 0; r < N; r++) m[r][col] = c[r];
    end
    for (int r = 0; r < N; r++)
      for (int col = 0; col < N; col++) begin
        tx[b][r][col] = m[r][col];
        rx[b][r][col] = clip((m[r][col] ? -7 : 7) + noise(), Q);
      end
    // a few strong channel errors
    for (int e = 0; e < 6; e++) begin
      int r, col;
      r = $urandom_range(0, N - 1);
      col = $urandom_range(0, N - 1);
      rx[b][r][col] = tx[b][r][col] ? 5 : -5;
    end
    for (int r = 0; r < N; r++)
      for (int col = 0; col < N; col++)
        if ((rx[b][r][col] < 0) != tx[b][r][col]) n_chan_err++;
  endtask

  // bit-exact model of the row-column parallel schedule for block b
  task automatic model_block(input int b);
    int    w    [N][N];
    int    wit  [N][N];      // iteration of the last writer, -1: none
    bit    wrow [N][N];      // last writer was the row decoder
    ivec_t rr_r, ww_r, ar_r, rr_c, ww_c, ar_c, wn_r, wn_c;
    bvec_t d_r, d_c, cp_r, cp_c;
    for (int r = 0; r < N; r++)
      for (int col = 0; col < N; col++) begin
        w[r][col] = 0; wit[r][col] = -1; wrow[r][col] = 0;
      end
    for (int it = 0; it < NUM_ITER; it++)
      for (int t = 0; t < N; t++) begin
        rr_r = new[N]; ww_r = new[N]; ar_r = new[N];
        rr_c = new[N]; ww_c = new[N]; ar_c = new[N];
        for (int p = 0; p < N; p++) begin
          rr_r[p] = rx[b][t][p]; ww_r[p] = w[t][p]; ar_r[p] = p;
          rr_c[p] = rx[b][p][t]; ww_c[p] = w[p][t]; ar_c[p] = N - 1 - p;
          if (wit[p][t] == it && wrow[p][t]) n_fresh++;
        end
        elem_ref(N, P, Q, rr_r, ww_r, ar_r, int'(alpha_tab[2*it]), int'(beta_tab[2*it]),
                 d_r, wn_r, cp_r);
        elem_ref(N, P, Q, rr_c, ww_c, ar_c, int'(alpha_tab[2*it+1]), int'(beta_tab[2*it+1]),
                 d_c, wn_c, cp_c);
        for (int p = 0; p < N; p++) begin
          exp_row[b][it][t][p] = d_r[p];
          exp_col[b][it][p][t] = d_c[p];
          if (cp_r[p]) n_comp++; else n_beta++;
          if (cp_c[p]) n_comp++; else n_beta++;
        end
        for (int i = 0; i < N; i++) begin
          w[t][i] = wn_r[i];          wit[t][i] = it;         wrow[t][i] = 1;
          w[N-1-i][t] = wn_c[N-1-i];  wit[N-1-i][t] = it;     wrow[N-1-i][t] = 0;
        end
      end
  endtask

  // ---------------- input stream
  int n_stall = 0, n_load_busy = 0;
  bit decoding = 0;
  initial begin : feeder
    @(posedge rst_n);
    for (int b = 0; b < NBLK; b++)
      for (int a = 0; a < N * N; a++) begin
        @(negedge clk);
        in_valid = 1;
        in_r = Q'(rx[b][a / N][a % N]);
        while (!in_ready) begin          // taken at the first rising edge with in_ready
          if (decoding) n_stall++;
          @(negedge clk);
        end
        if (decoding) n_load_busy++;
      end
    @(negedge clk);
    in_valid = 0;
  end

  // ---------------- output monitor
  int blk_out = 0, n_start = 0, n_done = 0, t_start = 0, cyc = 0;
  int n_rowdec = 0, n_coldec = 0, n_fixed = 0;
  bit first_seen = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && blk_start) begin
      decoding <= 1;
      t_start  <= cyc;
      n_start  <= n_start + 1;
      first_seen <= 0;
    end
    if (rst_n && blk_done) begin
      decoding <= 0;
      checks++;
      if (cyc - t_start != BLK_CYC + 1) begin
        failures++;
        $display("FAIL: block %0d took %0d cycles, expected %0d", blk_out, cyc - t_start, BLK_CYC + 1);
      end
      blk_out <= blk_out + 1;
      n_done  <= n_done + 1;
    end
    if (rst_n && row_d_valid && !first_seen) begin
      // first decisions: start, N reads, 2^P + 2 cycles of search, after blk_start
      first_seen <= 1;
      checks++;
      if (cyc - t_start != N + (1 << P) + 4) begin
        failures++;
        $display("FAIL: first decision %0d cycles after block start", cyc - t_start);
      end
    end
    if (rst_n && row_d_valid && blk_out < NBLK) begin
      checks += 2;
      n_rowdec++;
      n_coldec++;
      if (row_d != exp_row[blk_out][int'(d_iter)][row_d_row][row_d_col]) begin
        failures++;
        if (failures < 12)
          $display("FAIL: blk %0d it %0d row decision (%0d,%0d)", blk_out, d_iter, row_d_row, row_d_col);
      end
      if (col_d != exp_col[blk_out][int'(d_iter)][col_d_row][col_d_col]) begin
        failures++;
        if (failures < 12)
          $display("FAIL: blk %0d it %0d col decision (%0d,%0d)", blk_out, d_iter, col_d_row, col_d_col);
      end
      if (d_last) begin
        checks += 2;
        if (row_d != tx[blk_out][row_d_row][row_d_col]) begin
          failures++;
          if (failures < 12) $display("FAIL: blk %0d row decision (%0d,%0d) not the sent bit", blk_out, row_d_row, row_d_col);
        end
        if (col_d != tx[blk_out][col_d_row][col_d_col]) begin
          failures++;
          if (failures < 12) $display("FAIL: blk %0d col decision (%0d,%0d) not the sent bit", blk_out, col_d_row, col_d_col);
        end
        if (col_d == tx[blk_out][col_d_row][col_d_col] &&
            (rx[blk_out][col_d_row][col_d_col] < 0) != tx[blk_out][col_d_row][col_d_col])
          n_fixed++;
      end
    end
  end

  initial begin : main
    int al [8];
    al = '{0, 3, 5, 8, 11, 14, 16, 16};
    for (int h = 0; h < 2 * NUM_ITER; h++) begin
      alpha_tab[h] = 5'((h < 8) ? al[h] : 16);
      beta_tab[h]  = Q'((2 + h > 15) ? 15 : 2 + h);
    end
    for (int b = 0; b < NBLK; b++) begin
      make_block(b);
      model_block(b);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_done == NBLK);
    repeat (2) @(posedge clk);
    check(n_start == NBLK, $sformatf("%0d blocks started", n_start));
    check(n_rowdec == NBLK * NUM_ITER * N * N, "row decisions count");
    // every mechanism must have happened at least once
    check(n_stall > 0,     "input back-pressure with both R matrices full");
    check(n_load_busy > 0, "loading while a block is decoded");
    check(n_done > 1,      "R matrix swap between blocks");
    check(n_fresh > 0,     "column decoder used row extrinsic of the same iteration");
    check(n_comp > 0,      "competitor soft outputs");
    check(n_beta > 0,      "beta soft outputs");
    check(n_fixed > 0,     "channel errors corrected");
    $display("blocks %0d, channel errors %0d, corrected in output %0d", n_done, n_chan_err, n_fixed);
    $display("stall cycles %0d, loads during decoding %0d, fresh extrinsic reads %0d",
             n_stall, n_load_busy, n_fresh);
    $display("competitor outputs %0d, beta outputs %0d, cycles per block %0d",
             n_comp, n_beta, BLK_CYC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
