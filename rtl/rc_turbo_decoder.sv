// rc_turbo_decoder: row-column parallel block turbo decoder of product codes.
//
// A product code block is an n x n bit matrix whose rows and columns are all
// codewords of an extended BCH code (n = N, single-error-correcting). The
// conventional decoder decodes all rows, rebuilds the matrix in memory, then
// decodes all columns. Here, as in the published architecture, one row decoder
// and one column decoder work at the same time on the same matrix and share a
// single matrix W of extrinsic values, which each of them updates as soon as it
// has decoded a codeword; each decoder therefore always uses the most recent
// extrinsic information, and no memory is needed to rebuild the matrix between
// row and column decoding.
//
// Structure: memory_block (matrix W and two ping-pong matrices R), two
// elementary_siso decoders (rows: alpha/beta index 2*iter, columns: 2*iter+1),
// rc_scheduler (lock-step order with j = n-1-i, so the two decoders never touch
// the same symbol), and a small controller that fills one R matrix from the
// channel while the other one is decoded, and swaps them between blocks.
// The same hardware is used for NUM_ITER iterations of one block (this design's
// choice; the published figure shows the hardware of one iteration).
//
// Interface:
//   in_valid/in_ready/in_r  channel samples R of one block, row by row
//                           (address = row*N + column), N*N per block
//   alpha_tab/beta_tab      weighting and reliability constants per
//                           half-iteration, static while a block is decoded
//   row_d_* / col_d_*       decisions D of the row and column decoders with the
//                           row and column of the symbol, emitted once per symbol
//                           and half-iteration; d_iter is the iteration and
//                           d_last marks the last one
//   blk_start/blk_done      pulse when decoding of a block begins and ends
// Timing: a codeword takes 1 + N + (WAIT) + N cycles, WAIT = 2^P + 2 cycles,
// and a block takes NUM_ITER * N of them, plus one cycle, from blk_start to
// blk_done; the first decisions appear N + 2^P + 4 cycles after blk_start.
// Loading the next block (N*N cycles at
// one sample per cycle) overlaps with decoding. After reset the W matrix is
// cleared once (N*N/2 cycles) before the first block starts.
module rc_turbo_decoder
  import pc_pkg::*;
#(
  parameter int unsigned N        = 32,
  parameter int unsigned P        = 4,
  parameter int unsigned NUM_ITER = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // channel input
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic signed [Q-1:0]           in_r,
  // per half-iteration constants
  input  logic [ALPHA_W-1:0]            alpha_tab [2*NUM_ITER],
  input  logic [Q-1:0]                  beta_tab  [2*NUM_ITER],
  // decisions
  output logic                          row_d_valid,
  output logic                          row_d,
  output logic [$clog2(N)-1:0]          row_d_row,
  output logic [$clog2(N)-1:0]          row_d_col,
  output logic                          col_d_valid,
  output logic                          col_d,
  output logic [$clog2(N)-1:0]          col_d_row,
  output logic [$clog2(N)-1:0]          col_d_col,
  output logic [$clog2(NUM_ITER+1)-1:0] d_iter,
  output logic                          d_last,
  output logic                          blk_start,
  output logic                          blk_done
);

  localparam int unsigned M  = $clog2(N);
  localparam int unsigned AW = $clog2(N * N);
  localparam int unsigned IW = $clog2(NUM_ITER + 1);

  // ---------------- ping-pong control of the R matrices
  logic          mem_ready;
  logic [1:0]    full;          // R matrix b holds a complete block
  logic          ld_bank;
  logic [AW-1:0] ld_addr;
  logic          dec_bank;
  logic          blk_tag;
  logic          ld_we;
  logic          go;
  logic          busy, pass_done;

  assign in_ready = mem_ready && !full[ld_bank];
  assign ld_we    = in_valid && in_ready;
  assign go       = mem_ready && !busy && !pass_done && full[dec_bank];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full     <= '0;
      ld_bank  <= 1'b0;
      ld_addr  <= '0;
      dec_bank <= 1'b0;
      blk_tag  <= 1'b0;
    end else begin
      if (ld_we) begin
        ld_addr <= ld_addr + 1'b1;
        if (ld_addr == AW'(N * N - 1)) begin
          full[ld_bank] <= 1'b1;
          ld_bank       <= ~ld_bank;
        end
      end
      if (go) blk_tag <= ~blk_tag;
      if (pass_done) begin
        full[dec_bank] <= 1'b0;
        dec_bank       <= ~dec_bank;
      end
    end
  end

  assign blk_start = go;
  assign blk_done  = pass_done;

  // ---------------- scheduler
  phase_e          phase;
  logic            dec_start, feed_valid, wr, last_iter;
  logic [AW-1:0]   row_addr, col_addr;
  logic [M-1:0]    row_pos, col_pos, feed_row_pos, feed_col_pos, cw;
  logic [IW-1:0]   iter;
  logic            row_done, col_done;

  rc_scheduler #(.N(N), .NUM_ITER(NUM_ITER)) u_sched (
    .clk          (clk),
    .rst_n        (rst_n),
    .go           (go),
    .dec_done     (row_done && col_done),
    .busy         (busy),
    .pass_done    (pass_done),
    .phase        (phase),
    .dec_start    (dec_start),
    .row_addr     (row_addr),
    .col_addr     (col_addr),
    .row_pos      (row_pos),
    .col_pos      (col_pos),
    .feed_valid   (feed_valid),
    .feed_row_pos (feed_row_pos),
    .feed_col_pos (feed_col_pos),
    .wr           (wr),
    .cw           (cw),
    .iter         (iter),
    .last_iter    (last_iter)
  );

  // ---------------- memories
  logic signed [Q-1:0] row_r, row_w, col_r, col_w, row_w_new, col_w_new;

  memory_block #(.N(N)) u_mem (
    .clk       (clk),
    .rst_n     (rst_n),
    .ready     (mem_ready),
    .dec_bank  (dec_bank),
    .blk_tag   (blk_tag),
    .ld_bank   (ld_bank),
    .ld_we     (ld_we),
    .ld_addr   (ld_addr),
    .ld_data   (in_r),
    .row_addr  (row_addr),
    .row_we    (wr),
    .row_wdata (row_w_new),
    .row_r     (row_r),
    .row_w     (row_w),
    .col_addr  (col_addr),
    .col_we    (wr),
    .col_wdata (col_w_new),
    .col_r     (col_r),
    .col_w     (col_w)
  );

  // ---------------- the two elementary decoders
  logic [ALPHA_W-1:0] alpha_row, alpha_col;
  logic [Q-1:0]       beta_row, beta_col;

  always_comb begin
    alpha_row = alpha_tab[2 * int'(iter)];
    beta_row  = beta_tab[2 * int'(iter)];
    alpha_col = alpha_tab[2 * int'(iter) + 1];
    beta_col  = beta_tab[2 * int'(iter) + 1];
  end

  elementary_siso #(.N(N), .P(P)) u_row (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (dec_start),
    .in_valid (feed_valid),
    .in_pos   (feed_row_pos),
    .in_r     (row_r),
    .in_w     (row_w),
    .alpha    (alpha_row),
    .beta     (beta_row),
    .done     (row_done),
    .out_pos  (row_pos),
    .out_w    (row_w_new),
    .out_d    (row_d),
    .out_comp ()
  );

  elementary_siso #(.N(N), .P(P)) u_col (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (dec_start),
    .in_valid (feed_valid),
    .in_pos   (feed_col_pos),
    .in_r     (col_r),
    .in_w     (col_w),
    .alpha    (alpha_col),
    .beta     (beta_col),
    .done     (col_done),
    .out_pos  (col_pos),
    .out_w    (col_w_new),
    .out_d    (col_d),
    .out_comp ()
  );

  // ---------------- decision outputs (row decoder: row cw, column decoder: column cw)
  assign row_d_valid = wr;
  assign row_d_row   = cw;
  assign row_d_col   = row_pos;
  assign col_d_valid = wr;
  assign col_d_row   = col_pos;
  assign col_d_col   = cw;
  assign d_iter      = iter;
  assign d_last      = last_iter;

  // the two decoders never address the same W word in the same cycle
  a_no_symbol_clash: assert property (@(posedge clk)
    (phase == PH_READ || phase == PH_WRITE) |-> row_addr != col_addr);

endmodule
