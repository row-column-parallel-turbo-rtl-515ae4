// tb_rc_scheduler: self-checking testbench of the row-column schedule.
//
// At N = 8 and two iterations, a stand-in for the two decoders takes the fed
// symbols and reports done K cycles after the last one. The testbench checks
// the codeword, iteration and step order, the addresses of both decoders in
// the read and write phases (row t from its first symbol, column t from its
// last), that the two never address the same symbol, the one-cycle delay of
// the feed, the length of every phase and of the whole pass.
module tb_rc_scheduler;
  import pc_pkg::*;

  localparam int N        = 8;
  localparam int NUM_ITER = 2;
  localparam int K        = 5;
  localparam int M        = $clog2(N);
  localparam int AW       = $clog2(N * N);
  localparam int IW       = $clog2(NUM_ITER + 1);

  logic          clk = 0;
  logic          rst_n = 0;
  logic          go = 0;
  logic          dec_done = 0;
  logic          busy, pass_done;
  phase_e        phase;
  logic          dec_start;
  logic [AW-1:0] row_addr, col_addr;
  logic [M-1:0]  row_pos, col_pos;
  logic          feed_valid;
  logic [M-1:0]  feed_row_pos, feed_col_pos;
  logic          wr;
  logic [M-1:0]  cw;
  logic [IW-1:0] iter;
  logic          last_iter;

  int checks = 0, failures = 0;

  rc_scheduler #(.N(N), .NUM_ITER(NUM_ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // decoder stand-in: done K cycles after the N-th fed symbol, cleared by start
  int fed = 0, cnt = 0;
  always_ff @(posedge clk) begin
    if (dec_start) begin
      fed <= 0; cnt <= 0; dec_done <= 0;
    end else begin
      if (feed_valid) fed <= fed + 1;
      if (fed == N && !dec_done) begin
        cnt <= cnt + 1;
        if (cnt == K - 1) dec_done <= 1;
      end
    end
  end

  // expected order and addresses, checked every cycle
  int exp_t = 0, exp_it = 0, step = 0, n_read = 0, n_write = 0, n_wait = 0, n_cw = 0;
  logic [M-1:0] prev_row_pos, prev_col_pos;
  logic         prev_read = 0;
  always @(negedge clk) if (rst_n) begin
    if (prev_read) begin
      checks++;
      if (!(feed_valid && feed_row_pos == prev_row_pos && feed_col_pos == prev_col_pos)) begin
        failures++;
        $display("FAIL: feed does not follow the read one cycle later");
      end
    end
    prev_read    = (phase == PH_READ);
    prev_row_pos = row_pos;
    prev_col_pos = col_pos;
    if (phase == PH_READ || phase == PH_WRITE) begin
      checks++;
      if (!(int'(cw) == exp_t && int'(iter) == exp_it && int'(row_pos) == step % N &&
            int'(row_addr) == exp_t * N + step % N &&
            int'(col_addr) == (N - 1 - step % N) * N + exp_t &&
            row_addr != col_addr && wr == (phase == PH_WRITE))) begin
        failures++;
        if (failures < 10)
          $display("FAIL: it %0d cw %0d step %0d: row %0d col %0d", iter, cw, step, row_addr, col_addr);
      end
      step++;
      if (phase == PH_READ) n_read++; else n_write++;
      if (phase == PH_WRITE && step == 2 * N) begin
        step = 0;
        n_cw++;
        exp_t++;
        if (exp_t == N) begin
          exp_t = 0;
          exp_it++;
        end
      end
    end
    if (phase == PH_WAIT) n_wait++;
  end

  initial begin : main
    int cyc;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    go = 1;
    @(negedge clk);
    go = 0;
    cyc = 1;
    while (!pass_done && cyc < 10000) begin
      @(negedge clk);
      cyc++;
    end
    check(n_cw == N * NUM_ITER, $sformatf("%0d codewords", n_cw));
    check(n_read == N * N * NUM_ITER && n_write == N * N * NUM_ITER, "read and write cycles");
    check(n_wait == (K + 2) * N * NUM_ITER, $sformatf("%0d wait cycles", n_wait));
    check(cyc == NUM_ITER * N * (2 * N + K + 3) + 1, $sformatf("pass took %0d cycles", cyc));
    @(negedge clk);
    check(!busy && !pass_done, "idle after the pass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
