// tb_memory_block: self-checking testbench of the decoder memory block.
//
// Checks, at N = 8: ready rises N*N/2 cycles after reset and W then reads as
// zero; W words written through the row and the column port read back through
// either port; a block-tag change makes all of W read as zero; a block loaded
// into one R matrix is read back by both decoder ports after the swap, while
// the next block is loaded into the other R matrix.
module tb_memory_block;

  localparam int N  = 8;
  localparam int Q  = 5;
  localparam int AW = $clog2(N * N);

  logic                clk = 0;
  logic                rst_n = 0;
  logic                ready;
  logic                dec_bank = 0;
  logic                blk_tag = 0;
  logic                ld_bank = 0;
  logic                ld_we = 0;
  logic [AW-1:0]       ld_addr = '0;
  logic signed [Q-1:0] ld_data = '0;
  logic [AW-1:0]       row_addr = '0, col_addr = '0;
  logic                row_we = 0, col_we = 0;
  logic signed [Q-1:0] row_wdata = '0, col_wdata = '0;
  logic signed [Q-1:0] row_r, row_w, col_r, col_w;

  int checks = 0, failures = 0;
  int blk [2][N*N];
  int wsh [N*N];

  memory_block #(.N(N)) dut (.*);

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

  // read one address on each decoder port, return the four words
  task automatic rd(input int ra, input int ca, output int rr, output int rw,
                    output int cr, output int cw);
    @(negedge clk);
    row_addr = AW'(ra); col_addr = AW'(ca); row_we = 0; col_we = 0;
    @(negedge clk);
    rr = row_r; rw = row_w; cr = col_r; cw = col_w;
  endtask

  task automatic load(input int bank, input int b);
    for (int a = 0; a < N * N; a++) begin
      @(negedge clk);
      ld_bank = 1'(bank); ld_we = 1; ld_addr = AW'(a);
      blk[b][a] = int'($urandom_range(0, 30)) - 15;
      ld_data = Q'(blk[b][a]);
    end
    @(negedge clk);
    ld_we = 0;
  endtask

  initial begin : main
    int rr, rw, cr, cw, cyc;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cyc = 0;
    @(negedge clk);
    while (!ready && cyc < 1000) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == N * N / 2, $sformatf("ready after %0d cycles", cyc));
    for (int a = 0; a < N * N; a++) begin
      rd(a, N * N - 1 - a, rr, rw, cr, cw);
      check(rw == 0 && cw == 0, $sformatf("W not cleared at %0d", a));
    end
    // block 0 into R matrix 0 while matrix 1 is the one being decoded
    dec_bank = 1;
    load(0, 0);
    // decode bank 0, load bank 1 at the same time as W traffic
    dec_bank = 0;
    blk_tag  = 1;
    fork
      load(1, 1);
      begin
        for (int a = 0; a < N * N / 2; a++) begin
          @(negedge clk);
          row_addr = AW'(a); row_we = 1;
          col_addr = AW'(N * N - 1 - a); col_we = 1;
          wsh[a] = int'($urandom_range(0, 30)) - 15;
          wsh[N*N-1-a] = int'($urandom_range(0, 30)) - 15;
          row_wdata = Q'(wsh[a]);
          col_wdata = Q'(wsh[N*N-1-a]);
        end
        @(negedge clk);
        row_we = 0; col_we = 0;
      end
    join
    for (int a = 0; a < N * N; a++) begin
      rd(a, N * N - 1 - a, rr, rw, cr, cw);
      check(rr == blk[0][a], $sformatf("row R bank0 addr %0d: %0d vs %0d", a, rr, blk[0][a]));
      check(cr == blk[0][N*N-1-a], $sformatf("col R bank0 addr %0d", N*N-1-a));
      check(rw == wsh[a], $sformatf("row W addr %0d: %0d vs %0d", a, rw, wsh[a]));
      check(cw == wsh[N*N-1-a], $sformatf("col W addr %0d", N*N-1-a));
    end
    // next block: swap banks and tag
    dec_bank = 1;
    blk_tag  = 0;
    for (int a = 0; a < N * N; a++) begin
      rd(a, (a * 5) % (N * N), rr, rw, cr, cw);
      check(rr == blk[1][a], $sformatf("row R bank1 addr %0d", a));
      check(cr == blk[1][(a*5)%(N*N)], $sformatf("col R bank1 addr %0d", a));
      check(rw == 0 && cw == 0, $sformatf("stale W visible at %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
