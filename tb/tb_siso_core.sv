// tb_siso_core: self-checking testbench of the Chase-Pyndiah SISO decoder.
//
// Random soft words (noisy codewords and pure noise), fed in natural or
// reversed order, are decoded; every position's decision and soft output are
// compared with tb_ref_pkg::siso_ref, the decision is checked to be a codeword,
// a codeword with one strong error must come back corrected, and done must
// rise exactly 2^P cycles after the edge that takes the last symbol.
module tb_siso_core;
  import tb_ref_pkg::*;

  localparam int N  = 32;
  localparam int P  = 4;
  localparam int RW = 6;
  localparam int FW = 7;
  localparam int NWORDS = 300;

  logic                 clk = 0;
  logic                 rst_n = 0;
  logic                 start = 0;
  logic                 in_valid = 0;
  logic [$clog2(N)-1:0] in_pos = '0;
  logic signed [RW-1:0] in_r = '0;
  logic [4:0]           beta = '0;
  logic                 done;
  logic [$clog2(N)-1:0] out_pos = '0;
  logic                 out_d;
  logic signed [FW-1:0] out_f;
  logic signed [RW-1:0] out_r;
  logic                 out_comp;

  int checks = 0, failures = 0;
  int n_comp = 0, n_beta = 0, n_corr = 0;

  siso_core #(.N(N), .P(P), .RW(RW), .FW(FW), .BW(5)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  initial begin : main
    ivec_t r, arr, f;
    bvec_t d, comp, info, cw;
    ivec_t cols;
    cols = hcols(N);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int w = 0; w < NWORDS; w++) begin
      bit rev;
      int mode;
      int lat;
      int b;
      rev  = w[0];
      mode = w % 3;
      b    = $urandom_range(0, 15);
      r = new[N]; arr = new[N];
      info = new[N];
      for (int p = 0; p < N; p++) info[p] = 1'($urandom_range(0, 1));
      cw = encode_row(N, info);
      for (int p = 0; p < N; p++) begin
        int a;
        a = cw[p] ? -10 : 10;
        if (mode == 0)      r[p] = clip($urandom_range(0, 62) - 31, RW);
        else if (mode == 1) r[p] = clip(a + int'($urandom_range(0, 24)) - 12, RW);
        else                r[p] = clip(a + int'($urandom_range(0, 8)) - 4, RW);
      end
      if (mode == 2) begin                    // one strong error
        int ep;
        ep = $urandom_range(0, N - 1);
        r[ep] = cw[ep] ? 9 : -9;
      end
      // feed
      @(negedge clk);
      start = 1; beta = 5'(b);
      @(negedge clk);
      start = 0;
      for (int k = 0; k < N; k++) begin
        int p;
        p = rev ? N - 1 - k : k;
        arr[p]   = k;
        in_valid = 1;
        in_pos   = p[$clog2(N)-1:0];
        in_r     = RW'(r[p]);
        @(negedge clk);
      end
      in_valid = 0;
      lat = 0;
      while (!done && lat < 100) begin
        @(negedge clk);
        lat++;
      end
      check(lat == (1 << P), $sformatf("word %0d: done after %0d cycles", w, lat));
      siso_ref(N, P, r, arr, b, FW, d, f, comp);
      begin
        int s, par;
        bit dd[];
        s = 0; par = 0;
        dd = new[N];
        for (int p = 0; p < N; p++) begin
          out_pos = p[$clog2(N)-1:0];
          #1;
          dd[p] = out_d;
          check(out_d == d[p], $sformatf("word %0d pos %0d: d=%0d ref %0d", w, p, out_d, d[p]));
          check(int'(out_f) == f[p], $sformatf("word %0d pos %0d: F=%0d ref %0d", w, p, out_f, f[p]));
          check(int'(out_r) == r[p], $sformatf("word %0d pos %0d: r'=%0d", w, p, out_r));
          if (out_comp) n_comp++; else n_beta++;
        end
        for (int p = 0; p < N - 1; p++) if (dd[p]) s ^= cols[p];
        for (int p = 0; p < N; p++) par ^= int'(dd[p]);
        check(s == 0 && par == 0, $sformatf("word %0d: decision is not a codeword", w));
        if (mode == 2) begin
          bit same;
          same = 1;
          for (int p = 0; p < N; p++) if (dd[p] != cw[p]) same = 0;
          check(same, $sformatf("word %0d: single error not corrected", w));
          n_corr++;
        end
      end
    end
    check(n_comp > 0 && n_beta > 0, "both soft-output cases exercised");
    $display("competitor outputs %0d, beta outputs %0d, corrected words %0d", n_comp, n_beta, n_corr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
