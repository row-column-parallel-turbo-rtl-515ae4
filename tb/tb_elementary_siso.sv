// tb_elementary_siso: self-checking testbench of the elementary SISO decoder.
//
// Random channel words R and extrinsic words W with random alpha and beta are
// decoded; for every position the new extrinsic value W_k+1 = F - R' and the
// decision are compared with tb_ref_pkg::elem_ref, and done must rise 2^P
// cycles after the edge that takes the last symbol.
module tb_elementary_siso;
  import tb_ref_pkg::*;

  localparam int N = 32;
  localparam int P = 4;
  localparam int Q = 5;
  localparam int NWORDS = 200;

  logic                 clk = 0;
  logic                 rst_n = 0;
  logic                 start = 0;
  logic                 in_valid = 0;
  logic [$clog2(N)-1:0] in_pos = '0;
  logic signed [Q-1:0]  in_r = '0;
  logic signed [Q-1:0]  in_w = '0;
  logic [4:0]           alpha = '0;
  logic [Q-1:0]         beta = '0;
  logic                 done;
  logic [$clog2(N)-1:0] out_pos = '0;
  logic signed [Q-1:0]  out_w;
  logic                 out_d;
  logic                 out_comp;

  int checks = 0, failures = 0;
  int n_sat = 0;

  elementary_siso #(.N(N), .P(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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
    ivec_t rr, ww, arr, wn;
    bvec_t d, comp, info, cw;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int w = 0; w < NWORDS; w++) begin
      int a, b, lat;
      a = (w < 5) ? 0 : $urandom_range(0, 20);
      b = $urandom_range(0, 15);
      rr = new[N]; ww = new[N]; arr = new[N]; info = new[N];
      for (int p = 0; p < N; p++) info[p] = 1'($urandom_range(0, 1));
      cw = encode_row(N, info);
      for (int p = 0; p < N; p++) begin
        rr[p] = clip((cw[p] ? -6 : 6) + int'($urandom_range(0, 16)) - 8, Q);
        ww[p] = clip(int'($urandom_range(0, 30)) - 15, Q);
      end
      @(negedge clk);
      start = 1; alpha = 5'(a); beta = 5'(b);
      @(negedge clk);
      start = 0;
      for (int k = 0; k < N; k++) begin
        arr[k]   = k;
        in_valid = 1;
        in_pos   = k[$clog2(N)-1:0];
        in_r     = Q'(rr[k]);
        in_w     = Q'(ww[k]);
        @(negedge clk);
      end
      in_valid = 0;
      lat = 0;
      while (!done && lat < 100) begin
        @(negedge clk);
        lat++;
      end
      check(lat == (1 << P), $sformatf("word %0d: done after %0d cycles", w, lat));
      elem_ref(N, P, Q, rr, ww, arr, a, b, d, wn, comp);
      for (int p = 0; p < N; p++) begin
        out_pos = p[$clog2(N)-1:0];
        #1;
        check(out_d == d[p], $sformatf("word %0d pos %0d: d=%0d ref %0d", w, p, out_d, d[p]));
        check(int'(out_w) == wn[p], $sformatf("word %0d pos %0d: W=%0d ref %0d", w, p, out_w, wn[p]));
        if (wn[p] == 15 || wn[p] == -15) n_sat++;
      end
    end
    check(n_sat > 0, "saturated extrinsic values seen");
    $display("saturated extrinsic outputs %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
