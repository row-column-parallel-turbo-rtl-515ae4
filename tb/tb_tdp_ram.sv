// tb_tdp_ram: self-checking testbench of the two-port matrix memory.
//
// Random reads and writes on both ports (never the same write address on both)
// are checked against a shadow array: read data appear one cycle after the
// address and show the contents before a write of the same cycle.
module tb_tdp_ram;

  localparam int DEPTH = 64;
  localparam int WIDTH = 6;
  localparam int AW    = $clog2(DEPTH);

  logic             clk = 0;
  logic [AW-1:0]    a_addr = '0, b_addr = '0;
  logic             a_we = 0, b_we = 0;
  logic [WIDTH-1:0] a_wdata = '0, b_wdata = '0;
  logic [WIDTH-1:0] a_rdata, b_rdata;

  int checks = 0, failures = 0;
  int n_rw_same = 0;
  logic [WIDTH-1:0] shadow [DEPTH];

  tdp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

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

  initial begin : main
    logic [WIDTH-1:0] exp_a, exp_b;
    // fill every word through alternating ports
    for (int i = 0; i < DEPTH; i += 2) begin
      @(negedge clk);
      a_we = 1; a_addr = AW'(i);     a_wdata = WIDTH'($urandom);
      b_we = 1; b_addr = AW'(i + 1); b_wdata = WIDTH'($urandom);
      shadow[i] = a_wdata; shadow[i+1] = b_wdata;
    end
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      a_addr  = AW'($urandom_range(0, DEPTH - 1));
      b_addr  = AW'($urandom_range(0, DEPTH - 1));
      a_we    = 1'($urandom_range(0, 1));
      b_we    = 1'($urandom_range(0, 1)) && (b_addr != a_addr || !a_we);
      a_wdata = WIDTH'($urandom);
      b_wdata = WIDTH'($urandom);
      exp_a   = shadow[a_addr];
      exp_b   = shadow[b_addr];
      if (a_we && b_addr == a_addr) n_rw_same++;
      @(posedge clk);
      if (a_we) shadow[a_addr] = a_wdata;
      if (b_we) shadow[b_addr] = b_wdata;
      #1;
      check(a_rdata == exp_a, $sformatf("port a addr %0d: %0d expected %0d", a_addr, a_rdata, exp_a));
      check(b_rdata == exp_b, $sformatf("port b addr %0d: %0d expected %0d", b_addr, b_rdata, exp_b));
    end
    check(n_rw_same > 0, "read during write of the same word seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
