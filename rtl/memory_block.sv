// memory_block: the memory of one iteration of the row-column parallel decoder.
//
// As in the published architecture it holds three n x n matrices with two
// access ports each: one matrix W of extrinsic values, shared by the row and
// the column decoder, and two matrices R of channel values used in ping-pong.
// One R matrix (dec_bank) is read by both decoders while the other one
// (ld_bank) is filled with the next received block from the channel; the two
// switch roles from block to block.
//
// Port use: W port A belongs to the row decoder and W port B to the column
// decoder, each reading or writing one word per cycle. For the R matrix being
// decoded, port A is read by the row decoder and port B by the column decoder;
// port A of the other R matrix takes the channel writes. The user must not
// load the matrix that is being decoded (the decoder's controller never does).
//
// Clearing W between blocks (this design's choice): every W word carries a
// one-bit block tag. A word whose tag differs from blk_tag was written while
// decoding an earlier block and reads as zero, so W starts each block at zero
// without spending n^2 cycles on clearing. Only once, after reset, W is
// cleared through both ports in n^2/2 cycles; ready is low until then and the
// decoder ports are ignored. Reads have one cycle of latency; dec_bank and
// blk_tag must stay stable while a block is decoded.
module memory_block
  import pc_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  output logic                        ready,
  input  logic                        dec_bank,
  input  logic                        blk_tag,
  // channel load into R matrix ld_bank
  input  logic                        ld_bank,
  input  logic                        ld_we,
  input  logic [$clog2(N*N)-1:0]      ld_addr,
  input  logic signed [Q-1:0]         ld_data,
  // row decoder port
  input  logic [$clog2(N*N)-1:0]      row_addr,
  input  logic                        row_we,
  input  logic signed [Q-1:0]         row_wdata,
  output logic signed [Q-1:0]         row_r,
  output logic signed [Q-1:0]         row_w,
  // column decoder port
  input  logic [$clog2(N*N)-1:0]      col_addr,
  input  logic                        col_we,
  input  logic signed [Q-1:0]         col_wdata,
  output logic signed [Q-1:0]         col_r,
  output logic signed [Q-1:0]         col_w
);

  localparam int unsigned AW = $clog2(N * N);

  logic [Q:0]   w_a_rdata, w_b_rdata;
  logic [Q-1:0] r_a_rdata [2];
  logic [Q-1:0] r_b_rdata [2];
  logic         dec_bank_q, blk_tag_q;
  logic [AW-1:0] clr_cnt;
  logic [AW-1:0] w_a_addr, w_b_addr;
  logic          w_a_we, w_b_we;
  logic [Q:0]    w_a_wdata, w_b_wdata;

  // one clearing pass over W after reset, half of it through each port
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready   <= 1'b0;
      clr_cnt <= '0;
    end else if (!ready) begin
      clr_cnt <= clr_cnt + 1'b1;
      if (clr_cnt == AW'(N * N / 2 - 1)) ready <= 1'b1;
    end
  end

  always_comb begin
    if (ready) begin
      w_a_addr  = row_addr;
      w_a_we    = row_we;
      w_a_wdata = {blk_tag, row_wdata};
      w_b_addr  = col_addr;
      w_b_we    = col_we;
      w_b_wdata = {blk_tag, col_wdata};
    end else begin
      w_a_addr  = clr_cnt;
      w_a_we    = 1'b1;
      w_a_wdata = '0;
      w_b_addr  = clr_cnt + AW'(N * N / 2);
      w_b_we    = 1'b1;
      w_b_wdata = '0;
    end
  end

  tdp_ram #(.DEPTH(N * N), .WIDTH(Q + 1)) u_w (
    .clk     (clk),
    .a_addr  (w_a_addr),
    .a_we    (w_a_we),
    .a_wdata (w_a_wdata),
    .a_rdata (w_a_rdata),
    .b_addr  (w_b_addr),
    .b_we    (w_b_we),
    .b_wdata (w_b_wdata),
    .b_rdata (w_b_rdata)
  );

  for (genvar b = 0; b < 2; b++) begin : g_r
    logic          is_ld;
    logic [AW-1:0] a_addr;
    assign is_ld  = ld_we && ld_bank == 1'(b);
    assign a_addr = is_ld ? ld_addr : row_addr;
    tdp_ram #(.DEPTH(N * N), .WIDTH(Q)) u_r (
      .clk     (clk),
      .a_addr  (a_addr),
      .a_we    (is_ld),
      .a_wdata (ld_data),
      .a_rdata (r_a_rdata[b]),
      .b_addr  (col_addr),
      .b_we    (1'b0),
      .b_wdata ('0),
      .b_rdata (r_b_rdata[b])
    );
  end

  always_ff @(posedge clk) begin
    dec_bank_q <= dec_bank;
    blk_tag_q  <= blk_tag;
  end

  assign row_r = r_a_rdata[dec_bank_q];
  assign col_r = r_b_rdata[dec_bank_q];
  assign row_w = (w_a_rdata[Q] == blk_tag_q) ? w_a_rdata[Q-1:0] : '0;
  assign col_w = (w_b_rdata[Q] == blk_tag_q) ? w_b_rdata[Q-1:0] : '0;

endmodule
