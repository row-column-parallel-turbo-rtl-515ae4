// tdp_ram: matrix memory with two independent ports ("double access").
//
// Each of the memories of the decoder holds one n x n matrix of symbols, DEPTH
// = n^2 words, and serves two users at once: the row decoder and the column
// decoder, or the channel input and the column decoder. Each port either
// reads or writes one word per cycle. Reads are synchronous: rdata shows the
// word at the address of the previous cycle, as it was before any write in that
// cycle. The two ports must not write the same address in the same cycle; an
// assertion checks this. The memory is an array, to be mapped onto a true
// dual-port SRAM; the port behaviour is this design's choice.
module tdp_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 5
) (
  input  logic                      clk,
  input  logic [$clog2(DEPTH)-1:0]  a_addr,
  input  logic                      a_we,
  input  logic [WIDTH-1:0]          a_wdata,
  output logic [WIDTH-1:0]          a_rdata,
  input  logic [$clog2(DEPTH)-1:0]  b_addr,
  input  logic                      b_we,
  input  logic [WIDTH-1:0]          b_wdata,
  output logic [WIDTH-1:0]          b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end

  a_no_write_clash: assert property (@(posedge clk) !(a_we && b_we && a_addr == b_addr))
    else $error("tdp_ram: both ports write address %0d", a_addr);

endmodule
