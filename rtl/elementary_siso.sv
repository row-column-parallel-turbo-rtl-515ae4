// elementary_siso: elementary soft-input soft-output decoder of one half-iteration.
//
// It follows the published block diagram of the elementary decoder: the
// extrinsic value W_k of a symbol is weighted by alpha_k and added to the channel
// value R, giving R'_k = R + alpha_k * W_k, which feeds the SISO decoder
// (siso_core). The decoder's soft output F_k, minus the same R'_k held back in a
// delay line, is the new extrinsic value W_k+1 = F_k - R'_k; D_k is the decided bit.
// The delay line of R'_k is the symbol store inside siso_core, which keeps the
// whole codeword until its outputs are read. The channel value R needs no delay
// line here: the parallel decoder reads it again from its R memory.
//
// Interface: a start pulse opens a codeword, then N symbols (in_r = R,
// in_w = W_k, in_pos = position in the codeword) arrive on in_valid; done rises
// when the decision is made, and out_w / out_d answer the position out_pos in
// the same cycle.
//
// This design's choices: alpha is unsigned with ALPHA_FRAC fractional bits and
// the product is rounded towards minus infinity; R' is saturated to Q+1 bits and
// W_k+1 to Q bits, both symmetric.
module elementary_siso
  import pc_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned P = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic                   in_valid,
  input  logic [$clog2(N)-1:0]   in_pos,
  input  logic signed [Q-1:0]    in_r,
  input  logic signed [Q-1:0]    in_w,
  input  logic [ALPHA_W-1:0]     alpha,
  input  logic [Q-1:0]           beta,
  output logic                   done,
  input  logic [$clog2(N)-1:0]   out_pos,
  output logic signed [Q-1:0]    out_w,
  output logic                   out_d,
  output logic                   out_comp
);

  localparam int unsigned RW = Q + 1;
  localparam int unsigned FW = Q + 2;

  logic signed [RW-1:0] r_prime;
  logic signed [FW-1:0] f;
  logic signed [RW-1:0] r_prime_dly;
  int                   weighted;

  // R'_k = R + alpha_k * W_k
  always_comb begin
    weighted = (int'(in_w) * int'({1'b0, alpha})) >>> ALPHA_FRAC;
    r_prime  = RW'(sat_sym(int'(in_r) + weighted, RW));
  end

  siso_core #(.N(N), .P(P), .RW(RW), .FW(FW), .BW(Q)) u_core (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .in_valid (in_valid),
    .in_pos   (in_pos),
    .in_r     (r_prime),
    .beta     (beta),
    .done     (done),
    .out_pos  (out_pos),
    .out_d    (out_d),
    .out_f    (f),
    .out_r    (r_prime_dly),
    .out_comp (out_comp)
  );

  // W_k+1 = F_k - R'_k
  assign out_w = Q'(sat_sym(int'(f) - int'(r_prime_dly), Q));

endmodule
