// siso_core: soft-input soft-output decoder of one extended BCH codeword
// (length N = 2^m, minimum distance 4), the "SISO decoder" box of the
// elementary decoder.
//
// How it works. The decoder follows the Chase-Pyndiah algorithm, which the
// architecture uses but does not describe; every detail below is this design's
// choice:
//   1. Load (N cycles, one symbol per in_valid, any order given by in_pos): the
//      soft input r'_p is stored, its sign gives the hard decision y_p, the
//      syndrome of y and its overall parity are accumulated, and the P least
//      reliable positions (smallest |r'|) are kept in a sorted list.
//   2. Search (2^P cycles, one test pattern per cycle): pattern e flips the
//      least reliable positions selected by its bits, the result is corrected by
//      the Hamming decoder (syndrome -> error position) and the overall parity
//      bit is set. The candidate is kept as a difference mask against y, with
//      its metric, the sum of |r'_p| over the positions where it differs from y
//      (this equals a quarter of the squared Euclidean distance to r', up to a
//      constant). The candidate with the smallest metric becomes the decision D
//      (lowest pattern index on ties).
//   3. Output (done = 1, combinational query by out_pos): d_p is the decided bit.
//      If some candidate differs from D at p, the best such competitor C gives
//      F_p = (M_C - M_D) * s(d_p), with s(0) = +1 and s(1) = -1. Otherwise
//      F_p = r'_p + beta * s(d_p), so that the extrinsic value F_p - r'_p of the
//      elementary decoder equals beta * s(d_p).
// A start pulse clears the decoder and begins loading the next codeword; the
// decoder holds one codeword at a time.
//
// Timing: done rises 2^P cycles after the clock edge that takes the N-th symbol and
// stays high until the next start. Outputs follow out_pos in the same cycle.
module siso_core
  import pc_pkg::*;
#(
  parameter int unsigned N  = 32,            // codeword length, a power of two
  parameter int unsigned P  = 4,             // number of least reliable positions
  parameter int unsigned RW = Q + 1,         // width of the soft input r'
  parameter int unsigned FW = Q + 2,         // width of the soft output F
  parameter int unsigned BW = Q              // width of beta
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic                   in_valid,
  input  logic [$clog2(N)-1:0]   in_pos,
  input  logic signed [RW-1:0]   in_r,
  input  logic [BW-1:0]          beta,
  output logic                   done,
  input  logic [$clog2(N)-1:0]   out_pos,
  output logic                   out_d,
  output logic signed [FW-1:0]   out_f,
  output logic signed [RW-1:0]   out_r,
  output logic                   out_comp       // a competitor was found for out_pos
);

  localparam int unsigned M   = $clog2(N);
  localparam int unsigned NT  = 1 << P;                 // test patterns
  localparam int unsigned MGW = RW - 1;                 // magnitude width
  localparam int unsigned MW  = MGW + M + 1;            // metric width

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_SEARCH, S_DONE} state_e;

  // parity-check column of each position: alpha^p, and zero for the parity bit
  function automatic logic [N-1:0][M-1:0] make_cols();
    logic [N-1:0][M-1:0] c;
    for (int unsigned p = 0; p < N; p++)
      c[p] = (p == N - 1) ? '0 : M'(gf_pow(M, p));
    return c;
  endfunction
  localparam logic [N-1:0][M-1:0] COLS = make_cols();

  state_e                  state;
  logic [M-1:0]            cnt;
  logic [$clog2(NT)-1:0]   pat;
  logic signed [RW-1:0]    rp   [N];
  logic [N-1:0]            y;
  logic [M-1:0]            syn0;
  logic                    par0;
  logic [MGW:0]            lrp_mag [P];   // one extra bit: the empty entry exceeds any magnitude
  logic [M-1:0]            lrp_pos [P];
  logic [N-1:0]            cand_mask [NT];
  logic [MW-1:0]           cand_met  [NT];
  logic [$clog2(NT)-1:0]   best;
  logic [MW-1:0]           best_met;

  function automatic logic [MGW-1:0] mag(input logic signed [RW-1:0] v);
    return v[RW-1] ? MGW'(-v) : MGW'(v);
  endfunction

  // ---------------- insertion of a new symbol into the sorted LRP list
  logic [MGW:0]   in_mag;
  logic [P-1:0]   lt;
  logic [MGW:0]   ins_mag [P];
  logic [M-1:0]   ins_pos [P];

  logic [P-1:0]   lt_prev;   // lt of the entry above (0 for the first entry)

  always_comb begin
    in_mag = {1'b0, mag(in_r)};
    for (int k = 0; k < P; k++) lt[k] = in_mag < lrp_mag[k];
    lt_prev = {lt[P-2:0], 1'b0};
    for (int k = 0; k < P; k++) begin
      ins_mag[k] = lrp_mag[k];
      ins_pos[k] = lrp_pos[k];
      if (lt[k] && !lt_prev[k]) begin          // the new symbol goes here
        ins_mag[k] = in_mag;
        ins_pos[k] = in_pos;
      end else if (lt_prev[k]) begin           // entries below it move down
        ins_mag[k] = lrp_mag[k-1];
        ins_pos[k] = lrp_pos[k-1];
      end
    end
  end

  // ---------------- evaluation of test pattern 'pat'
  logic [N-1:0]  c_diff;
  logic [M-1:0]  c_syn;
  logic          c_par;
  logic [MW-1:0] c_met;

  always_comb begin
    c_diff = '0;
    c_syn  = syn0;
    c_par  = par0;
    for (int k = 0; k < P; k++) begin
      if (pat[k]) begin
        c_diff[lrp_pos[k]] = ~c_diff[lrp_pos[k]];
        c_syn              = c_syn ^ COLS[lrp_pos[k]];
        c_par              = ~c_par;
      end
    end
    // Hamming correction: the nonzero syndrome equals the column of the error
    if (c_syn != '0) begin
      for (int p = 0; p < N - 1; p++)
        if (COLS[p] == c_syn) c_diff[p] = ~c_diff[p];
      c_par = ~c_par;
    end
    // extension bit restores even overall parity
    if (c_par) c_diff[N-1] = ~c_diff[N-1];
    c_met = '0;
    for (int p = 0; p < N; p++)
      if (c_diff[p]) c_met = c_met + MW'(mag(rp[p]));
  end

  // ---------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      pat      <= '0;
      syn0     <= '0;
      par0     <= 1'b0;
      best     <= '0;
      best_met <= '1;
      for (int k = 0; k < P; k++) begin
        lrp_mag[k] <= '1;
        lrp_pos[k] <= '0;
      end
    end else if (start) begin
      state    <= S_LOAD;
      cnt      <= '0;
      pat      <= '0;
      syn0     <= '0;
      par0     <= 1'b0;
      best     <= '0;
      best_met <= '1;
      for (int k = 0; k < P; k++) begin
        lrp_mag[k] <= '1;
        lrp_pos[k] <= '0;
      end
    end else begin
      case (state)
        S_LOAD: if (in_valid) begin
          if (in_r[RW-1]) begin
            syn0 <= syn0 ^ COLS[in_pos];
            par0 <= ~par0;
          end
          for (int k = 0; k < P; k++) begin
            lrp_mag[k] <= ins_mag[k];
            lrp_pos[k] <= ins_pos[k];
          end
          cnt <= cnt + 1'b1;
          if (cnt == M'(N - 1)) state <= S_SEARCH;
        end
        S_SEARCH: begin
          if (c_met < best_met) begin
            best     <= pat;
            best_met <= c_met;
          end
          pat <= pat + 1'b1;
          if (pat == $clog2(NT)'(NT - 1)) state <= S_DONE;
        end
        default: ;
      endcase
    end
  end

  // symbol store and candidate store (no reset needed: written before use)
  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid && !start) begin
      rp[in_pos] <= in_r;
      y[in_pos]  <= in_r[RW-1];
    end
    if (state == S_SEARCH && !start) begin
      cand_mask[pat] <= c_diff;
      cand_met[pat]  <= c_met;
    end
  end

  assign done = (state == S_DONE);

  // ---------------- soft output for position out_pos
  logic [N-1:0]   d_mask;
  logic [MW-1:0]  comp_met;
  logic           comp_found;
  int             f_val;

  always_comb begin
    d_mask     = cand_mask[best];
    comp_found = 1'b0;
    comp_met   = '1;
    for (int e = 0; e < NT; e++) begin
      if (cand_mask[e][out_pos] != d_mask[out_pos] && cand_met[e] < comp_met) begin
        comp_met   = cand_met[e];
        comp_found = 1'b1;
      end
    end
    out_d = y[out_pos] ^ d_mask[out_pos];
    out_r = rp[out_pos];
    if (comp_found) f_val = int'(comp_met) - int'(cand_met[best]);
    else            f_val = int'(rp[out_pos]) * (out_d ? -1 : 1) + int'(beta);
    f_val    = out_d ? -f_val : f_val;
    out_f    = FW'(sat_sym(f_val, FW));
    out_comp = comp_found;
  end

endmodule
