// rc_scheduler: control of the row-column parallel decoding of one block.
//
// The row decoder and the column decoder work at the same time, in lock step,
// on row t and column t of the n x n matrix, for t = 0..n-1, and this for
// NUM_ITER iterations. Within a codeword the step index i runs from 0 to n-1:
// the row decoder visits symbol (t, i), from the first symbol of its row, and the
// column decoder visits symbol (n-1-i, t), from the last symbol of its column.
// This is the published rule j = n - i (with 0-based indices, j = n-1-i): the
// two decoders would meet on one symbol only if 2t = n-1, which cannot happen
// for even n, so they never access the same word of the shared W memory.
//
// Each decoder handles one codeword at a time, so a codeword goes through
// four phases (this design's timing):
//   PH_IDLE  -> start pulse to both decoders (1 cycle, also between codewords)
//   PH_READ  n cycles, one memory read per decoder per cycle; the data reach the
//            decoders one cycle later (feed_*)
//   PH_WAIT  until both decoders report done
//   PH_WRITE n cycles, the new extrinsic value of each symbol is written back
//            and its decision is emitted
// Iteration iter uses alpha/beta index 2*iter for rows and 2*iter+1 for columns.
// A go pulse starts a block; pass_done pulses in the cycle after the last write.
module rc_scheduler
  import pc_pkg::*;
#(
  parameter int unsigned N        = 32,
  parameter int unsigned NUM_ITER = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          go,
  input  logic                          dec_done,
  output logic                          busy,
  output logic                          pass_done,
  output phase_e                        phase,
  output logic                          dec_start,
  output logic [$clog2(N*N)-1:0]        row_addr,
  output logic [$clog2(N*N)-1:0]        col_addr,
  output logic [$clog2(N)-1:0]          row_pos,
  output logic [$clog2(N)-1:0]          col_pos,
  output logic                          feed_valid,
  output logic [$clog2(N)-1:0]          feed_row_pos,
  output logic [$clog2(N)-1:0]          feed_col_pos,
  output logic                          wr,
  output logic [$clog2(N)-1:0]          cw,
  output logic [$clog2(NUM_ITER+1)-1:0] iter,
  output logic                          last_iter
);

  localparam int unsigned M  = $clog2(N);
  localparam int unsigned AW = $clog2(N * N);
  localparam int unsigned IW = $clog2(NUM_ITER + 1);

  logic [M-1:0] step;
  logic         active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= PH_IDLE;
      active    <= 1'b0;
      step      <= '0;
      cw        <= '0;
      iter      <= '0;
      pass_done <= 1'b0;
    end else begin
      pass_done <= 1'b0;
      case (phase)
        PH_IDLE: begin
          if (active) begin
            phase <= PH_READ;
            step  <= '0;
          end else if (go) begin
            active <= 1'b1;
            cw     <= '0;
            iter   <= '0;
          end
        end
        PH_READ: begin
          step <= step + 1'b1;
          if (step == M'(N - 1)) phase <= PH_WAIT;
        end
        PH_WAIT: begin
          if (dec_done) begin
            phase <= PH_WRITE;
            step  <= '0;
          end
        end
        PH_WRITE: begin
          step <= step + 1'b1;
          if (step == M'(N - 1)) begin
            phase <= PH_IDLE;
            if (cw == M'(N - 1)) begin
              cw <= '0;
              if (iter == IW'(NUM_ITER - 1)) begin
                active    <= 1'b0;
                pass_done <= 1'b1;
              end else begin
                iter <= iter + 1'b1;
              end
            end else begin
              cw <= cw + 1'b1;
            end
          end
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      feed_valid   <= 1'b0;
      feed_row_pos <= '0;
      feed_col_pos <= '0;
    end else begin
      feed_valid   <= (phase == PH_READ);
      feed_row_pos <= row_pos;
      feed_col_pos <= col_pos;
    end
  end

  always_comb begin
    row_pos   = step;
    col_pos   = M'(N - 1) - step;
    row_addr  = AW'({cw, row_pos});
    col_addr  = AW'({col_pos, cw});
    dec_start = (phase == PH_IDLE) && active;
    wr        = (phase == PH_WRITE);
    busy      = active;
    last_iter = (iter == IW'(NUM_ITER - 1));
  end

endmodule
