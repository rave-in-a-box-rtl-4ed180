// novelty_calc: live structural-novelty score and peak detector.
//
// Idea. Offline segmentation builds the self-similarity matrix of a song's
// chromagram and slides a checkerboard kernel along its diagonal. Here the
// kernel sum is kept for the last K chroma vectors only, in a FIFO:
// novelty = sum over pairs {i,j} of entries (i != j) of +c_i.c_j when both
// are in the same half of the FIFO (positions 0..K/2-1 older, K/2..K-1
// newer) and -c_i.c_j otherwise. When a chroma arrives, the oldest entry
// o leaves, the new one n enters and the entry m that was first in the
// newer half moves to the older half. Only pairs with o, n or m change, so
// the score is updated with three passes of K-1 dot products instead of
// recomputing K^2/2 of them:
//   pass n: +n.q for q in the newer half, -n.q for q in the older half
//           (m now counts as older)
//   pass o: -o.q for q that were in o's half (old positions 1..K/2-1),
//           +o.q for the rest (removing the old pair's contribution)
//   pass m: +2 m.q for q in the older half, -2 m.q for q in the newer half
//           (every pair with m flips sign, a change of twice its value).
//
// Sequence per chroma (chroma_done in IDLE; chromas arriving while busy are
// dropped): UNLOAD the oldest entry into a register; walk the remaining
// K-1 entries three times with the FIFO controller's CYCLE mode, feeding the
// 4-stage dot engine and the delta accumulator (m is picked up as entry
// K/2-1 during the first walk); LOAD n while the dot pipeline drains; add
// the delta to the saturating total; smooth with an exponential moving
// average (avg = (avg + total)/2); compare. `peak` is set, together with
// the one-clock `done` strobe, when the previous smoothed value is larger
// than both the current and the one before it and exceeds the zero point
// by more than PEAK_THRESHOLD. `done` is set 3*(K-1) + 8 clocks after the
// clock edge that accepts `chroma_done` (101 clocks for K = 32).
//
// The incremental scheme, the FIFO, dot engine and accumulators, the
// moving average and the peak test are those of the original design. This
// design's own choices: the FIFO is filled with K zero vectors after reset
// so the running score is the exact kernel sum from the first chroma; the
// newest vector waits in a register during the walks so that the FIFO is
// never full while cycling; the middle vector's pass doubles each product
// instead of walking twice.
module novelty_calc
  import rave_pkg::*;
#(
  parameter int unsigned     K              = 32,
  parameter int unsigned     TOTAL_BITS     = 200,
  parameter int unsigned     DELTA_BITS     = 135,
  parameter longint unsigned PEAK_THRESHOLD = 64'd100000000
) (
  input  logic                  clk,
  input  logic                  rst,
  input  chroma_t               new_chroma,
  input  logic                  chroma_done,
  output logic                  done,
  output logic                  peak,
  output logic [TOTAL_BITS-1:0] novelty,
  output logic [TOTAL_BITS-1:0] smoothed,
  output logic                  busy
);
  localparam int unsigned KB      = $clog2(K);
  localparam int unsigned HALF    = K / 2;
  localparam int unsigned DOT_W   = 36;
  localparam int unsigned DOT_LAT = 4;
  localparam logic [TOTAL_BITS-1:0] ZERO = TOTAL_BITS'(1) << (TOTAL_BITS - 1);
  localparam logic [TOTAL_BITS-1:0] LIMIT = ZERO + TOTAL_BITS'(PEAK_THRESHOLD);

  typedef enum logic [3:0] {
    S_PRIME, S_IDLE, S_UNLOAD, S_PASS_NEW, S_PASS_OLD, S_PASS_MID,
    S_DRAIN, S_ADD, S_AVERAGE, S_PEAK
  } state_e;

  state_e     state;
  logic [KB:0] cnt;
  chroma_t    newest, oldest, middle;

  fifo_mode_e      fifo_mode;
  chroma_t         fifo_out;
  logic [KB:0]     fifo_count;
  logic            fifo_full, fifo_empty;

  chroma_t              dot_a;
  logic [DOT_W-1:0]     dot;
  logic                 use_pair, sub_pair, dbl_pair;
  logic [DOT_LAT-1:0]   use_q, sub_q, dbl_q;
  logic                 delta_clear;
  logic signed [DELTA_BITS-1:0] delta;
  logic                 total_add;
  logic [TOTAL_BITS-1:0] prev1, prev2;

  // ---------------------------------------------------------------- control
  always_comb begin
    fifo_mode   = FIFO_IDLE;
    dot_a       = '0;
    use_pair    = 1'b0;
    sub_pair    = 1'b0;
    dbl_pair    = 1'b0;
    total_add   = 1'b0;
    unique case (state)
      S_PRIME:    fifo_mode = FIFO_LOAD;
      S_UNLOAD:   fifo_mode = FIFO_UNLOAD;
      S_PASS_NEW: begin
        fifo_mode = FIFO_CYCLE;
        dot_a     = newest;
        use_pair  = 1'b1;
        sub_pair  = cnt < (KB+1)'(HALF);
      end
      S_PASS_OLD: begin
        fifo_mode = FIFO_CYCLE;
        dot_a     = oldest;
        use_pair  = 1'b1;
        sub_pair  = cnt < (KB+1)'(HALF - 1);
      end
      S_PASS_MID: begin
        fifo_mode = FIFO_CYCLE;
        dot_a     = middle;
        use_pair  = cnt != (KB+1)'(HALF - 1);
        sub_pair  = cnt >= (KB+1)'(HALF);
        dbl_pair  = 1'b1;
      end
      S_DRAIN:    fifo_mode = (cnt == '0) ? FIFO_LOAD : FIFO_IDLE;
      S_ADD:      total_add = 1'b1;
      default: ;
    endcase
  end

  assign delta_clear = (state == S_IDLE);
  assign busy        = (state != S_IDLE);

  // ------------------------------------------------------------ sequencing
  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      state    <= S_PRIME;
      cnt      <= '0;
      peak     <= 1'b0;
      newest   <= '0;
      oldest   <= '0;
      middle   <= '0;
      smoothed <= ZERO;
      prev1    <= ZERO;
      prev2    <= ZERO;
    end else begin
      unique case (state)
        S_PRIME: if (fifo_count == (KB+1)'(K - 1)) state <= S_IDLE;
        S_IDLE: if (chroma_done) begin
          newest <= new_chroma;
          state  <= S_UNLOAD;
        end
        S_UNLOAD: begin
          oldest <= fifo_out;
          cnt    <= '0;
          state  <= S_PASS_NEW;
        end
        S_PASS_NEW, S_PASS_OLD, S_PASS_MID: begin
          if (state == S_PASS_NEW && cnt == (KB+1)'(HALF - 1)) middle <= fifo_out;
          if (cnt == (KB+1)'(K - 2)) begin
            cnt   <= '0;
            state <= (state == S_PASS_NEW) ? S_PASS_OLD :
                     (state == S_PASS_OLD) ? S_PASS_MID : S_DRAIN;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_DRAIN: begin
          cnt <= cnt + 1'b1;
          if (cnt == (KB+1)'(DOT_LAT - 1)) state <= S_ADD;
        end
        S_ADD: state <= S_AVERAGE;
        S_AVERAGE: begin
          // (avg + total) / 2, rounded down, without losing the carry
          smoothed <= TOTAL_BITS'(({1'b0, smoothed} + {1'b0, novelty}) >> 1);
          state    <= S_PEAK;
        end
        S_PEAK: begin
          peak  <= (prev1 > smoothed) && (prev1 > prev2) && (prev1 > LIMIT);
          done  <= 1'b1;
          prev2 <= prev1;
          prev1 <= smoothed;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end


  // Control bits travel alongside the dot engine's four stages.
  always_ff @(posedge clk) begin
    if (rst) begin
      use_q <= '0;
      sub_q <= '0;
      dbl_q <= '0;
    end else begin
      use_q <= {use_q[DOT_LAT-2:0], use_pair};
      sub_q <= {sub_q[DOT_LAT-2:0], sub_pair};
      dbl_q <= {dbl_q[DOT_LAT-2:0], dbl_pair};
    end
  end

  // ------------------------------------------------------------- datapath
  fifo_controller #(.W($bits(chroma_t)), .DEPTH(K)) u_fifo (
    .clk        (clk),
    .rst        (rst),
    .mode       (fifo_mode),
    .new_input  (state == S_PRIME ? chroma_t'('0) : newest),
    .fifo_output(fifo_out),
    .data_count (fifo_count),
    .fifo_full  (fifo_full),
    .fifo_empty (fifo_empty)
  );

  dot_engine #(.OUT_BITS(DOT_W)) u_dot (
    .clk(clk),
    .a  (dot_a),
    .b  (fifo_out),
    .dot(dot)
  );

  delta_accumulator #(.IN_BITS(DOT_W + 1), .ACC_BITS(DELTA_BITS)) u_delta (
    .clk  (clk),
    .clear(delta_clear),
    .add  (use_q[DOT_LAT-1]),
    .value(dbl_q[DOT_LAT-1] ? {dot, 1'b0} : {1'b0, dot}),
    .sub  (sub_q[DOT_LAT-1]),
    .acc  (delta)
  );

  total_accumulator #(.ACC_BITS(TOTAL_BITS), .DELTA_BITS(DELTA_BITS)) u_total (
    .clk  (clk),
    .rst  (rst),
    .add  (total_add),
    .delta(delta),
    .total(novelty)
  );

  a_cycle_not_full: assert property (@(posedge clk) disable iff (rst)
    fifo_mode == FIFO_CYCLE |-> !fifo_full);
  a_read_not_empty: assert property (@(posedge clk) disable iff (rst)
    (fifo_mode == FIFO_UNLOAD || fifo_mode == FIFO_CYCLE) |-> !fifo_empty);
endmodule
