// bw_allocator: centralised bandwidth allocator of the regulator.
//
// Turns a possibly inadmissible N x N demand matrix d (cells per period) into
// a doubly stochastic allocation a whose every row and column sums to T:
//   1. line sums      R_i = sum_j d(i,j), C_j = sum_i d(i,j)
//   2. proportional   a(i,j) = floor(d(i,j) * T / max(R_i, C_j))  (0 if both
//      scaler         sums are 0), M elements per cycle with M dividers
//   3. line sums      of a, one diagonal per cycle
//   4. booster        N steps; step s boosts, in parallel, the N elements of
//                     diagonal k = (start + s) mod N, i.e. (i, (i+k) mod N):
//                     a += T - max(R_i, C_j), updating both sums as well.
//                     The starting diagonal advances by one each run
//                     (round robin), which spreads the boost fairly.
// The line sums are formed one diagonal per cycle (N cycles each), so a run
// takes 3N + ceil(N*N/M) cycles and `done` pulses 3N + ceil(N*N/M) + 1 cycles
// after the `start` cycle. `alloc` holds the result until the next start.
//
// The algorithm (scaler, diagonal booster, round-robin start, M parallel
// dividers) follows the published sBUX scheme; the per-diagonal sequencing of the sums and
// the single-cycle dividers are this design's choices. `start` is ignored
// while busy. Synchronous active-low reset returns to idle with start
// diagonal 0 and an all-zero allocation.
module bw_allocator #(
  parameter int unsigned N = sbux_pkg::N_DEF,
  parameter int unsigned T = sbux_pkg::T_DEF,
  parameter int unsigned L = sbux_pkg::L_DEF,
  parameter int unsigned M = sbux_pkg::M_DEF,
  localparam int unsigned RW = $clog2(T + 1),
  localparam int unsigned SW = L + $clog2(N + 1),
  localparam int unsigned NC = (N * N + M - 1) / M,   // scaler cycles
  localparam int unsigned CW = $clog2(((N > NC) ? N : NC) + 1),
  localparam int unsigned KW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [N-1:0][N-1:0][L-1:0]  demand,
  output logic [N-1:0][N-1:0][RW-1:0] alloc,
  output logic                        busy,
  output logic                        done
);

  typedef enum logic [2:0] {IDLE, SUMD, SCALE, SUMA, BOOST, FIN} state_t;
  state_t state;

  logic [N-1:0][SW-1:0] rs, cs;
  logic [CW-1:0]        cnt;
  logic [KW-1:0]        first;     // starting diagonal of the booster
  logic [N-1:0][N-1:0][L-1:0] dm;  // demand captured at start

  assign busy = (state != IDLE);
  assign done = (state == FIN);

  function automatic int unsigned diag_col(int unsigned i, int unsigned k);
    return (i + k) % N;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
      first <= '0;
      rs    <= '0;
      cs    <= '0;
      for (int i = 0; i < N; i++) begin
        alloc[i] <= '0;
        dm[i]    <= '0;
      end
    end else begin
      unique case (state)
        IDLE: if (start) begin
          dm    <= demand;
          rs    <= '0;
          cs    <= '0;
          cnt   <= '0;
          state <= SUMD;
        end
        SUMD, SUMA: begin
          for (int i = 0; i < N; i++) begin
            int unsigned j;
            logic [SW-1:0] v;
            j = diag_col(i, int'(cnt));
            v = (state == SUMD) ? SW'(dm[i][j]) : SW'(alloc[i][j]);
            rs[i] <= rs[i] + v;
            cs[j] <= cs[j] + v;
          end
          if (cnt == CW'(N - 1)) begin
            cnt   <= '0;
            if (state == SUMD) begin
              state <= SCALE;
            end else begin
              state <= BOOST;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        SCALE: begin
          for (int m = 0; m < M; m++) begin
            int unsigned e, i, j;
            logic [SW-1:0]    mx;
            logic [L+RW-1:0]  num;
            e = cnt * M + m;
            if (e < N * N) begin
              i   = e / N;
              j   = e % N;
              mx  = (rs[i] > cs[j]) ? rs[i] : cs[j];
              num = (L+RW)'(dm[i][j]) * (L+RW)'(T);
              alloc[i][j] <= (mx == '0) ? '0 : RW'(num / (L+RW)'(mx));
            end
          end
          if (cnt == CW'(NC - 1)) begin
            cnt   <= '0;
            rs    <= '0;
            cs    <= '0;
            state <= SUMA;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        BOOST: begin
          for (int i = 0; i < N; i++) begin
            int unsigned j;
            logic [SW-1:0] mx, dl;
            j  = diag_col(i, (int'(first) + int'(cnt)) % N);
            mx = (rs[i] > cs[j]) ? rs[i] : cs[j];
            dl = (mx >= SW'(T)) ? '0 : SW'(T) - mx;
            alloc[i][j] <= alloc[i][j] + RW'(dl);
            rs[i]       <= rs[i] + dl;
            cs[j]       <= cs[j] + dl;
          end
          if (cnt == CW'(N - 1)) begin
            cnt   <= '0;
            state <= FIN;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        FIN: begin
          first <= (first == KW'(N - 1)) ? '0 : first + 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
