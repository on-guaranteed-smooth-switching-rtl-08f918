// sbux_top: rate-based smoothed switch with its bandwidth regulator.
//
// The smoothed buffered crossbar (sbux_switch) schedules every cell by rate
// alone, so it needs an admissible rate matrix for each period of T slots.
// Two sources are provided, chosen by `best_effort`:
//   0  real-time service: the matrix `rt_rate` supplied by admission control
//      is used as is;
//   1  best-effort service: the bandwidth regulator builds the matrix. Each
//      input's estimator (bw_estimator) turns arrivals and VOQ backlog into a
//      demand row at the start of every input period; the allocator
//      (bw_allocator) scales and boosts the demand matrix into a doubly
//      stochastic one during that period, and the result is applied from the
//      next period on.
// The mode may change at any time; it takes effect at the next rate update.
//
// Timing: one clock = one slot. The regulator runs once per period and must
// finish within it (3N + ceil(N*N/M) + 2 < T, checked by an assertion).
// Interface: per-input arrivals `in_valid/in_dst/in_cell`, per-output
// departures `out_valid/out_src/out_cell`, the matrix in force `cur_rate`,
// and per-slot status and event signals for observation. Synchronous
// active-low reset.
//
// The split into estimators and one allocator, the period-based update and
// the mode choice follow the published sBUX scheme; the exact timing of sampling and
// update is this design's choice.
module sbux_top #(
  parameter int unsigned N         = sbux_pkg::N_DEF,
  parameter int unsigned T         = sbux_pkg::T_DEF,
  parameter int unsigned W         = sbux_pkg::CELL_W_DEF,
  parameter int unsigned L         = sbux_pkg::L_DEF,
  parameter int unsigned M         = sbux_pkg::M_DEF,
  parameter int unsigned VOQ_DEPTH = sbux_pkg::VOQ_DEPTH_DEF,
  parameter int unsigned XPB_DEPTH = sbux_pkg::XPB_DEPTH_DEF,
  parameter int unsigned LAT       = sbux_pkg::LAT_DEF,
  localparam int unsigned RW = $clog2(T + 1),
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned QW = $clog2(VOQ_DEPTH + 1),
  localparam int unsigned XW = $clog2(XPB_DEPTH + 1),
  localparam int unsigned TW = $clog2(T)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        best_effort,
  input  logic [N-1:0][N-1:0][RW-1:0] rt_rate,
  input  logic [N-1:0]                in_valid,
  input  logic [N-1:0][IW-1:0]        in_dst,
  input  logic [N-1:0][W-1:0]         in_cell,
  output logic [N-1:0]                out_valid,
  output logic [N-1:0][IW-1:0]        out_src,
  output logic [N-1:0][W-1:0]         out_cell,
  output logic [N-1:0][N-1:0][RW-1:0] cur_rate,
  output logic [N-1:0][N-1:0][L-1:0]  demand,
  output logic                        rate_update,
  output logic                        period_start,
  output logic                        alloc_done,
  output logic [TW-1:0]               slot,
  output logic [N-1:0][N-1:0][QW-1:0] voq_occ,
  output logic [N-1:0][N-1:0][XW-1:0] xpb_occ,
  output logic [N-1:0]                ineff_in,
  output logic [N-1:0]                ineff_out,
  output logic [N-1:0]                voq_drop,
  output logic                        xpb_overflow
);

  logic [N-1:0][N-1:0][RW-1:0] alloc, alloc_q, rate_next;
  logic [N-1:0]                dem_v;
  logic                        alloc_busy;

  assign rate_next = best_effort ? alloc_q : rt_rate;

  sbux_switch #(
    .N(N), .T(T), .W(W), .VOQ_DEPTH(VOQ_DEPTH), .XPB_DEPTH(XPB_DEPTH), .LAT(LAT)
  ) u_sw (
    .clk, .rst_n,
    .in_valid, .in_dst, .in_cell, .rate_next,
    .out_valid, .out_src, .out_cell,
    .si_start(period_start), .si_load(rate_update), .si_rate(cur_rate), .slot,
    .voq_occ, .xpb_occ, .ineff_in, .ineff_out, .voq_drop, .xpb_overflow
  );

  for (genvar i = 0; i < N; i++) begin : g_est
    bw_estimator #(.N(N), .T(T), .L(L), .QW(QW)) u_est (
      .clk, .rst_n,
      .arrive(in_valid[i]), .arrive_dst(in_dst[i]),
      .sample(period_start), .occ(voq_occ[i]), .alloc(cur_rate[i]),
      .demand(demand[i]), .demand_valid(dem_v[i])
    );
  end

  bw_allocator #(.N(N), .T(T), .L(L), .M(M)) u_alloc (
    .clk, .rst_n, .start(dem_v[0]), .demand,
    .alloc, .busy(alloc_busy), .done(alloc_done)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) alloc_q[i] <= '0;
    end else if (alloc_done) begin
      alloc_q <= alloc;
    end
  end

  // The regulator must deliver its matrix before the next rate update.
  a_alloc_in_time: assert property (@(posedge clk) disable iff (!rst_n)
    rate_update |-> !alloc_busy);

endmodule
