// sbux_switch: the N x N smoothed buffered crossbar (sBUX).
//
// Each input i has N virtual output queues and an input scheduler SI_i; each
// output j has an output scheduler SO_j; each input-output pair has a
// crosspoint buffer XPB(i,j). All 2N schedulers are sMUX instances working
// from the same admissible rate matrix: SI_i uses row i, SO_j column j. Every
// slot SI_i serves one VOQ and SO_j one crosspoint buffer, chosen by rate only,
// with no credit flow control between them; a service to an empty queue or
// buffer is ineffective. Smooth schedules on both sides keep every crosspoint
// buffer at two cells or fewer.
//
// The input side (VOQs and SI) sits on the line cards, LAT slots away from the
// core (fabric_link). The switch compensates by running the input schedulers'
// periods LAT slots ahead of the output schedulers', so a flow is fed into and
// drained from its crosspoint buffer with identical timing. A slot counter
// `cnt` (0..T-1) marks output periods; the input period starts at cnt = T-LAT.
//
// Rate updates: `rate_next` is sampled in the last slot of each input period;
// the input schedulers use it for their next period and a copy is handed to
// the output schedulers LAT slots later, so both sides always use the same
// matrix for the same flow period. rate_next must be admissible (row and
// column sums <= T).
//
// Interface (one clock = one slot): per input `in_valid/in_dst/in_cell`
// arrivals; per output `out_valid/out_src/out_cell` departures
// (combinational); `si_start` pulses in the first slot of an input period and
// `si_rate` is the matrix in force there; `voq_occ`, `xpb_occ`,
// `ineff_in/ineff_out`, `voq_drop`, `xpb_overflow` expose the queue state and
// per-slot events. Synchronous active-low reset; all rates are zero until the
// first update. LAT must be below T.
module sbux_switch #(
  parameter int unsigned N         = sbux_pkg::N_DEF,
  parameter int unsigned T         = sbux_pkg::T_DEF,
  parameter int unsigned W         = sbux_pkg::CELL_W_DEF,
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
  input  logic [N-1:0]                in_valid,
  input  logic [N-1:0][IW-1:0]        in_dst,
  input  logic [N-1:0][W-1:0]         in_cell,
  input  logic [N-1:0][N-1:0][RW-1:0] rate_next,
  output logic [N-1:0]                out_valid,
  output logic [N-1:0][IW-1:0]        out_src,
  output logic [N-1:0][W-1:0]         out_cell,
  output logic                        si_start,
  output logic                        si_load,
  output logic [N-1:0][N-1:0][RW-1:0] si_rate,
  output logic [TW-1:0]               slot,
  output logic [N-1:0][N-1:0][QW-1:0] voq_occ,
  output logic [N-1:0][N-1:0][XW-1:0] xpb_occ,
  output logic [N-1:0]                ineff_in,
  output logic [N-1:0]                ineff_out,
  output logic [N-1:0]                voq_drop,
  output logic                        xpb_overflow
);

  // ---------------- period timing ----------------
  logic [TW-1:0] cnt;
  logic          so_load;
  assign so_load  = (cnt == TW'(T - 1));
  assign si_load  = (cnt == TW'(T - 1 - LAT));
  assign si_start = (cnt == TW'((T - LAT) % T));
  assign slot     = cnt;

  logic [N-1:0][N-1:0][RW-1:0] so_pend;   // matrix waiting for the SO side

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < N; i++) begin
        si_rate[i] <= '0;
        so_pend[i] <= '0;
      end
    end else begin
      cnt <= (cnt == TW'(T - 1)) ? '0 : cnt + 1'b1;
      if (si_load) begin
        si_rate <= rate_next;
        so_pend <= rate_next;
      end
    end
  end

  // Column view of the pending matrix for the output schedulers.
  logic [N-1:0][N-1:0][RW-1:0] so_col;
  always_comb begin
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++)
        so_col[j][i] = so_pend[i][j];
  end

  // ---------------- input side ----------------
  logic [N-1:0]          si_gv, voq_ov, lk_v;
  logic [N-1:0][IW-1:0]  si_gi, lk_dst;
  logic [N-1:0][W-1:0]   voq_cell, lk_cell;

  for (genvar i = 0; i < N; i++) begin : g_in
    logic [RW-1:0] unused_slot;
    smux #(.N(N), .T(T)) u_si (
      .clk, .rst_n, .load(si_load), .rate_in(rate_next[i]),
      .grant_valid(si_gv[i]), .grant_idx(si_gi[i]), .slot(unused_slot)
    );
    voq_bank #(.N(N), .DEPTH(VOQ_DEPTH), .W(W)) u_voq (
      .clk, .rst_n,
      .in_valid(in_valid[i]), .in_dst(in_dst[i]), .in_cell(in_cell[i]),
      .serve(si_gv[i]), .serve_idx(si_gi[i]),
      .out_valid(voq_ov[i]), .out_cell(voq_cell[i]),
      .occ(voq_occ[i]), .drop(voq_drop[i])
    );
    assign ineff_in[i] = si_gv[i] && !voq_ov[i];
    fabric_link #(.LAT(LAT), .W(W + IW)) u_link (
      .clk, .rst_n,
      .in_valid(voq_ov[i]), .in_data({si_gi[i], voq_cell[i]}),
      .out_valid(lk_v[i]), .out_data({lk_dst[i], lk_cell[i]})
    );
  end

  // ---------------- crosspoints ----------------
  logic [N-1:0]         so_gv;
  logic [N-1:0][IW-1:0] so_gi;
  logic [N-1:0][N-1:0]  x_pv, x_ineff, x_ovf;   // [i][j]
  logic [W-1:0]         x_pd [N][N];

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      xpb #(.DEPTH(XPB_DEPTH), .W(W)) u_xpb (
        .clk, .rst_n,
        .push(lk_v[i] && lk_dst[i] == IW'(j)), .push_data(lk_cell[i]),
        .pop(so_gv[j] && so_gi[j] == IW'(i)),
        .pop_valid(x_pv[i][j]), .pop_data(x_pd[i][j]),
        .ineff(x_ineff[i][j]), .occ(xpb_occ[i][j]), .overflow(x_ovf[i][j])
      );
    end
  end
  assign xpb_overflow = |x_ovf;

  // ---------------- output side ----------------
  for (genvar j = 0; j < N; j++) begin : g_out
    logic [RW-1:0] unused_slot;
    smux #(.N(N), .T(T)) u_so (
      .clk, .rst_n, .load(so_load), .rate_in(so_col[j]),
      .grant_valid(so_gv[j]), .grant_idx(so_gi[j]), .slot(unused_slot)
    );
    always_comb begin
      out_valid[j] = 1'b0;
      out_cell[j]  = x_pd[so_gi[j]][j];
      out_src[j]   = so_gi[j];
      ineff_out[j] = 1'b0;
      for (int i = 0; i < N; i++) begin
        out_valid[j] = out_valid[j] | x_pv[i][j];
        ineff_out[j] = ineff_out[j] | x_ineff[i][j];
      end
    end
  end

  a_lat_below_period: assert property (@(posedge clk) LAT < T);

endmodule
