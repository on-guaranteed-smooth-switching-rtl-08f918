// smux: smoothed multiplexer (sMUX), the rate-based scheduler used at every
// input and output of the switch.
//
// Each of the N flows sharing a link has a rate a_i (cells per period of T
// slots, normalised bandwidth w_i = a_i/T). All flows are (re)initiated at
// the start of each period. The j-th service of flow i is eligible from slot
// ceil((j-1)*T/a_i) and has the upper-rounded deadline ceil(j*T/a_i), slots
// counted from the period start. In every slot the scheduler grants the
// eligible flow with the earliest upper-rounded deadline (earliest deadline
// first under the integral constraint); ties go to the lowest flow index;
// with no eligible flow the slot stays idle. The grant is made whether or not
// the flow has a cell to send: the scheduler is purely rate-based.
//
// Deadlines are kept exactly as q + r/a_i (q integer, 0 <= r < a_i) and are
// advanced by T/a_i = (T div a_i) + (T mod a_i)/a_i at each service. The two
// step constants are computed once per period when the rates are loaded.
// Because a_i services fit exactly in the period (their last deadline is T),
// flow i is served exactly a_i times per period when sum(a_i) <= T.
//
// Interface: one clock = one slot. `load` marks the last slot of a period;
// that slot is still scheduled with the old rates and at its clock edge the
// new rates `rate_in` are taken and the next slot is slot 0 of the new
// period. `grant_valid/grant_idx` are combinational for the current slot.
// Reset leaves all rates at zero (no grants) until the first load.
//
// Following the published sMUX algorithm: eligibility, upper-rounded deadline, EDF choice,
// arbitrary tie-break, periodic update with rates a/T. Own choices: lowest
// index wins ties, exact quotient/remainder deadline arithmetic, re-initiation
// of all flows at each period start.
module smux #(
  parameter int unsigned N  = sbux_pkg::N_DEF,
  parameter int unsigned T  = sbux_pkg::T_DEF,
  localparam int unsigned RW = $clog2(T + 1),
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic [N-1:0][RW-1:0]  rate_in,
  output logic                  grant_valid,
  output logic [IW-1:0]         grant_idx,
  output logic [RW-1:0]         slot         // slot number inside the period
);

  localparam int unsigned CW = RW + 1;  // room for q + carry

  logic [N-1:0][RW-1:0] rate_q, stepq, stepr, done, dlr;
  logic [N-1:0][CW-1:0] elig, dlq;
  logic [CW-1:0]        tt;

  // Upper-rounded deadline of each flow's next service.
  logic [N-1:0][CW-1:0] dl_ceil;
  always_comb begin
    for (int i = 0; i < N; i++)
      dl_ceil[i] = dlq[i] + CW'(dlr[i] != '0);
  end

  // Earliest-deadline choice among eligible flows.
  always_comb begin
    logic [CW-1:0] best;
    grant_valid = 1'b0;
    grant_idx   = '0;
    best        = '1;
    for (int i = 0; i < N; i++) begin
      if (rate_q[i] != '0 && done[i] < rate_q[i] && elig[i] <= tt) begin
        if (!grant_valid || dl_ceil[i] < best) begin
          grant_valid = 1'b1;
          grant_idx   = IW'(i);
          best        = dl_ceil[i];
        end
      end
    end
  end

  assign slot = RW'(tt);

  // Step constants for the incoming rates.
  logic [N-1:0][RW-1:0] in_q, in_r;
  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (rate_in[i] == '0) begin
        in_q[i] = '0;
        in_r[i] = '0;
      end else begin
        in_q[i] = RW'(RW'(T) / rate_in[i]);
        in_r[i] = RW'(RW'(T) % rate_in[i]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rate_q <= '0;
      stepq  <= '0;
      stepr  <= '0;
      done   <= '0;
      dlr    <= '0;
      elig   <= '0;
      dlq    <= '0;
      tt     <= '0;
    end else if (load) begin
      rate_q <= rate_in;
      stepq  <= in_q;
      stepr  <= in_r;
      done   <= '0;
      elig   <= '0;
      tt     <= '0;
      for (int i = 0; i < N; i++) begin
        dlq[i] <= CW'(in_q[i]);
        dlr[i] <= in_r[i];
      end
    end else begin
      if (tt != CW'(T)) tt <= tt + 1'b1;
      if (grant_valid) begin
        done[grant_idx] <= done[grant_idx] + 1'b1;
        elig[grant_idx] <= dl_ceil[grant_idx];
        // d += T/a : add quotient, add remainder with carry into q
        if ({1'b0, dlr[grant_idx]} + {1'b0, stepr[grant_idx]} >= {1'b0, rate_q[grant_idx]}) begin
          dlr[grant_idx] <= RW'({1'b0, dlr[grant_idx]} + {1'b0, stepr[grant_idx]} - {1'b0, rate_q[grant_idx]});
          dlq[grant_idx] <= dlq[grant_idx] + CW'(stepq[grant_idx]) + 1'b1;
        end else begin
          dlr[grant_idx] <= dlr[grant_idx] + stepr[grant_idx];
          dlq[grant_idx] <= dlq[grant_idx] + CW'(stepq[grant_idx]);
        end
      end
    end
  end

  // A grant never exceeds the flow's allocation for the period.
  a_within_rate: assert property (@(posedge clk) disable iff (!rst_n)
    grant_valid |-> done[grant_idx] < rate_q[grant_idx]);

endmodule
