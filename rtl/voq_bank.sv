// voq_bank: the N virtual output queues VOQ(i,0..N-1) of one input port.
//
// Arriving cells (at most one per slot) are appended to the queue of their
// destination output. Each slot the input scheduler SI_i may serve one queue,
// chosen by rate alone; if that queue holds a cell its head cell leaves
// (an effective service), otherwise the service is ineffective and nothing
// leaves. A cell that arrives in a slot can be served from the next slot on.
// The queues share one cell memory organised as N ring buffers of DEPTH cells;
// an arrival to a full queue is dropped and counted on `drop`.
//
// Interface: one clock = one slot. `in_valid/in_dst/in_cell` is the arrival,
// `serve/serve_idx` the scheduler's service, `out_valid/out_cell` the cell
// leaving (combinational), `occ` the per-queue backlog at the start of the
// slot. Synchronous active-low reset empties all queues.
//
// The queue organisation and depth are this design's choices; the published scheme
// only requires one FIFO per input-output pair.
module voq_bank #(
  parameter int unsigned N      = sbux_pkg::N_DEF,
  parameter int unsigned DEPTH  = sbux_pkg::VOQ_DEPTH_DEF,
  parameter int unsigned W      = sbux_pkg::CELL_W_DEF,
  localparam int unsigned IW    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned PW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned OW    = $clog2(DEPTH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [IW-1:0]        in_dst,
  input  logic [W-1:0]         in_cell,
  input  logic                 serve,
  input  logic [IW-1:0]        serve_idx,
  output logic                 out_valid,
  output logic [W-1:0]         out_cell,
  output logic [N-1:0][OW-1:0] occ,
  output logic                 drop
);

  logic [W-1:0]         mem [N][DEPTH];
  logic [N-1:0][PW-1:0] hd, tl;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  logic enq;
  assign out_valid = serve && (occ[serve_idx] != '0);
  assign out_cell  = mem[serve_idx][hd[serve_idx]];
  assign enq       = in_valid && (occ[in_dst] != OW'(DEPTH) || (out_valid && serve_idx == in_dst));
  assign drop      = in_valid && !enq;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hd  <= '0;
      tl  <= '0;
      occ <= '0;
    end else begin
      if (enq) begin
        mem[in_dst][tl[in_dst]] <= in_cell;
        tl[in_dst] <= inc(tl[in_dst]);
      end
      if (out_valid) hd[serve_idx] <= inc(hd[serve_idx]);
      for (int k = 0; k < N; k++)
        occ[k] <= occ[k] + OW'(enq && in_dst == IW'(k)) - OW'(out_valid && serve_idx == IW'(k));
    end
  end

endmodule
