// xpb: crosspoint buffer XPB(i,j) of the buffered crossbar.
//
// A small FIFO between input scheduler SI_i and output scheduler SO_j. There
// is no credit-based flow control: the input side pushes whenever SI_i serves
// this crosspoint and a cell actually arrives, and the output side pops
// whenever SO_j serves it. A service to an empty buffer is "ineffective"
// (flagged on `ineff`). Within a slot the push is ordered before the pop, so a
// cell pushed into an empty buffer leaves in the same slot (cut-through); this
// ordering reproduces the worked timing example of the design. With rate-based
// smoothed schedulers on both sides the occupancy never exceeds two cells, so
// DEPTH defaults to 2. A push into a full buffer that is not popped in the
// same slot drops the cell and sets the sticky `overflow` flag.
//
// Interface: one clock = one slot. `push`/`push_data` is the arriving cell,
// `pop` the output service; `pop_valid`/`pop_data` (combinational) is the
// departing cell. `occ` is the occupancy after the slot's push, before its
// pop, as seen by the output scheduler. Synchronous active-low reset empties
// the buffer.
module xpb #(
  parameter int unsigned DEPTH = sbux_pkg::XPB_DEPTH_DEF,
  parameter int unsigned W     = sbux_pkg::CELL_W_DEF,
  localparam int unsigned OW   = $clog2(DEPTH + 1),
  localparam int unsigned PW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [W-1:0]  push_data,
  input  logic          pop,
  output logic          pop_valid,
  output logic [W-1:0]  pop_data,
  output logic          ineff,
  output logic [OW-1:0] occ,
  output logic          overflow
);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] rd, wr;
  logic [OW-1:0] cnt;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign occ       = cnt + OW'(push);
  assign pop_valid = pop && (occ != '0);
  assign pop_data  = (cnt == '0) ? push_data : mem[rd];
  assign ineff     = pop && (occ == '0);

  logic store;  // pushed cell must be written to memory
  assign store = push && !(pop_valid && cnt == '0) && (cnt != OW'(DEPTH) || pop_valid);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd       <= '0;
      wr       <= '0;
      cnt      <= '0;
      overflow <= 1'b0;
    end else begin
      if (store) begin
        mem[wr] <= push_data;
        wr      <= inc(wr);
      end
      if (pop_valid && cnt != '0) rd <= inc(rd);
      if (push && cnt == OW'(DEPTH) && !pop_valid) overflow <= 1'b1;
      cnt <= cnt + OW'(store) - OW'(pop_valid && cnt != '0);
    end
  end

endmodule
