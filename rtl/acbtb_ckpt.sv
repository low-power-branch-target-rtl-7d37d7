// acbtb_ckpt: misprediction recovery store for in-flight conditional
// branches.
//
// When a conditional branch is identified, CNT and IND are loaded for the
// predicted path and then count the instructions fetched down that path. If
// the prediction proves wrong, the instructions fetched after the branch are
// flushed and must not count. This FIFO keeps, for each conditional branch
// between identification and resolution, the predicted direction and the
// distance and index of the other path (read from the same ACBTB access, so
// the table is still read only once per branch). Branches resolve in program
// order: pop takes the oldest record. On a misprediction the control logic
// loads CNT and IND from the popped record and asserts flush, which empties
// the FIFO, since every younger record belongs to the wrong path.
//
// Interface: push with push_* data; pop removes the head; flush empties
// (a push in the same cycle is dropped). head_* show the oldest record while
// !empty. count and full report occupancy; a push while full and not popping
// is dropped, and the control logic stalls fetch to prevent it.
//
// The document states only that misfetched and flushed instructions must be
// accounted for; this structure and its depth are this design's choices.
module acbtb_ckpt #(
  parameter int unsigned DEPTH  = 4,
  parameter int unsigned DIST_W = 9,
  parameter int unsigned IDX_W  = 6,
  localparam int unsigned CNT_W = $clog2(DEPTH + 1),
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              push,
  input  logic              push_taken,
  input  logic [DIST_W-1:0] push_alt_d,
  input  logic [IDX_W-1:0]  push_alt_i,
  input  logic              pop,
  input  logic              flush,
  output logic              head_taken,
  output logic [DIST_W-1:0] head_alt_d,
  output logic [IDX_W-1:0]  head_alt_i,
  output logic              empty,
  output logic              full,
  output logic [CNT_W-1:0]  count
);

  typedef struct packed {
    logic              taken;
    logic [DIST_W-1:0] alt_d;
    logic [IDX_W-1:0]  alt_i;
  } rec_t;

  rec_t             mem [DEPTH];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;

  assign empty = (count == '0);
  assign full  = (32'(count) == DEPTH);

  logic do_pop, do_push;
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop) && !flush;

  function automatic logic [PTR_W-1:0] inc(logic [PTR_W-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else if (flush) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      if (do_push) wr_ptr <= inc(wr_ptr);
      count <= count + CNT_W'(do_push) - CNT_W'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= '{taken: push_taken, alt_d: push_alt_d, alt_i: push_alt_i};
  end

  assign head_taken = mem[rd_ptr].taken;
  assign head_alt_d = mem[rd_ptr].alt_d;
  assign head_alt_i = mem[rd_ptr].alt_i;

  // A resolution must always find its branch recorded.
  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("acbtb_ckpt: resolution with no recorded branch");

endmodule
