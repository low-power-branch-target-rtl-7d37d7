// acbtb_gshare: gshare direction predictor for the conditional branches the
// ACBTB identifies.
//
// A pattern history table of 2**HIST_W two-bit saturating counters is
// indexed by the branch's address XOR a global history register of the last
// HIST_W resolved outcomes. The ACBTB core has no fetch PC, so the branch's
// entry number in the active table (IND at identification), zero-extended
// or folded to HIST_W bits, stands in for the address: within a hot spot it
// names each branch uniquely.
//
// Interface and timing: lk_idx is looked up combinationally and lk_taken
// (counter MSB) is valid in the same cycle. A push stores the index that was
// used in an in-order FIFO of DEPTH records, the same order in which the
// checkpoint FIFO records conditional branches. On pop, res_taken trains the
// oldest record's counter and is shifted into the history. flush empties the
// FIFO (after a misprediction the younger records are wrong-path branches);
// a pop in the same cycle is still applied. Counters reset to weakly
// not-taken and the history to zero.
//
// The gshare scheme with a ten-bit global history follows the document's
// evaluation set-up. Indexing by table entry, updating the history only at
// resolution (no speculative history) and the reset values are this design's
// choices.
module acbtb_gshare #(
  parameter int unsigned HIST_W = 10,
  parameter int unsigned IDX_W  = 6,
  parameter int unsigned DEPTH  = 4,
  localparam int unsigned PW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup, in the identification cycle
  input  logic [IDX_W-1:0]  lk_idx,
  output logic              lk_taken,
  input  logic              push,
  // resolution, in program order
  input  logic              pop,
  input  logic              res_taken,
  input  logic              flush
);

  localparam int unsigned N = 1 << HIST_W;

  logic [1:0]        pht [N];
  logic [HIST_W-1:0] ghr;
  logic [HIST_W-1:0] rec [DEPTH];
  logic [PW-1:0]     rd_p, wr_p;
  logic [PW:0]       cnt;

  // the entry number folded onto HIST_W bits
  function automatic logic [HIST_W-1:0] fold(logic [IDX_W-1:0] v);
    logic [HIST_W-1:0] f = '0;
    for (int b = 0; b < IDX_W; b++) f[b % HIST_W] ^= v[b];
    return f;
  endfunction

  logic [HIST_W-1:0] lk_pos;
  assign lk_pos   = fold(lk_idx) ^ ghr;
  assign lk_taken = pht[lk_pos][1];

  logic [HIST_W-1:0] up_pos;
  assign up_pos = rec[rd_p];

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) pht[i] <= 2'b01;
      ghr  <= '0;
      rd_p <= '0;
      wr_p <= '0;
      cnt  <= '0;
    end else begin
      if (pop && cnt != 0) begin
        if (res_taken && pht[up_pos] != 2'b11) pht[up_pos] <= pht[up_pos] + 2'b01;
        if (!res_taken && pht[up_pos] != 2'b00) pht[up_pos] <= pht[up_pos] - 2'b01;
        ghr <= {ghr[HIST_W-2:0], res_taken};
      end
      if (flush) begin
        rd_p <= '0;
        wr_p <= '0;
        cnt  <= '0;
      end else begin
        if (push && cnt != (PW + 1)'(DEPTH)) begin
          rec[wr_p] <= lk_pos;
          wr_p      <= inc(wr_p);
        end
        if (pop && cnt != 0) rd_p <= inc(rd_p);
        cnt <= cnt + (PW + 1)'(push && cnt != (PW + 1)'(DEPTH))
                   - (PW + 1)'(pop && cnt != 0);
      end
    end
  end

  initial begin
    assert (HIST_W >= 2 && HIST_W <= 16)
      else $fatal(1, "acbtb_gshare: HIST_W must be 2..16");
  end

endmodule
