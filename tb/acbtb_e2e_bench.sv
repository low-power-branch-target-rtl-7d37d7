// acbtb_e2e_bench: end-to-end stimulus and checker for acbtb_top, shared by
// the testbenches that instantiate the unit in different configurations.
//
// The bench holds a small program: the two-conditional loop of the classic
// example (B1..B6 with branch1, a jump, branch2 and the loop branch),
// extended with a direct call and return, an indirect jump to one of two
// switch cases, a chain of six short forward branches and an end-of-loop
// exit. Acting as the compiler, it computes from the program alone the
// distance and index of the next control instruction on both paths of every
// control instruction, and writes them, the targets and the types into two
// ACBTB tables and the IBIT (one switch case only; the other is released by
// writing IND and CNT before the jump). Acting as an in-order processor, it fetches one
// instruction per cycle with random bubbles, follows the unit's br_taken /
// br_target, resolves branches LAT cycles after fetch with random outcomes
// and random dynamic predictions, and flushes on a misprediction. In cycles
// where it offers no prediction (dp_valid low) the unit's own gshare
// predictor decides, and the bench checks it against a model of that
// predictor.
//
// On every fetch it checks br_valid, type, direction, target and index
// against the program, and that the table is read on exactly the fetches of
// control instructions. It counts how often each mechanism occurred
// (identification, decrement, misprediction restore, IBIT reload, software
// release of a waiting jump, staged software update, stall on full checkpoints, end of hot spot, re-enable by a late
// misprediction, table switch) and counts a failure for any that never did.
module acbtb_e2e_bench
  import acbtb_pkg::*;
#(
  parameter bit          NT_IMPLICIT = 1'b0,
  parameter int unsigned LAT         = 10,
  parameter int unsigned NITER       = 150,
  parameter int unsigned GH          = 10    // the unit's gshare history (0: none)
) (
  output logic                 clk,
  output logic                 rst_n,
  output logic                 fetch_valid,
  input  logic                 fetch_stall,
  output logic                 dp_valid,
  output logic                 dp_taken,
  input  logic                 br_valid,
  input  br_type_t             br_type,
  input  logic                 br_taken,
  input  logic [31:0]          br_target,
  input  logic [5:0]           br_idx,
  output logic                 res_valid,
  output logic                 res_taken,
  input  logic                 mispredict,
  output logic                 ijmp_valid,
  output logic [31:0]          ijmp_target,
  input  logic                 enabled,
  input  logic                 ind_wait,
  input  logic                 tbl_access,
  input  logic                 ibit_access,
  output logic                 sw_we,
  output logic [15:0]          sw_addr,
  output logic [31:0]          sw_wdata,
  input  logic [31:0]          sw_rdata,
  // test status, reported by the testbench that instantiates the bench
  output logic                 finished,
  output int                   checks,
  output int                   failures
);

  localparam int unsigned NW   = 48;       // program words
  localparam int unsigned BASE = 32'h1000; // byte address of word 0
  localparam int unsigned W_ENTRY = 3, W_S0 = 19, W_S1 = 22, W_EXIT = 39, W_OUT = 40;

  typedef enum logic [2:0] {K_PLAIN, K_COND, K_JUMP, K_CALL, K_RET, K_IJUMP, K_EXIT} kind_e;

  kind_e kind [NW];
  int    tgt  [NW];
  int    idx  [NW];
  logic  hint [NW];

  int n_ident = 0, n_dec = 0, n_misp = 0, n_ibit = 0, n_swrel = 0, n_full = 0;
  int n_gshare = 0;
  int n_exit = 0, n_reen = 0, n_tables = 0, n_cycles = 0, n_stage = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ------------------------------------------------------------------
  // Program
  // ------------------------------------------------------------------
  function automatic void put(int w, kind_e k, int t = -1, logic h = 1'b0);
    kind[w] = k; tgt[w] = t; hint[w] = h;
  endfunction

  function automatic logic is_ctrl(int w);
    return w < NW && kind[w] != K_PLAIN;
  endfunction

  function automatic void build();
    for (int w = 0; w < NW; w++) put(w, K_PLAIN);
    put(2,  K_RET,  17);        // return of function F (words 0..2)
    put(5,  K_COND, 9);         // branch1: taken to B3
    put(8,  K_JUMP, 11);        // jump at end of B2 to B4
    put(12, K_COND, 15);        // branch2: taken skips B5
    put(16, K_CALL, 0);         // call F
    put(18, K_IJUMP);           // switch: to S0 (19) or S1 (22)
    put(21, K_JUMP, 25);        // end of S0
    for (int k = 0; k < 6; k++) put(25 + 2 * k, K_COND, 27 + 2 * k);
    put(38, K_COND, W_ENTRY, 1'b1); // loop branch, static hint taken
    put(W_EXIT, K_EXIT);
    begin
      int n = 0;
      for (int w = 0; w < NW; w++) begin
        idx[w] = -1;
        if (is_ctrl(w)) begin idx[w] = n; n++; end
      end
    end
  endfunction

  // distance (plain words before the next control word) and its index
  function automatic int dist_from(int w);
    int d = 0;
    while (!is_ctrl(w)) begin d++; w++; end
    return d;
  endfunction

  function automatic int next_ctrl(int w);
    while (!is_ctrl(w)) w++;
    return w;
  endfunction

  // ------------------------------------------------------------------
  // Software bus
  // ------------------------------------------------------------------
  task automatic sw_wr(logic [15:0] a, logic [31:0] d);
    sw_we = 1; sw_addr = a; sw_wdata = d;
    @(negedge clk);
    sw_we = 0; sw_addr = '0; sw_wdata = '0;
  endtask

  function automatic logic [15:0] tbl_addr(int t, int e, tbl_field_e f);
    return {1'b0, 4'd0, 3'(t), 6'(e), f};
  endfunction

  function automatic logic [15:0] reg_addr(reg_sel_e r);
    return {2'b10, 12'd0, r};
  endfunction

  function automatic br_class_e cls_of(kind_e k);
    case (k)
      K_COND:  return BT_COND;
      K_JUMP:  return BT_JUMP;
      K_CALL:  return BT_CALL;
      K_RET:   return BT_RET;
      K_IJUMP: return BT_IJUMP;
      default: return BT_NONE;
    endcase
  endfunction

  task automatic program_table(int t);
    for (int w = 0; w < NW; w++) begin
      if (is_ctrl(w)) begin
        int e, ntd, nti, td, ti;
        e = idx[w];
        ntd = 0; nti = 0; td = 0; ti = 0;
        // the end marker has no successor inside the program
        if (kind[w] != K_EXIT) begin ntd = dist_from(w + 1); nti = idx[next_ctrl(w + 1)]; end
        if (tgt[w] >= 0) begin td = dist_from(tgt[w]); ti = idx[next_ctrl(tgt[w])]; end
        // with the implicit NT index the field must not matter
        if (NT_IMPLICIT) nti = 63 - nti;
        sw_wr(tbl_addr(t, e, FLD_NT), {10'd0, 6'(nti), 7'd0, 9'(ntd)});
        sw_wr(tbl_addr(t, e, FLD_T),  {10'd0, 6'(ti), 7'd0, 9'(td)});
        sw_wr(tbl_addr(t, e, FLD_TA), (tgt[w] >= 0) ? 32'((BASE >> 2) + tgt[w]) : 32'h0);
        sw_wr(tbl_addr(t, e, FLD_TYPE), {28'd0, hint[w], cls_of(kind[w])});
      end
    end
  endtask

  task automatic check_table(int t);
    for (int w = 0; w < NW; w++) if (is_ctrl(w) && tgt[w] >= 0) begin
      sw_addr = tbl_addr(t, idx[w], FLD_TA); #1;
      check("table read-back", sw_rdata == 32'((BASE >> 2) + tgt[w]));
    end
    sw_addr = '0;
  endtask

  // ------------------------------------------------------------------
  // Processor model
  // ------------------------------------------------------------------
  typedef struct {
    int   w;
    int   age;
    logic pred;
    logic tracked;
    int   gpos;      // gshare counter used for the prediction
  } inflight_t;

  // model of the unit's gshare predictor: counters indexed by entry number
  // XOR the history of resolved outcomes, trained at resolution
  logic [1:0] gs_pht [1 << ((GH > 0) ? GH : 1)];
  int         gs_ghr = 0;
  logic       gs_upd;
  int         gs_upd_pos;
  logic       gs_upd_taken;

  inflight_t pipe[$];
  int        pc;
  logic      fe_block;       // waiting for an indirect jump to resolve
  int        iter;
  logic      done;
  logic      sw_release_due; // IBIT missed: release by software
  int        rel_target;
  int        freeze;

  task automatic run_hot_spot(int t);
    int guard = 0;
    logic was_enabled;
    // enter: IND and CNT for the first control instruction, then enable
    sw_wr(reg_addr(REG_IND), 32'(idx[next_ctrl(W_ENTRY)]));
    sw_wr(reg_addr(REG_CNT), 32'(dist_from(W_ENTRY)));
    sw_wr(reg_addr(REG_CTRL), {16'd0, 8'(t), 8'd1});
    n_tables++;
    pc = W_ENTRY; fe_block = 0; iter = 0; done = 0; sw_release_due = 0; freeze = 0;
    pipe.delete();
    was_enabled = 1;
    while (!done && guard < 200000) begin
      logic misp_now, fetch_now, unblock;
      int   next_pc;
      guard++;
      n_cycles++;
      res_valid = 0; res_taken = 0; ijmp_valid = 0; ijmp_target = 0;
      fetch_valid = 0; dp_valid = 0; dp_taken = 0;
      misp_now = 0;
      unblock = 0;
      gs_upd = 0;
      next_pc = pc;
      foreach (pipe[i]) pipe[i].age++;
      // software update of IND then CNT for switch case S1, executed in
      // program order before the indirect jump: either released at once
      // (jump already waiting) or staged (jump not yet fetched)
      if (sw_release_due) begin
        if (ind_wait) n_swrel++; else n_stage++;
        sw_wr(reg_addr(REG_IND), 32'(idx[next_ctrl(rel_target)]));
        sw_wr(reg_addr(REG_CNT), 32'(dist_from(rel_target)));
        sw_release_due = 0;
        continue;
      end
      // resolution of the oldest instruction
      if (pipe.size() != 0 && pipe[0].age >= LAT) begin
        inflight_t r;
        r = pipe.pop_front();
        if (kind[r.w] == K_COND && r.tracked) begin
          logic actual;
          if (r.w == 38) actual = (iter < NITER - 1);
          else actual = 1'($urandom_range(0, 1));
          if (r.w == 38) iter++;
          res_valid = 1; res_taken = actual;
          gs_upd = 1; gs_upd_pos = r.gpos; gs_upd_taken = actual;
          if (actual != r.pred) begin
            misp_now = 1;
            pipe.delete();
            fe_block = 0;
            next_pc = actual ? tgt[r.w] : r.w + 1;
          end
          if (r.w == 38 && !actual) done = 1;
        end else if (r.w == 17) begin
          // the switch value is known here; S1 is not in the IBIT
          rel_target = ($urandom_range(0, 1) != 0) ? W_S1 : W_S0;
          if (rel_target == W_S1) sw_release_due = 1;
        end else if (kind[r.w] == K_IJUMP) begin
          ijmp_valid = 1; ijmp_target = BASE + 32'(rel_target) * 4;
          next_pc = rel_target;
          unblock = 1;   // fetch resumes at the destination next cycle
        end
      end
      // fetch
      if (freeze > 0) freeze--;
      fetch_now = !fe_block && !fetch_stall && freeze == 0 && ($urandom_range(0, 7) != 0);
      if (fetch_stall && !ind_wait) n_full++;
      fetch_valid = fetch_now || (misp_now && ($urandom_range(0, 1) != 0));
      dp_valid = 1'($urandom_range(0, 1)); dp_taken = 1'($urandom_range(0, 1));
      #1;
      check("mispredict flag", mispredict == misp_now);
      if (misp_now) n_misp++;
      if (ijmp_valid && ibit_access && rel_target == W_S0) n_ibit++;
      if (fetch_now && !misp_now) begin
        int w;
        logic exp_dir;
        w = pc;
        if (!enabled) begin
          check("no identification when off", !br_valid && !tbl_access);
        end else begin
          check("identified exactly at control instructions",
                br_valid == (is_ctrl(w) && kind[w] != K_EXIT));
          check("table read only for control instructions", tbl_access == is_ctrl(w));
          if (tbl_access) n_ident++; else n_dec++;
          if (is_ctrl(w) && kind[w] != K_EXIT) begin
            exp_dir = (kind[w] != K_COND) ? 1'b1 :
                      dp_valid ? dp_taken :
                      (GH > 0) ? gs_pht[idx[w] ^ gs_ghr][1] : hint[w];
            if (kind[w] == K_COND && !dp_valid && GH > 0) n_gshare++;
            check("type", br_type.cls == cls_of(kind[w]));
            check("direction", br_taken == exp_dir);
            check("index", br_idx == 6'(idx[w]));
            if (tgt[w] >= 0) check("target", br_target == BASE + 32'(tgt[w]) * 4);
          end
        end
        // next fetch address
        if (br_valid && br_taken) begin
          if (br_type.cls inside {BT_IJUMP, BT_ICALL}) fe_block = 1;
          else next_pc = (br_target - BASE) / 4;
        end else if (!br_valid && w >= W_EXIT) begin
          next_pc = (w + 1 < NW) ? w + 1 : W_OUT;
        end else begin
          next_pc = w + 1;
        end
        pipe.push_back('{w: w, age: 0, pred: br_valid ? br_taken : 1'b0, tracked: br_valid,
                         gpos: (GH > 0) ? (idx[w] ^ gs_ghr) : 0});
        // an instruction-memory miss after word 17 lets the software update
        // run before the indirect jump is fetched
        if (w == 17 && ($urandom_range(0, 1) != 0)) freeze = LAT + 4;
      end
      // the predictor trains at the clock edge, after this cycle's lookup
      if (gs_upd && GH > 0) begin
        if (gs_upd_taken && gs_pht[gs_upd_pos] != 2'b11) gs_pht[gs_upd_pos] = gs_pht[gs_upd_pos] + 2'b01;
        if (!gs_upd_taken && gs_pht[gs_upd_pos] != 2'b00) gs_pht[gs_upd_pos] = gs_pht[gs_upd_pos] - 2'b01;
        gs_ghr = ((gs_ghr << 1) | int'(gs_upd_taken)) & ((1 << GH) - 1);
      end
      @(negedge clk);
      if (was_enabled && !enabled) n_exit++;
      if (!was_enabled && enabled) n_reen++;
      was_enabled = enabled;
      pc = next_pc;
      if (unblock) fe_block = 0;
    end
    fetch_valid = 0; res_valid = 0; ijmp_valid = 0;
    check("loop completed", done);
    check("all iterations", iter == NITER);
    // drain: tracking ends at the exit entry
    repeat (LAT + 4) begin
      fetch_valid = 1;
      @(negedge clk);
      fetch_valid = 0;
    end
    check("switched off after hot spot", !enabled);
    pipe.delete();
  endtask


  initial begin
    finished = 0; checks = 0; failures = 0;
    rst_n = 0; fetch_valid = 0; dp_valid = 0; dp_taken = 0; res_valid = 0; res_taken = 0;
    ijmp_valid = 0; ijmp_target = 0; sw_we = 0; sw_addr = 0; sw_wdata = 0;
    build();
    foreach (gs_pht[i]) gs_pht[i] = 2'b01;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // before any hot spot: tracking off, fetches pass untouched
    repeat (5) begin
      fetch_valid = 1; #1;
      check("idle after reset", !enabled && !br_valid && !tbl_access && !fetch_stall);
      @(negedge clk);
    end
    fetch_valid = 0;
    // program two tables with the hot spot and table 0 with junk types
    for (int e = 0; e < 16; e++) sw_wr(tbl_addr(0, e, FLD_TYPE), 32'(BT_JUMP));
    program_table(1);
    program_table(3);
    check_table(3);
    // IBIT: only switch case S0 is present
    sw_wr({2'b11, 9'd0, 4'd2, 1'b1}, {10'd0, 6'(idx[next_ctrl(W_S0)]), 7'd0, 9'(dist_from(W_S0))});
    sw_wr({2'b11, 9'd0, 4'd2, 1'b0}, {1'b1, 1'b0, 30'((BASE >> 2) + W_S0)});
    run_hot_spot(1);
    run_hot_spot(3);
    check("identifications", n_ident > 0);
    check("decrements", n_dec > 0);
    check("misprediction restores", n_misp > 0);
    check("IBIT reloads", n_ibit > 0);
    check("software releases", n_swrel > 0);
    check("staged software updates", n_stage > 0);
    check("stalls on full checkpoints", n_full > 0);
    check("hot-spot exits", n_exit >= 2);
    check("re-enable by late misprediction", n_reen > 0);
    check("table switch", n_tables == 2);
    if (GH > 0) check("gshare predictions", n_gshare > 0);
    $display("mechanisms: ident=%0d dec=%0d mispredict=%0d ibit=%0d sw_release=%0d staged=%0d full_stall=%0d exit=%0d reenable=%0d tables=%0d gshare=%0d cycles=%0d",
             n_ident, n_dec, n_misp, n_ibit, n_swrel, n_stage, n_full, n_exit, n_reen, n_tables, n_gshare, n_cycles);
    finished = 1;
  end
endmodule
