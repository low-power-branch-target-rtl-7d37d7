// acbtb_wl_bench: workload stimulus and checker for acbtb_top.
//
// For each benchmark of one set it builds synthetic hot spots with the
// benchmark's published shape: per hot spot, the number of conditional
// branches, direct jumps and indirect jumps, and basic blocks whose mean
// length follows the benchmark's instructions-per-branch figure (gsm encode
// also gets one block of 300 instructions). Each hot spot is a loop: every
// branch and jump goes forward to a random later instruction, each indirect
// jump has two random forward destinations, and the last conditional branch
// closes the loop. The bench computes every table entry from the layout,
// loads hot spot h into table h, loads the first 16 indirect destinations of
// the hot spot into the IBIT and releases the others by software stores of
// IND and CNT made before the jump. It then runs every hot spot NITER times
// through an in-order processor model. Direction predictions are right with
// the benchmark's published prediction accuracy.
//
// On every fetch it checks the branch flag, type, direction, target and
// index against the program, and that the table is read exactly on control
// instructions. Per benchmark it prints fetches, table reads and their
// ratio: a PC-indexed BTB would be read on every fetch. It also runs a
// behavioural model of a conventional set-associative BTB (128 and 64
// entries, four- and eight-way, LRU) on the same branches and prints its hit
// ratio next to the ACBTB's complete identification.
//
// SET 0 holds the benchmarks whose hot spots fit 64-entry tables; SET 1 the
// larger ones, run with a larger ENTRIES.
module acbtb_wl_bench
  import acbtb_pkg::*;
#(
  parameter int unsigned SET   = 0,
  parameter int unsigned IDX_W = 6,
  parameter int unsigned NITER = 20,
  parameter int unsigned LAT   = 10
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
  input  logic [IDX_W-1:0]     br_idx,
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

  localparam int unsigned NW   = 16384;
  localparam int unsigned BASE = 32'h0001_0000;
  localparam int unsigned IBIT_N = 16;

  typedef enum logic [2:0] {K_PLAIN, K_COND, K_JUMP, K_IJUMP, K_EXIT} kind_e;

  // benchmark shapes: hot spots with conditional / direct / indirect counts
  typedef struct {
    string name;
    int    nhs;
    int    nc [5];
    int    nj [5];
    int    ni [5];
    real   ipb;
    real   dir;
    int    big;   // length of one extra-long block in hot spot 0, or 0
  } bench_t;

  bench_t benches[$];

  kind_e kind [NW];
  int    tgt  [NW];
  int    idx  [NW];
  int    dst0 [NW];
  int    dst1 [NW];
  int    hs_entry [5], hs_loop [5], hs_first [5], hs_last [5];
  bit    in_ibit [int];


  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic is_ctrl(int w);
    return kind[w] != K_PLAIN;
  endfunction

  function automatic int dist_from(int w);
    int d = 0;
    while (!is_ctrl(w)) begin d++; w++; end
    return d;
  endfunction

  function automatic int next_ctrl(int w);
    while (!is_ctrl(w)) w++;
    return w;
  endfunction

  function automatic br_class_e cls_of(kind_e k);
    case (k)
      K_COND:  return BT_COND;
      K_JUMP:  return BT_JUMP;
      K_IJUMP: return BT_IJUMP;
      default: return BT_NONE;
    endcase
  endfunction

  // a random later word that is not an indirect jump, so every indirect
  // jump is reached through the plain word in front of it
  function automatic int fwd(int x, int last);
    int t = $urandom_range(x + 1, last);
    return (kind[t] == K_IJUMP) ? t - 1 : t;
  endfunction

  // ------------------------------------------------------------------
  // Program generation
  // ------------------------------------------------------------------
  task automatic gen(bench_t b);
    int w = 0;
    for (int i = 0; i < NW; i++) begin
      kind[i] = K_PLAIN; tgt[i] = -1; idx[i] = -1; dst0[i] = -1; dst1[i] = -1;
    end
    for (int h = 0; h < b.nhs; h++) begin
      kind_e slots[$];
      int    c, maxl, n;
      for (int k = 0; k < b.nc[h] - 1; k++) slots.push_back(K_COND);
      for (int k = 0; k < b.nj[h]; k++) slots.push_back(K_JUMP);
      for (int k = 0; k < b.ni[h]; k++) slots.push_back(K_IJUMP);
      slots.shuffle();
      slots.push_back(K_COND);            // loop branch last
      c = slots.size();
      maxl = int'(2.0 * (b.ipb - 1.0));
      hs_entry[h] = w;
      hs_first[h] = w;
      n = 0;
      for (int k = 0; k < c; k++) begin
        int len;
        len = (h == 0 && k == 0 && b.big > 0) ? b.big : $urandom_range(0, maxl);
        if (slots[k] == K_IJUMP && len == 0) len = 1;
        w += len;
        kind[w] = slots[k];
        idx[w] = n; n++;
        w++;
      end
      hs_loop[h] = w - 1;
      kind[w] = K_EXIT; idx[w] = n;
      hs_last[h] = w;
      w += 4;
      // forward targets
      for (int x = hs_first[h]; x < hs_loop[h]; x++) begin
        if (kind[x] == K_COND || kind[x] == K_JUMP) tgt[x] = fwd(x, hs_loop[h]);
        if (kind[x] == K_IJUMP) begin
          dst0[x] = fwd(x, hs_loop[h]);
          dst1[x] = fwd(x, hs_loop[h]);
        end
      end
      tgt[hs_loop[h]] = hs_entry[h];
    end
    check("program fits the model", w < NW);
  endtask

  // ------------------------------------------------------------------
  // Software
  // ------------------------------------------------------------------
  task automatic sw_wr(logic [15:0] a, logic [31:0] d);
    sw_we = 1; sw_addr = a; sw_wdata = d;
    @(negedge clk);
    sw_we = 0; sw_addr = '0; sw_wdata = '0;
  endtask

  function automatic logic [15:0] tbl_addr(int t, int e, tbl_field_e f);
    return 16'({3'(t), IDX_W'(e), f});
  endfunction

  function automatic logic [15:0] reg_addr(reg_sel_e r);
    return {2'b10, 12'd0, r};
  endfunction

  function automatic logic [15:0] ibit_addr(int e, logic f);
    return {2'b11, 9'd0, 4'(e), f};
  endfunction

  task automatic program_table(int h);
    for (int w = hs_first[h]; w <= hs_last[h]; w++) if (is_ctrl(w)) begin
      int ntd, nti, td, ti;
      ntd = 0; nti = 0; td = 0; ti = 0;
      if (kind[w] != K_EXIT) begin
        ntd = dist_from(w + 1); nti = idx[next_ctrl(w + 1)];
      end
      if (tgt[w] >= 0) begin td = dist_from(tgt[w]); ti = idx[next_ctrl(tgt[w])]; end
      sw_wr(tbl_addr(h, idx[w], FLD_NT), {6'd0, 10'(nti), 7'd0, 9'(ntd)});
      sw_wr(tbl_addr(h, idx[w], FLD_T),  {6'd0, 10'(ti), 7'd0, 9'(td)});
      sw_wr(tbl_addr(h, idx[w], FLD_TA), (tgt[w] >= 0) ? 32'((BASE >> 2) + tgt[w]) : 32'h0);
      sw_wr(tbl_addr(h, idx[w], FLD_TYPE), {28'd0, (w == hs_loop[h]), cls_of(kind[w])});
    end
  endtask

  task automatic program_ibit(int h);
    int e = 0;
    in_ibit.delete();
    for (int w = hs_first[h]; w <= hs_last[h]; w++) if (kind[w] == K_IJUMP) begin
      int d[2];
      d[0] = dst0[w]; d[1] = dst1[w];
      foreach (d[j]) if (e < IBIT_N && !in_ibit.exists(d[j])) begin
        sw_wr(ibit_addr(e, 1'b1), {6'd0, 10'(idx[next_ctrl(d[j])]), 7'd0, 9'(dist_from(d[j]))});
        sw_wr(ibit_addr(e, 1'b0), {1'b1, 1'b0, 30'((BASE >> 2) + d[j])});
        in_ibit[d[j]] = 1;
        e++;
      end
    end
    for (; e < IBIT_N; e++) sw_wr(ibit_addr(e, 1'b0), 32'd0);
  endtask

  // ------------------------------------------------------------------
  // Processor model
  // ------------------------------------------------------------------
  typedef struct {
    int   w;
    int   age;
    logic pred;
    logic actual;
    logic live;
    logic tracked;
  } inflight_t;

  int n_fetch, n_reads, n_misp, n_cycles, n_stage, n_release, n_ibit;

  // For comparison, a conventional PC-indexed BTB (set-associative, LRU,
  // allocate on miss) sees the same control instructions: the four
  // organisations are 128 and 64 entries, each four- and eight-way. Its hit
  // ratio shows how many branches a BTB of that size would fail to identify;
  // the ACBTB identifies all of them.
  localparam int NCFG = 4;
  localparam int CFG_ENTRIES [NCFG] = '{128, 128, 64, 64};
  localparam int CFG_WAYS    [NCFG] = '{4, 8, 4, 8};
  int btb_tag [NCFG][128];
  int btb_age [NCFG][128];
  int btb_hits [NCFG];
  int btb_looks, btb_time;

  task automatic btb_clear();
    for (int c = 0; c < NCFG; c++) begin
      btb_hits[c] = 0;
      for (int e = 0; e < 128; e++) begin btb_tag[c][e] = -1; btb_age[c][e] = 0; end
    end
    btb_looks = 0; btb_time = 0;
  endtask

  task automatic btb_access(int w);
    btb_looks++;
    btb_time++;
    for (int c = 0; c < NCFG; c++) begin
      int sets, set, hit, victim;
      sets = CFG_ENTRIES[c] / CFG_WAYS[c];
      set = w % sets;
      hit = -1; victim = set * CFG_WAYS[c];
      for (int k = 0; k < CFG_WAYS[c]; k++) begin
        int e = set * CFG_WAYS[c] + k;
        if (btb_tag[c][e] == w) hit = e;
        if (btb_age[c][e] < btb_age[c][victim]) victim = e;
      end
      if (hit >= 0) begin
        btb_hits[c]++;
        btb_age[c][hit] = btb_time;
      end else begin
        btb_tag[c][victim] = w;
        btb_age[c][victim] = btb_time;
      end
    end
  endtask

  task automatic run_hot_spot(int h, real dir_acc);
    inflight_t pipe[$];
    int   pc, iter, guard, rel_target, freeze;
    logic fe_block, done, sw_due, model_en;
    sw_wr(reg_addr(REG_IND), 32'(idx[next_ctrl(hs_entry[h])]));
    sw_wr(reg_addr(REG_CNT), 32'(dist_from(hs_entry[h])));
    sw_wr(reg_addr(REG_CTRL), {16'd0, 8'(h), 8'd1});
    pc = hs_entry[h]; iter = 0; guard = 0; fe_block = 0; done = 0; sw_due = 0;
    freeze = 0; rel_target = 0; model_en = 1;
    // after the loop exits, fetch on until the end marker has switched the
    // unit off (it is fetched late when the exit was mispredicted)
    while (!(done && !model_en) && guard < 2000000) begin
      logic misp_now, fetch_now, unblock;
      int   next_pc;
      guard++;
      n_cycles++;
      res_valid = 0; res_taken = 0; ijmp_valid = 0; ijmp_target = 0;
      fetch_valid = 0; dp_valid = 0; dp_taken = 0;
      misp_now = 0; unblock = 0;
      next_pc = pc;
      foreach (pipe[i]) pipe[i].age++;
      if (sw_due) begin
        if (ind_wait) n_release++; else n_stage++;
        sw_wr(reg_addr(REG_IND), 32'(idx[next_ctrl(rel_target)]));
        sw_wr(reg_addr(REG_CNT), 32'(dist_from(rel_target)));
        sw_due = 0;
        continue;
      end
      if (pipe.size() != 0 && pipe[0].age >= LAT) begin
        inflight_t r;
        r = pipe.pop_front();
        if (!r.live) begin
          // fetched while the unit was off on a wrong path: nothing to do
        end else if (kind[r.w] == K_COND && r.tracked) begin
          logic actual;
          if (r.w == hs_loop[h]) begin
            actual = (iter < NITER - 1);
            iter++;
          end else actual = r.actual;
          res_valid = 1; res_taken = actual;
          if (actual != r.pred) begin
            misp_now = 1;
            pipe.delete();
            fe_block = 0;
            next_pc = actual ? tgt[r.w] : r.w + 1;
            model_en = 1;
          end
          if (r.w == hs_loop[h] && !actual) done = 1;
        end else if (kind[r.w + 1] == K_IJUMP && kind[r.w] == K_PLAIN) begin
          rel_target = ($urandom_range(0, 1) != 0) ? dst1[r.w + 1] : dst0[r.w + 1];
          if (!in_ibit.exists(rel_target)) sw_due = 1;
        end else if (kind[r.w] == K_IJUMP) begin
          ijmp_valid = 1; ijmp_target = BASE + 32'(rel_target) * 4;
          next_pc = rel_target;
          unblock = 1;
          if (!sw_due && in_ibit.exists(rel_target)) n_ibit++;
        end
      end
      if (freeze > 0) freeze--;
      fetch_now = !fe_block && !fetch_stall && freeze == 0 && ($urandom_range(0, 7) != 0);
      fetch_valid = fetch_now || (misp_now && ($urandom_range(0, 1) != 0));
      // a predictor that is right with the benchmark's accuracy
      begin
        logic act_f, right;
        act_f = 1'($urandom_range(0, 1));
        right = ($urandom_range(0, 9999) < int'(dir_acc * 100.0));
        dp_valid = 1;
        if (pc == hs_loop[h]) dp_taken = right;
        else dp_taken = right ? act_f : !act_f;
        #1;
        check("mispredict flag", mispredict == misp_now);
        if (misp_now) n_misp++;
        if (fetch_now && !misp_now) begin
          int w;
          w = pc;
          check("enable state", enabled == model_en);
          check("identified exactly at control instructions",
                br_valid == (model_en && is_ctrl(w) && kind[w] != K_EXIT));
          check("table read only for control instructions", tbl_access == (model_en && is_ctrl(w)));
          n_fetch++;
          if (tbl_access) n_reads++;
          if (model_en && is_ctrl(w) && kind[w] != K_EXIT) begin
            btb_access(w);
            check("type", br_type.cls == cls_of(kind[w]));
            check("direction", br_taken == ((kind[w] == K_COND) ? dp_taken : 1'b1));
            check("index", br_idx == IDX_W'(idx[w]));
            if (tgt[w] >= 0) check("target", br_target == BASE + 32'(tgt[w]) * 4);
          end
          if (br_valid && br_taken) begin
            if (br_type.cls == BT_IJUMP) fe_block = 1;
            else next_pc = (br_target - BASE) / 4;
          end else begin
            next_pc = w + 1;
          end
          pipe.push_back('{w: w, age: 0, pred: br_valid ? br_taken : 1'b0,
                           actual: (dp_taken == right), live: model_en, tracked: br_valid});
          if (model_en && kind[w + 1] == K_IJUMP && ($urandom_range(0, 1) != 0)) freeze = LAT + 4;
          // a wrong-path fetch of the end marker switches the unit off
          // until the misprediction restores it
          if (model_en && kind[w] == K_EXIT) model_en = 0;
        end
      end
      @(negedge clk);
      pc = next_pc;
      if (unblock) fe_block = 0;
    end
    fetch_valid = 0; res_valid = 0; ijmp_valid = 0; dp_valid = 0;
    check("hot spot completed", done && iter == NITER);
    repeat (LAT + 4) @(negedge clk);
    check("switched off after hot spot", !enabled);
  endtask

  function automatic bench_t mk(string n, int nhs, int c[5], int j[5], int i[5],
                                real ipb, real dir, int big);
    bench_t b;
    b.name = n; b.nhs = nhs; b.nc = c; b.nj = j; b.ni = i; b.ipb = ipb; b.dir = dir; b.big = big;
    return b;
  endfunction


  initial begin
    finished = 0; checks = 0; failures = 0;
    rst_n = 0; fetch_valid = 0; dp_valid = 0; dp_taken = 0; res_valid = 0; res_taken = 0;
    ijmp_valid = 0; ijmp_target = 0; sw_we = 0; sw_addr = 0; sw_wdata = 0;
    // shapes: hot spots and branch counts per hot spot, instructions per
    // branch, direction prediction accuracy (percent)
    if (SET == 0) begin
      benches.push_back(mk("adp_e",  1, '{14,0,0,0,0},  '{3,0,0,0,0},  '{0,0,0,0,0}, 3.49, 79.14, 0));
      benches.push_back(mk("adp_d",  1, '{11,0,0,0,0},  '{2,0,0,0,0},  '{0,0,0,0,0}, 4.55, 87.92, 0));
      benches.push_back(mk("g721_e", 3, '{7,43,8,0,0},  '{4,15,2,0,0}, '{0,0,0,0,0}, 4.48, 89.88, 0));
      benches.push_back(mk("g721_d", 2, '{7,43,0,0,0},  '{4,17,0,0,0}, '{0,0,0,0,0}, 4.35, 91.91, 0));
      benches.push_back(mk("gsm_e",  5, '{22,5,3,9,22}, '{7,0,1,3,4},  '{0,0,0,0,0}, 4.0, 92.41, 300));
      benches.push_back(mk("gsm_d",  2, '{8,4,0,0,0},   '{3,0,0,0,0},  '{0,0,0,0,0}, 5.75, 98.30, 0));
    end else begin
      benches.push_back(mk("epic", 1, '{97,0,0,0,0},         '{15,0,0,0,0},          '{14,0,0,0,0},       6.79, 94.96, 0));
      benches.push_back(mk("jpeg", 2, '{74,514,0,0,0},       '{10,122,0,0,0},        '{12,79,0,0,0},      6.80, 93.79, 0));
      benches.push_back(mk("mp3",  5, '{275,335,32,68,321},  '{86,119,15,33,143},    '{20,49,8,10,48},    8.88, 94.11, 0));
      benches.push_back(mk("mpeg", 3, '{172,20,32,0,0},      '{68,6,7,0,0},          '{15,2,4,0,0},       5.87, 80.76, 0));
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (benches[bi]) begin
      bench_t b;
      b = benches[bi];
      btb_clear();
      n_fetch = 0; n_reads = 0; n_misp = 0; n_cycles = 0; n_stage = 0; n_release = 0; n_ibit = 0;
      gen(b);
      sw_wr(reg_addr(REG_CTRL), 32'd0);
      for (int h = 0; h < b.nhs; h++) program_table(h);
      for (int h = 0; h < b.nhs; h++) begin
        program_ibit(h);
        run_hot_spot(h, b.dir);
      end
      check("table reads happened", n_reads > 0);
      if (b.ni.sum() > 0) check("indirect jumps were followed", n_ibit + n_release + n_stage > 0);
      $display("workload %-7s conventional BTB hit ratio over %0d branches: 128x4 %0.1f%%, 128x8 %0.1f%%, 64x4 %0.1f%%, 64x8 %0.1f%% (ACBTB 100%%)",
               b.name, btb_looks, 100.0 * btb_hits[0] / btb_looks, 100.0 * btb_hits[1] / btb_looks,
               100.0 * btb_hits[2] / btb_looks, 100.0 * btb_hits[3] / btb_looks);
      $display("workload %-7s hot_spots=%0d fetches=%0d acbtb_reads=%0d reads_per_fetch=%0.3f mispredicts=%0d ibit_reloads=%0d sw_release=%0d sw_staged=%0d cycles=%0d",
               b.name, b.nhs, n_fetch, n_reads, real'(n_reads) / real'(n_fetch), n_misp,
               n_ibit, n_release, n_stage, n_cycles);
    end
    finished = 1;
  end
endmodule
