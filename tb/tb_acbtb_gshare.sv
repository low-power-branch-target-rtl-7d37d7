// tb_acbtb_gshare: self-checking test of acbtb_gshare.
//
// Random lookups, pushes, in-order resolutions and flushes drive the
// predictor (10-bit history, 12-bit entry numbers so that folding matters,
// four records). A model keeps the counter table, the history and the queue
// of looked-up positions; every cycle the lookup result is compared with the
// model, and after every edge the model trains exactly as the predictor
// should. It also checks that a strongly biased branch is learnt, prints the
// result line and stops, with a watchdog.
module tb_acbtb_gshare;
  localparam int unsigned HIST_W = 10, IDX_W = 12, DEPTH = 4;

  logic             clk, rst_n;
  logic [IDX_W-1:0] lk_idx;
  logic             lk_taken, push, pop, res_taken, flush;

  acbtb_gshare #(.HIST_W(HIST_W), .IDX_W(IDX_W), .DEPTH(DEPTH)) dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [1:0] m_pht [1 << HIST_W];
  int         m_ghr;
  int         m_q [$];

  function automatic int pos(logic [IDX_W-1:0] v);
    int f = 0;
    for (int b = 0; b < IDX_W; b++) f ^= int'(v[b]) << (b % HIST_W);
    return f ^ m_ghr;
  endfunction

  task automatic step(logic [IDX_W-1:0] idx, logic p, logic q, logic t, logic f);
    int lp;
    lk_idx = idx; push = p; pop = q; res_taken = t; flush = f;
    #1;
    lp = pos(idx);
    check("lookup", lk_taken == m_pht[lp][1]);
    @(negedge clk);
    if (q && m_q.size() != 0) begin
      int u;
      u = m_q.pop_front();
      if (t && m_pht[u] != 2'b11) m_pht[u]++;
      if (!t && m_pht[u] != 2'b00) m_pht[u]--;
      m_ghr = ((m_ghr << 1) | int'(t)) & ((1 << HIST_W) - 1);
    end
    if (f) m_q.delete();
    else if (p && m_q.size() < DEPTH) m_q.push_back(lp);
  endtask

  initial begin
    #5000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst_n = 0; lk_idx = '0; push = 0; pop = 0; res_taken = 0; flush = 0;
    foreach (m_pht[i]) m_pht[i] = 2'b01;
    m_ghr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // random traffic
    for (int n = 0; n < 20000; n++) begin
      logic p, q;
      p = ($urandom_range(0, 2) != 0) && m_q.size() < DEPTH;
      q = ($urandom_range(0, 2) != 0) && m_q.size() != 0;
      step(IDX_W'($urandom_range(0, (1 << IDX_W) - 1)), p, q, 1'($urandom_range(0, 1)),
           $urandom_range(0, 30) == 0);
    end
    // one branch that is always taken: after a warm-up it is predicted taken
    for (int n = 0; n < 40; n++) begin
      step(IDX_W'(5), 1'b1, 1'b0, 1'b0, 1'b0);
      step(IDX_W'(5), 1'b0, 1'b1, 1'b1, 1'b0);
    end
    lk_idx = IDX_W'(5); push = 0; pop = 0; flush = 0; #1;
    check("always-taken branch learnt", lk_taken == 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
