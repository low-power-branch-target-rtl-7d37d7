// tb_acbtb_ibit: self-checking test of the indirect branch identification
// table. Entries are written with random unique destination tags and
// {IND, CNT} pairs, some left invalid; lookups of stored and absent
// destinations are compared with a model, as is software read-back.
module tb_acbtb_ibit;
  import acbtb_pkg::*;
  localparam int unsigned N = 16, TA_W = 30, DIST_W = 9, IDX_W = 6, EW = 4;
  logic                 clk = 1'b0, rst_n = 1'b0;
  logic                 lk_en, lk_hit, sw_we, sw_field;
  logic [TA_W-1:0]      lk_addr;
  logic [DIST_W-1:0]    lk_cnt;
  logic [IDX_W-1:0]     lk_ind;
  logic [EW-1:0]        sw_entry;
  logic [SW_DATA_W-1:0] sw_wdata, sw_rdata;
  int checks = 0, failures = 0;
  logic [TA_W-1:0]   m_tag [N];
  logic              m_v   [N];
  logic [DIST_W-1:0] m_cnt [N];
  logic [IDX_W-1:0]  m_ind [N];

  acbtb_ibit #(.IBIT_ENTRIES(N), .TA_W(TA_W), .DIST_W(DIST_W), .IDX_W(IDX_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(int e, logic f, logic [31:0] d);
    sw_we = 1; sw_entry = EW'(e); sw_field = f; sw_wdata = d;
    @(negedge clk);
    sw_we = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lk_en = 0; lk_addr = 0; sw_we = 0; sw_entry = 0; sw_field = 0; sw_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // after reset nothing hits
    lk_en = 1; lk_addr = 30'h100; #1 check("empty miss", !lk_hit);
    lk_en = 0;
    for (int e = 0; e < N; e++) begin
      m_tag[e] = TA_W'(32'h1000 + e * 37);
      m_v[e]   = (e % 5) != 3;
      m_cnt[e] = DIST_W'($urandom);
      m_ind[e] = IDX_W'($urandom);
      wr(e, 1'b1, {10'd0, m_ind[e], 7'd0, m_cnt[e]});
      wr(e, 1'b0, {m_v[e], 1'b0, m_tag[e]});
    end
    for (int e = 0; e < N; e++) begin
      sw_entry = EW'(e);
      sw_field = 0; #1 check("rb tag", sw_rdata == {m_v[e], 1'b0, m_tag[e]});
      sw_field = 1; #1 check("rb data", sw_rdata == {10'd0, m_ind[e], 7'd0, m_cnt[e]});
    end
    for (int n = 0; n < 1000; n++) begin
      int e;
      e = $urandom_range(0, N - 1);
      lk_en = $urandom_range(0, 3) != 0;
      lk_addr = ($urandom_range(0, 3) == 0) ? TA_W'(32'h20000 + n) : m_tag[e];
      #1;
      if (lk_en && lk_addr == m_tag[e] && m_v[e])
        check("hit", lk_hit && lk_cnt == m_cnt[e] && lk_ind == m_ind[e]);
      else
        check("miss", !lk_hit && lk_cnt == 0 && lk_ind == 0);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
