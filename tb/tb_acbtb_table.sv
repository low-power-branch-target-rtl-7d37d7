// tb_acbtb_table: self-checking test of the ACBTB storage. Every entry of
// every table is written field group by field group with random contents
// kept in a reference copy, then read back through the software port and
// through the fetch read port (for the active table and index), including a
// check that the read port outputs zero when not enabled and that table
// numbers beyond NUM_TABLES are ignored.
module tb_acbtb_table;
  import acbtb_pkg::*;
  localparam int unsigned NUM_TABLES = 5, ENTRIES = 64, DIST_W = 9, TA_W = 30;
  localparam int unsigned IDX_W = 6, TBL_W = 3;

  logic                 clk = 1'b0;
  logic                 rd_en, sw_we;
  logic [TBL_W-1:0]     rd_tbl, sw_tbl;
  logic [IDX_W-1:0]     rd_idx, sw_idx;
  logic [DIST_W-1:0]    rd_nt_d, rd_t_d;
  logic [IDX_W-1:0]     rd_nt_i, rd_t_i;
  logic [TA_W-1:0]      rd_ta;
  br_type_t             rd_type;
  tbl_field_e           sw_field;
  logic [SW_DATA_W-1:0] sw_wdata, sw_rdata;

  int checks = 0, failures = 0;

  logic [DIST_W-1:0] m_nt_d [NUM_TABLES][ENTRIES];
  logic [DIST_W-1:0] m_t_d  [NUM_TABLES][ENTRIES];
  logic [IDX_W-1:0]  m_nt_i [NUM_TABLES][ENTRIES];
  logic [IDX_W-1:0]  m_t_i  [NUM_TABLES][ENTRIES];
  logic [TA_W-1:0]   m_ta   [NUM_TABLES][ENTRIES];
  logic [3:0]        m_ty   [NUM_TABLES][ENTRIES];

  acbtb_table #(.NUM_TABLES(NUM_TABLES), .ENTRIES(ENTRIES), .DIST_W(DIST_W), .TA_W(TA_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(int t, int i, tbl_field_e f, logic [31:0] d);
    sw_we = 1; sw_tbl = TBL_W'(t); sw_idx = IDX_W'(i); sw_field = f; sw_wdata = d;
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
    rd_en = 0; rd_tbl = 0; rd_idx = 0; sw_we = 0; sw_tbl = 0; sw_idx = 0;
    sw_field = FLD_NT; sw_wdata = 0;
    @(negedge clk);
    for (int t = 0; t < NUM_TABLES; t++)
      for (int i = 0; i < ENTRIES; i++) begin
        m_nt_d[t][i] = DIST_W'($urandom); m_nt_i[t][i] = IDX_W'($urandom);
        m_t_d[t][i]  = DIST_W'($urandom); m_t_i[t][i]  = IDX_W'($urandom);
        m_ta[t][i]   = TA_W'($urandom);   m_ty[t][i]   = 4'($urandom);
        wr(t, i, FLD_NT,   {10'd0, m_nt_i[t][i], 7'd0, m_nt_d[t][i]});
        wr(t, i, FLD_T,    {10'd0, m_t_i[t][i], 7'd0, m_t_d[t][i]});
        wr(t, i, FLD_TA,   {2'd0, m_ta[t][i]});
        wr(t, i, FLD_TYPE, {28'd0, m_ty[t][i]});
      end
    // writes to a table that does not exist must not alias onto real ones
    for (int i = 0; i < ENTRIES; i++) wr(5 + (i % 3), i, FLD_TA, 32'h3fff_ffff);
    // software read-back
    for (int t = 0; t < NUM_TABLES; t++)
      for (int i = 0; i < ENTRIES; i++) begin
        sw_tbl = TBL_W'(t); sw_idx = IDX_W'(i);
        sw_field = FLD_NT; #1 check("sw NT",  sw_rdata == {10'd0, m_nt_i[t][i], 7'd0, m_nt_d[t][i]});
        sw_field = FLD_T;  #1 check("sw T",   sw_rdata == {10'd0, m_t_i[t][i], 7'd0, m_t_d[t][i]});
        sw_field = FLD_TA; #1 check("sw TA",  sw_rdata == {2'd0, m_ta[t][i]});
        sw_field = FLD_TYPE; #1 check("sw TY", sw_rdata == {28'd0, m_ty[t][i]});
      end
    // fetch read port
    for (int n = 0; n < 2000; n++) begin
      int t, i;
      t = $urandom_range(0, NUM_TABLES - 1); i = $urandom_range(0, ENTRIES - 1);
      rd_en = ($urandom_range(0, 3) != 0); rd_tbl = TBL_W'(t); rd_idx = IDX_W'(i);
      #1;
      if (rd_en)
        check("fetch read", rd_nt_d == m_nt_d[t][i] && rd_nt_i == m_nt_i[t][i] &&
                            rd_t_d == m_t_d[t][i] && rd_t_i == m_t_i[t][i] &&
                            rd_ta == m_ta[t][i] && rd_type == m_ty[t][i]);
      else
        check("idle read", rd_nt_d == 0 && rd_t_d == 0 && rd_ta == 0 && rd_type == 0);
    end
    rd_en = 1; rd_tbl = 3'd6; #1 check("absent table reads zero", rd_ta == 0 && rd_type == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
