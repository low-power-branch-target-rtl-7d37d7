// tb_acbtb_ctrl: directed self-checking test of the ACBTB control logic on
// its own. The testbench plays the table, CNT/IND registers, checkpoint FIFO
// and IBIT by driving their outputs, and checks the control decisions:
// identification only at CNT zero, direction choice (dynamic, static hint,
// unconditional), path load and checkpoint push, decrement, indirect wait
// with IBIT and software release, misprediction restore, end-of-hot-spot
// switch-off, stall when the checkpoints are full, and the software map.
module tb_acbtb_ctrl;
  import acbtb_pkg::*;
  localparam int unsigned DIST_W = 9, TA_W = 30, IDX_W = 6, TBL_W = 3, EW = 4, CK_W = 3;

  logic                 clk = 1'b0, rst_n = 1'b0;
  logic                 fetch_valid, fetch_stall, dp_valid, dp_taken;
  logic                 br_valid, br_taken;
  br_type_t             br_type;
  logic [TA_W-1:0]      br_ta;
  logic [IDX_W-1:0]     br_idx;
  logic                 res_valid, res_taken, mispredict, ijmp_valid;
  logic [TA_W-1:0]      ijmp_target;
  logic                 enabled, ind_wait;
  logic                 sw_we;
  logic [SW_ADDR_W-1:0] sw_addr;
  logic [SW_DATA_W-1:0] sw_wdata, sw_rdata;
  logic                 tbl_rd_en;
  logic [TBL_W-1:0]     tbl_rd_tbl;
  logic [IDX_W-1:0]     tbl_rd_idx;
  logic [DIST_W-1:0]    tbl_nt_d, tbl_t_d;
  logic [IDX_W-1:0]     tbl_nt_i, tbl_t_i;
  logic [TA_W-1:0]      tbl_ta;
  br_type_t             tbl_type;
  logic                 tbl_sw_we;
  logic [TBL_W-1:0]     tbl_sw_tbl;
  logic [IDX_W-1:0]     tbl_sw_idx;
  tbl_field_e           tbl_sw_field;
  logic [SW_DATA_W-1:0] tbl_sw_rdata;
  logic [DIST_W-1:0]    cnt, cnt_set_val;
  logic                 cnt_zero, cnt_set, cnt_load, cnt_dec;
  logic [IDX_W-1:0]     ind, ind_set_val;
  logic                 ind_set, ind_load, dir_taken;
  logic                 ck_push, ck_push_taken, ck_pop, ck_flush;
  logic [DIST_W-1:0]    ck_push_alt_d, ck_head_alt_d;
  logic [IDX_W-1:0]     ck_push_alt_i, ck_head_alt_i;
  logic                 ck_head_taken, ck_empty, ck_full;
  logic [CK_W-1:0]      ck_count;
  logic                 ib_lk_en, ib_lk_hit;
  logic [TA_W-1:0]      ib_lk_addr;
  logic [DIST_W-1:0]    ib_lk_cnt;
  logic [IDX_W-1:0]     ib_lk_ind;
  logic                 ib_sw_we, ib_sw_field;
  logic [EW-1:0]        ib_sw_entry;
  logic [SW_DATA_W-1:0] ib_sw_rdata;

  int checks = 0, failures = 0;

  acbtb_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic quiet();
    fetch_valid = 0; dp_valid = 0; dp_taken = 0; res_valid = 0; res_taken = 0;
    ijmp_valid = 0; ijmp_target = 0; sw_we = 0; sw_addr = 0; sw_wdata = 0;
    tbl_nt_d = 9'd11; tbl_nt_i = 6'd21; tbl_t_d = 9'd33; tbl_t_i = 6'd44;
    tbl_ta = 30'h0abcdef; tbl_type = '{static_taken: 1'b0, cls: BT_NONE};
    tbl_sw_rdata = 32'h1111_2222; ib_sw_rdata = 32'h3333_4444;
    cnt = 9'd7; cnt_zero = 0; ind = 6'd5;
    ck_head_taken = 0; ck_head_alt_d = 9'd99; ck_head_alt_i = 6'd17;
    ck_empty = 1; ck_full = 0; ck_count = 0;
    ib_lk_hit = 0; ib_lk_cnt = 9'd77; ib_lk_ind = 6'd9;
  endtask

  function automatic logic [15:0] reg_addr(reg_sel_e r);
    return {2'b10, 12'd0, r};
  endfunction

  task automatic sw_write(logic [15:0] a, logic [31:0] d);
    sw_we = 1; sw_addr = a; sw_wdata = d;
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    quiet();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // disabled: no identification
    fetch_valid = 1; cnt_zero = 1; #1;
    check("disabled no read", !tbl_rd_en && !br_valid && !cnt_dec && !enabled);
    @(negedge clk); quiet();
    // enable with table 3
    sw_write(reg_addr(REG_CTRL), 32'h0000_0301);
    check("ctrl write flushes", ck_flush);
    @(negedge clk); quiet();
    check("enabled", enabled && tbl_rd_tbl == 3);
    // software read of CTRL and CNT, IND, STATUS
    sw_addr = reg_addr(REG_CTRL); #1 check("rd ctrl", sw_rdata == 32'h0000_0301);
    sw_addr = reg_addr(REG_CNT);  #1 check("rd cnt", sw_rdata == 32'd7);
    sw_addr = reg_addr(REG_IND);  #1 check("rd ind", sw_rdata == 32'd5);
    ck_count = 3'd2; cnt_zero = 1;
    sw_addr = reg_addr(REG_STATUS); #1 check("rd status", sw_rdata == 32'h0000_0201);
    quiet();
    // decode to table and IBIT
    sw_write({1'b0, 3'd0, 3'd2, 6'd37, FLD_TA}, 32'h1234);
    check("tbl decode", tbl_sw_we && tbl_sw_tbl == 2 && tbl_sw_idx == 37 && tbl_sw_field == FLD_TA &&
                        !ib_sw_we && !cnt_set && sw_rdata == 32'h1111_2222);
    sw_write({2'b11, 9'd0, 4'd13, 1'b1}, 32'h55);
    check("ibit decode", ib_sw_we && ib_sw_entry == 13 && ib_sw_field && !tbl_sw_we &&
                         sw_rdata == 32'h3333_4444);
    quiet();
    // decrement
    fetch_valid = 1; #1;
    check("decrement", cnt_dec && !tbl_rd_en && !cnt_load && !br_valid);
    quiet();
    // conditional, static hint taken
    fetch_valid = 1; cnt_zero = 1; tbl_type = '{static_taken: 1'b1, cls: BT_COND}; #1;
    check("cond static", tbl_rd_en && tbl_rd_idx == 5 && br_valid && br_taken && br_ta == 30'h0abcdef &&
          dir_taken && cnt_load && ind_load && !cnt_dec && ck_push && ck_push_taken &&
          ck_push_alt_d == 11 && ck_push_alt_i == 21 && br_idx == 5);
    // dynamic prediction overrides hint
    dp_valid = 1; dp_taken = 0; #1;
    check("cond dynamic", br_valid && !br_taken && !dir_taken && ck_push && !ck_push_taken &&
          ck_push_alt_d == 33 && ck_push_alt_i == 44);
    quiet();
    // jump: always taken, no checkpoint
    fetch_valid = 1; cnt_zero = 1; tbl_type = '{static_taken: 1'b0, cls: BT_RET}; dp_valid = 1; #1;
    check("return", br_valid && br_taken && dir_taken && cnt_load && !ck_push);
    quiet();
    // checkpoints full: stall, no identification
    fetch_valid = 1; cnt_zero = 1; ck_full = 1; tbl_type = '{static_taken: 1'b0, cls: BT_COND}; #1;
    check("full stall", fetch_stall && !tbl_rd_en && !ck_push);
    quiet();
    // correct resolution
    res_valid = 1; res_taken = 1; ck_head_taken = 1; ck_empty = 0; #1;
    check("resolve ok", ck_pop && !mispredict && !cnt_set);
    // misprediction restore, overrides identification in the same cycle
    res_taken = 0; fetch_valid = 1; cnt_zero = 1; tbl_type = '{static_taken: 1'b0, cls: BT_COND}; #1;
    check("mispredict", ck_pop && mispredict && ck_flush && cnt_set && cnt_set_val == 99 &&
          ind_set && ind_set_val == 17);
    quiet();
    // resolution with nothing recorded is ignored
    res_valid = 1; #1 check("untracked resolve", !ck_pop && !mispredict);
    quiet();
    // indirect jump: wait, IBIT hit releases
    fetch_valid = 1; cnt_zero = 1; tbl_type = '{static_taken: 1'b0, cls: BT_IJUMP}; #1;
    check("ijump ident", br_valid && br_taken && br_ta == 0 && !cnt_load && !ck_push);
    @(negedge clk); quiet();
    fetch_valid = 1; #1;
    check("ijump wait", ind_wait && fetch_stall && !cnt_dec && !tbl_rd_en);
    ijmp_valid = 1; ijmp_target = 30'h4567; ib_lk_hit = 1; #1;
    check("ibit lookup", ib_lk_en && ib_lk_addr == 30'h4567 && cnt_set && cnt_set_val == 77 &&
          ind_set && ind_set_val == 9);
    @(negedge clk); quiet();
    check("ibit release", !ind_wait && enabled);
    // indirect call, IBIT miss, software release through IND then CNT
    fetch_valid = 1; cnt_zero = 1; tbl_type = '{static_taken: 1'b0, cls: BT_ICALL}; #1;
    @(negedge clk); quiet();
    ijmp_valid = 1; ijmp_target = 30'h9; ib_lk_hit = 0; #1;
    check("ibit miss", ib_lk_en && !cnt_set);
    @(negedge clk); quiet();
    check("still waiting", ind_wait);
    sw_write(reg_addr(REG_IND), 32'd40);
    check("sw ind", ind_set && ind_set_val == 40 && !cnt_set);
    @(negedge clk); quiet();
    check("wait after ind", ind_wait);
    sw_write(reg_addr(REG_CNT), 32'd123);
    check("sw cnt", cnt_set && cnt_set_val == 123);
    @(negedge clk); quiet();
    check("sw release", !ind_wait);
    // writes made while tracking runs are staged for the next indirect jump
    sw_write(reg_addr(REG_IND), 32'd12);
    check("ind staged", !ind_set && !cnt_set);
    @(negedge clk); quiet();
    sw_write(reg_addr(REG_CNT), 32'd34);
    check("cnt staged", !ind_set && !cnt_set);
    @(negedge clk); quiet();
    sw_addr = reg_addr(REG_STATUS); #1 check("staged status", sw_rdata[2] && !sw_rdata[1]);
    quiet();
    fetch_valid = 1; #1;
    check("staged not used by plain fetch", cnt_dec && !cnt_set);
    cnt_zero = 1; tbl_type = '{static_taken: 1'b0, cls: BT_JUMP}; #1;
    check("staged not used by jump", cnt_load && !cnt_set);
    tbl_type = '{static_taken: 1'b0, cls: BT_IJUMP}; #1;
    check("staged applied at indirect", br_valid && cnt_set && cnt_set_val == 34 &&
          ind_set && ind_set_val == 12);
    @(negedge clk); quiet();
    check("no wait with staged values", !ind_wait && !fetch_stall);
    sw_addr = reg_addr(REG_STATUS); #1 check("staging consumed", !sw_rdata[2]);
    quiet();
    // end of hot spot
    fetch_valid = 1; cnt_zero = 1; tbl_type = '{static_taken: 1'b0, cls: BT_NONE}; #1;
    check("exit entry", tbl_rd_en && !br_valid && !cnt_load);
    @(negedge clk); quiet();
    check("switched off", !enabled);
    // a misprediction of an older branch switches tracking back on
    res_valid = 1; res_taken = 1; ck_head_taken = 0; ck_empty = 0; #1;
    check("late mispredict", mispredict);
    @(negedge clk); quiet();
    check("re-enabled", enabled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
