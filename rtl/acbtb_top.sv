// acbtb_top: application-customisable branch target buffer (ACBTB) unit.
//
// A conventional branch target buffer is a tagged cache looked up with the
// PC on every fetch. This unit instead knows, from compile-time analysis of a
// program hot spot, how many instructions separate consecutive control-
// altering instructions on every path. A down-counter (CNT) counts the
// fetches until the next control instruction and a register (IND) holds that
// instruction's entry in a small directly indexed table (the ACBTB). The
// table is read only when CNT reaches zero, i.e. once per control
// instruction, and tells the fetch stage the branch type, its target and
// where the following control instruction lies on the taken and not-taken
// paths.
//
// Blocks: acbtb_table (NUM_TABLES tables of ENTRIES entries, one active),
// acbtb_cnt (CNT, path mux, decrement, zero comparator), acbtb_ind (IND and
// its path mux), acbtb_ckpt (other-path records for misprediction recovery),
// acbtb_ibit (indirect branch identification table), acbtb_gshare (gshare
// direction predictor, left out when GSHARE_HIST is 0) and acbtb_ctrl
// (identification, recovery, indirect handling, software register map).
//
// Direction of a conditional branch: dp_taken when the processor offers a
// prediction (dp_valid), otherwise the gshare prediction; without gshare,
// the entry's static hint.
//
// Fetch-side timing: in the cycle of fetch_valid the outputs br_valid,
// br_type, br_taken and br_target describe the instruction (or packet) being
// fetched in that same cycle; br_target is the byte address {TA, 2'b00}. The
// front end uses them to choose the next fetch address in that cycle.
// fetch_stall asks it to hold fetch. res_valid/res_taken report, in program
// order, the outcome of each conditional branch that was reported on
// br_valid; mispredict answers in the same cycle and the front end must
// discard the fetches of that cycle. ijmp_valid/ijmp_target report the
// destination of an outstanding indirect jump or call. The software bus is
// the word-addressed map of acbtb_pkg with a single-cycle write and a
// combinational read.
//
// The directly indexed table with NT_D/NT_I/T_D/T_I/TA/Type, the CNT and IND
// registers, several tables with one active, software control of CNT/IND and
// the IBIT follow the document, as do the defaults of 64 entries, 6-bit
// indices, 9-bit distances and the ten-bit gshare history. The number of
// tables, the 30-bit target, the IBIT and checkpoint sizes, the gshare
// indexing and all interface protocols are this design's choices.
module acbtb_top
  import acbtb_pkg::*;
#(
  parameter int unsigned NUM_TABLES    = 5,
  parameter int unsigned ENTRIES       = 64,
  parameter int unsigned DIST_W        = 9,
  parameter int unsigned TA_W          = 30,
  parameter int unsigned IBIT_ENTRIES  = 16,
  parameter int unsigned CKPT_DEPTH    = 4,
  parameter bit          NT_I_IMPLICIT = 1'b0,
  parameter int unsigned GSHARE_HIST   = 10,
  localparam int unsigned IDX_W        = $clog2(ENTRIES),
  localparam int unsigned PC_W         = TA_W + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // fetch stage
  input  logic                 fetch_valid,
  output logic                 fetch_stall,
  input  logic                 dp_valid,
  input  logic                 dp_taken,
  output logic                 br_valid,
  output br_type_t             br_type,
  output logic                 br_taken,
  output logic [PC_W-1:0]      br_target,
  output logic [IDX_W-1:0]     br_idx,
  // execute stage
  input  logic                 res_valid,
  input  logic                 res_taken,
  output logic                 mispredict,
  input  logic                 ijmp_valid,
  input  logic [PC_W-1:0]      ijmp_target,
  // status
  output logic                 enabled,
  output logic                 ind_wait,
  output logic                 tbl_access,
  output logic                 ibit_access,
  // software bus
  input  logic                 sw_we,
  input  logic [SW_ADDR_W-1:0] sw_addr,
  input  logic [SW_DATA_W-1:0] sw_wdata,
  output logic [SW_DATA_W-1:0] sw_rdata
);

  localparam int unsigned TBL_W = (NUM_TABLES > 1) ? $clog2(NUM_TABLES) : 1;
  localparam int unsigned EW    = (IBIT_ENTRIES > 1) ? $clog2(IBIT_ENTRIES) : 1;
  localparam int unsigned CK_W  = $clog2(CKPT_DEPTH + 1);

  // table
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
  // CNT / IND
  logic [DIST_W-1:0]    cnt, cnt_set_val;
  logic                 cnt_zero, cnt_set, cnt_load, cnt_dec;
  logic [IDX_W-1:0]     ind, ind_set_val;
  logic                 ind_set, ind_load, dir_taken;
  // checkpoints
  logic                 ck_push, ck_push_taken, ck_pop, ck_flush;
  logic [DIST_W-1:0]    ck_push_alt_d, ck_head_alt_d;
  logic [IDX_W-1:0]     ck_push_alt_i, ck_head_alt_i;
  logic                 ck_head_taken, ck_empty, ck_full;
  logic [CK_W-1:0]      ck_count;
  // direction: external prediction first, else gshare, else static hint
  logic                 gs_taken, dir_valid, dir_pred;
  // IBIT
  logic                 ib_lk_en, ib_lk_hit;
  logic [TA_W-1:0]      ib_lk_addr;
  logic [DIST_W-1:0]    ib_lk_cnt;
  logic [IDX_W-1:0]     ib_lk_ind;
  logic                 ib_sw_we, ib_sw_field;
  logic [EW-1:0]        ib_sw_entry;
  logic [SW_DATA_W-1:0] ib_sw_rdata;

  logic [TA_W-1:0]      br_ta;

  assign br_target   = {br_ta, 2'b00};
  assign tbl_access  = tbl_rd_en;
  assign ibit_access = ib_lk_en;

  acbtb_table #(
    .NUM_TABLES(NUM_TABLES), .ENTRIES(ENTRIES), .DIST_W(DIST_W), .TA_W(TA_W)
  ) u_table (
    .clk      (clk),
    .rd_en    (tbl_rd_en),
    .rd_tbl   (tbl_rd_tbl),
    .rd_idx   (tbl_rd_idx),
    .rd_nt_d  (tbl_nt_d),
    .rd_nt_i  (tbl_nt_i),
    .rd_t_d   (tbl_t_d),
    .rd_t_i   (tbl_t_i),
    .rd_ta    (tbl_ta),
    .rd_type  (tbl_type),
    .sw_we    (tbl_sw_we),
    .sw_tbl   (tbl_sw_tbl),
    .sw_idx   (tbl_sw_idx),
    .sw_field (tbl_sw_field),
    .sw_wdata (sw_wdata),
    .sw_rdata (tbl_sw_rdata)
  );

  acbtb_cnt #(.DIST_W(DIST_W)) u_cnt (
    .clk       (clk),
    .rst_n     (rst_n),
    .set       (cnt_set),
    .set_val   (cnt_set_val),
    .load      (cnt_load),
    .dir_taken (dir_taken),
    .nt_d      (tbl_nt_d),
    .t_d       (tbl_t_d),
    .dec       (cnt_dec),
    .cnt       (cnt),
    .zero      (cnt_zero)
  );

  acbtb_ind #(.IDX_W(IDX_W), .NT_I_IMPLICIT(NT_I_IMPLICIT)) u_ind (
    .clk       (clk),
    .rst_n     (rst_n),
    .set       (ind_set),
    .set_val   (ind_set_val),
    .load      (ind_load),
    .dir_taken (dir_taken),
    .nt_i      (tbl_nt_i),
    .t_i       (tbl_t_i),
    .idx       (ind)
  );

  acbtb_ckpt #(.DEPTH(CKPT_DEPTH), .DIST_W(DIST_W), .IDX_W(IDX_W)) u_ckpt (
    .clk        (clk),
    .rst_n      (rst_n),
    .push       (ck_push),
    .push_taken (ck_push_taken),
    .push_alt_d (ck_push_alt_d),
    .push_alt_i (ck_push_alt_i),
    .pop        (ck_pop),
    .flush      (ck_flush),
    .head_taken (ck_head_taken),
    .head_alt_d (ck_head_alt_d),
    .head_alt_i (ck_head_alt_i),
    .empty      (ck_empty),
    .full       (ck_full),
    .count      (ck_count)
  );

  if (GSHARE_HIST > 0) begin : g_gshare
    acbtb_gshare #(.HIST_W(GSHARE_HIST), .IDX_W(IDX_W), .DEPTH(CKPT_DEPTH)) u_gshare (
      .clk       (clk),
      .rst_n     (rst_n),
      .lk_idx    (ind),
      .lk_taken  (gs_taken),
      .push      (ck_push),
      .pop       (ck_pop),
      .res_taken (res_taken),
      .flush     (ck_flush)
    );
    assign dir_valid = 1'b1;
    assign dir_pred  = dp_valid ? dp_taken : gs_taken;
  end else begin : g_no_gshare
    assign gs_taken  = 1'b0;
    assign dir_valid = dp_valid;
    assign dir_pred  = dp_taken;
  end

  acbtb_ibit #(
    .IBIT_ENTRIES(IBIT_ENTRIES), .TA_W(TA_W), .DIST_W(DIST_W), .IDX_W(IDX_W)
  ) u_ibit (
    .clk      (clk),
    .rst_n    (rst_n),
    .lk_en    (ib_lk_en),
    .lk_addr  (ib_lk_addr),
    .lk_hit   (ib_lk_hit),
    .lk_cnt   (ib_lk_cnt),
    .lk_ind   (ib_lk_ind),
    .sw_we    (ib_sw_we),
    .sw_entry (ib_sw_entry),
    .sw_field (ib_sw_field),
    .sw_wdata (sw_wdata),
    .sw_rdata (ib_sw_rdata)
  );

  acbtb_ctrl #(
    .NUM_TABLES(NUM_TABLES), .ENTRIES(ENTRIES), .DIST_W(DIST_W), .TA_W(TA_W),
    .IBIT_ENTRIES(IBIT_ENTRIES), .CKPT_DEPTH(CKPT_DEPTH), .NT_I_IMPLICIT(NT_I_IMPLICIT)
  ) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .fetch_valid   (fetch_valid),
    .fetch_stall   (fetch_stall),
    .dp_valid      (dir_valid),
    .dp_taken      (dir_pred),
    .br_valid      (br_valid),
    .br_type       (br_type),
    .br_taken      (br_taken),
    .br_ta         (br_ta),
    .br_idx        (br_idx),
    .res_valid     (res_valid),
    .res_taken     (res_taken),
    .mispredict    (mispredict),
    .ijmp_valid    (ijmp_valid),
    .ijmp_target   (ijmp_target[PC_W-1:2]),
    .enabled       (enabled),
    .ind_wait      (ind_wait),
    .sw_we         (sw_we),
    .sw_addr       (sw_addr),
    .sw_wdata      (sw_wdata),
    .sw_rdata      (sw_rdata),
    .tbl_rd_en     (tbl_rd_en),
    .tbl_rd_tbl    (tbl_rd_tbl),
    .tbl_rd_idx    (tbl_rd_idx),
    .tbl_nt_d      (tbl_nt_d),
    .tbl_nt_i      (tbl_nt_i),
    .tbl_t_d       (tbl_t_d),
    .tbl_t_i       (tbl_t_i),
    .tbl_ta        (tbl_ta),
    .tbl_type      (tbl_type),
    .tbl_sw_we     (tbl_sw_we),
    .tbl_sw_tbl    (tbl_sw_tbl),
    .tbl_sw_idx    (tbl_sw_idx),
    .tbl_sw_field  (tbl_sw_field),
    .tbl_sw_rdata  (tbl_sw_rdata),
    .cnt           (cnt),
    .cnt_zero      (cnt_zero),
    .ind           (ind),
    .cnt_set       (cnt_set),
    .cnt_set_val   (cnt_set_val),
    .cnt_load      (cnt_load),
    .cnt_dec       (cnt_dec),
    .ind_set       (ind_set),
    .ind_set_val   (ind_set_val),
    .ind_load      (ind_load),
    .dir_taken     (dir_taken),
    .ck_push       (ck_push),
    .ck_push_taken (ck_push_taken),
    .ck_push_alt_d (ck_push_alt_d),
    .ck_push_alt_i (ck_push_alt_i),
    .ck_pop        (ck_pop),
    .ck_flush      (ck_flush),
    .ck_head_taken (ck_head_taken),
    .ck_head_alt_d (ck_head_alt_d),
    .ck_head_alt_i (ck_head_alt_i),
    .ck_empty      (ck_empty),
    .ck_full       (ck_full),
    .ck_count      (ck_count),
    .ib_lk_en      (ib_lk_en),
    .ib_lk_addr    (ib_lk_addr),
    .ib_lk_hit     (ib_lk_hit),
    .ib_lk_cnt     (ib_lk_cnt),
    .ib_lk_ind     (ib_lk_ind),
    .ib_sw_we      (ib_sw_we),
    .ib_sw_entry   (ib_sw_entry),
    .ib_sw_field   (ib_sw_field),
    .ib_sw_rdata   (ib_sw_rdata)
  );

endmodule
