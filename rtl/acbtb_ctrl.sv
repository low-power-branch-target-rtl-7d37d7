// acbtb_ctrl: sequencing and software access of the ACBTB unit.
//
// Identification: while tracking is enabled and no indirect jump is
// outstanding, a fetch with CNT at zero is a control-altering instruction.
// Only then is the active ACBTB table read, at index IND (tbl_rd_en). From
// the entry's Type the direction is chosen: conditional branches use the
// dynamic prediction when dp_valid is high, otherwise the entry's static hint;
// jumps, calls and returns are always taken. CNT and IND are then loaded for
// the chosen path (cnt_load/ind_load with dir_taken), and for a conditional
// branch the other path's distance and index are recorded in the checkpoint
// FIFO. Indirect jumps and calls leave CNT and IND alone and raise an
// indirect wait; a Type of BT_NONE (end of hot spot) switches tracking off.
// Every other fetch while enabled decrements CNT.
//
// Resolution: res_valid/res_taken give, in program order, the outcome of
// each conditional branch that was reported on br_valid. A mismatch with the
// recorded prediction raises mispredict, reloads CNT/IND with the recorded
// other path, empties the checkpoints, ends any indirect wait and re-enables
// tracking. An indirect wait ends when ijmp_valid brings the destination and
// the IBIT holds it, or when software writes CNT.
//
// Software CNT/IND writes: while tracking is off or an indirect wait is
// outstanding they load CNT and IND at once (hot-spot entry, release of a
// wait). While tracking runs, they are held in staging registers instead,
// because the compiler places them before the indirect jump in program
// order and the jump may not yet have been fetched; the staged values are
// loaded when the next indirect jump is identified (no wait then), or at once
// if a wait is already outstanding. A staged IND is used only together with a
// staged CNT; writing CTRL discards staged values.
//
// Software port: a word-addressed, single-cycle bus (sw_we, sw_addr,
// sw_wdata, combinational sw_rdata); see acbtb_pkg for the map. Writing CTRL
// sets enable and the active table and empties the checkpoints.
//
// fetch_stall asks the front end to hold fetch: during an indirect wait, and
// when a control instruction is due (CNT zero) while the checkpoint FIFO is
// full. A fetch made while stalled is ignored.
//
// Priority within a cycle: misprediction restore, then IBIT reload, then
// staged values, then a direct software write, then identification, then
// decrement.
//
// The once-per-branch table access, the direction-dependent load of CNT and
// IND, decrement per fetch, software-writable CNT/IND and the IBIT follow the
// document. The end-of-hot-spot entry, the checkpoint-based recovery, the
// stall conditions and the address map are this design's choices.
module acbtb_ctrl
  import acbtb_pkg::*;
#(
  parameter int unsigned NUM_TABLES    = 5,
  parameter int unsigned ENTRIES       = 64,
  parameter int unsigned DIST_W        = 9,
  parameter int unsigned TA_W          = 30,
  parameter int unsigned IBIT_ENTRIES  = 16,
  parameter int unsigned CKPT_DEPTH    = 4,
  parameter bit          NT_I_IMPLICIT = 1'b0,
  localparam int unsigned IDX_W        = $clog2(ENTRIES),
  localparam int unsigned TBL_W        = (NUM_TABLES > 1) ? $clog2(NUM_TABLES) : 1,
  localparam int unsigned EW           = (IBIT_ENTRIES > 1) ? $clog2(IBIT_ENTRIES) : 1,
  localparam int unsigned CK_W         = $clog2(CKPT_DEPTH + 1)
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
  output logic [TA_W-1:0]      br_ta,
  output logic [IDX_W-1:0]     br_idx,
  // resolution
  input  logic                 res_valid,
  input  logic                 res_taken,
  output logic                 mispredict,
  input  logic                 ijmp_valid,
  input  logic [TA_W-1:0]      ijmp_target,
  // status
  output logic                 enabled,
  output logic                 ind_wait,
  // software bus
  input  logic                 sw_we,
  input  logic [SW_ADDR_W-1:0] sw_addr,
  input  logic [SW_DATA_W-1:0] sw_wdata,
  output logic [SW_DATA_W-1:0] sw_rdata,
  // ACBTB table
  output logic                 tbl_rd_en,
  output logic [TBL_W-1:0]     tbl_rd_tbl,
  output logic [IDX_W-1:0]     tbl_rd_idx,
  input  logic [DIST_W-1:0]    tbl_nt_d,
  input  logic [IDX_W-1:0]     tbl_nt_i,
  input  logic [DIST_W-1:0]    tbl_t_d,
  input  logic [IDX_W-1:0]     tbl_t_i,
  input  logic [TA_W-1:0]      tbl_ta,
  input  br_type_t             tbl_type,
  output logic                 tbl_sw_we,
  output logic [TBL_W-1:0]     tbl_sw_tbl,
  output logic [IDX_W-1:0]     tbl_sw_idx,
  output tbl_field_e           tbl_sw_field,
  input  logic [SW_DATA_W-1:0] tbl_sw_rdata,
  // CNT and IND registers
  input  logic [DIST_W-1:0]    cnt,
  input  logic                 cnt_zero,
  input  logic [IDX_W-1:0]     ind,
  output logic                 cnt_set,
  output logic [DIST_W-1:0]    cnt_set_val,
  output logic                 cnt_load,
  output logic                 cnt_dec,
  output logic                 ind_set,
  output logic [IDX_W-1:0]     ind_set_val,
  output logic                 ind_load,
  output logic                 dir_taken,
  // checkpoint FIFO
  output logic                 ck_push,
  output logic                 ck_push_taken,
  output logic [DIST_W-1:0]    ck_push_alt_d,
  output logic [IDX_W-1:0]     ck_push_alt_i,
  output logic                 ck_pop,
  output logic                 ck_flush,
  input  logic                 ck_head_taken,
  input  logic [DIST_W-1:0]    ck_head_alt_d,
  input  logic [IDX_W-1:0]     ck_head_alt_i,
  input  logic                 ck_empty,
  input  logic                 ck_full,
  input  logic [CK_W-1:0]      ck_count,
  // IBIT
  output logic                 ib_lk_en,
  output logic [TA_W-1:0]      ib_lk_addr,
  input  logic                 ib_lk_hit,
  input  logic [DIST_W-1:0]    ib_lk_cnt,
  input  logic [IDX_W-1:0]     ib_lk_ind,
  output logic                 ib_sw_we,
  output logic [EW-1:0]        ib_sw_entry,
  output logic                 ib_sw_field,
  input  logic [SW_DATA_W-1:0] ib_sw_rdata
);

  // ------------------------------------------------------------------
  // Software address decode
  // ------------------------------------------------------------------
  logic sel_tbl, sel_reg, sel_ibit;
  assign sel_tbl  = !sw_addr[SW_ADDR_W-1];
  assign sel_reg  =  sw_addr[SW_ADDR_W-1] && !sw_addr[SW_ADDR_W-2];
  assign sel_ibit =  sw_addr[SW_ADDR_W-1] &&  sw_addr[SW_ADDR_W-2];

  reg_sel_e reg_sel;
  assign reg_sel = reg_sel_e'(sw_addr[1:0]);

  assign tbl_sw_we    = sw_we && sel_tbl;
  assign tbl_sw_field = tbl_field_e'(sw_addr[1:0]);
  assign tbl_sw_idx   = sw_addr[2 +: IDX_W];
  assign tbl_sw_tbl   = sw_addr[2 + IDX_W +: TBL_W];

  assign ib_sw_we    = sw_we && sel_ibit;
  assign ib_sw_field = sw_addr[0];
  assign ib_sw_entry = sw_addr[1 +: EW];

  logic wr_ctrl, wr_cnt, wr_ind;
  assign wr_ctrl = sw_we && sel_reg && reg_sel == REG_CTRL;
  assign wr_cnt  = sw_we && sel_reg && reg_sel == REG_CNT;
  assign wr_ind  = sw_we && sel_reg && reg_sel == REG_IND;

  // ------------------------------------------------------------------
  // State
  // ------------------------------------------------------------------
  logic              en_q, wait_q;
  logic [TBL_W-1:0]  act_q;
  logic              stg_cnt_v, stg_ind_v;
  logic [DIST_W-1:0] stg_cnt;
  logic [IDX_W-1:0]  stg_ind;

  // software CNT/IND writes act at once only when not tracking or waiting
  logic sw_direct, wr_cnt_now, wr_ind_now;
  assign sw_direct  = !en_q || wait_q;
  assign wr_cnt_now = wr_cnt && sw_direct;
  assign wr_ind_now = wr_ind && sw_direct;

  assign enabled  = en_q;
  assign ind_wait = wait_q;

  // ------------------------------------------------------------------
  // Identification and direction choice
  // ------------------------------------------------------------------
  logic ident, restore, ib_reload;
  br_class_e cls;

  assign fetch_stall = en_q && (wait_q || (cnt_zero && ck_full));
  assign ident       = en_q && fetch_valid && cnt_zero && !fetch_stall;

  assign tbl_rd_en  = ident;
  assign tbl_rd_tbl = act_q;
  assign tbl_rd_idx = ind;
  assign cls        = tbl_type.cls;

  always_comb begin
    unique case (cls)
      BT_COND:                   dir_taken = dp_valid ? dp_taken : tbl_type.static_taken;
      BT_JUMP, BT_CALL, BT_RET,
      BT_IJUMP, BT_ICALL:        dir_taken = 1'b1;
      default:                   dir_taken = 1'b0;
    endcase
  end

  logic path_load;
  assign path_load = ident && (cls == BT_COND || is_uncond(cls));

  assign br_valid = ident && cls != BT_NONE;
  assign br_type  = tbl_type;
  assign br_taken = br_valid && dir_taken;
  assign br_ta    = is_indirect(cls) ? '0 : tbl_ta;
  assign br_idx   = ind;

  // ------------------------------------------------------------------
  // Resolution and recovery
  // ------------------------------------------------------------------
  assign ck_pop     = res_valid && !ck_empty;
  assign mispredict = ck_pop && (res_taken != ck_head_taken);
  assign restore    = mispredict;
  assign ck_flush   = restore || wr_ctrl;

  logic [IDX_W-1:0] nt_i_eff;
  assign nt_i_eff = NT_I_IMPLICIT ? ind + 1'b1 : tbl_nt_i;

  assign ck_push       = ident && cls == BT_COND;
  assign ck_push_taken = dir_taken;
  assign ck_push_alt_d = dir_taken ? tbl_nt_d : tbl_t_d;
  assign ck_push_alt_i = dir_taken ? nt_i_eff : tbl_t_i;

  assign ib_lk_en   = wait_q && ijmp_valid && !restore && !stg_cnt_v;
  assign ib_lk_addr = ijmp_target;
  assign ib_reload  = ib_lk_en && ib_lk_hit;

  // staged software values consumed by an indirect jump or an open wait
  logic stg_apply;
  assign stg_apply = !restore && stg_cnt_v &&
                     (wait_q || (ident && is_indirect(cls)));

  // ------------------------------------------------------------------
  // CNT / IND control, highest priority first
  // ------------------------------------------------------------------
  always_comb begin
    cnt_set     = 1'b0;
    cnt_set_val = '0;
    ind_set     = 1'b0;
    ind_set_val = '0;
    if (restore) begin
      cnt_set     = 1'b1;
      cnt_set_val = ck_head_alt_d;
      ind_set     = 1'b1;
      ind_set_val = ck_head_alt_i;
    end else if (ib_reload) begin
      cnt_set     = 1'b1;
      cnt_set_val = ib_lk_cnt;
      ind_set     = 1'b1;
      ind_set_val = ib_lk_ind;
    end else if (stg_apply) begin
      cnt_set     = 1'b1;
      cnt_set_val = stg_cnt;
      ind_set     = stg_ind_v;
      ind_set_val = stg_ind;
    end else begin
      cnt_set     = wr_cnt_now;
      cnt_set_val = sw_wdata[DIST_W-1:0];
      ind_set     = wr_ind_now;
      ind_set_val = sw_wdata[IDX_W-1:0];
    end
  end

  assign cnt_load = path_load;
  assign ind_load = path_load;
  assign cnt_dec  = en_q && fetch_valid && !fetch_stall && !cnt_zero;

  // ------------------------------------------------------------------
  // Control state
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q   <= 1'b0;
      wait_q <= 1'b0;
      act_q  <= '0;
    end else begin
      if (restore) begin
        en_q   <= 1'b1;
        wait_q <= 1'b0;
      end else if (ib_reload || stg_apply || wr_cnt_now) begin
        wait_q <= 1'b0;
      end else if (wr_ctrl) begin
        en_q   <= sw_wdata[0];
        act_q  <= sw_wdata[8 +: TBL_W];
        wait_q <= 1'b0;
      end else if (ident) begin
        if (is_indirect(cls) && !stg_cnt_v) wait_q <= 1'b1;
        else if (cls == BT_NONE) en_q   <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stg_cnt_v <= 1'b0;
      stg_ind_v <= 1'b0;
      stg_cnt   <= '0;
      stg_ind   <= '0;
    end else if (wr_ctrl) begin
      stg_cnt_v <= 1'b0;
      stg_ind_v <= 1'b0;
    end else begin
      if (stg_apply) begin
        stg_cnt_v <= 1'b0;
        stg_ind_v <= 1'b0;
      end
      if (wr_cnt && !sw_direct) begin
        stg_cnt_v <= 1'b1;
        stg_cnt   <= sw_wdata[DIST_W-1:0];
      end
      if (wr_ind && !sw_direct) begin
        stg_ind_v <= 1'b1;
        stg_ind   <= sw_wdata[IDX_W-1:0];
      end
    end
  end

  // ------------------------------------------------------------------
  // Software read-back
  // ------------------------------------------------------------------
  always_comb begin
    sw_rdata = '0;
    if (sel_tbl) begin
      sw_rdata = tbl_sw_rdata;
    end else if (sel_ibit) begin
      sw_rdata = ib_sw_rdata;
    end else begin
      unique case (reg_sel)
        REG_CTRL:   begin sw_rdata[0] = en_q; sw_rdata[8 +: TBL_W] = act_q; end
        REG_CNT:    sw_rdata[DIST_W-1:0] = cnt;
        REG_IND:    sw_rdata[IDX_W-1:0]  = ind;
        REG_STATUS: begin
          sw_rdata[0]          = cnt_zero;
          sw_rdata[1]          = wait_q;
          sw_rdata[2]          = stg_cnt_v;
          sw_rdata[8 +: CK_W]  = ck_count;
        end
      endcase
    end
  end

  initial begin
    assert (3 + IDX_W + TBL_W <= SW_ADDR_W && 2 + EW <= SW_ADDR_W - 2 && TBL_W <= 8 && CK_W <= 8)
      else $fatal(1, "acbtb_ctrl: parameters do not fit the software address map");
  end

endmodule
