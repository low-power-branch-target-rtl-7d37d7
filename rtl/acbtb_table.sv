// acbtb_table: the ACBTB storage, NUM_TABLES identical tables of ENTRIES
// entries each, one entry per control-altering instruction of a hot spot.
//
// Each entry holds NT_D/NT_I (distance to and index of the next control
// instruction on the not-taken path), T_D/T_I (the same on the taken path),
// TA (target word address) and Type. The table is directly indexed: the
// fetch side reads entry rd_idx of table rd_tbl combinationally, in the same
// cycle as rd_en, so the result is available in the first fetch stage. When
// rd_en is low the read outputs are held at zero, which models an access that
// does not take place (only one access per control instruction is made).
//
// Software writes one field group per access (see acbtb_pkg: NT pair, T
// pair, TA, Type) and can read any field back combinationally. A write and a
// fetch read of the same entry in one cycle return the old contents.
//
// Several tables and one active table follow the document; the per-field
// write granularity and the zero-when-idle outputs are this design's
// choices. The arrays are not reset: software programs the entries of a hot
// spot before enabling tracking.
module acbtb_table
  import acbtb_pkg::*;
#(
  parameter int unsigned NUM_TABLES = 5,
  parameter int unsigned ENTRIES    = 64,
  parameter int unsigned DIST_W     = 9,
  parameter int unsigned TA_W       = 30,
  localparam int unsigned IDX_W     = $clog2(ENTRIES),
  localparam int unsigned TBL_W     = (NUM_TABLES > 1) ? $clog2(NUM_TABLES) : 1
) (
  input  logic                 clk,
  // fetch-side read port
  input  logic                 rd_en,
  input  logic [TBL_W-1:0]     rd_tbl,
  input  logic [IDX_W-1:0]     rd_idx,
  output logic [DIST_W-1:0]    rd_nt_d,
  output logic [IDX_W-1:0]     rd_nt_i,
  output logic [DIST_W-1:0]    rd_t_d,
  output logic [IDX_W-1:0]     rd_t_i,
  output logic [TA_W-1:0]      rd_ta,
  output br_type_t             rd_type,
  // software port
  input  logic                 sw_we,
  input  logic [TBL_W-1:0]     sw_tbl,
  input  logic [IDX_W-1:0]     sw_idx,
  input  tbl_field_e           sw_field,
  input  logic [SW_DATA_W-1:0] sw_wdata,
  output logic [SW_DATA_W-1:0] sw_rdata
);

  localparam int unsigned WORDS = NUM_TABLES * ENTRIES;
  localparam int unsigned ADR_W = $clog2(WORDS);

  logic [DIST_W-1:0] nt_d_mem [WORDS];
  logic [IDX_W-1:0]  nt_i_mem [WORDS];
  logic [DIST_W-1:0] t_d_mem  [WORDS];
  logic [IDX_W-1:0]  t_i_mem  [WORDS];
  logic [TA_W-1:0]   ta_mem   [WORDS];
  logic [TYPE_W-1:0] type_mem [WORDS];

  function automatic logic [ADR_W-1:0] flat(logic [TBL_W-1:0] t, logic [IDX_W-1:0] i);
    return ADR_W'(t) * ADR_W'(ENTRIES) + ADR_W'(i);
  endfunction

  logic [ADR_W-1:0] wa, ra, sa;
  assign wa = flat(sw_tbl, sw_idx);
  assign ra = flat(rd_tbl, rd_idx);
  assign sa = wa;

  // Accesses to a table number that does not exist are ignored / read zero.
  logic wr_ok, rd_ok;
  assign wr_ok = 32'(sw_tbl) < NUM_TABLES;
  assign rd_ok = 32'(rd_tbl) < NUM_TABLES;

  always_ff @(posedge clk) begin
    if (sw_we && wr_ok) begin
      unique case (sw_field)
        FLD_NT: begin
          nt_d_mem[wa] <= sw_wdata[DIST_W-1:0];
          nt_i_mem[wa] <= sw_wdata[16 +: IDX_W];
        end
        FLD_T: begin
          t_d_mem[wa] <= sw_wdata[DIST_W-1:0];
          t_i_mem[wa] <= sw_wdata[16 +: IDX_W];
        end
        FLD_TA:   ta_mem[wa]   <= sw_wdata[TA_W-1:0];
        FLD_TYPE: type_mem[wa] <= sw_wdata[TYPE_W-1:0];
      endcase
    end
  end

  always_comb begin
    rd_nt_d = '0;
    rd_nt_i = '0;
    rd_t_d  = '0;
    rd_t_i  = '0;
    rd_ta   = '0;
    rd_type = '{static_taken: 1'b0, cls: BT_NONE};
    if (rd_en && rd_ok) begin
      rd_nt_d = nt_d_mem[ra];
      rd_nt_i = nt_i_mem[ra];
      rd_t_d  = t_d_mem[ra];
      rd_t_i  = t_i_mem[ra];
      rd_ta   = ta_mem[ra];
      rd_type = br_type_t'(type_mem[ra]);
    end
  end

  always_comb begin
    sw_rdata = '0;
    if (wr_ok) unique case (sw_field)
      FLD_NT: begin
        sw_rdata[DIST_W-1:0]  = nt_d_mem[sa];
        sw_rdata[16 +: IDX_W] = nt_i_mem[sa];
      end
      FLD_T: begin
        sw_rdata[DIST_W-1:0]  = t_d_mem[sa];
        sw_rdata[16 +: IDX_W] = t_i_mem[sa];
      end
      FLD_TA:   sw_rdata[TA_W-1:0]   = ta_mem[sa];
      FLD_TYPE: sw_rdata[TYPE_W-1:0] = type_mem[sa];
    endcase
  end

  initial begin
    assert (DIST_W <= 16 && IDX_W <= 16 && TA_W <= SW_DATA_W)
      else $fatal(1, "acbtb_table: field widths exceed the software word lanes");
  end

endmodule
