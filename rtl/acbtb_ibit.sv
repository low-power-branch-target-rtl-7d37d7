// acbtb_ibit: indirect branch identification table (IBIT).
//
// After an indirect jump or call, the destination is known only when the
// jump executes, so the ACBTB cannot say where the next control instruction
// is. The IBIT holds, for each possible destination of the hot spot's
// indirect jumps, the CNT and IND values that tracking must restart with at
// that destination. It is looked up once per indirect jump with the
// destination word address; on a hit the control logic loads CNT and IND
// from it.
//
// Organisation: IBIT_ENTRIES fully associative entries, each a valid bit, a
// destination tag (word address) and a {IND, CNT} pair. Lookup is
// combinational (lk_hit, lk_cnt, lk_ind in the cycle of lk_en); with no
// valid match, or lk_en low, lk_hit is low and the data are zero. Software
// writes field 0 ([31] valid, [TA_W-1:0] tag) or field 1 ({IND at [31:16],
// CNT at [15:0]}) of entry sw_entry and can read them back. Valid bits are
// cleared by reset.
//
// The table's purpose, its lookup key and its contents follow the document;
// the associative organisation and the default of 16 entries are this
// design's choices (the document gives no size).
module acbtb_ibit
  import acbtb_pkg::*;
#(
  parameter int unsigned IBIT_ENTRIES = 16,
  parameter int unsigned TA_W         = 30,
  parameter int unsigned DIST_W       = 9,
  parameter int unsigned IDX_W        = 6,
  localparam int unsigned EW          = (IBIT_ENTRIES > 1) ? $clog2(IBIT_ENTRIES) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // lookup port
  input  logic                 lk_en,
  input  logic [TA_W-1:0]      lk_addr,
  output logic                 lk_hit,
  output logic [DIST_W-1:0]    lk_cnt,
  output logic [IDX_W-1:0]     lk_ind,
  // software port
  input  logic                 sw_we,
  input  logic [EW-1:0]        sw_entry,
  input  logic                 sw_field,
  input  logic [SW_DATA_W-1:0] sw_wdata,
  output logic [SW_DATA_W-1:0] sw_rdata
);

  logic [IBIT_ENTRIES-1:0] valid;
  logic [TA_W-1:0]         tag  [IBIT_ENTRIES];
  logic [DIST_W-1:0]       cntv [IBIT_ENTRIES];
  logic [IDX_W-1:0]        indv [IBIT_ENTRIES];

  logic sw_ok;
  assign sw_ok = 32'(sw_entry) < IBIT_ENTRIES;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= '0;
    else if (sw_we && sw_ok && !sw_field) valid[sw_entry] <= sw_wdata[31];
  end

  always_ff @(posedge clk) begin
    if (sw_we && sw_ok) begin
      if (!sw_field) begin
        tag[sw_entry] <= sw_wdata[TA_W-1:0];
      end else begin
        cntv[sw_entry] <= sw_wdata[DIST_W-1:0];
        indv[sw_entry] <= sw_wdata[16 +: IDX_W];
      end
    end
  end

  // Lowest-numbered matching entry wins; software keeps tags unique.
  always_comb begin
    lk_hit = 1'b0;
    lk_cnt = '0;
    lk_ind = '0;
    if (lk_en) begin
      for (int e = IBIT_ENTRIES - 1; e >= 0; e--) begin
        if (valid[e] && tag[e] == lk_addr) begin
          lk_hit = 1'b1;
          lk_cnt = cntv[e];
          lk_ind = indv[e];
        end
      end
    end
  end

  always_comb begin
    sw_rdata = '0;
    if (sw_ok) begin
      if (!sw_field) begin
        sw_rdata[31]       = valid[sw_entry];
        sw_rdata[TA_W-1:0] = tag[sw_entry];
      end else begin
        sw_rdata[DIST_W-1:0]  = cntv[sw_entry];
        sw_rdata[16 +: IDX_W] = indv[sw_entry];
      end
    end
  end

  initial begin
    assert (DIST_W <= 16 && IDX_W <= 16 && TA_W <= 31)
      else $fatal(1, "acbtb_ibit: field widths exceed the software word lanes");
  end

endmodule
