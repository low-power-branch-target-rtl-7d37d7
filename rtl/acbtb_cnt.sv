// acbtb_cnt: the CNT down-counter with its path multiplexer and the zero
// comparator (CMP0).
//
// CNT holds the number of fetch units (instructions, or packets on a VLIW
// machine) still to be fetched before the next control-altering instruction.
// When a control instruction is identified (load), the multiplexer selects
// T_D or NT_D by the chosen direction and CNT is loaded with it. On every
// other fetch (dec) CNT is decremented by one. zero (CMP0) is high while CNT
// is zero: the next fetched unit is a control instruction and the ACBTB must
// be read. set/set_val overwrite CNT directly; they serve the software write
// of CNT, the IBIT reload after an indirect jump and the misprediction
// restore, and take priority over load and dec.
//
// Timing: all updates take effect at the next rising clock edge; zero is a
// combinational function of the register. Reset clears CNT.
//
// The multiplexer, register, decrement and comparator follow the published
// figure of the architecture; the set port and the priority order are this
// design's choices. A decrement of a zero CNT without load is not expected
// (the control logic always loads on a fetch at zero); the counter then
// holds at zero.
module acbtb_cnt #(
  parameter int unsigned DIST_W = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              set,
  input  logic [DIST_W-1:0] set_val,
  input  logic              load,
  input  logic              dir_taken,
  input  logic [DIST_W-1:0] nt_d,
  input  logic [DIST_W-1:0] t_d,
  input  logic              dec,
  output logic [DIST_W-1:0] cnt,
  output logic              zero
);

  logic [DIST_W-1:0] path_d;
  assign path_d = dir_taken ? t_d : nt_d;
  assign zero   = (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              cnt <= '0;
    else if (set)            cnt <= set_val;
    else if (load)           cnt <= path_d;
    else if (dec && !zero)   cnt <= cnt - 1'b1;
  end

endmodule
