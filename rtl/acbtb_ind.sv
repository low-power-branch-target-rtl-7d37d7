// acbtb_ind: the IND register, which holds the ACBTB index of the next
// control-altering instruction, with its path multiplexer.
//
// When a control instruction is identified (load), IND is loaded with T_I or
// NT_I according to the chosen direction. With NT_I_IMPLICIT set, the table's
// NT_I field is not used: control instructions are then numbered in program
// order and the not-taken successor is simply IND + 1. set/set_val overwrite
// IND directly (software write, IBIT reload, misprediction restore) and take
// priority over load.
//
// Timing: updates at the next rising clock edge; idx is the register output.
// Reset clears IND.
//
// The multiplexer and register follow the published figure; the implicit
// not-taken index is the document's optional variant and is off by default.
module acbtb_ind #(
  parameter int unsigned IDX_W         = 6,
  parameter bit          NT_I_IMPLICIT = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             set,
  input  logic [IDX_W-1:0] set_val,
  input  logic             load,
  input  logic             dir_taken,
  input  logic [IDX_W-1:0] nt_i,
  input  logic [IDX_W-1:0] t_i,
  output logic [IDX_W-1:0] idx
);

  logic [IDX_W-1:0] nt_next, path_i;
  assign nt_next = NT_I_IMPLICIT ? idx + 1'b1 : nt_i;
  assign path_i  = dir_taken ? t_i : nt_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    idx <= '0;
    else if (set)  idx <= set_val;
    else if (load) idx <= path_i;
  end

endmodule
