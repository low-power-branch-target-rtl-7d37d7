// acbtb_pkg: types and constants shared by the application-customisable
// branch target buffer (ACBTB) unit.
//
// The ACBTB replaces a tagged, PC-indexed branch target buffer by a small,
// directly indexed table holding one entry per control-altering instruction
// of a program hot spot. This package defines the encoding of the entry's
// Type field and the software address map through which the processor
// programs the table, the CNT and IND registers, the table select and the
// indirect branch identification table (IBIT).
//
// The field list of an entry (NT_D, NT_I, T_D, T_I, TA, Type) follows the
// published architecture. The numeric encoding of Type, the static-prediction
// hint bit and the whole address map are this design's own choices.
package acbtb_pkg;

  // Class of a control-altering instruction (Type field, bits [2:0]).
  // BT_NONE marks the end-of-hot-spot entry: reaching it switches the
  // tracker off.
  typedef enum logic [2:0] {
    BT_NONE  = 3'd0,
    BT_COND  = 3'd1,   // conditional branch
    BT_JUMP  = 3'd2,   // direct unconditional jump
    BT_CALL  = 3'd3,   // direct function call
    BT_RET   = 3'd4,   // return with a link-time known destination
    BT_IJUMP = 3'd5,   // indirect jump
    BT_ICALL = 3'd6    // indirect function call
  } br_class_e;

  // Full Type field: class plus a static direction hint for conditional
  // branches (used when no dynamic prediction is supplied).
  typedef struct packed {
    logic      static_taken;
    br_class_e cls;
  } br_type_t;

  localparam int unsigned TYPE_W = $bits(br_type_t);

  // Software interface: one 32-bit word per access, word addresses.
  localparam int unsigned SW_DATA_W = 32;
  localparam int unsigned SW_ADDR_W = 16;

  // Table region (address MSB = 0): {table, entry, field}.
  typedef enum logic [1:0] {
    FLD_NT   = 2'd0,   // {NT_I at [31:16], NT_D at [15:0]}
    FLD_T    = 2'd1,   // {T_I  at [31:16], T_D  at [15:0]}
    FLD_TA   = 2'd2,   // target word address
    FLD_TYPE = 2'd3    // br_type_t in the low bits
  } tbl_field_e;

  // Register region (address MSB = 1, next bit = 0): register number in the
  // low two bits.
  typedef enum logic [1:0] {
    REG_CTRL   = 2'd0, // [0] enable, [15:8] active table
    REG_CNT    = 2'd1, // CNT; a write also ends an indirect-jump wait
    REG_IND    = 2'd2, // IND
    REG_STATUS = 2'd3  // read only: [0] cnt zero, [1] indirect wait,
                       // [2] staged CNT held, [15:8] checkpoints
  } reg_sel_e;

  // IBIT region (address MSB = 1, next bit = 1): {entry, field bit}.
  // Field 0: [31] valid, [29:0] destination word address.
  // Field 1: {IND at [31:16], CNT at [15:0]}.

  function automatic logic is_uncond(br_class_e c);
    return c inside {BT_JUMP, BT_CALL, BT_RET};
  endfunction

  function automatic logic is_indirect(br_class_e c);
    return c inside {BT_IJUMP, BT_ICALL};
  endfunction

endpackage
