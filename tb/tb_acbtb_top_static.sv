// tb_acbtb_top_static: end-to-end test of acbtb_top built without the gshare
// predictor (GSHARE_HIST = 0). When the bench offers no prediction, a
// conditional branch must follow the static hint stored in its entry.
// The bench reports through finished/checks/failures; this module prints the
// result line and ends the run, or ends it from a watchdog if the bench hangs.
module tb_acbtb_top_static;
  import acbtb_pkg::*;
  logic clk, rst_n, fetch_valid, fetch_stall, dp_valid, dp_taken;
  logic br_valid, br_taken, res_valid, res_taken, mispredict, ijmp_valid;
  br_type_t br_type;
  logic [31:0] br_target, ijmp_target, sw_wdata, sw_rdata;
  logic [5:0] br_idx;
  logic enabled, ind_wait, tbl_access, ibit_access, sw_we;
  logic [15:0] sw_addr;
  logic finished;
  int   checks, failures;

  acbtb_top #(.GSHARE_HIST(0)) dut (.*);
  acbtb_e2e_bench #(.GH(0)) bench (.*);

  initial begin
    #1;
    wait (finished === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #50000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
